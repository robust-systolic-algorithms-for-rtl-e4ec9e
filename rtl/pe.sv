// Processing element of one processor P_i (combinational).
//
// Each cycle the PE takes the elements at its input ports and places the
// results at its output ports, following the equations of the document:
//   O_A = I_A
//   O_B = I_B
//   O_C = I_C and (I_A = I_B)
//   O_X = I_X or (I_C and (I_A = I_B))
// where the wild card WC on the A port equals any element. The same
// computation is performed every cycle; the relational operation is selected
// only by what the host pumps into the array. The output registers are the
// inter-module link registers that follow the processor, so the PE itself holds
// no state.
module pe
  import rdb_pkg::*;
(
  input  lane_t in_i,   // I_A, I_B, I_C, I_X
  output lane_t out_o   // O_A, O_B, O_C, O_X
);

  logic match;

  always_comb begin
    match       = in_i.a.wc || (in_i.a.val == in_i.b);
    out_o.a     = in_i.a;
    out_o.b     = in_i.b;
    out_o.c     = in_i.c && match;
    out_o.x     = in_i.x || (in_i.c && match);
  end

endmodule
