// Processor P_i of the array: buffer B_i, buffer C_i[1..k] and the PE.
//
// The A and X inputs go straight to the PE. The B input passes through the
// one-stage buffer B_i and the C input through the K-stage one-bit buffer
// C_i[1..K] before reaching the PE, so relative to the A stream the B stream
// is slowed by one cycle and the C stream by K cycles in every processor. That
// difference of speeds is what makes each c_ij meet a_ik and b_jk in the right
// processor. For the comparison algorithm K = p + 1, p being the cardinality
// of relation A.
//
// Timing: in_i is the output of the preceding link register; out_o is
// combinational from the PE and must feed the next link register. The X
// stream uses a link register only, like the A stream, as the document
// specifies for the added x path.
module processor
  import rdb_pkg::*;
#(
  parameter int unsigned K = 5
) (
  input  logic  clk,
  input  logic  rst,
  input  lane_t in_i,
  output lane_t out_o
);

  lane_t pe_in;

  // B_i: one stage.
  shift_reg #(.T(elem_t), .DEPTH(1)) u_buf_b (
    .clk (clk), .rst (rst), .d (in_i.b), .q (pe_in.b)
  );

  // C_i[1..K]: K one-bit stages, cleared to False by reset.
  shift_reg #(.T(logic), .DEPTH(K)) u_buf_c (
    .clk (clk), .rst (rst), .d (in_i.c), .q (pe_in.c)
  );

  assign pe_in.a = in_i.a;
  assign pe_in.x = in_i.x;

  pe u_pe (.in_i (pe_in), .out_o (out_o));

endmodule
