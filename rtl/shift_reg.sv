// Clocked shift register of DEPTH stages carrying values of type T.
//
// This is the one storage primitive of the array: the one-stage buffer B_i,
// the k-stage one-bit buffer C_i[1..k] and every inter-module link register
// are instances of it. A value presented at d in cycle t appears at q in cycle
// t + DEPTH. DEPTH = 0 is a plain wire. The synchronous reset loads every stage
// with RST_VAL, which is how step 1 of the comparison algorithm ("initialize
// all buffers to False") is met; the reset value is this design's choice of
// mechanism.
module shift_reg #(
  parameter type         T       = logic,
  parameter int unsigned DEPTH   = 1,
  parameter T            RST_VAL = T'(0)
) (
  input  logic clk,
  input  logic rst,
  input  T     d,
  output T     q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    T stage [DEPTH];

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int unsigned i = 0; i < DEPTH; i++) stage[i] <= RST_VAL;
      end else begin
        stage[0] <= d;
        for (int unsigned i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end

    assign q = stage[DEPTH-1];
  end

endmodule
