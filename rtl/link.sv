// The inter-module links between two logically adjacent processors.
//
// Each link of the mesh passes through a clocked shift register on every path
// (the a, b, c and x buffers), so a chain of LEN links between P_j and its
// successor P_k delays all four streams by LEN cycles alike. LEN depends on
// how the pipeline was routed around faulty modules and is at least 1. The
// registers are cleared by reset to the idle lane (A = WC, everything else
// False/zero).
module link
  import rdb_pkg::*;
#(
  parameter int unsigned LEN = 1
) (
  input  logic  clk,
  input  logic  rst,
  input  lane_t d,
  output lane_t q
);

  shift_reg #(.T(lane_t), .DEPTH(LEN), .RST_VAL(LANE_IDLE)) u_regs (
    .clk (clk), .rst (rst), .d (d), .q (q)
  );

endmodule
