// One module of the mesh: a processor plus the routing of its four
// neighbour links (and of the host connection in the I/O module).
//
// The configured pipeline passes through a module once for every time it
// runs along a tree edge into that module, and the processor sits on exactly
// one of those passes. cfg says which arriving link (or the host input)
// feeds the processor and, for each outgoing link, whether it carries the
// processor output or one of the arriving links passed straight on. Every
// outgoing link and the host output start with a clocked lane register, which
// is the one-cycle link delay of the mesh; the host input is registered too
// (the input link of the I/O port). The routing switch stands in for the
// tie-points of a module, whose construction is not specified: it only has to
// connect any arriving link to any leaving one. Its encoding (module_cfg_t) is
// this design's. cfg is static after configuration.
//
// Timing: in_* are outputs of the neighbours' link registers; out_* and
// io_out are register outputs; io_in is captured at the end of its cycle.
module mesh_module
  import rdb_pkg::*;
#(
  parameter int unsigned K = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  module_cfg_t cfg,
  input  lane_t       in_link  [4],   // indexed by dir_e: arriving from that side
  output lane_t       out_link [4],   // indexed by dir_e: leaving towards that side
  input  lane_t       io_in,          // host input (I/O module only)
  output lane_t       io_out          // host output (I/O module only)
);

  lane_t io_in_q, proc_in, proc_out;

  function automatic lane_t pick(input src_e s, input lane_t inl [4], input lane_t pout, input lane_t ioq);
    case (s)
      SRC_PROC: return pout;
      SRC_N:    return inl[DIR_N];
      SRC_E:    return inl[DIR_E];
      SRC_S:    return inl[DIR_S];
      SRC_W:    return inl[DIR_W];
      SRC_IO:   return ioq;
      default:  return LANE_IDLE;
    endcase
  endfunction

  // input link from the host
  shift_reg #(.T(lane_t), .DEPTH(1), .RST_VAL(LANE_IDLE)) u_io_in (
    .clk (clk), .rst (rst), .d (io_in), .q (io_in_q)
  );

  always_comb proc_in = cfg.proc_en ? pick(cfg.proc_src, in_link, LANE_IDLE, io_in_q) : LANE_IDLE;

  processor #(.K(K)) u_proc (.clk (clk), .rst (rst), .in_i (proc_in), .out_o (proc_out));

  for (genvar d = 0; d < 4; d++) begin : g_out
    lane_t nxt;
    always_comb nxt = pick(cfg.out_src[d], in_link, proc_out, io_in_q);
    shift_reg #(.T(lane_t), .DEPTH(1), .RST_VAL(LANE_IDLE)) u_link_reg (
      .clk (clk), .rst (rst), .d (nxt), .q (out_link[d])
    );
  end

  lane_t io_nxt;
  always_comb io_nxt = pick(cfg.io_src, in_link, proc_out, io_in_q);
  shift_reg #(.T(lane_t), .DEPTH(1), .RST_VAL(LANE_IDLE)) u_io_out (
    .clk (clk), .rst (rst), .d (io_nxt), .q (io_out)
  );

  // A processor that is not in the pipeline must not drive anything.
  a_proc_unused: assert property (@(posedge clk) disable iff (rst)
    !cfg.proc_en |-> (cfg.io_src != SRC_PROC && cfg.out_src[0] != SRC_PROC && cfg.out_src[1] != SRC_PROC &&
                      cfg.out_src[2] != SRC_PROC && cfg.out_src[3] != SRC_PROC))
    else $error("module routes the output of a processor that is not in the pipeline");

endmodule
