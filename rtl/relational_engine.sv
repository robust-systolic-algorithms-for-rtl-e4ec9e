// Fault-tolerant systolic engine for relational database operations (top).
//
// The engine compares every tuple of a relation A (P tuples) with every tuple
// of a relation B (R tuples), Q attributes each, on a pipeline of
// N = P + Q + R - 2 identical processors, each a comparator with two shift
// registers. The pipeline is whatever chain the fault-free part of a mesh
// allows: the number of link registers between neighbouring processors
// (LINK_LEN) may be anything, yet the results and their timing at the I/O port
// are the same. From the comparison matrix [C] (c_ij = a_i equals b_j) the
// same pass also forms the intersection vector X (x_i = a_i is in B); the
// difference is X complemented and duplicate removal is A compared with itself
// with only the upper triangle of [C] seeded.
//
// Made of host_sequencer (relation memories and the I/O schedule) and the
// array. With USE_MESH = 1 (default) the array is mesh_network, a ROWS x COLS
// mesh of modules routed by the cfg port, which carries the result of testing
// and configuration (faulty modules unused, the good ones chained around a
// spanning tree); cfg must route exactly N processors. With USE_MESH = 0 it is
// systolic_array, the same pipeline described only by its link counts
// LINK_LEN, and cfg is not used.
//
// Use: write the tuples through wr_* while idle, set op, pulse start. busy is
// high for T = (P+1)(R-1) + P(P-1) + N(P+3) + 1 cycles; done then pulses and
// c_mat / x_vec hold the result. Defaults: the document's example (P=4, Q=2,
// R=3, seven processors in a 3 x 3 mesh; links 1,1,1,4,2,1,1,3 for the
// abstract pipeline); element width 8 and the cfg encoding are this design's
// choices.
module relational_engine
  import rdb_pkg::*;
#(
  parameter int unsigned P = 4,
  parameter int unsigned Q = 2,
  parameter int unsigned R = 3,
  parameter bit                  USE_MESH = 1'b1,
  parameter int unsigned         ROWS     = 3,
  parameter int unsigned         COLS     = 3,
  parameter bit [0:P+Q+R-2][7:0] LINK_LEN = {8'd1, 8'd1, 8'd1, 8'd4, 8'd2, 8'd1, 8'd1, 8'd3},
  localparam int unsigned TW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned AW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  module_cfg_t   cfg [ROWS][COLS],  // mesh routes, static (USE_MESH = 1)
  input  logic          wr_en,
  input  logic          wr_rel,     // 0: relation A, 1: relation B
  input  logic [TW-1:0] wr_tuple,   // tuple index i-1
  input  logic [AW-1:0] wr_attr,    // attribute index j-1
  input  elem_t         wr_data,
  input  op_e           op,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          c_mat [P][R],
  output logic          x_vec [P]
);

  localparam int unsigned N = P + Q + R - 2;

  lane_t to_array, from_array;

  host_sequencer #(.P(P), .Q(Q), .R(R)) u_seq (
    .clk      (clk),
    .rst      (rst),
    .wr_en    (wr_en),
    .wr_rel   (wr_rel),
    .wr_tuple (wr_tuple),
    .wr_attr  (wr_attr),
    .wr_data  (wr_data),
    .op       (op),
    .start    (start),
    .busy     (busy),
    .done     (done),
    .port_o   (to_array),
    .port_i   (from_array),
    .c_mat    (c_mat),
    .x_vec    (x_vec)
  );

  if (USE_MESH) begin : g_mesh
    mesh_network #(.ROWS(ROWS), .COLS(COLS), .K(P + 1)) u_array (
      .clk    (clk),
      .rst    (rst),
      .cfg    (cfg),
      .port_i (to_array),
      .port_o (from_array)
    );

    // The configured pipeline must hold exactly N processors.
    int unsigned n_proc;
    always_comb begin
      n_proc = 0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) n_proc += int'(cfg[r][c].proc_en);
    end

    a_proc_count: assert property (@(posedge clk) disable iff (rst)
      (start && !busy) |-> (n_proc == N))
      else $error("mesh configuration has %0d processors, the problem needs %0d", n_proc, N);
  end else begin : g_pipe
    systolic_array #(.N(N), .K(P + 1), .LINK_LEN(LINK_LEN)) u_array (
      .clk    (clk),
      .rst    (rst),
      .port_i (to_array),
      .port_o (from_array)
    );
  end

endmodule
