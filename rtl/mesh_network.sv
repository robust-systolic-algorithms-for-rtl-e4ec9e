// The host network: a ROWS x COLS mesh of identical modules, one of which
// (row IO_ROW, column IO_COL) is the I/O port.
//
// Each module is wired to its four neighbours; links off the edge of the mesh
// carry the idle lane. cfg[r][c] routes module (r, c) (see mesh_module):
// once testing has found the faulty modules, the good ones reachable from the
// I/O port are given routes that form a one-dimensional pipeline running
// around a spanning tree of them, leaving the I/O module towards the tree and
// returning to it. Faulty and unused modules get CFG_UNUSED. Every link is one
// register, so a pipeline around a tree of N modules has 2N link registers,
// and the port behaviour is the same as systolic_array with the matching
// link counts: it depends only on N, whatever the tree.
//
// The default 3 x 3 size, with the I/O port in the bottom-left module, is
// the mesh drawn for the example; how cfg is computed and loaded (the
// configuration algorithm, the tie-point settings, the fuses) is not part of
// this block, and cfg must be held constant while the array runs.
module mesh_network
  import rdb_pkg::*;
#(
  parameter int unsigned ROWS   = 3,
  parameter int unsigned COLS   = 3,
  parameter int unsigned IO_ROW = ROWS - 1,
  parameter int unsigned IO_COL = 0,
  parameter int unsigned K      = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  module_cfg_t cfg [ROWS][COLS],
  input  lane_t       port_i,     // Port-A/B/C/X
  output lane_t       port_o      // Output-Port-A/B/C/X
);

  // out_l[r][c][d]: link leaving module (r, c) towards side d
  lane_t out_l [ROWS][COLS][4];
  lane_t io_o  [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      lane_t in_l [4];
      // what arrives from the north is what the module above sends south, etc.
      localparam int unsigned RN = (r > 0) ? r - 1 : 0;
      localparam int unsigned RS = (r < ROWS - 1) ? r + 1 : r;
      localparam int unsigned CE = (c < COLS - 1) ? c + 1 : c;
      localparam int unsigned CW = (c > 0) ? c - 1 : 0;
      always_comb begin
        in_l[DIR_N] = (r > 0)        ? out_l[RN][c][DIR_S] : LANE_IDLE;
        in_l[DIR_E] = (c < COLS - 1) ? out_l[r][CE][DIR_W] : LANE_IDLE;
        in_l[DIR_S] = (r < ROWS - 1) ? out_l[RS][c][DIR_N] : LANE_IDLE;
        in_l[DIR_W] = (c > 0)        ? out_l[r][CW][DIR_E] : LANE_IDLE;
      end

      mesh_module #(.K(K)) u_mod (
        .clk      (clk),
        .rst      (rst),
        .cfg      (cfg[r][c]),
        .in_link  (in_l),
        .out_link (out_l[r][c]),
        .io_in    ((r == IO_ROW && c == IO_COL) ? port_i : LANE_IDLE),
        .io_out   (io_o[r][c])
      );
    end
  end

  assign port_o = io_o[IO_ROW][IO_COL];

endmodule
