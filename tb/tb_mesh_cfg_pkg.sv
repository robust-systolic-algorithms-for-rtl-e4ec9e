// Test-side configuration of a 3 x 3 mesh (I/O module bottom-left).
//
// Plays the part of the configuration step that follows testing: from a map
// of faulty modules it builds a depth-first spanning tree of the good modules
// reachable from the I/O module and routes the pipeline around it, putting
// each module's processor on the first pass through that module. It also
// provides, hand-coded, the configured machine drawn for the example
// (processors P_1 .. P_7 with two faulty modules in the middle row), in which
// P_6 and P_7 take the last pass through their modules instead.
package tb_mesh_cfg_pkg;
  import rdb_pkg::*;

  localparam int ROWS = 3, COLS = 3, IO_R = ROWS - 1, IO_C = 0;

  typedef module_cfg_t cfg_t [ROWS][COLS];
  typedef bit fault_t [ROWS][COLS];

  function automatic src_e src_of(int d);
    case (d)
      0: return SRC_N;
      1: return SRC_E;
      2: return SRC_S;
      default: return SRC_W;
    endcase
  endfunction

  class tour_builder;
    cfg_t   cfg;
    fault_t faulty;
    bit     seen [ROWS][COLS];
    int     nproc;

    function void visit(int r, int c, int from_d);
      src_e cur;
      cur = (from_d < 0) ? SRC_IO : src_of(from_d);
      cfg[r][c].proc_en  = 1'b1;
      cfg[r][c].proc_src = cur;
      nproc++;
      cur = SRC_PROC;
      for (int d = 0; d < 4; d++) begin
        int nr, nc;
        nr = r + ((d == 0) ? -1 : (d == 2) ? 1 : 0);
        nc = c + ((d == 1) ? 1 : (d == 3) ? -1 : 0);
        if (nr >= 0 && nr < ROWS && nc >= 0 && nc < COLS && !faulty[nr][nc] && !seen[nr][nc]) begin
          seen[nr][nc] = 1'b1;
          cfg[r][c].out_src[d] = cur;
          visit(nr, nc, (d + 2) % 4);
          cur = src_of(d);
        end
      end
      if (from_d < 0) cfg[r][c].io_src = cur;
      else            cfg[r][c].out_src[from_d] = cur;
    endfunction

    function void build(fault_t f);
      faulty = f;
      nproc = 0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          cfg[r][c]  = CFG_UNUSED;
          seen[r][c] = 1'b0;
        end
      seen[IO_R][IO_C] = 1'b1;
      visit(IO_R, IO_C, -1);
    endfunction
  endclass

  // The example machine: rows 0 (top) .. 2 (bottom), modules (1,0) and (1,2)
  // faulty. Link order c_1 .. c_14 as drawn: P_1 -> P_2 -> P_3, back through
  // (2,1), (1,1), (0,1) to P_4, back through (0,1) to P_5, then P_6 in (0,1),
  // P_7 in (1,1), and home through (2,1).
  function automatic cfg_t example_cfg();
    cfg_t k;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) k[r][c] = CFG_UNUSED;
    // P_1 at (2,0), the I/O module
    k[2][0].proc_en = 1; k[2][0].proc_src = SRC_IO;
    k[2][0].out_src[DIR_E] = SRC_PROC; k[2][0].io_src = SRC_E;
    // P_2 at (2,1)
    k[2][1].proc_en = 1; k[2][1].proc_src = SRC_W;
    k[2][1].out_src[DIR_E] = SRC_PROC; k[2][1].out_src[DIR_N] = SRC_E; k[2][1].out_src[DIR_W] = SRC_N;
    // P_3 at (2,2)
    k[2][2].proc_en = 1; k[2][2].proc_src = SRC_W; k[2][2].out_src[DIR_W] = SRC_PROC;
    // P_7 at (1,1): first pass straight through northwards
    k[1][1].proc_en = 1; k[1][1].proc_src = SRC_N;
    k[1][1].out_src[DIR_N] = SRC_S; k[1][1].out_src[DIR_S] = SRC_PROC;
    // P_6 at (0,1)
    k[0][1].proc_en = 1; k[0][1].proc_src = SRC_W;
    k[0][1].out_src[DIR_E] = SRC_S; k[0][1].out_src[DIR_W] = SRC_E; k[0][1].out_src[DIR_S] = SRC_PROC;
    // P_4 at (0,2)
    k[0][2].proc_en = 1; k[0][2].proc_src = SRC_W; k[0][2].out_src[DIR_W] = SRC_PROC;
    // P_5 at (0,0)
    k[0][0].proc_en = 1; k[0][0].proc_src = SRC_E; k[0][0].out_src[DIR_E] = SRC_PROC;
    return k;
  endfunction

endpackage
