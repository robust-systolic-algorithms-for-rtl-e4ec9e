// The configured machine: a one-dimensional pipeline of N processors wrapped
// around a spanning tree of the fault-free modules of the mesh.
//
// After testing, the non-faulty modules reachable from the I/O port are
// chained into a pipeline P_1 .. P_N. Because the chain follows the tree,
// logically adjacent processors may be separated by several inter-module
// links, each adding one clock of delay, and that number is not known before
// the fault pattern is. LINK_LEN[s] is the number of links in front of P_(s+1)
// (LINK_LEN[0] is the input link from the I/O port, LINK_LEN[N] the links back
// to the output side of the I/O port). A pipeline wrapped around a tree of N
// modules uses every tree edge twice plus the two I/O links, so the lengths sum
// to 2N; an assertion checks it. The default is the seven-processor machine of
// the document's example: 1,1,1,4,2,1,1,3 links (c_1 .. c_14).
//
// The behaviour at the ports does not depend on LINK_LEN: the host schedule
// only sees the total delays. A value presented at port_i in cycle t appears
// at port_o in cycle t + 2N on the A and X paths, t + 3N on the B path and
// t + N(K + 2) on the C path. How the links are actually set (tie-points,
// fuses) is outside this block; LINK_LEN stands for its result.
module systolic_array
  import rdb_pkg::*;
#(
  parameter int unsigned N = 7,
  parameter int unsigned K = 5,
  parameter bit [0:N][7:0] LINK_LEN = {8'd1, 8'd1, 8'd1, 8'd4, 8'd2, 8'd1, 8'd1, 8'd3}
) (
  input  logic  clk,
  input  logic  rst,
  input  lane_t port_i,   // Port-A, Port-B, Port-C, Port-X
  output lane_t port_o    // Output-Port-A/B/C/X
);

  function automatic int unsigned link_total();
    int unsigned s = 0;
    for (int unsigned i = 0; i <= N; i++) s += int'(LINK_LEN[i]);
    return s;
  endfunction

  // proc_in[s] feeds P_(s+1); proc_out[s] is the output of P_(s+1).
  lane_t proc_in  [N];
  lane_t proc_out [N];

  for (genvar s = 0; s < N; s++) begin : g_stage
    if (s == 0) begin : g_first
      link #(.LEN(int'(LINK_LEN[0]))) u_link (
        .clk (clk), .rst (rst), .d (port_i), .q (proc_in[0])
      );
    end else begin : g_next
      link #(.LEN(int'(LINK_LEN[s]))) u_link (
        .clk (clk), .rst (rst), .d (proc_out[s-1]), .q (proc_in[s])
      );
    end

    processor #(.K(K)) u_proc (
      .clk (clk), .rst (rst), .in_i (proc_in[s]), .out_o (proc_out[s])
    );
  end

  link #(.LEN(int'(LINK_LEN[N]))) u_link_out (
    .clk (clk), .rst (rst), .d (proc_out[N-1]), .q (port_o)
  );

  initial begin
    for (int unsigned i = 0; i <= N; i++)
      assert (LINK_LEN[i] >= 1)
        else $fatal(1, "LINK_LEN[%0d] is 0: every connection passes at least one link", i);
    assert (link_total() == 2 * N)
      else $fatal(1, "LINK_LEN sums to %0d, a pipeline wrapped around a tree of %0d modules uses %0d links",
                  link_total(), N, 2 * N);
  end

endmodule
