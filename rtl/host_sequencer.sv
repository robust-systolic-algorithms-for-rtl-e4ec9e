// I/O schedule of the relational operations (host side of the I/O port).
//
// The array itself computes the same thing every cycle; an operation is
// defined entirely by what is pumped into Port-A/B/C/X and when. This block
// holds the two relations, A (P tuples) and B (R tuples) of Q attributes each,
// and on `start` runs the schedule of the comparison algorithm and its
// variants, with t = 0 the first cycle of the operation and
// N = P + Q + R - 2 processors:
//
//   Port-C : c_ij^0 = True at t = (P+1)(j-1) + P(P-i), False otherwise.
//            Writing t = P*w + u gives j-1 = u and P-i = w-u, which is how the
//            slot is decoded here (u < R <= P makes the decoding unique).
//   Port-A : a_ij at t = (P+1)R + P(P-1) + (P+1)(j-1) + (i-1); WC before the
//            first and after the last a_ij, and also in the one idle slot of
//            each group of P+1 (no True c value ever meets that slot).
//   Port-B : b_ij at t = P(P+R-1) + P(j-1) + (i-1).
//   Port-X : x_i^0 = False; False is pumped in every cycle.
//   Out-C  : c_ij^final at t = (P+1)(j-1) + P(P-i) + N(P+3).
//   Out-X  : x_i^final at t = (P+3)N - (P-i).
//
// Operations: OP_COMPARE and OP_INTERSECT run that schedule unchanged.
// OP_DIFFERENCE stores the complement of X. OP_DEDUP compares A with itself
// (B is read from the A memory) and seeds c_ij^0 = True only for i < j, so
// x_i is True exactly when a later tuple equals a_i; this needs R = P.
// Union, projection and join are compositions of these done by the host.
//
// Interface: port_o is combinational from the operation counter and must go
// to the array's first link register; port_i (the array's output) is sampled
// at the end of each cycle. done pulses for one cycle at the cycle after the
// last c_ij leaves the array, at t = (P+1)(R-1) + P(P-1) + N(P+3) + 1, and
// c_mat / x_vec hold the results until the next start. Writes to the relation
// memories are ignored while busy. The memory layout, the handshake and the
// treatment of the idle A slots are this design's choices; the times are the
// document's.
module host_sequencer
  import rdb_pkg::*;
#(
  parameter int unsigned P = 4,
  parameter int unsigned Q = 2,
  parameter int unsigned R = 3,
  localparam int unsigned TW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned AW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic  clk,
  input  logic  rst,
  // relation memories
  input  logic  wr_en,
  input  logic  wr_rel,                 // 0: relation A, 1: relation B
  input  logic [TW-1:0] wr_tuple,      // tuple index i-1
  input  logic [AW-1:0] wr_attr,       // attribute index j-1
  input  elem_t wr_data,
  // operation control
  input  op_e   op,
  input  logic  start,
  output logic  busy,
  output logic  done,
  // I/O port of the array
  output lane_t port_o,
  input  lane_t port_i,
  // results
  output logic  c_mat [P][R],           // c_mat[i-1][j-1] = c_ij
  output logic  x_vec [P]               // x_vec[i-1] = x_i
);

  localparam int unsigned N      = P + Q + R - 2;
  localparam int unsigned TA0    = (P + 1) * R + P * (P - 1);
  localparam int unsigned TA_END = (P + 1) * N;
  localparam int unsigned TB0    = P * (P + R - 1);
  localparam int unsigned TC_OUT = N * (P + 3);
  localparam int unsigned TX_OUT = (P + 3) * N - (P - 1);
  localparam int unsigned T_LAST = (P + 1) * (R - 1) + P * (P - 1) + N * (P + 3);

  elem_t mem_a [P][Q];
  elem_t mem_b [R][Q];

  int unsigned t;
  op_e         op_q;

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      t    <= 0;
      op_q <= OP_COMPARE;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          t    <= 0;
          op_q <= op;
        end
      end else if (t == T_LAST) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        t <= t + 1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && !busy) begin
      if (!wr_rel) mem_a[wr_tuple][wr_attr] <= wr_data;
      else if (int'(wr_tuple) < R) mem_b[wr_tuple][wr_attr] <= wr_data;
    end
  end

  // ------------------------------------------------------- C slot decoding
  // Decodes t = (P+1)(j-1) + P(P-i) into (i-1, j-1).
  function automatic logic c_slot(input int unsigned tt, output int unsigned ii, output int unsigned jj);
    int unsigned u, w;
    u  = tt % P;
    w  = tt / P;
    ii = 0;
    jj = u;
    if (u < R && w >= u && (w - u) <= P - 1) begin
      ii = P - 1 - (w - u);
      return 1'b1;
    end
    return 1'b0;
  endfunction

  // ------------------------------------------------------------- port drive
  always_comb begin
    int unsigned ci, cj, m, n;
    ci = 0; cj = 0; m = 0; n = 0;
    port_o = LANE_IDLE;
    if (busy) begin
      // Port-C
      if (c_slot(t, ci, cj))
        port_o.c = (op_q != OP_DEDUP) || (ci < cj);
      // Port-A
      if (t >= TA0 && t <= TA_END) begin
        m = (t - TA0) % (P + 1);
        n = (t - TA0) / (P + 1);
        if (m < P) port_o.a = '{wc: 1'b0, val: mem_a[m][n]};
      end
      // Port-B
      if (t >= TB0) begin
        m = (t - TB0) % P;
        n = (t - TB0) / P;
        if (n < Q && m < R)
          port_o.b = (op_q == OP_DEDUP) ? mem_a[m][n] : mem_b[m][n];
      end
      // Port-X: x_i^0 = False, which is also what idle cycles carry.
    end
  end

  // ---------------------------------------------------------- result capture
  always_ff @(posedge clk) begin
    int unsigned ci, cj;
    if (busy) begin
      if (t >= TC_OUT && c_slot(t - TC_OUT, ci, cj))
        c_mat[ci][cj] <= port_i.c;
      if (t >= TX_OUT && t < TX_OUT + P)
        x_vec[t - TX_OUT] <= port_i.x ^ (op_q == OP_DIFFERENCE);
    end
  end

  // --------------------------------------------------------------- checks
  initial begin
    assert (R <= P) else $fatal(1, "the schedule requires R <= P");
    assert (R >= 1 && Q >= 1) else $fatal(1, "empty relation");
  end

  property p_dedup_square;
    @(posedge clk) disable iff (rst) (start && !busy && op == OP_DEDUP) |-> (R == P);
  endproperty
  a_dedup_square: assert property (p_dedup_square)
    else $error("duplicate removal compares A with itself and needs R = P");

endmodule
