// mdt_matmul: linear array of P processors computing c = a * b under the
// two-dimensional schedule T(i,j,k) = (i+j, k).
//
// a is M x N, b is N x P and c is M x P; the inner products run over
// k = 2 .. N (N-1 terms), the index range of the scheduled program. Processor
// j computes column j of c. Logical time (t1, t2) = (i+j, k): within a row t1
// the array steps through k, one point per virtual clock cycle, and between
// rows the values of A and B are kept in small local memories instead of
// moving through a two-dimensional grid of processors. Each processor has its
// own control automaton; processor 1 is started by `start`, each later one by
// a token from its left neighbour one row later.
//
// Host interface (one point per clock with ce = 1; ce = 0 freezes everything):
//   start           one-clock pulse (sampled with ce) that begins a product.
//   a_req, a_req_i, a_req_k   the array consumes a[a_req_i][a_req_k] in this
//                   clock: present it on a_in with a_valid = 1 (combinationally
//                   or from a register updated from the request).
//   b_req, b_req_k, b_req_j   likewise for b[b_req_k][b_req_j] on b_in.
//   c_out[j], c_valid[j], c_row[j]  c[c_row[j]][j+1] (j is 0-based here),
//                   one-clock pulse.
//   busy / done     some processor is scanning / the product is finished
//                   (done stays high until the next start).
// A complete product scans (P+M)*(N-1) points, one per clock with ce = 1:
// done rises (P+M)*(N-1)+1 enabled clocks after the clock that samples start.
// Parameter defaults are the evaluated configuration (P=6, N=8, M=10, 8-bit
// coefficients); the request indices and signed arithmetic are
// this implementation's choices.
module mdt_matmul
  import mdt_pkg::*;
#(
  parameter int P   = 6,
  parameter int M   = 10,
  parameter int N   = 8,
  parameter int W   = 8,
  parameter int CW  = 2 * W + $clog2(N),
  parameter int T1W = $clog2(P + M + 2) + 1,
  parameter int T2W = $clog2(N + 1) + 1,
  parameter int IW  = $clog2(M + 1),
  parameter int JW  = $clog2(P + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic                 start,
  input  logic signed [W-1:0]  a_in,
  input  logic                 a_valid,
  output logic                 a_req,
  output logic [IW-1:0]        a_req_i,
  output logic [T2W-1:0]       a_req_k,
  input  logic signed [W-1:0]  b_in,
  input  logic                 b_valid,
  output logic                 b_req,
  output logic [T2W-1:0]       b_req_k,
  output logic [JW-1:0]        b_req_j,
  output logic signed [CW-1:0] c_out   [P],
  output logic                 c_valid [P],
  output logic [IW-1:0]        c_row   [P],
  output logic                 busy,
  output logic                 done
);

  logic                 go      [P+1];
  logic signed [W-1:0]  a_chain [P+1];
  logic                 av_chain[P+1];
  logic                 a_req_c [P];
  logic [P-1:0]         b_req_c;
  logic [T1W-1:0]       t1_c    [P];
  logic [T2W-1:0]       t2_c    [P];
  logic                 busy_c  [P];
  logic                 done_c  [P];

  assign go[0]       = start;
  assign a_chain[0]  = a_in;
  assign av_chain[0] = a_valid;

  for (genvar j = 0; j < P; j++) begin : g_cell
    mdt_cell #(
      .P_IDX(j + 1), .M(M), .N(N), .W(W), .CW(CW), .T1W(T1W), .T2W(T2W), .IW(IW)
    ) u_cell (
      .clk, .rst_n, .ce,
      .go(go[j]), .go_next(go[j+1]),
      .a_in(a_chain[j]), .a_in_valid(av_chain[j]), .a_req(a_req_c[j]),
      .b_in, .b_in_valid(b_valid), .b_req(b_req_c[j]),
      .a_out(a_chain[j+1]), .a_out_valid(av_chain[j+1]),
      .c_out(c_out[j]), .c_valid(c_valid[j]), .c_row(c_row[j]),
      .t1(t1_c[j]), .t2(t2_c[j]), .busy(busy_c[j]), .done(done_c[j])
    );
  end

  // The last processor's start token and Acom output have no consumer.
  logic unused_tail;
  assign unused_tail = go[P] ^ av_chain[P] ^ ^a_chain[P];

  // Host request for a: processor 1 consumes a[t1-1][t2].
  assign a_req   = a_req_c[0];
  assign a_req_i = IW'(t1_c[0] - T1W'(1));
  assign a_req_k = t2_c[0];

  // Host request for b: the processor in its first row (at most one at a
  // time, since processors start one row apart) loads b[t2][p].
  always_comb begin
    b_req   = 1'b0;
    b_req_k = '0;
    b_req_j = '0;
    for (int j = 0; j < P; j++) begin
      if (b_req_c[j]) begin
        b_req   = 1'b1;
        b_req_k = t2_c[j];
        b_req_j = JW'(j + 1);
      end
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int j = 0; j < P; j++) busy |= busy_c[j];
  end
  // The last processor has reached the end of time and none is still scanning
  // (its done flag from an earlier product is masked once a new one starts).
  assign done = done_c[P-1] && !busy;

  a_one_b_loader: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(b_req_c))
    else $error("mdt_matmul: two processors load b at once");

endmodule
