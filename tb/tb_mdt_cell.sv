// tb_mdt_cell: self-checking test of one processor of the array (p = 2,
// M = 5, N = 6 to keep it short).
//
// The test bench plays the left neighbour and the host: during the cell's
// rows t1 = 3 .. M+2 it supplies A[t1,t2,2] = a[t1-2][t2] on a_in, and during
// the first row it supplies column 2 of b on the b bus. It checks:
//   - every result c[i][2] = sum_{k=2..N} a[i][k]*b[k][2], with its row index,
//     delivered exactly once;
//   - the Acom output: in rows t1 = 4 .. M+3 the cell hands on
//     a[t1-3][t2], the row it received one row earlier;
//   - the start token go_next in the last clock of the first row;
//   - done after (M+1)*(N-1) points;
// with the virtual clock enable ce dropped at random.
module tb_mdt_cell;
  localparam int P_IDX = 2, M = 5, N = 6, W = 8;
  localparam int CW = 2 * W + $clog2(N);
  localparam int T1W = $clog2(P_IDX + M + 2) + 1, T2W = $clog2(N + 1) + 1;
  localparam int IW = $clog2(M + 1);

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0, go = 1'b0;
  logic go_next, a_req, b_req, a_out_valid, c_valid, busy, done;
  logic a_in_valid, b_in_valid;
  logic signed [W-1:0] a_in, b_in, a_out;
  logic signed [CW-1:0] c_out;
  logic [IW-1:0] c_row;
  logic [T1W-1:0] t1;
  logic [T2W-1:0] t2;

  int checks = 0, failures = 0;
  int amat [1:M][1:N];
  int bcol [1:N];
  int seen [1:M];
  int points = 0, n_handover = 0, n_go = 0;

  mdt_cell #(.P_IDX(P_IDX), .M(M), .N(N), .W(W)) dut (
    .clk, .rst_n, .ce, .go, .go_next, .a_in, .a_in_valid, .a_req,
    .b_in, .b_in_valid, .b_req, .a_out, .a_out_valid,
    .c_out, .c_valid, .c_row, .t1, .t2, .busy, .done
  );

  always #5 clk = ~clk;

  always_comb begin
    int i;
    i = int'(t1) - P_IDX;
    a_in       = '0;
    b_in       = '0;
    a_in_valid = a_req;
    b_in_valid = b_req;
    if (a_req && i >= 1 && i <= M && t2 >= 2 && int'(t2) <= N) a_in = W'(amat[i][t2]);
    if (b_req && t2 >= 2 && int'(t2) <= N) b_in = W'(bcol[t2]);
  end

  always @(posedge clk) if (rst_n) begin
    if (ce && busy) points++;
    if (ce && a_out_valid) begin
      int i;
      i = int'(t1) - P_IDX - 1;
      n_handover++;
      checks++;
      if (i < 1 || i > M || int'(a_out) != amat[i][t2]) begin
        failures++;
        $display("FAIL Acom at (%0d,%0d) = %0d", t1, t2, int'(a_out));
      end
    end
    if (go_next) begin
      n_go++;
      checks++;
      if (!(int'(t1) == P_IDX + 1 && int'(t2) == N && ce)) begin
        failures++;
        $display("FAIL go_next at (%0d,%0d)", t1, t2);
      end
    end
    if (c_valid) begin
      int i, ref_v;
      i = int'(c_row);
      ref_v = 0;
      checks++;
      if (i >= 1 && i <= M) begin
        for (int k = 2; k <= N; k++) ref_v += amat[i][k] * bcol[k];
        seen[i]++;
      end
      if (i < 1 || i > M || int'(c_out) != ref_v) begin
        failures++;
        $display("FAIL c[%0d] = %0d expected %0d", i, int'(c_out), ref_v);
      end
    end
  end

  initial begin
    for (int i = 1; i <= M; i++) begin
      seen[i] = 0;
      for (int k = 1; k <= N; k++) amat[i][k] = $signed(8'($urandom));
    end
    for (int k = 1; k <= N; k++) bcol[k] = $signed(8'($urandom));
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    ce = 1'b1; go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    while (!done) begin
      ce = ($urandom_range(0, 3) != 0);
      @(negedge clk);
    end
    ce = 1'b1;
    repeat (2) @(negedge clk);
    for (int i = 1; i <= M; i++) begin
      checks++;
      if (seen[i] != 1) begin failures++; $display("FAIL c[%0d] seen %0d times", i, seen[i]); end
    end
    checks += 3;
    if (points != (M + 1) * (N - 1)) begin failures++; $display("FAIL %0d points", points); end
    if (n_handover != M * (N - 1)) begin failures++; $display("FAIL %0d hand-overs", n_handover); end
    if (n_go != 1) begin failures++; $display("FAIL %0d start tokens", n_go); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
