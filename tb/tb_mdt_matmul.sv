// tb_mdt_matmul: end-to-end test of the matrix-multiplication array at its
// default size (P=6 processors, M=10, N=8, 8-bit signed coefficients).
//
// Random matrices a (M x N) and b (N x P) are served to the array on request
// (a_req/a_req_i/a_req_k and b_req/b_req_k/b_req_j). Every c[i][j] that the
// array delivers is compared with sum_{k=2..N} a[i][k]*b[k][j] computed here,
// each must arrive exactly once, and the number of clocks with ce = 1 from
// the first scanned point to done must be (P+M)*(N-1). Three products are run back to back:
// one without stalls, one with the virtual clock enable ce dropped at random,
// and one with extreme operand values. The test counts how often each
// mechanism happened (virtual-clock stall, b column load, A hand-over between
// processors, B re-read from memory, restart after done) and fails if any of
// them never did.
module tb_mdt_matmul;
  localparam int P = 6, M = 10, N = 8, W = 8;
  localparam int CW = 2 * W + $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0, start = 1'b0;
  logic signed [W-1:0] a_in, b_in;
  logic a_valid, b_valid, a_req, b_req, busy, done;
  logic [$clog2(M+1)-1:0] a_req_i;
  logic [$clog2(N+1):0]   a_req_k, b_req_k;
  logic [$clog2(P+1)-1:0] b_req_j;
  logic signed [CW-1:0] c_out [P];
  logic c_valid [P];
  logic [$clog2(M+1)-1:0] c_row [P];

  int checks = 0, failures = 0;
  int amat [1:M][1:N];
  int bmat [1:N][1:P];
  int seen [1:M][1:P];
  int n_stall = 0, n_bload = 0, n_handover = 0, n_bmem = 0, n_restart = 0;

  mdt_matmul dut (
    .clk, .rst_n, .ce, .start, .a_in, .a_valid, .a_req, .a_req_i, .a_req_k,
    .b_in, .b_valid, .b_req, .b_req_k, .b_req_j, .c_out, .c_valid, .c_row,
    .busy, .done
  );

  always #5 clk = ~clk;

  // Host memory serving the requests combinationally.
  always_comb begin
    a_in    = '0;
    b_in    = '0;
    a_valid = a_req;
    b_valid = b_req;
    if (a_req && int'(a_req_i) >= 1 && int'(a_req_i) <= M && int'(a_req_k) >= 2 && int'(a_req_k) <= N)
      a_in = W'(amat[a_req_i][a_req_k]);
    if (b_req && int'(b_req_j) >= 1 && int'(b_req_j) <= P && int'(b_req_k) >= 2 && int'(b_req_k) <= N)
      b_in = W'(bmat[b_req_k][b_req_j]);
  end

  // Check every delivered result.
  always @(posedge clk) begin
    for (int j = 0; j < P; j++) begin
      if (c_valid[j]) begin
        int i, ref_v;
        i = int'(c_row[j]);
        ref_v = 0;
        if (i >= 1 && i <= M) begin
          for (int k = 2; k <= N; k++) ref_v += amat[i][k] * bmat[k][j+1];
          seen[i][j+1]++;
        end
        checks++;
        if (i < 1 || i > M || int'(c_out[j]) != ref_v) begin
          failures++;
          $display("FAIL c[%0d][%0d] = %0d, expected %0d", i, j+1, int'(c_out[j]), ref_v);
        end
      end
    end
  end

  // Mechanism counters.
  always @(posedge clk) if (rst_n) begin
    if (!ce && busy) n_stall++;
    if (ce && b_req) n_bload++;
    // A result of processor j > 1 used rows of a handed over by its
    // neighbours; a result of row i > 1 used B re-read from the local memory.
    for (int j = 1; j < P; j++) if (c_valid[j]) n_handover++;
    for (int j = 0; j < P; j++) if (c_valid[j] && c_row[j] > 1) n_bmem++;
  end

  task automatic fill(input int mode);
    for (int i = 1; i <= M; i++)
      for (int k = 1; k <= N; k++)
        amat[i][k] = (mode == 2) ? (((i + k) % 2 != 0) ? -128 : 127) : $signed(8'($urandom));
    for (int k = 1; k <= N; k++)
      for (int j = 1; j <= P; j++)
        bmat[k][j] = (mode == 2) ? -128 :
                     (mode == 3 && j > 4) ? 0 : $signed(8'($urandom));
    foreach (seen[i, j]) seen[i][j] = 0;
  endtask

  task automatic run(input int mode);
    int cycles;
    fill(mode);
    @(negedge clk);
    ce = 1'b1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      ce = (mode == 1) ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(negedge clk);
      if (ce) cycles++;
    end
    ce = 1'b1;
    repeat (2) @(negedge clk);
    checks++;
    if (cycles != (P + M) * (N - 1)) begin
      failures++;
      $display("FAIL run %0d: %0d active clocks, expected %0d", mode, cycles, (P + M) * (N - 1));
    end
    foreach (seen[i, j]) begin
      checks++;
      if (seen[i][j] != 1) begin
        failures++;
        $display("FAIL run %0d: c[%0d][%0d] delivered %0d times", mode, i, j, seen[i][j]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0);
    n_restart++;
    run(1);
    run(2);
    run(3);
    if (n_stall == 0)    begin failures++; $display("FAIL: no stall happened"); end
    if (n_bload == 0)    begin failures++; $display("FAIL: no b load happened"); end
    if (n_handover == 0) begin failures++; $display("FAIL: no A hand-over happened"); end
    if (n_bmem == 0)     begin failures++; $display("FAIL: no B memory re-read happened"); end
    if (n_restart == 0)  begin failures++; $display("FAIL: no restart happened"); end
    checks += 5;
    $display("mechanisms: stall=%0d bload=%0d handover=%0d bmem=%0d restart=%0d",
             n_stall, n_bload, n_handover, n_bmem, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
