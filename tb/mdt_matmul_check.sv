// mdt_matmul_check: drives one mdt_matmul instance of a given size and checks
// it (used by tb_mdt_matmul_sizes).
//
// It runs RUNS products with random matrices, the virtual clock enable ce
// dropped at random in every second product, serving the a and b requests of
// the array from its own copies of the matrices. Every delivered c[i][j] is
// compared with sum_{k=2..N} a[i][k]*b[k][j], every element must arrive
// exactly once, and each product must scan (P+M)*(N-1) points. When all runs
// are over it raises `finished` and holds its check and failure counts.
module mdt_matmul_check #(
  parameter int P    = 3,
  parameter int M    = 3,
  parameter int N    = 3,
  parameter int W    = 8,
  parameter int RUNS = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int CW  = 2 * W + $clog2(N);
  localparam int T2W = $clog2(N + 1) + 1;
  localparam int IW  = $clog2(M + 1);
  localparam int JW  = $clog2(P + 1);

  logic ce = 1'b0, start = 1'b0;
  logic signed [W-1:0] a_in, b_in;
  logic a_valid, b_valid, a_req, b_req, busy, done;
  logic [IW-1:0]  a_req_i;
  logic [T2W-1:0] a_req_k, b_req_k;
  logic [JW-1:0]  b_req_j;
  logic signed [CW-1:0] c_out [P];
  logic c_valid [P];
  logic [IW-1:0] c_row [P];

  int amat [1:M][1:N];
  int bmat [1:N][1:P];
  int seen [1:M][1:P];

  mdt_matmul #(.P(P), .M(M), .N(N), .W(W)) dut (
    .clk, .rst_n, .ce, .start, .a_in, .a_valid, .a_req, .a_req_i, .a_req_k,
    .b_in, .b_valid, .b_req, .b_req_k, .b_req_j, .c_out, .c_valid, .c_row,
    .busy, .done
  );

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
          $display("FAIL P=%0d M=%0d N=%0d: c[%0d][%0d] = %0d, expected %0d",
                   P, M, N, i, j + 1, int'(c_out[j]), ref_v);
        end
      end
    end
  end

  initial begin
    int points;
    finished = 1'b0;
    checks   = 0;
    failures = 0;
    @(posedge rst_n);
    for (int r = 0; r < RUNS; r++) begin
      for (int i = 1; i <= M; i++)
        for (int k = 1; k <= N; k++) amat[i][k] = $signed(W'($urandom));
      for (int k = 1; k <= N; k++)
        for (int j = 1; j <= P; j++) bmat[k][j] = $signed(W'($urandom));
      foreach (seen[i, j]) seen[i][j] = 0;
      @(negedge clk);
      ce = 1'b1;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      points = 0;
      while (!done) begin
        ce = (r % 2 == 1) ? ($urandom_range(0, 2) != 0) : 1'b1;
        @(negedge clk);
        if (ce) points++;
      end
      ce = 1'b1;
      repeat (2) @(negedge clk);
      checks++;
      if (points != (P + M) * (N - 1)) begin
        failures++;
        $display("FAIL P=%0d M=%0d N=%0d: %0d points, expected %0d", P, M, N, points, (P + M) * (N - 1));
      end
      foreach (seen[i, j]) begin
        checks++;
        if (seen[i][j] != 1) begin
          failures++;
          $display("FAIL P=%0d M=%0d N=%0d: c[%0d][%0d] delivered %0d times", P, M, N, i, j, seen[i][j]);
        end
      end
    end
    finished = 1'b1;
  end
endmodule
