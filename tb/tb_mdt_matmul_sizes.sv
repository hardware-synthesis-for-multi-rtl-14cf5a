// tb_mdt_matmul_sizes: the matrix-multiplication array at sizes other than
// the default, to show that the control and memory sizing follow P, M and N:
//   P=3, M=3, N=3   the smallest problem the equations allow (2-word memories)
//   P=4, M=10, N=8  the 4-processor variant of the evaluated product
//   P=8, M=5, N=12  more processors than rows, longer inner products
//   P=2, M=12, N=4  rows far outnumbering processors
// Each instance runs two random products (one with random stalls) and is
// checked by mdt_matmul_check.
module tb_mdt_matmul_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fin [4];
  int   chk [4];
  int   fal [4];
  int   checks, failures;

  always #5 clk = ~clk;

  mdt_matmul_check #(.P(3), .M(3),  .N(3))  u0 (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fal[0]));
  mdt_matmul_check #(.P(4), .M(10), .N(8))  u1 (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fal[1]));
  mdt_matmul_check #(.P(8), .M(5),  .N(12)) u2 (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fal[2]));
  mdt_matmul_check #(.P(2), .M(12), .N(4))  u3 (.clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fal[3]));

  task automatic report();
    checks = 0;
    failures = 0;
    for (int n = 0; n < 4; n++) begin
      checks += chk[n];
      failures += fal[n];
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    report();
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
