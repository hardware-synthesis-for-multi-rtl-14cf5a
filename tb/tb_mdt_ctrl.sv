// tb_mdt_ctrl: self-checking test of the multi-dimensional time counter and
// control automaton of one processor (p = 3, M = 4, N = 5 to keep it short).
//
// The expected scan is generated here: rows t1 = p+1 .. p+M+1, t2 = 2 .. N in
// each row; the first row enables A, B, C and the b load, the middle rows A,
// B, C and Acom, the last row Acom only. At every clock the counter, the
// enables, the write address t2-2, the read-ahead address and read enables of
// the next point, the go_next token (last point of the first row), busy and
// done are compared with that list, with ce dropped at random. The scan is
// run twice to check the restart from the end-of-time state.
module tb_mdt_ctrl;
  import mdt_pkg::*;
  localparam int P_IDX = 3, M = 4, N = 5;
  localparam int T1W = $clog2(P_IDX + M + 2) + 1, T2W = $clog2(N + 1) + 1;
  localparam int AW = $clog2(N - 1);

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0, go = 1'b0;
  var_en_t en;
  logic [T1W-1:0] t1;
  logic [T2W-1:0] t2;
  logic [AW-1:0] wr_addr, rd_addr;
  logic rd_ce_a, rd_ce_b, wr_ce_a, wr_ce_b, go_next, busy, done;

  int checks = 0, failures = 0;

  mdt_ctrl #(.P_IDX(P_IDX), .M(M), .N(N)) dut (
    .clk, .rst_n, .ce, .go, .en, .t1, .t2, .wr_addr, .rd_addr,
    .rd_ce_a, .rd_ce_b, .wr_ce_a, .wr_ce_b, .go_next, .busy, .done
  );

  always #5 clk = ~clk;

  function automatic int kind_of(int r1);   // 1 first, 2 middle, 3 last row
    if (r1 == P_IDX + 1) return 1;
    if (r1 == P_IDX + M + 1) return 3;
    return 2;
  endfunction

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t1=%0d t2=%0d %s=%0b expected %0b", t1, t2, what, got, exp);
    end
  endtask

  task automatic scan();
    int npts, idx;
    int pt1 [$], pt2 [$];
    for (int r1 = P_IDX + 1; r1 <= P_IDX + M + 1; r1++)
      for (int r2 = 2; r2 <= N; r2++) begin pt1.push_back(r1); pt2.push_back(r2); end
    npts = pt1.size();
    @(negedge clk);
    ce = 1'b1; go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    idx = 0;
    while (idx < npts) begin
      int k, nk;
      ce = ($urandom_range(0, 4) != 0);
      #1;
      k  = kind_of(pt1[idx]);
      nk = (idx + 1 < npts) ? kind_of(pt1[idx + 1]) : 0;
      checks++;
      if (int'(t1) != pt1[idx] || int'(t2) != pt2[idx]) begin
        failures++;
        $display("FAIL point %0d: (%0d,%0d) expected (%0d,%0d)", idx, t1, t2, pt1[idx], pt2[idx]);
      end
      expect_bit("en.a",      en.a,      k != 3);
      expect_bit("en.b",      en.b,      k != 3);
      expect_bit("en.c",      en.c,      k != 3);
      expect_bit("en.acom",   en.acom,   k != 1);
      expect_bit("en.b_load", en.b_load, k == 1);
      expect_bit("en.first_k", en.first_k, pt2[idx] == 2);
      expect_bit("en.last_k", en.last_k, pt2[idx] == N);
      expect_bit("wr_ce_a",   wr_ce_a,   ce && k != 3);
      expect_bit("wr_ce_b",   wr_ce_b,   ce && k != 3);
      expect_bit("go_next",   go_next,   ce && k == 1 && pt2[idx] == N);
      expect_bit("rd_ce_a",   rd_ce_a,   ce && (nk == 2 || nk == 3));
      expect_bit("rd_ce_b",   rd_ce_b,   ce && nk == 2);
      expect_bit("busy",      busy,      1'b1);
      expect_bit("done",      done,      1'b0);
      checks++;
      if (int'(wr_addr) != pt2[idx] - 2) begin
        failures++; $display("FAIL wr_addr=%0d at t2=%0d", wr_addr, pt2[idx]);
      end
      if (nk != 0) begin
        checks++;
        if (int'(rd_addr) != pt2[idx + 1] - 2) begin
          failures++; $display("FAIL rd_addr=%0d for next t2=%0d", rd_addr, pt2[idx + 1]);
        end
      end
      @(negedge clk);
      if (ce) idx++;
    end
    #1;
    expect_bit("done at end", done, 1'b1);
    expect_bit("busy at end", busy, 1'b0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    #1;
    expect_bit("idle busy", busy, 1'b0);
    expect_bit("idle done", done, 1'b0);
    scan();
    repeat (3) @(negedge clk);
    #1;
    expect_bit("done holds", done, 1'b1);
    scan();
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
