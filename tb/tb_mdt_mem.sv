// tb_mdt_mem: self-checking test of the local two-port memory.
//
// Random writes and reads (never to one address in the same clock) are
// checked against a reference array kept here: read data must appear one
// clock after a read with rd_ce = 1, must hold while rd_ce = 0, and a write
// with wr_ce = 0 must leave the word unchanged.
module tb_mdt_mem;
  localparam int W = 8, DEPTH = 7, AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic wr_ce = 1'b0, rd_ce = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;

  int checks = 0, failures = 0;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] expect_q;

  mdt_mem dut (.clk, .wr_ce, .wr_addr, .wr_data, .rd_ce, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    // Fill every word once.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_ce = 1'b1; wr_addr = AW'(a); wr_data = W'($urandom); model[a] = wr_data;
    end
    @(negedge clk);
    wr_ce = 1'b0;
    expect_q = rd_data;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // Compare what the previous clock edge produced.
      if (n > 0) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          $display("FAIL n=%0d rd_data=%0h expected %0h", n, rd_data, expect_q);
        end
      end
      rd_ce   = ($urandom_range(0, 3) != 0);
      rd_addr = AW'($urandom_range(0, DEPTH - 1));
      wr_ce   = ($urandom_range(0, 1) != 0);
      wr_addr = AW'($urandom_range(0, DEPTH - 1));
      if (wr_addr == rd_addr) wr_addr = AW'((int'(rd_addr) + 1) % DEPTH);
      wr_data = W'($urandom);
      if (rd_ce) expect_q = model[rd_addr];
      if (wr_ce) model[wr_addr] = wr_data;
    end
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
