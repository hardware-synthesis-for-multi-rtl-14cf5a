// tb_mdt_datapath: self-checking test of the operand selection and
// multiply-accumulate unit of one processor.
//
// Random inner products of N-1 terms are fed through the enables as the
// controller would produce them (first_k on the first term, last_k on the
// last, b_load choosing the external b input or the memory word), with the
// virtual clock enable ce dropped at random. Each c_out is compared with the
// sum computed here, c_valid must pulse exactly once per inner product, and
// b_cur must follow the b_load selection.
module tb_mdt_datapath;
  import mdt_pkg::*;
  localparam int W = 8, N = 8, CW = 2 * W + $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  var_en_t en;
  logic signed [W-1:0] a_src, b_ext, b_mem, b_cur;
  logic signed [CW-1:0] c_out;
  logic c_valid;

  int checks = 0, failures = 0, n_valid = 0;

  mdt_datapath dut (.clk, .rst_n, .ce, .en, .a_src, .b_ext, .b_mem,
                    .b_cur, .c_out, .c_valid);

  always #5 clk = ~clk;

  always @(posedge clk) if (c_valid) n_valid++;

  initial begin
    int ref_v;
    en = '0; a_src = '0; b_ext = '0; b_mem = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int prod_n = 0; prod_n < 40; prod_n++) begin
      ref_v = 0;
      for (int k = 2; k <= N; k++) begin
        // Stall cycles in between: nothing may change.
        while ($urandom_range(0, 3) == 0) begin
          ce = 1'b0;
          en = '0;
          en.c = 1'b1;
          en.first_k = 1'b1;   // would clear the accumulator if not frozen
          @(negedge clk);
          checks++;
          if (c_valid) begin failures++; $display("FAIL: c_valid during stall"); end
        end
        ce = 1'b1;
        en = '0;
        en.c = 1'b1;
        en.a = 1'b1;
        en.b = 1'b1;
        en.b_load  = (prod_n % 3 == 0);
        en.first_k = (k == 2);
        en.last_k  = (k == N);
        a_src = W'($urandom);
        b_ext = W'($urandom);
        b_mem = W'($urandom);
        #1;
        checks++;
        if (b_cur !== (en.b_load ? b_ext : b_mem)) begin
          failures++;
          $display("FAIL: operand selection");
        end
        ref_v += int'(a_src) * int'(en.b_load ? b_ext : b_mem);
        @(negedge clk);
        checks++;
        if (c_valid !== (k == N)) begin
          failures++;
          $display("FAIL: c_valid=%0b at k=%0d", c_valid, k);
        end
        if (k == N) begin
          checks++;
          if (int'(c_out) != ref_v) begin
            failures++;
            $display("FAIL: c_out=%0d expected %0d", int'(c_out), ref_v);
          end
        end
      end
    end
    ce = 1'b0;
    en = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (n_valid != 40) begin failures++; $display("FAIL: %0d results, expected 40", n_valid); end
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
