// mdt_datapath: operand selection and multiply-accumulate of one processor.
//
// It evaluates the equations of the scheduled program for processor p at the
// current point (t1, t2):
//   A[t1,t2,p] = a input (from the host for p = 1, from cell p-1's Acom else)
//   B[t1,t2,p] = b input when t1 = p+1, else the B memory word of row t1-1
//   C[t1,t2+1,p] = (t2 = 2 ? 0 : C[t1,t2,p]) + A[t1,t2,p] * B[t1,t2,p]
// C lives in a single register (its memory function has no local dimension).
// When t2 = N the finished inner product C[t1,N+1,p] = c[t1-p, p] is loaded
// into c_out and c_valid pulses for one clock.
//
// Interface and timing: b_cur is combinational (it feeds the B memory write
// port; A is stored straight from the a input); acc, c_out and c_valid are registered and change only
// at edges with ce = 1, except c_valid, which is a one-clock pulse.
// Operands are signed W-bit integers (two's complement); the accumulator has
// CW bits, enough for N-1 full-scale products without overflow. Signedness
// and widths are this implementation's choice.
module mdt_datapath
  import mdt_pkg::*;
#(
  parameter int W  = 8,
  parameter int N  = 8,
  parameter int CW = 2 * W + $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  var_en_t             en,
  input  logic signed [W-1:0] a_src,
  input  logic signed [W-1:0] b_ext,
  input  logic signed [W-1:0] b_mem,
  output logic signed [W-1:0] b_cur,
  output logic signed [CW-1:0] c_out,
  output logic                c_valid
);

  logic signed [CW-1:0]  acc;
  logic signed [2*W-1:0] prod;
  logic signed [CW-1:0]  sum;
  logic signed [W-1:0]   a_cur;

  // Row-kind enables other than c/b_load/first_k/last_k belong to the memories.
  logic unused_en;
  assign unused_en = en.a ^ en.b ^ en.acom;

  assign a_cur = a_src;
  assign b_cur = en.b_load ? b_ext : b_mem;
  assign prod  = a_cur * b_cur;
  assign sum   = (en.first_k ? CW'(0) : acc) + CW'(prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      c_out   <= '0;
      c_valid <= 1'b0;
    end else begin
      c_valid <= ce && en.c && en.last_k;
      if (ce && en.c) begin
        acc <= sum;
        if (en.last_k) c_out <= sum;
      end
    end
  end

endmodule
