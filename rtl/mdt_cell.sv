// mdt_cell: one processor p of the linear matrix-multiplication array.
//
// Processor p computes column p of c = a * b. It holds column p of b in its
// B memory (loaded from the b bus during its first row t1 = p+1 and re-read in
// every later row), receives row after row of a from its left neighbour (or
// from the host when p = 1), stores each row in its A memory and, one row
// later, hands it on to processor p+1 (the Acom value). Each row t1 it forms
// the inner product c[t1-p, p] in its C register.
//
//   mdt_ctrl      multi-dimensional counter (t1, t2) and per-variable enables
//   mdt_mem (x2)  A and B memories, N-1 words each (address t2-2)
//   mdt_datapath  operand muxes and multiply-accumulate
//
// Interface and timing (one point (t1, t2) per clock with ce = 1):
//   go / go_next     start token in / out, see mdt_ctrl.
//   a_in, a_in_valid A[t1,t2,p] for the current point; must be valid whenever
//                    the cell consumes A (checked by an assertion).
//   b_in, b_in_valid shared b bus; the cell takes it while b_req = 1.
//   a_out, a_out_valid  Acom: A of the previous row, same t2, for cell p+1,
//                    valid in the same clock (combinational from the A memory
//                    read register).
//   c_out, c_valid, c_row  result c[c_row, p], one-clock pulse.
//   t1, t2           current logical time (used for the host's request indices).
// The structure follows the design's architecture; the valid signals and the
// read-ahead memory addressing are this implementation's choices.
module mdt_cell
  import mdt_pkg::*;
#(
  parameter int P_IDX = 1,
  parameter int M     = 10,
  parameter int N     = 8,
  parameter int W     = 8,
  parameter int CW    = 2 * W + $clog2(N),
  parameter int T1W   = $clog2(P_IDX + M + 2) + 1,
  parameter int T2W   = $clog2(N + 1) + 1,
  parameter int IW    = $clog2(M + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic                 go,
  output logic                 go_next,
  input  logic signed [W-1:0]  a_in,
  input  logic                 a_in_valid,
  output logic                 a_req,
  input  logic signed [W-1:0]  b_in,
  input  logic                 b_in_valid,
  output logic                 b_req,
  output logic signed [W-1:0]  a_out,
  output logic                 a_out_valid,
  output logic signed [CW-1:0] c_out,
  output logic                 c_valid,
  output logic [IW-1:0]        c_row,
  output logic [T1W-1:0]       t1,
  output logic [T2W-1:0]       t2,
  output logic                 busy,
  output logic                 done
);

  localparam int AW = (N > 2) ? $clog2(N - 1) : 1;

  var_en_t              en;
  logic [AW-1:0]        wr_addr, rd_addr;
  logic                 rd_ce_a, rd_ce_b, wr_ce_a, wr_ce_b;
  logic signed [W-1:0]  b_cur, b_mem, a_mem;
  logic [IW-1:0]        row_q;

  mdt_ctrl #(.P_IDX(P_IDX), .M(M), .N(N), .T1W(T1W), .T2W(T2W), .AW(AW)) u_ctrl (
    .clk, .rst_n, .ce, .go, .en, .t1, .t2, .wr_addr, .rd_addr,
    .rd_ce_a, .rd_ce_b, .wr_ce_a, .wr_ce_b, .go_next, .busy, .done
  );

  mdt_mem #(.W(W), .DEPTH(N - 1), .AW(AW)) u_mem_a (
    .clk, .wr_ce(wr_ce_a), .wr_addr, .wr_data(a_in),
    .rd_ce(rd_ce_a), .rd_addr, .rd_data(a_mem)
  );

  mdt_mem #(.W(W), .DEPTH(N - 1), .AW(AW)) u_mem_b (
    .clk, .wr_ce(wr_ce_b), .wr_addr, .wr_data(b_cur),
    .rd_ce(rd_ce_b), .rd_addr, .rd_data(b_mem)
  );

  mdt_datapath #(.W(W), .N(N), .CW(CW)) u_dp (
    .clk, .rst_n, .ce, .en, .a_src(a_in), .b_ext(b_in), .b_mem,
    .b_cur, .c_out, .c_valid
  );

  assign a_req       = en.a;
  assign b_req       = en.b_load;
  assign a_out       = a_mem;
  assign a_out_valid = en.acom;

  // Row index i = t1 - p of the inner product being finished, held with c_out.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         row_q <= '0;
    else if (ce && en.c && en.last_k)   row_q <= IW'(t1 - T1W'(P_IDX));
  end
  assign c_row = row_q;

  // Operands must be present whenever the schedule consumes them.
  a_a_valid: assert property (@(posedge clk) disable iff (!rst_n) (ce && en.a) |-> a_in_valid)
    else $error("mdt_cell %0d: A consumed without a valid input", P_IDX);
  a_b_valid: assert property (@(posedge clk) disable iff (!rst_n) (ce && en.b_load) |-> b_in_valid)
    else $error("mdt_cell %0d: b loaded without a valid input", P_IDX);

endmodule
