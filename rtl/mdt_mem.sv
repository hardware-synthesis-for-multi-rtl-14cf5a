// mdt_mem: local two-port memory of one processor (one per stored variable).
//
// Each processor keeps the values of A (and of B) that it computed during one
// row t1 so that it can use them again in the next row t1+1. The memory
// function maps A[t1,t2,p] to address t2-1 of processor p, so a memory of N-1
// words is enough. The memory has one write port and one read port, each with
// its own clock enable, and is read in one clock cycle, like an FPGA block RAM.
//
// Interface and timing:
//   wr_ce/wr_addr/wr_data : word written at the rising edge when wr_ce = 1.
//   rd_ce/rd_addr         : rd_data loads mem[rd_addr] at the rising edge when
//                           rd_ce = 1 and otherwise holds (synchronous read).
// Physical address = logical address - 1 (t2 - 2), so DEPTH = N-1 words.
// The controller never reads and writes one address in the same cycle (it reads
// the address of the next point while writing the current one); an assertion
// checks that. Contents are not reset, like a block RAM; every word is written
// before it is read.
module mdt_mem #(
  parameter int W     = 8,
  parameter int DEPTH = 7,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          wr_ce,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_ce,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_ce) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_ce) rd_data <= mem[rd_addr];
  end

  // The schedule never reads and writes one word in the same cycle.
  a_no_collision: assert property (@(posedge clk) !(wr_ce && rd_ce && wr_addr == rd_addr))
    else $error("mdt_mem: read and write of the same address in one cycle");
  a_wr_range: assert property (@(posedge clk) wr_ce |-> (int'(wr_addr) < DEPTH))
    else $error("mdt_mem: write address out of range");
  a_rd_range: assert property (@(posedge clk) rd_ce |-> (int'(rd_addr) < DEPTH))
    else $error("mdt_mem: read address out of range");

endmodule
