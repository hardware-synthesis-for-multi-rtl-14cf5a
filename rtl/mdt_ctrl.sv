// mdt_ctrl: multi-dimensional time counter and control automaton of processor p.
//
// Under the schedule T(i,j,k) = (i+j, k) processor p = j works during rows
// t1 = p+1 .. p+M+1 of logical time, and in each row it visits t2 = 2 .. N.
// Like a clock whose hours each have their own number of minutes, the counter
// (t1, t2) steps t2 every virtual clock cycle and, when t2 reaches N, resets
// it to 2 and steps t1. A four-state automaton tracks which row kind the
// counter is in and raises one clock enable per variable:
//
//   row t1 = p+1         (S_FIRST) : A, B, C       B taken from the b input
//   rows p+2 .. p+M      (S_MID)   : A, B, C, Acom B re-read from the B memory
//   row t1 = p+M+1       (S_LAST)  : Acom only     last row of A handed on
//
// One physical clock cycle with ce = 1 is one scanned point (t1, t2): the
// whole processor is frozen while ce (the virtual clock enable) is 0.
//
// Interface and timing:
//   go      : start token. At the first edge with ce = go = 1 in S_IDLE or
//             S_DONE the counter moves to (p+1, 2). Processor 1 gets the
//             array's start; processor p+1 gets go_next of processor p, which
//             is raised in the last cycle of processor p's first row, so that
//             processor p+1 starts its row p+2 together with processor p.
//   en      : per-variable enables of the current point (Moore outputs).
//   t1, t2  : the current logical time.
//   wr_addr : local memory address of the current point, t2-2.
//   rd_addr : address of the next point; with rd_ce_a / rd_ce_b it drives the
//             synchronous read ports so that data is ready in the next cycle.
//   busy    : a point is being scanned; done : the end of time was reached.
//
// The states, rows and enables follow the design's scanning automaton; the
// start-token chain and the read-ahead address are choices of this
// implementation.
module mdt_ctrl
  import mdt_pkg::*;
#(
  parameter int P_IDX = 1,                              // processor number p (1-based)
  parameter int M     = 10,                             // rows of a
  parameter int N     = 8,                              // logical k range 2..N
  parameter int T1W   = $clog2(P_IDX + M + 2) + 1,      // width of t1
  parameter int T2W   = $clog2(N + 1) + 1,              // width of t2
  parameter int AW    = (N > 2) ? $clog2(N - 1) : 1     // local memory address width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ce,
  input  logic           go,
  output var_en_t        en,
  output logic [T1W-1:0] t1,
  output logic [T2W-1:0] t2,
  output logic [AW-1:0]  wr_addr,
  output logic [AW-1:0]  rd_addr,
  output logic           rd_ce_a,
  output logic           rd_ce_b,
  output logic           wr_ce_a,
  output logic           wr_ce_b,
  output logic           go_next,
  output logic           busy,
  output logic           done
);

  localparam logic [T1W-1:0] T1_FIRST = T1W'(P_IDX + 1);
  localparam logic [T1W-1:0] T1_LASTM = T1W'(P_IDX + M);   // last S_MID row
  localparam logic [T2W-1:0] T2_MIN   = T2W'(2);
  localparam logic [T2W-1:0] T2_MAX   = T2W'(N);

  ctrl_state_e    state, state_n;
  logic [T1W-1:0] t1_n;
  logic [T2W-1:0] t2_n;
  logic           row_end;

  assign row_end = (t2 == T2_MAX);

  // Next point of the scan (the automaton of the design, one step per ce).
  always_comb begin
    state_n = state;
    t1_n    = t1;
    t2_n    = t2;
    unique case (state)
      S_IDLE, S_DONE: begin
        if (go) begin
          state_n = S_FIRST;
          t1_n    = T1_FIRST;
          t2_n    = T2_MIN;
        end
      end
      S_FIRST, S_MID, S_LAST: begin
        if (!row_end) begin
          t2_n = t2 + T2W'(1);
        end else begin
          t2_n = T2_MIN;
          t1_n = t1 + T1W'(1);
          case (state)
            S_FIRST: state_n = S_MID;
            S_MID:   state_n = (t1 == T1_LASTM) ? S_LAST : S_MID;
            default: state_n = S_DONE;
          endcase
        end
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      t1    <= '0;
      t2    <= '0;
    end else if (ce) begin
      state <= state_n;
      t1    <= t1_n;
      t2    <= t2_n;
    end
  end

  // Per-variable clock enables of the current point.
  always_comb begin
    en         = '0;
    en.first_k = (t2 == T2_MIN);
    en.last_k  = row_end;
    unique case (state)
      S_FIRST: begin en.a = 1'b1; en.b = 1'b1; en.c = 1'b1; en.b_load = 1'b1; end
      S_MID:   begin en.a = 1'b1; en.b = 1'b1; en.c = 1'b1; en.acom   = 1'b1; end
      S_LAST:  begin en.acom = 1'b1; end
      default: ;
    endcase
  end

  assign wr_addr = AW'(t2 - T2_MIN);
  assign rd_addr = AW'(t2_n - T2_MIN);
  // Read ahead for the next point: Acom is read in S_MID and S_LAST, B in S_MID.
  assign rd_ce_a = ce && (state_n == S_MID || state_n == S_LAST);
  assign rd_ce_b = ce && (state_n == S_MID);
  assign wr_ce_a = ce && en.a;
  assign wr_ce_b = ce && en.b;
  assign go_next = ce && (state == S_FIRST) && row_end;
  assign busy    = (state == S_FIRST) || (state == S_MID) || (state == S_LAST);
  assign done    = (state == S_DONE);

endmodule
