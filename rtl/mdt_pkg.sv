// mdt_pkg: types shared by the multi-dimensional-time matrix-multiplication array.
//
// The array runs a two-dimensional schedule: every operation has a logical time
// (t1, t2), and each processor scans its own part of that time space with a small
// automaton (mdt_ctrl). What the automaton tells the rest of the processor is
// collected in var_en_t: one clock enable per program variable (A, B, Acom, C),
// plus the few position flags the datapath needs. The automaton states follow
// the four-state scanner of the design; the idle state and the encoding are
// this implementation's own.
package mdt_pkg;

  // States of the per-processor time-domain scanner.
  //   S_IDLE  : waiting for the start token
  //   S_FIRST : first row t1 = p+1  (A, B, C active; column of b loaded)
  //   S_MID   : rows p+2 .. p+M     (A, B, C and Acom active)
  //   S_LAST  : row t1 = p+M+1      (only Acom active: last row of A handed on)
  //   S_DONE  : end of time
  typedef enum logic [2:0] {
    S_IDLE  = 3'd0,
    S_FIRST = 3'd1,
    S_MID   = 3'd2,
    S_LAST  = 3'd3,
    S_DONE  = 3'd4
  } ctrl_state_e;

  // Per-variable activation signals for the current scanned point (t1, t2).
  typedef struct packed {
    logic a;       // A[t1,t2,p] is defined: store it in the A memory
    logic b;       // B[t1,t2,p] is defined: store it in the B memory
    logic acom;    // Acom[t1,t2,p] is defined: A memory read data goes to cell p+1
    logic c;       // C is updated (multiply-accumulate)
    logic b_load;  // B comes from the external b input (t1 = p+1), not from memory
    logic first_k; // t2 = 2: first term of an inner product, accumulator restarts
    logic last_k;  // t2 = N: last term, the finished c[i,j] is delivered
  } var_en_t;

endpackage
