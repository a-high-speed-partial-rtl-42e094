// polar_pkg: types and helpers shared by the polar encoder and the 2-bit SC
// decoder.
//
// LLRs travel between blocks in sign-magnitude form, as in the PE drawings:
// the most significant bit is the sign (0 = non-negative, 1 = negative) and
// the remaining LLR_W-1 bits are the magnitude. Zero is always written with
// sign 0, so "sign bit" and "value is negative" mean the same thing. The LLR
// word width itself is not fixed by the architecture; 6 bits is this
// design's choice and is a package parameter so it can be changed in one
// place. The package also names the three decoder schedules.
package polar_pkg;

  parameter int unsigned LLR_W = 6;            // q: sign + (q-1) magnitude bits
  parameter int unsigned MAG_W = LLR_W - 1;

  typedef struct packed {
    logic             sign;                    // 1 = negative
    logic [MAG_W-1:0] mag;
  } llr_t;

  localparam logic [MAG_W-1:0] MAG_MAX = '1;

  // decoder schedules
  //   SCHED_2BIT    : tree 2-bit SC, f, g and p node each in a cycle of their
  //                   own, 1.5N - 2 cycles
  //   SCHED_OVERLAP : as SCHED_2BIT, but each g runs in the same cycle as
  //                   the p node before it, N - 1 cycles
  //   SCHED_PRECOMP : merged PEs (f and g at once), stage M-1 shares the
  //                   p node cycle, 3N/4 - 1 cycles (the main configuration)
  typedef enum logic [1:0] {
    SCHED_2BIT    = 2'd0,
    SCHED_OVERLAP = 2'd1,
    SCHED_PRECOMP = 2'd2
  } sched_e;

endpackage
