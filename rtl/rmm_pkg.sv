// rmm_pkg: types shared by the Rescheduled Montgomery Multiplier (RMM).
//
// A schedule slot tells one digit-multiplier lane what to compute in one
// clock cycle: which of the three product families it works on and which
// digit pair (i, j). The three families are the ones of a separated-operand
// Montgomery product:
//   PH_T : T = A * B             digit product A[i] * B[j]
//   PH_Q : Q = T0 * M' mod R     digit product T[i] * M'[j], only i + j < k
//   PH_U : U = Q * M             digit product Q[i] * M[j]
// PH_IDLE marks an unused multiplier slot. Digit indices are 8 bits wide,
// which bounds the digit count k at 256. The three families are those of
// the RMM description; the encoding and field widths are this design's own.
package rmm_pkg;

  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_T    = 2'd1,
    PH_Q    = 2'd2,
    PH_U    = 2'd3
  } phase_e;

  localparam int unsigned IDX_W = 8;

  typedef struct packed {
    phase_e             ph;
    logic [IDX_W-1:0]   i;
    logic [IDX_W-1:0]   j;
  } slot_t;

  localparam slot_t SLOT_IDLE = '{ph: PH_IDLE, i: '0, j: '0};

endpackage
