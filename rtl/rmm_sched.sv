// rmm_sched: schedule controller of the Rescheduled Montgomery Multiplier.
//
// The RMM computes a Montgomery product from three digit-product families,
// T = A*B (k^2 products), Q = T0*M' mod R (only the (k^2+k)/2 products with
// i + j < k) and U = Q*M (k^2 products), on m multipliers. This block holds
// the cycle-by-cycle schedule as a table built at elaboration time and
// steps through it after start, handing one slot to each lane per cycle.
//
// How the table is packed (m slots per cycle, products in column order,
// lowest i + j first, and within a column by ascending i):
//   1. the T products of columns 0..k-1, which fix T0;
//   2. the Q products, starting on a fresh cycle because they read T0;
//   3. the U products, starting on a fresh cycle because they read Q.
// The T products of columns k..2k-2 only feed T1, which nothing needs until
// the final sum, so they are used to fill idle multiplier slots: first those
// left in the last T0 cycle, then (deferred) those in the last cycle of the
// Q group and of the U group; any that remain follow the T0 products
// directly. The schedule is therefore never longer than
// ceil(NT/m) + ceil(NQ/m) + ceil(NU/m) cycles. For k = 2 this reproduces
// the published RMM(2,1) schedule (11 cycles) and RMM(2,2) schedule
// (6 cycles) slot for slot. The rule for larger k is this design's reading
// of "opportunistically defer T1 computations".
//
// Interface/timing: a start pulse while idle begins a run. slots is valid
// while busy; the run takes NCYC cycles, then final_en is high for one cycle,
// in which the owner registers the final sum, and done pulses the cycle after.
module rmm_sched
  import rmm_pkg::*;
#(
  parameter int unsigned K    = 4,     // digits per operand
  parameter int unsigned NMUL = 4      // digit multipliers (m)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,      // a run is in progress
  output logic                  clr,       // empty the accumulators
  output slot_t [NMUL-1:0]      slots,     // this cycle's work, one per lane
  output logic                  final_en,  // register the final sum now
  output logic                  done       // result valid (one-cycle pulse)
);

  localparam int unsigned NT0 = K * (K + 1) / 2;  // T products of columns < k
  localparam int unsigned NT1 = K * (K - 1) / 2;  // T products of columns >= k
  localparam int unsigned NQ  = K * (K + 1) / 2;  // Q products, i + j < k
  localparam int unsigned NU  = K * K;            // U products

  // Round a slot count up to a whole cycle.
  function automatic int unsigned round_up(input int unsigned s);
    return ((s + NMUL - 1) / NMUL) * NMUL;
  endfunction

  function automatic int unsigned min2(input int unsigned x, input int unsigned y);
    return (x < y) ? x : y;
  endfunction

  // Idle slots at the end of the T0, Q and U groups. T1 products first fill
  // the T0 group's last cycle, then as many as fit are deferred into the Q
  // and U tails; the others follow the T0 products directly.
  localparam int unsigned S0   = round_up(NT0) - NT0;
  localparam int unsigned SQ   = round_up(NQ) - NQ;
  localparam int unsigned SU   = round_up(NU) - NU;
  localparam int unsigned F0   = min2(S0, NT1);
  localparam int unsigned DQ   = min2(SQ, NT1 - F0);
  localparam int unsigned DU   = min2(SU, NT1 - F0 - DQ);
  localparam int unsigned NT1E = NT1 - DQ - DU;   // T1 products issued early

  localparam int unsigned NCYC  = (round_up(NT0 + NT1E) + round_up(NQ)
                                   + round_up(NU)) / NMUL;
  localparam int unsigned NSLOT = NCYC * NMUL;

  typedef slot_t [NSLOT-1:0] table_t;

  function automatic slot_t mk(input phase_e ph, input int unsigned i,
                               input int unsigned j);
    slot_t r;
    r.ph = ph;
    r.i  = i[IDX_W-1:0];
    r.j  = j[IDX_W-1:0];
    return r;
  endfunction

  function automatic table_t build_table();
    table_t t;
    int unsigned s;
    int unsigned c1, i1;     // next T1 product: column c1, row i1
    int unsigned lo, hi, n1;
    for (int unsigned n = 0; n < NSLOT; n++) t[n] = SLOT_IDLE;
    s  = 0;
    c1 = K;
    i1 = 1;
    for (int g = 0; g < 3; g++) begin
      if (g == 0) begin
        for (int unsigned c = 0; c < K; c++)
          for (int unsigned i = 0; i <= c; i++) begin
            t[s] = mk(PH_T, i, c - i); s++;
          end
      end else if (g == 1) begin
        for (int unsigned c = 0; c < K; c++)
          for (int unsigned i = 0; i <= c; i++) begin
            t[s] = mk(PH_Q, i, c - i); s++;
          end
      end else begin
        for (int unsigned c = 0; c + 1 < 2 * K; c++) begin
          lo = (c >= K) ? c - K + 1 : 0;
          hi = (c < K) ? c : K - 1;
          for (int unsigned i = lo; i <= hi; i++) begin
            t[s] = mk(PH_U, i, c - i); s++;
          end
        end
      end
      // T1 products placed behind this group
      n1 = (g == 0) ? NT1E : (g == 1) ? DQ : DU;
      for (int unsigned n = 0; n < n1; n++) begin
        t[s] = mk(PH_T, i1, c1 - i1); s++;
        i1++;
        if (i1 > K - 1) begin c1++; i1 = c1 - K + 1; end
      end
      s = round_up(s);
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();
  localparam int unsigned CW = (NCYC > 1) ? $clog2(NCYC) : 1;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FINAL, S_DONE} state_e;

  state_e        state;
  logic [CW-1:0] cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cyc   <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) begin state <= S_RUN; cyc <= '0; end
        S_RUN:   begin
                   if (cyc == CW'(NCYC - 1)) state <= S_FINAL;
                   else                      cyc   <= cyc + 1'b1;
                 end
        S_FINAL: state <= S_DONE;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int unsigned l = 0; l < NMUL; l++)
      slots[l] = (state == S_RUN) ? TABLE[cyc * NMUL + l] : SLOT_IDLE;
  end

  // handshake rules: final_en lasts one cycle and is followed by done;
  // lanes are idle whenever no schedule is running
  a_final_then_done: assert property (@(posedge clk) disable iff (!rst_n)
                                      final_en |=> (done && !final_en));
  a_idle_slots: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state != S_RUN) |-> (slots == '0));

  assign busy     = (state != S_IDLE);
  assign clr      = (state == S_IDLE) && start;
  assign final_en = (state == S_FINAL);
  assign done     = (state == S_DONE);

endmodule
