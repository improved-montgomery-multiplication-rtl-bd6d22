// rmm_top: Rescheduled Montgomery Multiplier RMM(k, m).
//
// Computes the Montgomery product P = A * B * R^-1 mod M for n = k*d bit
// operands, R = 2^n, using m digit multipliers of d x d bits. The product
// is formed in the separated-operand way, with no digit-by-digit reduction:
//   T = A*B,  Q = T0*M' mod R (T0 = T mod R, M' = -M^-1 mod R),
//   U = Q*M,  P = T1 + U1 + (T0 != 0), then P - M if P >= M,
// where X0 / X1 are the low / high n bits of a 2n-bit value.
//
// Structure: rmm_sched steps through a static schedule of digit products
// (column order, T1-only products deferred into idle slots); m rmm_lane
// instances fetch operand digits and multiply; three rmm_accum registers
// collect T (2k digits), Q (k digits, so mod R) and U (2k digits); rmm_final
// forms the result, which is registered here. Its two status flags (low-half
// carry, correction taken) are not brought out.
//
// Interface: start (one cycle, while busy is low) latches a, b, modulus and
// m_prime. done pulses once when p holds the result; p stays until the next
// result. Latency from start to done is NCYC + 2 cycles, NCYC being the
// schedule length (11 for k = 4, m = 4). The caller must supply an odd
// modulus M < R, M' = -M^-1 mod R, and A, B < M; these are not checked.
// Defaults k = 4, d = 64, m = 4 are the 256-bit build the RMM results single
// out as the k = 4 choice; the port protocol is this design's own.
module rmm_top
  import rmm_pkg::*;
#(
  parameter int unsigned K    = 4,     // digits per operand (k)
  parameter int unsigned D    = 64,    // bits per digit (d)
  parameter int unsigned NMUL = 4      // digit multipliers (m)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [K*D-1:0]   a,
  input  logic [K*D-1:0]   b,
  input  logic [K*D-1:0]   modulus,
  input  logic [K*D-1:0]   m_prime,
  output logic             busy,
  output logic             done,
  output logic [K*D-1:0]   p
);

  localparam int unsigned N  = K * D;
  localparam int unsigned OW = IDX_W + 1;

  // operand registers
  logic [K-1:0][D-1:0] a_r, b_r, m_r, mp_r;
  logic                accept;

  assign accept = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r <= '0; b_r <= '0; m_r <= '0; mp_r <= '0;
    end else if (accept) begin
      a_r <= a; b_r <= b; m_r <= modulus; mp_r <= m_prime;
    end
  end

  // controller
  slot_t [NMUL-1:0] slots;
  logic             clr, final_en;

  rmm_sched #(.K(K), .NMUL(NMUL)) u_sched (
    .clk, .rst_n, .start(accept), .busy, .clr, .slots, .final_en, .done
  );

  // accumulators; the low half of U is kept only for the carries it sends
  // into the high half, which is all the final sum reads
  logic [2*N-1:0] t_acc, u_acc;
  logic [N-1:0]   q_acc;

  // multiplier lanes
  phase_e [NMUL-1:0]              ph;
  logic   [NMUL-1:0][OW-1:0]      offset;
  logic   [NMUL-1:0][2*D-1:0]     prod;
  logic   [NMUL-1:0]              en_t, en_q, en_u;

  for (genvar l = 0; l < NMUL; l++) begin : g_lane
    rmm_lane #(.K(K), .D(D)) u_lane (
      .slot    (slots[l]),
      .a       (a_r),
      .b       (b_r),
      .t_lo    (t_acc[N-1:0]),
      .m_prime (mp_r),
      .q       (q_acc),
      .modulus (m_r),
      .ph      (ph[l]),
      .offset  (offset[l]),
      .prod    (prod[l])
    );
    assign en_t[l] = (ph[l] == PH_T);
    assign en_q[l] = (ph[l] == PH_Q);
    assign en_u[l] = (ph[l] == PH_U);
  end

  rmm_accum #(.D(D), .NDIG(2*K), .NIN(NMUL), .OW(OW)) u_acc_t (
    .clk, .rst_n, .clr, .en(en_t), .offset, .prod, .acc(t_acc)
  );
  rmm_accum #(.D(D), .NDIG(K), .NIN(NMUL), .OW(OW)) u_acc_q (
    .clk, .rst_n, .clr, .en(en_q), .offset, .prod, .acc(q_acc)
  );
  rmm_accum #(.D(D), .NDIG(2*K), .NIN(NMUL), .OW(OW)) u_acc_u (
    .clk, .rst_n, .clr, .en(en_u), .offset, .prod, .acc(u_acc)
  );

  // final sum and correction
  logic [N-1:0] p_next;

  rmm_final #(.K(K), .D(D)) u_final (
    .t_lo      (t_acc[N-1:0]),
    .t_hi      (t_acc[2*N-1:N]),
    .u_hi      (u_acc[2*N-1:N]),
    .modulus   (m_r),
    .p         (p_next),
    .t0_nz     (),
    .sub_taken ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        p <= '0;
    else if (final_en) p <= p_next;
  end

endmodule
