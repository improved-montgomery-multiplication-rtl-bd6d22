// rmm_lane: one multiplier lane of the RMM datapath.
//
// Each cycle the scheduler hands the lane a slot (family, i, j). The lane
// picks the two operand digits that the family needs and multiplies them:
//   PH_T : A[i] * B[j]     (the operand product T = A*B)
//   PH_Q : T[i] * M'[j]    (the quotient Q = T0*M' mod R, low triangle only)
//   PH_U : Q[i] * M[j]     (the reduction product U = Q*M)
// It also reports where the 2d-bit product belongs: digit offset i + j of
// the accumulator named by the family. An idle slot yields a zero product.
// The multiplexers in front of the multiplier are this design's own
// reading of the schedules; the family/operand pairing follows the
// published schedules.
//
// Interface: all inputs are steady for the cycle; outputs are combinational.
module rmm_lane
  import rmm_pkg::*;
#(
  parameter int unsigned K = 4,        // digits per operand
  parameter int unsigned D = 64        // bits per digit
) (
  input  slot_t                 slot,
  input  logic [K-1:0][D-1:0]   a,       // operand A
  input  logic [K-1:0][D-1:0]   b,       // operand B
  input  logic [K-1:0][D-1:0]   t_lo,    // T0, low k digits of T = A*B
  input  logic [K-1:0][D-1:0]   m_prime, // M' = -M^-1 mod R
  input  logic [K-1:0][D-1:0]   q,       // Q = T0*M' mod R
  input  logic [K-1:0][D-1:0]   modulus, // M
  output phase_e                ph,      // family the product belongs to
  output logic [IDX_W:0]        offset,  // digit offset i + j
  output logic [2*D-1:0]        prod
);

  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;

  logic [D-1:0] x, y;
  logic [KW-1:0] ii, jj;

  assign ii = slot.i[KW-1:0];
  assign jj = slot.j[KW-1:0];

  always_comb begin
    unique case (slot.ph)
      PH_T:    begin x = a[ii];    y = b[jj];       end
      PH_Q:    begin x = t_lo[ii]; y = m_prime[jj]; end
      PH_U:    begin x = q[ii];    y = modulus[jj]; end
      default: begin x = '0;       y = '0;          end
    endcase
  end

  rmm_digit_mul #(.D(D)) u_mul (.x(x), .y(y), .p(prod));

  assign ph     = slot.ph;
  assign offset = (IDX_W+1)'(slot.i) + (IDX_W+1)'(slot.j);

endmodule
