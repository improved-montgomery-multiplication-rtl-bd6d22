// rmm_final: final sum and correction of the RMM.
//
// After the scheduler has finished T = A*B and U = Q*M, the Montgomery
// product is P = (T + U) / R. Because T + U is a multiple of R, the low
// halves obey T0 + U0 = 0 when T0 = 0 and T0 + U0 = R otherwise, so the
// carry from the low half is just "T0 is not zero" and the low half never
// needs to be added: P = T1 + U1 + (T0 != 0). One conditional subtraction
// of the modulus then brings P below M (P < 2M holds when A, B < M).
// Both steps follow the RMM description; computing them combinationally in
// one block is this design's own choice.
//
// Interface: purely combinational. n = K*D bits per operand.
module rmm_final #(
  parameter int unsigned K = 4,
  parameter int unsigned D = 64
) (
  input  logic [K*D-1:0] t_lo,      // T0, low half of T
  input  logic [K*D-1:0] t_hi,      // T1, high half of T
  input  logic [K*D-1:0] u_hi,      // U1, high half of U
  input  logic [K*D-1:0] modulus,   // M
  output logic [K*D-1:0] p,         // A*B*R^-1 mod M, below M
  output logic           t0_nz,     // the low-half carry (ones detect)
  output logic           sub_taken  // the correction subtraction happened
);

  localparam int unsigned N = K * D;

  logic [N:0] s, diff;

  always_comb begin
    t0_nz     = |t_lo;
    s         = (N+1)'(t_hi) + (N+1)'(u_hi) + (N+1)'(t0_nz);
    diff      = s - (N+1)'(modulus);
    sub_taken = (s >= (N+1)'(modulus));
    p         = sub_taken ? diff[N-1:0] : s[N-1:0];
  end

endmodule
