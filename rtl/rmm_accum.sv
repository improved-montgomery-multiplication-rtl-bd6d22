// rmm_accum: digit-offset product accumulator of the RMM.
//
// The RMM keeps three running sums, T = A*B, Q = T0*M' mod R and U = Q*M.
// Each is one instance of this block: a register of NDIG digits to which,
// every cycle, up to NIN digit products (one per multiplier lane) are added,
// each shifted left by its digit offset (i + j) * D. Bits above NDIG*D are
// dropped, which gives the "mod R" of Q for free when NDIG = k.
//
// The scheduler issues products column by column (lowest i + j first), so
// the products that land in one cycle sit in neighbouring columns and the
// low digits of the sum are final early; this is the vertically biased
// accumulation of the RMM. The adder itself is a plain binary adder over the
// whole register, which is this design's own simplification.
//
// Timing: clr has priority and empties the register at the next edge; the
// products presented in cycle c are part of acc from cycle c+1 on.
module rmm_accum #(
  parameter int unsigned D    = 64,    // digit width
  parameter int unsigned NDIG = 8,     // digits held (2k for T and U, k for Q)
  parameter int unsigned NIN  = 4,     // product inputs per cycle (m lanes)
  parameter int unsigned OW   = 9      // width of a digit offset
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clr,
  input  logic [NIN-1:0]            en,
  input  logic [NIN-1:0][OW-1:0]    offset,
  input  logic [NIN-1:0][2*D-1:0]   prod,
  output logic [NDIG*D-1:0]         acc
);

  localparam int unsigned W = NDIG * D;

  logic [W-1:0] sum;

  always_comb begin
    sum = acc;
    for (int unsigned l = 0; l < NIN; l++) begin
      if (en[l]) sum = sum + (W'(prod[l]) << (offset[l] * D));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else          acc <= sum;
  end

endmodule
