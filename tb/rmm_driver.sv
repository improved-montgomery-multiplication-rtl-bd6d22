// rmm_driver: stimulus and checking for an rmm_top instance.
//
// Runs NTEST Montgomery products through the multiplier. Each test draws an
// odd modulus M (the first half with the top bit set, so that the final
// correction is exercised), computes M' = -M^-1 mod R by Newton iteration
// (x <- x*(2 - M*x), which doubles the number of correct low bits each
// step), draws A, B < M and checks the returned P two ways that do not
// rely on the design: P < M, and P*R = A*B (mod M), which fixes P
// uniquely. It also checks the latency from the start edge to done against
// EXP_LAT. The first tests use the corner operands A = 0 (T0 = 0),
// A = B = 1 and A = B = M - 1.
module rmm_driver #(
  parameter int unsigned K       = 4,
  parameter int unsigned D       = 64,
  parameter int unsigned NTEST   = 20,
  parameter int unsigned EXP_LAT = 13
) (
  input  logic           clk,
  output logic           rst_n,
  output logic           start,
  output logic [K*D-1:0] a,
  output logic [K*D-1:0] b,
  output logic [K*D-1:0] modulus,
  output logic [K*D-1:0] m_prime,
  input  logic           busy,
  input  logic           done,
  input  logic [K*D-1:0] p,
  output int             checks,
  output int             failures,
  output logic           finished
);

  localparam int unsigned N = K * D;

  function automatic logic [N-1:0] rand_wide();
    logic [N-1:0] r;
    for (int unsigned w = 0; w < (N + 31) / 32; w++)
      r = (r << 32) | N'($urandom);
    return r;
  endfunction

  function automatic logic [N-1:0] neg_inverse(input logic [N-1:0] m);
    logic [N-1:0] x;
    x = m;                       // correct to 3 bits for odd m
    for (int it = 0; it < 12; it++) x = x * (N'(2) - m * x);
    return -x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [N-1:0]   m, aa, bb;
    logic [2*N:0]   lhs, rhs;
    int             lat;
    checks   = 0;
    failures = 0;
    finished = 1'b0;
    rst_n    = 1'b0;
    start    = 1'b0;
    a = '0; b = '0; modulus = '0; m_prime = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int t = 0; t < int'(NTEST); t++) begin
      m = rand_wide() | N'(1);
      if (t < int'(NTEST) / 2) m[N-1] = 1'b1;
      else                     m = m >> ($urandom % 8);
      m[0] = 1'b1;
      aa = rand_wide() % m;
      bb = rand_wide() % m;
      if (t == 0) aa = '0;
      if (t == 1) begin aa = N'(1); bb = N'(1); end
      if (t == 2) begin aa = m - 1'b1; bb = m - 1'b1; end
      // M' must satisfy M * M' = -1 mod R
      check((m * neg_inverse(m)) == '1, "reference M' is not -M^-1 mod R");
      check(!busy, "busy before start");
      @(negedge clk);
      a = aa; b = bb; modulus = m; m_prime = neg_inverse(m);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      a = rand_wide(); b = rand_wide();   // operands must have been latched
      lat = 1;
      while (!done && lat < 1000) begin @(negedge clk); lat++; end
      check(lat == int'(EXP_LAT),
            $sformatf("latency %0d, expected %0d", lat, EXP_LAT));
      lhs = ((2*N+1)'(p) << N) % (2*N+1)'(m);
      rhs = ((2*N+1)'(aa) * (2*N+1)'(bb)) % (2*N+1)'(m);
      check(p < m, $sformatf("test %0d: P not below M", t));
      check(lhs == rhs, $sformatf("test %0d: P*R != A*B mod M", t));
      @(negedge clk);
      check(!done, "done longer than one cycle");
    end
    finished = 1'b1;
  end

endmodule
