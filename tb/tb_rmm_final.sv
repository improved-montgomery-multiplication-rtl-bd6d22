// tb_rmm_final: checks the final sum and correction (k = 4, d = 64).
// Stimulus is built from a real Montgomery setting so that the outputs
// mean something: pick an odd M, A, B < M, compute T = A*B, Q = T0*M' mod R
// and U = Q*M in the bench, and expect (T + U) / R reduced below M. A few
// direct cases check the low-half carry flag and the subtraction flag.
module tb_rmm_final;

  localparam int unsigned K = 4, D = 64, N = K * D;

  logic [N-1:0] t_lo, t_hi, u_hi, modulus, p;
  logic         t0_nz, sub_taken;
  int           checks = 0, failures = 0;
  int           n_sub = 0, n_zero = 0;

  rmm_final #(.K(K), .D(D)) dut (.t_lo, .t_hi, .u_hi, .modulus, .p, .t0_nz, .sub_taken);

  function automatic logic [N-1:0] rand_wide();
    logic [N-1:0] r;
    for (int w = 0; w < int'(N / 32); w++) r = (r << 32) | N'($urandom);
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [N-1:0]   m, mp, x, aa, bb, q;
    logic [2*N-1:0] tt, uu;
    logic [2*N+1:0] full;
    logic [N:0]     expct;
    for (int t = 0; t < 300; t++) begin
      m = rand_wide() | N'(1);
      if (t % 2 == 0) m[N-1] = 1'b1;
      x = m;
      for (int it = 0; it < 12; it++) x = x * (N'(2) - m * x);
      mp = -x;
      aa = rand_wide() % m; bb = rand_wide() % m;
      if (t == 0) aa = '0;
      if (t == 1) begin aa = m - 1'b1; bb = m - 1'b1; end
      tt = (2*N)'(aa) * (2*N)'(bb);
      q  = tt[N-1:0] * mp;
      uu = (2*N)'(q) * (2*N)'(m);
      full  = (2*N+2)'(tt) + (2*N+2)'(uu);
      expct = full[2*N:N];
      check(full[N-1:0] == '0, "reference: T + U not a multiple of R");
      if (expct >= (N+1)'(m)) expct = expct - (N+1)'(m);
      t_lo = tt[N-1:0]; t_hi = tt[2*N-1:N]; u_hi = uu[2*N-1:N]; modulus = m;
      #1;
      check(p == expct[N-1:0], $sformatf("test %0d: wrong P", t));
      check(t0_nz == (tt[N-1:0] != '0), "low-half carry flag");
      if (sub_taken) n_sub++;
      if (!t0_nz) n_zero++;
    end
    // direct: P exactly M must be reduced to 0
    modulus = N'(1001); t_lo = '0; t_hi = N'(600); u_hi = N'(401); #1;
    check(p == '0 && sub_taken && !t0_nz, "P = M not reduced to 0");
    modulus = N'(1001); t_lo = N'(5); t_hi = N'(600); u_hi = N'(399); #1;
    check(p == N'(1000) && !sub_taken && t0_nz, "P = M - 1 changed");
    check(n_sub > 0 && n_zero > 0, "subtraction or T0 = 0 never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
