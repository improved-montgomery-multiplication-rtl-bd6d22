// tb_rmm_builds: runs the multiplier in each build of the published
// result table that uses about 256-bit operands: k = 2 (m = 1, 2),
// k = 3 (m = 3), k = 4 (m = 2, 3, 5), k = 5 (m = 5), k = 6 (m = 9),
// k = 7 (m = 10) and k = 8 (m = 13), with d = ceil(256 / k).
// Each build computes random Montgomery products, checked for value and for
// latency. Expected latency is the schedule length plus two (final sum,
// done). With NT0 = NQ = k(k+1)/2, NT1 = k(k-1)/2, NU = k^2, the schedule
// length is ceil((NT0 + NT1 - dq - du)/m) + ceil(NQ/m) + ceil(NU/m), where
// dq and du are the T1 products deferred into the idle slots at the end of
// the Q and U groups (after those at the end of the T0 group are filled):
//   (2,1) 11  (2,2) 6  (3,3) 8  (4,2) 21  (4,3) 14  (4,5) 9
//   (5,5) 13  (6,9) 11  (7,10) 13  (8,13) 13
// Without deferral (4,3) and (4,5) would take 16 and 10 cycles.
module tb_rmm_builds;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NB = 10;
  int   c [NB];
  int   f [NB];
  logic fin [NB];

  `define RMM_BUILD(IDX, KK, DD, MM, LAT)                                    \
    begin : g_build_``IDX                                                    \
      logic rst_n, start, busy, done;                                        \
      logic [KK*DD-1:0] a, b, modulus, m_prime, p;                           \
      rmm_top #(.K(KK), .D(DD), .NMUL(MM)) dut (                             \
        .clk, .rst_n, .start, .a, .b, .modulus, .m_prime, .busy, .done, .p); \
      rmm_driver #(.K(KK), .D(DD), .NTEST(8), .EXP_LAT(LAT)) drv (           \
        .clk, .rst_n, .start, .a, .b, .modulus, .m_prime, .busy, .done, .p,  \
        .checks(c[IDX]), .failures(f[IDX]), .finished(fin[IDX]));            \
    end

  `RMM_BUILD(0, 2, 128, 1, 13)
  `RMM_BUILD(1, 2, 128, 2, 8)
  `RMM_BUILD(2, 3, 86, 3, 10)
  `RMM_BUILD(3, 4, 64, 2, 23)
  `RMM_BUILD(4, 4, 64, 3, 16)
  `RMM_BUILD(5, 4, 64, 5, 11)
  `RMM_BUILD(6, 5, 52, 5, 15)
  `RMM_BUILD(7, 6, 43, 9, 13)
  `RMM_BUILD(8, 7, 37, 10, 15)
  `RMM_BUILD(9, 8, 32, 13, 15)

  function automatic int total(input int v [NB]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  function automatic bit all_done();
    foreach (fin[i]) if (fin[i] !== 1'b1) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #20;
    while (!all_done()) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

endmodule
