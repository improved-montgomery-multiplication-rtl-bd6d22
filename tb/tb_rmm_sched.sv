// tb_rmm_sched: checks the RMM schedule controller.
// For k = 2 the generated schedules must equal the published RMM(2,1)
// (one multiplier, 11 cycles) and RMM(2,2) (two multipliers, 6 cycles)
// schedules product for product. The default build (k = 4, m = 4) and two
// further builds from the published result table, (3,3) and (8,13), are
// checked for completeness, ordering and length. Expected lengths:
// (4,4) 14+10+16 slots in 4+3+4 cycles = 11; (3,3) 6+3 T, 6 Q, 9 U in
// 3+2+3 = 8; (8,13) 36+28 T (3 deferred into the Q tail, 1 into the U
// tail, 24 early) in ceil(60/13)+ceil(36/13)+ceil(64/13) = 5+3+5 = 13.
module tb_rmm_sched;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int    c0, f0, c1, f1, c2, f2, c3, f3, c4, f4, checks, failures;
  string tr0, tr1, tr2, tr3, tr4;
  logic  d0, d1, d2, d3, d4;

  rmm_sched_checker #(.K(2), .NMUL(1),  .EXP_CYC(11)) u_21 (.clk, .rst_n, .checks(c0), .failures(f0), .trace(tr0), .finished(d0));
  rmm_sched_checker #(.K(2), .NMUL(2),  .EXP_CYC(6))  u_22 (.clk, .rst_n, .checks(c1), .failures(f1), .trace(tr1), .finished(d1));
  rmm_sched_checker #(.K(4), .NMUL(4),  .EXP_CYC(11)) u_44 (.clk, .rst_n, .checks(c2), .failures(f2), .trace(tr2), .finished(d2));
  rmm_sched_checker #(.K(3), .NMUL(3),  .EXP_CYC(8))  u_33 (.clk, .rst_n, .checks(c3), .failures(f3), .trace(tr3), .finished(d3));
  rmm_sched_checker #(.K(8), .NMUL(13), .EXP_CYC(13)) u_8d (.clk, .rst_n, .checks(c4), .failures(f4), .trace(tr4), .finished(d4));

  // the published schedules
  localparam string SCHED_21 = "T00|T01|T10|T11|Q00|Q01|Q10|U00|U01|U10|U11|";
  localparam string SCHED_22 = "T00 T01|T10 T11|Q00 Q01|Q10 --|U00 U01|U10 U11|";

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2 && d3 && d4);
    checks   = c0 + c1 + c2 + c3 + c4 + 2;
    failures = f0 + f1 + f2 + f3 + f4;
    $display("RMM(2,1): %s", tr0);
    $display("RMM(2,2): %s", tr1);
    $display("RMM(4,4): %s", tr2);
    if (tr0 != SCHED_21) begin failures++; $display("FAIL: RMM(2,1) schedule differs"); end
    if (tr1 != SCHED_22) begin failures++; $display("FAIL: RMM(2,2) schedule differs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4, f0 + f1 + f2 + f3 + f4 + 1);
    $finish;
  end

endmodule
