// tb_rmm_top: end-to-end test of the RMM at its default size
// (k = 4 digits of d = 64 bits, m = 4 multipliers, 256-bit operands).
//
// rmm_driver runs random and corner-case Montgomery products and checks
// result and latency (11 schedule cycles + final + done = 13). This bench
// also counts how often each mechanism of the design occurred and fails if
// one never did: deferred T1 products issued alongside or after the Q/U
// products, idle multiplier slots, the low-half carry (T0 != 0) both set
// and clear, and the final subtraction both taken and skipped.
module tb_rmm_top;
  import rmm_pkg::*;

  localparam int unsigned K = 4, D = 64, NMUL = 4, N = K * D;

  logic           clk = 1'b0;
  logic           rst_n, start, busy, done, finished;
  logic [N-1:0]   a, b, modulus, m_prime, p;
  int             checks, failures;

  always #5 clk = ~clk;

  rmm_top dut (
    .clk, .rst_n, .start, .a, .b, .modulus, .m_prime, .busy, .done, .p
  );

  rmm_driver #(.K(K), .D(D), .NTEST(24), .EXP_LAT(13)) u_drv (
    .clk, .rst_n, .start, .a, .b, .modulus, .m_prime, .busy, .done, .p,
    .checks, .failures, .finished
  );

  int n_defer, n_idle, n_nz, n_zero, n_sub, n_nosub;
  bit seen_q;

  initial begin
    n_defer = 0; n_idle = 0; n_nz = 0; n_zero = 0; n_sub = 0; n_nosub = 0;
    seen_q = 1'b0;
  end

  always @(posedge clk) begin
    if (dut.clr) seen_q = 1'b0;
    for (int l = 0; l < int'(NMUL); l++) begin
      if (dut.slots[l].ph == PH_Q) seen_q = 1'b1;
    end
    if (dut.busy && !dut.final_en && !dut.done) begin
      for (int l = 0; l < int'(NMUL); l++) begin
        if (dut.slots[l].ph == PH_IDLE) n_idle++;
        if (dut.slots[l].ph == PH_T && seen_q) n_defer++;
      end
    end
    if (dut.final_en) begin
      if (dut.u_final.t0_nz) n_nz++; else n_zero++;
      if (dut.u_final.sub_taken) n_sub++; else n_nosub++;
    end
  end

  task automatic need(input int n, input string what);
    if (n == 0) begin
      $display("FAIL: mechanism never seen: %s", what);
      failures++;
    end
  endtask

  initial begin
    @(posedge rst_n);
    wait (finished === 1'b1);
    $display("mechanisms: deferred T1 products %0d, idle slots %0d, T0!=0 %0d, T0==0 %0d, subtract %0d, no subtract %0d",
             n_defer, n_idle, n_nz, n_zero, n_sub, n_nosub);
    need(n_defer, "deferred T1 product");
    need(n_idle, "idle multiplier slot");
    need(n_nz, "low-half carry set");
    need(n_zero, "low-half carry clear");
    need(n_sub, "final subtraction taken");
    need(n_nosub, "final subtraction skipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
