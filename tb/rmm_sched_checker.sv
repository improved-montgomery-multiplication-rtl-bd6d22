// rmm_sched_checker: runs one rmm_sched instance through a few schedules
// and checks properties that any correct RMM schedule has:
//   * every T product (i, j) appears exactly once, every Q product with
//     i + j < k exactly once and no other, every U product exactly once;
//   * no Q product is issued in or before the cycle of the last T product
//     with i + j < k (Q reads T0), and no U product in or before the cycle
//     of the last Q product (U reads Q);
//   * the run takes EXP_CYC cycles, then final_en for one cycle, then done
//     for one cycle, and start is ignored while busy.
// It also returns the first run as text, one "|"-terminated group per cycle
// with "Xij" per lane ("--" for an idle lane), for comparison with a
// published schedule.
module rmm_sched_checker
  import rmm_pkg::*;
#(
  parameter int unsigned K       = 2,
  parameter int unsigned NMUL    = 1,
  parameter int unsigned EXP_CYC = 11
) (
  input  logic  clk,
  input  logic  rst_n,
  output int    checks,
  output int    failures,
  output string trace,
  output logic  finished
);

  logic             start, busy, clr, final_en, done;
  slot_t [NMUL-1:0] slots;

  rmm_sched #(.K(K), .NMUL(NMUL)) dut (
    .clk, .rst_n, .start, .busy, .clr, .slots, .final_en, .done
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (k=%0d m=%0d): %s", K, NMUL, what);
    end
  endtask

  function automatic string ph_str(input phase_e ph);
    case (ph)
      PH_T: return "T";
      PH_Q: return "Q";
      PH_U: return "U";
      default: return "-";
    endcase
  endfunction

  initial begin
    int cnt_t [K][K];
    int cnt_q [K][K];
    int cnt_u [K][K];
    int last_t0, first_q, last_q, first_u, cyc;
    checks = 0; failures = 0; finished = 1'b0; start = 1'b0; trace = "";
    @(posedge rst_n);
    for (int run = 0; run < 3; run++) begin
      foreach (cnt_t[i, j]) begin cnt_t[i][j] = 0; cnt_q[i][j] = 0; cnt_u[i][j] = 0; end
      last_t0 = -1; first_q = 1000; last_q = -1; first_u = 1000;
      @(negedge clk);
      check(!busy, "busy while idle");
      start = 1'b1;
      @(negedge clk);
      start = (run == 1);             // a start held during the run is ignored
      cyc = 0;
      while (busy && !final_en && cyc < 1000) begin
        for (int l = 0; l < int'(NMUL); l++) begin
          int i, j;
          i = int'(slots[l].i); j = int'(slots[l].j);
          if (run == 0) begin
            if (l > 0) trace = {trace, " "};
            if (slots[l].ph == PH_IDLE) trace = {trace, "--"};
            else trace = {trace, $sformatf("%s%0d%0d", ph_str(slots[l].ph), i, j)};
          end
          if (slots[l].ph != PH_IDLE) begin
            check(i < int'(K) && j < int'(K), "digit index out of range");
            if (i < int'(K) && j < int'(K)) begin
              case (slots[l].ph)
                PH_T: begin cnt_t[i][j]++; if (i + j < int'(K)) last_t0 = cyc; end
                PH_Q: begin cnt_q[i][j]++; if (cyc < first_q) first_q = cyc; last_q = cyc; end
                PH_U: begin cnt_u[i][j]++; if (cyc < first_u) first_u = cyc; end
                default: ;
              endcase
            end
          end
        end
        if (run == 0) trace = {trace, "|"};
        @(negedge clk);
        cyc++;
      end
      start = 1'b0;
      check(cyc == int'(EXP_CYC), $sformatf("schedule took %0d cycles, expected %0d", cyc, EXP_CYC));
      check(final_en && busy && !done, "final_en after the schedule");
      @(negedge clk);
      check(done && !final_en, "done after final_en");
      @(negedge clk);
      check(!done && !busy, "idle after done");
      foreach (cnt_t[i, j]) begin
        check(cnt_t[i][j] == 1, $sformatf("T product %0d,%0d issued %0d times", i, j, cnt_t[i][j]));
        check(cnt_q[i][j] == ((i + j < int'(K)) ? 1 : 0),
              $sformatf("Q product %0d,%0d issued %0d times", i, j, cnt_q[i][j]));
        check(cnt_u[i][j] == 1, $sformatf("U product %0d,%0d issued %0d times", i, j, cnt_u[i][j]));
      end
      check(first_q > last_t0, "Q product issued before T0 was complete");
      check(first_u > last_q, "U product issued before Q was complete");
    end
    finished = 1'b1;
  end

endmodule
