// tb_rmm_lane: checks operand selection, product and digit offset of one
// multiplier lane (k = 4, d = 64) for every family and digit pair.
module tb_rmm_lane;
  import rmm_pkg::*;

  localparam int unsigned K = 4, D = 64;

  slot_t                slot;
  logic [K-1:0][D-1:0]  a, b, t_lo, m_prime, q, modulus;
  phase_e               ph;
  logic [IDX_W:0]       offset;
  logic [2*D-1:0]       prod;
  int                   checks = 0, failures = 0;

  rmm_lane #(.K(K), .D(D)) dut (.slot, .a, .b, .t_lo, .m_prime, .q, .modulus,
                                .ph, .offset, .prod);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [D-1:0] ex, ey;
    for (int r = 0; r < 20; r++) begin
      for (int d = 0; d < int'(K); d++) begin
        a[d] = {$urandom, $urandom}; b[d] = {$urandom, $urandom};
        t_lo[d] = {$urandom, $urandom}; m_prime[d] = {$urandom, $urandom};
        q[d] = {$urandom, $urandom}; modulus[d] = {$urandom, $urandom};
      end
      for (int f = 0; f < 4; f++)
        for (int i = 0; i < int'(K); i++)
          for (int j = 0; j < int'(K); j++) begin
            slot.ph = phase_e'(f);
            slot.i  = IDX_W'(i);
            slot.j  = IDX_W'(j);
            #1;
            case (f)
              1: begin ex = a[i];    ey = b[j];       end
              2: begin ex = t_lo[i]; ey = m_prime[j]; end
              3: begin ex = q[i];    ey = modulus[j]; end
              default: begin ex = '0; ey = '0; end
            endcase
            check(prod == (2*D)'(ex) * (2*D)'(ey),
                  $sformatf("family %0d (%0d,%0d): wrong product", f, i, j));
            check(ph == phase_e'(f), "family not passed on");
            if (f != 0) check(int'(offset) == i + j, "wrong digit offset");
          end
    end
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
