// tb_rmm_digit_mul: checks the d x d digit multiplier (d = 64) against a
// shift-and-add reference, on corner values and random operands.
module tb_rmm_digit_mul;

  localparam int unsigned D = 64;

  logic [D-1:0]   x, y;
  logic [2*D-1:0] p;
  int             checks = 0, failures = 0;

  rmm_digit_mul #(.D(D)) dut (.x, .y, .p);

  function automatic logic [2*D-1:0] ref_mul(input logic [D-1:0] u, input logic [D-1:0] v);
    logic [2*D-1:0] acc = '0;
    for (int b = 0; b < int'(D); b++)
      if (v[b]) acc = acc + ((2*D)'(u) << b);
    return acc;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      case (t)
        0: begin x = '0; y = '1; end
        1: begin x = '1; y = '1; end
        2: begin x = '1; y = 64'd1; end
        default: begin x = {$urandom, $urandom}; y = {$urandom, $urandom}; end
      endcase
      #1;
      checks++;
      if (p != ref_mul(x, y)) begin
        failures++;
        $display("FAIL: %h * %h gave %h", x, y, p);
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
