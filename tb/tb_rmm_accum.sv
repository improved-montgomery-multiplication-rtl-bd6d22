// tb_rmm_accum: checks the digit-offset accumulator (d = 64, 8 digits,
// 4 inputs) against a reference sum kept in the bench: random products at
// random offsets and enables, clear, and wrap-around modulo 2^(8d).
module tb_rmm_accum;

  localparam int unsigned D = 64, NDIG = 8, NIN = 4, OW = 9, W = NDIG * D;

  logic                     clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [NIN-1:0]           en;
  logic [NIN-1:0][OW-1:0]   offset;
  logic [NIN-1:0][2*D-1:0]  prod;
  logic [W-1:0]             acc;
  logic [W+2*D+8:0]         model;   // wide enough to see the wrap
  int                       checks = 0, failures = 0;

  always #5 clk = ~clk;

  rmm_accum #(.D(D), .NDIG(NDIG), .NIN(NIN), .OW(OW)) dut (
    .clk, .rst_n, .clr, .en, .offset, .prod, .acc
  );

  initial begin
    en = '0; offset = '0; prod = '0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      clr = ($urandom % 40) == 0;
      for (int l = 0; l < int'(NIN); l++) begin
        en[l]     = $urandom % 4 != 0;
        offset[l] = OW'($urandom % (NDIG - 1));
        prod[l]   = {$urandom, $urandom, $urandom, $urandom};
      end
      if (clr) model = '0;
      else
        for (int l = 0; l < int'(NIN); l++)
          if (en[l]) model = model + ((W+2*D+9)'(prod[l]) << (64 * int'(offset[l])));
      @(negedge clk);
      checks++;
      if (acc != model[W-1:0]) begin
        failures++;
        $display("FAIL: step %0d accumulator mismatch", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
