// tb_enable_select: self-checking test of the PE_Enable selector. Random controller fitness
// values and enable vectors are applied; the expected output (the enable vector of the fittest
// controller, lowest index on ties, or all ones when the control layer is off or every
// controller reports 0) is computed here and compared one cycle later.
module tb_enable_select;
  import ehw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, mode = 1'b0;
  ctl_fit_t cfit [NPE];
  logic [NPE-1:0] cen [NPE];
  logic [NPE-1:0] cconv, pe_en;
  logic [5:0] win;
  ctl_fit_t wfit;
  logic wconv;
  int checks = 0, failures = 0;

  enable_select dut (.clk, .rst_n, .ctl_mode_i(mode), .ctl_fit_i(cfit), .ctl_en_i(cen),
                     .ctl_conv_i(cconv), .pe_enable_o(pe_en), .winner_o(win),
                     .winner_fit_o(wfit), .winner_conv_o(wconv));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int best, bf;
  logic [NPE-1:0] exp_en;
  logic exp_conv;

  initial begin
    for (int i = 0; i < NPE; i++) begin
      cfit[i] = '0;
      cen[i] = '0;
    end
    cconv = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (pe_en != '1) begin
      failures++;
      $display("FAIL reset value");
    end
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      mode = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < NPE; i++) begin
        // Small values make ties common; every tenth pattern is all zero.
        cfit[i] = (t % 10 == 9) ? '0 : ctl_fit_t'($urandom_range(0, 40) * 31);
        cen[i] = {$urandom, $urandom};
      end
      cconv = {$urandom, $urandom};
      best = 0;
      bf = int'(cfit[0]);
      for (int i = 1; i < NPE; i++) if (int'(cfit[i]) > bf) begin
        best = i;
        bf = int'(cfit[i]);
      end
      exp_en = (!mode || bf == 0) ? '1 : cen[best];
      exp_conv = mode && cconv[best];
      @(negedge clk);
      checks += 3;
      if (pe_en != exp_en) begin
        failures++;
        $display("FAIL enable t=%0d", t);
      end
      if (int'(win) != best || int'(wfit) != bf) begin
        failures++;
        $display("FAIL winner %0d/%0d expected %0d/%0d", win, wfit, best, bf);
      end
      if (wconv != exp_conv) begin
        failures++;
        $display("FAIL winner convergence");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
