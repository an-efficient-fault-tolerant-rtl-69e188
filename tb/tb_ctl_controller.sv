// tb_ctl_controller: self-checking test of one control-layer controller, with the 64 CPL
// fitness values and the four neighbours driven from here. A reference model written here
// scores a chromosome (eight crosses, each the sum of five CPL fitness values, zero when the
// cross leaves the array or touches a PE at fitness 0) and builds its PE_Enable mask.
// Checks: fit_o and pe_enable_o match the model for the shown chromosome after every
// generation; the fitness never falls while the CPL is static; a generation takes 28 cycles;
// with run_i low nothing moves; with 25% of the CPL faulty and the rest at 31 the controller
// reaches the 38.75 threshold and never enables a faulty PE; the fault input zeroes outputs.
module tb_ctl_controller;
  import ehw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, fault = 1'b0;
  fit_t cf [NPE];
  ctl_chrom_t nc [4];
  ctl_fit_t nf [4];
  ctl_chrom_t chrom;
  ctl_fit_t fit;
  logic [NPE-1:0] en;
  logic conv;
  logic [ITER_W-1:0] iter;
  int checks = 0, failures = 0;

  ctl_controller #(.SEED(32'h1357_9BDF)) dut (
    .clk, .rst_n, .run_i(run), .fault_i(fault), .cpl_fit_i(cf), .nbr_chrom_i(nc),
    .nbr_fit_i(nf), .chrom_o(chrom), .fit_o(fit), .pe_enable_o(en), .converged_o(conv),
    .iter_o(iter));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model.
  function automatic int cross_ref(input int x, input int y, output logic [63:0] m);
    int s = 0;
    int px [5] = '{0, 0, 0, -1, 1};
    int py [5] = '{0, -1, 1, 0, 0};
    m = '0;
    for (int k = 0; k < 5; k++) begin
      int xx, yy;
      xx = x + px[k];
      yy = y + py[k];
      if (xx < 0 || xx > 7 || yy < 0 || yy > 7) begin
        m = '0;
        return 0;
      end
      if (cf[yy * 8 + xx] == 0) begin
        m = '0;
        return 0;
      end
      s += int'(cf[yy * 8 + xx]);
      m[yy * 8 + xx] = 1'b1;
    end
    return s;
  endfunction

  function automatic int score_ref(input ctl_chrom_t c, output logic [63:0] mask);
    int s = 0;
    logic [63:0] m;
    mask = '0;
    for (int i = 0; i < 8; i++) begin
      s += cross_ref(int'(c[8 * i + 4 +: 4]), int'(c[8 * i +: 4]), m);
      mask |= m;
    end
    return s;
  endfunction

  logic [63:0] mref;
  int sref, last_t, gens, prev_fit;
  logic [63:0] faulty;

  task automatic check_state();
    sref = score_ref(chrom, mref);
    checks += 2;
    if (int'(fit) != sref) begin
      failures++;
      $display("FAIL fitness %0d model %0d chrom %h", fit, sref, chrom);
    end
    if (en != mref) begin
      failures++;
      $display("FAIL enable %h model %h", en, mref);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      nc[i] = '0;
      nf[i] = '0;
    end
    // CPL: random healthy fitness 1..31 with 16 of the 64 PEs (25%) faulty, a fixed fault map
    // that leaves 14 valid cross centres.
    faulty = 64'hc700_016c_4081_0111;
    for (int i = 0; i < NPE; i++) cf[i] = faulty[i] ? '0 : fit_t'($urandom_range(1, 31));
    sref = 0;
    for (int y = 1; y < 7; y++)
      for (int x = 1; x < 7; x++)
        if (cross_ref(x, y, mref) != 0) sref++;
    checks++;
    if (sref != 14) begin
      failures++;
      $display("FAIL reference model finds %0d valid centres", sref);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (50) @(negedge clk);
    checks++;
    if (fit != '0 || iter != '0) begin
      failures++;
      $display("FAIL controller ran with run_i low");
    end
    run = 1'b1;
    prev_fit = 0;
    last_t = -1;
    for (gens = 0; gens < 40; gens++) begin
      int it0;
      it0 = int'(iter);
      while (int'(iter) == it0) @(negedge clk);
      check_state();
      checks++;
      if (int'(fit) < prev_fit) begin
        failures++;
        $display("FAIL fitness fell");
      end
      prev_fit = int'(fit);
      if (last_t >= 0) begin
        checks++;
        if (int'($time / 10) - last_t != 28) begin
          failures++;
          $display("FAIL generation took %0d cycles", int'($time / 10) - last_t);
        end
      end
      last_t = int'($time / 10);
    end
    // Stop and hold.
    run = 1'b0;
    gens = int'(iter);
    repeat (100) @(negedge clk);
    checks++;
    if (int'(iter) != gens) begin
      failures++;
      $display("FAIL run_i low did not stop the controller");
    end
    // All live PEs converged: the controller must reach the threshold.
    for (int i = 0; i < NPE; i++) cf[i] = faulty[i] ? '0 : 5'd31;
    run = 1'b1;
    gens = 0;
    while (!conv && gens < 200000) begin
      @(negedge clk);
      gens++;
    end
    checks += 2;
    if (!conv || fit != 11'd1240) begin
      failures++;
      $display("FAIL no convergence, fitness %0d", fit);
    end
    if ((en & faulty) != '0) begin
      failures++;
      $display("FAIL faulty PE enabled");
    end
    check_state();
    $display("converged after %0d generations", iter);
    fault = 1'b1;
    @(negedge clk);
    checks++;
    if (chrom != '0 || fit != '0 || en != '0 || conv) begin
      failures++;
      $display("FAIL fault not applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
