// tb_ctl_array: self-checking test of the 8x8 control layer with the CPL fitness values driven
// from here (10 of 64 CPL PEs faulty, the rest at fitness 31) and two faulty controllers.
// Checks: run_i low holds the layer; all controllers step in lock-step, and each new chromosome
// is its old one or a one-point crossover of it with its fittest N/E/S/W neighbour (border
// neighbours count as 0) with at most one bit mutated; every healthy controller's fitness
// matches a reference score of its chromosome; every healthy controller reaches 38.75 and
// enables no faulty PE; the faulty controllers read 0.
module tb_ctl_array;
  import ehw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [NPE-1:0] cfault, conv;
  fit_t cf [NPE];
  ctl_chrom_t chrom [NPE];
  ctl_fit_t fit [NPE];
  logic [NPE-1:0] en [NPE];
  logic [ITER_W-1:0] iter [NPE];
  int checks = 0, failures = 0;

  ctl_array dut (.clk, .rst_n, .run_i(run), .fault_i(cfault), .cpl_fit_i(cf), .chrom_o(chrom),
                 .fit_o(fit), .pe_enable_o(en), .converged_o(conv), .iter_o(iter));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int score_ref(input ctl_chrom_t c);
    int s = 0, x, y, cs, xx, yy;
    int px [5] = '{0, 0, 0, -1, 1};
    int py [5] = '{0, -1, 1, 0, 0};
    for (int i = 0; i < 8; i++) begin
      x = int'(c[8 * i + 4 +: 4]);
      y = int'(c[8 * i +: 4]);
      cs = 0;
      for (int k = 0; k < 5; k++) begin
        xx = x + px[k];
        yy = y + py[k];
        if (cs >= 0) begin
          if (xx < 0 || xx > 7 || yy < 0 || yy > 7) cs = -1;
          else if (cf[yy * 8 + xx] == 0) cs = -1;
          else cs += int'(cf[yy * 8 + xx]);
        end
      end
      if (cs > 0) s += cs;
    end
    return s;
  endfunction

  function automatic int popc(input logic [63:0] v);
    int n = 0;
    for (int i = 0; i < 64; i++) n += int'(v[i]);
    return n;
  endfunction

  function automatic bit reachable(input logic [63:0] c, input logic [63:0] x1,
                                   input logic [63:0] xm);
    logic [63:0] lo;
    if (c == x1) return 1'b1;
    for (int cut = 1; cut < 64; cut++) begin
      lo = (64'd1 << cut) - 64'd1;
      if (popc(c ^ ((x1 & lo) | (xm & ~lo))) <= 1) return 1'b1;
      if (popc(c ^ ((xm & lo) | (x1 & ~lo))) <= 1) return 1'b1;
    end
    return 1'b0;
  endfunction

  logic [63:0] fmask;
  ctl_chrom_t oc [NPE];
  ctl_fit_t of [NPE];
  int it0, cyc, best, bf, nb, sum;

  initial begin
    fmask = 64'h0204_8000_1100_2483;
    cfault = '0;
    cfault[9] = 1'b1;
    cfault[36] = 1'b1;
    for (int i = 0; i < NPE; i++) cf[i] = fmask[i] ? '0 : 5'd31;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (40) @(negedge clk);
    checks++;
    if (iter[0] != '0 || fit[0] != '0) begin
      failures++;
      $display("FAIL layer ran with run_i low");
    end
    run = 1'b1;
    // Lock-step generations and neighbour wiring.
    for (int g = 0; g < 30; g++) begin
      it0 = int'(iter[0]);
      while (int'(iter[0]) == it0) @(negedge clk);
      for (int i = 0; i < NPE; i++) begin
        checks++;
        if (iter[i] != iter[0]) begin
          failures++;
          $display("FAIL controller %0d out of step", i);
        end
        if (!cfault[i]) begin
          checks++;
          if (int'(fit[i]) != score_ref(chrom[i])) begin
            failures++;
            $display("FAIL controller %0d fitness %0d model %0d", i, fit[i], score_ref(chrom[i]));
          end
          if (g > 0) begin
            best = -1;
            bf = 0;
            for (int d = 0; d < 4; d++) begin
              nb = (d == 0) ? ((i >= 8) ? i - 8 : -1) : (d == 1) ? ((i % 8 != 7) ? i + 1 : -1)
                 : (d == 2) ? ((i < 56) ? i + 8 : -1) : ((i % 8 != 0) ? i - 1 : -1);
              if (nb >= 0 && int'(of[nb]) > bf) begin
                best = nb;
                bf = int'(of[nb]);
              end
            end
            checks++;
            if (!reachable(chrom[i], oc[i], (best < 0) ? oc[i] : oc[best])) begin
              failures++;
              $display("FAIL controller %0d new chromosome not reachable", i);
            end
          end
        end
      end
      oc = chrom;
      of = fit;
    end
    // Convergence of the healthy controllers.
    cyc = 0;
    while (((conv | cfault) != '1) && cyc < 1500000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if ((conv | cfault) != '1) begin
      failures++;
      $display("FAIL %0d controllers did not converge", 64 - $countones(conv | cfault));
    end
    sum = 0;
    for (int i = 0; i < NPE; i++) begin
      checks++;
      if (cfault[i] ? (fit[i] != '0 || en[i] != '0) : ((en[i] & fmask) != '0)) begin
        failures++;
        $display("FAIL controller %0d enables a faulty PE or a faulty controller is not 0", i);
      end
    end
    $display("all healthy controllers converged after %0d generations", iter[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
