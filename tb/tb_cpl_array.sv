// tb_cpl_array: self-checking test of the 8x8 computational layer.
// 1. Wiring: with only one PE enabled (corner, edge and interior PEs in turn) its new
//    chromosome after one generation must be its old one, or a one-point crossover of its old
//    one with the fittest N/E/S/W neighbour chosen by the model here, with at most one bit
//    mutated. Border neighbours count as fitness 0.
// 2. Search: with every PE enabled and 10 of 64 PEs faulty (about 15%), every healthy PE must
//    converge (fitness 31) and faulty PEs must read 0. The mean generation count is printed.
module tb_cpl_array;
  import ehw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [15:0] mx, my, mz;
  logic [NPE-1:0] en, fault, conv;
  gps_chrom_t chrom [NPE];
  fit_t fit [NPE];
  logic [ITER_W-1:0] iter [NPE];
  int checks = 0, failures = 0;

  cpl_array dut (.clk, .rst_n, .start_i(start), .meas_x_i(mx), .meas_y_i(my), .meas_z_i(mz),
                 .enable_i(en), .fault_i(fault), .chrom_o(chrom), .fit_o(fit),
                 .converged_o(conv), .iter_o(iter));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int popc(input logic [31:0] v);
    int n = 0;
    for (int i = 0; i < 32; i++) n += int'(v[i]);
    return n;
  endfunction

  // Is c reachable from x1 and xm by one generation?
  function automatic bit reachable(input logic [31:0] c, input logic [31:0] x1,
                                   input logic [31:0] xm);
    logic [31:0] lo;
    if (c == x1) return 1'b1;
    for (int cut = 1; cut < 32; cut++) begin
      lo = (32'd1 << cut) - 32'd1;
      if (popc(c ^ ((x1 & lo) | (xm & ~lo))) <= 1) return 1'b1;
      if (popc(c ^ ((xm & lo) | (x1 & ~lo))) <= 1) return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic wiring(input int r, input int c);
    int i, best, bf, it0;
    int nb [4];
    logic [31:0] x1, xm;
    i = r * 8 + c;
    nb[0] = (r > 0) ? i - 8 : -1;
    nb[1] = (c < 7) ? i + 1 : -1;
    nb[2] = (r < 7) ? i + 8 : -1;
    nb[3] = (c > 0) ? i - 1 : -1;
    best = -1;
    bf = 0;
    for (int d = 0; d < 4; d++)
      if (nb[d] >= 0 && int'(fit[nb[d]]) > bf) begin
        best = nb[d];
        bf = int'(fit[nb[d]]);
      end
    x1 = chrom[i];
    xm = (best < 0) ? x1 : chrom[best];
    it0 = int'(iter[i]);
    @(negedge clk);
    en[i] = 1'b1;
    while (int'(iter[i]) == it0) @(negedge clk);
    en[i] = 1'b0;
    checks++;
    if (!reachable(chrom[i], x1, xm)) begin
      failures++;
      $display("FAIL PE (%0d,%0d) result %h not from %h x %h", r, c, chrom[i], x1, xm);
    end
    // Let the evaluation of a possibly started generation finish before the next PE.
    repeat (100) @(negedge clk);
  endtask

  logic [63:0] fmask;
  int cyc, sum, n;

  initial begin
    // Target baseline b = 150, beta = 600, phi = 5000 (Q9.6).
    mx = -16'sd3144;
    my = 16'sd8702;
    mz = 16'sd2560;
    en = '0;
    fault = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (60) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      wiring(0, 0);
      wiring(0, 4);
      wiring(3, 7);
      wiring(7, 7);
      wiring(7, 2);
      wiring(4, 0);
      wiring(4, 5);
      wiring(2, 3);
    end
    // Search with 10 faulty PEs.
    fmask = 64'h0204_8000_1100_2483;
    fault = fmask;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    en = '1;
    cyc = 0;
    while (((conv | fmask) != '1) && cyc < 200000) begin
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if ((conv | fmask) != '1) begin
      failures++;
      $display("FAIL %0d healthy PEs did not converge", 64 - $countones(conv | fmask));
    end
    if ((conv & fmask) != '0) begin
      failures++;
      $display("FAIL a faulty PE reports convergence");
    end
    for (int i = 0; i < NPE; i++) if (fmask[i]) begin
      checks++;
      if (fit[i] != '0 || chrom[i] != '0) begin
        failures++;
        $display("FAIL faulty PE %0d does not read 0", i);
      end
    end
    sum = 0;
    n = 0;
    for (int i = 0; i < NPE; i++) if (!fmask[i]) begin
      sum += int'(iter[i]);
      n++;
    end
    $display("all healthy PEs converged after %0d cycles, mean %0d.%02d generations", cyc,
             sum / n, (100 * sum / n) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
