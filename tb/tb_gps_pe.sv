// tb_gps_pe: self-checking test of one CPL processing element with its four neighbours driven
// from here. Checks: fitness reads 0 until the first evaluation and then matches the score of
// the shown chromosome (real-number model, within one grade); fitness never falls (elitism);
// one generation takes 81 cycles; an isolated PE (all neighbours at fitness 0) moves by at most
// one bit per generation; with PE_Enable low the PE stands by; a neighbour holding the exact
// solution at fitness 31 leads the PE to converge; the fault input forces the outputs to 0.
module tb_gps_pe;
  import ehw_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, en = 1'b0, fault = 1'b0;
  logic signed [15:0] mx, my, mz;
  gps_chrom_t nc [4];
  fit_t nf [4];
  gps_chrom_t chrom;
  fit_t fit;
  logic conv;
  logic [ITER_W-1:0] iter;
  int checks = 0, failures = 0;

  gps_pe #(.SEED(32'hC0FF_EE01)) dut (
    .clk, .rst_n, .start_i(start), .meas_x_i(mx), .meas_y_i(my), .meas_z_i(mz),
    .enable_i(en), .fault_i(fault), .nbr_chrom_i(nc), .nbr_fit_i(nf),
    .chrom_o(chrom), .fit_o(fit), .converged_o(conv), .iter_o(iter));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gray code to binary: XOR of all right shifts.
  function automatic int g2b(input int g);
    int b = g;
    for (int s = g >> 1; s != 0; s = s >> 1) b ^= s;
    return b;
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int grade_of(input real err);
    int e, lead, g;
    e = int'($floor(err)) >>> 7;
    if (e == 0) return 31;
    lead = $clog2(e + 1) - 1;
    g = 1 + 2 * lead + ((lead > 0) ? ((e >> (lead - 1)) & 1) : 0);
    return (g >= 30) ? 1 : 31 - g;
  endfunction

  function automatic int score(input gps_chrom_t c);
    real ph, be, b, x, y, z;
    ph = 2.0 * PI * real'(g2b(int'(c.phi))) / 16384.0;
    be = PI * (real'(g2b(int'(c.beta))) - 512.0) / 1024.0;
    b  = real'(g2b(int'(c.b))) * 64.0;
    x = b * $cos(be) * $cos(ph);
    y = b * $cos(be) * $sin(ph);
    z = b * $sin(be);
    return grade_of(fabs(x - real'(mx)) + fabs(y - real'(my)) + fabs(z - real'(mz)));
  endfunction

  function automatic int popc(input logic [31:0] v);
    int n = 0;
    for (int i = 0; i < 32; i++) n += int'(v[i]);
    return n;
  endfunction

  gps_chrom_t target, prev_chrom;
  fit_t prev_fit;
  int t0, t1, d;

  initial begin
    // Target baseline: b = 150, beta = 600, phi = 5000, each field in Gray code.
    target = '{b: 8'(150 ^ (150 >> 1)), beta: 10'(600 ^ (600 >> 1)), phi: 14'(5000 ^ (5000 >> 1))};
    // Q9.6 vector of the target: 150*64*cos(15.47 deg)*(cos, sin)(109.86 deg), sin(15.47 deg).
    mx = -16'sd3144;
    my = 16'sd8702;
    mz = 16'sd2560;
    for (int i = 0; i < 4; i++) begin
      nc[i] = gps_chrom_t'($urandom);
      nf[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // The measured vector must score the target chromosome at 31.
    checks++;
    if (score(target) != 31) begin
      failures++;
      $display("FAIL target scores %0d", score(target));
    end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (fit != '0) begin
      failures++;
      $display("FAIL fitness before first evaluation");
    end
    repeat (45) @(negedge clk);
    checks++;
    d = score(chrom) - int'(fit);
    if (d > 1 || d < -1 || fit == '0) begin
      failures++;
      $display("FAIL first fitness %0d model %0d", fit, score(chrom));
    end
    // Stand-by: PE_Enable low, nothing moves.
    repeat (300) @(negedge clk);
    checks++;
    if (iter != '0) begin
      failures++;
      $display("FAIL PE ran while disabled");
    end
    // Isolated PE: neighbours at fitness 0, at most one bit changes per generation.
    en = 1'b1;
    t0 = 0;
    for (int g = 0; g < 20; g++) begin
      prev_chrom = chrom;
      prev_fit = fit;
      d = int'(iter);
      while (int'(iter) == d) @(negedge clk);
      t1 = int'($time / 10);
      checks += 2;
      if (popc(chrom ^ prev_chrom) > 1) begin
        failures++;
        $display("FAIL isolated PE changed %0d bits", popc(chrom ^ prev_chrom));
      end
      if (fit < prev_fit) begin
        failures++;
        $display("FAIL fitness fell %0d -> %0d", prev_fit, fit);
      end
      if (g > 0) begin
        checks++;
        if (t1 - t0 != 81) begin
          failures++;
          $display("FAIL generation took %0d cycles", t1 - t0);
        end
      end
      t0 = t1;
      if (fit == 5'd31) break;
    end
    // Neighbour with the exact solution: the PE must converge.
    nc[DIR_E] = target;
    nf[DIR_E] = 5'd31;
    t0 = 0;
    while (!conv && t0 < 100000) begin
      @(negedge clk);
      t0++;
    end
    checks += 2;
    if (!conv) begin
      failures++;
      $display("FAIL no convergence");
    end
    if (score(chrom) < 30) begin
      failures++;
      $display("FAIL converged chromosome scores %0d", score(chrom));
    end
    $display("converged after %0d generations", iter);
    // Converged PE holds.
    t1 = int'(iter);
    repeat (200) @(negedge clk);
    checks++;
    if (int'(iter) != t1 || !conv) begin
      failures++;
      $display("FAIL converged PE did not hold");
    end
    // Stuck-at-zero fault on the output registers.
    fault = 1'b1;
    @(negedge clk);
    checks++;
    if (chrom != '0 || fit != '0 || conv) begin
      failures++;
      $display("FAIL fault not applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
