// tb_fault_sweep: workload sweep of the two-layer platform at its default parameters, the
// fault scenarios the architecture is evaluated with.
//   Sweep A: CPL faults 0/15/30/40 % (0, 10, 19, 26 of 64 PEs), four random fault maps each,
//            each map run with the CTL out of operation and then in operation.
//   Sweep B: CTL in operation, CPL faults 10/20/35 % (6, 13, 22 PEs) against CTL faults
//            0/10/20/30 % (0, 6, 13, 19 controllers), two maps each.
// Every run must converge within the cycle limit with a good attitude read-out. Mean cycles to
// convergence are printed per point. The sweep also checks the main claim of the
// architecture: at 30 % and 40 % CPL faults the CTL shortens the mean time to convergence.
module tb_fault_sweep;
  import ehw_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int LIMIT = 400000;   // cycles per run

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, mode = 1'b0;
  logic signed [15:0] mx, my, mz;
  logic [NPE-1:0] cpl_fault, ctl_fault, pe_en, cpl_conv, ctl_conv;
  fit_t cpl_fit [NPE];
  logic [ITER_W-1:0] cpl_iter [NPE], ctl_iter [NPE];
  ctl_fit_t ctl_fit [NPE];
  logic [5:0] winner;
  ctl_fit_t winner_fit;
  logic sys_conv, att_valid;
  gps_chrom_t att;
  logic [31:0] cycles;
  int checks = 0, failures = 0;

  ehw_top dut (
    .clk, .rst_n, .start_i(start), .meas_x_i(mx), .meas_y_i(my), .meas_z_i(mz),
    .ctl_mode_i(mode), .cpl_fault_i(cpl_fault), .ctl_fault_i(ctl_fault),
    .pe_enable_o(pe_en), .cpl_fit_o(cpl_fit), .cpl_converged_o(cpl_conv),
    .cpl_iter_o(cpl_iter), .ctl_fit_o(ctl_fit), .ctl_converged_o(ctl_conv),
    .ctl_iter_o(ctl_iter), .ctl_winner_o(winner), .ctl_winner_fit_o(winner_fit),
    .system_converged_o(sys_conv), .attitude_o(att), .attitude_valid_o(att_valid),
    .cycles_o(cycles));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60 * LIMIT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int g2b(input int g);
    int b = g;
    for (int s = g >> 1; s != 0; s = s >> 1) b ^= s;
    return b;
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int score(input gps_chrom_t c);
    real ph, be, b, x, y, z, err;
    int e, lead, g;
    ph = 2.0 * PI * real'(g2b(int'(c.phi))) / 16384.0;
    be = PI * (real'(g2b(int'(c.beta))) - 512.0) / 1024.0;
    b  = real'(g2b(int'(c.b))) * 64.0;
    x = b * $cos(be) * $cos(ph);
    y = b * $cos(be) * $sin(ph);
    z = b * $sin(be);
    err = fabs(x - real'(mx)) + fabs(y - real'(my)) + fabs(z - real'(mz));
    e = int'($floor(err)) >>> 7;
    if (e == 0) return 31;
    lead = $clog2(e + 1) - 1;
    g = 1 + 2 * lead + ((lead > 0) ? ((e >> (lead - 1)) & 1) : 0);
    return (g >= 30) ? 1 : 31 - g;
  endfunction

  // Number of interior cross centres whose five PEs are all healthy.
  function automatic int valid_crosses(input logic [63:0] f);
    int n = 0;
    for (int y = 1; y < 7; y++)
      for (int x = 1; x < 7; x++)
        if (!f[y * 8 + x] && !f[y * 8 + x - 1] && !f[y * 8 + x + 1] && !f[y * 8 + x - 8] &&
            !f[y * 8 + x + 8]) n++;
    return n;
  endfunction

  function automatic int isolated(input logic [63:0] f);
    int n = 0, i;
    bit iso;
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        i = y * 8 + x;
        iso = !f[i];
        if (y > 0 && !f[i - 8]) iso = 0;
        if (y < 7 && !f[i + 8]) iso = 0;
        if (x > 0 && !f[i - 1]) iso = 0;
        if (x < 7 && !f[i + 1]) iso = 0;
        if (iso) n++;
      end
    return n;
  endfunction

  // Random fault map with exactly n faults that leaves at least one valid cross.
  function automatic logic [63:0] fault_map(input int n);
    logic [63:0] f;
    int k;
    do begin
      f = '0;
      k = 0;
      while (k < n) begin
        int p;
        p = int'($urandom_range(0, 63));
        if (!f[p]) begin
          f[p] = 1'b1;
          k++;
        end
      end
    end while (valid_crosses(f) == 0);
    return f;
  endfunction

  // One run; returns the cycles to convergence (LIMIT when it did not converge).
  task automatic run(input bit ctl_on, input logic [63:0] cf, input logic [63:0] tf,
                     output int cyc);
    @(negedge clk);
    mode = ctl_on;
    cpl_fault = cf;
    ctl_fault = tf;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!sys_conv && cyc < LIMIT) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    checks += 2;
    if (!sys_conv) begin
      failures++;
      $display("FAIL no convergence (CTL %0d, %0d CPL faults, %0d CTL faults)", ctl_on,
               $countones(cf), $countones(tf));
    end
    if (!att_valid || score(att) < 30) begin
      failures++;
      $display("FAIL attitude %h scores %0d", att, score(att));
    end
  endtask

  int npe_f [4] = '{0, 10, 19, 26};
  int pct_a [4] = '{0, 15, 30, 40};
  int npe_b [3] = '{6, 13, 22};
  int pct_b [3] = '{10, 20, 35};
  int nctl_b [4] = '{0, 6, 13, 19};
  int pct_c [4] = '{0, 10, 20, 30};
  int c, sum_off, sum_on, sum;
  logic [63:0] f, tf;

  initial begin
    mx = -16'sd3144;
    my = 16'sd8702;
    mz = 16'sd2560;
    cpl_fault = '0;
    ctl_fault = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    $display("Sweep A: mean cycles to convergence over 4 fault maps");
    for (int p = 0; p < 4; p++) begin
      sum_off = 0;
      sum_on = 0;
      for (int m = 0; m < 4; m++) begin
        f = fault_map(npe_f[p]);
        run(1'b0, f, '0, c);
        sum_off += c;
        run(1'b1, f, '0, c);
        sum_on += c;
      end
      $display("  CPL faults %2d%%: CTL off %7d   CTL on %7d", pct_a[p], sum_off / 4, sum_on / 4);
      if (pct_a[p] >= 30) begin
        checks++;
        if (sum_on >= sum_off) begin
          failures++;
          $display("FAIL the CTL does not shorten convergence at %0d%% faults", pct_a[p]);
        end
      end
    end
    $display("Sweep B: CTL on, mean cycles over 2 fault maps");
    for (int p = 0; p < 3; p++) begin
      for (int q = 0; q < 4; q++) begin
        sum = 0;
        for (int m = 0; m < 2; m++) begin
          f = fault_map(npe_b[p]);
          tf = (nctl_b[q] == 0) ? 64'd0 : fault_map(nctl_b[q]);
          run(1'b1, f, tf, c);
          sum += c;
        end
        $display("  CPL faults %2d%%, CTL faults %2d%%: %7d", pct_b[p], pct_c[q], sum / 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
