// tb_ehw_top: end-to-end test of the two-layer platform at its default parameters. For each
// scenario it loads a fault map into the CPL (and the CTL), starts a GPS solution for a fixed
// baseline (b = 150, beta = 600, phi = 5000), waits for system convergence and checks:
//   - the system converges within the cycle limit;
//   - the attitude read out scores within one grade of the best (model here);
//   - no faulty PE is enabled once the CTL has converged, and faulty PEs read fitness 0;
//   - with the CTL off every PE is enabled.
// Scenarios: CPL faults 0/15/30/40 % with the CTL off and on (the comparison the architecture
// is evaluated with), a PE cut off by four faulty neighbours, and CPL+CTL faults together.
// It counts each mechanism (mode switch, stand-by of healthy PEs, isolated PE, CPL and CTL
// faults, CTL convergence) and fails if one never happens. Mean generation counts per
// scenario are printed.
module tb_ehw_top;
  import ehw_pkg::*;
  localparam real PI = 3.14159265358979323846;

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

  localparam int LIMIT = 400000;   // cycles per scenario

  initial begin : watchdog
    repeat (30 * LIMIT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_mode_switch = 0, n_standby = 0, n_isolated = 0, n_cpl_fault = 0, n_ctl_fault = 0,
      n_ctl_conv = 0;

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

  task automatic scenario(input string name, input bit ctl_on, input logic [63:0] cf,
                          input logic [63:0] tf);
    int cyc, sum, n;
    bit standby_seen;
    @(negedge clk);
    if (mode != ctl_on) n_mode_switch++;
    mode = ctl_on;
    cpl_fault = cf;
    ctl_fault = tf;
    if (cf != '0) n_cpl_fault++;
    if (tf != '0 && ctl_on) n_ctl_fault++;
    n_isolated += isolated(cf);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    standby_seen = 0;
    while (!sys_conv && cyc < LIMIT) begin
      @(negedge clk);
      cyc++;
      if (ctl_on && ((~pe_en & ~cf) != '0)) standby_seen = 1;
      if (!ctl_on && cyc > 2) begin
        checks++;
        if (pe_en != '1) begin
          failures++;
          $display("FAIL %s: a PE is disabled with the CTL off", name);
          break;
        end
      end
    end
    if (standby_seen) n_standby++;
    checks += 3;
    if (!sys_conv) begin
      failures++;
      $display("FAIL %s: no convergence in %0d cycles", name, LIMIT);
    end
    @(negedge clk);
    if (!att_valid || score(att) < 30) begin
      failures++;
      $display("FAIL %s: attitude %h (valid %0d) scores %0d", name, att, att_valid, score(att));
    end
    if (ctl_on && ((pe_en & cf) != '0)) begin
      failures++;
      $display("FAIL %s: faulty PE enabled after CTL convergence", name);
    end
    if (ctl_on && sys_conv) n_ctl_conv++;
    for (int i = 0; i < NPE; i++) if (cf[i]) begin
      checks++;
      if (cpl_fit[i] != '0) begin
        failures++;
        $display("FAIL %s: faulty PE %0d reads %0d", name, i, cpl_fit[i]);
      end
    end
    sum = 0;
    n = 0;
    for (int i = 0; i < NPE; i++) if (!cf[i] && pe_en[i]) begin
      sum += int'(cpl_iter[i]);
      n++;
    end
    $display("%-28s CTL %s: converged after %6d cycles, mean %0d.%02d generations over %0d PEs, b=%0d beta=%0d phi=%0d",
             name, ctl_on ? "on " : "off", cyc, sum / n, (100 * sum / n) % 100, n,
             g2b(int'(att.b)), g2b(int'(att.beta)), g2b(int'(att.phi)));
  endtask

  logic [63:0] f15, f30, f40, fiso, fctl;

  initial begin
    // Target baseline b = 150, beta = 600, phi = 5000 in Q9.6.
    mx = -16'sd3144;
    my = 16'sd8702;
    mz = 16'sd2560;
    cpl_fault = '0;
    ctl_fault = '0;
    f15 = fault_map(10);
    f30 = fault_map(19);
    f40 = fault_map(26);
    fiso = 64'h0000_0008_1408_0000;   // PE (3,3) cut off by faults at (2,3) (3,2) (3,4) (4,3)
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    scenario("CPL faults 0%",  1'b0, '0, '0);
    scenario("CPL faults 15%", 1'b0, f15, '0);
    scenario("CPL faults 30%", 1'b0, f30, '0);
    scenario("CPL faults 40%", 1'b0, f40, '0);
    scenario("CPL faults 0%",  1'b1, '0, '0);
    scenario("CPL faults 15%", 1'b1, f15, '0);
    scenario("CPL faults 30%", 1'b1, f30, '0);
    scenario("CPL faults 40%", 1'b1, f40, '0);
    scenario("isolated PE",    1'b0, fiso, '0);
    scenario("isolated PE",    1'b1, fiso, '0);
    fctl = fault_map(13);
    scenario("CPL 20% + CTL 20%", 1'b1, fault_map(13), fctl);
    fctl = fault_map(19);
    scenario("CPL 10% + CTL 30%", 1'b1, fault_map(6), fctl);
    $display("mechanisms: mode switches %0d, stand-by %0d, isolated PEs %0d, CPL faults %0d, CTL faults %0d, CTL convergence %0d",
             n_mode_switch, n_standby, n_isolated, n_cpl_fault, n_ctl_fault, n_ctl_conv);
    checks += 6;
    if (n_mode_switch == 0) begin failures++; $display("FAIL no mode switch"); end
    if (n_standby == 0)     begin failures++; $display("FAIL no stand-by"); end
    if (n_isolated == 0)    begin failures++; $display("FAIL no isolated PE"); end
    if (n_cpl_fault == 0)   begin failures++; $display("FAIL no CPL fault"); end
    if (n_ctl_fault == 0)   begin failures++; $display("FAIL no CTL fault"); end
    if (n_ctl_conv == 0)    begin failures++; $display("FAIL no CTL convergence"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
