// tb_gps_eval: self-checking test of the GPS fitness evaluator. For random chromosomes
// (Gray-coded fields, decoded here independently) it computes the baseline vector
// b*(cos beta cos phi, cos beta sin phi, sin beta) in real arithmetic, builds measured vectors that are (a) the chromosome's own vector, (b) that vector
// plus a random offset and (c) a random vector, and compares the 5-bit fitness with the
// logarithmic score worked out here (within one grade, since CORDIC rounding can move a value
// across a grade boundary; case (a) must give exactly 31). Also checks the 37-cycle latency.
module tb_gps_eval;
  import ehw_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int ERR_SHIFT = 7;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  gps_chrom_t chrom;
  logic signed [15:0] mx, my, mz;
  logic busy, done;
  fit_t fit;
  int checks = 0, failures = 0, exact = 0;

  gps_eval #(.ERR_SHIFT(ERR_SHIFT)) dut (.clk, .rst_n, .start_i(start), .chrom_i(chrom),
    .meas_x_i(mx), .meas_y_i(my), .meas_z_i(mz), .busy_o(busy), .done_o(done), .fit_o(fit));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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
    int e, lead;
    e = int'($floor(err)) >>> ERR_SHIFT;
    if (e == 0) return 31;
    lead = $clog2(e + 1) - 1;
    if (1 + 2 * lead + ((lead > 0) ? ((e >> (lead - 1)) & 1) : 0) >= 30) return 1;
    return 31 - (1 + 2 * lead + ((lead > 0) ? ((e >> (lead - 1)) & 1) : 0));
  endfunction

  task automatic vec_of(input gps_chrom_t c, output real x, output real y, output real z);
    real ph, be, b;
    ph = 2.0 * PI * real'(g2b(int'(c.phi))) / 16384.0;
    be = PI * (real'(g2b(int'(c.beta))) - 512.0) / 1024.0;
    b  = real'(g2b(int'(c.b))) * 64.0;
    x = b * $cos(be) * $cos(ph);
    y = b * $cos(be) * $sin(ph);
    z = b * $sin(be);
  endtask

  task automatic run_one(input gps_chrom_t c, input int ox, input int oy, input int oz,
                         input bit own);
    real x, y, z, err;
    int lat, exp_fit;
    vec_of(c, x, y, z);
    @(negedge clk);
    chrom = c;
    mx = 16'($rtoi(x) + ox);
    my = 16'($rtoi(y) + oy);
    mz = 16'($rtoi(z) + oz);
    err = fabs(x - real'(mx)) + fabs(y - real'(my)) + fabs(z - real'(mz));
    exp_fit = grade_of(err);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    checks += 2;
    if (own ? (int'(fit) != 31) : (int'(fit) - exp_fit > 1 || exp_fit - int'(fit) > 1)) begin
      failures++;
      $display("FAIL chrom=%h err=%f fit=%0d expected=%0d", c, err, fit, exp_fit);
    end
    if (int'(fit) == exp_fit) exact++;
    if (lat != 37) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    chrom = '0;
    mx = '0;
    my = '0;
    mz = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 100; k++) run_one(gps_chrom_t'($urandom), 0, 0, 0, 1'b1);
    for (int k = 0; k < 150; k++)
      run_one(gps_chrom_t'($urandom), int'($urandom_range(0, 4000)) - 2000,
              int'($urandom_range(0, 4000)) - 2000, int'($urandom_range(0, 400)) - 200, 1'b0);
    for (int k = 0; k < 150; k++)
      run_one(gps_chrom_t'($urandom), int'($urandom_range(0, 30000)) - 15000,
              int'($urandom_range(0, 30000)) - 15000, int'($urandom_range(0, 30000)) - 15000, 1'b0);
    // Most results must agree exactly; boundary cases are rare.
    checks++;
    if (exact < 360) begin
      failures++;
      $display("FAIL only %0d exact matches", exact);
    end
    $display("exact matches %0d of 400", exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
