// tb_cordic: self-checking test of the CORDIC rotator. Drives random magnitudes and angles over
// the full turn (plus the four axis angles and the fold boundaries), compares cos/sin against
// real-number cos/sin computed here, within 6 LSB, and checks the ITER + 1 cycle latency.
module tb_cordic;
  localparam int W = 18;
  localparam int ITER = 16;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [W-1:0] r, c, s;
  logic [15:0] th;
  logic busy, done;
  int checks = 0, failures = 0;

  cordic #(.W(W), .ITER(ITER)) dut (.clk, .rst_n, .start_i(start), .r_i(r), .theta_i(th),
                                    .busy_o(busy), .done_o(done), .cos_o(c), .sin_o(s));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic run_one(input int mag, input int ang);
    int lat;
    real ec, es;
    @(negedge clk);
    r = W'(mag);
    th = 16'(ang);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    ec = real'(mag) * $cos(2.0 * PI * real'(ang) / 65536.0);
    es = real'(mag) * $sin(2.0 * PI * real'(ang) / 65536.0);
    checks += 3;
    if (fabs(real'(c) - ec) > 6.0 || fabs(real'(s) - es) > 6.0) begin
      failures++;
      $display("FAIL mag=%0d ang=%0d cos=%0d (%f) sin=%0d (%f)", mag, ang, c, ec, s, es);
    end
    if (lat != ITER + 1) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
    // Outputs hold after done.
    @(negedge clk);
    if (fabs(real'(c) - ec) > 6.0) begin
      failures++;
      $display("FAIL hold");
    end
  endtask

  initial begin
    r = '0;
    th = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_one(16320, 0);
    run_one(16320, 16384);
    run_one(16320, 32768);
    run_one(16320, 49152);
    run_one(10000, 16383);
    run_one(10000, 16385);
    run_one(10000, 49151);
    run_one(-5000, 1234);
    for (int k = 0; k < 300; k++) run_one(int'($urandom_range(0, 16320)), int'($urandom_range(0, 65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
