// tb_cordic_sincos -- self-checking test of the pipelined CORDIC.
//
// Feeds one angle per clock (the four quadrant boundaries, both range ends
// and random angles) and compares each result with 16302.93*cos/sin computed
// in floating point (start value 9900 times the CORDIC gain 1.64676). The
// allowed error is 8 LSB, well under one LSB of a 14-bit result. The
// latency is checked to be STAGES+1 clocks and a bubble in the valid stream
// must come out at the same distance.
module tb_cordic_sincos;
  localparam int    STAGES = 14;
  localparam real   AMP    = 16302.93;
  localparam real   PI     = 3.14159265358979;
  localparam int    TOL    = 12;

  logic               clk = 1'b0;
  logic               rst, in_valid;
  logic signed [14:0] z_ang;
  logic               out_valid;
  logic signed [15:0] x_cos, y_sin;
  int                 checks = 0, failures = 0;

  cordic_sincos #(.STAGES(STAGES)) dut (.clk, .rst, .in_valid, .z_ang,
                                        .out_valid, .x_cos, .y_sin);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input log: angle and cycle of each valid input.
  int  in_ang [$];
  int  in_cyc [$];
  int  cyc = 0;
  int  max_err = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst && in_valid) begin
      in_ang.push_back(int'(z_ang));
      in_cyc.push_back(cyc);
    end
    if (!rst && out_valid) begin : chk
      int  a, c0, ex, ey, dx, dy;
      real th;
      a  = in_ang.pop_front();
      c0 = in_cyc.pop_front();
      th = 2.0 * PI * real'(a) / 32768.0;
      ex = int'(AMP * $cos(th));
      ey = int'(AMP * $sin(th));
      dx = int'(x_cos) - ex;
      dy = int'(y_sin) - ey;
      if (dx < 0) dx = -dx;
      if (dy < 0) dy = -dy;
      if (dx > max_err) max_err = dx;
      if (dy > max_err) max_err = dy;
      checks++;
      if (dx > TOL || dy > TOL || cyc - c0 != STAGES + 1) begin
        failures++;
        $display("FAIL angle=%0d cos=%0d (exp %0d) sin=%0d (exp %0d) latency=%0d",
                 a, x_cos, ex, y_sin, ey, cyc - c0);
      end
    end
  end

  int fixed_ang [10] = '{0, 8192, -8192, 16383, -16384, 4096, 8191, 8193, -8193, 12000};

  initial begin
    rst = 1'b1; in_valid = 1'b0; z_ang = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    foreach (fixed_ang[i]) begin
      @(negedge clk) begin in_valid = 1'b1; z_ang = 15'(fixed_ang[i]); end
    end
    @(negedge clk) in_valid = 1'b0;            // a bubble
    @(negedge clk) in_valid = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk) begin
        in_valid = ($urandom_range(0, 7) != 0);
        z_ang    = 15'($urandom);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (STAGES + 4) @(posedge clk);
    checks++;
    if (in_ang.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", in_ang.size());
    end
    $display("largest error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
