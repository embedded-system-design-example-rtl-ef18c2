// tb_pwm_modulator -- self-checking test of the four PWM comparators.
//
// The testbench generates its own triangle carrier (+/-2047) and fixed
// thresholds +d/-d per phase, checks every registered output against
// (carrier < threshold) of the previous clock, and checks the duty cycle of
// each output over one carrier period against S = (u_c + 1)/2 with
// u_c = threshold/2047, to within 2 clocks.
module tb_pwm_modulator;
  localparam int CB = 12;
  localparam int CMAX = 2047, CMIN = -2047;
  localparam int PERIOD = 2 * (CMAX - CMIN);

  logic                 clk = 1'b0;
  logic                 rst;
  logic signed [CB-1:0] pwmcnt;
  logic signed [CB:0]   thr [4];
  logic [3:0]           s;
  int                   checks = 0, failures = 0;

  pwm_modulator dut (.clk, .rst, .pwmcnt, .thr, .s);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dvals [5] = '{0, 1000, -1500, 2047, -2047};

  initial begin
    int cnt, dir, hi [4], prev_cnt;
    int t [4];
    rst = 1'b1; pwmcnt = '0;
    foreach (thr[c]) thr[c] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    foreach (dvals[k]) begin
      t[0] = dvals[k]; t[1] = -dvals[k]; t[2] = dvals[k] / 3; t[3] = -(dvals[k] / 3);
      cnt = CMIN; dir = 0;
      foreach (hi[c]) hi[c] = 0;
      @(negedge clk) begin
        foreach (thr[c]) thr[c] = (CB+1)'(t[c]);
        pwmcnt = CB'(cnt);
      end
      for (int i = 0; i <= PERIOD; i++) begin
        prev_cnt = cnt;
        @(posedge clk);
        #1;
        if (i > 0) begin
          for (int c = 0; c < 4; c++) begin
            checks++;
            if (s[c] != (prev_cnt < t[c])) begin
              failures++;
              $display("FAIL ch%0d cnt=%0d thr=%0d s=%0d", c, prev_cnt, t[c], s[c]);
            end
            if (s[c]) hi[c]++;
          end
        end
        @(negedge clk);
        if (dir == 0) begin cnt++; if (cnt == CMAX) dir = 1; end
        else begin cnt--; if (cnt == CMIN) dir = 0; end
        pwmcnt = CB'(cnt);
      end
      for (int c = 0; c < 4; c++) begin
        real expd;
        expd = (real'(t[c]) / real'(CMAX) + 1.0) / 2.0 * real'(PERIOD);
        checks++;
        if (real'(hi[c]) - expd > 2.0 || expd - real'(hi[c]) > 2.0) begin
          failures++;
          $display("FAIL duty ch%0d thr=%0d high %0d of %0d, expected %0.1f",
                   c, t[c], hi[c], PERIOD, expd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
