// tb_pwm_udctr -- self-checking test of the PWM triangle counter.
//
// An independent model walks the expected carrier (0 up to MAX, down to
// MIN, up again) and is compared with pwmcnt and up_dwn after every clock,
// with the count enable switched on and off at random. The thresholds must
// change only in the clock after the counter reaches MIN and then equal
// +din_0, -din_0, +din_1, -din_1 of that moment; the carrier period must be
// 2*(MAX-MIN) enables. Uses the default 12-bit carrier, +/-2047.
module tb_pwm_udctr;
  localparam int CB   = 12;
  localparam int CMAX = 2047;
  localparam int CMIN = -2047;

  logic                 clk = 1'b0;
  logic                 rst, clkdiv_p;
  logic signed [CB-1:0] din_0, din_1, pwmcnt;
  logic                 up_dwn, load;
  logic signed [CB:0]   hithr_a, lothr_a, hithr_b, lothr_b;
  int                   checks = 0, failures = 0;

  pwm_udctr dut (.clk, .rst, .clkdiv_p, .din_0, .din_1, .pwmcnt, .up_dwn, .load,
                 .hithr_a, .lothr_a, .hithr_b, .lothr_b);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_cnt = 0, m_dir = 0;              // model carrier
  int m_ha = 0, m_la = 0, m_hb = 0, m_lb = 0;
  int m_load = 0;
  int enables = 0, last_min = -1, periods = 0, loads = 0;

  task automatic step_model(input bit en, input int d0, input int d1);
    m_load = 0;
    if (!en) return;
    enables++;
    if (m_dir == 0) begin
      m_cnt++;
      if (m_cnt == CMAX) m_dir = 1;
    end else begin
      m_cnt--;
      if (m_cnt == CMIN) begin
        m_dir = 0; m_load = 1;
        m_ha = d0; m_la = -d0; m_hb = d1; m_lb = -d1;
        if (last_min >= 0) begin
          periods++;
          checks++;
          if (enables - last_min != 2 * (CMAX - CMIN)) begin
            failures++;
            $display("FAIL: carrier period %0d enables", enables - last_min);
          end
        end
        last_min = enables;
      end
    end
  endtask

  initial begin
    bit en;
    int d0, d1;
    rst = 1'b1; clkdiv_p = 1'b0; din_0 = '0; din_1 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 60000; i++) begin
      @(negedge clk) begin
        en = (i < 20000) ? 1'b1 : ($urandom_range(0, 3) != 0);
        d0 = $urandom_range(0, 2 * CMAX) - CMAX;
        d1 = $urandom_range(0, 2 * CMAX) - CMAX;
        clkdiv_p = en; din_0 = CB'(d0); din_1 = CB'(d1);
      end
      @(posedge clk);
      step_model(en, d0, d1);
      if (m_load) loads++;
      #1;
      checks++;
      if (int'(pwmcnt) != m_cnt || up_dwn != m_dir[0] || load != m_load[0] ||
          int'(hithr_a) != m_ha || int'(lothr_a) != m_la ||
          int'(hithr_b) != m_hb || int'(lothr_b) != m_lb) begin
        failures++;
        if (failures < 10)
          $display("FAIL i=%0d cnt=%0d/%0d dir=%0d/%0d thr=%0d,%0d,%0d,%0d exp %0d,%0d,%0d,%0d",
                   i, pwmcnt, m_cnt, up_dwn, m_dir, hithr_a, lothr_a, hithr_b, lothr_b,
                   m_ha, m_la, m_hb, m_lb);
      end
    end
    checks++;
    if (periods < 3 || loads < 3) begin
      failures++;
      $display("FAIL: only %0d periods", periods);
    end
    $display("carrier periods %0d, threshold loads %0d", periods, loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
