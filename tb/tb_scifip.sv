// tb_scifip -- end-to-end test of the motor-control IP at its default size.
//
// Acts as the processor: writes the speed divider and position reference
// over AXI4-Lite and watches the eight gate outputs like the power stage
// would. In step mode it decodes the sub-step index from the gate pattern,
// checks that every step moves one sub-step toward the reference, that
// steps are SPDIV+1 clocks apart, that the drive stops at the reference and
// that the position read back over the bus agrees; the diagonal gates must
// always follow each other. In continuous mode it measures, over one full
// carrier period, the on-time of each half bridge and checks the mean
// phase voltages against cos/sin of the commanded angle (amplitude
// 2037/2047). Each mechanism (forward step, backward step, hold at the
// reference, speed change, step/continuous mode switch both ways) is counted
// and must occur at least once. No parameter of the design is overridden.
module tb_scifip;
  import scif_pkg::*;
  localparam int AW     = 5;
  localparam int PERIOD = 2 * (2047 - (-2047));   // carrier period in clocks
  localparam real AMP   = 2037.0 / 2047.0;        // (16303 >>> 3) / 2047
  localparam real PI    = 3.14159265358979;

  logic          clk = 1'b0;
  logic          aresetn;
  logic [AW-1:0] awaddr, araddr;
  logic          awvalid, awready, wvalid, wready, bvalid, bready;
  logic          arvalid, arready, rvalid, rready;
  logic [31:0]   wdata, rdata;
  logic [3:0]    wstrb;
  logic [1:0]    bresp, rresp;
  logic          a1p, a1n, a2p, a2n, b1p, b1n, b2p, b2n;
  int            checks = 0, failures = 0;

  scifip dut (
    .s_axi_aclk(clk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .a1p, .a1n, .a2p, .a2n, .b1p, .b1n, .b2p, .b2n);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic axi_write(input int idx, input logic [31:0] d);
    @(negedge clk) begin
      awaddr = AW'(idx * 4); awvalid = 1'b1; wdata = d; wstrb = 4'hF; wvalid = 1'b1;
    end
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk) begin awvalid = 1'b0; wvalid = 1'b0; bready = 1'b1; end
    do @(posedge clk); while (!bvalid);
    check(bresp == AXI_RESP_OKAY, "write response");
    @(negedge clk) bready = 1'b0;
  endtask

  task automatic axi_read(input int idx, output logic [31:0] d);
    @(negedge clk) begin araddr = AW'(idx * 4); arvalid = 1'b1; end
    do @(posedge clk); while (!arready);
    @(negedge clk) begin arvalid = 1'b0; rready = 1'b1; end
    do @(posedge clk); while (!rvalid);
    d = rdata;
    @(negedge clk) rready = 1'b0;
  endtask

  // ---------------- step-mode monitor ----------------
  // Gate pattern {a1p, a1n, b1p, b1n} of sub-steps 0..7 (phase A 0,+,+,+,0,-,-,-;
  // phase B -,-,0,+,+,+,0,-).
  logic [3:0] seq [8] = '{4'b0001, 4'b1001, 4'b1000, 4'b1010,
                          4'b0010, 4'b0110, 4'b0100, 4'b0101};

  function automatic int decode(input logic [3:0] g);
    for (int k = 0; k < 8; k++) if (seq[k] == g) return k;
    return -1;
  endfunction

  bit  step_mode = 1'b0;      // monitor active
  int  pos = 0;               // position tracked from the gate outputs
  int  target = 0;            // current reference
  int  exp_gap = -1;          // expected clocks between steps, -1 = unchecked
  int  cyc = 0, last_step = -1;
  int  n_fwd = 0, n_bwd = 0, n_gap_ok = 0;
  logic [3:0] prev_g = 4'b0001;

  always @(posedge clk) begin
    logic [3:0] g;
    int ko, kn, d;
    cyc++;
    #1;
    g = {a1p, a1n, b1p, b1n};
    if (step_mode && g != prev_g) begin
      ko = decode(prev_g);
      kn = decode(g);
      d  = (kn - ko + 8) % 8;
      checks++;
      if (kn < 0 || !(d == 1 && target > pos) && !(d == 7 && target < pos)) begin
        failures++;
        $display("FAIL: step %b -> %b at pos %0d, target %0d", prev_g, g, pos, target);
      end else begin
        if (d == 1) begin pos++; n_fwd++; end
        else        begin pos--; n_bwd++; end
      end
      if (exp_gap > 0 && last_step >= 0) begin
        checks++;
        if (cyc - last_step != exp_gap) begin
          failures++;
          $display("FAIL: step interval %0d, expected %0d", cyc - last_step, exp_gap);
        end else n_gap_ok++;
      end
      last_step = cyc;
    end
    if (step_mode) begin
      checks++;
      if (a2n != a1p || a2p != a1n || b2n != b1p || b2p != b1n) begin
        failures++;
        $display("FAIL: diagonal gates differ");
      end
    end
    prev_g = g;
  end

  // Move to `t` with divider `div` and wait until the position is reached.
  int n_hold = 0, n_speed = 0;
  task automatic move_to(input int t, input int div, input bit first = 1'b0);
    logic [31:0] d;
    int  old_div;
    target = t;
    if (!first) n_speed += (div != exp_gap - 1);
    exp_gap = -1; last_step = -1;
    axi_write(SPDIV_REG, 32'(div));
    exp_gap = div + 1;
    axi_write(PREF_REG, 32'(t));
    while (pos != t) @(posedge clk);
    // stays at the reference
    repeat (5 * (div + 1) + 10) @(posedge clk);
    #2;
    check(pos == t && {a1p, a1n, b1p, b1n} == seq[t & 7], $sformatf("hold at %0d", t));
    n_hold++;
    axi_read(SANGLE_REG, d);
    check($signed(d) == t, $sformatf("position read-back %0d, expected %0d", $signed(d), t));
  endtask

  // ---------------- continuous-mode measurement ----------------
  int n_cont = 0, n_mode = 0;
  task automatic cont_angle(input int ang);
    int  hi [4];
    real th, va, vb;
    axi_write(ANGLE_REG, 32'(ang));
    repeat (2 * PERIOD) @(posedge clk);      // new thresholds are loaded
    foreach (hi[i]) hi[i] = 0;
    for (int i = 0; i < PERIOD; i++) begin
      @(posedge clk);
      #1;
      if (a1p) hi[0]++;
      if (a2p) hi[1]++;
      if (b1p) hi[2]++;
      if (b2p) hi[3]++;
      checks++;
      if (a1n == a1p || a2n == a2p || b1n == b1p || b2n == b2p) begin
        failures++;
        $display("FAIL: half bridge not complementary");
      end
    end
    th = 2.0 * PI * real'(ang) / 32768.0;
    va = real'(hi[0] - hi[1]) / real'(PERIOD);
    vb = real'(hi[2] - hi[3]) / real'(PERIOD);
    check(va - AMP * $cos(th) < 0.005 && AMP * $cos(th) - va < 0.005,
          $sformatf("angle %0d: phase A mean %f, expected %f", ang, va, AMP * $cos(th)));
    check(vb - AMP * $sin(th) < 0.005 && AMP * $sin(th) - vb < 0.005,
          $sformatf("angle %0d: phase B mean %f, expected %f", ang, vb, AMP * $sin(th)));
    n_cont++;
  endtask

  initial begin
    logic [31:0] d;
    aresetn = 1'b0;
    {awvalid, wvalid, bready, arvalid, rready} = '0;
    awaddr = '0; araddr = '0; wdata = '0; wstrb = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) aresetn = 1'b1;
    #1;
    check({a1p, a1n, a2p, a2n, b1p, b1n, b2p, b2n} == 8'b0, "all gates off after reset");
    repeat (3) @(posedge clk);
    check({a1p, a1n, b1p, b1n} == seq[0], "state 0 after reset");
    step_mode = 1'b1;

    move_to(5, 3, 1'b1);    // forward, 4 clocks per step
    move_to(-3, 3);         // backward through the wrap
    move_to(12, 20);        // slower
    move_to(10, 0);         // one step per clock

    // switch to continuous drive
    step_mode = 1'b0;
    axi_write(MODE_REG, 32'd1);
    n_mode++;
    cont_angle(0);
    cont_angle(8192);        // 90 deg
    cont_angle(-10923);      // -120 deg
    cont_angle(3000);

    // back to step mode: the sequencer has held its position
    axi_write(MODE_REG, 32'd0);
    n_mode++;
    repeat (3) @(posedge clk);
    #1 check({a1p, a1n, b1p, b1n} == seq[10 & 7], "step pattern restored after mode switch");
    prev_g = {a1p, a1n, b1p, b1n};
    step_mode = 1'b1;
    move_to(14, 2);

    check(n_fwd > 0, "forward steps happened");
    check(n_bwd > 0, "backward steps happened");
    check(n_hold > 0, "hold at reference happened");
    check(n_speed > 0, "speed change happened");
    check(n_gap_ok > 0, "step intervals were measured");
    check(n_mode >= 2, "mode switches happened");
    check(n_cont > 0, "continuous-mode periods measured");
    $display("forward %0d, backward %0d, holds %0d, speed changes %0d, timed steps %0d, mode switches %0d, PWM angles %0d",
             n_fwd, n_bwd, n_hold, n_speed, n_gap_ok, n_mode, n_cont);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
