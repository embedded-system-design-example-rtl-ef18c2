// tb_scifip_profile -- motion-profile test of the motor-control IP.
//
// Replays the command sequence of a typical user session: speed divider
// 411 with a target of 60 sub-steps, then divider 1869 back to 0, then a
// short move as in a bring-up simulation (divider 3, target 5). For every
// move it checks, from the gate outputs alone, that each step goes one
// sub-step toward the target, that the steps are exactly divider+1 clocks
// apart, that the move takes |distance|*(divider+1) clocks from the first
// step to the last plus one period, and that the position read over the bus
// equals the target afterwards. Default parameters.
module tb_scifip_profile;
  import scif_pkg::*;
  localparam int AW = 5;

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
    repeat (300000) @(posedge clk);
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

  // Gate pattern {a1p, a1n, b1p, b1n} of sub-steps 0..7.
  logic [3:0] seq [8] = '{4'b0001, 4'b1001, 4'b1000, 4'b1010,
                          4'b0010, 4'b0110, 4'b0100, 4'b0101};
  function automatic int decode(input logic [3:0] g);
    for (int k = 0; k < 8; k++) if (seq[k] == g) return k;
    return -1;
  endfunction

  int pos = 0, target = 0, period = 0;
  int cyc = 0, first_step = -1, last_step = -1, n_steps = 0;
  logic [3:0] prev_g = 4'b0001;

  always @(posedge clk) begin
    logic [3:0] g;
    int d;
    cyc++;
    #1;
    g = {a1p, a1n, b1p, b1n};
    if (aresetn && g != prev_g && cyc > 10) begin
      d = (decode(g) - decode(prev_g) + 8) % 8;
      checks++;
      if (decode(g) < 0 || !(d == 1 && target > pos) && !(d == 7 && target < pos)) begin
        failures++;
        $display("FAIL: wrong step %b -> %b at %0d toward %0d", prev_g, g, pos, target);
      end else pos += (d == 1) ? 1 : -1;
      if (last_step >= 0) begin
        checks++;
        if (cyc - last_step != period) begin
          failures++;
          $display("FAIL: step interval %0d, expected %0d", cyc - last_step, period);
        end
      end
      if (first_step < 0) first_step = cyc;
      last_step = cyc;
      n_steps++;
    end
    prev_g = g;
  end

  task automatic move(input int div, input int t);
    logic [31:0] d;
    int distance;
    distance = (t > pos) ? t - pos : pos - t;
    axi_write(SPDIV_REG, 32'(div));
    target = t; period = div + 1; first_step = -1; last_step = -1; n_steps = 0;
    axi_write(PREF_REG, 32'(t));
    while (pos != t) @(posedge clk);
    repeat (3 * period) @(posedge clk);
    check(n_steps == distance, $sformatf("%0d steps, expected %0d", n_steps, distance));
    check(last_step - first_step == (distance - 1) * period,
          $sformatf("move time %0d clocks, expected %0d", last_step - first_step, (distance - 1) * period));
    axi_read(SANGLE_REG, d);
    check($signed(d) == t, $sformatf("position %0d, expected %0d", $signed(d), t));
    $display("divider %0d: %0d sub-steps in %0d clocks", div, distance, last_step - first_step + period);
  endtask

  initial begin
    aresetn = 1'b0;
    {awvalid, wvalid, bready, arvalid, rready} = '0;
    awaddr = '0; araddr = '0; wdata = '0; wstrb = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) aresetn = 1'b1;
    repeat (4) @(posedge clk);
    move(411, 60);
    move(1869, 0);
    move(3, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
