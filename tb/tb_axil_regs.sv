// tb_axil_regs -- self-checking test of the AXI4-Lite register bank.
//
// A small AXI4-Lite master (tasks below) writes and reads back every
// register, with full and partial byte strobes, with address and data
// presented in different cycles, and with a read-data consumer that stalls
// RREADY. It checks the register outputs, the read-back values, the masked
// MODE and ANGLE fields, the sign-extended position read-back and the SLVERR
// response outside the map, and that a write to the read-only register
// changes nothing.
module tb_axil_regs;
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
  logic [31:0]   spdiv, pref;
  drive_mode_t   mode;
  logic [14:0]   angle;
  logic [15:0]   s_angle;
  int            checks = 0, failures = 0;

  axil_regs #(.ADDR_W(AW), .STC_BITS(16)) dut (
    .s_axi_aclk(clk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .spdiv, .pref, .mode, .angle, .s_angle);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // Write; `skew` delays the data phase after the address phase by that many clocks.
  task automatic axi_write(input int idx, input logic [31:0] d, input logic [3:0] be,
                           input int skew, output logic [1:0] resp);
    @(negedge clk) begin
      awaddr = AW'(idx * 4); awvalid = 1'b1;
    end
    repeat (skew) @(negedge clk);
    wdata = d; wstrb = be; wvalid = 1'b1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk) begin awvalid = 1'b0; wvalid = 1'b0; bready = 1'b1; end
    do @(posedge clk); while (!bvalid);
    resp = bresp;
    @(negedge clk) bready = 1'b0;
  endtask

  task automatic axi_read(input int idx, input int stall, output logic [31:0] d,
                          output logic [1:0] resp);
    @(negedge clk) begin araddr = AW'(idx * 4); arvalid = 1'b1; end
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 1'b0;
    repeat (stall) @(negedge clk);
    rready = 1'b1;
    do @(posedge clk); while (!rvalid);
    d = rdata; resp = rresp;
    @(negedge clk) rready = 1'b0;
  endtask

  logic [31:0] d;
  logic [1:0]  r;

  initial begin
    aresetn = 1'b0;
    {awvalid, wvalid, bready, arvalid, rready} = '0;
    awaddr = '0; araddr = '0; wdata = '0; wstrb = '0;
    s_angle = 16'hFFF6;  // -10
    repeat (3) @(posedge clk);
    @(negedge clk) aresetn = 1'b1;
    check(spdiv == 0 && pref == 0 && mode == MODE_STEP && angle == 0, $sformatf("reset values %h %h %0d %h", spdiv, pref, mode, angle));

    axi_write(SPDIV_REG, 32'd411, 4'hF, 0, r);
    check(r == AXI_RESP_OKAY && spdiv == 32'd411, "SPDIV write");
    axi_write(PREF_REG, 32'd60, 4'hF, 2, r);
    check(r == AXI_RESP_OKAY && pref == 32'd60, "PREF write with skewed data");
    axi_write(MODE_REG, 32'hFFFF_FFFF, 4'hF, 0, r);
    check(mode == MODE_CONT, "MODE write");
    axi_write(ANGLE_REG, 32'h1234_5678, 4'hF, 1, r);
    check(angle == 15'h5678, "ANGLE write");
    axi_write(SPDIV_REG, 32'hAABB_CCDD, 4'b0100, 0, r);
    check(spdiv == 32'h00BB_019B, $sformatf("byte strobe write, spdiv=%h", spdiv));

    axi_read(SPDIV_REG, 0, d, r);
    check(d == 32'h00BB_019B && r == AXI_RESP_OKAY, "SPDIV read");
    axi_read(PREF_REG, 3, d, r);
    check(d == 32'd60, "PREF read with stalled RREADY");
    axi_read(MODE_REG, 0, d, r);
    check(d == 32'd1, "MODE read (bit 0 only)");
    axi_read(ANGLE_REG, 1, d, r);
    check(d == 32'h5678, "ANGLE read (15 bits)");
    axi_read(SANGLE_REG, 0, d, r);
    check(d == 32'hFFFF_FFF6 && r == AXI_RESP_OKAY, "SANGLE read, sign extended");

    axi_write(SANGLE_REG, 32'h0, 4'hF, 0, r);
    check(r == AXI_RESP_OKAY && spdiv == 32'h00BB_019B && pref == 60, "write to read-only");
    axi_write(6, 32'h55, 4'hF, 0, r);
    check(r == AXI_RESP_SLVERR, "SLVERR on write outside map");
    axi_read(7, 0, d, r);
    check(r == AXI_RESP_SLVERR, "SLVERR on read outside map");

    for (int i = 0; i < 50; i++) begin
      logic [31:0] v;
      v = $urandom;
      axi_write(PREF_REG, v, 4'hF, i % 3, r);
      axi_read(PREF_REG, i % 2, d, r);
      check(d == v && pref == v, "random PREF write/read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
