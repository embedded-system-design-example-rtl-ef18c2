// axil_regs -- AXI4-Lite slave register bank of the motor-control IP.
//
// The processor commands the drive through two 32-bit write registers: the
// speed divider (time between two steps) and the position reference. Writing
// a register is a single store to base + 4*index. This bank adds three
// registers of its own: a mode bit (step or continuous drive), the electrical
// angle for continuous drive and a read-only copy of the actual position
// counter, so software can monitor the motion. See scif_pkg for the map.
//
//   index  name     access  bits used
//   0      SPDIV    R/W     31:0
//   1      PREF     R/W     31:0
//   2      MODE     R/W     0
//   3      ANGLE    R/W     14:0
//   4      SANGLE   R       31:0 (sign-extended position counter)
//
// Writes honour the byte strobes. Accesses to other word offsets complete
// with SLVERR, writes to them and to SANGLE change nothing.
//
// Interface: AXI4-Lite, 32-bit data, ADDR_W-bit byte address, one
// outstanding transaction per direction. The write address and data must
// both be valid; they are accepted together in one cycle. Timing: AWREADY and
// WREADY pulse one cycle after both valids are seen, BVALID follows in the
// next cycle; ARREADY pulses one cycle after ARVALID and RVALID follows in
// the next cycle. Reset is the active-low synchronous ARESETN of AXI.
module axil_regs
  import scif_pkg::*;
#(
  parameter int unsigned ADDR_W   = 5,
  parameter int unsigned STC_BITS = 16
) (
  input  logic                s_axi_aclk,
  input  logic                s_axi_aresetn,
  // write address / data / response
  input  logic [ADDR_W-1:0]   s_axi_awaddr,
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  input  logic [31:0]         s_axi_wdata,
  input  logic [3:0]          s_axi_wstrb,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  output logic [1:0]          s_axi_bresp,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  // read address / data
  input  logic [ADDR_W-1:0]   s_axi_araddr,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  output logic [31:0]         s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready,
  // register values
  output logic [31:0]         spdiv,
  output logic [31:0]         pref,
  output drive_mode_t         mode,
  output logic [14:0]         angle,
  input  logic [STC_BITS-1:0] s_angle
);

  logic clk, rst;
  assign clk = s_axi_aclk;
  assign rst = !s_axi_aresetn;

  logic [31:0] mode_word, angle_word;
  assign mode  = drive_mode_t'(mode_word[0]);
  assign angle = angle_word[14:0];

  // ---------------- write channel ----------------
  logic              wr_go;
  logic [ADDR_W-3:0] wr_idx;
  assign wr_go  = s_axi_awvalid && s_axi_wvalid && !s_axi_awready && !s_axi_bvalid;
  assign wr_idx = s_axi_awaddr[ADDR_W-1:2];

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] be);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = be[b] ? d[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      s_axi_awready <= 1'b0;
      s_axi_wready  <= 1'b0;
      s_axi_bvalid  <= 1'b0;
      s_axi_bresp   <= AXI_RESP_OKAY;
      spdiv         <= '0;
      pref          <= '0;
      mode_word     <= '0;
      angle_word    <= '0;
    end else begin
      s_axi_awready <= wr_go;
      s_axi_wready  <= wr_go;
      if (wr_go) begin
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= AXI_RESP_OKAY;
        unique case (int'(wr_idx))
          SPDIV_REG:  spdiv      <= merge(spdiv, s_axi_wdata, s_axi_wstrb);
          PREF_REG:   pref       <= merge(pref, s_axi_wdata, s_axi_wstrb);
          MODE_REG:   mode_word  <= merge(mode_word, s_axi_wdata, s_axi_wstrb) & 32'h1;
          ANGLE_REG:  angle_word <= merge(angle_word, s_axi_wdata, s_axi_wstrb) & 32'h7FFF;
          SANGLE_REG: ;
          default:    s_axi_bresp <= AXI_RESP_SLVERR;
        endcase
      end else if (s_axi_bvalid && s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
    end
  end

  // ---------------- read channel ----------------
  logic              rd_go;
  logic [ADDR_W-3:0] rd_idx;
  assign rd_go  = s_axi_arvalid && !s_axi_arready && !s_axi_rvalid;
  assign rd_idx = s_axi_araddr[ADDR_W-1:2];

  always_ff @(posedge clk) begin
    if (rst) begin
      s_axi_arready <= 1'b0;
      s_axi_rvalid  <= 1'b0;
      s_axi_rdata   <= '0;
      s_axi_rresp   <= AXI_RESP_OKAY;
    end else begin
      s_axi_arready <= rd_go;
      if (rd_go) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rresp  <= AXI_RESP_OKAY;
        unique case (int'(rd_idx))
          SPDIV_REG:  s_axi_rdata <= spdiv;
          PREF_REG:   s_axi_rdata <= pref;
          MODE_REG:   s_axi_rdata <= mode_word;
          ANGLE_REG:  s_axi_rdata <= angle_word;
          SANGLE_REG: s_axi_rdata <= 32'(signed'(s_angle));
          default: begin
            s_axi_rdata <= '0;
            s_axi_rresp <= AXI_RESP_SLVERR;
          end
        endcase
      end else if (s_axi_rvalid && s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

  // AXI rule: a valid response is held until it is accepted.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (rst)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (rst)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
