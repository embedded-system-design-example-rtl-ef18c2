// scifip -- motor-control IP for a two-phase stepper motor, attached to a
// processor by AXI4-Lite and driving the eight MOSFET gates of two H bridges.
//
// Step mode (MODE = 0): a step timer (tick_div, divider = SPDIV register)
// paces the eight-state stepping sequencer (step_fsm), which walks the
// position counter one sub-step per timer tick toward the position reference
// (PREF register) and stops there. Its four generated gate signals are
// expanded to the eight bridge gates (gate_select). Speed is set by the step
// period, position by the reference: software needs one store for each.
//
// Continuous mode (MODE = 1): the electrical angle in the ANGLE register is
// turned into cosine and sine by a pipelined CORDIC (cordic_sincos). The two
// values, shifted right by PWM_SHIFT to fit the carrier amplitude, modulate a
// shared 12-bit triangle carrier (pwm_udctr, enabled every PWM_CLKDIV+1
// clocks by a second tick_div); four comparators (pwm_modulator) give the
// switch signals of the four half bridges, cosine on phase A and sine on
// phase B. The step sequencer keeps running in the background, but its
// outputs are not used in this mode.
//
// The split into register interface, timed state machine, up-down carrier
// counter, four modulators and CORDIC follows the source; the mode switch,
// the ANGLE and SANGLE registers, and the default PWM_CLKDIV and PWM_SHIFT
// are this design's choices. The source's board LEDs, switches and push
// buttons are not implemented because their function is not specified.
//
// Interface: one clock (s_axi_aclk) and the AXI active-low synchronous reset;
// gate outputs are registered, '1' = transistor on.
module scifip
  import scif_pkg::*;
#(
  parameter int unsigned ADDR_W     = 5,    // AXI byte address width
  parameter int unsigned STC_BITS   = 16,   // position counter width
  parameter int unsigned STAGES     = 14,   // CORDIC micro-rotations
  parameter int unsigned CNT_BITS   = 12,   // PWM carrier counter width
  parameter int unsigned PWM_CLKDIV = 0,    // carrier advances every PWM_CLKDIV+1 clocks
  parameter int unsigned PWM_SHIFT  = 3     // CORDIC output >>> PWM_SHIFT = modulation value
) (
  input  logic              s_axi_aclk,
  input  logic              s_axi_aresetn,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  output logic              a1p,
  output logic              a1n,
  output logic              a2p,
  output logic              a2n,
  output logic              b1p,
  output logic              b1n,
  output logic              b2p,
  output logic              b2n
);

  logic clk, rst;
  assign clk = s_axi_aclk;
  assign rst = !s_axi_aresetn;

  // ---------------- registers ----------------
  logic [31:0]         spdiv, pref;
  drive_mode_t         mode;
  logic [14:0]         angle;
  logic [STC_BITS-1:0] s_angle;

  axil_regs #(.ADDR_W(ADDR_W), .STC_BITS(STC_BITS)) u_regs (
    .s_axi_aclk, .s_axi_aresetn,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .spdiv, .pref, .mode, .angle, .s_angle
  );

  // ---------------- step mode ----------------
  logic        step_en;
  logic        at_ref;
  step_state_t st_state;
  logic        st_a1p, st_a1n, st_b1p, st_b1n;

  tick_div #(.W(32)) u_step_timer (
    .clk, .rst, .div(spdiv), .tick(step_en)
  );

  step_fsm #(.STC_BITS(STC_BITS)) u_fsm (
    .clk, .rst, .step_en,
    .ref_ang(pref[STC_BITS-1:0]),
    .s_angle, .at_ref, .state(st_state),
    .a1p(st_a1p), .a1n(st_a1n), .b1p(st_b1p), .b1n(st_b1n)
  );

  // ---------------- continuous mode ----------------
  logic                       cs_valid;
  logic signed [15:0]         x_cos, y_sin;
  logic signed [CNT_BITS-1:0] din_0, din_1;

  cordic_sincos #(.STAGES(STAGES)) u_cordic (
    .clk, .rst, .in_valid(1'b1), .z_ang(angle),
    .out_valid(cs_valid), .x_cos, .y_sin
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      din_0 <= '0;
      din_1 <= '0;
    end else if (cs_valid) begin
      din_0 <= CNT_BITS'(x_cos >>> PWM_SHIFT);
      din_1 <= CNT_BITS'(y_sin >>> PWM_SHIFT);
    end
  end

  logic                       clkdiv_p;
  logic signed [CNT_BITS-1:0] pwmcnt;
  logic                       up_dwn, pwm_load;
  logic signed [CNT_BITS:0]   thr [4];
  logic [3:0]                 pwm_s;

  tick_div #(.W(32)) u_pwm_prescale (
    .clk, .rst, .div(32'(PWM_CLKDIV)), .tick(clkdiv_p)
  );

  pwm_udctr #(.CNT_BITS(CNT_BITS)) u_udctr (
    .clk, .rst, .clkdiv_p, .din_0, .din_1,
    .pwmcnt, .up_dwn, .load(pwm_load),
    .hithr_a(thr[0]), .lothr_a(thr[1]), .hithr_b(thr[2]), .lothr_b(thr[3])
  );

  pwm_modulator #(.CNT_BITS(CNT_BITS)) u_mod (
    .clk, .rst, .pwmcnt, .thr, .s(pwm_s)
  );

  // ---------------- gate outputs ----------------
  gates_t gates;

  gate_select u_gates (
    .clk, .rst, .mode,
    .st_a1p, .st_a1n, .st_b1p, .st_b1n,
    .pwm_s, .gates
  );

  assign a1p = gates.a1p;
  assign a1n = gates.a1n;
  assign a2p = gates.a2p;
  assign a2n = gates.a2n;
  assign b1p = gates.b1p;
  assign b1n = gates.b1n;
  assign b2p = gates.b2p;
  assign b2n = gates.b2n;

endmodule
