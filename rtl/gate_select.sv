// gate_select -- forms the eight MOSFET gate signals of the two H bridges.
//
// Step mode: only a1p, a1n, b1p and b1n are generated by the stepping
// sequencer. The diagonal transistors of an H bridge switch together, so the
// remaining four gates are copies: a2n = a1p, a2p = a1n, b2n = b1p and
// b2p = b1n (this follows the source's gate-signal plots). A phase whose two
// inputs are both low has all four transistors off.
//
// Continuous mode: each half bridge is driven by its own PWM signal; the high
// side transistor conducts while the signal is 1 and the low side while it
// is 0, so a1p = s[0], a1n = ~s[0], a2p = s[1], a2n = ~s[1] and likewise for
// phase B with s[2], s[3]. This complementary mapping is this design's
// choice (the source gives the carrier and comparators but not the gate
// mapping); it adds no dead time, which a real bridge may need.
//
// Interface: `mode` selects the source (scif_pkg::MODE_STEP / MODE_CONT).
// Timing: the gate outputs are registered, one clock after the inputs; the
// synchronous active-high reset switches every transistor off.
module gate_select
  import scif_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  drive_mode_t mode,
  input  logic        st_a1p,
  input  logic        st_a1n,
  input  logic        st_b1p,
  input  logic        st_b1n,
  input  logic [3:0]  pwm_s,     // a-left, a-right, b-left, b-right
  output gates_t      gates
);

  gates_t nxt;

  always_comb begin
    if (mode == MODE_STEP) begin
      nxt.a1p = st_a1p;
      nxt.a1n = st_a1n;
      nxt.a2p = st_a1n;
      nxt.a2n = st_a1p;
      nxt.b1p = st_b1p;
      nxt.b1n = st_b1n;
      nxt.b2p = st_b1n;
      nxt.b2n = st_b1p;
    end else begin
      nxt.a1p = pwm_s[0];
      nxt.a1n = ~pwm_s[0];
      nxt.a2p = pwm_s[1];
      nxt.a2n = ~pwm_s[1];
      nxt.b1p = pwm_s[2];
      nxt.b1n = ~pwm_s[2];
      nxt.b2p = pwm_s[3];
      nxt.b2n = ~pwm_s[3];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) gates <= '0;
    else     gates <= nxt;
  end

  // No half bridge may ever have both of its transistors on.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (rst)
    !(gates.a1p && gates.a1n) && !(gates.a2p && gates.a2n) &&
    !(gates.b1p && gates.b1n) && !(gates.b2p && gates.b2n));

endmodule
