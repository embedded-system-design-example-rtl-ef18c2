// step_fsm -- timed eight-state stepping sequencer for a two-phase stepper motor.
//
// A Moore machine walks through the eight sub-steps of one electrical period
// (the full step split into eight, states 0..7). Each state drives a fixed
// pattern on the four generated gate signals of the two H bridges:
//
//   state : 0    1        2    3        4    5        6    7
//   a1p   : 0    1        1    1        0    0        0    0
//   a1n   : 0    0        0    0        0    1        1    1
//   b1p   : 0    0        0    1        1    1        0    0
//   b1n   : 1    1        0    0        0    0        0    1
//
// so phase A current is +,+,+ in states 1..3, - in 5..7 and zero in 0 and 4,
// and phase B leads phase A by two sub-steps the other way round (positive in
// 3..5, negative in 7, 0, 1). These patterns and the up/down transitions
// follow the source's state diagram and gate-signal plots.
//
// A signed position counter `s_angle` (STC_BITS wide, one count per sub-step)
// moves together with the state. On every `step_en` pulse (from the step
// timer) the difference a_diff = ref_ang - s_angle is formed; if its sign
// bit is 0 the machine moves one state forward and the counter increments,
// otherwise it moves one state back and the counter decrements. When
// a_diff is zero the machine holds, so the motor stops at the reference (the
// source's listing would step forward also at a_diff = 0; holding is this
// design's choice). Between step_en pulses nothing moves.
//
// Interface: synchronous active-high reset to state 0 and s_angle = 0.
// Timing: state, s_angle and the outputs change one clock after a step_en
// pulse; the gate outputs are decoded from the state register (Moore).
module step_fsm
  import scif_pkg::*;
#(
  parameter int unsigned STC_BITS = 16  // width of position counter / reference
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                step_en,   // one pulse per step period
  input  logic [STC_BITS-1:0] ref_ang,   // position reference in sub-steps
  output logic [STC_BITS-1:0] s_angle,   // actual position in sub-steps
  output logic                at_ref,    // s_angle == ref_ang
  output step_state_t         state,
  output logic                a1p,
  output logic                a1n,
  output logic                b1p,
  output logic                b1n
);

  logic [STC_BITS-1:0] a_diff;
  logic                dir;        // 0: forward (up), 1: backward (down)
  step_state_t         next_state;

  assign a_diff = ref_ang - s_angle;
  assign dir    = a_diff[STC_BITS-1];
  assign at_ref = (a_diff == '0);

  always_comb begin
    next_state = state;
    if (step_en && !at_ref) begin
      next_state = dir ? step_state_t'(state - 3'd1) : step_state_t'(state + 3'd1);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= ST0;
      s_angle <= '0;
    end else begin
      state <= next_state;
      if (step_en && !at_ref) begin
        s_angle <= dir ? s_angle - 1'b1 : s_angle + 1'b1;
      end
    end
  end

  // Moore output decode, defaults all off.
  always_comb begin
    a1p = 1'b0;
    a1n = 1'b0;
    b1p = 1'b0;
    b1n = 1'b0;
    unique case (state)
      ST0: b1n = 1'b1;
      ST1: begin a1p = 1'b1; b1n = 1'b1; end
      ST2: a1p = 1'b1;
      ST3: begin a1p = 1'b1; b1p = 1'b1; end
      ST4: b1p = 1'b1;
      ST5: begin a1n = 1'b1; b1p = 1'b1; end
      ST6: a1n = 1'b1;
      ST7: begin a1n = 1'b1; b1n = 1'b1; end
    endcase
  end

  // The state always equals the low three bits of the position counter.
  property p_state_tracks_angle;
    @(posedge clk) disable iff (rst) state == step_state_t'(s_angle[2:0]);
  endproperty
  a_state_tracks_angle: assert property (p_state_tracks_angle);

  // Never both transistors of one half bridge.
  a_no_shoot_through: assert property (@(posedge clk) !(a1p && a1n) && !(b1p && b1n));

endmodule
