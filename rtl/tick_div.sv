// tick_div -- programmable clock-enable divider.
//
// Emits a single-cycle pulse on `tick` once every DIV+1 clock cycles, where
// DIV is the run-time input `div`. It is the step timer of the stepper FSM
// (the time between steps sets the motor speed, so `div` is the speed
// register) and the prescaler (clkdiv_p) of the PWM triangle counter.
//
// Interface: synchronous active-high reset; `div` may change at any time, a
// running count that already exceeds a new smaller `div` ends at once.
// Timing: the first tick comes DIV+1 cycles after reset is released; with
// div = 0 `tick` is high every cycle. The exact divide ratio (DIV+1) is this
// implementation's choice; the source only says the step period sets speed.
module tick_div #(
  parameter int unsigned W = 32  // width of the divider value
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] div,
  output logic         tick
);

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt >= div) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
