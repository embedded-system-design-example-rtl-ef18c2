// pwm_udctr -- up-down counter that forms the common PWM triangle carrier.
//
// A signed CNT_BITS-bit counter runs from 0 up to UD_COUNT_MAX, back down to
// UD_COUNT_MIN, up again, and so on, advancing one count per `clkdiv_p`
// enable pulse. Its value `pwmcnt` is the triangle u_t that all four
// modulators compare against. Each time the counter reaches its minimum the
// modulation inputs are sampled: the threshold of the left half bridge of a
// phase becomes +din and that of the right half bridge -din, so the pair of
// half bridges produces a mean phase voltage proportional to din. Sampling
// only at the carrier minimum keeps every PWM period symmetric.
//
// Counter width (12 bit), the shared carrier, sampling at the minimum and
// the +din / -din thresholds follow the source. The turning points
// UD_COUNT_MAX = 2047 and UD_COUNT_MIN = -2047 are this design's choice (the
// source names them without values); the counter here turns exactly at
// them, so one carrier period lasts 2*(UD_COUNT_MAX-UD_COUNT_MIN) enables.
// Thresholds are one bit wider than the counter so that -din never
// overflows.
//
// Interface: synchronous active-high reset clears counter and thresholds
// (all outputs then off). `din_0` (phase A, cosine) and `din_1` (phase B,
// sine) are signed and should lie within [UD_COUNT_MIN, UD_COUNT_MAX].
// Timing: thresholds update in the clock after the enable on which the
// counter reaches UD_COUNT_MIN; `load` pulses high for that clock.
module pwm_udctr #(
  parameter int unsigned CNT_BITS     = 12,
  parameter int          UD_COUNT_MAX = 2047,
  parameter int          UD_COUNT_MIN = -2047
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       clkdiv_p,  // count enable
  input  logic signed [CNT_BITS-1:0] din_0,     // phase A modulation value
  input  logic signed [CNT_BITS-1:0] din_1,     // phase B modulation value
  output logic signed [CNT_BITS-1:0] pwmcnt,    // triangle carrier
  output logic                       up_dwn,    // 0: counting up, 1: counting down
  output logic                       load,      // thresholds were just updated
  output logic signed [CNT_BITS:0]   hithr_a,
  output logic signed [CNT_BITS:0]   lothr_a,
  output logic signed [CNT_BITS:0]   hithr_b,
  output logic signed [CNT_BITS:0]   lothr_b
);

  localparam logic signed [CNT_BITS-1:0] CMAX = CNT_BITS'(UD_COUNT_MAX);
  localparam logic signed [CNT_BITS-1:0] CMIN = CNT_BITS'(UD_COUNT_MIN);

  always_ff @(posedge clk) begin
    if (rst) begin
      pwmcnt  <= '0;
      up_dwn  <= 1'b0;
      load    <= 1'b0;
      hithr_a <= '0;
      lothr_a <= '0;
      hithr_b <= '0;
      lothr_b <= '0;
    end else begin
      load <= 1'b0;
      if (clkdiv_p) begin
        if (!up_dwn) begin
          pwmcnt <= pwmcnt + 1'b1;
          if (pwmcnt + 1'b1 == CMAX) up_dwn <= 1'b1;
        end else begin
          pwmcnt <= pwmcnt - 1'b1;
          if (pwmcnt - 1'b1 == CMIN) begin
            up_dwn  <= 1'b0;
            load    <= 1'b1;
            hithr_a <= (CNT_BITS+1)'(din_0);
            lothr_a <= -(CNT_BITS+1)'(din_0);
            hithr_b <= (CNT_BITS+1)'(din_1);
            lothr_b <= -(CNT_BITS+1)'(din_1);
          end
        end
      end
    end
  end

  a_in_range: assert property (@(posedge clk) disable iff (rst)
    pwmcnt <= CMAX && pwmcnt >= CMIN);

  initial begin
    assert (UD_COUNT_MAX > 0 && UD_COUNT_MIN < 0 && UD_COUNT_MAX < 2**(CNT_BITS-1)
            && UD_COUNT_MIN >= -(2**(CNT_BITS-1)))
      else $error("UD_COUNT_MAX/MIN must straddle 0 and fit CNT_BITS");
  end

endmodule
