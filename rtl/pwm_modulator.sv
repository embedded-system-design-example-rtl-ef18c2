// pwm_modulator -- the four PWM comparators of the two H bridges.
//
// Each comparator switches its half bridge high while the modulation value is
// above the triangle carrier, i.e. while pwmcnt < threshold. With the
// thresholds +din (left half bridge) and -din (right half bridge) of one
// phase, the left output is high for a fraction (din-MIN)/(MAX-MIN) of a
// carrier period and the right output for (-din-MIN)/(MAX-MIN); the mean
// voltage across the winding is therefore proportional to din, which is
// S_mean = (u_c + 1)/2 for each half bridge with u_c = din/MAX.
//
// Channel order: 0 = phase A left (a1), 1 = phase A right (a2),
// 2 = phase B left (b1), 3 = phase B right (b2). The four comparators sharing
// one carrier follow the source; the strict "<" comparison and the output
// register (glitch-free gate drive) are this design's choice.
//
// Interface: signed carrier and thresholds from pwm_udctr. Timing: the
// outputs `s` are registered, one clock after the carrier value.
module pwm_modulator #(
  parameter int unsigned CNT_BITS = 12
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic signed [CNT_BITS-1:0] pwmcnt,
  input  logic signed [CNT_BITS:0]   thr [4],   // hithr_a, lothr_a, hithr_b, lothr_b
  output logic        [3:0]          s          // half-bridge switch signals
);

  logic signed [CNT_BITS:0] cnt_ext;
  assign cnt_ext = (CNT_BITS+1)'(pwmcnt);

  for (genvar c = 0; c < 4; c++) begin : g_cmp
    always_ff @(posedge clk) begin
      if (rst) s[c] <= 1'b0;
      else     s[c] <= (cnt_ext < thr[c]);
    end
  end

endmodule
