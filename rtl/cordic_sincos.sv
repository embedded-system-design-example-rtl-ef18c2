// cordic_sincos -- pipelined rotation-mode CORDIC for cosine and sine.
//
// The angle is a 15-bit two's-complement number in which 2^15 counts a full
// turn (one LSB = 360/32768 deg), so every input value is a valid angle and
// the range is -180 deg .. +180 deg. A pre-rotation folds the angle into the
// CORDIC convergence range of +/-90 deg: angles in the second quadrant have
// 180 deg subtracted, angles in the third have 180 deg added, and both results
// are negated at the output (cos(t) = -cos(t-180), sin(t) = -sin(t-180)).
// The start vector is (X_INIT, 0); STAGES micro-rotations by +/-atan(2^-k)
// then use only shifts and additions. The CORDIC gain (about 1.6468) is not
// divided out: X_INIT = 9900 makes the output amplitude about 16303, close to
// full scale of a 16-bit result, and is what replaces the "optional scaling"
// multiplier.
//
// Fixed-point format, quadrant folding, start value 9900 and the micro-rotation
// rule follow the source's 16-bit algorithm; the pipelining (one register per
// micro-rotation, as in the source's stage diagram) and the default of 14
// stages are this design's choice.
//
// Interface: `in_valid`/`z_ang` are accepted every cycle (throughput one
// result per clock). Timing: `out_valid`, `x_cos`, `y_sin` appear STAGES+1
// clocks after the inputs. Synchronous active-high reset clears the valid
// pipeline only.
module cordic_sincos #(
  parameter int unsigned STAGES = 14,    // number of micro-rotations (1..16)
  parameter int          X_INIT = 9900   // start vector length, pre-scaled by 1/K
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic signed [14:0] z_ang,      // 2^15 = 360 deg
  output logic               out_valid,
  output logic signed [15:0] x_cos,
  output logic signed [15:0] y_sin
);

  // Micro-rotation angles atan(2^-k) in the angle unit:
  // ZVAL[k] = round(atan(2^-k) * 2^15 / (2*pi)).
  localparam int ZVAL [16] = '{4096, 2418, 1278, 649, 326, 163, 81, 41,
                               20, 10, 5, 3, 1, 1, 0, 0};

  typedef struct packed {
    logic               v;
    logic               neg;   // result must be negated (quadrant 2 or 3)
    logic signed [15:0] x;
    logic signed [15:0] y;
    logic signed [15:0] z;
  } cstage_t;

  cstage_t pipe [STAGES+1];

  // Stage 0: quadrant folding of the input angle.
  logic signed [15:0] z_ext;
  logic [1:0]         quad;
  assign z_ext = {z_ang[14], z_ang};
  assign quad  = z_ang[14:13];

  always_ff @(posedge clk) begin
    if (rst) begin
      pipe[0].v <= 1'b0;
    end else begin
      pipe[0].v <= in_valid;
    end
    pipe[0].x <= 16'(X_INIT);
    pipe[0].y <= '0;
    unique case (quad)
      2'd1:    begin pipe[0].z <= z_ext - 16'sd16384; pipe[0].neg <= 1'b1; end
      2'd2:    begin pipe[0].z <= z_ext + 16'sd16384; pipe[0].neg <= 1'b1; end
      default: begin pipe[0].z <= z_ext;              pipe[0].neg <= 1'b0; end
    endcase
  end

  // Stages 1..STAGES: micro-rotation k = stage-1.
  for (genvar k = 0; k < STAGES; k++) begin : g_rot
    always_ff @(posedge clk) begin
      if (rst) begin
        pipe[k+1].v <= 1'b0;
      end else begin
        pipe[k+1].v <= pipe[k].v;
      end
      pipe[k+1].neg <= pipe[k].neg;
      if (pipe[k].z >= 0) begin
        pipe[k+1].x <= pipe[k].x - (pipe[k].y >>> k);
        pipe[k+1].y <= pipe[k].y + (pipe[k].x >>> k);
        pipe[k+1].z <= pipe[k].z - 16'(ZVAL[k]);
      end else begin
        pipe[k+1].x <= pipe[k].x + (pipe[k].y >>> k);
        pipe[k+1].y <= pipe[k].y - (pipe[k].x >>> k);
        pipe[k+1].z <= pipe[k].z + 16'(ZVAL[k]);
      end
    end
  end

  assign out_valid = pipe[STAGES].v;
  assign x_cos     = pipe[STAGES].neg ? -pipe[STAGES].x : pipe[STAGES].x;
  assign y_sin     = pipe[STAGES].neg ? -pipe[STAGES].y : pipe[STAGES].y;

  initial begin
    assert (STAGES >= 1 && STAGES <= 16) else $error("STAGES must be 1..16");
  end

endmodule
