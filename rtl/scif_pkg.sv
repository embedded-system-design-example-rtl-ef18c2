// scif_pkg -- shared types and constants of the stepper / servo motor-control IP.
//
// Holds the AXI4-Lite register map seen by the processor, the state type of
// the eight-state stepping sequence and the bundle of the eight MOSFET gate
// signals of the two H bridges. The register map offsets are byte addresses;
// register k sits at base + 4*k. Only the speed-divider and position-reference
// registers come from the design description; the mode, angle and status
// registers are this implementation's own additions for continuous mode and
// monitoring.
package scif_pkg;

  // Register indices (word offsets). Byte address = 4 * index.
  localparam int unsigned SPDIV_REG   = 0;  // step timer divider, R/W
  localparam int unsigned PREF_REG    = 1;  // position reference (sub-steps), R/W
  localparam int unsigned MODE_REG    = 2;  // bit 0: 0 = step mode, 1 = continuous (PWM) mode, R/W
  localparam int unsigned ANGLE_REG   = 3;  // continuous-mode electrical angle, 15 bit, R/W
  localparam int unsigned SANGLE_REG  = 4;  // actual position counter, read only
  localparam int unsigned NUM_REGS    = 5;

  localparam logic [1:0] AXI_RESP_OKAY   = 2'b00;
  localparam logic [1:0] AXI_RESP_SLVERR = 2'b10;

  // The eight sub-steps of one electrical period (half-step sequence).
  typedef enum logic [2:0] {
    ST0 = 3'd0, ST1 = 3'd1, ST2 = 3'd2, ST3 = 3'd3,
    ST4 = 3'd4, ST5 = 3'd5, ST6 = 3'd6, ST7 = 3'd7
  } step_state_t;

  // Gate drive of both H bridges. '1' switches the transistor on.
  typedef struct packed {
    logic a1p, a1n, a2p, a2n;
    logic b1p, b1n, b2p, b2n;
  } gates_t;

  // Operating mode of the gate outputs.
  typedef enum logic { MODE_STEP = 1'b0, MODE_CONT = 1'b1 } drive_mode_t;

endpackage
