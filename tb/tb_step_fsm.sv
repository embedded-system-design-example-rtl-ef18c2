// tb_step_fsm -- self-checking test of the eight-state stepping sequencer.
//
// A reference model in the testbench keeps its own position and sub-step
// index and looks the expected gate pattern up in a table written from the
// phase-current sequence (phase A: 0,+,+,+,0,-,-,- and phase B:
// -,-,0,+,+,+,0,- over states 0..7). Step pulses are applied at random
// intervals while the reference moves forward, backward and across the
// wrap of the state counter; after every clock the position, the state and
// the four gate signals are compared with the model. It also checks that the
// sequencer holds still at the reference and between step pulses.
module tb_step_fsm;
  import scif_pkg::*;
  localparam int STC = 8;

  logic           clk = 1'b0;
  logic           rst, step_en;
  logic [STC-1:0] ref_ang, s_angle;
  logic           at_ref;
  step_state_t    state;
  logic           a1p, a1n, b1p, b1n;
  int             checks = 0, failures = 0;
  int             fwd = 0, bwd = 0, holds = 0;

  step_fsm #(.STC_BITS(STC)) dut (.clk, .rst, .step_en, .ref_ang, .s_angle, .at_ref,
                                  .state, .a1p, .a1n, .b1p, .b1n);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Phase current sign per state: +1, 0, -1.
  int ia [8] = '{0, 1, 1, 1, 0, -1, -1, -1};
  int ib [8] = '{-1, -1, 0, 1, 1, 1, 0, -1};

  int model_pos;   // expected position, plain integer

  task automatic compare();
    int k;
    logic [3:0] exp_g;
    k = model_pos & 7;
    exp_g = {ia[k] > 0, ia[k] < 0, ib[k] > 0, ib[k] < 0};
    checks++;
    if (s_angle != STC'(model_pos) || state != step_state_t'(k) ||
        {a1p, a1n, b1p, b1n} != exp_g || at_ref != (STC'(model_pos) == ref_ang)) begin
      failures++;
      $display("FAIL t=%0t pos=%0d exp=%0d state=%0d gates=%b exp=%b", $time,
               s_angle, STC'(model_pos), state, {a1p, a1n, b1p, b1n}, exp_g);
    end
  endtask

  // One clock with or without a step pulse, then update model and compare.
  task automatic clock(input bit en);
    int d;
    @(negedge clk) step_en = en;
    d = int'($signed(ref_ang - STC'(model_pos)));
    @(posedge clk);
    if (en && d > 0) begin model_pos++; fwd++; end
    else if (en && d < 0) begin model_pos--; bwd++; end
    else if (en) holds++;
    #1 compare();
  endtask

  task automatic go_to(input int target, input int gap);
    @(negedge clk) begin ref_ang = STC'(target); step_en = 1'b0; end
    for (int i = 0; i < 40; i++) begin
      clock(1'b1);
      repeat (gap) clock(1'b0);
    end
  endtask

  initial begin
    rst = 1'b1; step_en = 1'b0; ref_ang = '0;
    model_pos = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    #1 compare();
    go_to(5, 2);      // forward, as in the state diagram dir = 0
    go_to(-3, 0);     // backward through the wrap of the state counter
    go_to(20, 3);     // forward across several electrical periods
    go_to(17, 1);
    for (int r = 0; r < 20; r++) begin
      @(negedge clk) begin ref_ang = STC'($urandom_range(0, 60) - 30); step_en = 1'b0; end
      repeat (80) clock($urandom_range(0, 2) == 0);
    end
    checks++;
    if (fwd == 0 || bwd == 0 || holds == 0) begin
      failures++;
      $display("FAIL: fwd=%0d bwd=%0d holds=%0d", fwd, bwd, holds);
    end
    $display("forward steps %0d, backward steps %0d, holds at reference %0d", fwd, bwd, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
