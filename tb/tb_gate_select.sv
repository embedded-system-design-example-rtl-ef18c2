// tb_gate_select -- self-checking test of the gate-signal former.
//
// Applies every combination of the four step-mode signals that the stepping
// sequence produces (plus random PWM inputs) in step mode, and every PWM
// input combination in continuous mode, and checks the eight registered
// gate outputs one clock later: in step mode the diagonal transistors must
// follow each other (a2n = a1p, a2p = a1n, b2n = b1p, b2p = b1n), in
// continuous mode each half bridge must be complementary to its PWM signal.
// Reset must switch all gates off.
module tb_gate_select;
  import scif_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  drive_mode_t mode;
  logic        st_a1p, st_a1n, st_b1p, st_b1n;
  logic [3:0]  pwm_s;
  gates_t      gates;
  int          checks = 0, failures = 0;

  gate_select dut (.clk, .rst, .mode, .st_a1p, .st_a1n, .st_b1p, .st_b1n, .pwm_s, .gates);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Step-sequence patterns {a1p, a1n, b1p, b1n} of states 0..7.
  logic [3:0] seq [8] = '{4'b0001, 4'b1001, 4'b1000, 4'b1010,
                          4'b0010, 4'b0110, 4'b0100, 4'b0101};

  task automatic apply_check(input drive_mode_t m, input logic [3:0] st, input logic [3:0] p);
    logic [7:0] exp_g;   // a1p a1n a2p a2n b1p b1n b2p b2n
    @(negedge clk) begin
      mode = m; {st_a1p, st_a1n, st_b1p, st_b1n} = st; pwm_s = p;
    end
    if (m == MODE_STEP)
      exp_g = {st[3], st[2], st[2], st[3], st[1], st[0], st[0], st[1]};
    else
      exp_g = {p[0], !p[0], p[1], !p[1], p[2], !p[2], p[3], !p[3]};
    @(posedge clk);
    #1;
    checks++;
    if (gates != exp_g) begin
      failures++;
      $display("FAIL mode=%0d st=%b pwm=%b gates=%b expected %b", m, st, p, gates, exp_g);
    end
  endtask

  initial begin
    rst = 1'b1; mode = MODE_CONT; {st_a1p, st_a1n, st_b1p, st_b1n} = '0; pwm_s = '1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (gates != '0) begin
      failures++;
      $display("FAIL: gates not off in reset");
    end
    @(negedge clk) rst = 1'b0;
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < 8; k++) apply_check(MODE_STEP, seq[k], 4'($urandom));
      for (int p = 0; p < 16; p++) apply_check(MODE_CONT, 4'($urandom), 4'(p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
