// tb_tick_div -- self-checking test of the programmable tick divider.
//
// Measures the distance between consecutive tick pulses for several divider
// values (including 0, every clock) and the position of the first tick after
// reset; the expected distance is div+1 clocks. A divider that is lowered
// below the running count must tick on the next clock.
module tb_tick_div;
  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] div;
  logic        tick;
  int          checks = 0, failures = 0;

  tick_div #(.W(32)) dut (.clk, .rst, .div, .tick);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Wait for the next tick and return the number of clocks waited.
  task automatic wait_tick(output int n);
    n = 0;
    do begin
      @(posedge clk);
      #1 n++;
    end while (!tick);
  endtask

  int n;
  int dv [5] = '{3, 0, 1, 10, 57};

  initial begin
    rst = 1'b1;
    div = 32'd3;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait_tick(n);
    check(n == 4, $sformatf("first tick after %0d clocks, expected 4", n));
    foreach (dv[i]) begin
      @(negedge clk) div = dv[i];
      wait_tick(n);          // re-synchronise to the new value
      repeat (3) begin
        wait_tick(n);
        check(n == dv[i] + 1, $sformatf("div=%0d period %0d", dv[i], n));
      end
    end
    // lower the divider in the middle of a long count
    @(negedge clk) div = 32'd200;
    wait_tick(n);
    repeat (50) @(posedge clk);
    @(negedge clk) div = 32'd5;
    @(posedge clk);
    #1 check(tick == 1'b1, "tick right after lowering the divider");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
