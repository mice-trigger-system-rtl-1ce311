// tb_busy_timer: self-checking test of the readout busy length counter.
//
// Raises the busy input for a number of clocks and checks the counted
// length against floor(length / UNIT_CYCLES), with a small unit so that
// the test is short, then checks that the value holds after busy falls,
// that a new busy clears it and that the counter saturates at 0xFFFF.
module tb_busy_timer;
  localparam int unsigned UNIT = 8;

  logic clk = 1'b0, rst = 1'b1, busy = 1'b0;
  logic [15:0] busy_time;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  busy_timer #(.UNIT_CYCLES(UNIT)) dut (.clk, .rst, .busy, .busy_time);

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] exp, input string what);
    checks++;
    if (busy_time !== exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, busy_time, exp);
    end
  endtask

  task automatic busy_for(input int n);
    @(negedge clk) busy = 1'b1;
    repeat (n) @(negedge clk);
    busy = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    check(16'd0, "after reset");
    for (int k = 0; k < 30; k++) begin
      int n = 1 + int'($urandom % 200);
      busy_for(n);
      check(16'(n / UNIT), $sformatf("busy of %0d clocks", n));
      repeat (50) @(negedge clk);
      check(16'(n / UNIT), "value holds");
    end
    // saturation: 0xFFFF units and more
    busy_for(UNIT * 65535 + 3 * UNIT);
    check(16'hFFFF, "saturation");
    busy_for(UNIT * 2);
    check(16'd2, "cleared by the next busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
