// tb_pulser: self-checking test of the programmable pulser.
//
// For each of the eight frequency codes, without randomness, checks that
// the first pulse comes P = 100 MHz / f clocks after the pulser is enabled
// and that the following pulses are exactly P clocks apart (2 kHz ->
// 50000 clocks ... 500 kHz -> 200 clocks). With random period it checks that
// every interval lies in P/2 .. 3P/2-1, that the mean is within 10 % of P
// and that the intervals vary; with random start that the first pulse
// comes within 1 .. P clocks and not always at the same time.
module tb_pulser;
  logic clk = 1'b0, rst = 1'b1, enable = 1'b0, pulse;
  logic [2:0] freq = '0;
  logic [1:0] rand_mode = '0;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  pulser dut (.clk, .rst, .enable, .freq, .rand_mode, .pulse);

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned HZ[8] = '{2_000, 5_000, 10_000, 20_000, 50_000,
                                    100_000, 200_000, 500_000};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // clocks from now until the next pulse
  task automatic wait_pulse(output longint unsigned dt);
    longint unsigned t0 = cyc;
    do @(posedge clk); while (!pulse);
    dt = cyc - t0;
  endtask

  task automatic start(input logic [2:0] f, input logic [1:0] r);
    @(negedge clk);
    enable = 1'b0;
    @(negedge clk);
    freq = f; rand_mode = r; enable = 1'b1;
  endtask

  initial begin
    longint unsigned dt, p, sum, mn, mx, first_prev;
    bit varied;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int f = 0; f < 8; f++) begin
      p = 100_000_000 / HZ[f];
      start(3'(f), 2'b00);
      wait_pulse(dt);
      check(dt == p + 1, $sformatf("code %0d first pulse after %0d exp %0d", f, dt, p + 1));
      for (int k = 0; k < 3; k++) begin
        wait_pulse(dt);
        check(dt == p, $sformatf("code %0d period %0d exp %0d", f, dt, p));
      end
    end
    // random period at 200 kHz (P = 500)
    p = 500;
    start(3'd6, 2'b10);
    wait_pulse(dt);
    sum = 0; mn = '1; mx = 0;
    for (int k = 0; k < 400; k++) begin
      wait_pulse(dt);
      sum += dt;
      if (dt < mn) mn = dt;
      if (dt > mx) mx = dt;
    end
    check(mn >= p / 2 && mx <= p + p / 2, $sformatf("random period range %0d..%0d", mn, mx));
    check(sum / 400 > p * 9 / 10 && sum / 400 < p * 11 / 10,
          $sformatf("random period mean %0d", sum / 400));
    check(mx - mn > p / 2, "random period varies");
    // random start at 50 kHz (P = 2000)
    p = 2000;
    varied = 0; first_prev = 0;
    for (int k = 0; k < 10; k++) begin
      start(3'd4, 2'b01);
      wait_pulse(dt);
      check(dt >= 2 && dt <= p + 1, $sformatf("random start %0d", dt));
      if (k > 0 && dt != first_prev) varied = 1;
      first_prev = dt;
      wait_pulse(dt);
      check(dt == p, $sformatf("period after random start %0d", dt));
    end
    check(varied, "random start varies");
    // disabled: no pulses
    @(negedge clk) enable = 1'b0;
    begin
      int n = 0;
      repeat (1000) @(posedge clk) if (pulse) n++;
      check(n == 0, "no pulse while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
