// tb_daq_cycle_ctrl: self-checking test of the DAQ cycle state machine.
//
// Runs DAQ cycles and records, for each output, the first and last clock it
// is high counted from the clock of the start (clock 0). The expected
// windows follow from the register meaning: Start of Spill 1..10 (10-clock
// pulses), Spill Gate open_dly .. close_dly-1, DAQ Trigger close_dly ..
// close_dly+9, End of Spill the clock after the enabled busies are low (but
// not before the 16-clock guard), then the calibration trigger. It also
// checks the reset values of the gate delays (127 / 255 clocks) on a
// Machine Start, the enable bits, that a start during a cycle is ignored
// and the external Spill Gate mode.
module tb_daq_cycle_ctrl;
  import mice_trig_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic machine_start = 0, sw_start = 0;
  logic sos_en = 1, eos_en = 1, gate_en = 1, calib_en = 1, ext_gate = 0, ext_gate_in = 0;
  logic [31:0] open_dly = 32'd20, close_dly = 32'd50;
  logic [N_BUSY-1:0] busy = '0, busy_en = '0;
  logic sos, gate, dtrig, eos, calib;
  cyc_state_t state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  daq_cycle_ctrl dut (.clk, .rst, .machine_start, .sw_start, .sos_en, .eos_en,
                      .gate_en, .calib_en, .ext_gate, .ext_gate_in, .open_dly,
                      .close_dly, .busy, .busy_en, .start_of_spill(sos),
                      .spill_gate(gate), .daq_trigger(dtrig),
                      .end_of_spill(eos), .calib_trigger(calib), .state);

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // window recorder: first/last clock (from start) each output is high
  int k;
  int first[5], last[5], n_high[5];
  task automatic clear_windows();
    for (int i = 0; i < 5; i++) begin first[i] = -1; last[i] = -1; n_high[i] = 0; end
  endtask
  always @(posedge clk) begin
    logic [4:0] o;
    o = {calib, eos, dtrig, gate, sos};
    for (int i = 0; i < 5; i++) if (o[i]) begin
      if (first[i] < 0) first[i] = k;
      last[i] = k;
      n_high[i]++;
    end
    k <= k + 1;
  end

  task automatic check_win(input int i, input int f, input int l, input string nm);
    checks++;
    if (first[i] != f || last[i] != l || (f >= 0 && n_high[i] != l - f + 1)) begin
      failures++;
      $display("FAIL %s window %0d..%0d (%0d clocks) exp %0d..%0d",
               nm, first[i], last[i], n_high[i], f, l);
    end
  endtask

  // one-clock software start at clock 0
  task automatic do_sw_start();
    @(negedge clk);
    sw_start = 1;
    clear_windows();
    k = 0;             // this clock is clock 0
    @(negedge clk);
    sw_start = 0;
  endtask

  task automatic wait_idle();
    @(posedge clk); #1;
    while (state != CYC_IDLE) begin @(posedge clk); #1; end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    clear_windows();
    k = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);

    // 1. software start, busy 0 enabled and busy from clock 55 to 199
    busy_en = 6'b000001;
    do_sw_start();
    fork
      begin
        wait (k == 54); @(negedge clk) busy[0] = 1;
        wait (k == 199); @(negedge clk) busy[0] = 0;
      end
    join_none
    // a start while the cycle runs is ignored
    wait (k == 30); @(negedge clk) sw_start = 1; @(negedge clk) sw_start = 0;
    wait_idle();
    check_win(0, 1, 10, "SoS");
    check_win(1, 20, 49, "gate");
    check_win(2, 50, 59, "DAQ trigger");
    // busy is low from clock 199 on
    check_win(3, 200, 209, "EoS after busy");
    check_win(4, 210, 219, "calib");

    // 2. busy disabled: EoS right after the guard (DAQ trigger ends at 59,
    //    guard 60..76, EoS 77..86)
    busy_en = '0; busy = 6'b111111;
    do_sw_start();
    wait_idle();
    check_win(3, 77, 86, "EoS with busies disabled");
    busy = '0;

    // 3. Machine Start with the reset values of the delays
    open_dly = D_SG_OPEN; close_dly = D_SG_CLOSE;
    // the clock in which the (synchronised) level rises is clock 0
    @(negedge clk) machine_start = 1; clear_windows(); k = 0;
    wait_idle();
    machine_start = 0;
    check_win(0, 1, 10, "SoS on Machine Start");
    check_win(1, 127, 254, "gate 1.27 us .. 2.55 us");

    // 4. enables off
    open_dly = 32'd20; close_dly = 32'd50;
    sos_en = 0; eos_en = 0; gate_en = 0; calib_en = 0;
    do_sw_start();
    wait_idle();
    for (int i = 0; i < 5; i++) check_win(i, -1, -1, "disabled output");
    sos_en = 1; eos_en = 1; gate_en = 1; calib_en = 1;

    // 5. external Spill Gate mode
    @(negedge clk) ext_gate = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (state != CYC_EXT) begin failures++; $display("FAIL not in external mode"); end
    clear_windows();
    do_sw_start();
    repeat (5) @(negedge clk);
    ext_gate_in = 1;
    repeat (40) @(negedge clk);
    ext_gate_in = 0;
    repeat (5) @(negedge clk);
    check_win(0, -1, -1, "no SoS in external mode");
    checks++;
    if (n_high[1] != 40) begin failures++; $display("FAIL external gate length %0d", n_high[1]); end
    ext_gate = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (state != CYC_IDLE) begin failures++; $display("FAIL did not leave external mode"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
