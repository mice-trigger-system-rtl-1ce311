// tb_spill_600: the design load of the DAQ, 600 muon triggers in a 1 ms
// spill, run through the trigger engine at its default parameters.
//
// The Spill Gate is programmed to 1 ms (100000 clocks of 10 ns) after the
// reset-value open delay, readout busy 0 is enabled, and 600 TOF1 slab
// coincidences are placed inside the gate at random spacings of 46..246
// clocks (more than the 300 ns veto). The testbench checks that all 600
// become PTs, that the spill (header, 600 records, trailer = 1803 words)
// is read back intact with trigger numbers 0..599, the observed PT times
// and the hit slabs, that the counters read 600 triggers and 1803 words,
// and that End of Spill waits for the readout busy.
module tb_spill_600;
  import mice_trig_pkg::*;

  localparam int N_EV = 600;
  localparam int GATE_CLOCKS = 100_000;   // 1 ms

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] addr = '0;
  logic wr = 0, rd = 0;
  logic [31:0] wdata = '0, rdata;
  logic rvalid;
  logic [N_STATIONS-1:0][PAT_W-1:0] sb = '0, nt = '0;
  logic mstart = 0;
  logic [N_BUSY-1:0] busy = '0;
  logic sos, gate, dtrig, eos, calib, ptr, pt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mice_trigger_engine dut (
    .clk, .rst_n, .bus_addr(addr), .bus_wr(wr), .bus_rd(rd), .bus_wdata(wdata),
    .bus_rdata(rdata), .bus_rvalid(rvalid), .tof_sb(sb), .tof_nt(nt), .gva(1'b0),
    .machine_start(mstart), .ext_spill_gate(1'b0), .ext_veto(1'b0),
    .readout_busy(busy), .start_of_spill(sos), .spill_gate(gate),
    .daq_trigger(dtrig), .end_of_spill(eos), .calib_trigger(calib), .ptr, .pt);

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  task automatic bus_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; rd = 1;
    @(negedge clk); rd = 0;
    d = rdata;
  endtask

  // observation of PTs on the pins
  int cyc = 0, g0 = 0, n_pt = 0, dtrig_end = 0, eos_t = 0;
  int pt_time[$];
  int hit_slab[N_EV];
  logic gate_q = 0, dtrig_q = 0, eos_q = 0;
  always @(posedge clk) if (rst_n && !dut.rst) begin   // not during reset
    cyc <= cyc + 1;
    gate_q <= gate; dtrig_q <= dtrig; eos_q <= eos;
    if (gate && !gate_q) g0 = cyc;
    if (pt) begin pt_time.push_back(cyc - g0); n_pt++; end
    if (!dtrig && dtrig_q) dtrig_end = cyc;
    if (eos && !eos_q) eos_t = cyc;
  end

  initial begin
    logic [31:0] d, w[3];
    logic [35:0] tag;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    bus_write(A_SG_CLOSE, D_SG_OPEN + 32'(GATE_CLOCKS));
    bus_write(A_SG_CTRL, 32'h0000_010F);          // busy 0 enabled
    @(negedge clk) mstart = 1;
    repeat (10) @(negedge clk);
    mstart = 0;
    wait (gate);
    repeat (20) @(negedge clk);
    for (int i = 0; i < N_EV; i++) begin
      int s = int'($urandom % 20);
      hit_slab[i] = s;
      sb[1][s] = 1; nt[1][s] = 1;
      repeat (6) @(negedge clk);
      sb[1][s] = 0; nt[1][s] = 0;
      repeat (40 + int'($urandom % 201)) @(negedge clk);
    end
    check(gate, "all hits inside the 1 ms gate");
    wait (dtrig);
    @(negedge clk) busy[0] = 1;
    repeat (5000) @(negedge clk);   // 50 us readout
    busy[0] = 0;
    wait (eos);
    @(posedge clk); #1;
    check(eos_t - dtrig_end > 4900, "End of Spill after the readout busy");
    check(n_pt == N_EV, $sformatf("%0d PTs exp %0d", n_pt, N_EV));
    bus_read(A_N_TRIGGERS, d); check(d == 32'(N_EV), $sformatf("triggers register %0d", d));
    bus_read(A_N_WORDS, d);    check(d == 32'(3 * N_EV + 2), $sformatf("words register %0d", d));
    bus_read(A_STATUS, d);     check(d[31:16] == 16'(3 * N_EV + 2), "rdusedw");
    bus_read(16'h0000, d);     check(d == spill_header(5'd0, 16'd0), "header");
    for (int i = 0; i < N_EV && i < pt_time.size(); i++) begin
      for (int k = 0; k < 3; k++) bus_read(16'(4 * k), w[k]);
      tag = {w[0][31:20], w[1][31:20], w[2][31:20]};
      check(tag == {ID_PARTICLE, 10'(i), 22'(pt_time[i])},
            $sformatf("record %0d tag %h", i, tag));
      check(w[0][19:0] == 20'd0 && w[2][19:0] == 20'd0 &&
            w[1][19:0] == 20'(1 << hit_slab[i]),
            $sformatf("record %0d patterns %h %h %h", i, w[0][19:0], w[1][19:0], w[2][19:0]));
    end
    bus_read(16'h0000, d);     check(d == spill_trailer(12'(N_EV), 16'd0), $sformatf("trailer %h", d));
    bus_read(A_STATUS, d);     check(d[31:16] == 16'd0, "buffer drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
