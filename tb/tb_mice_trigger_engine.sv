// tb_mice_trigger_engine: end-to-end test of the trigger engine at its
// default parameters.
//
// The testbench drives the front panel (TOF PMTs, GVA, Machine Start,
// external gate and veto, readout busies) and the register bus like the DAQ
// would, and watches the DAQ control and trigger outputs. It keeps its own
// record of every PT it sees: its time from the first clock of the Spill
// Gate and the TOF coincidence patterns (the PMT inputs ANDed, three clocks
// earlier: two synchroniser clocks and the station register). Each spill is
// then read back through the readout window and compared word by word with
// header, records and trailer built from that record.
//
// Spills run:
//   0  Machine Start, reset configuration (TOF1, 1.27-2.55 us gate, 300 ns
//      veto): one PTR before the gate, two PTs, one PTR inside the veto,
//      a hit in a disabled station
//   1  software start, TOF0 V AND H, TOF2 vertical with a masked slab,
//      GVA OR'ed in, external veto, readout busy 0 enabled
//   2  pulser only, 500 kHz
//   3  GVA toggling every clock, no readout: 1024-trigger limit
//   4  the same again: the 4096-word buffer fills, PTs are refused
//   5  external Spill Gate mode
// then a module reset. Every mechanism (starts, the five outputs, busy
// wait, PTR/PT, the four reject reasons, the trigger limit, buffer full,
// external gate, module reset, busy timer, pulser) is counted, and one that
// never happened is a failure.
module tb_mice_trigger_engine;
  import mice_trig_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] addr = '0;
  logic wr = 0, rd = 0;
  logic [31:0] wdata = '0, rdata;
  logic rvalid;
  logic [N_STATIONS-1:0][PAT_W-1:0] sb = '0, nt = '0;
  logic gva = 0, mstart = 0, ext_gate_in = 0, ext_veto = 0;
  logic [N_BUSY-1:0] busy = '0;
  logic sos, gate, dtrig, eos, calib, ptr, pt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mice_trigger_engine dut (
    .clk, .rst_n, .bus_addr(addr), .bus_wr(wr), .bus_rd(rd), .bus_wdata(wdata),
    .bus_rdata(rdata), .bus_rvalid(rvalid), .tof_sb(sb), .tof_nt(nt), .gva,
    .machine_start(mstart), .ext_spill_gate(ext_gate_in), .ext_veto,
    .readout_busy(busy), .start_of_spill(sos), .spill_gate(gate),
    .daq_trigger(dtrig), .end_of_spill(eos), .calib_trigger(calib), .ptr, .pt);

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------ observation
  typedef struct {
    int unsigned t;
    logic [PAT_W-1:0] p[3];
  } ev_t;
  ev_t spill_pts[$][$];          // PTs of each spill, as seen on the pins
  int  cur_spill = -1;
  int  cyc = 0, gate_t0 = 0;
  logic [N_STATIONS-1:0][PAT_W-1:0] coinc_d[3];   // PMT AND, delayed
  logic gate_q = 0, dtrig_q = 0;
  int n_sos = 0, n_gate = 0, n_dtrig = 0, n_eos = 0, n_calib = 0, n_ptr = 0, n_pt = 0;
  int n_rej_gate = 0, n_rej_veto = 0, n_rej_ext = 0, n_rej_full = 0;
  int dtrig_end = 0, eos_start = 0, n_busy_wait = 0;
  logic eos_q = 0;

  always @(posedge clk) if (rst_n && !dut.rst) begin   // not during reset
    cyc <= cyc + 1;
    coinc_d[0] <= sb & nt;
    coinc_d[1] <= coinc_d[0];
    coinc_d[2] <= coinc_d[1];
    gate_q <= gate; dtrig_q <= dtrig; eos_q <= eos;
    if (gate && !gate_q) begin
      ev_t none[$];
      gate_t0 = cyc;
      cur_spill++;
      spill_pts.push_back(none);
      n_gate++;
    end
    if (pt) begin
      ev_t e;
      e.t = cyc - gate_t0;
      for (int s = 0; s < 3; s++) e.p[s] = coinc_d[2][s];
      spill_pts[cur_spill].push_back(e);
    end
    if (sos && !$past(sos)) n_sos++;
    if (dtrig && !dtrig_q) n_dtrig++;
    if (!dtrig && dtrig_q) dtrig_end = cyc;
    if (eos && !eos_q) begin
      n_eos++;
      if (cyc - dtrig_end > 40) n_busy_wait++;   // held up by a busy
    end
    if (calib && !$past(calib)) n_calib++;
    n_ptr += int'(ptr);
    n_pt  += int'(pt);
    n_rej_gate += int'(dut.rej_gate);
    n_rej_veto += int'(dut.rej_veto);
    n_rej_ext  += int'(dut.rej_ext);
    n_rej_full += int'(dut.rej_full);
  end

  // -------------------------------------------------------------- bus
  task automatic bus_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  task automatic bus_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; rd = 1;
    @(negedge clk); rd = 0;
    d = rdata;
    if (!rvalid) begin failures++; $display("FAIL rvalid"); end
  endtask

  task automatic expect_reg(input logic [15:0] a, input logic [31:0] e, input string nm);
    logic [31:0] d;
    bus_read(a, d);
    check(d === e, $sformatf("%s: %h exp %h", nm, d, e));
  endtask

  // read one spill from the buffer and compare with what was seen
  task automatic read_spill(input int s, input logic [4:0] geo, input int exp_n);
    logic [31:0] d;
    logic [35:0] tag;
    int n = spill_pts[s].size();
    if (exp_n >= 0) check(n == exp_n, $sformatf("spill %0d: %0d PTs exp %0d", s, n, exp_n));
    bus_read(16'h0000, d);
    check(d == spill_header(geo, 16'(s)), $sformatf("spill %0d header %h", s, d));
    for (int i = 0; i < n; i++) begin
      ev_t e = spill_pts[s][i];
      tag = {ID_PARTICLE, 10'(i), 22'(e.t)};
      for (int w = 0; w < 3; w++) begin
        bus_read(16'(4 * ((3 * i + w + 1) % 1024)), d);
        check(d == {tag[35 - 12 * w -: 12], e.p[w]},
              $sformatf("spill %0d PT %0d word %0d: %h exp %h", s, i, w, d,
                        {tag[35 - 12 * w -: 12], e.p[w]}));
      end
    end
    bus_read(16'h0FFC, d);
    check(d == spill_trailer(12'(n), 16'(s)), $sformatf("spill %0d trailer %h", s, d));
  endtask

  // ------------------------------------------------------- front panel
  // hit slab `slab` of station `st` (both PMTs) for 8 clocks
  task automatic slab_hit(input int st, input int slab, input bit both = 1);
    @(negedge clk);
    sb[st][slab] = 1'b1;
    nt[st][slab] = both;
    repeat (8) @(negedge clk);
    sb[st][slab] = 1'b0;
    nt[st][slab] = 1'b0;
  endtask

  task automatic wait_clocks(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_state(input cyc_state_t st);
    do @(posedge clk); while (dut.cyc_state != st);
  endtask

  int n_sos_cycles = 0;
  int ptr0, pt0, n_limit = 0, n_extmode = 0, n_softrst = 0, n_pulser_pt = 0, n_busy_time = 0;

  initial begin
    logic [31:0] d;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (4) @(negedge clk);
    expect_reg(A_PT_CTRL, 32'h18, "PT control reset value");
    expect_reg(A_FW_VERSION, 32'h01, "firmware version");

    // ---------------- spill 0: Machine Start, reset configuration
    @(negedge clk) mstart = 1;
    fork
      begin wait_clocks(10); mstart = 0; end
      begin
        wait_clocks(30);  slab_hit(1, 3);                 // before the gate
        wait_state(CYC_GATE);
        wait_clocks(8);   slab_hit(1, 12);                // PT
        wait_clocks(2);   ptr0 = n_ptr; slab_hit(1, 4);   // inside the veto
        wait_clocks(40);  slab_hit(1, 7);                 // PT
        wait_clocks(4);   slab_hit(0, 2);                 // TOF0 disabled
        wait_clocks(4);   slab_hit(1, 9, 0);              // one PMT only
      end
    join
    wait_state(CYC_IDLE);
    check(n_pt == 2, $sformatf("spill 0: %0d PTs exp 2", n_pt));
    check(n_ptr == 4, $sformatf("spill 0: %0d PTRs exp 4", n_ptr));
    expect_reg(A_N_TRIGGERS, 32'd2, "triggers of spill 0");
    expect_reg(A_N_WORDS, 32'd8, "words of spill 0");
    expect_reg(A_STATUS, {16'd8, 12'd0, 4'(CYC_IDLE)}, "status after spill 0");
    read_spill(0, 5'd0, 2);

    // ---------------- spill 1: software start, new configuration
    bus_write(A_GEO, 32'd17);
    bus_write(A_VETO_LEN, 32'd5);
    bus_write(A_SG_OPEN, 32'd10);
    bus_write(A_SG_CLOSE, 32'd1500);
    bus_write(A_SG_CTRL, 32'h1000_010F);       // ext veto, busy 0
    bus_write(A_PT_CTRL, 32'h0000_0247);       // TOF0 V&H, TOF2 V, OR GVA
    bus_write(A_TOF2_MASK, 32'hFFFFE);         // slab 0 of TOF2 masked
    expect_reg(A_SW_START, 32'd1, "software start returns spill 1");
    wait_state(CYC_GATE);
    ptr0 = n_ptr;
    slab_hit(0, 3);                            // TOF0 vertical only: no
    wait_clocks(20); check(n_ptr == ptr0, "TOF0 V alone does not trigger");
    fork slab_hit(0, 3); slab_hit(0, 15); join // TOF0 V and H: yes
    wait_clocks(20); slab_hit(2, 0);           // masked: no
    wait_clocks(20); check(n_ptr == ptr0 + 1, "masked slab does not trigger");
    slab_hit(2, 6);                            // TOF2 V: yes
    wait_clocks(20);
    @(negedge clk) gva = 1; wait_clocks(4); gva = 0;   // GVA: yes
    wait_clocks(20);
    ext_veto = 1; wait_clocks(3);
    @(negedge clk) gva = 1; wait_clocks(4); gva = 0;   // vetoed
    wait_clocks(4); ext_veto = 0;
    wait_clocks(20);
    check(n_rej_ext == 1, "external veto rejects");
    wait_state(CYC_DAQ_TRIG);
    @(negedge clk) busy[0] = 1;
    wait_clocks(1000);
    busy[0] = 0;
    wait_state(CYC_IDLE);
    expect_reg(A_BUSY01, 32'd3, "busy 0 length, 3.2 us units");   // 1000 clocks
    if (n_busy_wait > 0) n_busy_time++;
    read_spill(1, 5'd17, 3);

    // ---------------- spill 2: pulser only, 500 kHz (200 clocks)
    bus_write(A_PT_CTRL, 32'h0000_3C00);
    bus_write(A_SG_CLOSE, 32'd2010);
    pt0 = n_pt;
    expect_reg(A_SW_START, 32'd2, "software start returns spill 2");
    wait_state(CYC_IDLE);
    n_pulser_pt = n_pt - pt0;
    check(n_pulser_pt >= 9 && n_pulser_pt <= 11, $sformatf("pulser PTs %0d", n_pulser_pt));
    read_spill(2, 5'd17, -1);

    // ---------------- spills 3 and 4: GVA every other clock, no readout
    bus_write(A_PT_CTRL, 32'h0000_0200);
    bus_write(A_VETO_LEN, 32'd0);
    bus_write(A_SG_CLOSE, 32'd6010);
    bus_write(A_SG_CTRL, 32'h0000_000F);
    for (int s = 3; s <= 4; s++) begin
      expect_reg(A_SW_START, 32'(s), "software start");
      wait_state(CYC_GATE);
      while (dut.cyc_state == CYC_GATE) begin
        @(negedge clk) gva = ~gva;
      end
      gva = 0;
      wait_state(CYC_IDLE);
    end
    check(spill_pts[3].size() == 1024, $sformatf("spill 3 limit: %0d", spill_pts[3].size()));
    if (spill_pts[3].size() == 1024) n_limit++;
    check(spill_pts[4].size() == 340, $sformatf("spill 4 until full: %0d", spill_pts[4].size()));
    expect_reg(A_STATUS, {16'd4096, 12'd0, 4'(CYC_IDLE)}, "buffer full");
    read_spill(3, 5'd17, 1024);
    read_spill(4, 5'd17, 340);
    expect_reg(A_STATUS, {16'd0, 12'd0, 4'(CYC_IDLE)}, "buffer empty");
    expect_reg(16'h0000, 32'd0, "read of empty buffer");

    // ---------------- spill 5: external Spill Gate mode
    bus_write(A_SG_CTRL, 32'h0000_001F);
    bus_write(A_PT_CTRL, 32'h0000_0018);
    bus_write(A_VETO_LEN, 32'd30);
    wait_clocks(4);
    if (dut.cyc_state == CYC_EXT) n_extmode++;
    n_sos_cycles = n_sos;
    n_sos = 0;
    expect_reg(A_SW_START, 32'd5, "start ignored in external mode");
    @(negedge clk) ext_gate_in = 1;
    wait_clocks(10); slab_hit(1, 1);
    wait_clocks(50); slab_hit(1, 11);
    wait_clocks(10);
    ext_gate_in = 0;
    wait_clocks(10);
    check(n_sos == 0, "no Start of Spill in external mode");
    read_spill(5, 5'd17, 2);

    // ---------------- module reset
    bus_write(A_MODULE_RESET, 32'h0);
    wait_clocks(4);
    expect_reg(A_SG_CTRL, 32'h0F, "control register after module reset");
    expect_reg(A_N_SPILLS, 32'd0, "spill counter after module reset");
    expect_reg(A_GEO, 32'd0, "GEO after module reset");
    n_softrst++;

    // ---------------- mechanisms
    $display("SoS %0d (before external mode) gate %0d DAQtrig %0d EoS %0d calib %0d busywait %0d",
             n_sos_cycles, n_gate, n_dtrig, n_eos, n_calib, n_busy_wait);
    $display("PTR %0d PT %0d rej gate %0d veto %0d ext %0d full %0d",
             n_ptr, n_pt, n_rej_gate, n_rej_veto, n_rej_ext, n_rej_full);
    check(n_sos_cycles == 5, $sformatf("Start of Spill pulses %0d", n_sos_cycles));
    check(n_gate == 6 && n_dtrig == 5 && n_eos == 5 && n_calib == 5,
          "DAQ cycle outputs");
    check(n_busy_wait > 0 && n_busy_time > 0, "End of Spill held by a busy");
    check(n_rej_gate > 0, "PTR outside the gate");
    check(n_rej_veto > 0, "PTR inside the veto");
    check(n_rej_ext > 0, "PTR under the external veto");
    check(n_rej_full > 0, "PTR with the buffer full");
    check(n_limit > 0 && n_extmode > 0 && n_softrst > 0 && n_pulser_pt > 0,
          "limit, external gate, reset, pulser");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
