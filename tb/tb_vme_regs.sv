// tb_vme_regs: self-checking test of the register map.
//
// Checks over the local bus: the reset value of every configuration
// register, write and read back (only defined bits kept), that read-only
// registers ignore writes, the status, counter and busy time registers
// (fed with known values), the firmware version word, the software cycle
// start strobe and its returned spill number, the readout window (each read
// is a buffer pop and returns the buffer word) and the module reset, which
// is fed back as a reset the way the engine top does it.
module tb_vme_regs;
  import mice_trig_pkg::*;

  logic clk = 1'b0, rst_in = 1'b1, rst;
  logic [15:0] addr = '0;
  logic wr = 0, rd = 0;
  logic [31:0] wdata = '0, rdata;
  logic rvalid;
  logic [4:0] geo;
  logic [31:0] veto_len, sg_open, sg_close;
  sg_ctrl_t sg_ctrl;
  pt_ctrl_t pt_ctrl;
  logic [N_STATIONS-1:0][PAT_W-1:0] tof_mask;
  logic soft_rst, sw_start, fifo_rd;
  logic [31:0] fifo_rdata = 32'hDEAD_0000;
  logic [12:0] fifo_used = 13'd1234;
  cyc_state_t cyc_state = CYC_GATE;
  logic [31:0] n_triggers = 32'd600, n_words = 32'd1802, n_spills = 32'd42;
  logic [N_BUSY-1:0][15:0] busy_time;
  int checks = 0, failures = 0;
  int n_sw = 0, n_pop = 0;

  always #5 clk = ~clk;
  assign rst = rst_in | soft_rst;

  vme_regs dut (.clk, .rst, .bus_addr(addr), .bus_wr(wr), .bus_rd(rd),
                .bus_wdata(wdata), .rdata, .rvalid, .geo, .veto_len, .sg_open,
                .sg_close, .sg_ctrl, .pt_ctrl, .tof_mask, .soft_rst, .sw_start,
                .fifo_rd, .fifo_rdata, .fifo_used, .cyc_state, .n_triggers,
                .n_words, .n_spills, .busy_time);

  initial for (int i = 0; i < N_BUSY; i++) busy_time[i] = 16'(16'h1100 * (i + 1) + i);

  // buffer stand-in: each pop presents the next word from its register
  always @(posedge clk) begin
    if (fifo_rd) begin fifo_rdata <= fifo_rdata + 1; n_pop++; end
    if (sw_start) n_sw++;
  end

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  task automatic bus_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; rd = 1;
    @(negedge clk); rd = 0;
    if (!rvalid) begin failures++; $display("FAIL no rvalid"); end
    d = rdata;
  endtask

  task automatic expect_read(input logic [15:0] a, input logic [31:0] e, input string nm);
    logic [31:0] d;
    bus_read(a, d);
    checks++;
    if (d !== e) begin failures++; $display("FAIL %s @%h: %h exp %h", nm, a, d, e); end
  endtask

  task automatic check_defaults();
    expect_read(A_VETO_LEN,  32'h1E,    "veto default");
    expect_read(A_SG_OPEN,   32'h7F,    "open default");
    expect_read(A_SG_CLOSE,  32'hFF,    "close default");
    expect_read(A_SG_CTRL,   32'h0F,    "sg ctrl default");
    expect_read(A_PT_CTRL,   32'h18,    "pt ctrl default");
    expect_read(A_TOF0_MASK, 32'hFFFFF, "tof0 mask default");
    expect_read(A_TOF1_MASK, 32'hFFFFF, "tof1 mask default");
    expect_read(A_TOF2_MASK, 32'hFFFFF, "tof2 mask default");
    expect_read(A_GEO,       32'h0,     "geo default");
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_in = 0;
    check_defaults();
    // write and read back
    bus_write(A_VETO_LEN, 32'h0000_0123);  expect_read(A_VETO_LEN, 32'h123, "veto");
    bus_write(A_SG_OPEN,  32'h0001_0000);  expect_read(A_SG_OPEN, 32'h10000, "open");
    bus_write(A_SG_CLOSE, 32'h0002_0000);  expect_read(A_SG_CLOSE, 32'h20000, "close");
    bus_write(A_SG_CTRL,  32'hFFFF_FFFF);  expect_read(A_SG_CTRL, 32'h1000_3F1F, "sg ctrl bits");
    bus_write(A_PT_CTRL,  32'hFFFF_B407);  expect_read(A_PT_CTRL, 32'h0000_B407, "pt ctrl bits");
    bus_write(A_TOF0_MASK, 32'hFFF1_2345); expect_read(A_TOF0_MASK, 32'h1_2345, "tof0 mask");
    bus_write(A_TOF1_MASK, 32'h0006_7890); expect_read(A_TOF1_MASK, 32'h6_7890, "tof1 mask");
    bus_write(A_TOF2_MASK, 32'h000A_BCDE); expect_read(A_TOF2_MASK, 32'hA_BCDE, "tof2 mask");
    bus_write(A_GEO, 32'h0000_0015);       expect_read(A_GEO, 32'h15, "geo");
    // outputs follow the registers
    checks++;
    if (!(geo == 5'h15 && veto_len == 32'h123 && sg_ctrl.ext_veto_en && sg_ctrl.busy_en == 6'h3F
          && pt_ctrl.pulser_freq == 3'b110 && pt_ctrl.pulser_rand == 2'b10
          && pt_ctrl.global_cond == 2'b10 && pt_ctrl.tof0_cfg == 3'b111
          && tof_mask[1] == 20'h6_7890)) begin
      failures++; $display("FAIL register outputs");
    end
    // read-only registers
    bus_write(A_N_TRIGGERS, 32'h5555_5555);
    expect_read(A_N_TRIGGERS, 32'd600, "triggers");
    expect_read(A_N_WORDS, 32'd1802, "words");
    expect_read(A_N_SPILLS, 32'd42, "spills");
    expect_read(A_STATUS, {16'd1234, 12'd0, 4'(CYC_GATE)}, "status");
    expect_read(A_FW_VERSION, {24'd0, 4'h0, 4'h1}, "firmware version");
    expect_read(A_BUSY01, {busy_time[1], busy_time[0]}, "busy 0,1");
    expect_read(A_BUSY23, {busy_time[3], busy_time[2]}, "busy 2,3");
    expect_read(A_BUSY45, {busy_time[5], busy_time[4]}, "busy 4,5");
    expect_read(16'h1044, 32'd0, "undefined address");
    // software cycle start
    expect_read(A_SW_START, 32'd42, "software start returns next spill");
    checks++;
    if (n_sw != 1) begin failures++; $display("FAIL sw_start count %0d", n_sw); end
    // readout window: a block of reads pops consecutive words
    for (int i = 0; i < 8; i++)
      expect_read(16'(i * 4), 32'hDEAD_0001 + 32'(i), "buffer word");
    expect_read(16'h0FFC, 32'hDEAD_0009, "buffer word at window end");
    checks++;
    if (n_pop != 9 || n_sw != 1) begin failures++; $display("FAIL pops %0d", n_pop); end
    // module reset
    bus_write(A_MODULE_RESET, 32'h0);
    repeat (3) @(negedge clk);
    check_defaults();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
