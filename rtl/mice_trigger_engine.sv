// mice_trigger_engine: user logic of the MICE Trigger engine board.
//
// The trigger engine runs the detector DAQ cycle of the MICE experiment and
// makes its particle triggers. On Machine Start (or a software start) it
// sends Start of Spill, opens the DAQ Spill Gate for a programmed window,
// sends the DAQ Trigger that makes the readout processes read the spill,
// waits for their busies and sends End of Spill. Meanwhile the TOF0, TOF1
// and TOF2 slab coincidences, the GVA counter and a pulser form the trigger
// condition; every time it becomes true a Particle Trigger Request (PTR) is
// sent, and inside the spill gate, outside the veto after the last trigger
// and outside the external veto the PTR becomes a Particle Trigger (PT).
// Every PT is recorded with the TOF patterns and its time in the spill, and
// the spill is put as a whole into the readout buffer, read over VME.
//
// Blocks: vme_regs (register map), daq_cycle_ctrl (DAQ cycle), three
// tof_station, pulser, pt_generator (PTR/PT and vetoes), event_builder and
// readout_fifo (readout buffer), six busy_timer. The front-panel inputs
// pass a two-flop synchroniser. The block structure, the registers and the
// signals follow the description of the trigger engine; the local bus, the
// synchronisers and the reset scheme are this design's choices.
//
// Reset: `rst_n` low or a write to the module reset register resets every
// block (synchronously, one clock later). Timing: all outputs come from
// registers; a PMT coincidence gives a PTR four clocks later (two
// synchroniser clocks, the station register, the PTR register).
module mice_trigger_engine
  import mice_trig_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 100_000_000,  // 10 ns clock
  parameter int unsigned FIFO_DEPTH   = 4096,
  parameter int unsigned PULSE_CYCLES = 10,
  parameter int unsigned BUSY_GUARD   = 16,
  parameter int unsigned BUSY_UNIT    = 320,          // 3.2 us
  parameter logic [3:0]  FW_RELEASE   = 4'h1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // local register bus from the VME interface
  input  logic [15:0]                      bus_addr,
  input  logic                             bus_wr,
  input  logic                             bus_rd,
  input  logic [31:0]                      bus_wdata,
  output logic [31:0]                      bus_rdata,
  output logic                             bus_rvalid,
  // front-panel inputs
  input  logic [N_STATIONS-1:0][PAT_W-1:0] tof_sb,        // South/Bottom PMTs
  input  logic [N_STATIONS-1:0][PAT_W-1:0] tof_nt,        // North/Top PMTs
  input  logic                             gva,
  input  logic                             machine_start,
  input  logic                             ext_spill_gate, // input G1
  input  logic                             ext_veto,       // tracker veto
  input  logic [N_BUSY-1:0]                readout_busy,
  // DAQ control outputs
  output logic                             start_of_spill,
  output logic                             spill_gate,
  output logic                             daq_trigger,
  output logic                             end_of_spill,
  output logic                             calib_trigger,
  // particle trigger outputs (to the Translator board)
  output logic                             ptr,
  output logic                             pt
);
  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  // ------------------------------------------------------------- reset
  logic rst, soft_rst;
  always_ff @(posedge clk) rst <= !rst_n || soft_rst;

  // --------------------------------------------------- synchronisers
  logic [N_STATIONS-1:0][PAT_W-1:0] sb_s, nt_s;
  logic gva_s, ms_s, eg_s, ev_s;
  logic [N_BUSY-1:0] busy_s;

  sync_2ff #(.WIDTH(2 * N_STATIONS * PAT_W)) u_sync_tof (
    .clk, .rst, .d({tof_sb, tof_nt}), .q({sb_s, nt_s}));
  sync_2ff #(.WIDTH(4 + N_BUSY)) u_sync_misc (
    .clk, .rst,
    .d({gva, machine_start, ext_spill_gate, ext_veto, readout_busy}),
    .q({gva_s, ms_s, eg_s, ev_s, busy_s}));

  // --------------------------------------------------------- registers
  logic [4:0]  geo;
  logic [31:0] veto_len, sg_open, sg_close;
  sg_ctrl_t    sg_ctrl;
  pt_ctrl_t    pt_ctrl;
  logic [N_STATIONS-1:0][PAT_W-1:0] tof_mask;
  logic        sw_start, fifo_rd;
  logic [31:0] fifo_rdata;
  logic [AW:0] fifo_used, fifo_free;
  cyc_state_t  cyc_state;
  logic [31:0] n_triggers, n_words, n_spills;
  logic [N_BUSY-1:0][15:0] busy_time;

  vme_regs #(.FW_RELEASE(FW_RELEASE), .USED_W(AW + 1)) u_regs (
    .clk, .rst,
    .bus_addr, .bus_wr, .bus_rd, .bus_wdata,
    .rdata(bus_rdata), .rvalid(bus_rvalid),
    .geo, .veto_len, .sg_open, .sg_close, .sg_ctrl, .pt_ctrl, .tof_mask,
    .soft_rst, .sw_start, .fifo_rd,
    .fifo_rdata, .fifo_used, .cyc_state,
    .n_triggers, .n_words, .n_spills, .busy_time);

  // --------------------------------------------------------- DAQ cycle
  daq_cycle_ctrl #(.PULSE_CYCLES(PULSE_CYCLES), .BUSY_GUARD(BUSY_GUARD)) u_cycle (
    .clk, .rst,
    .machine_start(ms_s), .sw_start,
    .sos_en(sg_ctrl.sos_en), .eos_en(sg_ctrl.eos_en),
    .gate_en(sg_ctrl.gate_en), .calib_en(sg_ctrl.calib_en),
    .ext_gate(sg_ctrl.ext_gate), .ext_gate_in(eg_s),
    .open_dly(sg_open), .close_dly(sg_close),
    .busy(busy_s), .busy_en(sg_ctrl.busy_en),
    .start_of_spill, .spill_gate, .daq_trigger, .end_of_spill,
    .calib_trigger, .state(cyc_state));

  for (genvar i = 0; i < N_BUSY; i++) begin : g_busy
    busy_timer #(.UNIT_CYCLES(BUSY_UNIT)) u_busy (
      .clk, .rst, .busy(busy_s[i]), .busy_time(busy_time[i]));
  end

  // -------------------------------------------------- particle trigger
  logic [N_STATIONS-1:0][PAT_W-1:0] pattern;
  logic [N_STATIONS-1:0]            st_cond, st_en;
  logic [N_STATIONS-1:0][2:0]       st_cfg;
  logic pulse, ready;
  logic rej_gate, rej_veto, rej_ext, rej_full;

  assign st_cfg = {pt_ctrl.tof2_cfg, pt_ctrl.tof1_cfg, pt_ctrl.tof0_cfg};

  for (genvar s = 0; s < N_STATIONS; s++) begin : g_tof
    tof_station u_tof (
      .clk, .rst, .pmt_sb(sb_s[s]), .pmt_nt(nt_s[s]), .mask(tof_mask[s]),
      .cfg(st_cfg[s]), .pattern(pattern[s]), .cond(st_cond[s]),
      .enabled(st_en[s]));
  end

  pulser #(.CLK_HZ(CLK_HZ)) u_pulser (
    .clk, .rst, .enable(pt_ctrl.global_cond[1]),
    .freq(pt_ctrl.pulser_freq), .rand_mode(pt_ctrl.pulser_rand),
    .pulse);

  pt_generator u_ptgen (
    .clk, .rst, .st_cond, .st_enabled(st_en), .gva(gva_s), .pulser(pulse),
    .global_cond(pt_ctrl.global_cond), .spill_gate, .veto_len,
    .ext_veto(ev_s), .ext_veto_en(sg_ctrl.ext_veto_en), .ready,
    .ptr, .pt, .rej_gate, .rej_veto, .rej_ext, .rej_full);

  // --------------------------------------------------- readout buffer
  logic        wr_en, commit;
  logic [31:0] wr_data;

  event_builder #(.FREE_W(AW + 1)) u_builder (
    .clk, .rst, .spill_gate, .pt, .pattern, .geo, .fifo_free(fifo_free),
    .ready, .wr_en, .wr_data, .commit, .n_triggers, .n_words, .n_spills);

  readout_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr_en, .wr_data, .commit, .rd_en(fifo_rd),
    .rd_data(fifo_rdata), .used(fifo_used), .free(fifo_free));
endmodule
