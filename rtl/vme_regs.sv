// vme_regs: register map of the trigger engine as seen from VME.
//
// The VME slave logic of the board hands every access to the user logic as
// a single-clock strobe on a local register bus: `bus_wr` or `bus_rd` with
// the 16-bit offset from the board base address in `bus_addr`. This bus is
// this design's choice; the offsets, access modes, reset values and the
// meaning of the registers follow the address map:
//   0x0000-0x0FFC R  event readout buffer (every read pops one word, so a
//                    block transfer over the window drains the buffer)
//   0x800A        W  module reset (any write resets the whole module)
//   0x1008        R  firmware version: [7:4] board type (0), [3:0] release
//   0x100C        RW PT veto length        (reset 0x1E)
//   0x1010        RW Spill Gate open delay (reset 0x7F)
//   0x1014        RW Spill Gate close delay(reset 0xFF)
//   0x1018        RW Spill Gate Generator Control (reset 0x0F)
//   0x101C/20/24  RW TOF0/1/2 masks        (reset 0xFFFFF)
//   0x1028        RW Particle Trigger Generator Control (reset 0x18)
//   0x102C        RW GEO                   (reset 0)
//   0x1030        R  status: [31:16] rdusedw, [15:0] controller state
//   0x1034/38/3C  R  triggers and data words of the last spill, spills
//   0x1040        R  software cycle start; returns the next spill number
//   0x1060/64/68  R  busy times {1,0}, {3,2}, {5,4}, even process in [15:0]
// Only the defined bits of the configuration registers are stored; the
// others read as 0. GEO is 5 bits wide. Reads of undefined offsets return 0.
//
// Timing: `rdata` is valid, with `rvalid`, the clock after `bus_rd`.
// `fifo_rd` and `sw_start` are combinational strobes in the clock of the
// read. `soft_rst` is a registered one-clock pulse the clock after the
// write to the module reset register; the surrounding logic feeds it back
// as a reset to every block, this one included.
module vme_regs
  import mice_trig_pkg::*;
#(
  parameter logic [3:0]  FW_RELEASE = 4'h1,
  parameter int unsigned USED_W     = 13
) (
  input  logic                             clk,
  input  logic                             rst,
  // local register bus
  input  logic [15:0]                      bus_addr,
  input  logic                             bus_wr,
  input  logic                             bus_rd,
  input  logic [31:0]                      bus_wdata,
  output logic [31:0]                      rdata,
  output logic                             rvalid,
  // configuration
  output logic [4:0]                       geo,
  output logic [31:0]                      veto_len,
  output logic [31:0]                      sg_open,
  output logic [31:0]                      sg_close,
  output sg_ctrl_t                         sg_ctrl,
  output pt_ctrl_t                         pt_ctrl,
  output logic [N_STATIONS-1:0][PAT_W-1:0] tof_mask,
  // strobes
  output logic                             soft_rst,
  output logic                             sw_start,
  output logic                             fifo_rd,
  // status
  input  logic [31:0]                      fifo_rdata,
  input  logic [USED_W-1:0]                fifo_used,
  input  cyc_state_t                       cyc_state,
  input  logic [31:0]                      n_triggers,
  input  logic [31:0]                      n_words,
  input  logic [31:0]                      n_spills,
  input  logic [N_BUSY-1:0][15:0]          busy_time
);
  localparam logic [31:0] SG_CTRL_BITS = 32'h1000_3F1F;
  localparam logic [31:0] PT_CTRL_BITS = 32'h0000_FFFF;

  logic [31:0] rd_mux, reg_q;
  logic        sel_fifo_q;
  logic        in_window;

  assign in_window = (bus_addr[15:12] == 4'h0);
  assign fifo_rd   = bus_rd && in_window;
  assign sw_start  = bus_rd && (bus_addr == A_SW_START);

  always_comb begin
    unique case (bus_addr)
      A_FW_VERSION: rd_mux = {24'd0, BOARD_TRIGGER_ENGINE, FW_RELEASE};
      A_VETO_LEN:   rd_mux = veto_len;
      A_SG_OPEN:    rd_mux = sg_open;
      A_SG_CLOSE:   rd_mux = sg_close;
      A_SG_CTRL:    rd_mux = sg_ctrl;
      A_TOF0_MASK:  rd_mux = 32'(tof_mask[0]);
      A_TOF1_MASK:  rd_mux = 32'(tof_mask[1]);
      A_TOF2_MASK:  rd_mux = 32'(tof_mask[2]);
      A_PT_CTRL:    rd_mux = pt_ctrl;
      A_GEO:        rd_mux = 32'(geo);
      A_STATUS:     rd_mux = {16'(fifo_used), 12'd0, cyc_state};
      A_N_TRIGGERS: rd_mux = n_triggers;
      A_N_WORDS:    rd_mux = n_words;
      A_N_SPILLS:   rd_mux = n_spills;
      A_SW_START:   rd_mux = n_spills;
      A_BUSY01:     rd_mux = {busy_time[1], busy_time[0]};
      A_BUSY23:     rd_mux = {busy_time[3], busy_time[2]};
      A_BUSY45:     rd_mux = {busy_time[5], busy_time[4]};
      default:      rd_mux = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      geo        <= D_GEO[4:0];
      veto_len   <= D_VETO_LEN;
      sg_open    <= D_SG_OPEN;
      sg_close   <= D_SG_CLOSE;
      sg_ctrl    <= D_SG_CTRL & SG_CTRL_BITS;
      pt_ctrl    <= D_PT_CTRL & PT_CTRL_BITS;
      tof_mask   <= {N_STATIONS{D_TOF_MASK[PAT_W-1:0]}};
      soft_rst   <= 1'b0;
      rvalid     <= 1'b0;
      sel_fifo_q <= 1'b0;
      reg_q      <= '0;
    end else begin
      soft_rst   <= bus_wr && (bus_addr == A_MODULE_RESET);
      rvalid     <= bus_rd;
      sel_fifo_q <= fifo_rd;
      if (bus_rd) reg_q <= rd_mux;
      if (bus_wr) begin
        unique case (bus_addr)
          A_VETO_LEN:  veto_len    <= bus_wdata;
          A_SG_OPEN:   sg_open     <= bus_wdata;
          A_SG_CLOSE:  sg_close    <= bus_wdata;
          A_SG_CTRL:   sg_ctrl     <= bus_wdata & SG_CTRL_BITS;
          A_TOF0_MASK: tof_mask[0] <= bus_wdata[PAT_W-1:0];
          A_TOF1_MASK: tof_mask[1] <= bus_wdata[PAT_W-1:0];
          A_TOF2_MASK: tof_mask[2] <= bus_wdata[PAT_W-1:0];
          A_PT_CTRL:   pt_ctrl     <= bus_wdata & PT_CTRL_BITS;
          A_GEO:       geo         <= bus_wdata[4:0];
          default: ;
        endcase
      end
    end
  end

  // a buffer word comes from the buffer's own output register
  assign rdata = sel_fifo_q ? fifo_rdata : reg_q;

  a_one_access: assert property (@(posedge clk) disable iff (rst)
                                 !(bus_wr && bus_rd));
endmodule
