// daq_cycle_ctrl: the trigger controller state machine of one DAQ cycle.
//
// A cycle starts on the rising edge of Machine Start or on a software start
// (a read of the Software cycle start register), and runs
//   Start of Spill -> Spill Gate -> DAQ Trigger -> readout busy -> End of Spill
// followed by a calibration trigger. A clock counter starts with the cycle;
// the Spill Gate opens when it reaches `open_dly` and closes when it
// reaches `close_dly` (10 ns units from Machine Start, as in the gate delay
// registers: the gate is high from clock `open_dly` to clock
// `close_dly` - 1 after the start, and at least one clock). The DAQ Trigger is
// sent as soon as the gate closes. The controller then waits BUSY_GUARD
// clocks for the readout processes to raise their busies and then until
// every busy enabled in `busy_en` is low, and sends End of Spill.
//
// The enable bits of the Spill Gate Generator Control register mask the
// outputs: `sos_en` Start of Spill, `eos_en` End of Spill, `gate_en` Spill
// Gate and DAQ Trigger, `calib_en` the calibration trigger. With `ext_gate`
// set the internal cycle is not run: the controller sits in CYC_EXT and the
// Spill Gate follows `ext_gate_in`; starts are ignored.
//
// The order of the signals and the meaning of the register bits follow the
// description of the DAQ cycle. Pulse length, the busy guard time and the
// place of the calibration trigger at the end of the cycle are this
// design's choices. A start that arrives while a cycle runs is ignored.
//
// Timing: `machine_start`, `ext_gate_in` and `busy` are taken as
// synchronised levels; all outputs come from registers. Start of Spill
// rises the clock after the start and lasts PULSE_CYCLES clocks, as do DAQ
// Trigger, End of Spill and the calibration trigger.
module daq_cycle_ctrl
  import mice_trig_pkg::*;
#(
  parameter int unsigned PULSE_CYCLES = 10,  // 100 ns output pulses
  parameter int unsigned BUSY_GUARD   = 16   // clocks before busy is checked
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              machine_start,
  input  logic              sw_start,
  input  logic              sos_en,
  input  logic              eos_en,
  input  logic              gate_en,
  input  logic              calib_en,
  input  logic              ext_gate,
  input  logic              ext_gate_in,
  input  logic [31:0]       open_dly,
  input  logic [31:0]       close_dly,
  input  logic [N_BUSY-1:0] busy,
  input  logic [N_BUSY-1:0] busy_en,
  output logic              start_of_spill,
  output logic              spill_gate,
  output logic              daq_trigger,
  output logic              end_of_spill,
  output logic              calib_trigger,
  output cyc_state_t        state
);
  localparam int unsigned PCW = $clog2(PULSE_CYCLES + BUSY_GUARD + 1);

  logic        ms_q, start;
  logic [31:0] timer;
  logic [PCW-1:0] pcnt;      // pulse / guard counter of the current state
  logic [PCW-1:0] sos_cnt;   // Start of Spill runs beside the gate wait
  logic        busy_any;
  logic [32:0] timer_nx;  // time of the next clock

  assign start    = (machine_start && !ms_q) || sw_start;
  assign busy_any = |(busy & busy_en);
  assign timer_nx = {1'b0, timer} + 33'd1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= CYC_IDLE;
      ms_q    <= 1'b0;
      timer   <= '0;
      pcnt    <= '0;
      sos_cnt <= '0;
    end else begin
      ms_q  <= machine_start;
      timer <= timer + 1'b1;
      if (sos_cnt != 0) sos_cnt <= sos_cnt - 1'b1;
      if (pcnt != 0)    pcnt    <= pcnt - 1'b1;
      unique case (state)
        CYC_IDLE: begin
          if (ext_gate) begin
            state <= CYC_EXT;
          end else if (start) begin
            state   <= CYC_WAIT_OPEN;
            timer   <= 32'd1;   // the start clock is time 0
            sos_cnt <= PCW'(PULSE_CYCLES);
          end
        end
        CYC_WAIT_OPEN:
          if (timer_nx >= {1'b0, open_dly}) state <= CYC_GATE;
        CYC_GATE:
          if (timer_nx >= {1'b0, close_dly}) begin
            state <= CYC_DAQ_TRIG;
            pcnt  <= PCW'(PULSE_CYCLES - 1);
          end
        CYC_DAQ_TRIG:
          if (pcnt == 0) begin
            state <= CYC_BUSY;
            pcnt  <= PCW'(BUSY_GUARD);
          end
        CYC_BUSY:
          if (pcnt == 0 && !busy_any) begin
            state <= CYC_EOS;
            pcnt  <= PCW'(PULSE_CYCLES - 1);
          end
        CYC_EOS:
          if (pcnt == 0) begin
            state <= CYC_CALIB;
            pcnt  <= PCW'(PULSE_CYCLES - 1);
          end
        CYC_CALIB:
          if (pcnt == 0) state <= CYC_IDLE;
        CYC_EXT:
          if (!ext_gate) state <= CYC_IDLE;
        default: state <= CYC_IDLE;
      endcase
    end
  end

  always_comb begin
    start_of_spill = sos_en && (sos_cnt != 0);
    spill_gate     = (state == CYC_EXT) ? ext_gate_in
                                        : (gate_en && state == CYC_GATE);
    daq_trigger    = gate_en  && (state == CYC_DAQ_TRIG);
    end_of_spill   = eos_en   && (state == CYC_EOS);
    calib_trigger  = calib_en && (state == CYC_CALIB);
  end
endmodule
