// event_builder: formats the data of one spill into the readout buffer.
//
// For every DAQ Spill Gate the builder writes
//   - a spill header (identifier 0x5, GEO number, spill number),
//   - one particle event record of three words per accepted Particle
//     Trigger (PT): identifier 0xA, the 20-bit coincidence patterns of
//     TOF0, TOF1 and TOF2, the trigger number inside the spill (10 bits) and
//     the time of the PT from the opening of the gate (22 bits, 10 ns),
//   - a spill trailer (identifier 0xF, number of accepted PTs, spill number),
// and then commits the spill so that the reader sees it whole. The word
// contents follow the readout format; the bit positions are those of
// mice_trig_pkg.
//
// It also keeps the counters read over VME: PTs and data words of the last
// spill, and spills since reset. Spills are numbered from 0, so the spill
// counter is also the number of the next spill. The header and trailer
// carry the low 16 bits of it.
//
// Flow control (this design's choice): `ready` tells the PT generator that
// one more record can be stored. It is low while a record is being written
// (three clocks), after 1024 PTs in the spill (the trigger number has 10
// bits) and when the buffer has no room for a record and the trailer. A
// spill that opens while the buffer cannot hold even a header and a trailer
// is counted but not recorded.
//
// Timing: `spill_gate`, `pt` and the patterns are registered signals. The
// header is written in the clock the gate is first seen high; a PT seen at
// clock t is written at t, t+1, t+2 with the patterns of clock t, that is
// the coincidences just after the PT; its time is t minus the gate's first
// clock. The trailer is written, and the spill committed, in the first
// clock the gate is seen low with no record pending.
module event_builder
  import mice_trig_pkg::*;
#(
  parameter int unsigned FREE_W = 13   // width of the buffer's free count
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         spill_gate,
  input  logic                         pt,
  input  logic [N_STATIONS-1:0][PAT_W-1:0] pattern,
  input  logic [4:0]                   geo,
  input  logic [FREE_W-1:0]            fifo_free,
  output logic                         ready,
  output logic                         wr_en,
  output logic [31:0]                  wr_data,
  output logic                         commit,
  output logic [31:0]                  n_triggers,   // of the last spill
  output logic [31:0]                  n_words,      // of the last spill
  output logic [31:0]                  n_spills      // since reset
);
  typedef enum logic [2:0] {EB_IDLE, EB_SPILL, EB_REC1, EB_REC2} eb_state_t;

  eb_state_t                       state;
  logic                            gate_q, recording;
  logic [TIME_W-1:0]               tcnt;
  logic [TRIG_NUM_W:0]             ntrig;     // 0 .. 1024
  logic [31:0]                     nwords;
  logic [35:0]                     tag_q;
  logic [PAT_W-1:0]                pat1_q, pat2_q;
  logic [35:0]                     tag;

  assign tag   = record_tag(ntrig[TRIG_NUM_W-1:0], tcnt);
  assign ready = (state == EB_SPILL) && recording && !pt &&
                 (ntrig < (TRIG_NUM_W+1)'(MAX_TRIGGERS)) &&
                 (fifo_free >= FREE_W'(4));

  always_comb begin
    wr_en   = 1'b0;
    wr_data = '0;
    commit  = 1'b0;
    unique case (state)
      EB_IDLE:
        if (spill_gate && !gate_q && fifo_free >= FREE_W'(2)) begin
          wr_en   = 1'b1;
          wr_data = spill_header(geo, n_spills[15:0]);
        end
      EB_SPILL:
        if (pt) begin
          wr_en   = 1'b1;
          wr_data = {tag[35:24], pattern[0]};
        end else if (!spill_gate && recording) begin
          wr_en   = 1'b1;
          wr_data = spill_trailer(12'(ntrig), n_spills[15:0]);
          commit  = 1'b1;
        end
      EB_REC1: begin
        wr_en   = 1'b1;
        wr_data = {tag_q[23:12], pat1_q};
      end
      EB_REC2: begin
        wr_en   = 1'b1;
        wr_data = {tag_q[11:0], pat2_q};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= EB_IDLE;
      gate_q     <= 1'b0;
      recording  <= 1'b0;
      tcnt       <= '0;
      ntrig      <= '0;
      nwords     <= '0;
      tag_q      <= '0;
      pat1_q     <= '0;
      pat2_q     <= '0;
      n_triggers <= '0;
      n_words    <= '0;
      n_spills   <= '0;
    end else begin
      gate_q <= spill_gate;
      if (tcnt != '1) tcnt <= tcnt + 1'b1;
      unique case (state)
        EB_IDLE:
          if (spill_gate && !gate_q) begin
            state     <= EB_SPILL;
            recording <= (fifo_free >= FREE_W'(2));
            tcnt      <= TIME_W'(1);
            ntrig     <= '0;
            nwords    <= 32'd1;
          end
        EB_SPILL:
          if (pt) begin
            state  <= EB_REC1;
            tag_q  <= tag;
            pat1_q <= pattern[1];
            pat2_q <= pattern[2];
            ntrig  <= ntrig + 1'b1;
            nwords <= nwords + 32'd3;
          end else if (!spill_gate) begin
            state      <= EB_IDLE;
            n_triggers <= 32'(ntrig);
            n_words    <= recording ? nwords + 32'd1 : 32'd0;
            n_spills   <= n_spills + 1'b1;
          end
        EB_REC1: state <= EB_REC2;
        EB_REC2: state <= EB_SPILL;
        default: state <= EB_IDLE;
      endcase
    end
  end

  a_pt_only_when_ready: assert property (@(posedge clk) disable iff (rst)
                                         pt |-> state == EB_SPILL);
endmodule
