// tof_station: trigger logic of one time-of-flight (TOF) station.
//
// A station has two planes of 10 scintillator slabs, each slab read by a
// photomultiplier (PMT) at both ends. The two ends arrive on separate
// connectors: `pmt_sb` carries the South/Bottom PMTs and `pmt_nt` the
// North/Top PMTs, bit i of both belonging to the same slab. A slab is hit
// when both its PMTs fire in the same clock cycle. Bits [9:0] of the 20-bit
// pattern are the vertical plane and bits [19:10] the horizontal plane.
//
// The station condition is formed from the hit slabs that the mask register
// lets through, according to the 3-bit configuration:
//   000 station off, 001 vertical plane, 010 horizontal plane,
//   011 vertical OR horizontal, 111 vertical AND horizontal.
// The other codes are not defined for the register; they switch the station
// off here.
//
// Timing: inputs are taken as already synchronised; `pattern` and `cond`
// are registered, one clock after the inputs. `enabled` is combinational
// from `cfg`.
module tof_station
  import mice_trig_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [PAT_W-1:0] pmt_sb,   // South/Bottom PMT of each slab
  input  logic [PAT_W-1:0] pmt_nt,   // North/Top PMT of each slab
  input  logic [PAT_W-1:0] mask,     // 1 = slab takes part in the condition
  input  logic [2:0]       cfg,      // station trigger logic configuration
  output logic [PAT_W-1:0] pattern,  // coincidence pattern, unmasked
  output logic             cond,     // station trigger condition
  output logic             enabled   // station takes part in the trigger
);
  logic [PAT_W-1:0] coinc;
  logic             v_hit, h_hit, c;

  always_comb begin
    coinc = pmt_sb & pmt_nt;
    v_hit = |(coinc[N_SLABS-1:0]     & mask[N_SLABS-1:0]);
    h_hit = |(coinc[PAT_W-1:N_SLABS] & mask[PAT_W-1:N_SLABS]);
    unique case (cfg)
      TOF_OFF:   c = 1'b0;
      TOF_V:     c = v_hit;
      TOF_H:     c = h_hit;
      TOF_V_OR:  c = v_hit | h_hit;
      TOF_V_AND: c = v_hit & h_hit;
      default:   c = 1'b0;
    endcase
  end

  assign enabled = (cfg == TOF_V) || (cfg == TOF_H) ||
                   (cfg == TOF_V_OR) || (cfg == TOF_V_AND);

  always_ff @(posedge clk) begin
    if (rst) begin
      pattern <= '0;
      cond    <= 1'b0;
    end else begin
      pattern <= coinc;
      cond    <= c;
    end
  end
endmodule
