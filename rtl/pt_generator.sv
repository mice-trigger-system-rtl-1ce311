// pt_generator: Particle Trigger Request (PTR) and Particle Trigger (PT).
//
// The TOF condition is the OR of the conditions of the stations that are
// enabled by their configuration. The global condition (2-bit field of the
// Particle Trigger Generator Control register) adds the GVA counter
// (bit 0) and the pulser (bit 1) to it with OR. A PTR is issued on every
// rising edge of the global condition, that is every time the trigger
// condition becomes satisfied.
//
// A PTR becomes a PT only
//   - while the DAQ Spill Gate is open,
//   - outside the veto that follows the last accepted PT: `veto_len`
//     clocks (10 ns units) after a PT, PTRs are rejected,
//   - while the external (tracker) veto is low, if it is enabled,
//   - while the event builder can store one more particle record (`ready`).
// The first three rules follow the register descriptions; the OR between
// stations and the `ready` rule are this design's choices.
//
// Timing: all inputs are registered or synchronised signals. `ptr` and `pt`
// are registered one clock after the condition rises. The veto counts from
// the clock in which `pt` is high: PTRs in the next `veto_len` clocks are
// rejected. `rej_*` are one-clock strobes telling why a PTR was lost.
module pt_generator
  import mice_trig_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic [N_STATIONS-1:0] st_cond,     // station conditions
  input  logic [N_STATIONS-1:0] st_enabled,  // station enabled by its cfg
  input  logic                  gva,         // GVA counter hit (level)
  input  logic                  pulser,      // pulser pulse
  input  logic [1:0]            global_cond, // bit0: OR GVA, bit1: OR pulser
  input  logic                  spill_gate,
  input  logic [31:0]           veto_len,    // 10 ns units
  input  logic                  ext_veto,
  input  logic                  ext_veto_en,
  input  logic                  ready,       // room for one more record
  output logic                  ptr,
  output logic                  pt,
  output logic                  rej_gate,    // PTR outside the spill gate
  output logic                  rej_veto,    // PTR inside PT veto
  output logic                  rej_ext,     // PTR under external veto
  output logic                  rej_full     // PTR while builder not ready
);
  logic        tof_cond, cond, cond_q, ptr_c;
  logic [31:0] veto_cnt;
  logic        in_veto, ext_block;

  always_comb begin
    tof_cond  = |(st_cond & st_enabled);
    cond      = tof_cond | (global_cond[0] & gva) | (global_cond[1] & pulser);
    ptr_c     = cond & ~cond_q;
    in_veto   = (veto_cnt != 0);
    ext_block = ext_veto_en & ext_veto;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cond_q   <= 1'b0;
      ptr      <= 1'b0;
      pt       <= 1'b0;
      veto_cnt <= '0;
      rej_gate <= 1'b0;
      rej_veto <= 1'b0;
      rej_ext  <= 1'b0;
      rej_full <= 1'b0;
    end else begin
      cond_q   <= cond;
      ptr      <= ptr_c;
      pt       <= 1'b0;
      rej_gate <= 1'b0;
      rej_veto <= 1'b0;
      rej_ext  <= 1'b0;
      rej_full <= 1'b0;
      if (in_veto) veto_cnt <= veto_cnt - 1'b1;
      if (ptr_c) begin
        if (!spill_gate)     rej_gate <= 1'b1;
        else if (in_veto)    rej_veto <= 1'b1;
        else if (ext_block)  rej_ext  <= 1'b1;
        else if (!ready)     rej_full <= 1'b1;
        else begin
          pt       <= 1'b1;
          veto_cnt <= veto_len;
        end
      end
    end
  end

  // A PT is always a PTR of the same clock.
  a_pt_is_ptr: assert property (@(posedge clk) disable iff (rst) pt |-> ptr);
endmodule
