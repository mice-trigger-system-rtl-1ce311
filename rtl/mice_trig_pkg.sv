// mice_trig_pkg: types and constants shared by the MICE trigger engine.
//
// The trigger engine runs on one clock whose period is the 10 ns unit used by
// every delay, veto and time-stamp register, so one count is one clock.
// This package holds the register offsets of the address map, the reset
// values of the configuration registers, the bit layout of the two control
// registers as packed structs, the identifiers of the readout words and the
// state encoding of the DAQ cycle controller.
//
// The offsets, reset values, identifiers and the control register fields
// follow the register descriptions. Bit positions of fields whose position
// is not printed (GEO, counts in header and trailer, status register) are
// this design's choice and are documented where they are packed.
package mice_trig_pkg;

  // ---------------------------------------------------------------- general
  localparam int unsigned N_STATIONS = 3;   // TOF0, TOF1, TOF2
  localparam int unsigned N_SLABS    = 10;  // slabs per plane
  localparam int unsigned PAT_W      = 2 * N_SLABS;  // 20-bit station pattern
  localparam int unsigned N_BUSY     = 6;   // readout busy inputs 0..5

  // ---------------------------------------------------------- address map
  localparam logic [15:0] A_MODULE_RESET = 16'h800A;
  localparam logic [15:0] A_FW_VERSION   = 16'h1008;
  localparam logic [15:0] A_VETO_LEN     = 16'h100C;
  localparam logic [15:0] A_SG_OPEN      = 16'h1010;
  localparam logic [15:0] A_SG_CLOSE     = 16'h1014;
  localparam logic [15:0] A_SG_CTRL      = 16'h1018;
  localparam logic [15:0] A_TOF0_MASK    = 16'h101C;
  localparam logic [15:0] A_TOF1_MASK    = 16'h1020;
  localparam logic [15:0] A_TOF2_MASK    = 16'h1024;
  localparam logic [15:0] A_PT_CTRL      = 16'h1028;
  localparam logic [15:0] A_GEO          = 16'h102C;
  localparam logic [15:0] A_STATUS       = 16'h1030;
  localparam logic [15:0] A_N_TRIGGERS   = 16'h1034;
  localparam logic [15:0] A_N_WORDS      = 16'h1038;
  localparam logic [15:0] A_N_SPILLS     = 16'h103C;
  localparam logic [15:0] A_SW_START     = 16'h1040;
  localparam logic [15:0] A_BUSY01       = 16'h1060;
  localparam logic [15:0] A_BUSY23       = 16'h1064;
  localparam logic [15:0] A_BUSY45       = 16'h1068;
  // Event readout buffer window: base + 0x0000 .. 0x0FFC

  // -------------------------------------------------------- reset values
  localparam logic [31:0] D_VETO_LEN = 32'h0000_001E;  // 300 ns
  localparam logic [31:0] D_SG_OPEN  = 32'h0000_007F;  // 1.27 us
  localparam logic [31:0] D_SG_CLOSE = 32'h0000_00FF;  // 2.55 us
  localparam logic [31:0] D_SG_CTRL  = 32'h0000_000F;
  localparam logic [31:0] D_PT_CTRL  = 32'h0000_0018;  // TOF1: V OR H
  localparam logic [31:0] D_TOF_MASK = 32'h000F_FFFF;  // all slabs in
  localparam logic [31:0] D_GEO      = 32'h0000_0000;

  // Board type in the firmware version register: 0 = Trigger engine
  // (the Translator board reports 1).
  localparam logic [3:0] BOARD_TRIGGER_ENGINE = 4'h0;

  // ---------------------------------------- Spill Gate Generator Control
  typedef struct packed {
    logic [2:0]  unused31;
    logic        ext_veto_en;   // bit 28: external (tracker) veto
    logic [13:0] unused27;
    logic [5:0]  busy_en;       // bits 8..13: readout busy 0..5
    logic [2:0]  unused7;
    logic        ext_gate;      // bit 4: external Spill Gate at G1
    logic        calib_en;      // bit 3: calibration triggers
    logic        gate_en;       // bit 2: Spill Gate and DAQ Trigger
    logic        eos_en;        // bit 1: End of Spill
    logic        sos_en;        // bit 0: Start of Spill
  } sg_ctrl_t;

  // ---------------------------------- Particle Trigger Generator Control
  typedef struct packed {
    logic [15:0] unused31;
    logic [1:0]  pulser_rand;   // bits 14..15: randomness
    logic [2:0]  pulser_freq;   // bits 11..13: frequency code
    logic [1:0]  global_cond;   // bits 9..10: bit0 = GVA, bit1 = pulser
    logic [2:0]  tof2_cfg;      // bits 6..8
    logic [2:0]  tof1_cfg;      // bits 3..5
    logic [2:0]  tof0_cfg;      // bits 0..2
  } pt_ctrl_t;

  // Station trigger logic configuration (Table of the control register).
  localparam logic [2:0] TOF_OFF   = 3'b000;
  localparam logic [2:0] TOF_V     = 3'b001;
  localparam logic [2:0] TOF_H     = 3'b010;
  localparam logic [2:0] TOF_V_OR  = 3'b011;
  localparam logic [2:0] TOF_V_AND = 3'b111;

  // ---------------------------------------------------- readout words
  localparam logic [3:0] ID_HEADER  = 4'h5;
  localparam logic [3:0] ID_PARTICLE = 4'hA;
  localparam logic [3:0] ID_TRAILER = 4'hF;

  localparam int unsigned TRIG_NUM_W = 10;  // trigger number in the spill
  localparam int unsigned TIME_W     = 22;  // trigger time, 10 ns units
  localparam int unsigned MAX_TRIGGERS = 1 << TRIG_NUM_W;

  // Spill header:  [31:28] 0x5, [20:16] GEO, [15:0] spill number
  function automatic logic [31:0] spill_header(logic [4:0] geo, logic [15:0] spill);
    return {ID_HEADER, 7'd0, geo, spill};
  endfunction

  // Spill trailer: [31:28] 0xF, [27:16] accepted triggers, [15:0] spill number
  function automatic logic [31:0] spill_trailer(logic [11:0] ntrig, logic [15:0] spill);
    return {ID_TRAILER, ntrig, spill};
  endfunction

  // Particle event record, three words. Each word carries one station
  // pattern in [19:0] (TOF0, TOF1, TOF2). The remaining 36 bits,
  // {0xA, trigger number[9:0], time[21:0]}, fill bits [31:20] of the three
  // words from the most significant end.
  function automatic logic [35:0] record_tag(logic [TRIG_NUM_W-1:0] num,
                                             logic [TIME_W-1:0] t);
    return {ID_PARTICLE, num, t};
  endfunction

  // --------------------------------------------- DAQ cycle controller
  typedef enum logic [3:0] {
    CYC_IDLE      = 4'd0,
    CYC_WAIT_OPEN = 4'd1,   // Start of Spill sent, waiting for gate open
    CYC_GATE      = 4'd2,   // Spill Gate open
    CYC_DAQ_TRIG  = 4'd3,   // DAQ Trigger pulse
    CYC_BUSY      = 4'd4,   // waiting for the enabled readout busies
    CYC_EOS       = 4'd5,   // End of Spill pulse
    CYC_CALIB     = 4'd6,   // calibration trigger pulse
    CYC_EXT       = 4'd7    // external Spill Gate mode
  } cyc_state_t;

endpackage
