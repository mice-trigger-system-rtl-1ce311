// pulser: programmable pulser trigger of the particle trigger generator.
//
// Produces one-clock pulses at one of eight rates selected by `freq`
// (000 2 kHz, 001 5 kHz, 010 10 kHz, 011 20 kHz, 100 50 kHz, 101 100 kHz,
// 110 200 kHz, 111 500 kHz). `rand_mode` adds randomness: bit 0 gives a
// random start (first pulse a random time after the pulser starts), bit 1 a
// random period. The rates and the two kinds of randomness follow the
// register description; how the randomness is made is this design's choice:
//   - the nominal period is P = CLK_HZ / f clocks;
//   - without random start the first pulse comes P clocks after the pulser
//     starts, with it after 1 + r*P/2^16 clocks (uniform in 1..P);
//   - without random period pulses are exactly P clocks apart, with it each
//     interval is P/2 + r*P/2^16 clocks (uniform in P/2..3P/2-1, mean P);
// where r is the low 16 bits of a 32-bit maximal-length Galois LFSR that
// advances every clock.
//
// The pulser (re)starts when `enable` rises or when `freq` or `rand_mode`
// change while enabled. `pulse` is registered.
module pulser #(
  parameter int unsigned CLK_HZ = 100_000_000,  // 10 ns clock
  parameter logic [31:0] SEED   = 32'hACE1_2468
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic [2:0] freq,
  input  logic [1:0] rand_mode,
  output logic       pulse
);
  localparam int unsigned CNT_W = 24;

  function automatic logic [CNT_W-1:0] period(logic [2:0] code);
    int unsigned hz;
    case (code)
      3'd0: hz = 2_000;
      3'd1: hz = 5_000;
      3'd2: hz = 10_000;
      3'd3: hz = 20_000;
      3'd4: hz = 50_000;
      3'd5: hz = 100_000;
      3'd6: hz = 200_000;
      default: hz = 500_000;
    endcase
    return CNT_W'(CLK_HZ / hz);
  endfunction

  logic [31:0]      lfsr;
  logic [CNT_W-1:0] cnt, p, rnd_span;
  logic [CNT_W+15:0] prod;
  logic             en_q;
  logic [4:0]       cfg_q;
  logic             restart;

  always_comb begin
    p        = period(freq);
    prod     = lfsr[15:0] * p;
    rnd_span = prod[CNT_W+15:16];          // uniform in 0 .. P-1
    restart  = enable && (!en_q || (cfg_q != {rand_mode, freq}));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr  <= SEED;
      cnt   <= '0;
      en_q  <= 1'b0;
      cfg_q <= '0;
      pulse <= 1'b0;
    end else begin
      lfsr  <= lfsr[0] ? ((lfsr >> 1) ^ 32'h8020_0003) : (lfsr >> 1);
      en_q  <= enable;
      cfg_q <= {rand_mode, freq};
      pulse <= 1'b0;
      if (!enable) begin
        cnt <= '0;
      end else if (restart) begin
        cnt <= rand_mode[0] ? rnd_span + 1'b1 : p;
      end else if (cnt <= 1) begin
        pulse <= 1'b1;
        cnt   <= rand_mode[1] ? (p >> 1) + rnd_span : p;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end
endmodule
