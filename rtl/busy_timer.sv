// busy_timer: length of the DAQ busy of one readout process.
//
// The busy input is a level, high while the readout process is busy. When
// it rises the result is cleared; while it stays high a prescaler counts
// clocks and every UNIT_CYCLES clocks the 16-bit result is incremented,
// saturating at 0xFFFF. When busy falls the result holds the length of that
// busy period until the next one starts. With a 10 ns clock and
// UNIT_CYCLES = 320 the unit is 3.2 us and the range about 210 ms, as in
// the busy time registers; clearing at each rising edge and saturating are
// this design's choices.
//
// Timing: `busy` is taken as synchronised; `busy_time` is registered and
// counts the k-th unit UNIT_CYCLES clocks after the k-1-th.
module busy_timer #(
  parameter int unsigned UNIT_CYCLES = 320   // 3.2 us in 10 ns clocks
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        busy,
  output logic [15:0] busy_time
);
  localparam int unsigned PW = $clog2(UNIT_CYCLES + 1);
  logic          busy_q;
  logic [PW-1:0] pre;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q    <= 1'b0;
      pre       <= '0;
      busy_time <= '0;
    end else begin
      busy_q <= busy;
      if (busy && !busy_q) begin
        busy_time <= '0;
        pre       <= PW'(1);
      end else if (busy) begin
        if (pre == PW'(UNIT_CYCLES - 1)) begin
          pre <= '0;
          if (busy_time != 16'hFFFF) busy_time <= busy_time + 1'b1;
        end else begin
          pre <= pre + 1'b1;
        end
      end
    end
  end
endmodule
