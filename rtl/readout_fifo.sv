// readout_fifo: the event readout buffer.
//
// A first-in first-out buffer of DEPTH 32-bit words with two write
// pointers. Words are written at `wr_ptr` as the event builder produces
// them, but the reader only sees words up to `commit_ptr`; a `commit` pulse
// moves `commit_ptr` to `wr_ptr`, making a whole spill readable at once.
// So a spill appears in the buffer only when it is complete, which is how
// the readout buffer is described (the triggers of a spill are loaded into
// it when the spill is over); doing it with a commit pointer, the depth and
// the value returned by a read of an empty buffer (0) are this design's
// choices.
//
// `used` counts readable (committed) words; it is the `rdusedw` field of
// the status register. `free` counts words that can still be written. A
// write when `free` is 0 and a read when `used` is 0 are ignored.
//
// Timing: `rd_data` is registered; it holds the word popped by `rd_en` from
// the clock after `rd_en`. A word written and committed is readable the
// clock after the commit.
module readout_fifo #(
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_en,
  input  logic [31:0] wr_data,
  input  logic        commit,
  input  logic        rd_en,
  output logic [31:0] rd_data,
  output logic [AW:0] used,
  output logic [AW:0] free
);
  logic [31:0] mem [DEPTH];
  logic [AW:0] wr_ptr, commit_ptr, rd_ptr;
  logic        do_wr, do_rd;

  assign used  = commit_ptr - rd_ptr;
  assign free  = (AW+1)'(DEPTH) - (wr_ptr - rd_ptr);
  assign do_wr = wr_en && (free != 0);
  assign do_rd = rd_en && (used != 0);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr     <= '0;
      commit_ptr <= '0;
      rd_ptr     <= '0;
      rd_data    <= '0;
    end else begin
      if (do_wr)  wr_ptr     <= wr_ptr + 1'b1;
      if (commit) commit_ptr <= do_wr ? wr_ptr + 1'b1 : wr_ptr;
      if (do_rd) begin
        rd_ptr  <= rd_ptr + 1'b1;
        rd_data <= mem[rd_ptr[AW-1:0]];
      end else if (rd_en) begin
        rd_data <= '0;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
                                   wr_en |-> free != 0);
endmodule
