// tb_readout_fifo: self-checking test of the readout buffer.
//
// A reference model keeps the committed words in one queue and the words
// written since the last commit in another. Random writes (only while
// `free` is above 0), commits and reads are applied to a 16-word buffer;
// every read word, and the `used` and `free` counts, are compared with the
// model. Words are checked to be invisible before their commit, and a read
// of an empty buffer to return 0.
module tb_readout_fifo;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rst = 1'b1;
  logic wr_en = 0, commit = 0, rd_en = 0;
  logic [31:0] wr_data = '0, rd_data;
  logic [AW:0] used, free;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty_rd = 0;

  always #5 clk = ~clk;

  readout_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst, .wr_en, .wr_data, .commit,
                                     .rd_en, .rd_data, .used, .free);

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] committed[$], pending[$];

  initial begin
    logic [31:0] exp_rd;
    bit          was_rd;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 20_000; k++) begin
      // counts seen by the design this clock
      checks += 2;
      if (used != (AW+1)'(committed.size())) begin
        failures++; $display("FAIL used %0d exp %0d", used, committed.size());
      end
      if (free != (AW+1)'(DEPTH - committed.size() - pending.size())) begin
        failures++; $display("FAIL free %0d", free);
      end
      if (free == 0) n_full++;
      // choose this clock's operations
      wr_en   = (free != 0) && ($urandom % 3 != 0);
      wr_data = $urandom;
      commit  = ($urandom % 7 == 0);
      rd_en   = ($urandom % ((k / 2000) % 2 == 0 ? 2 : 5) == 0);
      was_rd  = rd_en;
      exp_rd  = '0;
      if (rd_en) begin
        if (committed.size() != 0) exp_rd = committed.pop_front();
        else n_empty_rd++;
      end
      if (wr_en) pending.push_back(wr_data);
      if (commit) begin
        while (pending.size() != 0) committed.push_back(pending.pop_front());
      end
      @(posedge clk); #1;
      if (was_rd) begin
        checks++;
        if (rd_data !== exp_rd) begin
          failures++; $display("FAIL read %h exp %h", rd_data, exp_rd);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_empty_rd == 0) begin
      failures++; $display("FAIL full %0d empty reads %0d", n_full, n_empty_rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
