// tb_event_builder: self-checking test of the spill data formatter.
//
// The testbench plays the PT generator (a PT follows a request only if
// `ready` was high the clock before) and the readout buffer (a word store
// with a settable capacity, from which `fifo_free` is computed). For every
// spill it predicts the words from the readout format: header (0x5, GEO,
// spill number), one three-word record per PT (0xA, trigger number, time of
// the PT from the first gate clock, the TOF0/1/2 patterns of the PT clock)
// and trailer (0xF, PT count, spill number), committed together. Spills
// test: normal running, the 1024-trigger limit, a buffer that fills during
// the spill, a buffer too full to open a spill, and the spill, trigger and
// word counters.
module tb_event_builder;
  import mice_trig_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic gate = 0, pt = 0;
  logic [N_STATIONS-1:0][PAT_W-1:0] pattern = '0;
  logic [4:0] geo = 5'd19;
  logic [12:0] fifo_free;
  logic ready, wr_en, commit;
  logic [31:0] wr_data, n_triggers, n_words, n_spills;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  event_builder dut (.clk, .rst, .spill_gate(gate), .pt, .pattern, .geo,
                     .fifo_free, .ready, .wr_en, .wr_data, .commit,
                     .n_triggers, .n_words, .n_spills);

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // buffer model
  int cap = 8000;
  int stored = 0;          // words written (committed or not), never read
  logic [31:0] got[$];     // words written since the last commit check
  int n_commits = 0;
  assign fifo_free = 13'((cap - stored) > 8191 ? 8191 : (cap - stored));
  always @(posedge clk) if (!rst) begin
    if (wr_en) begin got.push_back(wr_data); stored++; end
    if (commit) n_commits++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Runs one spill: gate open `len` clocks, PT requests with probability
  // 1/`every` per clock. Returns nothing; checks the words.
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic run_spill(input int len, input int every, input int spill_no,
                           input bit expect_recorded);
    logic [31:0] exp[$];
    int g, ntrig = 0;
    logic want = 0;
    int commits0 = n_commits;
    got.delete();
    @(negedge clk);
    gate = 1;
    @(posedge clk); g = cyc;
    for (int t = 0; t < len; t++) begin
      @(negedge clk);
      pt = want && ready;        // ready sampled in the previous clock
      want = ($urandom % every == 0);
      pattern = {PAT_W'($urandom), PAT_W'($urandom), PAT_W'($urandom)};
      if (pt) begin
        logic [35:0] tag;
        tag = {ID_PARTICLE, 10'(ntrig), 22'(cyc - g)};
        exp.push_back({tag[35:24], pattern[0]});
        exp.push_back({tag[23:12], pattern[1]});
        exp.push_back({tag[11:0],  pattern[2]});
        ntrig++;
      end
      // hold pattern through the PT clock edge
      @(posedge clk);
      #1 pt = 0;
    end
    @(negedge clk);
    pt = 0; gate = 0;
    repeat (6) @(negedge clk);
    if (expect_recorded) begin
      exp.push_front(spill_header(geo, 16'(spill_no)));
      exp.push_back(spill_trailer(12'(ntrig), 16'(spill_no)));
    end
    check(got.size() == exp.size(),
          $sformatf("spill %0d: %0d words exp %0d", spill_no, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("spill %0d word %0d: %h exp %h",
                                        spill_no, i, got[i], exp[i]));
    check(n_commits - commits0 == (expect_recorded ? 1 : 0), "one commit per spill");
    check(n_spills == 32'(spill_no + 1), $sformatf("spill counter %0d", n_spills));
    check(n_triggers == 32'(ntrig), $sformatf("trigger counter %0d exp %0d", n_triggers, ntrig));
    check(n_words == 32'(exp.size()), $sformatf("word counter %0d exp %0d", n_words, exp.size()));
    last_ntrig = ntrig;
  endtask
  int last_ntrig;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // normal spills
    run_spill(300, 6, 0, 1);
    check(last_ntrig > 10, "PTs in spill 0");
    run_spill(50, 3, 1, 1);
    run_spill(20, 1000000, 2, 1);     // empty spill
    // 1024-trigger limit (every clock requested; records need 4 clocks)
    cap = 8000 + stored;
    run_spill(6000, 1, 3, 1);
    check(last_ntrig == 1024, $sformatf("trigger limit: %0d", last_ntrig));
    // buffer filling during the spill: room for header, 5 records, trailer
    cap = stored + 2 + 15;
    run_spill(400, 2, 4, 1);
    check(last_ntrig == 5, $sformatf("records until full: %0d", last_ntrig));
    // buffer too full to open a spill
    cap = stored + 1;
    run_spill(100, 2, 5, 0);
    check(n_words == 0 && n_triggers == 0, "unrecorded spill counts");
    // GEO change shows in the next header
    cap = stored + 8000;
    geo = 5'd7;
    run_spill(100, 5, 6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
