// tb_tof_station: self-checking test of the TOF station trigger logic.
//
// Drives random PMT patterns, masks and every 3-bit configuration code and
// compares the registered pattern and station condition, one clock later,
// with a reference computed here from the slab definitions: a slab is hit
// when both its PMTs fire; bits [9:0] are the vertical plane.
module tb_tof_station;
  import mice_trig_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [PAT_W-1:0] sb, nt, mask, pattern;
  logic [2:0] cfg;
  logic cond, enabled;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tof_station dut (.clk, .rst, .pmt_sb(sb), .pmt_nt(nt), .mask, .cfg,
                   .pattern, .cond, .enabled);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_cond(logic [PAT_W-1:0] s, logic [PAT_W-1:0] n,
                                    logic [PAT_W-1:0] m, logic [2:0] c);
    logic [PAT_W-1:0] hit;
    logic v = 1'b0, h = 1'b0;
    hit = s & n & m;
    for (int i = 0; i < 10; i++) v |= hit[i];
    for (int i = 10; i < 20; i++) h |= hit[i];
    case (c)
      3'b001: return v;
      3'b010: return h;
      3'b011: return v || h;
      3'b111: return v && h;
      default: return 1'b0;
    endcase
  endfunction

  logic exp_c;
  logic [PAT_W-1:0] exp_p;
  int n_true = 0;

  initial begin
    sb = '0; nt = '0; mask = '1; cfg = 3'b000;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      // sparse hits so that every condition is sometimes true, sometimes not
      sb   = PAT_W'($urandom) & PAT_W'($urandom) & PAT_W'($urandom);
      nt   = sb & (it[0] ? PAT_W'($urandom) : '1);
      if (it % 4 == 3) nt = PAT_W'($urandom) & ~sb;  // no coincidence
      mask = (it % 3 == 0) ? '1 : PAT_W'($urandom);
      cfg  = 3'((it / 4) % 8);
      exp_c = ref_cond(sb, nt, mask, cfg);
      exp_p = sb & nt;
      #1;
      checks++;
      if (enabled != (cfg inside {3'b001, 3'b010, 3'b011, 3'b111})) begin
        failures++;
        $display("FAIL enabled cfg=%b got %b", cfg, enabled);
      end
      @(posedge clk); #1;
      checks += 2;
      if (cond !== exp_c) begin
        failures++;
        $display("FAIL cond cfg=%b sb=%h nt=%h mask=%h got %b exp %b",
                 cfg, sb, nt, mask, cond, exp_c);
      end
      if (pattern !== exp_p) begin
        failures++;
        $display("FAIL pattern got %h exp %h", pattern, exp_p);
      end
      if (exp_c) n_true++;
    end
    checks++;
    if (n_true < 100) begin
      failures++;
      $display("FAIL condition rarely true: %0d", n_true);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
