// tb_pt_generator: self-checking test of the PTR / PT logic.
//
// Random station conditions, GVA, pulser, global condition, spill gate,
// veto length, external veto and builder readiness are driven for many
// clocks. A reference written from the rules (PTR on every rising edge of
// the trigger condition; PT = PTR inside the gate, outside the veto that
// follows the last PT for veto_len clocks, outside the enabled external
// veto, while the builder is ready) predicts ptr, pt and the reject
// strobes of each clock. A directed part checks the veto boundary: a PTR
// veto_len clocks after a PT is rejected, one clock later it is accepted.
module tb_pt_generator;
  import mice_trig_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [N_STATIONS-1:0] st_cond = '0, st_en = '0;
  logic gva = 0, pulser = 0, gate = 0, ext_veto = 0, ext_veto_en = 0, ready = 0;
  logic [1:0] gcond = '0;
  logic [31:0] veto_len = '0;
  logic ptr, pt, rej_gate, rej_veto, rej_ext, rej_full;
  int checks = 0, failures = 0;
  int n_pt = 0, n_rg = 0, n_rv = 0, n_re = 0, n_rf = 0;

  always #5 clk = ~clk;

  pt_generator dut (.clk, .rst, .st_cond, .st_enabled(st_en), .gva, .pulser,
                    .global_cond(gcond), .spill_gate(gate), .veto_len,
                    .ext_veto, .ext_veto_en, .ready, .ptr, .pt, .rej_gate,
                    .rej_veto, .rej_ext, .rej_full);

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic m_cond_q = 0;
  int   m_veto_end = -1;   // last clock index inside the veto
  int   clk_i = 0;

  task automatic step_and_check();
    logic c, e_ptr, e_pt, e_rg, e_rv, e_re, e_rf, vetoed;
    c = |(st_cond & st_en) | (gcond[0] & gva) | (gcond[1] & pulser);
    e_ptr = c & ~m_cond_q;
    vetoed = clk_i <= m_veto_end;
    e_rg = e_ptr & ~gate;
    e_rv = e_ptr & gate & vetoed;
    e_re = e_ptr & gate & ~vetoed & ext_veto_en & ext_veto;
    e_rf = e_ptr & gate & ~vetoed & ~(ext_veto_en & ext_veto) & ~ready;
    e_pt = e_ptr & gate & ~vetoed & ~(ext_veto_en & ext_veto) & ready;
    if (e_pt) m_veto_end = clk_i + int'(veto_len);  // length taken at the PT
    m_cond_q = c;
    @(posedge clk); #1;
    clk_i++;
    checks++;
    if ({ptr, pt, rej_gate, rej_veto, rej_ext, rej_full} !==
        {e_ptr, e_pt, e_rg, e_rv, e_re, e_rf}) begin
      failures++;
      $display("FAIL clk %0d got ptr%b pt%b rej%b%b%b%b exp ptr%b pt%b rej%b%b%b%b",
               clk_i, ptr, pt, rej_gate, rej_veto, rej_ext, rej_full,
               e_ptr, e_pt, e_rg, e_rv, e_re, e_rf);
    end
    n_pt += int'(pt); n_rg += int'(rej_gate); n_rv += int'(rej_veto);
    n_re += int'(rej_ext); n_rf += int'(rej_full);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // random part
    for (int k = 0; k < 50_000; k++) begin
      if (k % 2000 == 0) begin
        veto_len    = 32'($urandom % 12);
        st_en       = 3'($urandom);
        gcond       = 2'($urandom);
        ext_veto_en = 1'($urandom);
      end
      st_cond  = 3'($urandom) & 3'($urandom);
      gva      = ($urandom % 5) == 0;
      pulser   = ($urandom % 9) == 0;
      if ($urandom % 50 == 0) gate = ~gate;
      ext_veto = ($urandom % 6) == 0;
      ready    = ($urandom % 8) != 0;
      step_and_check();
      @(negedge clk);
    end
    // directed veto boundary with veto_len = 30 (reset value, 300 ns)
    st_en = 3'b010; gcond = 2'b00; gate = 1; ready = 1; ext_veto_en = 0;
    veto_len = 32'd30; st_cond = '0; gva = 0; pulser = 0;
    repeat (40) begin step_and_check(); @(negedge clk); end
    st_cond = 3'b010; step_and_check(); @(negedge clk);       // PT here
    checks++; if (!pt) begin failures++; $display("FAIL directed PT"); end
    for (int d = 1; d <= 31; d++) begin
      st_cond = (d == 30 || d == 31) ? 3'b000 : 3'b010;
      if (d == 29) st_cond = 3'b000;
      step_and_check(); @(negedge clk);
    end
    // clock 30 after the PT was low; re-raise at 32 -> edge at 32, allowed
    st_cond = 3'b010; step_and_check(); @(negedge clk);
    checks++; if (!pt) begin failures++; $display("FAIL PT after veto"); end
    // edge exactly veto_len clocks after the PT: rejected
    st_cond = 3'b000;
    for (int d = 1; d < 30; d++) begin step_and_check(); @(negedge clk); end
    st_cond = 3'b010; step_and_check(); @(negedge clk);
    checks++; if (pt || !rej_veto) begin failures++; $display("FAIL PTR inside veto accepted"); end
    // mechanisms seen
    checks++;
    if (n_pt == 0 || n_rg == 0 || n_rv == 0 || n_re == 0 || n_rf == 0) begin
      failures++;
      $display("FAIL mechanism missing pt%0d gate%0d veto%0d ext%0d full%0d",
               n_pt, n_rg, n_rv, n_re, n_rf);
    end
    $display("pt=%0d rej_gate=%0d rej_veto=%0d rej_ext=%0d rej_full=%0d",
             n_pt, n_rg, n_rv, n_re, n_rf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
