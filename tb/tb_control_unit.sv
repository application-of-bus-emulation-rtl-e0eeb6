// Self-checking test of control_unit with models of everything around it:
// an access counter and a latency counter written here from their
// descriptions, a stand-in for the MC68000 bus machine that answers iow4s
// with #AS and ad0, a PCI memory target whose answer to each data phase
// comes from a script (normal, wait, retry, disconnect with data), and a PCI
// arbiter whose GNT can be taken away.
// For each block transfer it checks the number of MC68000 cycles and of PCI
// double words, that every transaction starts from an idle bus with GNT, that
// the last data phase has FRAME high, that a clean READ=1 transfer takes one
// address clock plus one clock per double word, and that each mechanism of the
// flow chart (turnaround, retry, disconnect in a middle and in the last data
// phase, expired time slice with and without GNT, re-arbitration, end-of-block
// interrupt) happens.
module tb_control_unit;
  import bridge_pkg::*;
  logic clk = 0, rst_n = 0;
  logic iow10 = 0, ior4 = 0, read_dir = 1;
  logic as_n, ad0;
  logic zcont, ultransf, zltcont;
  logic frame_in_n, irdy_in_n, trdy_n, stop_n, devsel_n, gnt_n;
  logic req_n, frame_n, irdy_n, m_oe, ad_oe, cbe_oe;
  logic iow4s, adden, ldcont, rstfifo, irqb, ldltcont, dltcont;
  logic iaddrph, idataph, itac, ists, xfer, m68_step;
  cu_state_t state;
  int checks = 0, failures = 0;

  control_unit dut (.*);
  always #15 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  // ---- access counter model ----
  int words = 0, cnt = 0, cnt_nxt;
  always_comb begin
    cnt_nxt = cnt;
    if (ldcont) cnt_nxt = words;
    else if (xfer) cnt_nxt = (cnt >= 2) ? cnt - 2 : 0;
    else if (m68_step) cnt_nxt = cnt - 1;
  end
  assign zcont    = (cnt_nxt == 0);
  assign ultransf = (cnt_nxt == 1 || cnt_nxt == 2);
  always @(posedge clk) cnt <= cnt_nxt;

  // ---- latency counter model ----
  int lt_val = 255, lt = 0;
  always @(posedge clk) if (ldltcont) lt <= lt_val; else if (dltcont && lt > 0) lt <= lt - 1;
  assign zltcont = (lt == 0);

  // ---- MC68000 bus machine stand-in ----
  logic iow4s_q = 0;
  int m68_timer = 0, m68_cycles = 0;
  initial begin as_n = 1; ad0 = 0; end
  always @(posedge clk) begin
    iow4s_q <= iow4s;
    if (iow4s && !iow4s_q && m68_timer == 0) begin m68_timer <= 1; ad0 <= 0; end
    else if (m68_timer != 0) begin
      m68_timer <= m68_timer + 1;
      if (m68_timer == 3) as_n <= 0;
      if (m68_timer == 12) begin as_n <= 1; ad0 <= 1; m68_timer <= 0; m68_cycles <= m68_cycles + 1; end
    end
  end

  // ---- PCI bus: pull-ups when nobody drives ----
  assign frame_in_n = m_oe ? frame_n : 1'b1;
  assign irdy_in_n  = m_oe ? irdy_n  : 1'b1;

  // ---- PCI memory target driven by a script ----
  typedef enum {R_NORMAL, R_WAIT, R_RETRY, R_DISC} resp_t;
  resp_t script [$];
  int    ph = 0;            // data phase attempts consumed from the script
  bit    tgt_active = 0, tgt_stop = 0;
  int    dwords = 0, n_retry = 0, n_disc = 0, n_disc_last = 0, n_txn = 0;
  resp_t cur;
  always_comb begin
    cur = (ph < script.size()) ? script[ph] : R_NORMAL;
    trdy_n = 1; stop_n = 1; devsel_n = 1;
    if (tgt_active) begin
      devsel_n = 0;
      if (tgt_stop) stop_n = 0;
      else if (!irdy_in_n && !itac) begin
        unique case (cur)
          R_NORMAL: trdy_n = 0;
          R_WAIT:   ;
          R_RETRY:  stop_n = 0;
          R_DISC:   begin trdy_n = 0; stop_n = 0; end
        endcase
      end
    end
  end
  always @(posedge clk) begin
    if (iaddrph) begin
      tgt_active <= 1; tgt_stop <= 0; n_txn <= n_txn + 1;
    end else if (tgt_active) begin
      if (frame_in_n && irdy_in_n) begin tgt_active <= 0; tgt_stop <= 0; end
      else if (!irdy_in_n && !itac && !tgt_stop) begin
        ph <= ph + 1;
        if (cur == R_NORMAL || cur == R_DISC) dwords <= dwords + 1;
        if (cur == R_RETRY) n_retry <= n_retry + 1;
        if (cur == R_DISC && frame_in_n) n_disc_last <= n_disc_last + 1;
        else if (cur == R_DISC) n_disc <= n_disc + 1;
        if (cur == R_RETRY || cur == R_DISC) tgt_stop <= 1;
      end
    end
  end

  // ---- arbiter ----
  bit gnt_hold = 1;      // 0: take GNT away after the first data phase
  always @(posedge clk) begin
    if (!req_n) gnt_n <= 0;
    else if (!gnt_hold && idataph) gnt_n <= 1;
  end
  initial gnt_n = 1;

  // ---- protocol checks and mechanism counters ----
  int n_I = 0, n_K = 0, n_M = 0, n_O = 0, n_P = 0, n_Q = 0, n_N2 = 0, n_E = 0;
  int clean_clocks = 0;
  bit g_ok = 0, g_wait = 0;
  always @(posedge clk) if (rst_n) begin
    if (state == CU_G && !(!gnt_n && frame_in_n && irdy_in_n)) g_wait = 1;
    if (state == CU_H) begin
      checks++;
      if (!g_ok) begin failures++; $display("FAIL: address phase without GNT on an idle bus"); end
    end
    g_ok = (state == CU_G) && !gnt_n && frame_in_n && irdy_in_n;
    if (state == CU_I) n_I++;
    if (state == CU_K) n_K++;
    if (state == CU_M) n_M++;
    if (state == CU_O) n_O++;
    if (state == CU_P) n_P++;
    if (state == CU_Q) n_Q++;
    if (state == CU_N2) n_N2++;
    if (state == CU_H || state == CU_L || state == CU_J) clean_clocks++;
    if (iaddrph && frame_n) begin failures++; $display("FAIL: address phase without FRAME"); end
    if (xfer && irdy_n) begin failures++; $display("FAIL: transfer without IRDY"); end
  end

  // start a block transfer and wait for its interrupt
  task automatic run_block(input logic dir, input int x);
    int guard;
    words = x; read_dir = dir;
    m68_cycles = 0; dwords = 0; ph = 0;
    clean_clocks = 0;
    @(negedge clk); iow10 = 1; @(negedge clk); iow10 = 0;
    guard = 0;
    while (!irqb && guard < 200000) begin @(negedge clk); guard++; end
    check(irqb && rstfifo, "end-of-block interrupt and FIFO reset");
    n_E++;
    repeat (3) @(negedge clk);
    check(state == CU_E, "waits in E until the IRQ is cleared");
    ior4 = 1; @(negedge clk); ior4 = 0; @(negedge clk);
    check(state == CU_A && !irqb, "IRQ cleared, back to A");
    check(m68_cycles == x, $sformatf("MC68000 cycles %0d of %0d", m68_cycles, x));
    check(dwords == (x + 1) / 2, $sformatf("PCI double words %0d of %0d", dwords, (x + 1) / 2));
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(state == CU_A && req_n && !m_oe, "idle after reset");

    // 1: clean READ=1 block of 9 words: address clock + 5 data phases
    script = {};
    run_block(1, 9);
    check(clean_clocks == 1 + 5, $sformatf("clean burst %0d clocks, expected 6", clean_clocks));
    check(n_txn == 1, "one transaction");

    // 2: retry and disconnect A/B in the middle, disconnect in the last phase
    script = {R_NORMAL, R_RETRY, R_NORMAL, R_WAIT, R_DISC, R_NORMAL, R_DISC};
    run_block(1, 10);
    check(n_retry >= 1 && n_disc >= 1 && n_disc_last >= 1, "retry, disconnect, last disconnect seen");

    // 3: time slice expiry while GNT stays low (state O)
    lt_val = 2; script = {};
    run_block(1, 16);
    check(n_O > 0, "data phases after the time slice with GNT");

    // 4: time slice expiry after GNT was taken away (state P, re-request)
    gnt_hold = 0; script = {};
    run_block(1, 16);
    gnt_hold = 1; lt_val = 255;
    check(n_P > 0 && n_Q > 0, "one more data phase after losing GNT, then re-request");

    // 5: READ=0, PC memory to MC68000: turnaround, then N2 and MC68000 cycles
    script = {R_WAIT, R_NORMAL, R_RETRY};
    run_block(0, 7);
    check(n_I > 0 && n_N2 > 0, "memory read turnaround and counter reload");

    // 6: single word blocks in both directions
    script = {};
    run_block(1, 1);
    run_block(0, 2);

    // 7: retry in the last data phase
    script = {R_NORMAL, R_RETRY};
    run_block(1, 4);

    check(n_K > 0 && n_M > 0 && n_E == 8, "K, M and E visited");
    $display("mechanisms: I=%0d K=%0d M=%0d O=%0d P=%0d Q=%0d N2=%0d retry=%0d disc=%0d disc_last=%0d",
             n_I, n_K, n_M, n_O, n_P, n_Q, n_N2, n_retry, n_disc, n_disc_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
