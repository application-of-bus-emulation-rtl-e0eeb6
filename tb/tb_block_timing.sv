// Timing test of pci_m68k_bridge: block transfers from the MC68000 system to
// PC memory under the conditions of the bridge's published timing model.
//
// Conditions: no wait states on either bus, no other PCI master (the grant is
// parked on the bridge, so each bus request waits one clock), Latency Timer
// 255. Three blocks are run with READ = 1:
//   1. 10 words, the break-even block size of the timing model;
//   2. 256 words (the full FIFOs) with no premature termination;
//   3. 256 words with PC memory organised in 8 double word cache lines: a
//      retry on the first data phase of each line (a snoop hit) and a
//      disconnect with data on the last double word of each line.
// Checked against cycle counts worked out here, not taken from the bridge:
//   - each MC68000 cycle holds #AS low for exactly 2 clocks and #AS returns
//     high 2 clocks before the next cycle can start (4-clock cycle);
//   - the control unit spends one clock in F (counter reload, #REQ);
//   - from the first address phase to the final S/T/S clock the PCI part takes
//       1 + D + 1                  address phase, D data phases, S/T/S clock
//       + 1 if the last data phase is disconnected (IRDY held one more clock)
//       + 4 per mid-burst disconnect (IRDY hold, release, request, address)
//       + 5 per retry (the failed data phase, then as for a disconnect)
//     with D = ceil(words / 2), one bus request clock per restart.
// The clocks per word of the MC68000 phase and of the whole transfer are
// printed for comparison with the 4-clock (16.5 PCI clock) cycle assumed by
// the timing model; the two-flop handshake between the clock domains adds to
// the gap between cycles in this implementation.
module tb_block_timing;
  import bridge_pkg::*;

  // ---------------- clocks, reset ----------------
  logic pci_clk = 0, m68_clk = 0, pci_rst_n = 0;
  always #15 pci_clk = ~pci_clk;        // 33 MHz
  always #62.5 m68_clk = ~m68_clk;      // 8 MHz

  // ---------------- DUT ----------------
  logic [31:0] ad_o;  logic ad_oe;
  logic [3:0]  cbe_o; logic cbe_oe;
  logic par_o, par_oe, frame_o, irdy_o, m_oe, trdy_o, stop_o, devsel_o, t_oe;
  logic idsel, req_n, gnt_n, inta_oe;
  logic [15:1] m68_a; logic m68_a_oe;
  logic [15:0] m68_d_i, m68_d_o; logic m68_d_oe;
  logic m68_as_n, m68_uds_n, m68_lds_n, m68_wr_n, m68_dtack_n, m68_vpa_n, m68_vma_n, m68_e, m68_reset_n;
  logic [2:0] m68_ipl_n;

  // resolved PCI bus
  logic [31:0] ad_bus; logic [3:0] cbe_bus;
  logic frame_bus, irdy_bus, trdy_bus, stop_bus, devsel_bus;
  // host initiator drive
  logic [31:0] h_ad = 0; logic h_ad_oe = 0; logic [3:0] h_cbe = 0; logic h_cbe_oe = 0;
  logic h_frame = 1, h_irdy = 1, h_oe = 0;
  // memory target drive
  logic [31:0] m_ad; logic m_ad_oe; logic m_trdy, m_stop, m_devsel;

  assign ad_bus     = ad_oe ? ad_o : h_ad_oe ? h_ad : m_ad_oe ? m_ad : 32'h0;
  assign cbe_bus    = cbe_oe ? cbe_o : h_cbe_oe ? h_cbe : 4'hF;
  assign frame_bus  = m_oe ? frame_o : h_oe ? h_frame : 1'b1;
  assign irdy_bus   = m_oe ? irdy_o  : h_oe ? h_irdy  : 1'b1;
  assign trdy_bus   = t_oe ? trdy_o   : m_trdy;
  assign stop_bus   = t_oe ? stop_o   : m_stop;
  assign devsel_bus = t_oe ? devsel_o : m_devsel;

  pci_m68k_bridge dut (
    .pci_clk, .pci_rst_n,
    .ad_i(ad_bus), .ad_o, .ad_oe, .cbe_i(cbe_bus), .cbe_o, .cbe_oe, .par_o, .par_oe,
    .frame_i(frame_bus), .frame_o, .irdy_i(irdy_bus), .irdy_o, .m_oe,
    .trdy_i(trdy_bus), .trdy_o, .stop_i(stop_bus), .stop_o, .devsel_i(devsel_bus), .devsel_o, .t_oe,
    .idsel, .req_n, .gnt_n, .inta_oe,
    .m68_clk, .m68_a, .m68_a_oe, .m68_d_i, .m68_d_o, .m68_d_oe,
    .m68_as_n, .m68_uds_n, .m68_lds_n, .m68_wr_n, .m68_dtack_n, .m68_vpa_n, .m68_vma_n,
    .m68_e, .m68_reset_n, .m68_ipl_n
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  // ---------------- mechanism counters ----------------
  int c_retry = 0, c_disc_mid = 0, c_disc_last = 0, c_slice_gnt = 0, c_slice_nognt = 0;
  int c_turnaround = 0, c_rearb = 0, c_sync = 0, c_wait68 = 0, c_discC = 0, c_irqa = 0;
  int c_irqb = 0, c_half_dw = 0, c_pci_wait = 0, c_par = 0;
  cu_state_t cu_prev;
  always @(posedge pci_clk) begin
    cu_prev <= dut.u_cu.state;
    if (dut.u_cu.state == CU_O && cu_prev != CU_O) c_slice_gnt++;
    if (dut.u_cu.state == CU_P && cu_prev != CU_P) c_slice_nognt++;
    if (dut.u_cu.state == CU_I) c_turnaround++;
    if (dut.u_cu.state == CU_Q) c_rearb++;
    if (dut.u_cu.state == CU_M) c_disc_last++;
    if (dut.u_cu.state == CU_E && cu_prev != CU_E) c_irqb++;
    if (dut.u_decoder.state == DEC_C && !stop_o && t_oe && dut.u_decoder.state != DEC_D) ;
  end

  // PAR: even parity over the previous clock's AD and C/BE
  logic [31:0] ad_q; logic [3:0] cbe_q;
  always @(posedge pci_clk) begin
    ad_q <= ad_bus; cbe_q <= cbe_bus;
    if (par_oe && pci_rst_n) begin
      c_par++;
      if (^{ad_q, cbe_q, par_o} !== 1'b0) begin failures++; $display("FAIL: PAR @%0t", $time); end
    end
  end

  // ---------------- arbiter ----------------
  bit host_req = 0, other_en = 0, other_busy = 0;
  int other_t = 0;
  always @(posedge pci_clk) begin
    other_t <= other_t + 1;
    other_busy <= 1'b0;
    // the bridge keeps (parks on) the grant until another master asks
    gnt_n <= !((!req_n || !gnt_n) && !host_req && !other_busy);
  end
  initial gnt_n = 1;

  // ---------------- PC memory target ----------------
  localparam logic [31:0] MEM_BASE = 32'h0001_0000;
  localparam int MEM_DW = 1024;
  logic [31:0] pcmem [MEM_DW];
  typedef enum {T_NORMAL, T_WAIT, T_RETRY, T_DISC} tresp_t;
  bit   inj_retry = 0, inj_disc = 0, inj_wait = 0;
  bit   t_active = 0, t_read = 0, t_ta = 0, t_stop_hold = 0;
  int   t_idx = 0, t_retried = -1;
  tresp_t t_resp = T_NORMAL;
  logic frame_prev = 1;

  function automatic tresp_t pick(input int idx, input bit first_in_txn);
    if (inj_retry && idx % 8 == 0 && t_retried != idx && first_in_txn) return T_RETRY;
    if (inj_disc && idx % 8 == 7) return T_DISC;
    if (inj_wait && ($urandom_range(0, 5) == 0)) return T_WAIT;
    return T_NORMAL;
  endfunction

  always_comb begin
    m_trdy = 1; m_stop = 1; m_devsel = 1; m_ad_oe = 0;
    m_ad = pcmem[t_idx % MEM_DW];
    if (t_active) begin
      m_devsel = 0;
      m_ad_oe  = t_read && !t_ta;
      if (t_stop_hold) m_stop = 0;
      else if (!t_ta) begin
        unique case (t_resp)
          T_NORMAL: m_trdy = 0;
          T_WAIT:   ;
          T_RETRY:  m_stop = 0;
          T_DISC:   begin m_trdy = 0; m_stop = 0; end
        endcase
      end
    end
  end

  always @(posedge pci_clk) begin
    frame_prev <= frame_bus;
    if (!t_active) begin
      if (!frame_bus && frame_prev && (cbe_bus == CMD_MEMW || cbe_bus == CMD_MEMR) &&
          ad_bus >= MEM_BASE && ad_bus < MEM_BASE + 4 * MEM_DW) begin
        t_active <= 1; t_read <= (cbe_bus == CMD_MEMR); t_ta <= (cbe_bus == CMD_MEMR);
        t_stop_hold <= 0;
        t_idx <= (ad_bus - MEM_BASE) / 4;
        t_resp <= pick((ad_bus - MEM_BASE) / 4, 1);
      end
    end else begin
      if (frame_bus && irdy_bus) begin
        t_active <= 0;
      end else begin
        int nidx; bit xf;
        xf = !irdy_bus && !m_trdy;
        nidx = t_idx + (xf ? 1 : 0);
        if (xf && !t_read) begin
          for (int b = 0; b < 4; b++)
            if (!cbe_bus[b]) pcmem[t_idx % MEM_DW][8*b +: 8] <= ad_bus[8*b +: 8];
          if (cbe_bus != 4'b0000) c_half_dw++;
        end
        if (!irdy_bus && !t_ta && !t_stop_hold) begin
          if (t_resp == T_RETRY) begin c_retry++; t_retried <= t_idx; end
          if (t_resp == T_DISC && !frame_bus) c_disc_mid++;
          if (t_resp == T_WAIT) c_pci_wait++;
        end
        if (!m_stop && !irdy_bus) t_stop_hold <= 1;
        if (!irdy_bus || !t_ta) t_ta <= 0;
        t_idx  <= nidx;
        t_resp <= pick(nidx, 0);
      end
    end
  end

  // ---------------- MC68000 target system ----------------
  logic [15:0] m68mem [32768];
  int  m68_waits = 0, as_cnt = 0;
  bit  sync_dev;
  logic [2:0] ipl = 3'b111;
  assign m68_ipl_n = ipl;
  assign sync_dev  = (m68_a[15:12] == 4'hF);
  assign m68_d_i   = m68mem[m68_a];
  assign m68_dtack_n = !(!sync_dev && !m68_as_n && as_cnt >= m68_waits + 1);
  assign m68_vpa_n   = !(sync_dev && !m68_as_n);
  always @(posedge m68_clk) begin
    if (!m68_as_n) begin
      as_cnt <= as_cnt + 1;
      if (as_cnt == 0) begin
        if (!m68_a_oe && m68_reset_n) begin failures++; $display("FAIL: address not driven during AS @%0t cu=%s", $time, dut.u_cu.state.name()); end
        if (sync_dev) c_sync++;
      end
    end else begin
      as_cnt <= 0;
      m68_waits <= 0;                 // no wait states, as in the timing model
    end
    if (!m68_as_n && as_cnt == 2 && !sync_dev) c_wait68++;
    if (!m68_as_n && !m68_wr_n && m68_d_oe && (!m68_dtack_n || (!m68_vma_n && m68_e))) begin
      if (!m68_uds_n) m68mem[m68_a][15:8] <= m68_d_o[15:8];
      if (!m68_lds_n) m68mem[m68_a][7:0]  <= m68_d_o[7:0];
    end
  end

  // ---------------- host initiator ----------------
  // Waits for the bus, runs one transaction of 1 or 2 data phases.
  task automatic host_xact(input logic [3:0] cmd, input logic [31:0] addr, input logic sel,
                           input logic [31:0] wdata, input logic [3:0] be, input int phases,
                           output logic [31:0] rdata, output bit stopped);
    int n; bit done;
    host_req = 1;
    // wait until the bridge has no grant and the bus is idle for two clocks
    n = 0;
    while (n < 2) begin
      @(posedge pci_clk);
      if (gnt_n && frame_bus && irdy_bus && !m_oe) n++; else n = 0;
    end
    @(negedge pci_clk);
    h_oe = 1; h_frame = 0; h_ad = addr; h_ad_oe = 1; h_cbe = cmd; h_cbe_oe = 1; idsel = sel;
    @(negedge pci_clk);
    idsel = 0; h_cbe = be; h_irdy = 0;
    h_frame = (phases == 1);
    if (cmd[0]) h_ad = wdata; else h_ad_oe = 0;
    done = 0; stopped = 0; n = 0; rdata = 0;
    while (!done) begin
      @(posedge pci_clk);
      n++;
      if (!trdy_bus) rdata = ad_bus;
      if (!stop_bus) stopped = 1;
      if (!devsel_bus && (!trdy_bus || !stop_bus) && h_frame) done = 1;
      else if (n > 10) begin done = 1; $display("host: master abort"); end
      @(negedge pci_clk);
      if (!done && (stopped || !trdy_bus)) h_frame = 1;   // last phase
    end
    h_irdy = 1; h_ad_oe = 0; h_cbe_oe = 0;
    @(negedge pci_clk);
    h_oe = 0; h_frame = 1;
    host_req = 0;
  endtask

  logic [31:0] rd; bit st;
  localparam logic [31:0] IOB = 32'h0000_E100;
  task automatic cfg_wr(input int dw, input logic [31:0] v);
    host_xact(CMD_CNFW, 32'(dw * 4), 1, v, 4'h0, 1, rd, st);
  endtask
  task automatic cfg_rd(input int dw, output logic [31:0] v);
    host_xact(CMD_CNFR, 32'(dw * 4), 1, 0, 4'h0, 1, v, st);
  endtask
  task automatic io_wr(input int off, input logic [31:0] v, input logic [3:0] be);
    host_xact(CMD_IOW, IOB + 32'(off), 0, v, be, 1, rd, st);
  endtask
  task automatic io_rd(input int off, output logic [31:0] v);
    host_xact(CMD_IOR, IOB + 32'(off), 0, 0, 4'h0, 1, v, st);
  endtask


  // ---------------- measurement ----------------
  bit meas = 0, in_pci = 0;
  int span = 0, f_clks = 0, g_after = 0, restarts = 0;
  always @(posedge pci_clk) begin
    if (meas) begin
      if (dut.u_cu.state == CU_F) f_clks++;
      if (dut.u_cu.state == CU_H) in_pci <= 1;
      if (in_pci || dut.u_cu.state == CU_H) begin
        if (dut.u_cu.state inside {CU_G, CU_H, CU_I, CU_J, CU_K, CU_L, CU_M, CU_N, CU_O, CU_P, CU_Q}) span++;
        if (dut.u_cu.state == CU_G) g_after++;
        if (dut.u_cu.state == CU_Q) restarts++;
      end
      if (dut.u_cu.state == CU_N) in_pci <= 0;
    end
  end

  // MC68000 side: #AS low time and the distance between cycle starts
  int as_low = 0, as_gap = 0, as_bad = 0, as_high = 0, n_cyc = 0, first_as = -1, last_as = 0, m68_t = 0;
  logic as_prev = 1;
  always @(posedge m68_clk) begin
    m68_t <= m68_t + 1;
    as_prev <= m68_as_n;
    if (meas) begin
      if (!m68_as_n) as_low <= as_low + 1;
      if (m68_as_n && !as_prev) begin
        if (as_low != 2) as_bad <= as_bad + 1;
        as_low <= 0;
      end
      if (!m68_as_n && as_prev) begin
        n_cyc <= n_cyc + 1;
        if (first_as < 0) first_as <= m68_t;
        last_as <= m68_t;
        if (n_cyc > 0 && as_high < 2) as_bad <= as_bad + 1;
        as_high <= 0;
      end else if (m68_as_n) as_high <= as_high + 1;
    end
  end

  task automatic timed_block(input int x, input int pc_dw, input int m68_start, input bit lines);
    logic [15:0] addrs [$];
    logic [31:0] v;
    int guard, t0, t_total, nd, expect_span, r0, dm0, dl0;
    for (int i = 0; i < x; i++) addrs.push_back(16'((m68_start + 2 * i) & 16'hEFFE));
    for (int i = 0; i < x; i += 2)
      io_wr(0, {(i + 1 < x) ? addrs[i + 1] : 16'h0, addrs[i]}, (i + 1 < x) ? 4'b0000 : 4'b1100);
    v = MEM_BASE + 32'(4 * pc_dw);
    io_wr(4, {8'h00, v[23:16], v[15:0]}, 4'b1000);
    io_wr(8, {16'h0, 16'(x)}, 4'b1100);
    inj_retry = lines; inj_disc = lines;
    r0 = c_retry; dm0 = c_disc_mid; dl0 = c_disc_last;
    span = 0; f_clks = 0; g_after = 0; restarts = 0; in_pci = 0;
    n_cyc = 0; first_as = -1; as_bad = 0; as_low = 0; as_high = 0;
    meas = 1;
    t0 = $time;
    io_wr(8, {8'h00, 8'h01, 16'h0}, 4'b1011);              // READ = 1, start
    guard = 0;
    while (!inta_oe && guard < 200000) begin @(posedge pci_clk); guard++; end
    t_total = ($time - t0) / 30;
    meas = 0;
    inj_retry = 0; inj_disc = 0;
    check(inta_oe, "end-of-block interrupt");
    io_rd(4, v);                                            // clear IRQ
    for (int i = 0; i < x; i++) begin
      logic [15:0] pcw;
      pcw = (i % 2 == 0) ? pcmem[pc_dw + i / 2][15:0] : pcmem[pc_dw + i / 2][31:16];
      check(pcw == m68mem[addrs[i][15:1]], $sformatf("word %0d", i));
    end
    nd = (x + 1) / 2;
    expect_span = 1 + nd + 1 + (c_disc_last - dl0) + 4 * (c_disc_mid - dm0) + 5 * (c_retry - r0);
    check(n_cyc == x, $sformatf("%0d MC68000 cycles for %0d words", n_cyc, x));
    check(as_bad == 0, "every #AS low for 2 clocks and high for at least 2");
    check(f_clks == 1, $sformatf("one clock in F (%0d)", f_clks));
    check(g_after == restarts, $sformatf("one request clock per restart (%0d, %0d)", g_after, restarts));
    check(span == expect_span, $sformatf("PCI part %0d clocks, expected %0d (D=%0d retry=%0d disc=%0d last-disc=%0d)",
          span, expect_span, nd, c_retry - r0, c_disc_mid - dm0, c_disc_last - dl0));
    if (lines) check(c_retry - r0 == nd / 8 && c_disc_mid - dm0 == nd / 8 - 1 && c_disc_last - dl0 == 1,
                     "one retry and one disconnect per cache line");
    $display("block of %0d words: MC68000 phase %0d clocks of 8 MHz per word (model: 4), PCI part %0d PCI clocks, whole transfer %0d PCI clocks (%0d per word)",
             x, (x > 1) ? (last_as - first_as) / (x - 1) : 0, span, t_total, t_total / x);
  endtask

  initial begin
    repeat (3000000) @(posedge pci_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idsel = 0;
    for (int i = 0; i < 32768; i++) m68mem[i] = 16'(i * 5 + 16'h2468);
    for (int i = 0; i < MEM_DW; i++) pcmem[i] = 32'hDEAD_0000 + 32'(i);
    repeat (5) @(posedge pci_clk);
    pci_rst_n = 1;
    repeat (5) @(posedge pci_clk);
    cfg_wr(4, IOB);
    cfg_wr(1, 32'h0000_0001);
    cfg_wr(3, 32'h0000_FF00);                                // Latency Timer 255
    io_wr(4, 32'h0100_0000, 4'b0111);                        // release #RESET68
    timed_block(10, 0, 16'h0200, 0);
    timed_block(256, 128, 16'h1000, 0);
    timed_block(256, 512, 16'h3000, 1);
    check(c_par > 0, "parity driven");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
