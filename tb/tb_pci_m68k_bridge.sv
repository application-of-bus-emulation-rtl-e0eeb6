// End-to-end test of pci_m68k_bridge at its default parameters.
//
// Models around the bridge:
//   host     a PCI initiator for configuration and I/O transactions (the
//            host/PCI bridge of the PC), able to run a two-phase burst;
//   memory   PC main memory as a PCI target for the bridge's memory reads and
//            writes, with optional wait states, a retry when a new cache
//            line starts and a disconnect on the last double word of each
//            8 double word cache line;
//   arbiter  grants the bridge unless the host or another master wants the
//            bus; the other master can be made to take GNT away periodically;
//   target   an MC68000 system: word memory, #DTACK after random wait states,
//            and synchronous (#VPA) peripherals at addresses F000h-FFFFh,
//            plus #IPL lines.
// The test configures the bridge through configuration space, releases the
// target reset, and runs block transfers in both directions, odd and even word
// counts, a block that fills the FIFOs, retries, disconnects, time slice
// expiry with and without GNT, an interrupt from the target, and a burst to
// the I/O space that the bridge must disconnect. Data is compared with
// reference copies kept here; PAR is checked on every clock the bridge drives
// it; each mechanism is counted and must occur at least once.
module tb_pci_m68k_bridge;
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
    other_busy <= other_en && ((other_t % 40) >= 28);
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
        if (!m68_a_oe && m68_reset_n) begin failures++; $display("FAIL: address not driven during AS"); end
        if (sync_dev) c_sync++;
      end
    end else begin
      as_cnt <= 0;
      m68_waits <= $urandom_range(0, 2);
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

  // program and run one block; addrs are MC68000 byte addresses (even)
  task automatic run_block(input bit dir, input int x, input int pc_dw, input int m68_start,
                           input bit mixed_sync);
    logic [15:0] addrs [$];
    logic [31:0] v;
    int guard;
    for (int i = 0; i < x; i++) begin
      int a;
      a = (m68_start + 2 * i * 3) & 16'hEFFE;           // scattered, below F000h
      if (mixed_sync && i % 5 == 2) a = 16'hF000 + 2 * i;
      addrs.push_back(16'(a));
    end
    for (int i = 0; i < x; i += 2) begin
      logic [15:0] odd;
      odd = (i + 1 < x) ? addrs[i + 1] : 16'h0;
      io_wr(0, {odd, addrs[i]}, (i + 1 < x) ? 4'b0000 : 4'b1100);
    end
    v = MEM_BASE + 32'(4 * pc_dw);
    io_wr(4, {8'h00, v[23:16], v[15:0]}, 4'b1000);        // P4, P5, P6
    io_wr(8, {16'h0, 16'(x)}, 4'b1100);                     // P8, P9
    io_wr(8, {8'h00, 8'(dir), 16'h0}, 4'b1011);             // P10: READ, start
    guard = 0;
    while (!inta_oe && guard < 400000) begin @(posedge pci_clk); guard++; end
    check(inta_oe, "end-of-block interrupt");
    io_rd(8, v);
    check(v[17:16] == 2'b10, $sformatf("IRQ status shows the control unit (%h)", v));
    check(v[15:0] == 16'h0, "access counter at zero");
    io_rd(4, v);                                            // P7: clear IRQ
    repeat (2) @(posedge pci_clk);
    check(!inta_oe, "IRQ cleared by reading P7");
    // compare data
    for (int i = 0; i < x; i++) begin
      logic [15:0] pcw;
      pcw = (i % 2 == 0) ? pcmem[pc_dw + i / 2][15:0] : pcmem[pc_dw + i / 2][31:16];
      check(pcw == m68mem[addrs[i][15:1]],
            $sformatf("word %0d: PC %h, MC68000 %h @%h (%s)", i, pcw, m68mem[addrs[i][15:1]],
                      addrs[i], dir ? "read" : "write"));
    end
    if (x % 2 == 1)
      check(pcmem[pc_dw + x / 2][31:16] == 16'hDEAD || !dir, "upper half of the last double word untouched");
  endtask

  initial begin
    repeat (4000000) @(posedge pci_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    idsel = 0;
    for (int i = 0; i < 32768; i++) m68mem[i] = 16'(i * 7 + 16'h1357);
    for (int i = 0; i < MEM_DW; i++) pcmem[i] = 32'hDEAD_0000 + 32'(i);
    repeat (5) @(posedge pci_clk);
    pci_rst_n = 1;
    repeat (5) @(posedge pci_clk);

    // configuration
    cfg_rd(0, v);  check(v == 32'h0001_0001, "vendor/device ID");
    cfg_rd(2, v);  check(v == 32'h0680_0001, "class code and revision");
    cfg_rd(15, v); check(v == 32'h01FF_0100, "Max_Lat, Min_Gnt, interrupt pin");
    cfg_wr(4, IOB);
    cfg_wr(1, 32'h0000_0001);
    cfg_wr(3, 32'h0000_FF00);                      // latency timer 255
    cfg_rd(4, v);  check(v == (IOB | 32'h1), "BAR0 readback");
    check(!m68_reset_n, "target held in reset after PCI reset");
    io_wr(4, 32'h0100_0000, 4'b0111);              // P7: release #RESET
    check(m68_reset_n, "target reset released");

    // 1: MC68000 -> PC, odd count, plain
    run_block(1, 13, 0, 16'h0100, 0);
    // 2: PC -> MC68000, even count, synchronous devices mixed in
    for (int i = 0; i < 12; i++) pcmem[64 + i / 2] = 32'h0;
    for (int i = 0; i < 6; i++) pcmem[64 + i] = 32'hA000_0000 + 32'(i * 32'h0001_0001);
    run_block(0, 12, 64, 16'h2000, 1);
    // 3: retries at line starts, disconnects at line ends, wait states
    inj_retry = 1; inj_disc = 1; inj_wait = 1;
    run_block(1, 40, 132, 16'h3000, 1);
    run_block(0, 33, 200, 16'h4000, 0);
    inj_retry = 0; inj_disc = 0; inj_wait = 0;
    // 4: short time slice, GNT kept (O) and GNT taken by another master (P)
    cfg_wr(3, 32'h0000_0300);                      // latency timer 3
    run_block(1, 30, 300, 16'h5000, 0);
    other_en = 1;
    run_block(1, 60, 340, 16'h6000, 0);
    run_block(0, 50, 340, 16'h7000, 0);
    other_en = 0;
    cfg_wr(3, 32'h0000_FF00);
    // 5: a block that fills both FIFOs (128 double words)
    run_block(1, 256, 512, 16'h0800, 0);

    // 6: interrupt from the MC68000 system
    ipl = 3'b010;
    repeat (4) @(posedge pci_clk);
    check(!inta_oe, "target interrupt masked");
    io_wr(8, 32'h0100_0000, 4'b0111);              // P11 enable
    repeat (2) @(posedge pci_clk);
    check(inta_oe, "target interrupt on INTA");
    io_rd(8, v);
    check(v[16] && v[27:25] == 3'd5, $sformatf("IRQA status and level 5 (%h)", v));
    if (inta_oe && v[16]) c_irqa++;
    ipl = 3'b111;
    repeat (3) @(posedge pci_clk);
    check(!inta_oe, "interrupt gone with the request");

    // 7: an I/O burst is cut to one data phase (disconnect C)
    host_xact(CMD_IOW, IOB + 8, 0, 32'h0100_0000, 4'b0111, 2, rd, st);
    check(st, "disconnect C on a two-phase I/O burst");
    if (st) c_discC++;
    io_rd(8, v);
    check(v[24] == 1'b1, "first data phase written");
    io_wr(8, 32'h0000_0000, 4'b0111);

    // every mechanism must have happened
    check(c_retry > 0, "retry");
    check(c_disc_mid > 0, "disconnect A/B inside a burst");
    check(c_disc_last > 0, "disconnect in the last data phase");
    check(c_slice_gnt > 0, "time slice expired with GNT");
    check(c_slice_nognt > 0, "time slice expired without GNT");
    check(c_turnaround > 0, "memory read turnaround");
    check(c_rearb > 0, "bus re-requested");
    check(c_sync > 0, "synchronous MC68000 cycle");
    check(c_wait68 > 0, "MC68000 wait states");
    check(c_pci_wait > 0, "PCI target wait states");
    check(c_half_dw > 0, "half-used last double word");
    check(c_irqa > 0 && c_irqb > 0, "both interrupt sources");
    check(c_par > 0, "parity driven");
    $display("mechanisms: retry=%0d disc_mid=%0d disc_last=%0d slice_gnt=%0d slice_nognt=%0d ta=%0d rearb=%0d sync=%0d wait68=%0d pciwait=%0d half=%0d irqa=%0d irqb=%0d discC=%0d par=%0d",
             c_retry, c_disc_mid, c_disc_last, c_slice_gnt, c_slice_nognt, c_turnaround, c_rearb,
             c_sync, c_wait68, c_pci_wait, c_half_dw, c_irqa, c_irqb, c_discC, c_par);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
