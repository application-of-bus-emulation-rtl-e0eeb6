// PCI/MC68000 bridge: a DMA bus emulator that moves blocks of 16-bit words
// between the memory of a PCI host (the substitute system) and an MC68000
// based system (the target system), whose bus it emulates.
//
// Software programs the bridge through 16 bytes of PCI I/O space:
//   byte 0-1  MC68000 address, even slot   (write; pushes the address memory
//   byte 2-3  MC68000 address, odd slot     with one pair per double word)
//   byte 4-5  PC memory address bits [15:0]  (address counter)
//   byte 6    PC memory address bits [23:16] (page register)
//   byte 7    read: clears the end-of-block IRQ; write: bit 0 -> #RESET level
//   byte 8-9  word count (access counter; reads return the current count)
//   byte 10   read: IRQ status (bit 0 IRQA, bit 1 IRQB); write: control
//             register, bit 0 = READ; this write starts the transfer
//   byte 11   interrupt control register (bit 0 enable, bits 3:1 level)
// With READ = 1 the bridge runs one MC68000 read cycle per stored address,
// packs the words two per double word into its data memory and then writes
// them to PC memory with PCI memory write bursts. With READ = 0 it first reads
// the block from PC memory with PCI memory read bursts and then runs MC68000
// write cycles. At the end it interrupts the PC on #INTA.
//
// The PCI pins are split into input, output and output-enable signals; an
// open-drain #INTA is pulled low while inta_oe is high. frame/irdy are driven
// by the bridge as master (m_oe), trdy/stop/devsel as target (t_oe). The
// MC68000 side runs on its own 8 MHz clock; the handshake between the two
// state machines (iow4s one way, #AS and ad0 the other) is resynchronized
// with two-flop synchronizers, while the address, data and READ values they
// qualify are held stable across the handshake. 16-bit word cycles only.
// The register map, the block structure and the two state machines follow
// the published bridge; the FIFO depth, the bit positions inside bytes 7, 10
// and 11, the clock-domain crossing and the byte enables of the last double
// word of an odd-length block (C/#BE = 1100) are this design's choices.
module pci_m68k_bridge
  import bridge_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 128   // double words in each FIFO
) (
  // PCI
  input  logic        pci_clk,
  input  logic        pci_rst_n,
  input  logic [31:0] ad_i,
  output logic [31:0] ad_o,
  output logic        ad_oe,
  input  logic [3:0]  cbe_i,
  output logic [3:0]  cbe_o,
  output logic        cbe_oe,
  output logic        par_o,
  output logic        par_oe,
  input  logic        frame_i,
  output logic        frame_o,
  input  logic        irdy_i,
  output logic        irdy_o,
  output logic        m_oe,
  input  logic        trdy_i,
  output logic        trdy_o,
  input  logic        stop_i,
  output logic        stop_o,
  input  logic        devsel_i,
  output logic        devsel_o,
  output logic        t_oe,
  input  logic        idsel,
  output logic        req_n,
  input  logic        gnt_n,
  output logic        inta_oe,
  // MC68000 system
  input  logic        m68_clk,
  output logic [15:1] m68_a,
  output logic        m68_a_oe,
  input  logic [15:0] m68_d_i,
  output logic [15:0] m68_d_o,
  output logic        m68_d_oe,
  output logic        m68_as_n,
  output logic        m68_uds_n,
  output logic        m68_lds_n,
  output logic        m68_wr_n,
  input  logic        m68_dtack_n,
  input  logic        m68_vpa_n,
  output logic        m68_vma_n,
  output logic        m68_e,
  output logic        m68_reset_n,
  input  logic [2:0]  m68_ipl_n
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  // ---------------- decoder and register access ----------------
  logic [31:0] qa;
  logic        io_rd, io_wr, cfg_rd, cfg_wr, rd_ad_oe;
  logic [31:4] bar0;
  logic [7:0]  latency_timer, int_line;
  logic        io_enable;
  logic [31:0] cfg_rdata;
  dec_state_t  dec_state;

  pci_decoder u_decoder (
    .clk(pci_clk), .rst_n(pci_rst_n),
    .frame_n(frame_i), .irdy_n(irdy_i), .idsel(idsel), .ad(ad_i), .cbe_n(cbe_i),
    .bar0(bar0), .io_enable(io_enable),
    .trdy_n(trdy_o), .stop_n(stop_o), .devsel_n(devsel_o), .t_oe(t_oe),
    .rd_ad_oe(rd_ad_oe), .qa(qa),
    .io_rd(io_rd), .io_wr(io_wr), .cfg_rd(cfg_rd), .cfg_wr(cfg_wr),
    .state(dec_state)
  );

  config_space u_config (
    .clk(pci_clk), .rst_n(pci_rst_n),
    .dw(qa[7:2]), .wr(cfg_wr), .be_n(cbe_i), .wr_data(ad_i),
    .rd_data(cfg_rdata), .bar0(bar0), .latency_timer(latency_timer),
    .io_enable(io_enable), .int_line(int_line)
  );

  logic [1:0] io_dw;
  logic [3:0] wbe;       // byte written in this clock (active high)
  assign io_dw = qa[3:2];
  assign wbe   = ~cbe_i;

  logic wr_addrmem, wr_acnt_lo, wr_acnt_hi, wr_page, wr_reset;
  logic wr_cnt_lo, wr_cnt_hi, wr_ctrl, wr_ictl, ior4;
  assign wr_addrmem = io_wr && io_dw == IO_DW_ADDRMEM && wbe != 4'b0000;
  assign wr_acnt_lo = io_wr && io_dw == IO_DW_ADDRCNT && wbe[0];
  assign wr_acnt_hi = io_wr && io_dw == IO_DW_ADDRCNT && wbe[1];
  assign wr_page    = io_wr && io_dw == IO_DW_ADDRCNT && wbe[2];
  assign wr_reset   = io_wr && io_dw == IO_DW_ADDRCNT && wbe[3];
  assign wr_cnt_lo  = io_wr && io_dw == IO_DW_CTRL && wbe[0];
  assign wr_cnt_hi  = io_wr && io_dw == IO_DW_CTRL && wbe[1];
  assign wr_ctrl    = io_wr && io_dw == IO_DW_CTRL && wbe[2];   // #IOW10
  assign wr_ictl    = io_wr && io_dw == IO_DW_CTRL && wbe[3];
  assign ior4       = io_rd && io_dw == IO_DW_ADDRCNT;           // #IOR4*

  // ---------------- user registers ----------------
  logic reset_n_reg, regs_rst_n, read_dir;
  reset_register u_reset_reg (
    .clk(pci_clk), .rst_n(pci_rst_n), .wr(wr_reset), .wr_byte(ad_i[31:24]),
    .reset_n(reset_n_reg)
  );
  assign regs_rst_n  = pci_rst_n && reset_n_reg;
  assign m68_reset_n = regs_rst_n;

  control_register u_ctrl_reg (
    .clk(pci_clk), .rst_n(regs_rst_n), .wr(wr_ctrl), .wr_byte(ad_i[23:16]),
    .read_dir(read_dir)
  );

  logic [7:0] status_byte, ictl_byte;
  logic       irqa, irqb;
  interrupt_control u_intctl (
    .clk(pci_clk), .rst_n(regs_rst_n), .ipl_n(m68_ipl_n), .irqb(irqb),
    .wr_ictl(wr_ictl), .wr_byte(ad_i[31:24]),
    .status_byte(status_byte), .ictl_byte(ictl_byte), .irqa(irqa), .inta_oe(inta_oe)
  );

  logic        ldcont, zcont, ultransf, xfer, m68_step;
  logic [15:0] acc_count, acc_init;
  access_counter u_acc_cnt (
    .clk(pci_clk), .rst_n(pci_rst_n),
    .wr_lo(wr_cnt_lo), .wr_hi(wr_cnt_hi), .wr_byte_lo(ad_i[7:0]), .wr_byte_hi(ad_i[15:8]),
    .ld(ldcont), .dec1(m68_step), .dec2(xfer),
    .count(acc_count), .init_val(acc_init), .zcont(zcont), .ultransf(ultransf)
  );

  logic [31:0] pci_addr;
  address_counter u_addr_cnt (
    .clk(pci_clk), .rst_n(pci_rst_n),
    .wr_lo(wr_acnt_lo), .wr_hi(wr_acnt_hi), .wr_page(wr_page),
    .wr_byte_lo(ad_i[7:0]), .wr_byte_hi(ad_i[15:8]), .wr_byte_page(ad_i[23:16]),
    .inc(xfer), .pci_addr(pci_addr)
  );

  logic ldltcont, dltcont, zltcont;
  logic [7:0] lt_count;
  latency_counter u_lat_cnt (
    .clk(pci_clk), .rst_n(pci_rst_n), .ld(ldltcont), .dec(dltcont),
    .load_val(latency_timer), .zltcont(zltcont), .count(lt_count)
  );

  // ---------------- control unit ----------------
  logic      as_s, ad0_s, cu_ad_oe, iow4s, adden, rstfifo;
  logic      iaddrph, idataph, itac, ists;
  cu_state_t cu_state;
  control_unit u_cu (
    .clk(pci_clk), .rst_n(pci_rst_n),
    .iow10(wr_ctrl), .ior4(ior4), .read_dir(read_dir),
    .as_n(as_s), .ad0(ad0_s),
    .zcont(zcont), .ultransf(ultransf), .zltcont(zltcont),
    .frame_in_n(frame_i), .irdy_in_n(irdy_i),
    .trdy_n(trdy_i), .stop_n(stop_i), .devsel_n(devsel_i), .gnt_n(gnt_n),
    .req_n(req_n), .frame_n(frame_o), .irdy_n(irdy_o), .m_oe(m_oe),
    .ad_oe(cu_ad_oe), .cbe_oe(cbe_oe),
    .iow4s(iow4s), .adden(adden), .ldcont(ldcont), .rstfifo(rstfifo), .irqb(irqb),
    .ldltcont(ldltcont), .dltcont(dltcont), .iaddrph(iaddrph), .idataph(idataph),
    .itac(itac), .ists(ists), .xfer(xfer), .m68_step(m68_step), .state(cu_state)
  );

  // ---------------- address and data memories ----------------
  logic        half;        // which 16-bit half the MC68000 side is on
  logic        last_half;   // this MC68000 step finishes a double word
  logic [15:0] lo_hold;     // first word of a double word read from the target
  logic [15:0] m68_rdata;
  logic [31:0] am_wdata, am_rdata, dm_wdata, dm_rdata;
  logic        am_empty, am_full, dm_empty, dm_full;
  logic [CW-1:0] am_count, dm_count;
  logic        dm_push, dm_pop;

  assign last_half = m68_step && (half || zcont);

  always_ff @(posedge pci_clk or negedge pci_rst_n) begin
    if (!pci_rst_n) begin
      half    <= 1'b0;
      lo_hold <= '0;
    end else if (ldcont || rstfifo) begin
      half    <= 1'b0;
    end else if (m68_step) begin
      half <= !half;
      if (!half) lo_hold <= m68_rdata;
    end
  end

  for (genvar b = 0; b < 4; b++) begin : g_am_bytes
    assign am_wdata[8*b +: 8] = wbe[b] ? ad_i[8*b +: 8] : 8'h00;
  end

  bridge_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_addr_mem (
    .clk(pci_clk), .rst_n(pci_rst_n), .clr(rstfifo),
    .push(wr_addrmem), .wdata(am_wdata), .pop(last_half),
    .rdata(am_rdata), .empty(am_empty), .full(am_full), .count(am_count)
  );

  // READ = 1: MC68000 side fills, PCI side empties; READ = 0 the other way
  assign dm_push  = read_dir ? last_half : xfer;
  assign dm_pop   = read_dir ? xfer : last_half;
  assign dm_wdata = read_dir ? (half ? {m68_rdata, lo_hold} : {16'h0000, m68_rdata}) : ad_i;

  bridge_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_data_mem (
    .clk(pci_clk), .rst_n(pci_rst_n), .clr(rstfifo),
    .push(dm_push), .wdata(dm_wdata), .pop(dm_pop),
    .rdata(dm_rdata), .empty(dm_empty), .full(dm_full), .count(dm_count)
  );

  // ---------------- PCI AD, C/BE and PAR ----------------
  logic [31:0] io_rdata;
  always_comb begin
    unique case (io_dw)
      IO_DW_CTRL: io_rdata = {ictl_byte, status_byte, acc_count};
      default:    io_rdata = 32'h0;
    endcase
  end

  always_comb begin
    if (rd_ad_oe)     ad_o = cfg_rd ? cfg_rdata : io_rdata;
    else if (iaddrph) ad_o = pci_addr;
    else              ad_o = dm_rdata;
  end
  assign ad_oe = rd_ad_oe || cu_ad_oe;

  // the last double word of an odd word count carries one word only
  assign cbe_o = iaddrph ? (read_dir ? CMD_MEMW : CMD_MEMR)
                         : ((acc_count == 16'd1) ? 4'b1100 : 4'b0000);

  parity_generator u_parity (
    .clk(pci_clk), .rst_n(pci_rst_n),
    .ad(ad_oe ? ad_o : ad_i), .cbe(cbe_oe ? cbe_o : cbe_i), .drive(ad_oe),
    .par(par_o), .par_oe(par_oe)
  );

  // ---------------- MC68000 side ----------------
  logic as_n_m, ad0_m;
  m68k_bus_machine u_m68 (
    .clk(m68_clk), .reset68_n(regs_rst_n),
    .iow4s(iow4s), .read(read_dir), .word(1'b1),
    .a0(half ? am_rdata[16] : am_rdata[0]),
    .d_in(m68_d_i), .dtack_n(m68_dtack_n), .vpa_n(m68_vpa_n),
    .ad0(ad0_m), .e(m68_e), .as_n(as_n_m), .uds_n(m68_uds_n), .lds_n(m68_lds_n),
    .wr68_n(m68_wr_n), .vma_n(m68_vma_n), .d_oe(m68_d_oe), .rdata(m68_rdata)
  );
  assign m68_as_n = as_n_m;

  sync2 #(.RESET_VAL(1'b1)) u_sync_as  (.clk(pci_clk), .rst_n(pci_rst_n), .d(as_n_m), .q(as_s));
  sync2 #(.RESET_VAL(1'b0)) u_sync_ad0 (.clk(pci_clk), .rst_n(pci_rst_n), .d(ad0_m), .q(ad0_s));

  assign m68_a    = half ? am_rdata[31:17] : am_rdata[15:1];
  assign m68_a_oe = adden;
  assign m68_d_o  = half ? dm_rdata[31:16] : dm_rdata[15:0];

endmodule
