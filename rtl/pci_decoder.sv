// PCI target decoder of the bridge.
//
// Gives the PC access to the bridge's configuration registers and to its
// 16-byte I/O space of user registers. Every PCI address phase seen while the
// decoder is idle is registered (AD into qa, C/#BE, IDSEL); in the next clock
// state A decodes it:
//   configuration read/write  IDSEL high, type 0 (AD[1:0]=00), function 0
//                             (AD[10:8]=000), command 1010/1011;
//   I/O read/write            IDSEL low, AD[31:4] equal to Base Address 0
//                             [31:4] with I/O space enabled, command 0010/0011.
// Reads go to state B one clock later (turnaround), where DEVSEL, TRDY and the
// read data are driven until the master asserts IRDY. Writes assert DEVSEL and
// TRDY already in state A and complete on the first clock with IRDY low, in A
// or in B. Only single data phase transactions are served: if FRAME is still
// low when the first data phase completes, state C signals disconnect C (STOP
// with DEVSEL, TRDY deasserted) until the master ends; state D drives TRDY,
// STOP and DEVSEL high for one clock before they are released.
//
// Strobes for the register files, all active high here (the #IORx, #IOWx,
// #CNFRx, #CNFWx signals): io_rd and cfg_rd are active while DEVSEL is driven
// for a read; io_wr and cfg_wr are one clock pulses on the clock in which the
// write data phase completes (TRDY and IRDY both low), with byte enables taken
// from C/#BE in that clock. The register is selected by qa[3:2] (I/O) or
// qa[7:2] (configuration). Writing on the completing clock, rather than on the
// rising edge of the strobe, and the I/O enable gating of the base address
// match are choices of this design. DEVSEL timing is medium for reads.
module pci_decoder
  import bridge_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // PCI bus as seen at the pins
  input  logic        frame_n,
  input  logic        irdy_n,
  input  logic        idsel,
  input  logic [31:0] ad,
  input  logic [3:0]  cbe_n,
  // configuration state
  input  logic [31:4] bar0,
  input  logic        io_enable,
  // target control outputs and their common output enable
  output logic        trdy_n,
  output logic        stop_n,
  output logic        devsel_n,
  output logic        t_oe,
  output logic        rd_ad_oe,    // drive read data on AD
  // register access
  output logic [31:0] qa,
  output logic        io_rd,
  output logic        io_wr,
  output logic        cfg_rd,
  output logic        cfg_wr,
  output dec_state_t  state
);
  dec_state_t nstate;
  logic       frame_q;         // FRAME in the previous clock
  logic       addr_valid;      // qa/qcbe/qidsel hold a fresh address phase
  logic [3:0] qcbe;
  logic       qidsel;
  logic       acc_read, acc_cfg;  // kind of the access being served

  logic t0, f0, baddr;
  logic hit_cfg_r, hit_cfg_w, hit_io_r, hit_io_w, hit_w, hit_r;

  assign t0    = (qa[1:0] == 2'b00);
  assign f0    = (qa[10:8] == 3'b000);
  assign baddr = io_enable && (qa[31:4] == bar0);

  assign hit_cfg_r = addr_valid &&  qidsel && t0 && f0 && (qcbe == CMD_CNFR);
  assign hit_cfg_w = addr_valid &&  qidsel && t0 && f0 && (qcbe == CMD_CNFW);
  assign hit_io_r  = addr_valid && !qidsel && baddr && (qcbe == CMD_IOR);
  assign hit_io_w  = addr_valid && !qidsel && baddr && (qcbe == CMD_IOW);
  assign hit_w     = hit_cfg_w || hit_io_w;
  assign hit_r     = hit_cfg_r || hit_io_r;

  // Address phase capture
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q    <= 1'b1;
      addr_valid <= 1'b0;
      qa         <= '0;
      qcbe       <= '0;
      qidsel     <= 1'b0;
    end else begin
      frame_q    <= frame_n;
      addr_valid <= 1'b0;
      if (state == DEC_A && !frame_n && frame_q) begin
        qa         <= ad;
        qcbe       <= cbe_n;
        qidsel     <= idsel;
        addr_valid <= 1'b1;
      end
    end
  end

  // Next state
  always_comb begin
    nstate = state;
    unique case (state)
      DEC_A: begin
        if (hit_r)
          nstate = DEC_B;
        else if (hit_w)
          nstate = irdy_n ? DEC_B : (frame_n ? DEC_D : DEC_C);
      end
      DEC_B: if (!irdy_n) nstate = frame_n ? DEC_D : DEC_C;
      DEC_C: if (!(!irdy_n && frame_n)) nstate = DEC_C; else nstate = DEC_D;
      DEC_D: nstate = DEC_A;
      default: nstate = DEC_A;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= DEC_A;
      acc_read <= 1'b0;
      acc_cfg  <= 1'b0;
    end else begin
      state <= nstate;
      if (state == DEC_A && (hit_r || hit_w)) begin
        acc_read <= hit_r;
        acc_cfg  <= hit_cfg_r || hit_cfg_w;
      end
    end
  end

  // Outputs (Moore in B, C, D; Mealy in A for a decoded write)
  always_comb begin
    trdy_n   = 1'b1;
    stop_n   = 1'b1;
    devsel_n = 1'b1;
    t_oe     = 1'b0;
    rd_ad_oe = 1'b0;
    io_rd    = 1'b0;
    io_wr    = 1'b0;
    cfg_rd   = 1'b0;
    cfg_wr   = 1'b0;
    unique case (state)
      DEC_A: if (hit_w) begin
        t_oe     = 1'b1;
        trdy_n   = 1'b0;
        devsel_n = 1'b0;
        io_wr    = hit_io_w  && !irdy_n;
        cfg_wr   = hit_cfg_w && !irdy_n;
      end
      DEC_B: begin
        t_oe     = 1'b1;
        trdy_n   = 1'b0;
        devsel_n = 1'b0;
        rd_ad_oe = acc_read;
        io_rd    = acc_read && !acc_cfg;
        cfg_rd   = acc_read &&  acc_cfg;
        io_wr    = !acc_read && !acc_cfg && !irdy_n;
        cfg_wr   = !acc_read &&  acc_cfg && !irdy_n;
      end
      DEC_C: begin
        t_oe     = 1'b1;
        stop_n   = 1'b0;
        devsel_n = 1'b0;
      end
      DEC_D: t_oe = 1'b1;
      default: ;
    endcase
  end

endmodule
