// Control unit of the bridge (the PCI-MC68000 machine).
//
// One state machine that coordinates a block transfer and moves the block
// between the bridge's data memory and PC memory as a PCI bus master. It
// leaves its idle state A when software writes the control register (the
// iow10 strobe, state A waits for it, state B for its end while it reloads the
// access counter). Then, depending on the READ bit:
//   READ = 1 (MC68000 system -> PC): MC68000 bus cycles (C: start a cycle and
//     wait for #AS, D: wait for the end of the cycle, ad0) until the access
//     counter is empty; F reloads the counter and requests the bus; then one or
//     more PCI memory write transactions; finally E.
//   READ = 0 (PC -> MC68000 system): PCI memory read transactions first, then
//     N2 reloads the counter and the C/D loop runs MC68000 write cycles; E.
// E requests the end-of-block interrupt (IRQB) and clears the two FIFOs until
// the interrupt service routine reads the double word holding the IRQ clear
// position (the ior4 strobe), then returns to A.
//
// PCI master states: G requests the bus and loads the latency counter until
// GNT is low and the bus is idle; H is the address phase; I the turnaround of
// a read; L data phases with FRAME low; J the last data phase (FRAME high);
// O data phases after the latency timer expired while GNT is still low; P the
// one data phase allowed after GNT was removed; K and M hold IRDY for one clock
// after a target STOP; N and Q drive FRAME and IRDY high for one clock before
// release; Q goes back to G to request the bus again after a retry,
// disconnect or lost time slice. The state diagram, including its branch
// conditions on STOP, DEVSEL, TRDY, GNT, #ZLTCONT and #ULTRANSF, follows the
// bridge's published control unit flow chart; target abort is not handled.
//
// All control outputs are Moore outputs of the state, active high here (the
// flow chart's '#' names are active low), except the PCI pins frame_n and
// irdy_n. xfer marks a completed PCI data phase (IRDY, TRDY and DEVSEL low),
// m68_step the end of an MC68000 cycle seen in state D; the data path uses
// them to advance FIFOs and counters.
module control_unit
  import bridge_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // from the decoder and user registers
  input  logic      iow10,      // write to the control register in progress
  input  logic      ior4,       // read of the IRQ clear position in progress
  input  logic      read_dir,   // READ bit
  // from the MC68000 bus state machine (already synchronized)
  input  logic      as_n,
  input  logic      ad0,        // MC68000 cycle finished
  // counters
  input  logic      zcont,
  input  logic      ultransf,
  input  logic      zltcont,
  // PCI bus
  input  logic      frame_in_n,
  input  logic      irdy_in_n,
  input  logic      trdy_n,
  input  logic      stop_n,
  input  logic      devsel_n,
  input  logic      gnt_n,
  output logic      req_n,
  output logic      frame_n,
  output logic      irdy_n,
  output logic      m_oe,       // drive FRAME and IRDY
  output logic      ad_oe,      // drive AD (address phase, write data)
  output logic      cbe_oe,     // drive C/#BE
  // data unit control
  output logic      iow4s,
  output logic      adden,
  output logic      ldcont,
  output logic      rstfifo,
  output logic      irqb,
  output logic      ldltcont,
  output logic      dltcont,
  output logic      iaddrph,
  output logic      idataph,
  output logic      itac,
  output logic      ists,
  output logic      xfer,
  output logic      m68_step,
  output cu_state_t state
);
  cu_state_t nstate;

  // target response decoding (active-low inputs)
  logic stop_dev, normal, discab, retry;
  assign stop_dev = !stop_n && !devsel_n;              // (#BSTOPi + #BDEVSELi) = 0
  assign normal   =  stop_n && !devsel_n && !trdy_n;   // (/#BSTOPi + #BDEVSELi + #BTRDYi) = 0
  assign discab   = !stop_n && !devsel_n && !trdy_n;   // (#BSTOPi + #BDEVSELi + #BTRDYi) = 0
  assign retry    = !stop_n && !devsel_n &&  trdy_n;   // (#BSTOPi + #BDEVSELi + /#BTRDYi) = 0

  // branch after a completed data phase with FRAME low (L or O)
  function automatic cu_state_t after_gnt(input logic gnt_lost, input logic last);
    if (last)          return CU_J;
    else if (gnt_lost) return CU_P;
    else               return CU_O;
  endfunction

  always_comb begin
    nstate = state;
    unique case (state)
      CU_A:  if (iow10) nstate = CU_B;
      CU_B:  if (!iow10) nstate = read_dir ? CU_C : CU_G;
      CU_C:  if (!as_n) nstate = CU_D;
      CU_D:  if (ad0) begin
               if (!zcont)        nstate = CU_C;
               else if (read_dir) nstate = CU_F;
               else               nstate = CU_E;
             end
      CU_E:  if (ior4) nstate = CU_A;
      CU_F:  nstate = CU_G;
      CU_G:  if (!gnt_n && frame_in_n && irdy_in_n) nstate = CU_H;
      CU_H:  nstate = !read_dir ? CU_I : (ultransf ? CU_J : CU_L);
      CU_I:  nstate = ultransf ? CU_J : CU_L;
      CU_J:  if (retry)       nstate = CU_K;
             else if (normal) nstate = CU_N;
             else if (discab) nstate = CU_M;
      CU_K:  nstate = CU_Q;
      CU_L:  if (stop_dev)    nstate = CU_K;
             else if (normal) begin
               if (!zltcont)  nstate = ultransf ? CU_J : CU_L;
               else           nstate = after_gnt(gnt_n, ultransf);
             end
      CU_M:  nstate = CU_N;
      CU_N:  nstate = read_dir ? CU_E : CU_N2;
      CU_N2: nstate = CU_C;
      CU_O:  if (stop_dev)    nstate = CU_K;
             else if (normal) nstate = after_gnt(gnt_n, ultransf);
      CU_P:  if (stop_dev)    nstate = CU_K;
             else if (normal) nstate = CU_Q;
      CU_Q:  nstate = CU_G;
      default: nstate = CU_A;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= CU_A;
    else        state <= nstate;
  end

  // Moore outputs
  always_comb begin
    iow4s = 1'b0; adden = 1'b0; ldcont = 1'b0; rstfifo = 1'b0; irqb = 1'b0;
    req_n = 1'b1; ldltcont = 1'b0; dltcont = 1'b0;
    iaddrph = 1'b0; idataph = 1'b0; itac = 1'b0; ists = 1'b0;
    frame_n = 1'b1; irdy_n = 1'b1;
    unique case (state)
      CU_B:  ldcont = 1'b1;
      CU_C:  begin iow4s = 1'b1; adden = 1'b1; end
      CU_D:  adden = 1'b1;
      CU_E:  begin irqb = 1'b1; rstfifo = 1'b1; end
      CU_F:  begin ldcont = 1'b1; req_n = 1'b0; end
      CU_G:  begin ldltcont = 1'b1; req_n = 1'b0; end
      CU_H:  begin iaddrph = 1'b1; frame_n = 1'b0; dltcont = 1'b1; end
      CU_I:  begin itac = 1'b1; frame_n = 1'b0; irdy_n = 1'b0; dltcont = 1'b1; end
      CU_J, CU_K, CU_M, CU_P:
             begin idataph = 1'b1; irdy_n = 1'b0; end
      CU_L:  begin idataph = 1'b1; frame_n = 1'b0; irdy_n = 1'b0; dltcont = 1'b1; end
      CU_N:  ists = 1'b1;
      CU_N2: ldcont = 1'b1;
      CU_O:  begin idataph = 1'b1; frame_n = 1'b0; irdy_n = 1'b0; end
      CU_Q:  begin ists = 1'b1; req_n = 1'b0; end
      default: ;
    endcase
  end

  assign m_oe   = iaddrph || itac || idataph || ists;
  assign cbe_oe = iaddrph || itac || idataph;
  assign ad_oe  = iaddrph || (read_dir && idataph);
  assign xfer   = (state == CU_J || state == CU_L || state == CU_O || state == CU_P)
                  && !trdy_n && !devsel_n;
  assign m68_step = (state == CU_D) && ad0;

endmodule
