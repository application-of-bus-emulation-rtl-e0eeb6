// Interrupt control of the bridge.
//
// Two sources can interrupt the PC through the shared PCI #INTA pin:
//   IRQA  a device of the MC68000 system requests an interrupt on the
//         active-low priority lines #IPL[2:0] and target interrupts are enabled;
//   IRQB  the control unit has finished a block transfer (its state E).
// When either is active, inta_oe turns on the open-drain driver that pulls
// #INTA low. The interrupt service routine reads the IRQ status position to
// find the source (bit 0 IRQA, bit 1 IRQB) and the interrupt control register
// to see the current priority level. The interrupt control register holds the
// mask: bit 0 set enables target interrupts; bits [3:1] read back the
// current level (7 - #IPL, 0 meaning no request). The bit layout of both
// positions is this design's choice. The mask is cleared by PCI #RST and by
// the bridge's #RESET.
module interrupt_control (
  input  logic       clk,
  input  logic       rst_n,      // PCI #RST combined with the bridge #RESET
  input  logic [2:0] ipl_n,      // MC68000 system #IPL2..#IPL0
  input  logic       irqb,       // end of block transfer, from control unit
  input  logic       wr_ictl,    // write of the interrupt control register
  input  logic [7:0] wr_byte,
  output logic [7:0] status_byte,
  output logic [7:0] ictl_byte,
  output logic       irqa,
  output logic       inta_oe
);
  logic       enable;
  logic [2:0] level;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      enable <= 1'b0;
    else if (wr_ictl)
      enable <= wr_byte[0];
  end

  // Priority lines are registered once against metastability.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      level <= '0;
    else
      level <= ~ipl_n;
  end

  assign irqa        = enable && (level != 3'd0);
  assign inta_oe     = irqa || irqb;
  assign status_byte = {6'b0, irqb, irqa};
  assign ictl_byte   = {4'b0, level, enable};

endmodule
