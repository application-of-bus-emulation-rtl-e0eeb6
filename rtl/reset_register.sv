// Reset register.
//
// Drives the bridge's #RESET line, which resets the control and interrupt
// registers, the MC68000 bus state machine and, through #RESET68, the devices
// of the MC68000 system. PCI #RST makes it active (low), so the target system
// is held in reset after the PC powers up or resets. Software writes the
// reset position: bit 0 of the written byte becomes the #RESET level (0
// asserts it, 1 releases it). The use of bit 0 is this design's choice.
module reset_register (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [7:0] wr_byte,
  output logic       reset_n
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      reset_n <= 1'b0;
    else if (wr)
      reset_n <= wr_byte[0];
  end
endmodule
