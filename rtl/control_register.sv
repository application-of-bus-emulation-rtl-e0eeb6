// Bridge control register.
//
// Holds the READ bit that sets the direction of the next block transfer:
// 0 moves the block from PC memory to the MC68000 system, 1 from the MC68000
// system to PC memory. Software writes it last in its programming sequence;
// the write itself (the #IOW10 strobe) starts the control unit. READ is taken
// from bit 0 of the written byte, a choice of this design. It is cleared by
// PCI #RST and by the bridge's #RESET.
module control_register (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [7:0] wr_byte,
  output logic       read_dir
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      read_dir <= 1'b0;
    else if (wr)
      read_dir <= wr_byte[0];
  end
endmodule
