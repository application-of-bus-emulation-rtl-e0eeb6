// Two-flop synchronizer for a single level signal crossing into the clock
// domain of clk. Used between the PCI clock domain and the 8 MHz MC68000 bus
// clock domain. The output follows the input two rising edges of clk later;
// the reset value is given by the RESET_VAL parameter. This stage is a choice
// of this implementation: the bridge runs its two state machines on two
// clocks and the handshake signals between them must be resynchronized.
module sync2 #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
