// PCI master latency counter.
//
// ld (#LDLTCONT) loads the Latency Timer configuration register value while
// the bridge requests the bus; dec (#DLTCONT) takes one off per PCI clock
// while the bridge owns the bus. The count stops at zero, and zltcont (#ZLTCONT,
// here active high) tells the control unit that the bridge's time slice is
// over. Load takes priority over decrement.
// Load, decrement and zero flag are as the bridge description gives them;
// the width follows the 8-bit Latency Timer register.
module latency_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  logic             dec,
  input  logic [WIDTH-1:0] load_val,
  output logic             zltcont,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      count <= '0;
    else if (ld)
      count <= load_val;
    else if (dec && count != '0)
      count <= count - 1'b1;
  end

  assign zltcont = (count == '0);

endmodule
