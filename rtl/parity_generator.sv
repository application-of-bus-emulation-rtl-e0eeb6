// PCI parity generator.
//
// PAR is the even parity of AD[31:0] and C/#BE[3:0], driven by whoever drove
// AD, one clock after it. drive says that the bridge drives AD in this clock:
// an address phase of its own transaction, a data phase of its memory write,
// or the data phase of a configuration or I/O read aimed at it. par and par_oe
// are the registered PAR value and its output enable for the next clock.
// The three cases in which the bridge drives PAR are those of the bridge
// description; even parity one clock late is the PCI rule.
module parity_generator (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] ad,
  input  logic [3:0]  cbe,
  input  logic        drive,
  output logic        par,
  output logic        par_oe
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par    <= 1'b0;
      par_oe <= 1'b0;
    end else begin
      par    <= ^{ad, cbe};
      par_oe <= drive;
    end
  end
endmodule
