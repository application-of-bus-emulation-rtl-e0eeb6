// MC68000 system access counter.
//
// Software stores the number of 16-bit words of the block through two byte
// wide I/O positions (low byte, high byte). That value is kept in a load
// register; ld (the control unit's #LDCONT) copies it into the down counter,
// so the control unit can restart the count for the second half of a block
// transfer. dec1 takes one word off per MC68000 bus cycle, dec2 two words per
// PCI double word transferred; the count stops at zero, so an odd word count
// ends at zero after its last, half-used double word.
//
// zcont and ultransf are the counter's flags for the control unit (#ZCONT and
// #ULTRANSF, here active high). Both look at the value the counter will hold
// after this clock's decrement, so a state machine that decrements and tests
// in the same clock takes the right branch: zcont means no word is left,
// ultransf that the next double word to move is the last one (1 or 2 words
// left). The look-ahead form and the load register are choices of this design.
module access_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_lo,     // write of the low byte position
  input  logic             wr_hi,     // write of the high byte position
  input  logic [7:0]       wr_byte_lo,
  input  logic [7:0]       wr_byte_hi,
  input  logic             ld,        // #LDCONT
  input  logic             dec1,      // one MC68000 cycle done
  input  logic             dec2,      // one PCI double word done
  output logic [WIDTH-1:0] count,
  output logic [WIDTH-1:0] init_val,
  output logic             zcont,
  output logic             ultransf
);
  logic [WIDTH-1:0] nxt;

  always_comb begin
    nxt = count;
    if (ld)
      nxt = init_val;
    else if (dec2)
      nxt = (count >= WIDTH'(2)) ? count - WIDTH'(2) : '0;
    else if (dec1)
      nxt = (count != '0) ? count - WIDTH'(1) : '0;
  end

  assign zcont    = (nxt == '0);
  assign ultransf = (nxt == WIDTH'(1)) || (nxt == WIDTH'(2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_val <= '0;
      count    <= '0;
    end else begin
      if (wr_lo) init_val[7:0]       <= wr_byte_lo;
      if (wr_hi) init_val[WIDTH-1:8] <= wr_byte_hi[WIDTH-9:0];
      count <= nxt;
    end
  end

endmodule
