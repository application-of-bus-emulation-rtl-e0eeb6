// PC memory address counter and address page register.
//
// The 16-bit counter holds address bits [15:0] of the PC memory zone used by
// the block transfer and the page register bits [23:16]; both are written by
// software through byte-wide I/O positions. AD[31:24] of the generated address
// are always zero, so the block must lie in the first 16 MB of PC memory.
// inc advances the counter by one double word (4 bytes) after every double
// word actually transferred, so a transaction cut short by the target restarts
// at the first double word not yet moved. The counter wraps inside its 64 KB
// page and bits [1:0] of the bus address are forced to zero (linear burst);
// both are choices of this design.
module address_counter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_lo,      // address bits [7:0]
  input  logic        wr_hi,      // address bits [15:8]
  input  logic        wr_page,    // address bits [23:16]
  input  logic [7:0]  wr_byte_lo,
  input  logic [7:0]  wr_byte_hi,
  input  logic [7:0]  wr_byte_page,
  input  logic        inc,
  output logic [31:0] pci_addr
);
  logic [15:0] cnt;
  logic [7:0]  page;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      page <= '0;
    end else begin
      if (wr_lo)   cnt[7:0]  <= wr_byte_lo;
      if (wr_hi)   cnt[15:8] <= wr_byte_hi;
      if (wr_page) page      <= wr_byte_page;
      if (inc && !(wr_lo || wr_hi)) cnt <= cnt + 16'd4;
    end
  end

  assign pci_addr = {8'h00, page, cnt[15:2], 2'b00};

endmodule
