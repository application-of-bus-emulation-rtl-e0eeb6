// PCI configuration space of the bridge (type 0 header).
//
// Only the first 16 double words (the header) hold anything; the rest of the
// 64 double word space reads as zero. Read-only fields hold the constants of
// bridge_pkg (vendor and device ID 0001h, class code 068000h, revision 01h,
// status 0200h, interrupt pin #INTA, Min_Gnt FFh, Max_Lat 01h). Writable
// fields are: command bit 0 (I/O space enable; bit 2, bus master, reads as
// one), the Latency Timer, Base Address 0 bits [31:4] (a 16-byte I/O space,
// bit 0 reads as one) and the Interrupt Line. All other registers, including
// the cache line size, BIST and the other base addresses, read as zero.
//
// rd_data is combinational from the double word index dw; a write with wr set
// updates the bytes whose active-low byte enable be_n is 0, in one clock.
// The register values and which fields are writable follow the bridge's
// published configuration map; reset values of zero for the writable fields
// are this design's choice.
module config_space
  import bridge_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [5:0]  dw,        // configuration double word number, QA[7:2]
  input  logic        wr,
  input  logic [3:0]  be_n,
  input  logic [31:0] wr_data,
  output logic [31:0] rd_data,
  output logic [31:4] bar0,
  output logic [7:0]  latency_timer,
  output logic        io_enable,
  output logic [7:0]  int_line
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bar0          <= '0;
      latency_timer <= '0;
      io_enable     <= 1'b0;
      int_line      <= '0;
    end else if (wr) begin
      unique case (dw)
        6'd1:  if (!be_n[0]) io_enable <= wr_data[0];
        6'd3:  if (!be_n[1]) latency_timer <= wr_data[15:8];
        6'd4: begin
          if (!be_n[0]) bar0[7:4]   <= wr_data[7:4];
          if (!be_n[1]) bar0[15:8]  <= wr_data[15:8];
          if (!be_n[2]) bar0[23:16] <= wr_data[23:16];
          if (!be_n[3]) bar0[31:24] <= wr_data[31:24];
        end
        6'd15: if (!be_n[0]) int_line <= wr_data[7:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (dw)
      6'd0:    rd_data = {DEVICE_ID, VENDOR_ID};
      6'd1:    rd_data = {STATUS_VAL, 13'b0, 1'b1, 1'b0, io_enable};
      6'd2:    rd_data = {CLASS_CODE, REVISION_ID};
      6'd3:    rd_data = {8'h00, HEADER_TYPE, latency_timer, 8'h00};
      6'd4:    rd_data = {bar0, 4'b0001};
      6'd15:   rd_data = {MAX_LAT, MIN_GNT, INT_PIN, int_line};
      default: rd_data = 32'h0;
    endcase
  end

endmodule
