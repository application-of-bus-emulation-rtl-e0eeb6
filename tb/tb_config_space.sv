// Self-checking test of config_space: every header double word is read and
// compared with the expected configuration register map, then the writable
// fields are written with partial byte enables and the read-only fields are
// checked to ignore writes.
module tb_config_space;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [5:0] dw = 0;
  logic [3:0] be_n = 4'hF;
  logic [31:0] wr_data = 0, rd_data;
  logic [31:4] bar0;
  logic [7:0] latency_timer, int_line;
  logic io_enable;
  int checks = 0, failures = 0;

  config_space dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s dw=%0d rd=%h", what, dw, rd_data); end
  endtask

  task automatic cfg_write(input int d, input logic [3:0] ben, input logic [31:0] v);
    @(negedge clk);
    dw = 6'(d); be_n = ben; wr_data = v; wr = 1; @(negedge clk); wr = 0;
  endtask

  logic [31:0] expect_hdr [16];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_hdr = '{32'h0001_0001, 32'h0200_0004, 32'h0680_0001, 32'h0000_0000,
                   32'h0000_0001, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0,
                   32'h0, 32'h0, 32'h0, 32'h01FF_0100};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      dw = 6'(i); #1;
      check(rd_data == ((i < 16) ? expect_hdr[i] : 32'h0), "reset contents");
    end
    // try to overwrite everything: only the writable fields change
    for (int i = 0; i < 16; i++) cfg_write(i, 4'h0, 32'hFFFF_FFFF);
    expect_hdr[1]  = 32'h0200_0005;
    expect_hdr[3]  = 32'h0000_FF00;
    expect_hdr[4]  = 32'hFFFF_FFF1;
    expect_hdr[15] = 32'h01FF_01FF;
    for (int i = 0; i < 16; i++) begin
      dw = 6'(i); #1;
      check(rd_data == expect_hdr[i], "after writing all ones");
    end
    check(io_enable && latency_timer == 8'hFF && int_line == 8'hFF && bar0 == 28'hFFFFFFF, "outputs");
    // byte enables: change only byte 2 of BAR0, then the interrupt line
    cfg_write(4, 4'b1011, 32'h0012_3450);
    dw = 4; #1; check(rd_data == 32'hFF12_FFF1, "BAR0 byte 2 only");
    cfg_write(4, 4'b0000, 32'h0000_E100);
    dw = 4; #1; check(rd_data == 32'h0000_E101 && bar0 == 28'h0000E10, "BAR0 full write");
    cfg_write(15, 4'b1110, 32'h0000_000B);
    check(int_line == 8'h0B, "interrupt line");
    cfg_write(1, 4'b1110, 32'h0);
    check(!io_enable, "I/O enable cleared");
    cfg_write(3, 4'b1101, 32'h0000_2000);
    check(latency_timer == 8'h20, "latency timer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
