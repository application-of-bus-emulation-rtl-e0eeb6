// MC68000 bus state machine (the B machine of the bridge).
//
// Emulates MC68000 bus cycles towards the target system, one cycle for every
// start request, on its own 8 MHz clock. A cycle starts on a rising edge of
// iow4s (from the control unit, in the PCI clock domain, synchronized here by
// two flip-flops). The address lines are driven by the bridge's address memory
// outside this block; a0 is its bit 0, used for byte cycles.
//
// Asynchronous cycle, four clocks with no wait states:
//   S0  R/#W set (#WR68 low for a write, write data driven), strobes high
//   S1  #AS and #UDS/#LDS asserted
//   S2  wait for #DTACK (wait states) or #VPA; read data latched on #DTACK
//   S3  strobes negated, ad0 set: the cycle is finished
// Synchronous (M6800 peripheral) cycle: #VPA low in S2 instead of #DTACK.
// The machine asserts #VMA, waits for the E clock low phase to end, and
// latches read data on the last clock of the E high phase, then finishes in
// S3. E is free running at clk/10, six clocks low and four high, as on an
// MC68000.
// word = 1 makes 16-bit cycles (both data strobes); word = 0 makes byte
// cycles with #UDS for an even address and #LDS for an odd one.
// ad0 stays set until the next cycle starts and rdata holds the read word
// until then, so the PCI side can take both after resynchronizing ad0.
// The bridge's description gives this block's ports and purpose; the state
// sequence above is this design's own, modelled on MC68000 timing at whole
// clock resolution. Interrupt acknowledge cycles are not emulated.
module m68k_bus_machine (
  input  logic        clk,        // 8 MHz MC68000 bus clock
  input  logic        reset68_n,
  input  logic        iow4s,      // start a cycle (PCI clock domain)
  input  logic        read,       // 1: read cycle, 0: write cycle
  input  logic        word,
  input  logic        a0,
  input  logic [15:0] d_in,       // MC68000 data bus as seen at the pins
  input  logic        dtack_n,
  input  logic        vpa_n,
  output logic        ad0,
  output logic        e,
  output logic        as_n,
  output logic        uds_n,
  output logic        lds_n,
  output logic        wr68_n,
  output logic        vma_n,
  output logic        d_oe,       // drive write data on the data bus
  output logic [15:0] rdata
);
  typedef enum logic [2:0] {M_IDLE, M_S0, M_S1, M_S2, M_V1, M_V2, M_S3} m_state_t;
  m_state_t state;

  logic       start_s, start_q;
  logic [3:0] e_cnt;
  logic       cyc_read;

  sync2 u_sync_start (.clk(clk), .rst_n(reset68_n), .d(iow4s), .q(start_s));

  always_ff @(posedge clk or negedge reset68_n) begin
    if (!reset68_n) e_cnt <= '0;
    else            e_cnt <= (e_cnt == 4'd9) ? 4'd0 : e_cnt + 4'd1;
  end
  assign e = (e_cnt >= 4'd6);

  always_ff @(posedge clk or negedge reset68_n) begin
    if (!reset68_n) begin
      state    <= M_IDLE;
      start_q  <= 1'b0;
      ad0      <= 1'b0;
      rdata    <= '0;
      cyc_read <= 1'b1;
    end else begin
      start_q <= start_s;
      unique case (state)
        M_IDLE: if (start_s && !start_q) begin
          state    <= M_S0;
          ad0      <= 1'b0;
          cyc_read <= read;
        end
        M_S0: state <= M_S1;
        M_S1: state <= M_S2;
        M_S2: begin
          if (!dtack_n) begin
            rdata <= d_in;
            state <= M_S3;
          end else if (!vpa_n) begin
            state <= M_V1;
          end
        end
        M_V1: if (e_cnt == 4'd5) state <= M_V2;
        M_V2: if (e_cnt == 4'd9) begin
          rdata <= d_in;
          state <= M_S3;
        end
        M_S3: begin
          ad0   <= 1'b1;
          state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  logic strobe;
  assign strobe = (state == M_S1) || (state == M_S2) || (state == M_V1) || (state == M_V2);
  assign as_n   = !strobe;
  assign uds_n  = !(strobe && (word || !a0));
  assign lds_n  = !(strobe && (word ||  a0));
  assign wr68_n = !(!cyc_read && state != M_IDLE);
  assign d_oe   = !cyc_read && state != M_IDLE;
  assign vma_n  = !(state == M_V1 || state == M_V2);

endmodule
