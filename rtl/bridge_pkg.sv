// Shared types and constants of the PCI/MC68000 bridge.
//
// Holds the PCI bus command codes the bridge decodes or issues, the state
// encodings of the two PCI state machines (the target-side decoder and the
// master-side control unit) and the fixed values of the configuration header.
// The configuration values follow the bridge's configuration register map; the
// memory read/write command codes are the standard PCI ones.
package bridge_pkg;

  // C/#BE[3:0] during the address phase
  localparam logic [3:0] CMD_IOR   = 4'b0010;  // I/O read
  localparam logic [3:0] CMD_IOW   = 4'b0011;  // I/O write
  localparam logic [3:0] CMD_MEMR  = 4'b0110;  // memory read (bridge as master)
  localparam logic [3:0] CMD_MEMW  = 4'b0111;  // memory write (bridge as master)
  localparam logic [3:0] CMD_CNFR  = 4'b1010;  // configuration read
  localparam logic [3:0] CMD_CNFW  = 4'b1011;  // configuration write

  // Fixed configuration header contents
  localparam logic [15:0] VENDOR_ID   = 16'h0001;
  localparam logic [15:0] DEVICE_ID   = 16'h0001;
  localparam logic [15:0] STATUS_VAL  = 16'h0200;  // medium DEVSEL timing
  localparam logic [7:0]  REVISION_ID = 8'h01;
  localparam logic [23:0] CLASS_CODE  = 24'h068000; // bridge, other
  localparam logic [7:0]  HEADER_TYPE = 8'h00;
  localparam logic [7:0]  INT_PIN     = 8'h01;      // #INTA
  localparam logic [7:0]  MIN_GNT     = 8'hFF;
  localparam logic [7:0]  MAX_LAT     = 8'h01;

  // Decoder (PCI target) states
  typedef enum logic [1:0] {
    DEC_A,   // idle, decode of the registered address phase
    DEC_B,   // data phase: DEVSEL and TRDY asserted, waiting for IRDY
    DEC_C,   // disconnect C: STOP asserted until the master ends
    DEC_D    // TRDY/STOP/DEVSEL driven high for one clock before release
  } dec_state_t;

  // Control unit (PCI-MC68000 machine) states; N2 is the state after N
  typedef enum logic [4:0] {
    CU_A, CU_B, CU_C, CU_D, CU_E, CU_F, CU_G, CU_H, CU_I, CU_J,
    CU_K, CU_L, CU_M, CU_N, CU_N2, CU_O, CU_P, CU_Q
  } cu_state_t;

  // I/O space user register double words (address bits [3:2])
  localparam logic [1:0] IO_DW_ADDRMEM = 2'd0;  // P0-P3
  localparam logic [1:0] IO_DW_ADDRCNT = 2'd1;  // P4-P7
  localparam logic [1:0] IO_DW_CTRL    = 2'd2;  // P8-P11

endpackage
