// vme64x_pkg: constants shared by the VME64x slave interface.
//
// Holds the address modifier of CR/CSR space, the amnesia slot address, the
// base and end offsets of the CR/CSR sub-ranges and the byte offsets of the
// CSR registers. All numbers are those of the VME64X-TCS chip, version V1012:
// CR 0x00003-0x007FF, user CR 0x01003-0x0103F, CRAM 0x03003-0x037FF,
// user CSR 0x05003-0x0502F, CSR 0x7FC00-0x7FFFF. Only every fourth byte
// (A1 = 1, odd byte lane) is used inside these ranges.
package vme64x_pkg;

  // Address modifier of CR/CSR space.
  localparam logic [5:0] AM_CR_CSR = 6'h2F;

  // Slot address used when no valid geographical address is present.
  localparam logic [4:0] AMNESIA_ADDR = 5'h1E;

  // Address modifier classes of function accesses (A32 non-privileged /
  // supervisory data single transfer and block transfer, AM[1:0]).
  localparam logic [1:0] AM_CLASS_SINGLE = 2'b01;
  localparam logic [1:0] AM_CLASS_BLT    = 2'b11;

  // Space decodes on A[18:x] of the 19-bit CR/CSR offset (A[23:19] = slot).
  localparam logic [18:11] CR_A18_11      = 8'h00;    // 0x00000-0x007FF
  localparam logic [18:6]  USER_CR_A18_6  = 13'h0040; // 0x01000-0x0103F
  localparam logic [18:11] CRAM_A18_11    = 8'h06;    // 0x03000-0x037FF
  localparam logic [18:6]  USER_CSR_A18_6 = 13'h0140; // 0x05000-0x0503F
  localparam logic [18:10] CSR_A18_10     = 9'h1FF;   // 0x7FC00-0x7FFFF

  // CSR register offsets (full 19-bit CR/CSR offsets, A[18:0]).
  localparam logic [18:0] OFS_BAR     = 19'h7FFFF;
  localparam logic [18:0] OFS_BSR     = 19'h7FFFB;
  localparam logic [18:0] OFS_BCR     = 19'h7FFF7;
  localparam logic [18:0] OFS_ADER0_3 = 19'h7FF63;
  localparam logic [18:0] OFS_ADER0_2 = 19'h7FF67;
  localparam logic [18:0] OFS_ADER0_1 = 19'h7FF6B;
  localparam logic [18:0] OFS_ADER0_0 = 19'h7FF6F;
  localparam logic [18:0] OFS_ADER1_3 = 19'h7FF73;
  localparam logic [18:0] OFS_ADER1_2 = 19'h7FF77;
  localparam logic [18:0] OFS_ADER1_1 = 19'h7FF7B;
  localparam logic [18:0] OFS_ADER1_0 = 19'h7FF7F;
  localparam logic [18:0] OFS_TEST_OUT_12 = 19'h05003;
  localparam logic [18:0] OFS_TEST_OUT_34 = 19'h05007;

  // Bit positions in the bit set / bit clear registers.
  localparam int BSCR_RESET_MODE = 7;
  localparam int BSCR_MOD_EN     = 4;
  localparam int BSCR_BERR       = 3;

  // Read/write strobes of the CR/CSR registers, one per addressed item.
  typedef struct packed {
    logic       cr;        // configuration ROM
    logic       user_cr;   // chip id / version / serial number ROM
    logic       cram;      // configuration RAM
    logic       bar;       // base address register (read only)
    logic       bsr;       // bit set register
    logic       bcr;       // bit clear register
    logic       bscr;      // BSR or BCR (status read-back)
    logic [3:0] ader0;     // ADER0 bytes 3..0
    logic [3:0] ader1;     // ADER1 bytes 3..0
    logic       test_out_12;
    logic       test_out_34;
  } csr_sel_t;

endpackage
