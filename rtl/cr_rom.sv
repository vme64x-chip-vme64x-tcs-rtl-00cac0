// cr_rom: VME64x configuration ROM (CR), 512 x 8 bit.
//
// The CR occupies CR/CSR offsets 0x00003-0x007FF, one byte at every fourth
// offset, so the ROM word index is A[10:2]. The contents identify the board
// as a VME64x slave with one function: function 0 accepts D16 transfers with
// AM 0x09 and 0x0D and decodes A31-A25 (ADEM 0xFE000000). The offsets in the
// CR point to the user CR (0x01003-0x0101F), the CRAM (0x03003-0x037FF), the
// user CSR (0x05003-0x0502F) and the serial number (0x01023-0x0103F).
// Checksum and ROM length are zero; every entry not listed below is zero.
//
// The ROM is asynchronous: `data` follows `addr` combinationally and `oe`
// (= rd_en) says when the byte is to be driven onto the VME data bus.
//
// Every byte follows the document's table; manufacturer, board and revision
// ID are parameters whose defaults are the document's example values. The
// document's tri-state output is replaced by a data/enable pair.
module cr_rom #(
  parameter logic [23:0] MANUFACTURER_ID = 24'h000000,
  parameter logic [31:0] BOARD_ID        = 32'hA0123456,
  parameter logic [31:0] REVISION_ID     = 32'hB9876543
) (
  input  logic [10:2] addr,
  input  logic        rd_en,
  output logic [7:0]  data,
  output logic        oe
);

  // Content of one ROM word, by word index (CR offset = 4*index + 3).
  function automatic logic [7:0] cr_byte(input logic [8:0] idx);
    unique case (idx)
      9'h004: cr_byte = 8'h81;                  // CR data access width D08(O)
      9'h005: cr_byte = 8'h81;                  // CSR data access width D08(O)
      9'h006: cr_byte = 8'h02;                  // CR/CSR space spec: VME64x
      9'h007: cr_byte = 8'h43;                  // "C"
      9'h008: cr_byte = 8'h52;                  // "R"
      9'h009: cr_byte = MANUFACTURER_ID[23:16];
      9'h00A: cr_byte = MANUFACTURER_ID[15:8];
      9'h00B: cr_byte = MANUFACTURER_ID[7:0];
      9'h00C: cr_byte = BOARD_ID[31:24];
      9'h00D: cr_byte = BOARD_ID[23:16];
      9'h00E: cr_byte = BOARD_ID[15:8];
      9'h00F: cr_byte = BOARD_ID[7:0];
      9'h010: cr_byte = REVISION_ID[31:24];
      9'h011: cr_byte = REVISION_ID[23:16];
      9'h012: cr_byte = REVISION_ID[15:8];
      9'h013: cr_byte = REVISION_ID[7:0];
      9'h01F: cr_byte = 8'h01;                  // program ID: ID code only
      // 24-bit offsets, MSB first: BEG/END_USER_CR, BEG/END_CRAM,
      // BEG/END_USER_CSR, BEG/END_SN
      9'h021: cr_byte = 8'h10;  9'h022: cr_byte = 8'h03;   // 0x001003
      9'h024: cr_byte = 8'h10;  9'h025: cr_byte = 8'h1F;   // 0x00101F
      9'h027: cr_byte = 8'h30;  9'h028: cr_byte = 8'h03;   // 0x003003
      9'h02A: cr_byte = 8'h37;  9'h02B: cr_byte = 8'hFF;   // 0x0037FF
      9'h02D: cr_byte = 8'h50;  9'h02E: cr_byte = 8'h03;   // 0x005003
      9'h030: cr_byte = 8'h50;  9'h031: cr_byte = 8'h2F;   // 0x00502F
      9'h033: cr_byte = 8'h10;  9'h034: cr_byte = 8'h23;   // 0x001023
      9'h036: cr_byte = 8'h10;  9'h037: cr_byte = 8'h3F;   // 0x00103F
      9'h040: cr_byte = 8'h83;                  // function 0 DAWPR: D16 only
      9'h04E: cr_byte = 8'h22;                  // function 0 AMCAP: AM 0x0D, 0x09
      9'h188: cr_byte = 8'hFE;                  // function 0 ADEM: A31-A25
      default: cr_byte = 8'h00;
    endcase
  endfunction

  assign data = cr_byte(addr);
  assign oe   = rd_en;

endmodule
