// user_cr: user configuration ROM with chip id, version and serial number.
//
// Sixteen bytes at CR/CSR offsets 0x01003-0x0103F (every fourth byte, word
// index A[5:2]): chip id 0x0001_5n11 (bytes 0-3), version 0x0000_1012
// (bytes 4-7) and serial number "TCS" (bytes 8-10); bytes 11-15 are zero.
// The low nibble of chip-id byte 1 (word 2, offset 0x0100B) is not stored
// but taken from the 4-bit card number set with jumpers on the board, so the
// chip id tells which card of a crate answers. Asynchronous read; `oe`
// follows rd_en.
//
// Contents and the card-number substitution follow the document; chip id,
// version and serial number are parameters with the document's values.
module user_cr #(
  parameter logic [31:0] CHIP_ID = 32'h00015011,  // nibble [11:8] replaced by card_nr
  parameter logic [31:0] VERSION = 32'h00001012,
  parameter logic [23:0] SERIAL  = 24'h544353     // ASCII "TCS"
) (
  input  logic [5:2] addr,
  input  logic [3:0] card_nr,
  input  logic       rd_en,
  output logic [7:0] data,
  output logic       oe
);

  logic [7:0] data_mem;

  always_comb begin
    unique case (addr)
      4'h0:    data_mem = CHIP_ID[31:24];
      4'h1:    data_mem = CHIP_ID[23:16];
      4'h2:    data_mem = CHIP_ID[15:8];
      4'h3:    data_mem = CHIP_ID[7:0];
      4'h4:    data_mem = VERSION[31:24];
      4'h5:    data_mem = VERSION[23:16];
      4'h6:    data_mem = VERSION[15:8];
      4'h7:    data_mem = VERSION[7:0];
      4'h8:    data_mem = SERIAL[23:16];
      4'h9:    data_mem = SERIAL[15:8];
      4'hA:    data_mem = SERIAL[7:0];
      default: data_mem = 8'h00;
    endcase
  end

  assign data = (addr == 4'h2) ? {data_mem[7:4], card_nr} : data_mem;
  assign oe   = rd_en;

endmodule
