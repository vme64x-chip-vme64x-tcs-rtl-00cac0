// cram: VME64x configuration RAM (CRAM), 512 x 8 bit.
//
// Occupies CR/CSR offsets 0x03003-0x037FF, one byte at every fourth offset,
// word index A[10:2]. Address, write data and write enable are registered on
// the rising clock edge: a write with `ld_en` high stores `din` at that edge.
// The read address is registered too, so `dout` shows the word addressed in
// the previous clock; `oe` follows rd_en. Contents are not reset.
//
// Size, registered address/data and unregistered output follow the
// document's RAM; the separate din/dout ports replace its bidirectional pin.
module cram #(
  parameter int unsigned AW = 9,   // word address bits (A[10:2])
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          ld_en,
  input  logic          rd_en,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout,
  output logic          oe
);

  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] addr_q;

  always_ff @(posedge clk) begin
    addr_q <= addr;
    if (ld_en) mem[addr] <= din;
  end

  assign dout = mem[addr_q];
  assign oe   = rd_en;

endmodule
