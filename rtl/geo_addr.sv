// geo_addr: slot (CR/CSR base address) recognition.
//
// The VME64x backplane codes the slot number on the active-low pins GA4*..GA0*.
// They are inverted to GA_INT[4:0]. Two 8-bit equality comparators look at
// A[23:19] of the latched address: one against GA_INT, enabled while
// GEO_ADDR_OK is high, and one against the amnesia address 0x1E, enabled while
// GEO_ADDR_OK is low. Their outputs are combined into `base_addr_match`, which
// says that the current address lies in this board's 512 KiB CR/CSR window.
// Purely combinational.
//
// From the document: the inversion NGA -> GA_INT, the two comparators on
// A[23:19], their enables by GEO_ADDR_OK / NGEO_ADDR_OK, and the amnesia
// address 0x1E. This design's own choice: GEO_ADDR_OK is high when at least
// one GA pin is grounded (GA_INT != 0); the document does not show how it is
// formed. The unused upper comparator bits of the document (bits 5..7 tied to
// bit 4 on both sides) do not change the result and are left out.
module geo_addr (
  input  logic [4:0]  nga,             // geographical address pins, active low
  input  logic [23:19] a,              // slot field of the latched address
  output logic [4:0]  ga_int,          // geographical address, active high
  output logic        geo_addr_ok,     // a geographical address is present
  output logic        base_addr_match  // A[23:19] selects this board
);

  import vme64x_pkg::*;

  logic geo_eq, amnesia_eq;

  assign ga_int      = ~nga;
  assign geo_addr_ok = (ga_int != 5'd0);

  assign geo_eq     = geo_addr_ok  && (a == ga_int);
  assign amnesia_eq = !geo_addr_ok && (a == AMNESIA_ADDR);

  assign base_addr_match = geo_eq || amnesia_eq;

endmodule
