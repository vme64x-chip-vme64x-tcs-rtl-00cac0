// addr_in_latch: input latch for the VME address and address modifier.
//
// A transparent latch per bit: while `gate` is high the outputs follow
// A[31:1] and AM[5:0]; when `gate` falls the values are held. In the chip the
// gate is AS* (NAS), so the latch is open between cycles and closes on the
// falling edge of AS*, freezing the address for the whole VME cycle (block
// transfers included). This follows the document's latch; the latch is
// intentional and the only level-sensitive storage in the design.
module addr_in_latch (
  input  logic        gate,    // 1 = transparent, 0 = hold
  input  logic [31:1] a,
  input  logic [5:0]  am,
  output logic [31:1] a_in,
  output logic [5:0]  am_in
);

  always_latch begin
    if (gate) begin
      a_in  = a;
      am_in = am;
    end
  end

endmodule
