// dtack_berr: data acknowledge, bus error and VME buffer control.
//
// BERR: a flip-flop clocked by CLK whose input is BERR_EXT OR its own output,
// cleared asynchronously while DSCYC is low. A bus error reported by the
// board's local logic is thus held until the master releases the data
// strobes. NBERR is its inverse and drives the VME BERR* line.
// NVME_OE = NOT(DSCYC AND (SINGLE_ACCESS OR BLT_ACCESS OR BASE_ADDR_2F))
// enables the board's VME data transceivers during a data phase addressed to
// this board; VME_DIR = NOT WRITE points them towards the bus on reads.
// DTACK: set one clock after DSSYNC when the data phase is addressed to this
// board (CR/CSR or a function) and cleared when DSCYC falls, so that read
// data have been on the bus for at least one clock when DTACK* falls. It is
// withheld while BERR or BERR_EXT is high, so local logic that raises BERR_EXT
// within one clock of its beat strobe turns the beat into a bus error.
// CR/CSR accesses never raise BERR.
//
// From the document: the BERR flip-flop, NVME_OE and VME_DIR. This design's
// own: the DTACK timing, whose schematic is not available, and the
// suppression of DTACK during BERR.
// DSCYC is used both as data and as the asynchronous clear of BERR, as in
// the document; it comes straight from synchroniser flip-flops, so the clear
// is free of glitches.
module dtack_berr (
  input  logic clk,
  input  logic rst_n,
  input  logic dscyc,
  input  logic dssync,
  input  logic write_i,
  input  logic berr_ext,       // bus error requested by the local logic
  input  logic single_access,
  input  logic blt_access,
  input  logic base_addr_2f,
  output logic berr,
  output logic nberr,
  output logic ndtack,
  output logic nvme_oe,
  output logic vme_dir
);

  logic selected, dtack_q;

  always_ff @(posedge clk or negedge dscyc) begin
    if (!dscyc) berr <= 1'b0;
    else        berr <= berr_ext | berr;
  end

  assign nberr = ~berr;

  assign selected = single_access | blt_access | base_addr_2f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 dtack_q <= 1'b0;
    else if (!dscyc)            dtack_q <= 1'b0;
    else if (dssync && selected) dtack_q <= 1'b1;
  end

  assign ndtack  = ~(dtack_q & ~berr & ~berr_ext);
  assign nvme_oe = ~(dscyc & selected);
  assign vme_dir = ~write_i;

endmodule
