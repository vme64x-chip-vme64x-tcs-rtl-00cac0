// csr: VME64x control/status registers (offsets 0x7FC00-0x7FFFF).
//
// Registers, each eight bits wide and written only with D08(O) cycles:
//   ADER0 bytes 3..0 (0x7FF63..0x7FF6F), ADER1 bytes 3..0 (0x7FF73..0x7FF7F):
//     address decoder compare registers of functions 0 and 1. Byte 3 bits
//     7:1 hold A31-A25, byte 0 bits 7:2 hold the AM code. Read/write.
//   BSR (0x7FFFB) and BCR (0x7FFF7): bit set and bit clear registers. Each is
//     a plain 8-bit register that keeps the last byte written to it. Bit 7
//     sets/clears RESET mode, bit 4 the module enable, bit 3 the BERR flag.
//     A set bit has priority over the matching clear bit, so a status bit is
//     cleared by BCR only once BSR no longer holds its set bit.
//   BSCR read-back at either address: {reset_mode,0,0,mod_enabled,berr_flag,0,0,0}.
//   BAR (0x7FFFF), read only: {GA[4:0],000} with a valid geographical
//     address, otherwise {0x1E,000} (amnesia address).
// The status flags are updated on every clock from the held BSR/BCR bits:
//   reset_mode  <= bsr[7] ? 1 : (bcr[7] ? 0 : hold)
//   mod_enabled <= bsr[4] ? 1 : (bcr[4] ? 0 : hold)
//   berr_flag   <= (bsr[3] | board BERR) ? 1 : (bcr[3] ? 0 : hold)
// SYSRESET* (nsysres) clears every register and flag asynchronously. Writes
// take effect at the clock edge of the write strobe, status one clock later;
// reads are combinational, `oe` marks a read of this block.
//
// Register layout, addresses, set/clear priorities and the BAR contents follow
// the document. The document forms the flags with level-sensitive logic; here
// they are clocked flip-flops. Where the document assigns the module enable
// twice in one process (once set, once cleared by SYSRESET*), the later
// assignment, which clears it, is followed.
module csr
  import vme64x_pkg::*;
(
  input  logic        clk,
  input  logic        nsysres,
  input  logic [7:0]  din,
  input  csr_sel_t    rd,
  input  csr_sel_t    wr,
  input  logic [4:0]  ga,
  input  logic        geo_addr_ok,
  input  logic        nberr,          // bus error driven by this board
  output logic [7:0]  dout,
  output logic        oe,
  output logic        reset_mode,
  output logic        mod_enabled,
  output logic        berr_flag,
  output logic [31:25] ader0_a,
  output logic [31:25] ader1_a,
  output logic [5:0]  ader0_am,
  output logic [5:0]  ader1_am
);

  logic [7:0] ader0 [4];
  logic [7:0] ader1 [4];
  logic [7:0] bsr, bcr;
  logic [7:0] bscr_in, bar_in;

  always_ff @(posedge clk or negedge nsysres) begin
    if (!nsysres) begin
      for (int i = 0; i < 4; i++) begin
        ader0[i] <= '0;
        ader1[i] <= '0;
      end
      bsr         <= '0;
      bcr         <= '0;
      reset_mode  <= 1'b0;
      mod_enabled <= 1'b0;
      berr_flag   <= 1'b0;
    end else begin
      for (int i = 0; i < 4; i++) begin
        if (wr.ader0[i]) ader0[i] <= din;
        if (wr.ader1[i]) ader1[i] <= din;
      end
      if (wr.bsr) bsr <= din;
      if (wr.bcr) bcr <= din;

      if (bsr[BSCR_RESET_MODE])      reset_mode <= 1'b1;
      else if (bcr[BSCR_RESET_MODE]) reset_mode <= 1'b0;

      if (bsr[BSCR_MOD_EN])          mod_enabled <= 1'b1;
      else if (bcr[BSCR_MOD_EN])     mod_enabled <= 1'b0;

      if (bsr[BSCR_BERR] || !nberr)  berr_flag <= 1'b1;
      else if (bcr[BSCR_BERR])       berr_flag <= 1'b0;
    end
  end

  assign ader0_a  = ader0[3][7:1];
  assign ader0_am = ader0[0][7:2];
  assign ader1_a  = ader1[3][7:1];
  assign ader1_am = ader1[0][7:2];

  assign bscr_in = {reset_mode, 2'b00, mod_enabled, berr_flag, 3'b000};
  assign bar_in  = geo_addr_ok ? {ga, 3'b000} : {AMNESIA_ADDR, 3'b000};

  always_comb begin
    dout = '0;
    for (int i = 0; i < 4; i++) begin
      if (rd.ader0[i]) dout |= ader0[i];
      if (rd.ader1[i]) dout |= ader1[i];
    end
    if (rd.bscr) dout |= bscr_in;
    if (rd.bar)  dout |= bar_in;
  end

  assign oe = (|rd.ader0) | (|rd.ader1) | rd.bscr | rd.bar;

endmodule
