// vme64x_chip: VME64x slave interface of the TCS board (version V1012).
//
// The chip makes a VME board addressable in two ways. In CR/CSR space
// (AM 0x2F) the board's 512 KiB window is chosen by its slot: A[23:19] must
// equal the geographical address from the backplane (or 0x1E when none is
// present). That window holds the configuration ROM, a user ROM with chip id,
// version and serial number, a 512-byte configuration RAM and the CSR
// registers. The host reads the ROM, writes the function's base address and
// AM into ADER0/ADER1 and sets the module-enable bit; from then on A32 cycles
// whose A[31:25] and AM match an ADER are passed to the board's local logic
// as single or D16/D32 block transfers, with a local address A[24:1] that
// counts up from beat to beat in block transfers.
//
// Data path: CR/CSR accesses are single bytes on D[7:0] (D08(O), offsets
// 0x...3/7/B/F). `d_out`/`d_oe` give the byte the chip drives on reads; the
// board's transceivers are enabled by `nvme_oe` and turned by `vme_dir`.
// Function data (D16) are moved by the local logic, which gets the address
// `loc_a`/`loc_am`, the access type, `loc_write` and a one-clock `loc_strobe`
// per beat, and can answer with `berr_ext`.
//
// Timing, with all VME inputs synchronised to `clk` (two flip-flops). Counting
// clock edges after DS* falls: edge 2 raises dscyc and dspuls; the write
// strobe acts at edge 3, where dssync rises, read data appear on d_out and
// loc_strobe is high for one clock; DTACK* falls at edge 4, i.e. 30-40 ns
// after DS* at 100 MHz, and rises again 2-3 clocks after DS* is released.
// Local logic that wants to fail a beat raises berr_ext in the clock after
// loc_strobe.
//
// Block structure, signal names and CR/CSR contents follow the document;
// the clocking of every strobe, the DTACK timing, the function decoder and
// the local-bus handshake are this design's own choices (see each block).
// The interrupter (NIRQ1*) and RETRY* outputs are tied inactive, as in the
// document.
module vme64x_chip
  import vme64x_pkg::*;
(
  input  logic        clk,
  input  logic        nsysres,      // VME SYSRESET*
  // VME bus (after the board's transceivers)
  input  logic        nas,
  input  logic        nds0,
  input  logic        nds1,
  input  logic        nwrite,
  input  logic        nlword,
  input  logic [31:1] a,
  input  logic [5:0]  am,
  input  logic [7:0]  d_in,
  input  logic [4:0]  nga,          // geographical address GA4*..GA0*
  output logic [7:0]  d_out,
  output logic        d_oe,
  output logic        ndtack,
  output logic        nberr,
  output logic        nirq1,
  output logic        nretry,
  output logic        nvme_oe,      // transceiver output enable, active low
  output logic        vme_dir,      // transceiver direction, 1 = towards VME
  // board
  input  logic [3:0]  card_nr,      // card number jumpers
  input  logic        berr_ext,     // bus error request of the local logic
  output logic [24:1] loc_a,
  output logic [5:0]  loc_am,
  output logic        loc_write,
  output logic        loc_strobe,   // one clock per function beat
  output logic        single_access,
  output logic        blt_access,
  output logic        f0_sel,
  output logic        f1_sel,
  output logic        reset_mode,
  output logic        mod_enabled,
  output logic        wr_test_out_12, // write strobes of the user CSR
  output logic        wr_test_out_34  // test-output selection bytes
);

  // ---------------------------------------------------------------- timing
  logic dscyc, dssync, dspuls;
  logic ds0_i, ds1_i, write_i, lword_i, en_blt_cnt;

  vme_timing u_timing (
    .clk, .rst_n(nsysres), .nas, .nds0, .nds1, .nwrite, .nlword,
    .ascyc(), .as_start(), .dscyc, .dssync, .dspuls, .ds_end(),
    .ds0_i, .ds1_i, .write_i, .lword_i, .en_blt_cnt
  );

  // ------------------------------------------------------- address latch
  logic [31:1] a_int;
  logic [5:0]  am_int;

  addr_in_latch u_latch (.gate(nas), .a, .am, .a_in(a_int), .am_in(am_int));

  // --------------------------------------------------- slot recognition
  logic [4:0] ga_int;
  logic       geo_addr_ok, base_addr_match;

  geo_addr u_geo (
    .nga, .a(a_int[23:19]), .ga_int, .geo_addr_ok, .base_addr_match
  );

  // ------------------------------------------------- CR/CSR decoding
  logic d16_eo, d32_eo, base_addr_2f;
  csr_sel_t rd, wr;

  cr_csr_decode u_dec (
    .ds0_i, .ds1_i, .lword_i, .write_i, .dssync, .dspuls,
    .base_addr_match, .a(a_int[18:1]), .am(am_int),
    .d08_o(), .d16_eo, .d32_eo, .am_2f(), .base_addr_2f,
    .cr_space(), .user_cr_space(), .cram_space(), .user_csr_space(), .csr_space(),
    .rd_en_2f(), .wr_en_2f(), .rd, .wr
  );

  // -------------------------------------------------- CR/CSR contents
  logic [7:0] cr_d, ucr_d, cram_d, csr_d;
  logic       cr_oe, ucr_oe, cram_oe, csr_oe;
  logic [31:25] ader0_a, ader1_a;
  logic [5:0]   ader0_am, ader1_am;
  logic         berr_flag, berr;

  cr_rom u_cr (.addr(a_int[10:2]), .rd_en(rd.cr), .data(cr_d), .oe(cr_oe));

  user_cr u_ucr (
    .addr(a_int[5:2]), .card_nr, .rd_en(rd.user_cr), .data(ucr_d), .oe(ucr_oe)
  );

  cram u_cram (
    .clk, .addr(a_int[10:2]), .ld_en(wr.cram), .rd_en(rd.cram),
    .din(d_in), .dout(cram_d), .oe(cram_oe)
  );

  csr u_csr (
    .clk, .nsysres, .din(d_in), .rd, .wr, .ga(ga_int), .geo_addr_ok,
    .nberr, .dout(csr_d), .oe(csr_oe),
    .reset_mode, .mod_enabled, .berr_flag,
    .ader0_a, .ader1_a, .ader0_am, .ader1_am
  );

  always_comb begin
    d_out = '0;
    if (cr_oe)   d_out |= cr_d;
    if (ucr_oe)  d_out |= ucr_d;
    if (cram_oe) d_out |= cram_d;
    if (csr_oe)  d_out |= csr_d;
  end
  assign d_oe = cr_oe | ucr_oe | cram_oe | csr_oe;

  // --------------------------------------------------- function decoding
  ader_ext u_ader (
    .a(a_int[31:25]), .am(am_int),
    .ader0_a, .ader0_am, .ader1_a, .ader1_am, .mod_enabled,
    .f0_sel, .f1_sel, .single_access, .blt_access
  );

  // ------------------------------------------- local address generation
  addr_cnt_reg u_acnt (
    .clk, .rst_n(nsysres),
    .ld(dspuls & ~en_blt_cnt), .cnt_step(dspuls), .cnt_en(en_blt_cnt),
    .d16_eo, .d32_eo, .a(a_int[24:1]), .am(am_int),
    .a_i(loc_a), .am_i(loc_am)
  );

  always_ff @(posedge clk or negedge nsysres) begin
    if (!nsysres) loc_strobe <= 1'b0;
    else          loc_strobe <= dspuls & (single_access | blt_access);
  end
  assign loc_write = write_i;

  // ------------------------------------------------ DTACK, BERR, buffers
  dtack_berr u_dtb (
    .clk, .rst_n(nsysres), .dscyc, .dssync, .write_i, .berr_ext,
    .single_access, .blt_access, .base_addr_2f,
    .berr, .nberr, .ndtack, .nvme_oe, .vme_dir
  );

  // Interrupter and retry are not used by this board.
  assign nirq1  = 1'b1;
  assign nretry = 1'b1;

  assign wr_test_out_12 = wr.test_out_12;
  assign wr_test_out_34 = wr.test_out_34;

  // At most one CR/CSR item may drive the data bus.
  a_one_driver: assert property (@(posedge clk) disable iff (!nsysres)
    $onehot0({cr_oe, ucr_oe, cram_oe, csr_oe}));

  // DTACK* and BERR* are never asserted together.
  a_dtack_berr: assert property (@(posedge clk) disable iff (!nsysres)
    !(!ndtack && !nberr));

endmodule
