// cr_csr_decode: address decoding and strobes of CR/CSR space.
//
// A CR/CSR access is recognised when the address modifier is 0x2F (AM_2F) and
// geo_addr reports that A[23:19] selects this board (base_addr_match). Inside
// the 512 KiB window only odd single-byte accesses (D08(O)) with A1 = 1 are
// decoded, i.e. every fourth byte, offsets 0x...3, 0x...7, 0x...B, 0x...F.
//   RD_EN_2F = DSSYNC & !WRITE & BASE_ADDR & AM_2F   (level, whole data phase)
//   WR_EN_2F = DSPULS &  WRITE & BASE_ADDR & AM_2F   (one clock per beat)
// The sub-ranges are decoded on A[18:x]: CR 0x00003-0x007FF, user CR
// 0x01003-0x0103F, CRAM 0x03003-0x037FF, user CSR 0x05003-0x0502F and CSR
// 0x7FC03-0x7FFFF. Each CSR register is an 8-input AND of A[9:2] with the CSR
// space term; ADDR_BSCR = ADDR_BSR | ADDR_BCR. Every decode is ANDed with
// RD_EN_2F and WR_EN_2F to give the read and write strobes of each item.
// The block also classifies the data width from DS0*, DS1* and LWORD*
// (D08 odd byte, D16, D32). Purely combinational.
//
// From the document: AM_2F, the RD_EN_2F / WR_EN_2F gates, the CR space gate
// (D08_O, A1, A11..A18 low), every register address, the user CSR test-output
// decodes and ADDR_BSCR. This design's own choice: the decodes of the other
// sub-ranges are written in the same form as the CR space gate, the width
// classification follows the VME64x data-strobe rules, and the read/write
// strobes of each item are ANDs of the space decode with RD_EN_2F / WR_EN_2F.
module cr_csr_decode
  import vme64x_pkg::*;
(
  input  logic        ds0_i,           // DS0* asserted (synchronised)
  input  logic        ds1_i,           // DS1* asserted
  input  logic        lword_i,         // LWORD* asserted
  input  logic        write_i,         // WRITE* asserted
  input  logic        dssync,
  input  logic        dspuls,
  input  logic        base_addr_match, // from geo_addr
  input  logic [18:1] a,               // latched address, CR/CSR offset
  input  logic [5:0]  am,              // latched address modifier
  output logic        d08_o,
  output logic        d16_eo,
  output logic        d32_eo,
  output logic        am_2f,
  output logic        base_addr_2f,
  output logic        cr_space,
  output logic        user_cr_space,
  output logic        cram_space,
  output logic        user_csr_space,
  output logic        csr_space,
  output logic        rd_en_2f,
  output logic        wr_en_2f,
  output csr_sel_t    rd,
  output csr_sel_t    wr
);

  csr_sel_t addr;  // pure address decodes
  logic     byte3; // D08(O) at a byte offset of 3 modulo 4

  assign d08_o  = ds0_i & ~ds1_i & ~lword_i;
  assign d16_eo = ds0_i &  ds1_i & ~lword_i;
  assign d32_eo = ds0_i &  ds1_i &  lword_i;

  assign am_2f        = (am == AM_CR_CSR);
  assign base_addr_2f = base_addr_match & am_2f;

  assign rd_en_2f = dssync & ~write_i & base_addr_match & am_2f;
  assign wr_en_2f = dspuls &  write_i & base_addr_match & am_2f;

  assign byte3          = d08_o & a[1];
  assign cr_space       = byte3 && (a[18:11] == CR_A18_11);
  assign user_cr_space  = byte3 && (a[18:6]  == USER_CR_A18_6);
  assign cram_space     = byte3 && (a[18:11] == CRAM_A18_11);
  assign user_csr_space = byte3 && (a[18:6]  == USER_CSR_A18_6);
  assign csr_space      = byte3 && (a[18:10] == CSR_A18_10);

  always_comb begin
    addr          = '0;
    addr.cr       = cr_space;
    addr.user_cr  = user_cr_space;
    addr.cram     = cram_space;
    addr.bar      = csr_space && (a[9:2] == OFS_BAR[9:2]);
    addr.bsr      = csr_space && (a[9:2] == OFS_BSR[9:2]);
    addr.bcr      = csr_space && (a[9:2] == OFS_BCR[9:2]);
    addr.bscr     = addr.bsr | addr.bcr;
    addr.ader0[3] = csr_space && (a[9:2] == OFS_ADER0_3[9:2]);
    addr.ader0[2] = csr_space && (a[9:2] == OFS_ADER0_2[9:2]);
    addr.ader0[1] = csr_space && (a[9:2] == OFS_ADER0_1[9:2]);
    addr.ader0[0] = csr_space && (a[9:2] == OFS_ADER0_0[9:2]);
    addr.ader1[3] = csr_space && (a[9:2] == OFS_ADER1_3[9:2]);
    addr.ader1[2] = csr_space && (a[9:2] == OFS_ADER1_2[9:2]);
    addr.ader1[1] = csr_space && (a[9:2] == OFS_ADER1_1[9:2]);
    addr.ader1[0] = csr_space && (a[9:2] == OFS_ADER1_0[9:2]);
    addr.test_out_12 = user_csr_space && (a[5:2] == OFS_TEST_OUT_12[5:2]);
    addr.test_out_34 = user_csr_space && (a[5:2] == OFS_TEST_OUT_34[5:2]);
  end

  assign rd = rd_en_2f ? addr : '0;
  assign wr = wr_en_2f ? addr : '0;

endmodule
