// tb_cr_csr_decode: checks every CR/CSR decode against an address model
// written from the register map: sub-range limits, the per-register offsets,
// the D08(O)/A1 byte-lane rule, AM 0x2F, the slot match and the gating of
// reads by DSSYNC & !WRITE and writes by DSPULS & WRITE.
module tb_cr_csr_decode;
  timeunit 1ns;
  timeprecision 1ps;
  import vme64x_pkg::*;
  logic        ds0_i, ds1_i, lword_i, write_i, dssync, dspuls, base_addr_match;
  logic [18:1] a;
  logic [5:0]  am;
  logic d08_o, d16_eo, d32_eo, am_2f, base_addr_2f;
  logic cr_space, user_cr_space, cram_space, user_csr_space, csr_space;
  logic rd_en_2f, wr_en_2f;
  csr_sel_t rd, wr;
  int checks = 0, failures = 0;

  cr_csr_decode dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b (ofs=%h am=%h ds=%b%b lw=%b wr=%b)",
               what, got, exp, {a, 1'b0}, am, ds1_i, ds0_i, lword_i, write_i);
    end
  endtask

  // Interesting offsets: every register, range ends, neighbours, random ones.
  int unsigned pick [$] = '{'h7FFFF, 'h7FFFB, 'h7FFF7, 'h7FFF3, 'h7FF63, 'h7FF67, 'h7FF6B,
      'h7FF6F, 'h7FF73, 'h7FF77, 'h7FF7B, 'h7FF7F, 'h7FF83, 'h7FC03, 'h7FBFF, 'h00003,
      'h007FF, 'h00803, 'h01003, 'h0103F, 'h01043, 'h00FFF, 'h03003, 'h037FF, 'h03803,
      'h02FFF, 'h05003, 'h05007, 'h0500B, 'h0502F, 'h05043, 'h04FFF, 'h00001, 'h7FFFD};

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int unsigned ofs;
      bit byte3, rden, wren, en;
      // A0 is not on the bus: the odd byte is selected by DS0 alone
      ofs = ((i < pick.size() * 8) ? pick[i / 8] : ($urandom % 'h80000)) | 1;
      a = ofs[18:1];
      am = ($urandom % 4 != 0) ? 6'h2F : 6'($urandom);
      // data width: mostly D08 odd
      case ($urandom % 5)
        0: {ds0_i, ds1_i, lword_i} = 3'b110;
        1: {ds0_i, ds1_i, lword_i} = 3'b111;
        2: {ds0_i, ds1_i, lword_i} = 3'b010;
        default: {ds0_i, ds1_i, lword_i} = 3'b100;
      endcase
      write_i = $urandom % 2;
      dssync  = $urandom % 4 != 0;
      dspuls  = $urandom % 4 != 0;
      base_addr_match = $urandom % 8 != 0;
      #1;
      byte3 = (ds0_i && !ds1_i && !lword_i) && (ofs[1:0] == 2'b11);
      en    = base_addr_match && (am == 6'h2F);
      rden  = en && dssync && !write_i;
      wren  = en && dspuls && write_i;
      expect1(d08_o,  ds0_i && !ds1_i && !lword_i, "d08_o");
      expect1(d16_eo, ds0_i && ds1_i && !lword_i, "d16_eo");
      expect1(d32_eo, ds0_i && ds1_i && lword_i, "d32_eo");
      expect1(am_2f, am == 6'h2F, "am_2f");
      expect1(base_addr_2f, en, "base_addr_2f");
      expect1(rd_en_2f, rden, "rd_en_2f");
      expect1(wr_en_2f, wren, "wr_en_2f");
      expect1(cr_space,       byte3 && ofs >= 'h00003 && ofs <= 'h007FF, "cr_space");
      expect1(user_cr_space,  byte3 && ofs >= 'h01003 && ofs <= 'h0103F, "user_cr_space");
      expect1(cram_space,     byte3 && ofs >= 'h03003 && ofs <= 'h037FF, "cram_space");
      expect1(user_csr_space, byte3 && ofs >= 'h05003 && ofs <= 'h0503F, "user_csr_space");
      expect1(csr_space,      byte3 && ofs >= 'h7FC03, "csr_space");
      for (int k = 0; k < 2; k++) begin
        csr_sel_t s;
        bit g;
        string t;
        s = k ? wr : rd;
        g = k ? wren : rden;
        t = k ? "wr" : "rd";
        expect1(s.cr,       g && byte3 && ofs <= 'h7FF, {t, ".cr"});
        expect1(s.user_cr,  g && byte3 && ofs >= 'h1000 && ofs <= 'h103F, {t, ".user_cr"});
        expect1(s.cram,     g && byte3 && ofs >= 'h3000 && ofs <= 'h37FF, {t, ".cram"});
        expect1(s.bar,      g && byte3 && ofs == 'h7FFFF, {t, ".bar"});
        expect1(s.bsr,      g && byte3 && ofs == 'h7FFFB, {t, ".bsr"});
        expect1(s.bcr,      g && byte3 && ofs == 'h7FFF7, {t, ".bcr"});
        expect1(s.bscr,     g && byte3 && (ofs == 'h7FFFB || ofs == 'h7FFF7), {t, ".bscr"});
        for (int b = 0; b < 4; b++) begin
          expect1(s.ader0[b], g && byte3 && ofs == 'h7FF6F - 4 * b, {t, ".ader0"});
          expect1(s.ader1[b], g && byte3 && ofs == 'h7FF7F - 4 * b, {t, ".ader1"});
        end
        expect1(s.test_out_12, g && byte3 && ofs == 'h05003, {t, ".test_out_12"});
        expect1(s.test_out_34, g && byte3 && ofs == 'h05007, {t, ".test_out_34"});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
