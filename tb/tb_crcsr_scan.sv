// tb_crcsr_scan: walks the whole CR/CSR map of the board over VME, as a crate
// master does when it configures a VME64x system:
//   - reads all 512 bytes of the configuration ROM (offsets 0x00003-0x007FF)
//     and compares them with the board's CR table, listed here by offset,
//   - reads all 16 user-ROM bytes (0x01003-0x0103F) with card number 0xC,
//   - fills all 512 CRAM bytes (0x03003-0x037FF) with a pattern and reads
//     them back,
//   - reads every offset of the CSR page (0x7FC03-0x7FFFF): BSCR, BAR and
//     the ADER bytes must return their values, all others zero,
//   - reads a sample of offsets outside every sub-range: they are
//     acknowledged (no bus error in CR/CSR space) and return zero with the
//     chip's data driver off.
// Every cycle must end with DTACK*; the testbench counts the cycles of each
// kind and fails if one kind never ran.
module tb_crcsr_scan;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 0, nsysres = 0;
  logic        nas = 1, nds0 = 1, nds1 = 1, nwrite = 1, nlword = 1;
  logic [31:1] a = '0;
  logic [5:0]  am = 6'h2F;
  logic [7:0]  d_in = '0, d_out;
  logic [4:0]  nga;
  logic        d_oe, ndtack, nberr, nirq1, nretry, nvme_oe, vme_dir;
  logic [3:0]  card_nr = 4'hC;
  logic        berr_ext = 0;
  logic [24:1] loc_a;
  logic [5:0]  loc_am;
  logic        loc_write, loc_strobe, single_access, blt_access, f0_sel, f1_sel;
  logic        reset_mode, mod_enabled, wr_test_out_12, wr_test_out_34;

  localparam logic [4:0] SLOT = 5'd17;
  int checks = 0, failures = 0;

  vme64x_chip dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Single-byte CR/CSR cycle on the odd byte lane; returns the byte read and
  // whether the chip drove the data bus.
  task automatic crcsr(input logic [18:0] ofs, input bit wr, input logic [7:0] wdata,
                       output logic [7:0] rdata, output bit driven);
    int t;
    #3;
    a = {8'h00, SLOT, ofs} >> 1; am = 6'h2F; nwrite = !wr; nlword = 1;
    d_in = wdata;
    #7 nas = 0;
    #11 nds0 = 0; nds1 = 1;
    t = 0;
    while (ndtack && nberr && t < 400) begin #1; t++; end
    check(!ndtack && nberr, 1, $sformatf("DTACK for offset %h", ofs));
    rdata  = d_out;
    driven = d_oe;
    #2 nds0 = 1;
    t = 0;
    while (!ndtack && t < 400) begin #1; t++; end
    #5 nas = 1;
    #20;
  endtask

  // Configuration ROM contents by CR offset (others are zero).
  function automatic logic [7:0] cr_expected(input int unsigned ofs);
    case (ofs)
      'h013, 'h017: return 8'h81;
      'h01B: return 8'h02;  'h01F: return 8'h43;  'h023: return 8'h52;
      'h033: return 8'hA0;  'h037: return 8'h12;  'h03B: return 8'h34;  'h03F: return 8'h56;
      'h043: return 8'hB9;  'h047: return 8'h87;  'h04B: return 8'h65;  'h04F: return 8'h43;
      'h07F: return 8'h01;
      'h087: return 8'h10;  'h08B: return 8'h03;  'h093: return 8'h10;  'h097: return 8'h1F;
      'h09F: return 8'h30;  'h0A3: return 8'h03;  'h0AB: return 8'h37;  'h0AF: return 8'hFF;
      'h0B7: return 8'h50;  'h0BB: return 8'h03;  'h0C3: return 8'h50;  'h0C7: return 8'h2F;
      'h0CF: return 8'h10;  'h0D3: return 8'h23;  'h0DB: return 8'h10;  'h0DF: return 8'h3F;
      'h103: return 8'h83;  'h13B: return 8'h22;  'h623: return 8'hFE;
      default: return 8'h00;
    endcase
  endfunction

  int n_cr = 0, n_ucr = 0, n_cram = 0, n_csr = 0, n_gap = 0;

  initial begin
    logic [7:0] v, e, ucr [16];
    bit drv;
    nga = ~SLOT;
    repeat (3) @(negedge clk);
    nsysres = 1;
    repeat (3) @(negedge clk);

    // configuration ROM
    for (int i = 0; i < 512; i++) begin
      crcsr(19'(4 * i + 3), 0, 8'h00, v, drv);
      check(v, cr_expected(4 * i + 3), $sformatf("CR %h", 4 * i + 3));
      check(drv, 1, "CR driven");
      n_cr++;
    end

    // user ROM
    ucr = '{8'h00, 8'h01, 8'h5C, 8'h11, 8'h00, 8'h00, 8'h10, 8'h12,
            8'h54, 8'h43, 8'h53, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    for (int i = 0; i < 16; i++) begin
      crcsr(19'h01003 + 19'(4 * i), 0, 8'h00, v, drv);
      check(v, ucr[i], $sformatf("user CR %0d", i));
      n_ucr++;
    end

    // CRAM: fill, then read back in reverse order
    for (int i = 0; i < 512; i++) begin
      crcsr(19'h03003 + 19'(4 * i), 1, 8'(i * 7 + (i >> 3)), v, drv);
      n_cram++;
    end
    for (int i = 511; i >= 0; i--) begin
      crcsr(19'h03003 + 19'(4 * i), 0, 8'h00, v, drv);
      e = 8'(i * 7 + (i >> 3));
      check(v, e, $sformatf("CRAM %0d", i));
      n_cram++;
    end

    // CSR page: program ADER0/ADER1 and the BSR, then read every offset
    for (int b = 0; b < 4; b++) begin
      crcsr(19'h7FF63 + 19'(4 * b), 1, 8'hA0 + 8'(b), v, drv);
      crcsr(19'h7FF73 + 19'(4 * b), 1, 8'hB0 + 8'(b), v, drv);
    end
    crcsr(19'h7FFFB, 1, 8'h10, v, drv);
    for (int i = 0; i < 256; i++) begin
      int unsigned ofs;
      ofs = 'h7FC03 + 4 * i;
      e = 8'h00;
      if (ofs >= 'h7FF63 && ofs <= 'h7FF6F) e = 8'hA0 + 8'((ofs - 'h7FF63) / 4);
      if (ofs >= 'h7FF73 && ofs <= 'h7FF7F) e = 8'hB0 + 8'((ofs - 'h7FF73) / 4);
      if (ofs == 'h7FFF7 || ofs == 'h7FFFB) e = 8'h10;
      if (ofs == 'h7FFFF) e = {SLOT, 3'b000};
      crcsr(19'(ofs), 0, 8'h00, v, drv);
      check(v, e, $sformatf("CSR %h", ofs));
      n_csr++;
    end

    // offsets outside every sub-range
    for (int i = 0; i < 64; i++) begin
      int unsigned ofs;
      ofs = 'h00803 + 4 * ($urandom % 'h1FC00);
      if ((ofs >= 'h01003 && ofs <= 'h0103F) || (ofs >= 'h03003 && ofs <= 'h037FF) ||
          (ofs >= 'h05003 && ofs <= 'h0503F) || ofs >= 'h7FC03) continue;
      crcsr(19'(ofs), 0, 8'h00, v, drv);
      check({drv, v}, 9'h000, $sformatf("unmapped %h", ofs));
      n_gap++;
    end

    check(n_cr == 512 && n_ucr == 16 && n_cram == 1024 && n_csr == 256 && n_gap > 0, 1,
          "every kind of access ran");
    $display("cycles: cr=%0d user_cr=%0d cram=%0d csr=%0d unmapped=%0d", n_cr, n_ucr, n_cram, n_csr, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
