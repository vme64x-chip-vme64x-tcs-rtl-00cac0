// tb_vme64x_chip: end-to-end test of the VME64x slave with a VME master model.
//
// The master runs asynchronous VME cycles (AS*, DS0*/DS1*, LWORD*, WRITE*,
// waiting for DTACK* or BERR*) against the chip, exactly as a crate master
// configures a VME64x board:
//   - reads the configuration ROM ("CR" signature, board and revision ID,
//     CR/CSR offsets, function-0 ADEM) and the user ROM (chip id with the
//     card number, version, serial number),
//   - reads the BAR, writes and reads back the CRAM,
//   - programs ADER0 (A32 single, AM 0x0D) and ADER1 (A32 BLT, AM 0x0B),
//     checks that nothing answers before the module is enabled, then enables
//     it through the bit set register,
//   - runs single D16 writes, D16 and D32 block transfers and checks the
//     local address of every beat, and a local bus error (BERR*, BERR flag),
//   - checks that a CR/CSR cycle for another slot gets no answer, the
//     amnesia address when no GA pins are grounded, the user CSR
//     test-output strobe, and the latency from DS* to DTACK* (3-4 clocks).
// Each mechanism is counted; one that never happened is a failure.
module tb_vme64x_chip;
  timeunit 1ns;
  timeprecision 1ps;
  logic        clk = 0, nsysres = 0;
  logic        nas = 1, nds0 = 1, nds1 = 1, nwrite = 1, nlword = 1;
  logic [31:1] a = '0;
  logic [5:0]  am = '0;
  logic [7:0]  d_in = '0, d_out;
  logic [4:0]  nga;
  logic        d_oe, ndtack, nberr, nirq1, nretry, nvme_oe, vme_dir;
  logic [3:0]  card_nr = 4'd9;
  logic        berr_ext = 0;
  logic [24:1] loc_a;
  logic [5:0]  loc_am;
  logic        loc_write, loc_strobe, single_access, blt_access, f0_sel, f1_sel;
  logic        reset_mode, mod_enabled, wr_test_out_12, wr_test_out_34;

  int checks = 0, failures = 0;
  localparam logic [4:0] SLOT = 5'd6;

  vme64x_chip dut (.*);

  always #5 clk = ~clk;   // 100 MHz chip clock

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- local logic
  bit          berr_next = 0;       // answer the next local beat with BERR
  logic [24:1] loc_log [$];
  int n_test_out = 0;

  always @(posedge clk) begin
    berr_ext <= 1'b0;
    if (loc_strobe) begin
      loc_log.push_back(loc_a);
      if (berr_next) begin
        berr_ext  <= 1'b1;
        berr_next <= 0;
      end
    end
    if (wr_test_out_12 || wr_test_out_34) n_test_out++;
  end

  // ---------------------------------------------------------- checks
  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // ---------------------------------------------------------- VME master
  typedef enum {RESP_DTACK, RESP_BERR, RESP_NONE} resp_t;
  int dtack_lat_min = 1000, dtack_lat_max = 0;

  // One VME cycle of `beats` data phases. width: 8 (odd byte), 16 or 32.
  task automatic vme_cycle(input logic [31:0] addr, input logic [5:0] amod,
                           input bit wr, input int width, input int beats,
                           input logic [7:0] wdata [$], output logic [7:0] rdata [$],
                           output resp_t resp);
    rdata = {};
    resp  = RESP_DTACK;
    #3;
    a = addr[31:1]; am = amod; nwrite = !wr; nlword = !(width == 32);
    #7 nas = 0;
    for (int b = 0; b < beats; b++) begin
      int t;
      if (wr && b < wdata.size()) d_in = wdata[b];
      #11;
      nds0 = 0; nds1 = (width == 8);
      t = 0;
      while (ndtack && nberr && t < 400) begin #1; t++; end
      if (!nberr)        resp = RESP_BERR;
      else if (ndtack)   resp = RESP_NONE;
      else begin
        if (t < dtack_lat_min) dtack_lat_min = t;
        if (t > dtack_lat_max) dtack_lat_max = t;
        if (!wr) begin
          rdata.push_back(d_oe ? d_out : 8'hxx);
        end
      end
      #2;
      nds0 = 1; nds1 = 1;
      t = 0;
      while ((!ndtack || !nberr) && t < 400) begin #1; t++; end
      if (resp != RESP_DTACK) break;
    end
    #5 nas = 1;
    #30;
  endtask

  function automatic logic [31:0] crcsr(input logic [4:0] slot, input logic [18:0] ofs);
    return {8'h00, slot, ofs};
  endfunction

  task automatic cr_read(input logic [4:0] slot, input logic [18:0] ofs, output logic [7:0] v,
                         output resp_t r);
    logic [7:0] w [$], rd [$];
    vme_cycle(crcsr(slot, ofs), 6'h2F, 0, 8, 1, w, rd, r);
    v = (rd.size() > 0) ? rd[0] : 8'h00;
  endtask

  task automatic cr_write(input logic [4:0] slot, input logic [18:0] ofs, input logic [7:0] v,
                          output resp_t r);
    logic [7:0] w [$], rd [$];
    w.push_back(v);
    vme_cycle(crcsr(slot, ofs), 6'h2F, 1, 8, 1, w, rd, r);
  endtask

  // ---------------------------------------------------------- scenario
  int n_cr_read = 0, n_user_cr = 0, n_cram_wr = 0, n_cram_rd = 0, n_csr_wr = 0;
  int n_bar = 0, n_single = 0, n_blt16 = 0, n_blt32 = 0, n_berr = 0, n_noresp = 0;
  int n_amnesia = 0, n_disabled = 0;

  task automatic expect_read(input logic [4:0] slot, input logic [18:0] ofs,
                             input logic [7:0] exp, input string what);
    logic [7:0] v; resp_t r;
    cr_read(slot, ofs, v, r);
    check(r, RESP_DTACK, {what, " response"});
    check(v, exp, what);
  endtask

  task automatic expect_write(input logic [4:0] slot, input logic [18:0] ofs,
                              input logic [7:0] v);
    resp_t r;
    cr_write(slot, ofs, v, r);
    check(r, RESP_DTACK, $sformatf("write %h response", ofs));
  endtask

  task automatic function_cycle(input logic [31:0] addr, input logic [5:0] amod, input int width,
                                input int beats, input int step, input resp_t exp_resp,
                                input string what);
    logic [7:0] w [$], rd [$];
    resp_t r;
    loc_log = {};
    for (int i = 0; i < beats; i++) w.push_back(8'(i));
    vme_cycle(addr, amod, 1, width, beats, w, rd, r);
    check(r, exp_resp, {what, " response"});
    if (exp_resp == RESP_DTACK) begin
      check(loc_log.size(), beats, {what, " local beats"});
      // the counters wrap inside a 2 KiB (D16) or 4 KiB (D32) window
      for (int i = 0; i < beats && i < loc_log.size(); i++) begin
        logic [24:0] e;
        e = addr[24:0] + 25'(i * step);
        if (width == 16) e = {addr[24:11], e[10:0]};
        if (width == 32) e = {addr[24:12], e[11:0]};
        check({loc_log[i], 1'b0}, e, $sformatf("%s beat %0d address", what, i));
      end
    end
  endtask

  initial begin
    logic [7:0] v;
    resp_t r;
    nga = ~SLOT;
    repeat (3) @(negedge clk);
    nsysres = 1;
    repeat (3) @(negedge clk);
    check({nirq1, nretry}, 2'b11, "interrupter and retry inactive");

    // ---- configuration ROM
    expect_read(SLOT, 19'h0001F, 8'h43, "CR 'C'");
    expect_read(SLOT, 19'h00023, 8'h52, "CR 'R'");
    expect_read(SLOT, 19'h0001B, 8'h02, "CR space id");
    expect_read(SLOT, 19'h00033, 8'hA0, "board id 3");
    expect_read(SLOT, 19'h0003F, 8'h56, "board id 0");
    expect_read(SLOT, 19'h0004F, 8'h43, "revision id 0");
    expect_read(SLOT, 19'h0008B, 8'h03, "BEG_USER_CR lsb");
    expect_read(SLOT, 19'h000AF, 8'hFF, "END_CRAM lsb");
    expect_read(SLOT, 19'h00103, 8'h83, "F0 DAWPR");
    expect_read(SLOT, 19'h0013B, 8'h22, "F0 AMCAP");
    expect_read(SLOT, 19'h00623, 8'hFE, "F0 ADEM");
    expect_read(SLOT, 19'h00627, 8'h00, "F0 ADEM byte 2");
    n_cr_read = 12;

    // ---- user CR
    expect_read(SLOT, 19'h01003, 8'h00, "chip id 3");
    expect_read(SLOT, 19'h01007, 8'h01, "chip id 2");
    expect_read(SLOT, 19'h0100B, 8'h59, "chip id 1 with card number 9");
    expect_read(SLOT, 19'h0100F, 8'h11, "chip id 0");
    expect_read(SLOT, 19'h0101B, 8'h10, "version 1");
    expect_read(SLOT, 19'h0101F, 8'h12, "version 0");
    expect_read(SLOT, 19'h01023, 8'h54, "serial 'T'");
    expect_read(SLOT, 19'h0102B, 8'h53, "serial 'S'");
    n_user_cr = 8;

    // ---- BAR
    expect_read(SLOT, 19'h7FFFF, {SLOT, 3'b000}, "BAR");
    n_bar++;

    // ---- CRAM
    for (int i = 0; i < 16; i++) begin
      expect_write(SLOT, 19'h03003 + 19'(i * 4 * 29), 8'(i * 37 + 5));
      n_cram_wr++;
    end
    for (int i = 15; i >= 0; i--) begin
      expect_read(SLOT, 19'h03003 + 19'(i * 4 * 29), 8'(i * 37 + 5), $sformatf("CRAM %0d", i));
      n_cram_rd++;
    end

    // ---- ADER0: A32 0x8A000000, AM 0x0D; ADER1: A32 0x52000000, AM 0x0B
    expect_write(SLOT, 19'h7FF63, 8'h8A);
    expect_write(SLOT, 19'h7FF6F, 8'h0D << 2);
    expect_write(SLOT, 19'h7FF73, 8'h52);
    expect_write(SLOT, 19'h7FF7F, 8'h0B << 2);
    n_csr_wr += 4;
    expect_read(SLOT, 19'h7FF63, 8'h8A, "ADER0 byte 3");
    expect_read(SLOT, 19'h7FF7F, 8'h2C, "ADER1 byte 0");

    // ---- module still disabled: no answer
    function_cycle(32'h8A001234, 6'h0D, 16, 1, 0, RESP_NONE, "disabled module");
    check(loc_log.size(), 0, "no local beat while disabled");
    n_disabled++; n_noresp++;

    // ---- enable the module
    expect_write(SLOT, 19'h7FFFB, 8'h10);
    n_csr_wr++;
    expect_read(SLOT, 19'h7FFF7, 8'h10, "BSCR module enabled");
    check(mod_enabled, 1, "mod_enabled");

    // ---- single D16 writes through function 0
    for (int i = 0; i < 4; i++) begin
      function_cycle(32'h8A000000 | (32'($urandom) & 32'h01FFFFFE), 6'h0D, 16, 1, 0,
                     RESP_DTACK, "single D16");
      n_single++;
    end
    // wrong AM: no answer
    function_cycle(32'h8A000100, 6'h09, 16, 1, 0, RESP_NONE, "AM not in ADER0");
    n_noresp++;

    // ---- block transfers through function 1
    function_cycle(32'h52000100, 6'h0B, 16, 8, 2, RESP_DTACK, "BLT D16");
    n_blt16 += 8;
    function_cycle(32'h53FFF7F0, 6'h0B, 16, 12, 2, RESP_DTACK, "BLT D16 near window end");
    n_blt16 += 12;
    function_cycle(32'h52000200, 6'h0B, 32, 8, 4, RESP_DTACK, "BLT D32");
    n_blt32 += 8;

    // ---- local bus error
    berr_next = 1;
    function_cycle(32'h8A000040, 6'h0D, 16, 1, 0, RESP_BERR, "local BERR");
    n_berr++;
    expect_read(SLOT, 19'h7FFFB, 8'h18, "BSCR berr flag");
    expect_write(SLOT, 19'h7FFF7, 8'h08);   // clear the BERR flag
    expect_read(SLOT, 19'h7FFFB, 8'h10, "BSCR berr flag cleared");
    // single access still fine afterwards
    function_cycle(32'h8A000042, 6'h0D, 16, 1, 0, RESP_DTACK, "single after BERR");
    n_single++;

    // ---- another slot: no answer
    cr_read(SLOT + 5'd1, 19'h0001F, v, r);
    check(r, RESP_NONE, "other slot");
    n_noresp++;

    // ---- user CSR test-output strobe
    begin
      int n_before;
      n_before = n_test_out;
      expect_write(SLOT, 19'h05003, 8'h21);
      check(n_test_out - n_before, 1, "test-out strobe once");
    end

    // ---- amnesia address when no GA pin is grounded
    nga = 5'h1F;
    #100;
    cr_read(SLOT, 19'h0001F, v, r);
    check(r, RESP_NONE, "old slot ignored without GA");
    expect_read(5'h1E, 19'h0001F, 8'h43, "CR via amnesia address");
    expect_read(5'h1E, 19'h7FFFF, 8'hF0, "BAR amnesia");
    n_amnesia++;
    nga = ~SLOT;

    // ---- SYSRESET disables the module again
    #20 nsysres = 0; #40 nsysres = 1; #40;
    check(mod_enabled, 0, "disabled after SYSRESET");
    function_cycle(32'h8A001234, 6'h0D, 16, 1, 0, RESP_NONE, "after SYSRESET");

    // ---- DTACK latency: DS* -> DTACK* within 3..4 clocks of 10 ns
    check(dtack_lat_min >= 30 && dtack_lat_max <= 40, 1,
          $sformatf("DTACK latency %0d..%0d ns", dtack_lat_min, dtack_lat_max));

    // ---- every mechanism happened
    check(n_cr_read > 0, 1, "CR read happened");
    check(n_user_cr > 0, 1, "user CR read happened");
    check(n_cram_wr > 0 && n_cram_rd > 0, 1, "CRAM write/read happened");
    check(n_csr_wr > 0, 1, "CSR write happened");
    check(n_bar > 0, 1, "BAR read happened");
    check(n_single > 0, 1, "single access happened");
    check(n_blt16 > 0 && n_blt32 > 0, 1, "D16 and D32 block transfers happened");
    check(n_berr > 0, 1, "bus error happened");
    check(n_noresp > 0 && n_disabled > 0, 1, "unanswered cycles happened");
    check(n_amnesia > 0, 1, "amnesia address happened");
    check(n_test_out > 0, 1, "test-out strobe happened");
    $display("mechanisms: cr=%0d user_cr=%0d cram_wr=%0d cram_rd=%0d csr_wr=%0d bar=%0d single=%0d blt16=%0d blt32=%0d berr=%0d noresp=%0d amnesia=%0d test_out=%0d",
             n_cr_read, n_user_cr, n_cram_wr, n_cram_rd, n_csr_wr, n_bar, n_single,
             n_blt16, n_blt32, n_berr, n_noresp, n_amnesia, n_test_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
