// tb_cr_rom: reads every byte of the configuration ROM and compares it with
// the CR table of the VME64x-TCS board (listed here by CR offset), and checks
// that the output enable follows rd_en.
module tb_cr_rom;
  timeunit 1ns;
  timeprecision 1ps;
  logic [10:2] addr;
  logic        rd_en;
  logic [7:0]  data;
  logic        oe;
  int checks = 0, failures = 0;

  cr_rom dut (.*);

  // Expected non-zero bytes, keyed by CR offset (index * 4 + 3).
  logic [7:0] golden [int unsigned] = '{
    'h013: 8'h81, 'h017: 8'h81, 'h01B: 8'h02, 'h01F: 8'h43, 'h023: 8'h52,
    'h033: 8'hA0, 'h037: 8'h12, 'h03B: 8'h34, 'h03F: 8'h56,
    'h043: 8'hB9, 'h047: 8'h87, 'h04B: 8'h65, 'h04F: 8'h43,
    'h07F: 8'h01,
    'h087: 8'h10, 'h08B: 8'h03, 'h093: 8'h10, 'h097: 8'h1F,
    'h09F: 8'h30, 'h0A3: 8'h03, 'h0AB: 8'h37, 'h0AF: 8'hFF,
    'h0B7: 8'h50, 'h0BB: 8'h03, 'h0C3: 8'h50, 'h0C7: 8'h2F,
    'h0CF: 8'h10, 'h0D3: 8'h23, 'h0DB: 8'h10, 'h0DF: 8'h3F,
    'h103: 8'h83, 'h13B: 8'h22, 'h623: 8'hFE
  };

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned nonzero = 0;
    for (int i = 0; i < 512; i++) begin
      int unsigned ofs;
      logic [7:0] exp;
      ofs = i * 4 + 3;
      exp = golden.exists(ofs) ? golden[ofs] : 8'h00;
      addr  = 9'(i);
      rd_en = i % 3 != 0;
      #1;
      checks++;
      if (data !== exp || oe !== rd_en) begin
        failures++;
        $display("FAIL CR offset %h: data=%h oe=%b expected %h %b", ofs, data, oe, exp, rd_en);
      end
      nonzero += (data != 0);
    end
    checks++;
    if (nonzero != golden.size()) begin
      failures++;
      $display("FAIL %0d non-zero bytes, expected %0d", nonzero, golden.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
