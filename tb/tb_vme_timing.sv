// tb_vme_timing: drives VME strobe sequences into the synchroniser and checks
// the latency of ascyc/dscyc (two clocks), that dspuls/ds_end/as_start are
// single-clock pulses at the right edges, that dssync lags dscyc by one
// clock, and that EN_BLT_CNT is set after the first beat and cleared with AS*.
module tb_vme_timing;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  logic nas = 1, nds0 = 1, nds1 = 1, nwrite = 1, nlword = 1;
  logic ascyc, as_start, dscyc, dssync, dspuls, ds_end;
  logic ds0_i, ds1_i, write_i, lword_i, en_blt_cnt;
  int checks = 0, failures = 0;
  int n_dspuls = 0, n_dsend = 0, n_asstart = 0;

  vme_timing dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    n_dspuls  += dspuls;
    n_dsend   += ds_end;
    n_asstart += as_start;
  end

  // One beat: DS asserted for `len` clocks, then released for 3 clocks.
  task automatic beat(input bit wr, input bit lw, input bit both, input int len, input bit first);
    @(negedge clk);
    nwrite = !wr; nlword = !lw;
    nds0 = 0; nds1 = !both;
    @(negedge clk); expect1(dscyc, 0, "dscyc after 1 clock");
    @(negedge clk); expect1(dscyc, 1, "dscyc after 2 clocks");
    expect1(dspuls, 1, "dspuls at start");
    expect1(dssync, 0, "dssync lags");
    expect1(write_i, wr, "write_i");
    expect1(lword_i, lw, "lword_i");
    expect1(ds1_i, both, "ds1_i");
    expect1(en_blt_cnt, !first, "en_blt_cnt during beat");
    @(negedge clk);
    expect1(dspuls, 0, "dspuls one clock");
    expect1(dssync, 1, "dssync set");
    repeat (len - 2) @(negedge clk);
    nds0 = 1; nds1 = 1;
    @(negedge clk); @(negedge clk);
    expect1(ds_end, 1, "ds_end pulse");
    expect1(dscyc, 0, "dscyc released");
    @(negedge clk);
    expect1(ds_end, 0, "ds_end one clock");
    expect1(en_blt_cnt, 1, "en_blt_cnt after beat");
  endtask

  task automatic cycle(input int beats);
    @(negedge clk);
    nas = 0;
    @(negedge clk); expect1(ascyc, 0, "ascyc after 1 clock");
    @(negedge clk); expect1(ascyc, 1, "ascyc after 2 clocks");
    expect1(as_start, 1, "as_start");
    @(negedge clk); expect1(as_start, 0, "as_start one clock");
    for (int b = 0; b < beats; b++)
      beat($urandom % 2, $urandom % 2, $urandom % 2, 2 + $urandom % 4, b == 0);
    nas = 1;
    repeat (3) @(negedge clk);
    expect1(ascyc, 0, "ascyc released");
    expect1(en_blt_cnt, 0, "en_blt_cnt cleared with AS");
  endtask

  initial begin
    int total_beats = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20; c++) begin
      int nb;
      nb = 1 + $urandom % 5;
      cycle(nb);
      total_beats += nb;
    end
    checks++;
    if (n_dspuls != total_beats || n_dsend != total_beats || n_asstart != 20) begin
      failures++;
      $display("FAIL pulse counts %0d %0d %0d for %0d beats", n_dspuls, n_dsend, n_asstart, total_beats);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
