// tb_ader_ext: random check of the function decoder: A31-A25 and AM must
// equal ADER0 or ADER1, the module must be enabled, and the AM code decides
// between single (0x09/0x0D) and block transfer (0x0B/0x0F).
module tb_ader_ext;
  timeunit 1ns;
  timeprecision 1ps;
  logic [31:25] a, ader0_a, ader1_a;
  logic [5:0]   am, ader0_am, ader1_am;
  logic         mod_enabled, f0_sel, f1_sel, single_access, blt_access;
  int checks = 0, failures = 0;
  int n_single = 0, n_blt = 0;

  ader_ext dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [5:0] AMS [6] = '{6'h09, 6'h0D, 6'h0B, 6'h0F, 6'h2F, 6'h39};

  initial begin
    for (int i = 0; i < 20000; i++) begin
      bit e0, e1, es, eb;
      ader0_a = 7'($urandom); ader1_a = 7'($urandom);
      ader0_am = AMS[$urandom % 6]; ader1_am = AMS[$urandom % 6];
      mod_enabled = $urandom % 4 != 0;
      case ($urandom % 3)
        0: a = ader0_a;
        1: a = ader1_a;
        default: a = 7'($urandom);
      endcase
      am = ($urandom % 3 == 0) ? AMS[$urandom % 6] : (($urandom % 2) ? ader0_am : ader1_am);
      #1;
      e0 = mod_enabled && a == ader0_a && am == ader0_am;
      e1 = mod_enabled && a == ader1_a && am == ader1_am;
      es = (e0 || e1) && (am == 6'h09 || am == 6'h0D);
      eb = (e0 || e1) && (am == 6'h0B || am == 6'h0F);
      checks++;
      if (f0_sel !== e0 || f1_sel !== e1 || single_access !== es || blt_access !== eb) begin
        failures++;
        $display("FAIL a=%h am=%h ader0=%h/%h ader1=%h/%h en=%b: %b%b%b%b",
                 a, am, ader0_a, ader0_am, ader1_a, ader1_am, mod_enabled,
                 f0_sel, f1_sel, single_access, blt_access);
      end
      n_single += es; n_blt += eb;
    end
    checks++;
    if (n_single == 0 || n_blt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
