// addr_cnt_reg: local address register and block-transfer address counters.
//
// On `ld` the latched VME address A[24:1] and AM are stored, both counters are
// loaded from the address, and the data-width flags d16_eo / d32_eo are frozen.
// Two 10-bit counters then step on `cnt_step` while `cnt_en` is high:
// the D16 counter holds A[10:1] (one step = 2 bytes), the D32 counter holds
// A[11:2] (one step = 4 bytes). The output address a_i is chosen from
// {cnt_en, d16, d32}: 3'b110 gives A[24:11] & D16 counter, 3'b101 gives
// A[24:12] & D32 counter & '0', every other code gives the stored address.
// The D16 counter wraps inside a 2 KiB and the D32 counter inside a 4 KiB
// window, as in the document.
//
// The register widths, counter widths and selection code follow the document.
// The document clocks the register, the counters and the flag register with
// three separate strobes; here everything runs on one clock, and `ld` and
// `cnt_step` are single-cycle enables. Outputs are valid one clock after the
// strobe that changes them.
module addr_cnt_reg (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld,        // store address/AM, load counters, freeze flags
  input  logic        cnt_step,  // one beat of a block transfer
  input  logic        cnt_en,    // block-transfer counting and output select
  input  logic        d16_eo,    // current cycle is a D16 (even+odd byte) cycle
  input  logic        d32_eo,    // current cycle is a D32 cycle
  input  logic [24:1] a,
  input  logic [5:0]  am,
  output logic [24:1] a_i,
  output logic [5:0]  am_i
);

  logic [24:1] a_reg;
  logic [10:1] cnt_d16;
  logic [11:2] cnt_d32;
  logic        d16_q, d32_q;
  logic [2:0]  blt_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg   <= '0;
      am_i    <= '0;
      cnt_d16 <= '0;
      cnt_d32 <= '0;
      d16_q   <= 1'b0;
      d32_q   <= 1'b0;
    end else if (ld) begin
      a_reg   <= a;
      am_i    <= am;
      cnt_d16 <= a[10:1];
      cnt_d32 <= a[11:2];
      d16_q   <= d16_eo;
      d32_q   <= d32_eo;
    end else if (cnt_step && cnt_en) begin
      cnt_d16 <= cnt_d16 + 10'd1;
      cnt_d32 <= cnt_d32 + 10'd1;
    end
  end

  assign blt_sel = {cnt_en, d16_q, d32_q};

  always_comb begin
    unique case (blt_sel)
      3'b110:  a_i = {a_reg[24:11], cnt_d16};
      3'b101:  a_i = {a_reg[24:12], cnt_d32, 1'b0};
      default: a_i = a_reg;
    endcase
  end

endmodule
