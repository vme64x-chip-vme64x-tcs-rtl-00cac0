// vme_timing: synchronisation of the VME strobes and cycle timing signals.
//
// AS*, DS0*, DS1*, WRITE* and LWORD* are asynchronous to the chip clock. Each
// passes two flip-flops and is inverted to active high. From the synchronised
// strobes the block derives:
//   ascyc     - address strobe asserted (a VME cycle is in progress)
//   as_start  - one clock pulse when ascyc rises
//   dscyc     - at least one data strobe asserted (a data phase is running)
//   dssync    - dscyc delayed by one clock; read enables use it so that the
//               decoded address has settled before data are driven
//   dspuls    - one clock pulse at the start of each data phase; write
//               enables use it so that a register is written once per beat
//   ds_end    - one clock pulse when dscyc falls (end of a beat)
//   en_blt_cnt- set at the end of the first beat of a cycle and cleared when
//               AS* is released; it switches the block-transfer address
//               counter onto the local address bus from the second beat on.
// All outputs are registered or derived from registers; latency from a VME
// strobe edge to ascyc/dscyc is two to three clocks.
//
// The signal names and the EN_BLT_CNT flip-flop (set at the end of a data
// phase, cleared by ASCYC low) follow the document. The two-stage
// synchroniser, the one-clock delay of dssync and the pulse widths are this
// design's own choice; the document's AS/DS timing diagrams are not available.
// The document clocks EN_BLT_CNT with the inverted DSCYC; here it is a
// synchronous flip-flop enabled by ds_end.
module vme_timing (
  input  logic clk,
  input  logic rst_n,
  input  logic nas,
  input  logic nds0,
  input  logic nds1,
  input  logic nwrite,
  input  logic nlword,
  output logic ascyc,
  output logic as_start,
  output logic dscyc,
  output logic dssync,
  output logic dspuls,
  output logic ds_end,
  output logic ds0_i,
  output logic ds1_i,
  output logic write_i,
  output logic lword_i,
  output logic en_blt_cnt
);

  logic [4:0] s1, s2;   // {as, ds0, ds1, write, lword}, active high
  logic       ascyc_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= ~{nas, nds0, nds1, nwrite, nlword};
      s2 <= s1;
    end
  end

  assign {ascyc, ds0_i, ds1_i, write_i, lword_i} = s2;
  assign dscyc = ds0_i | ds1_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dssync     <= 1'b0;
      ascyc_d    <= 1'b0;
      en_blt_cnt <= 1'b0;
    end else begin
      dssync  <= dscyc;
      ascyc_d <= ascyc;
      if (!ascyc)      en_blt_cnt <= 1'b0;
      else if (ds_end) en_blt_cnt <= 1'b1;
    end
  end

  assign dspuls   = dscyc & ~dssync;
  assign ds_end   = ~dscyc & dssync;
  assign as_start = ascyc & ~ascyc_d;

endmodule
