// ddc_chain: the three-stage WCDMA decimation chain, 61.44 -> 7.68 MSPS.
//
// Cascades the two half-band decimators and the RRC channel decimator
// (overall decimation by 8): 61.44 -> 30.72 -> 15.36 -> 7.68 MSPS. This is
// the real-valued filter path: one instance filters one component (I or Q)
// of the mixed-down signal, or, on its own, a real input stream.
//
// Interface: one clock. clk_enable marks a valid ddc_in sample; with
// clk_enable high on every clock the clock equals the 61.44 MHz input rate.
// ce_out pulses for one clock with each new ddc_out sample (one per 8
// accepted inputs); ddc_out holds between pulses.
// Timing: ce_out comes 13 clocks after the clock that presented the 8th input
// of a group (stage latencies 4 + 5 + 4) when clk_enable is high throughout.
// Defaults give the document's main precisions: 14-bit input, 16-bit output;
// IN_W = OUT_W = 12 gives its second variant. Both half-band outputs carry
// OUT_W bits; that internal width is this design's choice.
module ddc_chain
  import ddc_pkg::*;
#(
  parameter int IN_W  = DDC_IN_W,   // input precision
  parameter int OUT_W = DDC_OUT_W   // output (and inter-stage) precision
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    clk_enable,
  input  logic signed [IN_W-1:0]  ddc_in,
  output logic signed [OUT_W-1:0] ddc_out,
  output logic                    ce_out
);

  logic                    s1_valid, s2_valid;
  logic signed [OUT_W-1:0] s1_data, s2_data;

  ddc_stage1_hb #(.IN_W(IN_W), .OUT_W(OUT_W)) u_stage1 (
    .clk      (clk),
    .reset    (reset),
    .in_valid (clk_enable),
    .in_data  (ddc_in),
    .out_valid(s1_valid),
    .out_data (s1_data)
  );

  ddc_stage2_hb #(.IN_W(OUT_W), .OUT_W(OUT_W)) u_stage2 (
    .clk      (clk),
    .reset    (reset),
    .in_valid (s1_valid),
    .in_data  (s1_data),
    .out_valid(s2_valid),
    .out_data (s2_data)
  );

  ddc_stage3_rrc #(.IN_W(OUT_W), .OUT_W(OUT_W)) u_stage3 (
    .clk      (clk),
    .reset    (reset),
    .in_valid (s2_valid),
    .in_data  (s2_data),
    .out_valid(ce_out),
    .out_data (ddc_out)
  );

endmodule : ddc_chain
