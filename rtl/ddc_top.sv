// ddc_top: WCDMA digital down converter, 61.44 MSPS real IF in, 7.68 MSPS
// complex baseband out.
//
// Signal path: the CORDIC synthesizer generates cos/sin at the tuning
// frequency; the mixer turns the real 14-bit IF samples into I and Q; each of
// I and Q then passes through its own three-stage decimation chain (two
// half-band decimators and the RRC channel filter, decimation by 8) to give
// 16-bit samples at twice the 3.84 Mchip/s chip rate.
//
// Interface: one clock, asynchronous active-high reset. clk_enable marks a
// valid ddc_in sample (high every clock when the clock runs at 61.44 MHz).
// phase_inc sets the IF to remove: f_IF = phase_inc * 61.44 MHz / 2^28.
// ce_out pulses for one clock with each new ddc_out_i/ddc_out_q pair.
// Timing: input -> mixer output 1 clock; the chains add the latency of
// ddc_chain; the oscillator runs CORDIC_N + 2 enabled clocks behind the phase
// accumulator, which only shifts the phase of the mixed-down signal.
// The stages and their order follow the document; carrying I and Q through
// two identical chains is the direct reading of its complex mixer output.
module ddc_top
  import ddc_pkg::*;
#(
  parameter int IN_W  = DDC_IN_W,   // ADC precision
  parameter int OUT_W = DDC_OUT_W,  // baseband precision
  parameter int PW    = PHASE_W     // tuning word width
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    clk_enable,
  input  logic signed [IN_W-1:0]  ddc_in,
  input  logic [PW-1:0]           phase_inc,
  output logic signed [OUT_W-1:0] ddc_out_i,
  output logic signed [OUT_W-1:0] ddc_out_q,
  output logic                    ce_out
);

  logic signed [TRIG_W-1:0] lo_cos, lo_sin;
  logic                     mix_valid;
  logic signed [IN_W-1:0]   mix_i, mix_q;
  logic                     ce_q;

  cordic_dds #(.PW(PW), .OW(TRIG_W)) u_dds (
    .clk      (clk),
    .reset    (reset),
    .en       (clk_enable),
    .phase_inc(phase_inc),
    .cos_out  (lo_cos),
    .sin_out  (lo_sin)
  );

  ddc_mixer #(.IN_W(IN_W), .LO_W(TRIG_W)) u_mixer (
    .clk      (clk),
    .reset    (reset),
    .en       (clk_enable),
    .x        (ddc_in),
    .lo_cos   (lo_cos),
    .lo_sin   (lo_sin),
    .out_valid(mix_valid),
    .i_out    (mix_i),
    .q_out    (mix_q)
  );

  ddc_chain #(.IN_W(IN_W), .OUT_W(OUT_W)) u_chain_i (
    .clk       (clk),
    .reset     (reset),
    .clk_enable(mix_valid),
    .ddc_in    (mix_i),
    .ddc_out   (ddc_out_i),
    .ce_out    (ce_out)
  );

  ddc_chain #(.IN_W(IN_W), .OUT_W(OUT_W)) u_chain_q (
    .clk       (clk),
    .reset     (reset),
    .clk_enable(mix_valid),
    .ddc_in    (mix_q),
    .ddc_out   (ddc_out_q),
    .ce_out    (ce_q)
  );

  // Both chains see the same enables, so they stay in lock step.
  a_lockstep : assert property (@(posedge clk) disable iff (reset) ce_out == ce_q);

endmodule : ddc_top
