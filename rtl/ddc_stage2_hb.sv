// ddc_stage2_hb: second half-band decimator, 30.72 -> 15.36 MSPS.
//
// A 27-tap half-band low-pass, 5 multipliers. The symmetric taps are pre-
// added, leaving 14 products, so a result takes 3 MAC cycles; inputs arrive
// every second clock, so a pair spans 4 clocks.
// It is a decimate-by-2 FIR built on psp_decimator: a partially serial
// pipelined MAC that computes only the outputs kept after decimation, using
// an input pipeline register so that new samples can arrive while the
// multipliers work on the previous pair.
//
// Interface: in_valid/in_data (one sample per clock at most), out_valid
// pulses for one clock with each out_data, which holds until the next.
// Timing: out_valid follows the clock that presented every second input by
// P+2 clocks, P = ceil(products / NMULT) MAC cycles (see psp_decimator).
// Tap count and multiplier count are the document's; the coefficient values,
// word widths and rounding are this design's (see ddc_pkg).
module ddc_stage2_hb
  import ddc_pkg::*;
#(
  parameter int NMULT = 5,   // multipliers
  parameter int IN_W  = 16,  // input sample width
  parameter int OUT_W = 16   // output sample width
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  psp_decimator #(
    .COEF_SET(CS_HB2),
    .NTAPS   (HB2_TAPS),
    .NMULT   (NMULT),
    .FOLD    (1'b1),
    .IN_W    (IN_W),
    .OUT_W   (OUT_W)
  ) u_mac (
    .clk      (clk),
    .reset    (reset),
    .in_valid (in_valid),
    .in_data  (in_data),
    .out_valid(out_valid),
    .out_data (out_data)
  );

endmodule : ddc_stage2_hb
