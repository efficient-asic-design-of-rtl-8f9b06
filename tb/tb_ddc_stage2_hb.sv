// tb_ddc_stage2_hb: self-checking test bench of ddc_stage2_hb.
//
// Runs decim_tb_core for the HB2 coefficient set: random input at the rate the
// stage sees inside the chain (one sample per 2 clock(s)), random gaps,
// saturating patterns and a DC level, each output compared with a direct-form
// reference; the latency must be 5 clocks.
module tb_ddc_stage2_hb;
  decim_tb_core #(
    .COEF_SET(ddc_pkg::CS_HB2),
    .IN_W    (16),
    .OUT_W   (16),
    .MIN_GAP (2),
    .LAT     (5)
  ) u_core ();
endmodule : tb_ddc_stage2_hb
