// tb_ddc_stage1_hb: self-checking test bench of ddc_stage1_hb.
//
// Runs decim_tb_core for the HB1 coefficient set: random input at the rate the
// stage sees inside the chain (one sample per 1 clock(s)), random gaps,
// saturating patterns and a DC level, each output compared with a direct-form
// reference; the latency must be 4 clocks.
module tb_ddc_stage1_hb;
  decim_tb_core #(
    .COEF_SET(ddc_pkg::CS_HB1),
    .IN_W    (14),
    .OUT_W   (16),
    .MIN_GAP (1),
    .LAT     (4)
  ) u_core ();
endmodule : tb_ddc_stage1_hb
