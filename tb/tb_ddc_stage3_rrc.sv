// tb_ddc_stage3_rrc: self-checking test bench of ddc_stage3_rrc.
//
// Runs decim_tb_core for the RRC coefficient set: random input at the rate the
// stage sees inside the chain (one sample per 4 clock(s)), random gaps,
// saturating patterns and a DC level, each output compared with a direct-form
// reference; the latency must be 4 clocks.
module tb_ddc_stage3_rrc;
  decim_tb_core #(
    .COEF_SET(ddc_pkg::CS_RRC),
    .IN_W    (16),
    .OUT_W   (16),
    .MIN_GAP (4),
    .LAT     (4)
  ) u_core ();
endmodule : tb_ddc_stage3_rrc
