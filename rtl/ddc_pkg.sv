// ddc_pkg: constants shared by the WCDMA digital down converter.
//
// Holds the coefficient sets of the three decimation stages, the arctangent
// table of the CORDIC synthesizer and the default word widths.
//
// Coefficients are 16-bit two's complement with 15 fractional bits (Q1.15),
// each set scaled to unity gain at DC. The filter specifications follow the
// design this RTL implements; the coefficient values themselves are this
// design's own, obtained as follows:
//   * HB1: 11-tap (order 10) equiripple (Parks-McClellan) half-band low-pass
//     for 61.44 MSPS, pass band 0-2.34 MHz, stop band 28.38-30.72 MHz.
//   * HB2: 27-tap equiripple half-band low-pass for 30.72 MSPS, pass band
//     0-2.34 MHz, stop band 13.02-15.36 MHz.
//   * In both half-bands every second tap away from the centre is exactly 0
//     and the centre tap is exactly 0.5 (16384).
//   * RRC: 61-tap root-raised-cosine for 15.36 MSPS (4 samples per 3.84 Mchip/s
//     chip), roll-off 0.22, multiplied by a 50 dB Chebyshev window:
//       h(t) = [sin(pi t (1-b)) + 4 b t cos(pi t (1+b))] / [pi t (1-(4 b t)^2)],
//       t = (k-30)/4, b = 0.22, then h(k) *= cheb50(k), h /= sum(h).
//   * Every value is round(h * 32768). The non-zero HB2 taps were then
//     moved by at most 1 LSB, trying all such combinations, to minimise the
//     pass-band deviation of the quantised filter (0.0001 dB); the RRC centre
//     tap was lowered by 1 LSB so that the taps sum to exactly 32768.
// CORDIC angles are round(atan(2^-i) / (2 pi) * 2^20): angles are kept as
// fractions of a full turn in 20 bits.
package ddc_pkg;

  localparam int COEF_W    = 16;  // coefficient width
  localparam int COEF_FRAC = 15;  // fractional bits of a coefficient

  localparam int DDC_IN_W  = 14;  // ADC sample width
  localparam int DDC_OUT_W = 16;  // baseband output width

  typedef logic signed [COEF_W-1:0] coef_t;

  // Which coefficient set a decimator stage uses.
  typedef enum logic [1:0] {
    CS_HB1 = 2'd0,
    CS_HB2 = 2'd1,
    CS_RRC = 2'd2
  } coef_set_e;

  localparam int HB1_TAPS = 11;
  localparam int HB2_TAPS = 27;
  localparam int RRC_TAPS = 61;

  localparam coef_t HB1_COEFS [HB1_TAPS] = '{
    16'sd206, 16'sd0, -16'sd1641, 16'sd0, 16'sd9627, 16'sd16384,
    16'sd9627, 16'sd0, -16'sd1641, 16'sd0, 16'sd206
  };

  localparam coef_t HB2_COEFS [HB2_TAPS] = '{
    16'sd1, 16'sd0, -16'sd12, 16'sd0, 16'sd73, 16'sd0, -16'sd298, 16'sd0,
    16'sd936, 16'sd0, -16'sd2616, 16'sd0, 16'sd10108, 16'sd16384,
    16'sd10108, 16'sd0, -16'sd2616, 16'sd0, 16'sd936, 16'sd0, -16'sd298,
    16'sd0, 16'sd73, 16'sd0, -16'sd12, 16'sd0, 16'sd1
  };

  localparam coef_t RRC_COEFS [RRC_TAPS] = '{
    16'sd4, 16'sd3, 16'sd1, -16'sd3, -16'sd7, -16'sd5, 16'sd5, 16'sd14,
    16'sd10, -16'sd10, -16'sd32, -16'sd28, 16'sd17, 16'sd79, 16'sd98,
    16'sd20, -16'sd139, -16'sd263, -16'sd207, 16'sd86, 16'sd476, 16'sd655,
    16'sd339, -16'sd466, -16'sd1328, -16'sd1526, -16'sd449, 16'sd1970,
    16'sd5063, 16'sd7666, 16'sd8682, 16'sd7666, 16'sd5063, 16'sd1970,
    -16'sd449, -16'sd1526, -16'sd1328, -16'sd466, 16'sd339, 16'sd655,
    16'sd476, 16'sd86, -16'sd207, -16'sd263, -16'sd139, 16'sd20, 16'sd98,
    16'sd79, 16'sd17, -16'sd28, -16'sd32, -16'sd10, 16'sd10, 16'sd14,
    16'sd5, -16'sd5, -16'sd7, -16'sd3, 16'sd1, 16'sd3, 16'sd4
  };

  // Tap k of a coefficient set; 0 outside the set.
  function automatic coef_t stage_coef(coef_set_e set, int k);
    coef_t c;
    c = '0;
    unique case (set)
      CS_HB1: if (k >= 0 && k < HB1_TAPS) c = HB1_COEFS[k];
      CS_HB2: if (k >= 0 && k < HB2_TAPS) c = HB2_COEFS[k];
      CS_RRC: if (k >= 0 && k < RRC_TAPS) c = RRC_COEFS[k];
      default: c = '0;
    endcase
    return c;
  endfunction

  // Number of taps of a coefficient set.
  function automatic int stage_taps(coef_set_e set);
    unique case (set)
      CS_HB1:  return HB1_TAPS;
      CS_HB2:  return HB2_TAPS;
      CS_RRC:  return RRC_TAPS;
      default: return 0;
    endcase
  endfunction

  // CORDIC synthesizer.
  localparam int PHASE_W   = 28;  // phase accumulator: 61.44 MHz / 2^28 = 0.23 Hz steps
  localparam int ANGLE_W   = 20;  // CORDIC angle, fraction of a turn
  localparam int CORDIC_N  = 16;  // CORDIC iterations (pipeline stages)
  localparam int TRIG_W    = 16;  // width of the cos / sin outputs

  localparam logic [ANGLE_W-1:0] CORDIC_ATAN [CORDIC_N] = '{
    20'd131072, 20'd77376, 20'd40884, 20'd20753, 20'd10417, 20'd5213,
    20'd2607, 20'd1304, 20'd652, 20'd326, 20'd163, 20'd81, 20'd41,
    20'd20, 20'd10, 20'd5
  };

endpackage : ddc_pkg
