// cordic_dds: direct digital synthesizer built on a pipelined CORDIC.
//
// Produces the local-oscillator pair cos(w0 n) and sin(w0 n) used to mix the
// IF input down to 0 Hz. A PHASE_W-bit phase accumulator adds phase_inc once
// per enabled clock, so the output frequency is f = phase_inc * fs / 2^PHASE_W
// (0.23 Hz steps at fs = 61.44 MHz with PHASE_W = 28). The top ANGLE_W bits of
// the phase, a fraction of a turn, drive a CORDIC in rotation mode:
//   * the angle is folded into [-90, +90) degrees by adding half a turn when
//     it lies in the second or third quadrant, and the results are then
//     negated;
//   * CORDIC_N shift-and-add iterations rotate the vector (K^-1 * A, 0),
//     one iteration per pipeline stage, so a new angle enters every clock;
//   * the start value is pre-scaled by 1/K = 0.60725 to cancel the CORDIC
//     gain; two guard bits are carried and removed by rounding at the end.
//
// Interface: en advances the accumulator and the whole pipeline (the clock
// enable of the input sample stream); cos_out/sin_out are signed TRIG_W-bit
// values of amplitude 2^(TRIG_W-1)-1.
// Timing: after the j-th enabled clock the outputs hold the cosine and sine
// of phase (j-CORDIC_N-2)*phase_inc (accumulator cleared by reset).
// The document calls for a CORDIC-based DDS and for about 0.25 Hz mixer
// resolution; the widths, iteration count and quadrant folding are this
// design's choices.
module cordic_dds
  import ddc_pkg::*;
#(
  parameter int PW = PHASE_W,   // phase accumulator width
  parameter int OW = TRIG_W     // output width
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 en,
  input  logic [PW-1:0]        phase_inc,
  output logic signed [OW-1:0] cos_out,
  output logic signed [OW-1:0] sin_out
);

  localparam int IW = OW + 4;   // internal x/y width: sign growth + 2 guard bits
  localparam int AW = ANGLE_W;
  localparam int N  = CORDIC_N;
  localparam logic signed [IW-1:0] XINIT =
    IW'($rtoi(((2.0 ** (OW - 1)) - 1.0) * 4.0 * 0.6072529350088813 + 0.5));
  localparam logic signed [IW-1:0] OMAX = IW'((2 ** (OW - 1)) - 1);
  localparam logic signed [IW-1:0] OMIN = -IW'(2 ** (OW - 1));

  logic [PW-1:0]          phase_acc;
  logic signed [IW-1:0]   xs [N+1];
  logic signed [IW-1:0]   ys [N+1];
  logic signed [AW-1:0]   zs [N+1];
  logic                   ng [N+1];

  // Phase of the current sample, folded into [-90, +90) degrees.
  logic [AW-1:0] theta;
  logic          flip;
  assign theta = phase_acc[PW-1 -: AW];
  assign flip  = theta[AW-1] ^ theta[AW-2];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      phase_acc <= '0;
      for (int i = 0; i <= N; i++) begin
        xs[i] <= '0;
        ys[i] <= '0;
        zs[i] <= '0;
        ng[i] <= 1'b0;
      end
    end else if (en) begin
      phase_acc <= phase_acc + phase_inc;
      xs[0] <= XINIT;
      ys[0] <= '0;
      zs[0] <= flip ? signed'({~theta[AW-1], theta[AW-2:0]}) : signed'(theta);
      ng[0] <= flip;
      for (int i = 0; i < N; i++) begin
        if (!zs[i][AW-1]) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - signed'(CORDIC_ATAN[i]);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + signed'(CORDIC_ATAN[i]);
        end
        ng[i+1] <= ng[i];
      end
    end
  end

  // Remove the guard bits (round half up), undo the fold, saturate.
  function automatic logic signed [OW-1:0] finish(logic signed [IW-1:0] v, logic neg);
    logic signed [IW-1:0] r;
    r = (v + IW'(2)) >>> 2;
    if (neg) r = -r;
    if (r > OMAX) r = OMAX;
    if (r < OMIN) r = OMIN;
    return r[OW-1:0];
  endfunction

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      cos_out <= '0;
      sin_out <= '0;
    end else if (en) begin
      cos_out <= finish(xs[N], ng[N]);
      sin_out <= finish(ys[N], ng[N]);
    end
  end

endmodule : cordic_dds
