// ddc_mixer: real-to-complex mixer of the down converter.
//
// Multiplies the real IF sample x(n) by the complex exponential
// e^{-j w0 n} = cos(w0 n) - j sin(w0 n), giving the baseband pair
//   i_out = x(n) cos(w0 n),   q_out = -x(n) sin(w0 n).
// The local-oscillator words are signed with amplitude 2^(LO_W-1)-1 (unity);
// each product is divided by 2^(LO_W-1) with round-half-up and saturated
// back to the input width, so I and Q keep the ADC precision.
//
// Interface: en marks a valid x; the products are registered on en and
// out_valid repeats en one clock later (latency 1 clock).
// The equations are the document's; the rounding, saturation and output
// width are this design's choices.
module ddc_mixer
  import ddc_pkg::*;
#(
  parameter int IN_W = DDC_IN_W,   // IF sample width (= I/Q width)
  parameter int LO_W = TRIG_W      // local oscillator width
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic                   en,
  input  logic signed [IN_W-1:0] x,
  input  logic signed [LO_W-1:0] lo_cos,
  input  logic signed [LO_W-1:0] lo_sin,
  output logic                   out_valid,
  output logic signed [IN_W-1:0] i_out,
  output logic signed [IN_W-1:0] q_out
);

  localparam int PW = IN_W + LO_W + 1;
  localparam logic signed [PW-1:0] MAXV = PW'((2 ** (IN_W - 1)) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(2 ** (IN_W - 1));

  function automatic logic signed [IN_W-1:0] scale(logic signed [PW-1:0] p);
    logic signed [PW-1:0] r;
    r = (p + (PW'(1) <<< (LO_W - 2))) >>> (LO_W - 1);
    if (r > MAXV) r = MAXV;
    if (r < MINV) r = MINV;
    return r[IN_W-1:0];
  endfunction

  logic signed [PW-1:0] prod_i, prod_q;
  assign prod_i = PW'(x) * PW'(lo_cos);
  assign prod_q = -(PW'(x) * PW'(lo_sin));

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      i_out     <= '0;
      q_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        i_out <= scale(prod_i);
        q_out <= scale(prod_q);
      end
    end
  end

endmodule : ddc_mixer
