// psp_decimator: partially serial pipelined MAC (PSPMAC) FIR decimator by 2.
//
// Computes y[m] = sum_k h[k] * x[2m+1-k] (x[j] = 0 before the first sample
// after reset), i.e. one output for every second input sample: only the
// polyphase outputs that survive decimation are ever computed.
//
// How it works:
//   * A tap delay line shifts on every in_valid. On every second input the
//     whole delay line, new sample included, is copied into an input
//     pipeline register (snapshot), so the delay line is free to take the
//     next samples while the MAC works on the snapshot.
//   * With FOLD = 1 the symmetric coefficients are exploited: pre-adders form
//     x[k] + x[N-1-k], leaving U = ceil(N/2) products; with FOLD = 0 all
//     U = N taps are multiplied.
//   * NMULT multipliers work through the U products in P = ceil(U/NMULT)
//     clock cycles. Products are registered, then summed into an
//     accumulator; after the P-th group the accumulator is rounded
//     (half up) and saturated to OUT_W bits and held in the output register.
//
// Interface: in_valid/in_data take one sample per clock at most; out_valid
// pulses for one clock with each new out_data, which holds until the next.
// Timing: the output appears P+2 clocks after the clock in which the second
// sample of a pair was presented. Throughput rule: the snapshot is reused for
// P cycles, so two sample pairs must be at least P clocks apart, i.e. input
// samples at least ceil(P/2) clocks apart (checked by an assertion).
// Scaling: coefficients are Q1.15; OUT_W - IN_W extra low-order bits are kept
// at the output.
//
// The partially serial MAC, input pipeline register and multiplier counts
// follow the document; folding, the round/saturate rule and the exact
// pipeline are this design's choices. Asynchronous active-high reset.
module psp_decimator
  import ddc_pkg::*;
#(
  parameter coef_set_e COEF_SET = CS_HB1,   // coefficient set from ddc_pkg
  parameter int        NTAPS    = 11,       // number of taps (coefficients)
  parameter int        NMULT    = 3,        // multipliers
  parameter bit        FOLD     = 1'b1,     // pre-add symmetric taps
  parameter int        IN_W     = 14,       // input sample width
  parameter int        OUT_W    = 16        // output sample width
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int U      = FOLD ? (NTAPS + 1) / 2 : NTAPS;  // products per output
  localparam int P      = (U + NMULT - 1) / NMULT;         // MAC cycles per output
  localparam int CYC_W  = (P > 1) ? $clog2(P) : 1;
  localparam int OPD_W  = IN_W + 1;                        // pre-adder output
  localparam int PROD_W = OPD_W + COEF_W;
  localparam int ACC_W  = PROD_W + $clog2(U + 1) + 1;
  localparam int SHIFT  = COEF_FRAC - (OUT_W - IN_W);      // accumulator -> output

  // Coefficient used by multiplier m in MAC cycle c.
  function automatic coef_t slot_coef(int c, int m);
    int u;
    u = c * NMULT + m;
    return (u < U) ? stage_coef(COEF_SET, u) : coef_t'(0);
  endfunction

  // ---------------- delay line and input pipeline register ----------------
  logic signed [IN_W-1:0] dline [NTAPS];
  logic signed [IN_W-1:0] snap  [NTAPS];
  logic                   phase;        // 1: next sample completes a pair
  logic                   load;
  logic                   busy;
  logic [CYC_W-1:0]       cyc;

  assign load = in_valid && phase;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int k = 0; k < NTAPS; k++) begin
        dline[k] <= '0;
        snap[k]  <= '0;
      end
      phase <= 1'b0;
      busy  <= 1'b0;
      cyc   <= '0;
    end else begin
      if (in_valid) begin
        dline[0] <= in_data;
        for (int k = 1; k < NTAPS; k++) dline[k] <= dline[k-1];
        phase <= ~phase;
      end
      if (load) begin
        snap[0] <= in_data;
        for (int k = 1; k < NTAPS; k++) snap[k] <= dline[k-1];
        busy <= 1'b1;
        cyc  <= '0;
      end else if (busy) begin
        if (cyc == CYC_W'(P - 1)) busy <= 1'b0;
        else                      cyc  <= cyc + 1'b1;
      end
    end
  end

  // ---------------- pre-adders, coefficient selection, multipliers ----------------
  logic signed [OPD_W-1:0]  opd  [NMULT];
  coef_t                    coef [NMULT];
  logic signed [PROD_W-1:0] prod_d [NMULT];

  always_comb begin
    for (int m = 0; m < NMULT; m++) begin
      opd[m]  = '0;
      coef[m] = '0;
      for (int c = 0; c < P; c++) begin
        if (cyc == CYC_W'(c)) begin
          coef[m] = slot_coef(c, m);
          if (c * NMULT + m < U) begin
            if (FOLD && (c * NMULT + m) != (NTAPS - 1 - (c * NMULT + m)))
              opd[m] = OPD_W'(snap[c * NMULT + m]) + OPD_W'(snap[NTAPS - 1 - (c * NMULT + m)]);
            else
              opd[m] = OPD_W'(snap[c * NMULT + m]);
          end
        end
      end
      prod_d[m] = opd[m] * coef[m];
    end
  end

  // ---------------- product register ----------------
  logic signed [PROD_W-1:0] prod [NMULT];
  logic                     prod_valid, prod_first, prod_last;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int m = 0; m < NMULT; m++) prod[m] <= '0;
      prod_valid <= 1'b0;
      prod_first <= 1'b0;
      prod_last  <= 1'b0;
    end else begin
      for (int m = 0; m < NMULT; m++) prod[m] <= prod_d[m];
      prod_valid <= busy;
      prod_first <= busy && (cyc == '0);
      prod_last  <= busy && (cyc == CYC_W'(P - 1));
    end
  end

  // ---------------- accumulator, rounding, saturation, output register ----------------
  logic signed [ACC_W-1:0] acc, acc_next, rounded;
  logic signed [OUT_W-1:0] out_next;

  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((2 ** (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(2 ** (OUT_W - 1));

  always_comb begin
    acc_next = prod_first ? '0 : acc;
    for (int m = 0; m < NMULT; m++) acc_next = acc_next + ACC_W'(prod[m]);
    if (SHIFT > 0) rounded = (acc_next + (ACC_W'(1) <<< (SHIFT - 1))) >>> SHIFT;
    else           rounded = acc_next <<< (-SHIFT);
    if (rounded > OUT_MAX)      out_next = OUT_MAX[OUT_W-1:0];
    else if (rounded < OUT_MIN) out_next = OUT_MIN[OUT_W-1:0];
    else                        out_next = rounded[OUT_W-1:0];
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      acc       <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (prod_valid) begin
        acc <= acc_next;
        if (prod_last) begin
          out_data  <= out_next;
          out_valid <= 1'b1;
        end
      end
    end
  end

  // A new pair may only arrive once the MAC has finished the previous one.
  a_throughput : assert property (@(posedge clk) disable iff (reset)
    (load && busy) |-> (cyc == CYC_W'(P - 1)));

endmodule : psp_decimator
