// tb_ddc_top: end-to-end test bench of the complete down converter at its
// default sizes (14-bit IF in, 16-bit I/Q out, 28-bit tuning word).
//
// Segments, each a few thousand 61.44 MSPS input samples:
//   0  LO at 10 MHz, input tone 300 kHz above it: the output must be a complex
//      tone of amplitude about A/2 * 4 (mixer halves, two extra output bits)
//      turning in the positive direction;
//   1  retune to 15.36 MHz without a reset, tone 500 kHz below, with random
//      clk_enable gaps: same amplitude, negative rotation;
//   2  tone 5 MHz above the LO (adjacent WCDMA carrier): must be rejected by
//      at least 40 dB;
//   3  full-scale negative DC with the LO at a quarter of the sample rate:
//      the mixer products reach +full scale and must saturate.
// Throughout, the mixer outputs are checked bit-exactly against the
// synthesizer words, and every I and Q output against a direct-form model of
// the decimation chain fed with the mixer outputs. Each mechanism (decimated
// output, clk_enable stall, retune, mixer saturation, adjacent-channel
// rejection) is counted and must occur at least once.
// Prints "TB_RESULT checks=N failures=M"; a watchdog ends a hung run.
module tb_ddc_top;
  import ddc_pkg::*;
  `include "ddc_ref.svh"

  localparam real FS = 61.44e6;
  localparam real TWO_PI = 6.283185307179586;
  localparam real AMP = 6000.0;

  logic clk = 1'b0, reset = 1'b1, clk_enable = 1'b0;
  logic signed [13:0] ddc_in = '0;
  logic [27:0] phase_inc = '0;
  logic signed [15:0] ddc_out_i, ddc_out_q;
  logic ce_out;

  always #5 clk = ~clk;

  ddc_top dut (.clk, .reset, .clk_enable, .ddc_in, .phase_inc, .ddc_out_i, .ddc_out_q, .ce_out);

  int checks = 0, failures = 0;
  int segment = 0;
  longint mi[$], mq[$], yi[$], yq[$], ei[$], eq[$];
  int     yseg[$];
  int n_out = 0, n_stall = 0, n_retune = 0, n_sat = 0, n_reject = 0;

  // Mixer check: products of the input and LO words seen at an enabled edge
  // appear at the mixer output one clock later.
  bit     mix_pend = 1'b0;
  longint mix_ei, mix_eq;
  always @(posedge clk) begin
    if (!reset && !clk_enable) n_stall++;
    if (mix_pend) begin
      checks++;
      if (!dut.mix_valid || longint'(dut.mix_i) != mix_ei || longint'(dut.mix_q) != mix_eq) begin
        failures++;
        if (failures < 10) $display("mixer: got %0d %0d expected %0d %0d", dut.mix_i, dut.mix_q, mix_ei, mix_eq);
      end
    end
    if (!reset && dut.mix_valid) begin
      mi.push_back(longint'(dut.mix_i));
      mq.push_back(longint'(dut.mix_q));
    end
    if (!reset && ce_out) begin
      yi.push_back(longint'(ddc_out_i));
      yq.push_back(longint'(ddc_out_q));
      yseg.push_back(segment);
      n_out++;
    end
    mix_pend = !reset && clk_enable;
    if (mix_pend) begin
      longint pi, pq;
      pi = longint'(ddc_in) * longint'(dut.lo_cos);
      pq = -(longint'(ddc_in) * longint'(dut.lo_sin));
      mix_ei = ref_round_sat(pi, 15, 14);
      mix_eq = ref_round_sat(pq, 15, 14);
      if (mix_ei != ((pi + 16384) >>> 15) || mix_eq != ((pq + 16384) >>> 15)) n_sat++;
    end
  end

  function automatic logic [27:0] tuning(real f);
    return 28'($rtoi(f / FS * (2.0 ** 28) + 0.5));
  endfunction

  // Sends n samples of a tone at frequency f (sample counter k keeps the tone
  // continuous across gaps); gaps: probability of an idle clock in percent.
  task automatic tone(real f, int n, int gaps);
    int k;
    k = 0;
    while (k < n) begin
      @(negedge clk);
      if (int'($urandom_range(0, 99)) < gaps) begin
        clk_enable = 1'b0;
      end else begin
        clk_enable = 1'b1;
        ddc_in = 14'($rtoi($floor(AMP * $cos(TWO_PI * f * real'(k) / FS) + 0.5)));
        k++;
      end
    end
  endtask

  // Amplitude and mean rotation of the outputs of one segment (settled part).
  task automatic measure(int seg, output real amp, output real rot);
    int cnt, skip;
    real s, r;
    cnt = 0; skip = 0; s = 0.0; r = 0.0;
    for (int m = 1; m < yi.size(); m++) begin
      if (yseg[m] == seg && yseg[m-1] == seg) begin
        skip++;
        if (skip > 40) begin
          s += $sqrt(real'(yi[m] * yi[m] + yq[m] * yq[m]));
          r += real'(yi[m-1] * yq[m] - yq[m-1] * yi[m]);
          cnt++;
        end
      end
    end
    amp = (cnt > 0) ? s / cnt : 0.0;
    rot = (cnt > 0) ? r / cnt : 0.0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    real amp, rot, want;
    phase_inc = tuning(10.0e6);
    repeat (3) @(negedge clk);
    reset = 1'b0;
    segment = 0;
    tone(10.3e6, 4000, 0);
    segment = 1;
    phase_inc = tuning(15.36e6);
    n_retune++;
    tone(14.86e6, 4000, 25);
    segment = 2;
    tone(20.36e6, 4000, 0);
    segment = 3;
    // Land the phase accumulator on 0, then step a quarter of the sample
    // rate, so the LO words hit exactly +/-1 and 0.
    @(negedge clk);
    clk_enable = 1'b1;
    ddc_in = '0;
    phase_inc = 28'(-dut.u_dds.phase_acc);
    @(negedge clk);
    phase_inc = 28'h400_0000;
    n_retune++;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      clk_enable = 1'b1;
      ddc_in = 14'sh2000;
    end
    @(negedge clk);
    clk_enable = 1'b0;
    repeat (60) @(negedge clk);

    // bit-exact chain check
    ref_chain(14, 16, mi, ei);
    ref_chain(14, 16, mq, eq);
    checks++;
    if (yi.size() != ei.size() || yi.size() != mi.size() / 8) begin
      failures++;
      $display("%0d outputs, %0d expected, %0d mixer samples", yi.size(), ei.size(), mi.size());
    end
    for (int m = 0; m < yi.size() && m < ei.size(); m++) begin
      checks++;
      if (yi[m] != ei[m] || yq[m] != eq[m]) begin
        failures++;
        if (failures < 10) $display("output %0d: got %0d,%0d expected %0d,%0d", m, yi[m], yq[m], ei[m], eq[m]);
      end
    end

    // physical checks
    want = AMP / 2.0 * 4.0;
    measure(0, amp, rot);
    $display("segment 0: amplitude %f (about %f), rotation %f", amp, want, rot);
    checks += 2;
    if (amp < 0.85 * want || amp > 1.15 * want) begin failures++; $display("segment 0 amplitude"); end
    if (rot <= 0.0) begin failures++; $display("segment 0 rotation"); end
    measure(1, amp, rot);
    $display("segment 1: amplitude %f, rotation %f", amp, rot);
    checks += 2;
    if (amp < 0.85 * want || amp > 1.15 * want) begin failures++; $display("segment 1 amplitude"); end
    if (rot >= 0.0) begin failures++; $display("segment 1 rotation"); end
    measure(2, amp, rot);
    $display("segment 2: amplitude %f (adjacent channel)", amp);
    checks++;
    if (amp > want / 100.0) begin failures++; $display("adjacent channel not rejected"); end
    else n_reject++;

    $display("outputs=%0d stalls=%0d retunes=%0d mixer_saturations=%0d rejections=%0d",
             n_out, n_stall, n_retune, n_sat, n_reject);
    checks += 5;
    if (n_out == 0)    begin failures++; $display("no decimated output"); end
    if (n_stall == 0)  begin failures++; $display("no clk_enable stall"); end
    if (n_retune == 0) begin failures++; $display("no retune"); end
    if (n_sat == 0)    begin failures++; $display("no mixer saturation"); end
    if (n_reject == 0) begin failures++; $display("no adjacent-channel rejection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_ddc_top
