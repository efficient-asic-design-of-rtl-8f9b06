// tb_ddc_chain: self-checking test bench of the three-stage decimation chain.
//
// Two chains run side by side on the same stimulus: the 14-bit-in/16-bit-out
// default and the 12-bit-in/12-bit-out variant. Stimulus: a full-scale ramp
// and a rectangular pulse (step response), a linear chirp across the whole
// input band, random samples with clk_enable
// high on every clock, then random samples with clk_enable gaps. Each output
// is compared with a direct-form model of the cascade; with back-to-back
// input every output must appear 13 clocks after the clock that presented
// the 8th sample of its group, and exactly one output must come per 8 inputs.
// The chirp must pass at full amplitude below 1 MHz and be 40 dB down from
// 5.5 to 27 MHz (everything that would alias into the 7.68 MSPS output).
// Prints "TB_RESULT checks=N failures=M"; a watchdog ends a hung run.
module tb_ddc_chain;
  import ddc_pkg::*;
  `include "ddc_ref.svh"

  localparam int LAT = 13;

  logic clk = 1'b0, reset = 1'b1, clk_enable = 1'b0;
  logic signed [13:0] ddc_in = '0;
  logic signed [11:0] ddc_in2;
  logic signed [15:0] ddc_out;
  logic signed [11:0] ddc_out2;
  logic ce_out, ce_out2;

  assign ddc_in2 = ddc_in[13:2];

  always #5 clk = ~clk;

  ddc_chain dut (.clk, .reset, .clk_enable, .ddc_in, .ddc_out, .ce_out);
  ddc_chain #(.IN_W(12), .OUT_W(12)) dut2 (.clk, .reset, .clk_enable,
    .ddc_in(ddc_in2), .ddc_out(ddc_out2), .ce_out(ce_out2));

  int checks = 0, failures = 0;
  longint x1[$], x2[$], y1[$], y2[$], e1[$], e2[$];
  longint cap_edge[$], out_edge[$];
  longint edge_no = 0;
  bit timing_mode = 1'b1;
  int n_lat_ok = 0, n_gap = 0;
  localparam int CHIRP_N = 4000;   // chirp length; frequency = 30.72 MHz * n / CHIRP_N
  int chirp_first = 0;             // index of the first chirp sample

  always @(posedge clk) begin
    edge_no <= edge_no + 1;
    if (!reset && clk_enable) begin
      x1.push_back(longint'(ddc_in));
      x2.push_back(longint'(ddc_in2));
      cap_edge.push_back(edge_no);
    end
    if (!reset && !clk_enable) n_gap++;
    if (!reset && ce_out) begin
      y1.push_back(longint'(ddc_out));
      out_edge.push_back(timing_mode ? edge_no : -1);
    end
    if (!reset && ce_out2) y2.push_back(longint'(ddc_out2));
  end

  task automatic put(longint v, bit en);
    @(negedge clk);
    clk_enable = en;
    ddc_in = 14'(v);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    repeat (3) @(negedge clk);
    reset = 1'b0;
    // pulse and ramp, as a visual step / ramp response
    for (int n = 0; n < 200; n++) put((n >= 40 && n < 120) ? 6000 : 0, 1'b1);
    for (int n = 0; n < 400; n++) put(-8192 + n * 40, 1'b1);
    // linear chirp 0 -> 30.72 MHz: only its pass-band start may come through
    chirp_first = x1.size() + 1;
    for (int n = 0; n < CHIRP_N; n++)
      put(longint'($rtoi($floor(6000.0 * $cos(3.141592653589793 * 0.5 * real'(n) * real'(n) / CHIRP_N) + 0.5))), 1'b1);
    for (int n = 0; n < 1600; n++) put($signed(14'($urandom)), 1'b1);
    put(0, 1'b0);
    repeat (LAT + 8) put(0, 1'b0);
    timing_mode = 1'b0;
    for (int n = 0; n < 1600; n++) put($signed(14'($urandom)), ($urandom_range(0, 2) != 0));
    put(0, 1'b0);
    repeat (LAT + 40) @(negedge clk);

    ref_chain(14, 16, x1, e1);
    ref_chain(12, 12, x2, e2);
    checks += 2;
    if (y1.size() != x1.size() / 8 || y1.size() != e1.size()) begin
      failures++;
      $display("DDC1: %0d outputs for %0d inputs", y1.size(), x1.size());
    end
    if (y2.size() != e2.size()) begin
      failures++;
      $display("DDC2: %0d outputs, %0d expected", y2.size(), e2.size());
    end
    for (int m = 0; m < y1.size() && m < e1.size(); m++) begin
      checks++;
      if (y1[m] != e1[m]) begin
        failures++;
        if (failures < 10) $display("DDC1 output %0d: got %0d expected %0d", m, y1[m], e1[m]);
      end
      if (out_edge[m] >= 0) begin
        checks++;
        if (out_edge[m] - cap_edge[8 * m + 7] != LAT) begin
          failures++;
          if (failures < 10) $display("output %0d latency %0d", m, out_edge[m] - cap_edge[8 * m + 7]);
        end else n_lat_ok++;
      end
    end
    for (int m = 0; m < y2.size() && m < e2.size(); m++) begin
      checks++;
      if (y2[m] != e2[m]) begin
        failures++;
        if (failures < 10) $display("DDC2 output %0d: got %0d expected %0d", m, y2[m], e2[m]);
      end
    end
    // Chirp: outputs whose input frequency (about 150 input samples of group
    // delay back) lies between 5.5 and 27 MHz must be 40 dB below the
    // pass-band amplitude 6000 * 4; those below 1 MHz must be near it.
    begin
      longint peak_stop, peak_pass;
      peak_stop = 0;
      peak_pass = 0;
      for (int m = 0; m < y1.size(); m++) begin
        real f;
        longint a;
        f = 30.72 * real'(8 * m + 7 - 150 - chirp_first) / CHIRP_N;
        a = y1[m] < 0 ? -y1[m] : y1[m];
        if (f > 5.5 && f < 27.0 && a > peak_stop) peak_stop = a;
        if (f > 0.2 && f < 1.0 && a > peak_pass) peak_pass = a;
      end
      $display("chirp: pass-band peak %0d, stop-band peak %0d", peak_pass, peak_stop);
      checks += 2;
      if (peak_pass < 20000 || peak_pass > 28000) begin failures++; $display("chirp pass band"); end
      if (peak_stop > 240) begin failures++; $display("chirp stop band"); end
    end
    checks += 2;
    if (n_lat_ok == 0) begin failures++; $display("latency never checked"); end
    if (n_gap == 0)    begin failures++; $display("no clk_enable gaps"); end
    $display("inputs=%0d outputs=%0d latency_ok=%0d gap_cycles=%0d", x1.size(), y1.size(), n_lat_ok, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_ddc_chain
