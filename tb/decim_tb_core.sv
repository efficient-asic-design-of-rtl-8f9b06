// decim_tb_core: self-checking test bench body shared by the three decimator
// stages (selected by COEF_SET).
//
// Drives the stage with random samples, first one per MIN_GAP clocks, then
// with random extra gaps, then with worst-case sign patterns that drive the
// output into saturation, and finally with a DC level. Every output is
// compared with a direct-form reference, y[m] = sum_k h[k] x[2m+1-k], worked
// out here in 64-bit integers and rounded/saturated the same way the hardware
// promises to. With back-to-back input the output must come exactly LAT
// clocks after the clock that presented the second sample of its pair. The
// DC phase checks the pass-band gain against the ideal 2^(OUT_W-IN_W).
// Prints "TB_RESULT checks=N failures=M" and stops; a watchdog ends a hung run.
module decim_tb_core
  import ddc_pkg::*;
#(
  parameter coef_set_e COEF_SET = CS_HB1,
  parameter int        IN_W     = 14,
  parameter int        OUT_W    = 16,
  parameter int        MIN_GAP  = 1,    // clocks between inputs at full rate
  parameter int        LAT      = 4,    // expected latency (clocks)
  parameter int        NRAND    = 600   // random samples per phase
) ();

  localparam int NTAPS = stage_taps(COEF_SET);
  localparam int SHIFT = COEF_FRAC - (OUT_W - IN_W);
  localparam longint OMAX = (longint'(1) <<< (OUT_W - 1)) - 1;
  localparam longint OMIN = -(longint'(1) <<< (OUT_W - 1));
  localparam longint IMAX = (longint'(1) <<< (IN_W - 1)) - 1;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0]  in_data = '0;
  logic                    out_valid;
  logic signed [OUT_W-1:0] out_data;

  always #5 clk = ~clk;

  if (COEF_SET == CS_HB1) begin : g_dut
    ddc_stage1_hb #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);
  end else if (COEF_SET == CS_HB2) begin : g_dut
    ddc_stage2_hb #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);
  end else begin : g_dut
    ddc_stage3_rrc #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);
  end

  int     checks = 0, failures = 0;
  longint xh [$];          // every accepted input sample
  longint cap_edge [$];    // edge that captured each sample
  int     nout = 0;        // outputs seen
  longint edge_no = 0;
  int     n_sat = 0, n_lat = 0;
  bit     timing_mode = 1'b1;  // back-to-back input: latency is checked

  function automatic longint ref_out(int m);
    longint acc, r;
    int j;
    j = 2 * m + 1;
    acc = 0;
    for (int k = 0; k < NTAPS; k++)
      if (j - k >= 0) acc += longint'(stage_coef(COEF_SET, k)) * xh[j - k];
    r = (SHIFT > 0) ? ((acc + (longint'(1) <<< (SHIFT - 1))) >>> SHIFT) : (acc <<< -SHIFT);
    return r;
  endfunction

  // Monitor: sees pre-edge values, so out_valid here was set at edge-1.
  always @(posedge clk) begin
    edge_no <= edge_no + 1;
    if (!reset && in_valid) begin
      xh.push_back(longint'(in_data));
      cap_edge.push_back(edge_no);
    end
    if (!reset && out_valid) begin
      longint r, e;
      r = ref_out(nout);
      e = r > OMAX ? OMAX : (r < OMIN ? OMIN : r);
      if (r != e) n_sat++;
      checks++;
      if (longint'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("output %0d: got %0d expected %0d", nout, out_data, e);
      end
      if (timing_mode && cap_edge.size() > 2 * nout + 1) begin
        checks++;
        n_lat++;
        if (edge_no - cap_edge[2 * nout + 1] != LAT) begin
          failures++;
          if (failures < 10)
            $display("output %0d: latency %0d, expected %0d", nout, edge_no - cap_edge[2 * nout + 1], LAT);
        end
      end
      nout++;
    end
  end

  task automatic send(longint v, int gap);
    @(negedge clk);
    in_valid = 1'b1;
    in_data  = IN_W'(v);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (gap - 1) @(negedge clk);
  endtask

  // Sends one sample with in_valid left high when the next follows at once.
  task automatic stream(longint v);
    in_valid = 1'b1;
    in_data  = IN_W'(v);
    repeat (MIN_GAP) begin
      @(negedge clk);
      if (MIN_GAP > 1) in_valid = 1'b0;
    end
  endtask

  function automatic longint rnd_sample();
    return longint'($signed(IN_W'($urandom)));
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    longint dc;
    int sent;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    // 1: full-rate random samples, latency checked
    for (int n = 0; n < NRAND; n++) stream(rnd_sample());
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    timing_mode = 1'b0;
    // 2: random gaps
    for (int n = 0; n < NRAND; n++) send(rnd_sample(), MIN_GAP + int'($urandom_range(0, 3)));
    // 3: worst-case patterns: x[j-k] = +/-max * sign(h[k]), both polarities
    for (int s = 0; s < 2; s++) begin
      for (int rep = 0; rep < 3; rep++) begin
        sent = xh.size();
        for (int k = NTAPS - 1; k >= 0; k--) begin
          longint v;
          v = (stage_coef(COEF_SET, k) >= 0) ? IMAX : -IMAX - 1;
          if (s == 1) v = -v - 1;
          send(v, MIN_GAP);
        end
      end
    end
    // 4: DC level, pass-band gain
    dc = IMAX / 3;
    for (int n = 0; n < 2 * NTAPS + 8; n++) send(dc, MIN_GAP);
    repeat (LAT + 4) @(negedge clk);
    begin
      longint ideal, err;
      ideal = dc <<< (OUT_W - IN_W);
      err = longint'(out_data) - ideal;
      if (err < 0) err = -err;
      checks++;
      if (err > 2 + ideal / 4096) begin
        failures++;
        $display("DC gain: got %0d, ideal %0d", out_data, ideal);
      end
    end
    checks++;
    if (nout != xh.size() / 2) begin
      failures++;
      $display("outputs %0d for %0d inputs", nout, xh.size());
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("outputs=%0d latency_checks=%0d saturated=%0d", nout, n_lat, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : decim_tb_core
