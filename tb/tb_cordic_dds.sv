// tb_cordic_dds: self-checking test bench of the CORDIC synthesizer.
//
// Runs the synthesizer with several tuning words (a retune mid-stream
// included) and with random gaps in the enable. The test bench keeps its own
// phase accumulator and compares every output pair, after the documented
// CORDIC_N + 2 enabled-clock delay, with (2^15 - 1) * cos / sin of the ideal
// phase computed with real arithmetic; the error may not exceed TOL LSB.
// It also checks that all four quadrants were visited.
// Prints "TB_RESULT checks=N failures=M"; a watchdog ends a hung run.
module tb_cordic_dds;
  import ddc_pkg::*;

  localparam int    DLY = CORDIC_N + 2;
  localparam int    TOL = 4;
  localparam real   AMP = 32767.0;
  localparam real   TWO_PI = 6.283185307179586;

  logic clk = 1'b0, reset = 1'b1, en = 1'b0;
  logic [PHASE_W-1:0] phase_inc = '0;
  logic signed [TRIG_W-1:0] cos_out, sin_out;

  always #5 clk = ~clk;

  cordic_dds dut (.clk, .reset, .en, .phase_inc, .cos_out, .sin_out);

  int checks = 0, failures = 0, max_err = 0;
  longint phase_hist[$];     // phase used by the j-th enabled clock
  longint acc = 0;
  int quadrant_seen[4] = '{0, 0, 0, 0};

  // Outputs are checked on the clock after an enabled edge.
  bit check_next = 1'b0;
  always @(posedge clk) begin
    if (check_next) begin
      int j;
      j = phase_hist.size() - DLY;   // phase index the outputs belong to
      if (j >= 0) begin
        real ph, ec, es;
        ph = TWO_PI * real'(phase_hist[j]) / (2.0 ** PHASE_W);
        ec = real'(cos_out) - AMP * $cos(ph);
        es = real'(sin_out) - AMP * $sin(ph);
        if (ec < 0) ec = -ec;
        if (es < 0) es = -es;
        checks++;
        if (int'(ec) > max_err) max_err = int'(ec);
        if (int'(es) > max_err) max_err = int'(es);
        if (ec > TOL || es > TOL) begin
          failures++;
          if (failures < 10)
            $display("phase %0d: cos %0d sin %0d, errors %f %f", phase_hist[j], cos_out, sin_out, ec, es);
        end
        quadrant_seen[2'(phase_hist[j] >> (PHASE_W - 2))]++;
      end
    end
    check_next = !reset && en;
    if (!reset && en) begin
      phase_hist.push_back(acc);
      acc = (acc + longint'(phase_inc)) % (longint'(1) << PHASE_W);
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 15.36 MHz at 61.44 MSPS is a quarter of the sample rate.
  localparam logic [PHASE_W-1:0] INC_15M36 = PHASE_W'(1) << (PHASE_W - 2);

  initial begin : stimulus
    repeat (3) @(negedge clk);
    reset = 1'b0;
    phase_inc = 28'd19_173_962;        // ~4.39 MHz
    en = 1'b1;
    repeat (1000) @(negedge clk);
    phase_inc = INC_15M36 + 28'd12345; // retune without a reset
    repeat (1000) @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      if (n % 500 == 0) phase_inc = PHASE_W'($urandom);
    end
    en = 1'b1;
    repeat (DLY + 4) @(negedge clk);
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quadrant_seen[q] == 0) begin
        failures++;
        $display("quadrant %0d never produced", q);
      end
    end
    $display("max_error=%0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_cordic_dds
