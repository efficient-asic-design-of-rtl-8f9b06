// tb_ddc_mixer: self-checking test bench of the real-to-complex mixer.
//
// Drives random IF samples and random local-oscillator words, with random
// gaps in the enable, plus the corner values that must saturate. Each result
// is compared, one clock later, with x*cos and -x*sin divided by 2^15, rounded
// half up and clamped to 14 bits, computed here in 64-bit integers.
// Prints "TB_RESULT checks=N failures=M"; a watchdog ends a hung run.
module tb_ddc_mixer;
  import ddc_pkg::*;
  `include "ddc_ref.svh"

  logic clk = 1'b0, reset = 1'b1, en = 1'b0;
  logic signed [13:0] x = '0;
  logic signed [15:0] lo_cos = '0, lo_sin = '0;
  logic out_valid;
  logic signed [13:0] i_out, q_out;

  always #5 clk = ~clk;

  ddc_mixer dut (.clk, .reset, .en, .x, .lo_cos, .lo_sin, .out_valid, .i_out, .q_out);

  int checks = 0, failures = 0, n_sat = 0;
  longint exp_i, exp_q;
  bit pending = 1'b0;

  always @(posedge clk) begin
    if (pending) begin
      checks++;
      if (!out_valid || longint'(i_out) != exp_i || longint'(q_out) != exp_q) begin
        failures++;
        if (failures < 10)
          $display("got v=%0d i=%0d q=%0d, expected i=%0d q=%0d", out_valid, i_out, q_out, exp_i, exp_q);
      end
    end else if (!reset) begin
      checks++;
      if (out_valid) begin
        failures++;
        $display("out_valid without en");
      end
    end
    pending = !reset && en;
    if (pending) begin
      longint pi, pq;
      pi = longint'(x) * longint'(lo_cos);
      pq = -(longint'(x) * longint'(lo_sin));
      exp_i = ref_round_sat(pi, 15, 14);
      exp_q = ref_round_sat(pq, 15, 14);
      if (exp_i != ((pi + 16384) >>> 15) || exp_q != ((pq + 16384) >>> 15)) n_sat++;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      en     = ($urandom_range(0, 4) != 0);
      x      = $signed(14'($urandom));
      lo_cos = $signed(16'($urandom));
      lo_sin = $signed(16'($urandom));
      if (n % 100 == 7) begin  // corners: -full scale times -1
        x = 14'sh2000;
        lo_cos = 16'sh8000;
        lo_sin = 16'sh7fff;
        en = 1'b1;
      end
    end
    @(negedge clk);
    en = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("saturated=%0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_ddc_mixer
