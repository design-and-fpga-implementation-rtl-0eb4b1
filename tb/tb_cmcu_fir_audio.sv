// tb_cmcu_fir_audio: the filter used as a real-time audio filter. A 50 MHz
// clock drives the filter, and a sample source presents one 8-bit sample
// per 48 kHz stereo frame (two channels, so a new sample about every 520
// clocks), raising start for one clock with each sample, as a codec
// interface would. The signal is a slow sine plus a fast alternating
// component, and the coefficients {1,2,2,1} smooth it. The testbench checks
// every output against a direct convolution, checks that each output is
// ready within 3 clocks of its sample (well before the next one), and
// checks that the filter strongly attenuates the alternating component.
module tb_cmcu_fir_audio;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int CLK_HZ        = 50_000_000;
  localparam int FRAME_HZ      = 48_000;
  localparam int CLKS_PER_SMP  = CLK_HZ / (2 * FRAME_HZ);   // 520
  localparam int N_SAMPLES     = 400;

  int checks = 0, failures = 0;
  logic clk = 0, reset, start;
  logic [7:0] coeff_in, x_in;
  logic [15:0] y_out;

  cmcu_fir dut (.clk(clk), .reset(reset), .start(start), .coeff_in(coeff_in),
                .x_in(x_in), .y_out(y_out));

  always #10 clk = ~clk;   // 20 ns period: 50 MHz

  logic [7:0] h [4] = '{1, 2, 2, 1};
  logic [7:0] hist [4];
  int hf_in_sum = 0, hf_out_sum = 0;

  task automatic tick();
    @(posedge clk); #1;
  endtask

  // Sample k: a 128-centred sine of period 64 samples plus +-24 alternating.
  function automatic logic [7:0] sample_value(input int k);
    real s;
    s = 100.0 + 60.0 * $sin(2.0 * 3.14159265358979 * k / 64.0) + ((k % 2 == 1) ? 24.0 : -24.0);
    return 8'($rtoi(s));
  endfunction

  initial begin
    int full;
    logic [15:0] expv;
    int x_now, x_prev;
    int y_now, y_prev2;
    reset = 1; start = 0; coeff_in = 0; x_in = 0;
    tick();
    reset = 0;
    start = 1; coeff_in = h[0]; tick();
    start = 0; coeff_in = h[1]; tick();
    coeff_in = h[2]; tick();
    coeff_in = h[3]; tick();
    for (int k = 0; k < 4; k++) hist[k] = 0;
    x_prev = 0; y_prev2 = 0;
    for (int n = 0; n < N_SAMPLES; n++) begin
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = sample_value(n);
      full = 0;
      for (int k = 0; k < 4; k++) full += int'(h[k]) * int'(hist[k]);
      expv = 16'(full);
      start = 1; x_in = hist[0]; tick();
      start = 0; x_in = 8'($urandom);
      tick(); tick();
      checks++;
      if (y_out !== expv) begin
        failures++;
        $display("FAIL sample %0d: y %0d expected %0d", n, y_out, expv);
      end
      // Alternating-component energy: first difference of input and output.
      x_now = int'(hist[0]);
      y_now = int'(y_out);
      if (n >= 8) begin
        hf_in_sum  += (x_now - x_prev) * (x_now - x_prev) * 36;  // output gain is 6
        hf_out_sum += (y_now - y_prev2) * (y_now - y_prev2);
      end
      x_prev = x_now; y_prev2 = y_now;
      // Wait for the next sample period; the output must hold meanwhile.
      repeat (CLKS_PER_SMP - 3) tick();
      checks++;
      if (y_out !== expv) begin
        failures++;
        $display("FAIL sample %0d: output did not hold", n);
      end
    end
    checks++;
    if (hf_out_sum * 10 > hf_in_sum) begin
      failures++;
      $display("FAIL alternating component not attenuated: in %0d out %0d", hf_in_sum, hf_out_sum);
    end
    $display("alternating-component energy, scaled input %0d, output %0d", hf_in_sum, hf_out_sum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_SAMPLES * CLKS_PER_SMP + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
