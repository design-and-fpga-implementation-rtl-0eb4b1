// tb_cmcu_fir: end-to-end test of the microprogrammed FIR filter at its
// default sizes, through its pins only.
//
// Each run resets the filter, waits idle at address 0, raises start and
// puts W0..W3 on the coefficient bus on four consecutive clocks, then feeds
// samples. A sample is taken on a clock edge where start is high (x_in valid
// with it); y_out must not change on the next edge and must show the new
// output on the one after. Runs: the three published test vectors, then
// random coefficients and samples with random waits and back-to-back
// stretches, compared with a direct convolution modulo 2^16. It counts each
// mechanism (idle hold, coefficient load, delay-line clear, wait for a
// sample, back-to-back samples at 3 clocks each, output wrap-around, restart
// by reset) and fails if one never happens.
module tb_cmcu_fir;
  int checks = 0, failures = 0;
  int n_idle = 0, n_coeff = 0, n_clear = 0, n_wait = 0, n_b2b = 0, n_wrap = 0, n_restart = 0;
  logic clk = 0, reset, start;
  logic [7:0] coeff_in, x_in;
  logic [15:0] y_out;

  cmcu_fir dut (.clk(clk), .reset(reset), .start(start), .coeff_in(coeff_in),
                .x_in(x_in), .y_out(y_out));

  always #5 clk = ~clk;

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [7:0]  h [4];
  logic [7:0]  hist [4];
  logic [15:0] y_prev;
  longint      last_latch;
  bit          first_sample;

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic chk(input logic [15:0] got, input logic [15:0] expv, input string what);
    checks++;
    if (got !== expv) begin
      failures++;
      $display("FAIL %s: y_out %0d expected %0d (cycle %0d)", what, got, expv, cycle);
    end
  endtask

  // Reset, idle for a few clocks, then load the four coefficients.
  task automatic run_start(input logic [7:0] c0, c1, c2, c3, input int idle);
    h = '{c0, c1, c2, c3};
    if (y_prev != 0 || hist[0] != 0) n_restart++;
    reset = 1; start = 0; coeff_in = c0; x_in = 8'($urandom);
    tick();
    reset = 0;
    chk(y_out, 16'd0, "after reset");
    repeat (idle) begin tick(); n_idle++; end
    start = 1; coeff_in = c0; tick();
    start = 1'($urandom); coeff_in = c1; tick();
    coeff_in = c2; tick();
    coeff_in = c3; tick();
    n_coeff += 4;
    coeff_in = 8'($urandom);
    if (hist[1] != 0 || hist[2] != 0 || hist[3] != 0) n_clear++;
    for (int k = 0; k < 4; k++) hist[k] = 0;
    y_prev = 0;
    first_sample = 1;
  endtask

  // One sample; gap = clocks spent waiting with start low first.
  task automatic sample(input logic [7:0] xv, input int gap,
                        input bit use_pub, input logic [15:0] published);
    int     full;
    logic [15:0] expv;
    repeat (gap) begin
      start = 0; x_in = 8'($urandom); tick(); n_wait++;
      chk(y_out, y_prev, "hold while waiting");
    end
    for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = xv;
    full = 0;
    for (int k = 0; k < 4; k++) full += int'(h[k]) * int'(hist[k]);
    expv = 16'(full);
    if (full > 65535) n_wrap++;
    start = 1; x_in = xv; tick();
    start = 1'($urandom); x_in = 8'($urandom); tick();
    chk(y_out, y_prev, "no early output");
    tick();
    chk(y_out, expv, "output");
    if (use_pub) chk(y_out, published, "published output");
    if (gap == 0 && !first_sample) begin
      n_b2b++;
      checks++;
      if (cycle - last_latch != 3) begin
        failures++;
        $display("FAIL back-to-back sample took %0d clocks", cycle - last_latch);
      end
    end
    last_latch = cycle;
    first_sample = 0;
    y_prev = expv;
  endtask

  initial begin
    reset = 1; start = 0; coeff_in = 0; x_in = 0;
    for (int k = 0; k < 4; k++) hist[k] = 0;
    y_prev = 0;
    tick();
    // Published test vectors, back to back.
    run_start(5, 4, 4, 1, 2);
    sample(3, 0, 1, 15);  sample(9, 0, 1, 57);
    sample(7, 0, 1, 83);  sample(7, 0, 1, 102);
    run_start(3, 6, 6, 5, 1);
    sample(2, 0, 1, 6);   sample(10, 2, 1, 42);
    sample(3, 1, 1, 81);  sample(3, 0, 1, 97);
    run_start(1, 2, 2, 1, 0);
    sample(1, 3, 1, 1);   sample(2, 0, 1, 4);
    sample(3, 0, 1, 9);   sample(3, 0, 1, 14);
    // Random runs.
    for (int r = 0; r < 20; r++) begin
      run_start(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), $urandom_range(0, 3));
      for (int i = 0; i < 100; i++)
        sample(8'($urandom), $urandom_range(0, 2) == 0 ? $urandom_range(1, 5) : 0, 0, 0);
    end
    $display("mechanisms: idle=%0d coeff_load=%0d clear=%0d wait=%0d back_to_back=%0d wrap=%0d restart=%0d",
             n_idle, n_coeff, n_clear, n_wait, n_b2b, n_wrap, n_restart);
    if (n_idle == 0)    begin failures++; $display("FAIL idle hold never happened"); end
    if (n_coeff == 0)   begin failures++; $display("FAIL coefficient load never happened"); end
    if (n_clear == 0)   begin failures++; $display("FAIL clear never happened"); end
    if (n_wait == 0)    begin failures++; $display("FAIL wait never happened"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL back-to-back never happened"); end
    if (n_wrap == 0)    begin failures++; $display("FAIL wrap-around never happened"); end
    if (n_restart == 0) begin failures++; $display("FAIL restart never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
