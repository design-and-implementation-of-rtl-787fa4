// ddfs_tb: checks the phase accumulator and sine output of the DDFS.
//
// A reference phase accumulator predicts the phase every clock and the
// sample one clock later. The code is the 100 kHz carrier, then 800 kHz,
// then 110 kHz (100 kHz plus the 2FSK deviation); the number of upward
// mid-scale crossings in each window checks the output frequency
// F_CLK * L / 2^32 (one per 500 clocks at 100 kHz, one per 62.5 at 800 kHz).
module ddfs_tb;
  import fhss_pkg::*;
  import fhss_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  fcode_t code = '0, phase;
  sample_t sample;
  int checks = 0, failures = 0;

  ddfs #(.AW(13)) dut (.clk, .rst_n, .code, .phase, .sample);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fcode_t ref_phase = '0;

  // run n clocks at code c; return the number of upward crossings of 128
  task automatic run(fcode_t c, int n, output int crossings);
    sample_t prev;
    prev = sample;
    crossings = 0;
    code = c;
    repeat (n) begin
      int exp_s;
      @(posedge clk); #1;
      exp_s = sine_ref(ref_phase, 13);   // ROM reads the old phase
      ref_phase += c;
      checks++;
      if (phase !== ref_phase || int'(sample) != exp_s) begin
        failures++;
        if (failures < 10)
          $display("%0t: phase %h/%h sample %0d/%0d", $time, phase, ref_phase, sample, exp_s);
      end
      if (prev < 8'd128 && sample >= 8'd128) crossings++;
      prev = sample;
    end
  endtask

  initial begin
    int n;
    @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;   // ROM output now holds word 0
    run(khz_code(100), 25000, n);
    checks++;
    if (n < 49 || n > 50) begin failures++; $display("100 kHz: %0d crossings, expected 49-50", n); end
    run(khz_code(800), 25000, n);
    checks++;
    if (n < 399 || n > 401) begin failures++; $display("800 kHz: %0d crossings, expected 400", n); end
    run(khz_code(100) + L_DF, 25000, n);
    checks++;
    if (n < 54 || n > 56) begin failures++; $display("110 kHz: %0d crossings, expected 55", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
