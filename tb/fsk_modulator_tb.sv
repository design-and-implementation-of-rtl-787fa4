// fsk_modulator_tb: checks the 2FSK modulator.
//
// The carrier is set to each of the eight hop frequencies and the data bit
// is toggled at random. Reference models predict the applied code (carrier,
// plus 858993 for a 1, one clock after the inputs), the DDFS phase and the
// sample. A steady 100 kHz carrier with data 0 and then 1 is also checked
// for 100 kHz and 110 kHz output by counting mid-scale crossings.
module fsk_modulator_tb;
  import fhss_pkg::*;
  import fhss_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, data = 1'b0;
  fcode_t carrier = '0, code;
  sample_t sample;
  int checks = 0, failures = 0, ones = 0, zeros = 0;

  fsk_modulator #(.DF_CODE(L_DF), .AW(13)) dut (.clk, .rst_n, .carrier, .data, .code, .sample);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fcode_t ref_code = '0, ref_phase = '0;

  task automatic run(int n, bit random_data, output int crossings);
    sample_t prev;
    prev = sample;
    crossings = 0;
    repeat (n) begin
      int exp_s;
      if (random_data && $urandom_range(0, 99) == 0) data = ~data;
      @(posedge clk); #1;
      exp_s = sine_ref(ref_phase, 13);
      ref_phase += ref_code;
      ref_code = carrier + (data ? 32'd858993 : 32'd0);
      if (data) ones++; else zeros++;
      checks++;
      if (code !== ref_code || int'(sample) != exp_s) begin
        failures++;
        if (failures < 10)
          $display("%0t: code %0d/%0d sample %0d/%0d", $time, code, ref_code, sample, exp_s);
      end
      if (prev < 8'd128 && sample >= 8'd128) crossings++;
      prev = sample;
    end
  endtask

  initial begin
    int n;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int k = 1; k <= 8; k++) begin
      carrier = khz_code(100 * k);
      run(2000, 1'b1, n);
    end
    carrier = khz_code(100);
    data = 1'b0;
    run(50000, 1'b0, n);
    checks++;
    if (n < 99 || n > 101) begin failures++; $display("data 0: %0d crossings, expected 100", n); end
    data = 1'b1;
    run(50000, 1'b0, n);
    checks++;
    if (n < 109 || n > 111) begin failures++; $display("data 1: %0d crossings, expected 110", n); end
    checks++;
    if (ones < 1000 || zeros < 1000) begin failures++; $display("data coverage %0d/%0d", ones, zeros); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
