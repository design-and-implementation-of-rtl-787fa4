// fsk_demo_tb: the stand-alone 2FSK demonstration at real rates.
//
// A square_gen with code 85899 (2^32 x 1 kHz / 50 MHz) makes a 1 kHz data
// wave that keys an fsk_modulator on a fixed 100 kHz carrier with the
// 10 kHz deviation. Over two data periods (100000 clocks at 50 MHz) the
// mid-scale crossings in each half period must show 100 kHz while the data
// is 0 and 110 kHz while it is 1 (50 and 55 cycles per 0.5 ms), and every
// applied code must be the carrier plus the deviation for a 1.
module fsk_demo_tb;
  import fhss_pkg::*;
  import fhss_ref_pkg::*;
  localparam fcode_t DATA_1K = 32'd85899;

  logic clk = 1'b0, rst_n = 1'b0;
  logic data, data_tick;
  fcode_t code;
  sample_t sample;
  int checks = 0, failures = 0;

  square_gen #(.N(32)) u_data (.clk, .rst_n, .code(DATA_1K), .wave(data), .tick(data_tick));
  fsk_modulator u_mod (.clk, .rst_n, .carrier(khz_code(100)), .data, .code, .sample);

  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ncross [4];
    int half;
    sample_t prev;
    logic prev_data;
    ncross = '{default: 0};
    @(negedge clk) rst_n = 1'b1;
    prev = sample;
    prev_data = data;
    half = 0;
    for (int i = 0; i < 100000; i++) begin
      @(negedge clk);
      // code lags data by one clock
      checks++;
      if (code !== khz_code(100) + (prev_data ? L_DF : 32'd0)) begin
        failures++;
        if (failures < 10) $display("%0t: code %0d with data %b", $time, code, prev_data);
      end
      prev_data = data;
      if (prev < 8'd128 && sample >= 8'd128) ncross[half]++;
      prev = sample;
      if (i % 25000 == 24999) half++;
    end
    // data is 0 in the first half of each 1 kHz period, 1 in the second
    for (int h = 0; h < 4; h++) begin
      int lo, hi;
      lo = (h % 2 == 0) ? 49 : 54;
      hi = (h % 2 == 0) ? 51 : 56;
      checks++;
      if (ncross[h] < lo || ncross[h] > hi) begin
        failures++;
        $display("half period %0d: %0d cycles, expected %0d..%0d", h, ncross[h], lo, hi);
      end else
        $display("half period %0d: %0d carrier cycles", h, ncross[h]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
