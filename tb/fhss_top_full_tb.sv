// fhss_top_full_tb: the FHSS transmitter at its real rates.
//
// fhss_top runs with all parameters at their defaults: 50 MHz clock, 4 Hz
// data, 16 Hz fast hops and 1 Hz slow hops. The test runs one complete fast
// hopping cycle (T1..T8 and back to T1, 0.5 s of signal, about 25 million
// clocks), then switches to slow hopping and runs one complete slow cycle
// (8 s, 400 million clocks; a few minutes of simulation). fhss_top_checker compares every output on every clock and
// checks each hop interval against 2^32 / code clocks.
module fhss_top_full_tb;
  import fhss_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  hop_mode_e mode = HOP_FAST;
  hop_addr_t hop_last = 3'd7;
  logic data_bit, hop_tick;
  hop_addr_t slot;
  fcode_t carrier [NUM_USERS], code [NUM_USERS];
  sample_t sample [NUM_USERS], dac;
  int tb_checks = 0, tb_failures = 0;
  int checks, failures, slow_hops, fast_hops, full_wraps, short_wraps,
      mode_switches, hops_data1;

  fhss_top dut (
    .clk, .rst_n, .mode, .hop_last, .data_bit, .hop_tick, .slot,
    .carrier, .code, .sample, .dac
  );

  fhss_top_checker chk (
    .clk, .rst_n, .mode, .hop_last, .data_bit, .hop_tick, .slot,
    .carrier, .code, .sample, .dac,
    .checks, .failures, .slow_hops, .fast_hops, .full_wraps, .short_wraps,
    .mode_switches, .hops_data1
  );

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (460_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + tb_checks, failures + tb_failures + 1);
    $finish;
  end

  task automatic hops(int n);
    repeat (n) begin
      do @(negedge clk); while (!hop_tick);
    end
  endtask

  task automatic expect_event(string what, int count, int min);
    tb_checks++;
    if (count < min) begin
      tb_failures++;
      $display("%s happened %0d times, expected at least %0d", what, count, min);
    end else
      $display("%s: %0d", what, count);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    hops(8);                           // fast: T1 -> T2 ... T8 -> T1
    repeat (10) @(negedge clk);
    expect_event("fast hops", fast_hops, 8);
    expect_event("full hop cycles", full_wraps, 1);
    @(negedge clk) mode = HOP_SLOW;
    hops(8);                           // slow: T1 -> T2 ... T8 -> T1
    repeat (10) @(negedge clk);
    expect_event("slow hops", slow_hops, 8);
    expect_event("full hop cycles", full_wraps, 2);
    expect_event("mode switches", mode_switches, 1);
    $display("simulated %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks + tb_checks, failures + tb_failures);
    $finish;
  end
endmodule
