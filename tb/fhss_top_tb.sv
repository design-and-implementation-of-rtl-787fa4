// fhss_top_tb: end-to-end test of the three-user FHSS transmitter at
// raised clock rates.
//
// The data, slow-hop and fast-hop codes are raised so that a data period is
// 4096 clocks, a slow hop 16384 clocks (four data periods, as at the
// default 4 Hz / 1 Hz) and a fast hop 1024 clocks (four hops per data
// period, as at 16 Hz). All other parameters are the defaults. The run
// goes through a full slow hopping cycle (T1..T8 and back to T1), switches
// to fast hopping for more than a full cycle, shortens the hop sequence to
// five frequencies, and switches back to slow. fhss_top_checker compares
// every output every clock; each mechanism must have occurred.
module fhss_top_tb;
  import fhss_pkg::*;
  localparam fcode_t DC = 32'h0010_0000;
  localparam fcode_t SC = 32'h0004_0000;
  localparam fcode_t FC = 32'h0040_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  hop_mode_e mode = HOP_SLOW;
  hop_addr_t hop_last = 3'd7;
  logic data_bit, hop_tick;
  hop_addr_t slot;
  fcode_t carrier [NUM_USERS], code [NUM_USERS];
  sample_t sample [NUM_USERS], dac;
  int tb_checks = 0, tb_failures = 0;
  int checks, failures, slow_hops, fast_hops, full_wraps, short_wraps,
      mode_switches, hops_data1;

  fhss_top #(.DATA_CODE(DC), .SLOW_CODE(SC), .FAST_CODE(FC)) dut (
    .clk, .rst_n, .mode, .hop_last, .data_bit, .hop_tick, .slot,
    .carrier, .code, .sample, .dac
  );

  fhss_top_checker #(.DATA_CODE(DC), .SLOW_CODE(SC), .FAST_CODE(FC)) chk (
    .clk, .rst_n, .mode, .hop_last, .data_bit, .hop_tick, .slot,
    .carrier, .code, .sample, .dac,
    .checks, .failures, .slow_hops, .fast_hops, .full_wraps, .short_wraps,
    .mode_switches, .hops_data1
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + tb_checks, failures + tb_failures + 1);
    $finish;
  end

  // wait for n hop ticks, changing inputs only on falling edges
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
    hops(9);                        // slow: T1..T8, back to T1
    @(negedge clk) mode = HOP_FAST;
    hops(10);                       // fast: more than one full cycle
    @(negedge clk) hop_last = 3'd4; // five frequencies only
    hops(12);
    @(negedge clk) begin hop_last = 3'd7; mode = HOP_SLOW; end
    hops(2);
    repeat (10) @(negedge clk);
    expect_event("slow hops", slow_hops, 11);
    expect_event("fast hops", fast_hops, 22);
    expect_event("full hop cycles", full_wraps, 2);
    expect_event("shortened hop cycles", short_wraps, 2);
    expect_event("mode switches", mode_switches, 2);
    expect_event("hops with data 1", hops_data1, 1);
    expect_event("hops with data 0", slow_hops + fast_hops - hops_data1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks + tb_checks, failures + tb_failures);
    $finish;
  end
endmodule
