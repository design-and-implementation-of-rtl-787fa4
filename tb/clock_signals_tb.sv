// clock_signals_tb: checks the data and hop clock generators.
//
// The codes are raised so that the data wave has a 64-clock period, the
// slow hop clock 256 clocks (four data periods per hop, as with the
// default 4 Hz / 1 Hz codes) and the fast hop clock 16 clocks (four hops
// per data period). Reference accumulators predict every output each
// cycle; the run covers slow mode, a switch to fast mode and a switch back,
// and counts hop ticks per mode against the expected rates.
module clock_signals_tb;
  import fhss_pkg::*;
  localparam fcode_t DC = 32'h0400_0000;  // period 64
  localparam fcode_t SC = 32'h0100_0000;  // period 256
  localparam fcode_t FC = 32'h1000_0000;  // period 16

  logic clk = 1'b0, rst_n = 1'b0;
  hop_mode_e mode = HOP_SLOW;
  logic data_bit, data_tick, hop_wave, hop_tick;
  int checks = 0, failures = 0;

  clock_signals #(.DATA_CODE(DC), .SLOW_CODE(SC), .FAST_CODE(FC)) dut (
    .clk, .rst_n, .mode, .data_bit, .data_tick, .hop_wave, .hop_tick
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [32:0] rd, rs, rf;
  int slow_ticks = 0, fast_ticks = 0;

  task automatic step(int n);
    repeat (n) begin
      logic exp_wave, exp_tick;
      @(posedge clk); #1;
      rd = {1'b0, rd[31:0]} + {1'b0, DC};
      rs = {1'b0, rs[31:0]} + {1'b0, SC};
      rf = {1'b0, rf[31:0]} + {1'b0, FC};
      exp_wave = (mode == HOP_FAST) ? rf[31] : rs[31];
      exp_tick = (mode == HOP_FAST) ? rf[32] : rs[32];
      checks++;
      if (data_bit !== rd[31] || data_tick !== rd[32] ||
          hop_wave !== exp_wave || hop_tick !== exp_tick) begin
        failures++;
        if (failures < 10)
          $display("%0t: data %b/%b tick %b/%b hopw %b/%b hopt %b/%b", $time,
                   data_bit, rd[31], data_tick, rd[32], hop_wave, exp_wave,
                   hop_tick, exp_tick);
      end
      if (hop_tick && mode == HOP_SLOW) slow_ticks++;
      if (hop_tick && mode == HOP_FAST) fast_ticks++;
    end
  endtask

  initial begin
    rd = '0; rs = '0; rf = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    step(1024);                 // slow: 4 hops
    checks++;
    if (slow_ticks != 4) begin failures++; $display("slow ticks %0d", slow_ticks); end
    mode = HOP_FAST;
    step(512);                  // fast: 32 hops
    checks++;
    if (fast_ticks != 32) begin failures++; $display("fast ticks %0d", fast_ticks); end
    mode = HOP_SLOW;
    step(512);                  // back to slow: 2 more hops
    checks++;
    if (slow_ticks != 6) begin failures++; $display("slow ticks %0d", slow_ticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
