// square_gen_tb: checks the phase-accumulator square generator.
//
// A reference accumulator, kept in the testbench, predicts the square wave
// (accumulator MSB) and the wrap tick every cycle. Two codes are used: one
// that divides 2^32 exactly (a tick every 16 clocks, checked as a period)
// and an arbitrary one (ticks must average F_CLK * code / 2^32).
module square_gen_tb;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] code;
  logic        wave, tick;
  int checks = 0, failures = 0;

  square_gen #(.N(32)) dut (.clk, .rst_n, .code, .wave, .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] c, input int cycles, output int nticks,
                     output int last_gap);
    logic [32:0] ref_acc;
    int since;
    code = c;
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    ref_acc = '0;
    nticks = 0; since = 0; last_gap = 0;
    for (int i = 0; i < cycles; i++) begin
      @(posedge clk); #1;
      ref_acc = {1'b0, ref_acc[31:0]} + {1'b0, c};
      since++;
      checks++;
      if (wave !== ref_acc[31] || tick !== ref_acc[32]) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: wave=%b tick=%b expected %b %b", i, wave, tick,
                   ref_acc[31], ref_acc[32]);
      end
      if (tick) begin
        nticks++;
        last_gap = since;
        since = 0;
      end
    end
  endtask

  initial begin
    int n, gap;
    run(32'h1000_0000, 160, n, gap);
    checks++;
    if (n != 10 || gap != 16) begin
      failures++;
      $display("period: %0d ticks, gap %0d, expected 10 and 16", n, gap);
    end
    // 2^32 / 0x0123_4567 = 225.0 clocks per period -> 44 ticks in 10000
    run(32'h0123_4567, 10000, n, gap);
    checks++;
    if (n != 44 || (gap != 225 && gap != 226)) begin
      failures++;
      $display("rate: %0d ticks, gap %0d", n, gap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
