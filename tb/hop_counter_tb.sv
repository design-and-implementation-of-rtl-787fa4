// hop_counter_tb: checks the hop slot counter.
//
// Ticks are applied at random; a reference count predicts the slot after
// every clock. The run uses all eight slots (last = 7), then shorter
// hopping sequences (last = 4 and last = 0), including lowering `last`
// below the current slot, and checks that a wrap to 0 happened.
module hop_counter_tb;
  logic clk = 1'b0, rst_n = 1'b0, hop_tick = 1'b0;
  logic [2:0] last = 3'd7, addr;
  int checks = 0, failures = 0, wraps = 0;
  logic [2:0] ref_addr = '0;

  hop_counter #(.W(3)) dut (.clk, .rst_n, .hop_tick, .last, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int n);
    repeat (n) begin
      hop_tick = ($urandom_range(0, 2) == 0);
      @(posedge clk); #1;
      if (hop_tick) begin
        if (ref_addr >= last) begin ref_addr = '0; wraps++; end
        else ref_addr = ref_addr + 3'd1;
      end
      checks++;
      if (addr !== ref_addr) begin
        failures++;
        if (failures < 10) $display("%0t: addr %0d expected %0d", $time, addr, ref_addr);
      end
    end
  endtask

  initial begin
    @(posedge clk); #1;
    checks++;
    if (addr !== 3'd0) begin failures++; $display("reset addr %0d", addr); end
    rst_n = 1'b1;
    // all eight slots, in order: 0,1,..,7,0
    for (int i = 1; i <= 8; i++) begin
      hop_tick = 1'b1;
      @(posedge clk); #1;
      hop_tick = 1'b0;
      checks++;
      if (addr !== 3'(i % 8)) begin
        failures++; $display("sequence: addr %0d expected %0d", addr, i % 8);
      end
    end
    step(500);
    last = 3'd4;
    step(500);
    last = 3'd0;
    step(100);
    last = 3'd7;
    step(300);
    checks++;
    if (wraps < 10) begin failures++; $display("only %0d wraps", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
