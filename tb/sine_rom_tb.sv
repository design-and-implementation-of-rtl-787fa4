// sine_rom_tb: checks every word of the DDFS sine table.
//
// All 8192 addresses are read through the synchronous port and compared
// with round(128 + 127 * sin(2*pi*i/8192)) computed here in floating
// point. The one-clock read latency is checked by presenting a new
// address before each clock edge and comparing right after it.
module sine_rom_tb;
  localparam int AW = 13;
  logic clk = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [7:0] data;
  int checks = 0, failures = 0;

  sine_rom #(.AW(AW), .DW(8)) dut (.clk, .addr, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int i);
    real a;
    a = 128.0 + 127.0 * $sin(2.0 * 3.14159265358979323846 * i / (1 << AW));
    return $rtoi(a + 0.5);
  endfunction

  initial begin
    int minv = 255, maxv = 0;
    for (int i = 0; i < (1 << AW); i++) begin
      addr = AW'(i);
      @(posedge clk); #1;     // word i is on `data` one clock edge later
      checks++;
      if (int'(data) != expected(i)) begin
        failures++;
        if (failures < 10) $display("addr %0d: %0d expected %0d", i, data, expected(i));
      end
      if (int'(data) < minv) minv = int'(data);
      if (int'(data) > maxv) maxv = int'(data);
    end
    checks++;
    if (minv != 1 || maxv != 255) begin
      failures++; $display("range %0d..%0d, expected 1..255", minv, maxv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
