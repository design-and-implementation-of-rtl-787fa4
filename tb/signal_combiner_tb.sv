// signal_combiner_tb: checks the mixing of the users' samples.
//
// Random samples, plus the all-minimum and all-maximum corners, are
// applied to a three-input combiner; one clock later the sum must equal
// their arithmetic sum and the DAC code the floor of their mean.
module signal_combiner_tb;
  import fhss_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  sample_t samples [3];
  logic [9:0] sum;
  sample_t dac;
  int checks = 0, failures = 0;

  signal_combiner #(.N(3)) dut (.clk, .rst_n, .samples, .sum, .dac);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    samples = '{default: '0};
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int a, b, c;
      a = (i == 0) ? 255 : (i == 1) ? 0 : $urandom_range(0, 255);
      b = (i == 0) ? 255 : (i == 1) ? 0 : $urandom_range(0, 255);
      c = (i == 0) ? 255 : (i == 1) ? 0 : $urandom_range(0, 255);
      samples = '{8'(a), 8'(b), 8'(c)};
      @(posedge clk); #1;
      checks++;
      if (int'(sum) != a + b + c || int'(dac) != (a + b + c) / 3) begin
        failures++;
        if (failures < 10) $display("%0d+%0d+%0d: sum %0d dac %0d", a, b, c, sum, dac);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
