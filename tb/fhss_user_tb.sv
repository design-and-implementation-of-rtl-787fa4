// fhss_user_tb: checks one user's spreader for each of the three users.
//
// Three fhss_user instances, loaded with the three users' hopping tables,
// are stepped through slots T1..T8 with the data bit alternating. For each
// the carrier must be the user's tabulated frequency for the slot, the
// applied code the carrier plus the 2FSK deviation for a 1 (one clock
// later), and the sample must follow a reference DDFS.
module fhss_user_tb;
  import fhss_pkg::*;
  import fhss_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, data = 1'b0;
  hop_addr_t slot = '0;
  fcode_t carrier [3], code [3];
  sample_t sample [3];
  int checks = 0, failures = 0;

  for (genvar u = 0; u < 3; u++) begin : g
    fhss_user #(.TABLE(user_hop_table(u)), .DF_CODE(L_DF), .AW(13)) dut (
      .clk, .rst_n, .slot, .data,
      .carrier(carrier[u]), .code(code[u]), .sample(sample[u])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fcode_t ref_code [3] = '{default: '0};
  fcode_t ref_phase [3] = '{default: '0};

  initial begin
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++)
      for (int s = 0; s < 8; s++) begin
        slot = hop_addr_t'(s);
        for (int c = 0; c < 3000; c++) begin
          if (c % 750 == 0) data = ~data;
          #1;
          for (int u = 0; u < 3; u++) begin
            checks++;
            if (carrier[u] !== khz_code(KHZ[u][s])) begin
              failures++;
              if (failures < 10) $display("user %0d slot %0d: carrier %0d", u, s, carrier[u]);
            end
          end
          @(posedge clk); #1;
          for (int u = 0; u < 3; u++) begin
            int exp_s;
            exp_s = sine_ref(ref_phase[u], 13);
            ref_phase[u] += ref_code[u];
            ref_code[u] = khz_code(KHZ[u][s]) + (data ? 32'd858993 : 32'd0);
            checks++;
            if (code[u] !== ref_code[u] || int'(sample[u]) != exp_s) begin
              failures++;
              if (failures < 10)
                $display("user %0d: code %0d/%0d sample %0d/%0d", u, code[u], ref_code[u],
                         sample[u], exp_s);
            end
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
