// hop_rom_tb: checks the three users' hopping algorithm memories.
//
// One hop_rom per user is loaded with that user's table from fhss_pkg; a
// fourth instance keeps the default contents (the first user). Every word
// is compared with the carrier frequency, in kHz, written out here from
// the hopping tables, converted to a code as kHz / 100 * 8589935.
module hop_rom_tb;
  import fhss_pkg::*;
  int checks = 0, failures = 0;
  hop_addr_t addr;
  fcode_t code [4];

  // carrier in kHz for user u, slot s
  localparam int KHZ [3][8] = '{
    '{500, 100, 800, 400, 600, 200, 300, 700},
    '{200, 400, 700, 100, 300, 800, 600, 500},
    '{700, 200, 500, 800, 100, 600, 200, 400}
  };

  hop_rom #(.TABLE(user_hop_table(0))) u0 (.addr, .code(code[0]));
  hop_rom #(.TABLE(user_hop_table(1))) u1 (.addr, .code(code[1]));
  hop_rom #(.TABLE(user_hop_table(2))) u2 (.addr, .code(code[2]));
  hop_rom                              ud (.addr, .code(code[3]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      addr = hop_addr_t'(s);
      #10;
      for (int u = 0; u < 4; u++) begin
        longint exp_code;
        exp_code = longint'(KHZ[u % 3][s] / 100) * 8589935;
        checks++;
        if (code[u] !== fcode_t'(exp_code)) begin
          failures++;
          $display("user %0d slot %0d: code %0d expected %0d", u, s, code[u], exp_code);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
