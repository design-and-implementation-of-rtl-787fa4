// fhss_ref_pkg: reference values for the testbenches, worked out without
// the RTL: the users' carrier frequencies in kHz, their codes, and the
// expected DAC sample for a phase accumulator value (floating-point sine).
package fhss_ref_pkg;

  // carrier in kHz of user u in hop slot s (T1..T8)
  localparam int KHZ [3][8] = '{
    '{500, 100, 800, 400, 600, 200, 300, 700},
    '{200, 400, 700, 100, 300, 800, 600, 500},
    '{700, 200, 500, 800, 100, 600, 200, 400}
  };

  // code of a multiple of 100 kHz: k * round(2^32 * 100 kHz / 50 MHz)
  function automatic logic [31:0] khz_code(int khz);
    return 32'(longint'(khz) / 100 * 64'd8589935);
  endfunction

  // expected 8-bit sample for accumulator value ph, table of 2^aw words
  function automatic int sine_ref(logic [31:0] ph, int aw);
    int idx;
    real a;
    idx = int'(ph >> (32 - aw));
    a = 128.0 + 127.0 * $sin(2.0 * 3.14159265358979323846 * idx / (2.0 ** aw));
    return $rtoi(a + 0.5);
  endfunction

endpackage
