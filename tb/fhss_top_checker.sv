// fhss_top_checker: cycle-accurate reference model and scoreboard for
// fhss_top, shared by the reduced-rate and the full-rate testbenches.
//
// The model is written from the design's equations, not from the RTL: three
// phase accumulators for the data and hop clocks, the hop slot counter, the
// users' carrier tables in kHz, 2FSK codes, DDFS phases with a floating-
// point sine, and the mean of the three samples. It advances on every
// rising clock edge with the inputs the testbench holds there; every DUT
// output is compared on the following falling edge. It also counts the
// mechanisms a run exercised (slow hops, fast hops, full and shortened hop
// sequences, mode switches, data ones and zeros during hops) and checks the
// gap between hops against 2^32 / code clocks.
module fhss_top_checker
  import fhss_pkg::*;
  import fhss_ref_pkg::*;
#(
  parameter fcode_t      DATA_CODE = L_DATA,
  parameter fcode_t      SLOW_CODE = L_H_SLOW,
  parameter fcode_t      FAST_CODE = L_H_FAST,
  parameter int unsigned SINE_AW   = 13
) (
  input  logic      clk,
  input  logic      rst_n,
  input  hop_mode_e mode,
  input  hop_addr_t hop_last,
  input  logic      data_bit,
  input  logic      hop_tick,
  input  hop_addr_t slot,
  input  fcode_t    carrier [NUM_USERS],
  input  fcode_t    code    [NUM_USERS],
  input  sample_t   sample  [NUM_USERS],
  input  sample_t   dac,
  output int        checks,
  output int        failures,
  output int        slow_hops,
  output int        fast_hops,
  output int        full_wraps,
  output int        short_wraps,
  output int        mode_switches,
  output int        hops_data1
);

  logic [32:0] rd, rs, rf;
  logic        t_s, t_f, m_tick;
  hop_addr_t   m_slot;
  fcode_t      m_code  [NUM_USERS];
  fcode_t      m_phase [NUM_USERS];
  int          m_sample[NUM_USERS];
  int          m_dac;
  hop_mode_e   last_mode;
  longint      cyc, last_hop_cyc;

  // hop-gap checks are counted on rising edges, output checks on falling
  int gap_checks = 0, gap_failures = 0, out_checks = 0, out_failures = 0;
  int n_slow = 0, n_fast = 0, n_full = 0, n_short = 0, n_switch = 0, n_data1 = 0;

  assign checks        = gap_checks + out_checks;
  assign failures      = gap_failures + out_failures;
  assign slow_hops     = n_slow;
  assign fast_hops     = n_fast;
  assign full_wraps    = n_full;
  assign short_wraps   = n_short;
  assign mode_switches = n_switch;
  assign hops_data1    = n_data1;

  assign m_tick = (mode == HOP_FAST) ? t_f : t_s;

  function automatic longint period(fcode_t c);
    return (64'd1 << 32) / longint'(c);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; rs <= '0; rf <= '0; t_s <= 1'b0; t_f <= 1'b0;
      m_slot <= '0; m_dac <= 0;
      for (int u = 0; u < NUM_USERS; u++) begin
        m_code[u] <= '0; m_phase[u] <= '0; m_sample[u] <= 128;
      end
      cyc <= 0; last_hop_cyc <= -1; last_mode <= mode;
    end else begin
      int s;
      cyc <= cyc + 1;
      rd  <= {1'b0, rd[31:0]} + {1'b0, DATA_CODE};
      rs  <= {1'b0, rs[31:0]} + {1'b0, SLOW_CODE};
      rf  <= {1'b0, rf[31:0]} + {1'b0, FAST_CODE};
      t_s <= ({1'b0, rs[31:0]} + {1'b0, SLOW_CODE}) >> 32 != 0;
      t_f <= ({1'b0, rf[31:0]} + {1'b0, FAST_CODE}) >> 32 != 0;
      if (mode != last_mode) begin
        n_switch <= n_switch + 1;
        last_hop_cyc  <= -1;
      end
      last_mode <= mode;
      if (m_tick) begin
        if (mode == HOP_FAST) n_fast <= n_fast + 1;
        else                  n_slow <= n_slow + 1;
        if (rd[31]) n_data1 <= n_data1 + 1;
        if (m_slot >= hop_last) begin
          m_slot <= '0;
          if (hop_last == 3'd7) n_full <= n_full + 1;
          else                  n_short <= n_short + 1;
        end else begin
          m_slot <= m_slot + 1'b1;
        end
        // hop spacing: one period of the selected hop clock
        if (last_hop_cyc >= 0 && mode == last_mode) begin
          longint gap, p;
          gap = cyc - last_hop_cyc;
          p   = period(mode == HOP_FAST ? FAST_CODE : SLOW_CODE);
          gap_checks <= gap_checks + 1;
          if (gap != p && gap != p + 1) begin
            gap_failures <= gap_failures + 1;
            $display("hop gap %0d clocks, expected %0d or %0d", gap, p, p + 1);
          end
        end
        if (mode == last_mode) last_hop_cyc <= cyc;
      end
      s = 0;
      for (int u = 0; u < NUM_USERS; u++) begin
        m_code[u]   <= khz_code(KHZ[u][m_slot]) + (rd[31] ? 32'd858993 : 32'd0);
        m_phase[u]  <= m_phase[u] + m_code[u];
        m_sample[u] <= sine_ref(m_phase[u], SINE_AW);
        s += m_sample[u];
      end
      m_dac <= s / NUM_USERS;
    end
  end

  always @(negedge clk) if (rst_n) begin
    int bad;
    bad = 0;
    if (data_bit !== rd[31] || hop_tick !== m_tick || slot !== m_slot) bad++;
    for (int u = 0; u < NUM_USERS; u++) begin
      if (carrier[u] !== khz_code(KHZ[u][m_slot])) bad++;
      if (code[u] !== m_code[u] || int'(sample[u]) != m_sample[u]) bad++;
    end
    if (int'(dac) != m_dac) bad++;
    out_checks <= out_checks + 1;
    if (bad != 0) begin
      out_failures <= out_failures + 1;
      if (out_failures < 10)
        $display("%0t: mismatch: data %b/%b tick %b/%b slot %0d/%0d code0 %0d/%0d smp0 %0d/%0d dac %0d/%0d",
                 $time, data_bit, rd[31], hop_tick, m_tick, slot, m_slot, code[0], m_code[0],
                 sample[0], m_sample[0], dac, m_dac);
    end
  end

endmodule
