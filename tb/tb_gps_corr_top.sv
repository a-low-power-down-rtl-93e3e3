// tb_gps_corr_top: end-to-end test of both engines at their default sizes
// (16-path parallel engine, sequential engine with a 2-slice 22-bit
// accumulator).
//
// Both engines get a synthetic spread-spectrum input: each IF sample is the
// local sine value times the chip of a pseudo-random +-1 code, with a share
// of samples flipped by noise and random magnitudes.  In phase A the local
// code matches the received one, in phase B it is an unrelated code, so the
// matched integrations must come out clearly larger than the unmatched ones
// (the despreading gain).  Every result is also compared exactly with a sum
// computed here, and its arrival cycle with the documented latency.
//
// Mechanisms that must occur, and are counted: parallel dump at a block end,
// dump deferred from inside a block, input gaps, second-stage enable off
// (clock gated) while paths collect, a shifter load on the cycle its last word
// leaves, sequential back-to-back integrations, and a carry passed between
// the two accumulator slices.
module tb_gps_corr_top;
  import gps_pkg::*;

  localparam int NP = 16;

  logic clk = 0, rst_n = 0;

  logic           p_valid = 0, p_dump = 0;
  smag2_t [NP-1:0] p_sig = '0, p_sine = '0;
  logic   [NP-1:0] p_code = '0;
  logic           p_block_last, p_comb_en, p_out_valid, p_overrun;
  logic [21:0]    p_out_sum;

  logic   s_valid = 0, s_dump = 0, s_code = 0;
  smag2_t s_sig = '0, s_sine = '0;
  logic   s_out_valid;
  logic [21:0] s_out_sum;

  gps_corr_top dut (.*);

  int checks = 0, failures = 0;
  int edge_no = 0;

  always #5 clk = ~clk;
  always @(posedge clk) edge_no++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters --------------------------------------------------
  int n_dump_aligned = 0, n_dump_deferred = 0, n_gap = 0, n_gated = 0;
  int n_load_busy = 0, n_seq_b2b = 0, n_seq_carry = 0;

  always @(negedge clk) if (rst_n) begin
    if (!p_comb_en && dut.u_par.blk_cnt != '0) n_gated++;
    if (dut.u_par.p_valid[0] && dut.u_par.u_shift.cnt == 1) n_load_busy++;
    if (dut.u_seq.u_acc.g_slice[0].hin.valid &&
        dut.u_seq.u_acc.g_slice[0].sum[11]) n_seq_carry++;
  end

  // ---- synthetic signal ----------------------------------------------------
  // 16-bit LFSR chip generators: one for the received signal, one unrelated.
  logic [15:0] lfsr_rx = 16'hACE1, lfsr_other = 16'h1234;
  function automatic logic [15:0] lfsr_next(logic [15:0] v);
    return {v[14:0], v[15] ^ v[13] ^ v[12] ^ v[10]};
  endfunction

  // One received sample for a given sine value and chip.
  function automatic smag2_t rx_sample(smag2_t sine, logic chip);
    smag2_t r;
    r.neg = sine.neg ^ chip ^ ($urandom_range(99) < 20);   // 20 % noise flips
    r.big = ($urandom_range(99) < 40);
    return r;
  endfunction

  // ---- reference models and result checks ---------------------------------
  longint p_run = 0, s_run = 0;
  longint p_exp[$], s_exp[$];
  int     p_exp_e[$], s_exp_e[$], p_got = 0, s_got = 0;
  int     p_blk = 0;
  bit     p_pend = 0;
  longint p_res[$], s_res[$];      // results as signed numbers, by phase
  int     p_res_ph[$], s_res_ph[$];
  int     phase = 0;
  int     p_ph_q[$], s_ph_q[$];

  function automatic longint sx22(logic [21:0] v);
    return longint'(signed'(v));
  endfunction

  always @(negedge clk) begin
    if (p_out_valid) begin
      checks += 2;
      if (p_got >= p_exp.size()) begin
        failures++; $display("FAIL parallel: unexpected result");
      end else begin
        if (p_out_sum != 22'(p_exp[p_got])) begin
          failures++;
          $display("FAIL parallel result %0d: %0d expected %0d", p_got, sx22(p_out_sum), p_exp[p_got]);
        end
        if (edge_no != p_exp_e[p_got] + 1 + 1 + NP + 1) begin
          failures++;
          $display("FAIL parallel result %0d at edge %0d, expected %0d", p_got, edge_no,
                   p_exp_e[p_got] + NP + 3);
        end
        p_res.push_back(sx22(p_out_sum));
        p_res_ph.push_back(p_ph_q[p_got]);
      end
      p_got++;
    end
    if (s_out_valid) begin
      checks += 2;
      if (s_got >= s_exp.size()) begin
        failures++; $display("FAIL sequential: unexpected result");
      end else begin
        if (s_out_sum != 22'(s_exp[s_got])) begin
          failures++;
          $display("FAIL sequential result %0d: %0d expected %0d", s_got, sx22(s_out_sum), s_exp[s_got]);
        end
        if (edge_no != s_exp_e[s_got] + 1 + 2) begin
          failures++;
          $display("FAIL sequential result %0d at edge %0d, expected %0d", s_got, edge_no, s_exp_e[s_got] + 3);
        end
        s_res.push_back(sx22(s_out_sum));
        s_res_ph.push_back(s_ph_q[s_got]);
      end
      s_got++;
    end
  end

  // ---- stimulus: one cycle of both engines ----------------------------------
  logic [7:0] nco_p = 0, nco_s = 0;   // sine phase accumulators
  function automatic smag2_t sine_of(logic [7:0] ph);
    smag2_t v;
    v.neg = ph[7];
    v.big = ph[6] ^ ph[7] ? 1'b0 : 1'b1;   // coarse 2-bit sine shape
    return v;
  endfunction

  task automatic cycle(int gap_pct, int p_dump_pct, int s_len_left, bit matched);
    // parallel engine: NP consecutive samples per cycle
    p_valid = ($urandom_range(99) >= gap_pct);
    if (!p_valid) n_gap++;
    p_dump = p_valid && ($urandom_range(99) < p_dump_pct);
    for (int i = 0; i < NP; i++) begin
      logic chip_rx, chip_loc;
      nco_p   += 8'd37;
      lfsr_rx  = lfsr_next(lfsr_rx);
      lfsr_other = lfsr_next(lfsr_other);
      chip_rx  = lfsr_rx[0];
      chip_loc = matched ? chip_rx : lfsr_other[0];
      p_sine[i] = sine_of(nco_p);
      p_sig[i]  = rx_sample(p_sine[i], chip_rx);
      p_code[i] = chip_loc;
      if (p_valid) p_run += smag2_value(p_sig[i]) * smag2_value(p_sine[i]) * (chip_loc ? -1 : 1);
    end
    if (p_valid) begin
      if (p_blk == NP - 1) begin
        if (p_dump || p_pend) begin
          if (p_dump && !p_pend) n_dump_aligned++;
          p_exp.push_back(p_run);
          p_exp_e.push_back(edge_no + 1);
          p_ph_q.push_back(phase);
          p_run = 0;
        end
        p_pend = 0;
        p_blk  = 0;
      end else begin
        if (p_dump && !p_pend) n_dump_deferred++;
        p_pend = p_pend || p_dump;
        p_blk++;
      end
    end

    // sequential engine: one sample per cycle, integration ends when
    // s_len_left reaches 1
    s_valid = ($urandom_range(99) >= gap_pct);
    if (s_valid) begin
      logic chip_rx, chip_loc;
      nco_s   += 8'd21;
      lfsr_rx  = lfsr_next(lfsr_rx);
      lfsr_other = lfsr_next(lfsr_other);
      chip_rx  = lfsr_rx[0];
      chip_loc = matched ? chip_rx : lfsr_other[0];
      s_sine = sine_of(nco_s);
      s_sig  = rx_sample(s_sine, chip_rx);
      s_code = chip_loc;
      s_dump = (s_len_left == 1);
      s_run += smag2_value(s_sig) * smag2_value(s_sine) * (chip_loc ? -1 : 1);
      if (s_dump) begin
        s_exp.push_back(s_run);
        s_exp_e.push_back(edge_no + 1);
        s_ph_q.push_back(phase);
        s_run = 0;
      end
    end else begin
      s_dump = 0;
    end
  endtask

  // run until the sequential integration of len valid samples has closed
  task automatic seq_integration(int len, int gap_pct, int p_dump_pct, bit matched);
    int left;
    left = len;
    while (left > 0) begin
      @(negedge clk);
      cycle(gap_pct, p_dump_pct, left, matched);
      if (s_valid) left--;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 0: matched code, no gaps, long integrations
    phase = 0;
    repeat (8) seq_integration(1000, 0, 2, 1);
    // phase 1: unmatched code
    phase = 1;
    repeat (8) seq_integration(1000, 0, 2, 0);
    // phase 2: gaps, frequent dumps, short and back-to-back integrations
    phase = 2;
    repeat (20) seq_integration(1 + $urandom_range(50), 25, 20, $urandom_range(1));
    repeat (6) begin
      seq_integration(1, 0, 0, 1);
      n_seq_b2b++;
    end
    // close the parallel integration at a block end, then drain
    while (p_blk != NP - 1) begin
      @(negedge clk);
      cycle(0, 0, 0, 1);
    end
    @(negedge clk);
    cycle(0, 100, 0, 1);
    @(negedge clk);
    p_valid = 0; p_dump = 0; s_valid = 0; s_dump = 0;
    repeat (NP + 20) @(negedge clk);

    // ---- result count and despreading gain ----------------------------------
    checks += 2;
    if (p_got != p_exp.size() || p_got < 10) begin
      failures++; $display("FAIL parallel: %0d results, expected %0d", p_got, p_exp.size());
    end
    if (s_got != s_exp.size()) begin
      failures++; $display("FAIL sequential: %0d results, expected %0d", s_got, s_exp.size());
    end
    begin
      longint s_match = 0, s_other = 0;
      for (int i = 0; i < s_res.size(); i++) begin
        if (s_res_ph[i] == 0) s_match += (s_res[i] < 0 ? -s_res[i] : s_res[i]);
        if (s_res_ph[i] == 1) s_other += (s_res[i] < 0 ? -s_res[i] : s_res[i]);
      end
      checks++;
      if (s_match < 4 * s_other) begin
        failures++;
        $display("FAIL sequential despreading gain: matched %0d unmatched %0d", s_match, s_other);
      end
      $display("sequential |sum| matched %0d, unmatched %0d", s_match, s_other);
    end
    begin
      longint p_match = 0, p_other = 0;
      for (int i = 0; i < p_res.size(); i++) begin
        if (p_res_ph[i] == 0) p_match += (p_res[i] < 0 ? -p_res[i] : p_res[i]);
        if (p_res_ph[i] == 1) p_other += (p_res[i] < 0 ? -p_res[i] : p_res[i]);
      end
      checks++;
      if (p_match < 4 * p_other) begin
        failures++;
        $display("FAIL parallel despreading gain: matched %0d unmatched %0d", p_match, p_other);
      end
      $display("parallel |sum| matched %0d, unmatched %0d", p_match, p_other);
    end
    checks++;
    if (p_overrun) begin
      failures++; $display("FAIL parallel overrun");
    end

    // ---- every mechanism must have happened -----------------------------------
    $display("mechanisms: aligned dump %0d, deferred dump %0d, input gap %0d, gated %0d,",
             n_dump_aligned, n_dump_deferred, n_gap, n_gated);
    $display("            load on last word %0d, seq back-to-back %0d, slice carry %0d",
             n_load_busy, n_seq_b2b, n_seq_carry);
    checks += 7;
    if (n_dump_aligned == 0)  begin failures++; $display("FAIL no aligned dump"); end
    if (n_dump_deferred == 0) begin failures++; $display("FAIL no deferred dump"); end
    if (n_gap == 0)           begin failures++; $display("FAIL no input gap"); end
    if (n_gated == 0)         begin failures++; $display("FAIL second stage never gated"); end
    if (n_load_busy == 0)     begin failures++; $display("FAIL no load on last word"); end
    if (n_seq_b2b == 0)       begin failures++; $display("FAIL no back-to-back integration"); end
    if (n_seq_carry == 0)     begin failures++; $display("FAIL no carry between slices"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
