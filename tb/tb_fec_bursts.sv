// tb_fec_bursts: burst-length workload for the codec, in the style of the
// bench tests of the original codec with a burst error generator.
//
// Encoder, burst error generator and decoder are connected as on the test
// bench, all at their default parameters: the generator sits in the channel
// and inverts channel bits. Its sequence steps once per system clock, 128
// steps per channel bit, as a 307.2 kHz generator does against a 2.4 kb/s
// stream. For each setting a long random message is sent with isolated
// errors (pattern length 9, about one event per 512 channel bits) and
// every eighth event a burst of the chosen length. The settings are the
// ones of the original tests: beta = 8 with bursts of 4 to 20 bits, and beta
// = 12 and 16 with bursts of 16 and 20 bits.
//
// Expected, from the code's burst-correcting power (bursts up to 2*beta with
// a guard space of 6*beta+2 bits):
//   - burst <= 2*beta: a clear coding gain, decoded errors at most a fifth
//     of the channel errors; and none at all when no two error events came
//     closer than the guard space (the testbench counts such close pairs);
//   - burst > 2*beta (beta = 8, 20 bits): little or no gain, decoded errors
//     above a fifth of the channel errors.
// Each setting must also have produced at least one burst. A last run has
// random errors only (bursts off, pattern length 5: p = 1/32 per channel
// bit); the decoded error rate there must lie within a factor of three of
// 166*p^3, the rate expected of this code on a random-error channel.
// Decoded bits are compared with the message bit by bit.
module tb_fec_bursts;
  import fec_pkg::*;
  import fec_ref_pkg::*;

  localparam int P = 256;     // system clocks per information bit

  logic clk = 0, rst_n = 0;
  beta_sel_e beta_sel = BETA_8;
  logic pdly_en = 0;
  logic info_tick = 0, data_in = 0, sem_in = 0;
  logic chan_tick, chan_data, sem_out, pll_locked;
  logic dec_tick = 0, dec_data = 0, dec_sem = 0;
  logic out_tick, out_data, out_sem, phase, resync, corr_ev;
  logic bit_tick, beg_dout, err, in_burst;
  logic [4:0] pat_len = 9;
  logic [6:0] burst_len = 16;
  logic burst_en = 1;
  int checks = 0, failures = 0;
  int n_err = 0, n_bursts = 0;
  int guard = 26;            // 6*beta+2 for the setting being run
  int idx = 0, last_err = -100000, n_close = 0;
  logic in_burst_q = 0;
  bitq_t got;

  fec_encoder u_enc (
    .clk, .rst_n, .info_tick, .data_in, .sem_in, .beta_sel, .pdly_en,
    .chan_tick, .chan_data, .sem_out, .pll_locked
  );

  assign bit_tick = chan_tick && sem_out;

  burst_error_gen u_beg (
    .clk, .rst_n,
    .prbs_tick (1'b1),
    .bit_tick,
    .din       (chan_data),
    .pat_len, .burst_len,
    .burst_en  (burst_en),
    .dout      (beg_dout),
    .err, .in_burst
  );

  fec_decoder u_dec (
    .clk, .rst_n,
    .chan_tick (dec_tick),
    .chan_data (dec_data),
    .sem_in    (dec_sem),
    .beta_sel, .pdly_en,
    .out_tick, .out_data, .out_sem, .phase, .resync, .corr_ev
  );

  always #5 clk = ~clk;

  initial begin
    #2000000000;   // 200 M clock cycles; the run needs about 45 M
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 1.2 kHz data strobe
  int div = 0;
  always @(posedge clk) if (rst_n) begin
    div <= (div == P - 1) ? 0 : div + 1;
    info_tick <= (div == 0);
  end

  // channel: one clock of delay, errors from the generator
  always @(posedge clk) if (rst_n) begin
    dec_tick <= chan_tick;
    if (chan_tick) begin
      dec_data <= bit_tick ? beg_dout : chan_data;
      dec_sem  <= sem_out;
    end
    if (err) begin
      n_err++;
      if (idx - last_err > 1 && idx - last_err <= guard) n_close++;
      last_err <= idx;
    end
    if (bit_tick) begin
      idx <= idx + 1;
      in_burst_q <= in_burst;
      if (in_burst && !in_burst_q) n_bursts++;
    end
  end

  // decoded message
  logic cap = 0;
  always @(posedge clk) if (rst_n) begin
    cap <= out_tick;
    if (cap && out_sem) got.push_back(out_data);
  end

  task automatic run(int beta, int blen, int nbits);
    bitq_t msg;
    int bad = 0, e0, b0, c0;
    bit ok;
    beta_sel  = beta_sel_e'(beta / 4 - 1);
    burst_len = 7'(blen);
    msg = random_msg(nbits);
    got.delete();
    e0 = n_err;
    b0 = n_bursts;
    c0 = n_close;
    guard = 6 * beta + 2;
    foreach (msg[i]) begin
      @(posedge clk iff info_tick);
      @(negedge clk);
      data_in = msg[i];
      sem_in  = 1'b1;
    end
    @(posedge clk iff info_tick);
    @(negedge clk);
    sem_in = 1'b0;
    data_in = 1'b0;
    repeat ((3 * beta + 70) * P) @(negedge clk);
    checks++;
    if (got.size() != msg.size()) begin
      failures++;
      $display("beta=%0d burst=%0d: %0d bits decoded of %0d", beta, blen, got.size(), msg.size());
    end
    for (int i = 0; i < msg.size() && i < got.size(); i++)
      if (got[i] !== msg[i]) bad++;
    $display("beta=%0d burst=%2d: %0d bursts, %0d channel errors, %0d events closer than the guard space, %0d decoded errors",
             beta, blen, n_bursts - b0, n_err - e0, n_close - c0, bad);
    checks++;
    if (n_bursts == b0) begin failures++; $display("  no burst happened"); end
    checks++;
    if (blen <= 2 * beta) ok = (bad * 5 <= n_err - e0) && (n_close > c0 || bad == 0);
    else                  ok = (bad * 5 > n_err - e0);
    if (!ok) begin failures++; $display("  not as expected for this burst length"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4 * P) @(negedge clk);
    run(8, 4, 16000);
    run(8, 8, 16000);
    run(8, 12, 16000);
    run(8, 16, 16000);
    run(8, 20, 16000);
    run(12, 16, 16000);
    run(12, 20, 16000);
    run(16, 16, 16000);
    run(16, 20, 16000);
    begin
      // random errors only, beta = 8
      real p, expect_ber, ber;
      int bad, e0;
      bitq_t msg;
      burst_en = 0;
      pat_len = 5;
      beta_sel = BETA_8;
      msg = random_msg(16000);
      got.delete();
      e0 = n_err;
      foreach (msg[i]) begin
        @(posedge clk iff info_tick);
        @(negedge clk);
        data_in = msg[i];
        sem_in  = 1'b1;
      end
      @(posedge clk iff info_tick);
      @(negedge clk);
      sem_in = 1'b0;
      data_in = 1'b0;
      repeat (100 * P) @(negedge clk);
      bad = 0;
      for (int i = 0; i < msg.size() && i < got.size(); i++)
        if (got[i] !== msg[i]) bad++;
      p = real'(n_err - e0) / real'(2 * (msg.size() + 25));
      expect_ber = 166.0 * p * p * p;
      ber = real'(bad) / real'(msg.size());
      $display("random errors: channel p = %.4f, decoded b.e.r. = %.5f, 166p^3 = %.5f", p, ber, expect_ber);
      checks++;
      if (got.size() != msg.size() || ber > 3.0 * expect_ber || ber < expect_ber / 3.0) begin
        failures++; $display("  decoded error rate out of range");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
