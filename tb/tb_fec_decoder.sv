// tb_fec_decoder: feeds reference-encoded channel streams into the decoder
// and checks the bits framed by the output S/E MESS against the message:
//   - every beta setting, with and without the two-bit parity delay, with
//     isolated channel errors (and error pairs when the delay is used, as
//     differential PSK produces them);
//   - decoding latency of 3*beta+1 (+1 with the delay) + 50 information bits;
//   - a channel bit lost in mid-message: the bit synchronizer must move to
//     the other phase and the end of the message must come out right;
//   - output clock at half the channel rate.
module tb_fec_decoder;
  import fec_pkg::*;
  import fec_ref_pkg::*;

  localparam int H = 8;   // system clocks per channel bit

  logic clk = 0, rst_n = 0;
  logic chan_tick = 0, chan_data = 0, sem_in = 0, pdly_en = 0;
  beta_sel_e beta_sel = BETA_4;
  logic out_tick, out_data, out_sem, phase, resync, corr_ev;
  int checks = 0, failures = 0;
  int n_chan = 0, n_out = 0, resyncs = 0, corrs = 0;
  int first_out_at = -1;
  bitq_t got;

  fec_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel strobe
  initial forever begin
    @(negedge clk) chan_tick = 1;
    @(negedge clk) chan_tick = 0;
    repeat (H - 2) @(negedge clk);
  end

  logic cap;
  always @(posedge clk) if (rst_n) begin
    cap <= out_tick;
    if (chan_tick) n_chan++;
    if (out_tick) n_out++;
    if (resync) resyncs++;
    if (corr_ev) corrs++;
    if (cap && out_sem) begin
      if (got.size() == 0) first_out_at = n_chan;
      got.push_back(out_data);
    end
  end

  // Put one channel stream on the line, framed by S/E MESS.
  task automatic send(bitq_t ch, output int start_at);
    start_at = -1;
    foreach (ch[i]) begin
      @(posedge clk iff chan_tick);
      if (start_at < 0) start_at = n_chan;
      @(negedge clk);
      chan_data = ch[i];
      sem_in = 1;
    end
    @(posedge clk iff chan_tick);
    @(negedge clk);
    sem_in = 0;
    chan_data = 0;
  endtask

  task automatic compare(bitq_t msg, int from_end, string what);
    int bad = 0;
    int n = (from_end > 0) ? from_end : msg.size();
    checks++;
    if (from_end == 0 && got.size() != msg.size()) begin
      failures++;
      $display("%s: %0d bits out, expected %0d", what, got.size(), msg.size());
    end
    for (int i = 1; i <= n && i <= got.size(); i++) begin
      checks++;
      if (got[got.size()-i] !== msg[msg.size()-i]) begin bad++; if (bad < 4) $display("  idx %0d of %0d", msg.size()-i, msg.size()); end
    end
    failures += bad;
    if (bad != 0) $display("%s: %0d wrong bits", what, bad);
  endtask

  initial begin
    bitq_t msg, ch;
    int b, st, lat, o0, c0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (10 * H) @(negedge clk);
    for (int s = 0; s < 8; s++) begin
      beta_sel = beta_sel_e'(s % 4);
      pdly_en  = (s >= 4);
      b = beta_of_sel(s % 4);
      msg = random_msg(150 + $urandom_range(100));
      ch = encode(msg, b, pdly_en);
      for (int p = 2 * $urandom_range(10) + 5; p + 2 < ch.size(); p += 16 * b + $urandom_range(9)) begin
        ch[p] = ~ch[p];
        if (pdly_en) ch[p+1] = ~ch[p+1];   // differential PSK error pair
      end
      got.delete();
      send(ch, st);
      repeat (2 * (3 * b + 60) * H) @(negedge clk);
      compare(msg, 0, $sformatf("beta=%0d pdly=%0d", b, pdly_en));
      // latency in information periods from the first channel bit
      lat = (first_out_at - st) / 2;
      checks++;
      if (lat < 3*b + 1 + pdly_en + 50 || lat > 3*b + 1 + pdly_en + 53) begin
        failures++;
        $display("beta=%0d pdly=%0d: latency %0d information periods", b, pdly_en, lat);
      end
    end
    checks++;
    if (corrs == 0) begin failures++; $display("no corrections seen"); end
    // lost channel bit
    beta_sel = BETA_8; pdly_en = 0; b = 8;
    msg = random_msg(600);
    ch = encode(msg, b, 0);
    ch.delete(2 * 180 + 1);
    got.delete();
    send(ch, st);
    checks++;
    if (phase !== 1'b1) begin failures++; $display("phase not moved after bit loss"); end
    repeat (2 * (3 * b + 60) * H) @(negedge clk);
    checks++;
    if (resyncs != 1) begin failures++; $display("%0d resyncs, expected 1", resyncs); end
    compare(msg, 250, "after bit loss");
    // output clock rate
    o0 = n_out; c0 = n_chan;
    repeat (200 * H) @(negedge clk);
    checks++;
    if (2 * (n_out - o0) < (n_chan - c0) - 1 || 2 * (n_out - o0) > (n_chan - c0) + 1) begin
      failures++; $display("output rate %0d for %0d channel bits", n_out - o0, n_chan - c0);
    end
    $display("corrections=%0d resyncs=%0d", corrs, resyncs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
