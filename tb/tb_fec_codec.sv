// tb_fec_codec: end-to-end test of the codec at its default sizes.
//
// The encoder's channel stream goes through a channel model into the decoder:
// the model flips chosen channel bits (isolated errors, error pairs as from
// differential PSK, bursts of 2*beta bits with the code's guard space, random
// errors at a bit-error rate of 1e-2) and can drop one channel bit. The
// decoded bits framed by the output S/E MESS are compared with the messages
// sent. Each mechanism of the codec is counted and must occur: every beta
// setting, both parity-delay settings, zero fill of 3*beta+1 slots,
// corrections, burst correction, a resynchronisation after a lost bit, PLL
// lock. The message overhead (channel bits per message) is checked too.
//
// Two more runs use the other units of the top: the burst error generator
// corrupts a long message (beta = 8, bursts of 16 bits), and a processor
// model drives the microprocessor interface: it collects the message bytes
// from the encoder input port, encodes them in software, sends them through
// the encoder output port into the channel (decoded by the hardwired
// decoder), collects the channel bytes at the decoder input port and hands
// the (error-free) byte stream to the decoder output port.
module tb_fec_codec;
  import fec_pkg::*;
  import fec_ref_pkg::*;

  localparam int P = 16;   // system clocks per information bit

  logic clk = 0, rst_n = 0;
  beta_sel_e beta_sel = BETA_4;
  logic pdly_en = 0;
  logic enc_info_tick = 0, enc_data_in = 0, enc_sem_in = 0;
  logic enc_chan_tick, enc_chan_data, enc_sem_out, enc_pll_locked;
  logic dec_chan_tick = 0, dec_chan_data = 0, dec_sem_in = 0;
  logic dec_out_tick, dec_out_data, dec_out_sem, dec_phase, dec_resync, dec_corr;
  logic mp_ei_tick = 0, mp_ei_data = 0, mp_ei_sem = 0, mp_ei_ack = 0;
  logic [7:0] mp_ei_byte, mp_ei_ctrl;
  logic mp_ei_irq, mp_ei_overrun;
  logic mp_di_tick, mp_di_data, mp_di_sem, mp_di_ack = 0;
  logic [7:0] mp_di_byte, mp_di_ctrl;
  logic mp_di_irq, mp_di_overrun;
  logic mp_eo_wr = 0, mp_eo_ack = 0, mp_eo_tick = 0;
  logic [7:0] mp_eo_data = 0, mp_eo_par = 0, mp_eo_ctrl = 0;
  logic mp_eo_chan_data, mp_eo_sem, mp_eo_irq, mp_eo_full;
  logic mp_do_wr = 0, mp_do_ack = 0, mp_do_tick = 0;
  logic [7:0] mp_do_byte = 0, mp_do_ctrl = 0;
  logic mp_do_data, mp_do_sem, mp_do_irq, mp_do_full;
  logic beg_prbs_tick = 1, beg_bit_tick, beg_din;
  logic [4:0] beg_pat_len = 8;
  logic [6:0] beg_burst_len = 16;
  logic beg_burst_en = 1;
  logic beg_dout, beg_err, beg_in_burst;
  bit use_beg = 0;           // burst error generator in the channel
  bit src_mp = 0;            // channel fed by the microprocessor interface
  int n_beg_errs = 0, n_beg_bursts = 0, n_mp_bytes_in = 0, n_mp_bytes_out = 0;
  bitq_t mp_got;             // information bits from the decoder output port

  int checks = 0, failures = 0;
  int n_corr = 0, n_resync = 0, n_chan_errs = 0, n_bursts = 0, n_applied = 0;
  int n_beta[4] = '{0, 0, 0, 0};
  int n_pdly[2] = '{0, 0};
  bitq_t got;
  int chan_len;              // channel bits of the current message
  bit err_mask[int];         // channel bit index -> flip
  int drop_at = -1;          // channel bit index to lose

  fec_codec dut (.*);

  always #5 clk = ~clk;

  initial begin
    #6000000;  // the whole run takes about 200,000 clock cycles
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 1.2 kHz data clock
  initial forever begin
    @(negedge clk) enc_info_tick = 1;
    @(negedge clk) enc_info_tick = 0;
    repeat (P - 2) @(negedge clk);
  end

  // channel model: forward each channel bit one clock after the encoder
  // strobe, with errors and an optional lost bit
  logic tick_q, src_data, src_sem, beg_in_burst_q = 0;
  assign src_data     = src_mp ? mp_eo_chan_data : enc_chan_data;
  assign src_sem      = src_mp ? mp_eo_sem : enc_sem_out;
  assign beg_bit_tick = tick_q && src_sem && use_beg;
  assign beg_din      = src_data;
  // the decoder input port of the processor interface listens to the channel
  assign mp_di_tick   = dec_chan_tick;
  assign mp_di_data   = dec_chan_data;
  assign mp_di_sem    = dec_sem_in;
  always @(posedge clk) if (rst_n) begin
    tick_q <= src_mp ? mp_eo_tick : enc_chan_tick;
    dec_chan_tick <= 1'b0;
    if (beg_err) n_beg_errs++;
    if (beg_bit_tick && beg_in_burst && !beg_in_burst_q) n_beg_bursts++;
    if (beg_bit_tick) beg_in_burst_q <= beg_in_burst;
    if (tick_q) begin
      if (src_sem) begin
        bit flip;
        flip = err_mask.exists(chan_len) || beg_err;
        if (chan_len != drop_at) begin
          dec_chan_tick <= 1'b1;
          dec_chan_data <= src_data ^ flip;
          n_applied <= n_applied + int'(err_mask.exists(chan_len));
          dec_sem_in    <= 1'b1;
        end
        chan_len <= chan_len + 1;
      end else begin
        dec_chan_tick <= 1'b1;
        dec_chan_data <= src_data;
        dec_sem_in    <= 1'b0;
      end
    end
  end

  // bit strobes for the processor interface: output channel at 2.4 kHz,
  // decoder output at 1.2 kHz
  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    mp_eo_tick <= (cyc % (P / 2) == 3);
    mp_do_tick <= (cyc % P == 5);
  end

  // processor model, interrupt side: read input bytes, forward channel bytes
  bitq_t sw_bits;            // message bits read from the encoder input port
  logic do_cap;
  always @(posedge clk) if (rst_n) begin
    mp_ei_ack <= 1'b0;
    mp_di_ack <= 1'b0;
    mp_do_wr  <= 1'b0;
    mp_eo_ack <= mp_eo_irq && !mp_eo_ack;
    mp_do_ack <= mp_do_irq && !mp_do_ack;
    if (mp_ei_irq && !mp_ei_ack) begin
      for (int i = 0; i < 8; i++) if (mp_ei_ctrl[i]) sw_bits.push_back(mp_ei_byte[i]);
      n_mp_bytes_in++;
      mp_ei_ack <= 1'b1;
    end
    if (mp_di_irq && !mp_di_ack && !src_mp) mp_di_ack <= 1'b1;  // not listening
    if (src_mp && mp_di_irq && !mp_di_ack && !mp_do_full && !mp_do_wr) begin
      // no errors on this run: the received byte goes out unchanged
      mp_do_byte <= mp_di_byte;
      mp_do_ctrl <= mp_di_ctrl;
      mp_do_wr   <= 1'b1;
      mp_di_ack  <= 1'b1;
      n_mp_bytes_out++;
    end
    do_cap <= mp_do_tick;
    if (do_cap && mp_do_sem) mp_got.push_back(mp_do_data);
  end

  logic cap;
  always @(posedge clk) if (rst_n) begin
    cap <= dec_out_tick;
    if (dec_resync) n_resync++;
    if (dec_corr) n_corr++;
    if (cap && dec_out_sem) got.push_back(dec_out_data);
  end

  task automatic send(bitq_t msg);
    @(posedge clk iff enc_info_tick);
    foreach (msg[i]) begin
      @(negedge clk);
      enc_data_in = msg[i];
      enc_sem_in  = 1;
      @(posedge clk iff enc_info_tick);
    end
    @(negedge clk);
    enc_sem_in = 0;
    enc_data_in = 0;
  endtask

  // Send one message and check what comes out. tail > 0 compares only the
  // last 'tail' bits (used after a lost channel bit).
  task automatic run(bitq_t msg, int tail, int max_bad, string what);
    int b = beta_of(beta_sel);
    int bad = 0, n;
    got.delete();
    chan_len = 0;
    send(msg);
    repeat ((3 * b + 70) * P) @(negedge clk);
    n_beta[int'(beta_sel)]++;
    n_pdly[pdly_en]++;
    // overhead: 3*beta+1 information slots (+1 with the parity delay)
    checks++;
    if (chan_len != 2 * (msg.size() + 3 * b + 1 + pdly_en)) begin
      failures++; $display("%s: %0d channel bits", what, chan_len);
    end
    if (tail == 0) begin
      checks++;
      if (got.size() != msg.size()) begin
        failures++; $display("%s: %0d bits out of %0d", what, got.size(), msg.size());
      end
    end
    n = (tail > 0) ? tail : msg.size();
    for (int i = 1; i <= n && i <= got.size(); i++)
      if (got[got.size()-i] !== msg[msg.size()-i]) bad++;
    checks++;
    if (bad > max_bad) begin
      failures++; $display("%s: %0d decoded errors", what, bad);
    end
    $display("%s: %0d channel errors, %0d decoded errors", what, err_mask.num(), bad);
    n_chan_errs += err_mask.num();
    err_mask.delete();
    drop_at = -1;
  endtask

  initial begin
    bitq_t msg;
    int b, nch, pos;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4 * P) @(negedge clk);
    checks++;
    if (!enc_pll_locked) begin failures++; $display("PLL not locked"); end

    // every beta, both parity-delay settings: isolated errors and bursts
    for (int s = 0; s < 8; s++) begin
      beta_sel = beta_sel_e'(s % 4);
      pdly_en  = (s >= 4);
      b = beta_of(beta_sel);
      msg = random_msg(300);
      nch = 2 * (msg.size() + 3 * b + 1 + pdly_en);
      // one burst of 2*beta bits, then isolated errors (pairs with the delay)
      pos = 20;
      for (int j = 0; j < 2 * b; j++) err_mask[pos + j] = 1;
      n_bursts++;
      pos += 2 * b + 6 * b + 2;
      while (pos + 1 < nch) begin
        err_mask[pos] = 1;
        if (pdly_en) err_mask[pos + 1] = 1;
        pos += 16 * b + 2;
      end
      run(msg, 0, 0, $sformatf("beta=%0d pdly=%0d", b, pdly_en));
    end

    // random errors at 1e-2 (beta = 16)
    beta_sel = BETA_16; pdly_en = 0;
    msg = random_msg(1500);
    for (int i = 0; i < 2 * (msg.size() + 49); i++)
      if ($urandom_range(99) == 0) err_mask[i] = 1;
    run(msg, 0, 3, "random 1e-2");

    // lost channel bit
    beta_sel = BETA_8; pdly_en = 0;
    msg = random_msg(500);
    drop_at = 301;
    run(msg, 250, 0, "lost bit");
    checks++;
    if (n_resync == 0) begin failures++; $display("no resynchronisation"); end

    // burst error generator in the channel: beta = 8, bursts of 16 bits
    beta_sel = BETA_8; pdly_en = 0;
    use_beg = 1;
    msg = random_msg(4000);
    run(msg, 0, 4, "burst generator");
    use_beg = 0;
    $display("burst generator: %0d errors, %0d bursts", n_beg_errs, n_beg_bursts);
    checks++;
    if (n_beg_errs <= 2 * n_beg_bursts) begin failures++; $display("burst generator made no isolated error"); end
    checks++;
    if (n_beg_bursts == 0) begin failures++; $display("burst generator made no burst"); end

    // microprocessor interface: software encoding, hardware decoding
    beta_sel = BETA_8; pdly_en = 0; b = 8;
    msg = random_msg(203);
    sw_bits.delete();
    mp_got.delete();
    // user data into the encoder input port
    foreach (msg[i]) begin
      @(posedge clk iff enc_info_tick);
      @(negedge clk);
      mp_ei_tick = 1; mp_ei_data = msg[i]; mp_ei_sem = 1;
      @(negedge clk);
      mp_ei_tick = 0;
    end
    repeat (8) begin
      @(posedge clk iff enc_info_tick);
      @(negedge clk);
      mp_ei_tick = 1; mp_ei_data = 0; mp_ei_sem = 0;
      @(negedge clk);
      mp_ei_tick = 0;
    end
    repeat (4) @(negedge clk);
    checks++;
    if (sw_bits.size() != msg.size()) begin
      failures++; $display("processor read %0d message bits of %0d", sw_bits.size(), msg.size());
    end
    // software encoder, then the output port, eight information slots a byte
    src_mp = 1;
    got.delete();
    chan_len = 0;
    begin
      bitq_t ch;
      int nslots;
      ch = encode(sw_bits, b, 0);
      nslots = ch.size() / 2;
      for (int k = 0; k < nslots; k += 8) begin
        bit [7:0] d, p, c;
        for (int i = 0; i < 8; i++) begin
          d[i] = (k + i < nslots) ? ch[2*(k+i)] : 1'b0;
          p[i] = (k + i < nslots) ? ch[2*(k+i)+1] : 1'b0;
          c[i] = (k + i < nslots);
        end
        @(negedge clk iff !mp_eo_full);
        mp_eo_wr = 1; mp_eo_data = d; mp_eo_par = p; mp_eo_ctrl = c;
        @(negedge clk);
        mp_eo_wr = 0;
      end
      repeat ((3 * b + 70) * P + 40 * P) @(negedge clk);
      checks++;
      if (chan_len != ch.size()) begin failures++; $display("mp: %0d channel bits of %0d", chan_len, ch.size()); end
    end
    src_mp = 0;
    checks++;
    if (got.size() != msg.size()) begin failures++; $display("mp: decoder gave %0d bits", got.size()); end
    else foreach (msg[i]) begin
      checks++;
      if (got[i] !== msg[i]) begin
        failures++;
        if (failures < 4) $display("mp: hardwired decoder bit %0d wrong", i);
      end
    end
    // decoder output port: information slots of the channel bytes
    checks++;
    if (mp_got.size() < msg.size()) begin
      failures++; $display("mp: output port gave %0d bits", mp_got.size());
    end else foreach (msg[i]) begin
      checks++;
      if (mp_got[i] !== msg[i]) begin
        failures++;
        if (failures < 8) $display("mp: output port bit %0d wrong", i);
      end
    end
    $display("mp interface: %0d input bytes, %0d output bytes", n_mp_bytes_in, n_mp_bytes_out);
    checks++;
    if (n_mp_bytes_in == 0 || n_mp_bytes_out == 0) begin failures++; $display("mp ports unused"); end

    // mechanisms
    foreach (n_beta[i]) begin
      checks++;
      if (n_beta[i] == 0) begin failures++; $display("beta setting %0d never used", i); end
    end
    foreach (n_pdly[i]) begin
      checks++;
      if (n_pdly[i] == 0) begin failures++; $display("parity delay %0d never used", i); end
    end
    checks++;
    if (n_corr == 0) begin failures++; $display("no corrections"); end
    checks++;
    if (n_bursts == 0) begin failures++; $display("no bursts"); end
    checks++;
    if (n_applied != n_chan_errs) begin failures++; $display("channel model applied %0d errors", n_applied); end
    $display("mechanisms: corrections=%0d resyncs=%0d bursts=%0d channel_errors=%0d applied=%0d",
             n_corr, n_resync, n_bursts, n_chan_errs, n_applied);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
