// tb_fec_encoder: sends messages of random length through the encoder for
// every beta setting, with and without the two-bit parity delay, and compares
// the channel bits framed by the output S/E MESS with the reference encoder.
// Also checks the output rate (two channel bits per information bit) and the
// message overhead of 3*beta+1 information slots (one more with the delay).
module tb_fec_encoder;
  import fec_pkg::*;
  import fec_ref_pkg::*;

  localparam int P = 16;   // system clocks per information bit

  logic clk = 0, rst_n = 0;
  logic info_tick = 0, data_in = 0, sem_in = 0, pdly_en = 0;
  beta_sel_e beta_sel = BETA_4;
  logic chan_tick, chan_data, sem_out, pll_locked;
  int checks = 0, failures = 0;
  int n_info = 0, n_chan = 0;
  bitq_t got;

  fec_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // free-running 1.2 kHz strobe
  initial begin
    forever begin
      @(negedge clk) info_tick = 1;
      @(negedge clk) info_tick = 0;
      repeat (P - 2) @(negedge clk);
    end
  end

  // capture the coded stream one cycle after each channel strobe
  logic cap;
  always @(posedge clk) begin
    cap <= chan_tick;
    if (info_tick) n_info++;
    if (chan_tick) n_chan++;
    if (cap && sem_out) got.push_back(chan_data);
  end

  task automatic send(bitq_t msg);
    foreach (msg[i]) begin
      @(posedge clk iff info_tick);
      @(negedge clk);
      data_in = msg[i];
      sem_in  = 1;
    end
    @(posedge clk iff info_tick);
    @(negedge clk);
    sem_in = 0;
    data_in = 0;
  endtask

  initial begin
    bitq_t msg, exp;
    int b, i0, c0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (4 * P) @(negedge clk);
    checks++;
    if (!pll_locked) begin failures++; $display("PLL not locked"); end
    for (int s = 0; s < 8; s++) begin
      beta_sel = beta_sel_e'(s % 4);
      pdly_en  = (s >= 4);
      b = beta_of_sel(s % 4);
      msg = random_msg(20 + $urandom_range(80));
      exp = encode(msg, b, pdly_en);
      got.delete();
      // align to an information strobe before starting
      @(posedge clk iff info_tick);
      send(msg);
      repeat ((3 * b + 6) * P) @(negedge clk);
      checks++;
      if (got.size() != exp.size()) begin
        failures++;
        $display("beta=%0d pdly=%0d: %0d channel bits, expected %0d", b, pdly_en, got.size(), exp.size());
      end
      checks++;
      if (got.size() != 2 * (msg.size() + 3*b + 1 + pdly_en)) begin
        failures++; $display("overhead wrong");
      end
      for (int i = 0; i < exp.size() && i < got.size(); i++) begin
        checks++;
        if (got[i] !== exp[i]) begin
          failures++;
          if (failures < 10) $display("beta=%0d pdly=%0d bit %0d: %b expected %b", b, pdly_en, i, got[i], exp[i]);
        end
      end
    end
    // rate: two channel strobes per information strobe
    i0 = n_info; c0 = n_chan;
    repeat (100 * P) @(negedge clk);
    checks++;
    if (n_chan - c0 != 2 * (n_info - i0)) begin
      failures++; $display("rate: %0d channel for %0d info strobes", n_chan - c0, n_info - i0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
