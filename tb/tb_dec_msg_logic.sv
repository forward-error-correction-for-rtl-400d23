// tb_dec_msg_logic: runs messages of known length and checks that the
// decoder registers are held clear between messages, that the first
// 3*beta+1 (+1 with the parity delay) outputs of a phase are not tagged as
// data and all later ones inside the message are, and that the message start
// is flagged on the first channel bit only.
module tb_dec_msg_logic;
  import fec_pkg::*;
  logic clk = 0, rst_n = 0, chan_tick = 0, sem_in = 0, pdly_en = 0, en0 = 0, en1 = 0;
  beta_sel_e beta_sel = BETA_4;
  logic clr, msg_start, feed0, feed1, valid0, valid1;
  int checks = 0, failures = 0;

  dec_msg_logic dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      int b, first, len, k0, k1;
      beta_sel = beta_sel_e'(s % 4);
      pdly_en = (s >= 4);
      b = 4 * (s % 4 + 1);
      first = 3 * b + 1 + (pdly_en ? 1 : 0);
      len = 2 * (first + 10 + $urandom_range(20));
      // idle channel bits
      repeat (3) begin
        @(negedge clk); chan_tick = 1; sem_in = 0; en0 = 0; en1 = 1; #1;
        chk(clr && !feed0 && !feed1 && !msg_start, "idle not cleared");
        @(negedge clk); chan_tick = 0; en1 = 0;
      end
      k0 = 0; k1 = 0;
      for (int t = 0; t < len; t++) begin
        @(negedge clk);
        chan_tick = 1; sem_in = 1; en0 = t[0]; en1 = !t[0];
        #1;
        chk(msg_start == (t == 0), "message start");
        chk(!clr, "clear inside message");
        chk(feed0 == t[0] && feed1 == !t[0], "feed strobes");
        @(negedge clk);
        chan_tick = 0; en0 = 0; en1 = 0;
        if (t[0]) begin chk(valid0 == (k0 >= first), $sformatf("valid0 at pair %0d", k0)); k0++; end
        else      begin chk(valid1 == (k1 >= first), $sformatf("valid1 at pair %0d", k1)); k1++; end
      end
      // after the message nothing is tagged
      @(negedge clk); chan_tick = 1; sem_in = 0; en0 = 0; en1 = 1;
      @(negedge clk); chan_tick = 0; en1 = 0;
      chk(!valid1, "valid after message");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
