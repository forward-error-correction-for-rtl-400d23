// tb_freq_divider: checks that the two phase strobes alternate on channel
// strobes, that a message start makes the current channel bit an even one,
// and that the output clock follows the selected phase.
module tb_freq_divider;
  logic clk = 0, rst_n = 0, chan_tick = 0, msg_start = 0, phase = 0;
  logic en_odd, en_even, out_tick;
  int checks = 0, failures = 0;

  freq_divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;   // channel bit index since the last message start
    repeat (2) @(negedge clk);
    rst_n = 1;
    idx = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      chan_tick = ($urandom_range(2) == 0);
      msg_start = chan_tick && ($urandom_range(40) == 0);
      if (i % 50 == 0) phase = 1'($urandom);
      if (msg_start) idx = 0;
      #1;
      checks++;
      if (chan_tick) begin
        if (en_odd !== idx[0] || en_even !== !idx[0] || out_tick !== (phase ? !idx[0] : idx[0])) begin
          failures++;
          $display("bit %0d: odd=%b even=%b out=%b phase=%b", idx, en_odd, en_even, out_tick, phase);
        end
        idx++;
      end else if (en_odd || en_even || out_tick) begin
        failures++;
        $display("strobe without channel strobe");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
