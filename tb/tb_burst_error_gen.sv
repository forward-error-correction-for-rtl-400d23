// tb_burst_error_gen: compares the generator's errors with a model of the
// same 36-bit sequence (x^36 + x^25 + 1), bit by bit, and checks that bursts
// have exactly the selected length, that roughly one error event in eight
// is a burst, and that the isolated-error rate follows 2**-pat_len.
module tb_burst_error_gen;
  logic clk = 0, rst_n = 0, prbs_tick = 0, bit_tick = 0, din = 0, burst_en = 1;
  logic [4:0] pat_len = 6;
  logic [6:0] burst_len = 16;
  logic dout, err, in_burst;
  int checks = 0, failures = 0;

  burst_error_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [35:0] m = 36'h0_1234_5678;
    int left = 0, run = 0, events = 0, bursts = 0, nerr = 0, nbits = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cfg = 0; cfg < 3; cfg++) begin
      pat_len   = (cfg == 2) ? 5'd4 : 5'd6;
      burst_len = (cfg == 0) ? 7'd16 : (cfg == 1 ? 7'd64 : 7'd1);
      events = 0; bursts = 0; nerr = 0; nbits = 0;
      for (int i = 0; i < 40000; i++) begin
        bit hit, second, exp_err;
        @(negedge clk);
        // three sequence steps between data bits
        prbs_tick = (i % 4 != 0);
        bit_tick  = (i % 4 == 0);
        din = 1'($urandom);
        #1;
        if (bit_tick) begin
          bit [30:0] mask;
          mask = 31'((32'd1 << pat_len) - 1);
          hit = ((m[30:0] & mask) == mask);
          second = (m[35:33] == 3'b111);
          exp_err = (left > 0) || hit;
          nbits++;
          if (left == 0 && hit) begin
            events++;
            if (second) begin bursts++; left = burst_len; end
          end
          if (left > 0) left--;
          checks++;
          if (err !== exp_err || dout !== (din ^ exp_err)) begin
            failures++;
            if (failures < 10) $display("bit %0d: err %b expected %b", nbits, err, exp_err);
          end
          nerr += exp_err;
          // length of runs of inverted bits inside bursts
          if (in_burst) run++;
          else if (run != 0) begin
            checks++;
            if (run != burst_len && burst_len > 1) begin failures++; $display("burst of %0d bits", run); end
            run = 0;
          end
        end
        if (prbs_tick) m = {m[34:0], m[35] ^ m[24]};
      end
      $display("pat_len=%0d burst_len=%0d: %0d events, %0d bursts, %0d errors in %0d bits",
               pat_len, burst_len, events, bursts, nerr, nbits);
      checks++;
      if (bursts * 8 < events / 2 || bursts * 8 > events * 2) begin failures++; $display("burst share off"); end
      checks++;
      if (events * (1 << pat_len) < nbits / 2 || events * (1 << pat_len) > nbits * 2) begin
        failures++; $display("event rate off");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
