// tb_sync_delay: pushes numbered bits into both lines and checks that each
// comes out exactly WINDOW strobes later, from the line the phase selects.
module tb_sync_delay;
  localparam int W = 50;
  logic clk = 0, rst_n = 0;
  logic en0 = 0, d0 = 0, v0 = 0, en1 = 0, d1 = 0, v1 = 0, phase = 0, out_tick = 0;
  logic dout, vout;
  int checks = 0, failures = 0;
  bit h0[$], h1[$], g0[$], g1[$];

  sync_delay dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      if (i == 150) phase = 1;
      // phase 0 strobe
      @(negedge clk);
      en0 = 1; d0 = 1'($urandom); v0 = 1'($urandom); en1 = 0;
      out_tick = !phase;
      h0.push_back(d0); g0.push_back(v0);
      @(negedge clk);
      en0 = 0; out_tick = 0;
      if (!phase && h0.size() > W) begin
        checks++;
        if (dout !== h0[h0.size()-1-W] || vout !== g0[g0.size()-1-W]) begin
          failures++; $display("line 0 step %0d wrong", i);
        end
      end
      // phase 1 strobe
      @(negedge clk);
      en1 = 1; d1 = 1'($urandom); v1 = 1'($urandom);
      out_tick = phase;
      h1.push_back(d1); g1.push_back(v1);
      @(negedge clk);
      en1 = 0; out_tick = 0;
      if (phase && h1.size() > W) begin
        checks++;
        if (dout !== h1[h1.size()-1-W] || vout !== g1[g1.size()-1-W]) begin
          failures++; $display("line 1 step %0d wrong", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
