// tb_bit_synchronizer: drives the two correction streams with chosen counts
// per 50-bit window and checks when the phase changes: only at a window end,
// only when the phase in use reached 4 corrections and the other stayed
// below 4, and back to phase 0 on clear.
module tb_bit_synchronizer;
  logic clk = 0, rst_n = 0, clr = 0;
  logic en0 = 0, corr0 = 0, en1 = 0, corr1 = 0;
  logic phase, switched;
  int checks = 0, failures = 0, switches = 0;

  bit_synchronizer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (switched) switches++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One window: n0 corrections on phase 0, n1 on phase 1, spread at random.
  task automatic window(int n0, int n1);
    bit c0[50], c1[50];
    int k;
    foreach (c0[i]) begin c0[i] = 0; c1[i] = 0; end
    k = 0; while (k < n0) begin int p = $urandom_range(49); if (!c0[p]) begin c0[p] = 1; k++; end end
    k = 0; while (k < n1) begin int p = $urandom_range(49); if (!c1[p]) begin c1[p] = 1; k++; end end
    for (int i = 0; i < 50; i++) begin
      @(negedge clk); en1 = 1; corr1 = c1[i];
      @(negedge clk); en1 = 0; corr1 = 0;
      @(negedge clk); en0 = 1; corr0 = c0[i];
      @(negedge clk); en0 = 0; corr0 = 0;
      // the phase may move only on the last strobe of the window
      if (i < 49) begin
        checks++;
        if (switched) begin failures++; $display("switch inside a window"); end
      end
    end
  endtask

  task automatic expect_phase(bit p, string what);
    checks++;
    if (phase !== p) begin failures++; $display("%s: phase %b expected %b", what, phase, p); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    expect_phase(0, "after clear");
    window(3, 0);   expect_phase(0, "3 errors");
    window(4, 4);   expect_phase(0, "both bad");
    window(12, 3);  expect_phase(1, "phase 0 bad");
    window(0, 3);   expect_phase(1, "phase 1 good");
    window(2, 4);   expect_phase(0, "phase 1 bad");
    window(50, 50); expect_phase(0, "saturated");
    window(1, 30);  expect_phase(0, "other bad");
    window(9, 0);   expect_phase(1, "switch again");
    repeat (2) @(negedge clk);
    checks++;
    if (switches != 3) begin failures++; $display("%0d switches, expected 3", switches); end
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    expect_phase(0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
