// tb_clock_doubler: checks that the clock doubler emits exactly two strobes
// per reference period, one on the reference strobe and one half a period
// later, and that it follows a change of reference period.
module tb_clock_doubler;
  logic clk = 0, rst_n = 0, ref_tick = 0;
  logic out_tick, locked;
  int checks = 0, failures = 0;
  int cyc = 0, last_ref = -1, per = 0, outs_in_period = 0, mid_ok = 0;

  clock_doubler dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (ref_tick) begin
      if (!out_tick) begin failures++; $display("no output on reference strobe"); end
      if (locked && last_ref >= 0) begin
        checks++;
        if (outs_in_period != 1) begin
          failures++; $display("cycle %0d: %0d mid strobes in period", cyc, outs_in_period);
        end
      end
      outs_in_period <= 0;
      last_ref <= cyc;
    end else if (out_tick) begin
      outs_in_period <= outs_in_period + 1;
      checks++;
      if (cyc - last_ref != per / 2) begin
        failures++; $display("cycle %0d: mid strobe %0d after reference, period %0d", cyc, cyc - last_ref, per);
      end
    end
  end

  task automatic run(int p, int n);
    if (per == 0) per = p;
    for (int i = 0; i < n; i++) begin
      @(negedge clk) ref_tick = 1;
      @(negedge clk) ref_tick = 0;
      // the new period is known once it has been measured
      if (i == 1) per = p;
      repeat (p - 2) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(16, 20);
    checks++;
    if (!locked) failures++;
    run(40, 10);   // first period after the change is measured, then followed
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
