// tb_mp_enc_out: a processor model writes data, parity and control bytes
// whenever the interface has room; the testbench checks the channel stream
// (data bit i, then parity bit i, bit 0 first), the S/E MESS line, that the
// stream has no gaps while bytes are supplied, and one interrupt per byte.
module tb_mp_enc_out;
  logic clk = 0, rst_n = 0, wr = 0, ack = 0, chan_tick = 0;
  logic [7:0] wdata = 0, wpar = 0, wctrl = 0;
  logic chan_data, sem_out, irq, full;
  int checks = 0, failures = 0, irqs = 0;
  bit exp_b[$], exp_s[$];

  mp_enc_out dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel strobe every 8 clocks; check the bit after each strobe
  int cyc = 0;
  bit started = 0, chk_next = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    chan_tick <= (cyc % 8 == 0);
    chk_next <= chan_tick;
    // the stream starts with the first bit marked by S/E MESS
    if (sem_out) started = 1;
    if (chk_next && started) begin
      checks++;
      if (exp_b.size() == 0) begin
        if (sem_out !== 0 || chan_data !== 0) begin failures++; $display("idle line not quiet"); end
      end else begin
        bit eb, es;
        eb = exp_b.pop_front();
        es = exp_s.pop_front();
        if (chan_data !== eb || sem_out !== es) begin
          failures++;
          $display("channel bit %b/%b expected %b/%b", chan_data, sem_out, eb, es);
        end
      end
    end
    if (irq && !ack) irqs++;
    ack <= irq && !ack;
  end

  initial begin
    int nbytes = 30;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < nbytes; k++) begin
      bit [7:0] d, p, c;
      d = 8'($urandom); p = 8'($urandom);
      c = (k == nbytes - 1) ? 8'h0f : 8'hff;
      @(negedge clk iff !full);
      wr = 1; wdata = d; wpar = p; wctrl = c;
      for (int i = 0; i < 8; i++) begin
        exp_b.push_back(d[i]); exp_s.push_back(c[i]);
        exp_b.push_back(p[i]); exp_s.push_back(c[i]);
      end
      @(negedge clk);
      wr = 0;
    end
    wait (exp_b.size() == 0);
    repeat (100) @(negedge clk);
    checks++;
    if (irqs != nbytes) begin failures++; $display("%0d interrupts for %0d bytes", irqs, nbytes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
