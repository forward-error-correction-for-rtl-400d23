// tb_mp_serial_in: sends messages of random length and checks every byte
// handed to the processor: data bits in order from bit 0, a control byte
// marking the valid positions (a partial last byte included), one interrupt
// per byte on the 8th bit slot, and the overrun flag when a byte is not read.
module tb_mp_serial_in;
  logic clk = 0, rst_n = 0, bit_tick = 0, din = 0, sem = 0, ack = 0;
  logic [7:0] data, ctrl;
  logic irq, overrun;
  int checks = 0, failures = 0;
  bit [7:0] exp_d[$], exp_c[$];

  mp_serial_in dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // processor model: read and acknowledge each byte
  bit reading = 1;
  always @(posedge clk) if (rst_n) begin
    ack <= 1'b0;
    if (reading && irq && !ack) begin
      checks++;
      if (exp_d.size() == 0) begin
        failures++; $display("unexpected byte");
      end else begin
        bit [7:0] ed, ec;
        ed = exp_d.pop_front();
        ec = exp_c.pop_front();
        if (data !== ed || ctrl !== ec) begin
          failures++;
          $display("byte %h/%h expected %h/%h", data, ctrl, ed, ec);
        end
      end
      ack <= 1'b1;
    end
  end

  task automatic send_bit(bit d, bit s);
    @(negedge clk);
    bit_tick = 1; din = d; sem = s;
    @(negedge clk);
    bit_tick = 0;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int msgn = 0; msgn < 20; msgn++) begin
      int n, pos;
      bit [7:0] d, c;
      n = 1 + $urandom_range(40);
      d = 0; c = 0; pos = 0;
      for (int i = 0; i < n; i++) begin
        bit b;
        b = 1'($urandom);
        d[pos] = b; c[pos] = 1;
        pos++;
        // expected byte is queued before its 8th bit goes out
        if (pos == 8) begin exp_d.push_back(d); exp_c.push_back(c); d = 0; c = 0; pos = 0; end
        send_bit(b, 1);
      end
      if (pos != 0) begin exp_d.push_back(d); exp_c.push_back(c); end
      // idle slots complete a partial byte
      repeat (10) send_bit(1'($urandom), 0);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_d.size() != 0) begin failures++; $display("%0d bytes never delivered", exp_d.size()); end
    checks++;
    if (overrun) begin failures++; $display("overrun while reading in time"); end
    // stop reading: the second unread byte is an overrun
    reading = 0;
    repeat (16) send_bit(1, 1);
    send_bit(0, 0);
    checks++;
    if (!overrun) begin failures++; $display("overrun not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
