// tb_syndrome_decoder: feeds reference-encoded pairs with error patterns the
// code must correct into one syndrome decoder and checks every decoded bit
// against the original message, for all four beta settings:
//   - isolated random errors (information or parity), well spaced;
//   - two errors inside one 11-bit decoding span;
//   - a three-error pattern that relies on the correction feedback;
//   - bursts of 2*beta consecutive channel bits, spaced by more than the
//     6*beta+2 guard space;
// and checks the decoding latency of 3*beta+1 pairs and that corrections are
// flagged.
module tb_syndrome_decoder;
  import fec_pkg::*;
  import fec_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic clr = 0, en = 0, info_in = 0, par_in = 0;
  beta_sel_e beta_sel = BETA_4;
  logic dout, corr;
  int checks = 0, failures = 0, corrections = 0;

  syndrome_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Decode one message whose channel stream is ch (errors already applied).
  task automatic run_msg(bitq_t msg, bitq_t ch, int b, string what);
    int npairs = ch.size() / 2;
    int bad = 0;
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    for (int k = 0; k < npairs; k++) begin
      info_in = ch[2*k];
      par_in  = ch[2*k+1];
      en = 1;
      @(negedge clk);
      en = 0;
      corrections += corr;
      // output of pair k is bit k-(3b+1)
      if (k >= 3*b+1 && k - (3*b+1) < msg.size()) begin
        checks++;
        if (dout !== msg[k-(3*b+1)]) begin
          bad++;
          failures++;
        end
      end
      repeat ($urandom_range(2)) @(negedge clk);
    end
    if (bad != 0) $display("beta=%0d %s: %0d wrong bits", b, what, bad);
  endtask

  initial begin
    bitq_t msg, ch;
    int b, pos, c0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      beta_sel = beta_sel_e'(s);
      b = beta_of_sel(s);
      // error free
      msg = random_msg(300);
      ch = encode(msg, b, 0);
      c0 = corrections;
      run_msg(msg, ch, b, "clean");
      checks++;
      if (corrections != c0) begin failures++; $display("corrections without errors"); end
      // isolated errors, one every 16*beta channel bits
      msg = random_msg(400);
      ch = encode(msg, b, 0);
      pos = 2*$urandom_range(4*b);
      while (pos + 8*b + 1 < 2*msg.size()) begin
        ch[pos] = ~ch[pos];                     // information bit
        ch[pos+8*b+1] = ~ch[pos+8*b+1];         // a parity bit further on
        pos += 16*b + 2*$urandom_range(3);
      end
      c0 = corrections;
      run_msg(msg, ch, b, "single");
      checks++;
      if (corrections == c0) begin failures++; $display("no corrections flagged"); end
      // two errors in one decoding span: info bit m and one of its checks
      msg = random_msg(400);
      ch = encode(msg, b, 0);
      for (int m = 10; m + 3*b + 1 < msg.size(); m += 14*b) begin
        int other, kind;
        ch[2*m] = ~ch[2*m];
        kind = $urandom_range(3);
        case (kind)
          0: other = 2*(m + b) + 1;            // parity of s_(m+beta)
          1: other = 2*(m + 2*b);              // info bit in s_(m+2beta)
          2: other = 2*(m + 3*b + 1) + 1;      // parity of s_n
          default: other = 2*m + 1;            // own parity
        endcase
        ch[other] = ~ch[other];
      end
      run_msg(msg, ch, b, "double");
      // three errors that decode only if a correction is removed from every
      // stored syndrome: info bits m and m+beta, and the parity bit that
      // would otherwise out-vote the stale syndrome when m+beta is decoded
      msg = random_msg(400);
      ch = encode(msg, b, 0);
      for (int m = 10; m + 4*b + 2 < msg.size(); m += 16*b) begin
        ch[2*m] = ~ch[2*m];
        ch[2*(m + b)] = ~ch[2*(m + b)];
        ch[2*(m + 4*b + 1) + 1] = ~ch[2*(m + 4*b + 1) + 1];
      end
      run_msg(msg, ch, b, "triple");
      // bursts of 2*beta channel bits, guard space above 6*beta+2
      msg = random_msg(600);
      ch = encode(msg, b, 0);
      pos = 2*($urandom_range(b)) + $urandom_range(1);
      while (pos + 2*b < 2*msg.size()) begin
        for (int j = 0; j < 2*b; j++) ch[pos+j] = ~ch[pos+j];
        pos += 2*b + 6*b + 2 + 2*b + $urandom_range(5);
      end
      run_msg(msg, ch, b, "burst");
    end
    $display("corrections=%0d", corrections);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
