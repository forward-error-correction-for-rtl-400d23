// tb_diffuse_parity_gen: checks the parity generator against the code
// definition for every beta setting, including clearing.
module tb_diffuse_parity_gen;
  import fec_pkg::*;

  logic clk = 0, rst_n = 0;
  logic clr = 0, en = 0, din = 0;
  beta_sel_e beta_sel = BETA_4;
  logic parity, tail;
  int checks = 0, failures = 0;

  diffuse_parity_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist[$];
    int b;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      beta_sel = beta_sel_e'(s);
      b = 4 * (s + 1);
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      hist.delete();
      for (int n = 0; n < 200; n++) begin
        bit d, exp_p, exp_t;
        int k;
        d = 1'($urandom);
        // zeros before the start, as after a clear
        hist.push_back(d);
        k = hist.size() - 1;
        exp_p = d ^ (k-b >= 0 ? hist[k-b] : 0) ^ (k-2*b >= 0 ? hist[k-2*b] : 0)
                  ^ (k-3*b-1 >= 0 ? hist[k-3*b-1] : 0);
        exp_t = (k-3*b-1 >= 0) ? hist[k-3*b-1] : 0;
        din = d; en = 1;
        #1;
        checks++;
        if (parity !== exp_p || tail !== exp_t) begin
          failures++;
          if (failures < 10) $display("beta=%0d n=%0d parity %b/%b tail %b/%b", b, n, parity, exp_p, tail, exp_t);
        end
        @(negedge clk);
        // idle cycles do not shift
        en = 0;
        if ($urandom_range(3) == 0) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
