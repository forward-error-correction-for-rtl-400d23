// tb_threshold_logic: exhaustive check of the three-of-four majority rule
// over all 32 combinations of the five syndrome taps.
module tb_threshold_logic;
  logic s_n, s_n1, s_nb1, s_n2b1, s_n3b1, correct;
  int checks = 0, failures = 0;

  threshold_logic dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int votes;
      {s_n, s_n1, s_nb1, s_n2b1, s_n3b1} = 5'(v);
      votes = int'(s_n) + int'(s_n1 != s_nb1) + int'(s_n2b1) + int'(s_n3b1);
      #1;
      checks++;
      if (correct !== (votes >= 3)) begin
        failures++;
        $display("taps %05b: correct=%b, %0d checks set", v, correct, votes);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
