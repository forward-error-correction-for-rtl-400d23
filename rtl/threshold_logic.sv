// threshold_logic: majority decision of the diffuse-code decoder.
//
// Forms the four parity checks on the oldest information bit i_m
// (m = n-3beta-1) from five syndrome taps and decides that i_m is in error
// when at least three of the four checks are 1:
//   A = s_(n-3beta-1)   B = s_(n-2beta-1)
//   C = s_(n-1) ^ s_(n-beta-1)   D = s_n
// Combining s_(n-1) with s_(n-beta-1) removes the information bit those two
// syndromes share, so the four checks meet only in i_m and span eleven
// channel bits. The taps and the three-of-four rule follow the source; the
// decision is purely combinational.
module threshold_logic (
  input  logic s_n,        // newest syndrome
  input  logic s_n1,       // s_(n-1)
  input  logic s_nb1,      // s_(n-beta-1)
  input  logic s_n2b1,     // s_(n-2beta-1)
  input  logic s_n3b1,     // s_(n-3beta-1)
  output logic correct     // invert the information bit
);
  logic [3:0] chk;
  logic [2:0] ones;

  always_comb begin
    chk     = {s_n3b1, s_n2b1, s_n1 ^ s_nb1, s_n};
    ones    = 3'(chk[0]) + 3'(chk[1]) + 3'(chk[2]) + 3'(chk[3]);
    correct = (ones >= 3'd3);
  end

endmodule
