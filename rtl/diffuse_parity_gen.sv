// diffuse_parity_gen: parity generator of the diffuse convolutional code.
//
// A shift register of 3*beta+1 information bits, cleared to zero, with four
// taps whose modulo-2 sum is the parity bit:
//   parity = din ^ i_(n-beta) ^ i_(n-2beta) ^ i_(n-3beta-1)
// where din is the information bit i_n now at the input. The tap spacing
// (beta, beta, beta+1 stages) follows the encoder diagram of the codec; the
// same block regenerates parity from the received information bits in the
// decoder. 'tail' is the bit that leaves the register on the next shift,
// i_(n-3beta-1), which the decoder corrects and delivers.
//
// Timing: 'parity' and 'tail' are combinational from din and the register;
// on a clock edge with en high, din is shifted in. clr (synchronous) empties
// the register, as is done between messages. The register is sized for
// beta = 16 and the taps move with beta_sel.
module diffuse_parity_gen
  import fec_pkg::*;
#(
  parameter int unsigned BMAX = BETA_MAX
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,       // synchronous clear to the all-zero state
  input  logic      en,        // shift din in
  input  beta_sel_e beta_sel,  // spread beta = 4, 8, 12 or 16
  input  logic      din,       // information bit i_n
  output logic      parity,    // p_n for din and the stored bits
  output logic      tail       // i_(n-3beta-1), the oldest stored bit
);
  localparam int unsigned LEN = 3 * BMAX + 1;

  // sr[k] holds i_(n-1-k)
  logic [LEN-1:0] sr;
  logic [5:0]     b;   // spread in use

  always_comb begin
    b      = 6'(beta_of(beta_sel));
    tail   = sr[3*b];
    parity = din ^ sr[b-1] ^ sr[2*b-1] ^ sr[3*b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sr <= '0;
    else if (clr)    sr <= '0;
    else if (en)     sr <= {sr[LEN-2:0], din};
  end

  initial assert (BMAX >= 16 && BMAX % 4 == 0)
    else $error("BMAX must cover the largest beta setting");

endmodule
