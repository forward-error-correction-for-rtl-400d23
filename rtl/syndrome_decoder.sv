// syndrome_decoder: threshold decoder for one demultiplexing phase.
//
// For every received (information, parity) pair the received information bit
// goes through a parity generator identical to the encoder's; its output is
// added modulo 2 to the received parity bit to give the syndrome s_n. The
// syndrome register (3*beta+1 stages laid out as 1, beta, beta, beta) holds
// past syndromes; the threshold logic looks at five taps and, when it decides
// the oldest information bit i_(n-3beta-1) is wrong, inverts it on the way out
// and also inverts the three stored syndromes that still contain that bit
// (s_n entering the register, s_(n-beta-1) and s_(n-2beta-1) as they cross
// into the next beta section), so a corrected error leaves no trace behind.
// This follows the decoder diagram of the source; the register layout and
// feedback points are the source's, the single-clock strobe timing is this
// design's.
//
// Timing: on a clock edge with en high one pair is consumed and the decoded
// bit for the pair fed 3*beta+1 pairs earlier appears on dout (registered),
// with corr telling whether it was inverted; both hold until the next en.
// clr empties both registers but leaves dout/corr, so the last bit of a
// message is not lost when the message ends.
module syndrome_decoder
  import fec_pkg::*;
#(
  parameter int unsigned BMAX = BETA_MAX
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,
  input  logic      en,
  input  beta_sel_e beta_sel,
  input  logic      info_in,   // received information bit
  input  logic      par_in,    // received parity bit for the same period
  output logic      dout,      // decoded information bit (3*beta+1 periods old)
  output logic      corr       // dout was corrected
);
  localparam int unsigned LEN = 3 * BMAX + 1;

  logic           regen;       // regenerated parity
  logic           tail;        // received information bit leaving the register
  logic           s_n;
  logic           fix;
  logic [LEN-1:0] sr;          // sr[k] holds s_(n-1-k), after feedback
  logic [LEN-1:0] sr_next;
  logic [5:0]     b;           // spread in use

  diffuse_parity_gen #(.BMAX(BMAX)) u_pgen (
    .clk, .rst_n, .clr, .en,
    .beta_sel,
    .din    (info_in),
    .parity (regen),
    .tail   (tail)
  );

  assign b   = 6'(beta_of(beta_sel));
  assign s_n = regen ^ par_in;

  threshold_logic u_thr (
    .s_n    (s_n),
    .s_n1   (sr[0]),
    .s_nb1  (sr[b]),
    .s_n2b1 (sr[2*b]),
    .s_n3b1 (sr[3*b]),
    .correct(fix)
  );

  always_comb begin
    sr_next    = {sr[LEN-2:0], s_n ^ fix};
    sr_next[b+1]   = sr[b]   ^ fix;
    sr_next[2*b+1] = sr[2*b] ^ fix;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      dout <= 1'b0;
      corr <= 1'b0;
    end else if (clr) begin
      // dout/corr keep the last decoded bit until the output stage takes it
      sr   <= '0;
    end else if (en) begin
      sr   <= sr_next;
      dout <= tail ^ fix;
      corr <= fix;
    end
  end

endmodule
