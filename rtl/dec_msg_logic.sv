// dec_msg_logic: S/E message logic of the decoder.
//
// Follows the input S/E MESS level, which is high over the channel bits of a
// coded message. While it is low the decoder registers are held clear, so
// every message is decoded from the all-zero state the encoder starts from.
// For each of the two decoding phases it counts the pairs fed since message
// start and tags each decoded bit as message data or not: the bit decoded on
// the k-th pair belongs to pair k-(3*beta+1), so the first 3*beta+1 outputs
// (plus one leading dummy pair when the two-bit parity delay is used) are not
// data, and the zero-fill bits at the end are never delivered because the
// message ends before they leave the register. The tag travels with the bit
// through the output delay and becomes the output S/E MESS. The source gives
// the signal's purpose and its dependence on beta and the parity delay; the
// tagging method is this design's.
//
// Timing: clr and msg_start are combinational from chan_tick and sem_in;
// valid0/valid1 are registered on en0/en1, in step with the decoders' dout.
module dec_msg_logic
  import fec_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      chan_tick,
  input  logic      sem_in,     // input S/E MESS, sampled with the channel bit
  input  beta_sel_e beta_sel,
  input  logic      pdly_en,
  input  logic      en0,        // phase 0 pair strobe
  input  logic      en1,        // phase 1 pair strobe
  output logic      clr,        // hold decoder registers clear
  output logic      msg_start,  // first channel bit of a message
  output logic      feed0,      // feed phase 0 decoder
  output logic      feed1,      // feed phase 1 decoder
  output logic      valid0,     // phase 0 decoder output is message data
  output logic      valid1
);
  logic       sem_q;
  logic [6:0] k0, k1;   // pairs fed this message, saturating
  logic [6:0] first;    // index of the first pair whose output is data

  always_comb begin
    clr       = chan_tick && !sem_in;
    msg_start = chan_tick && sem_in && !sem_q;
    feed0     = en0 && sem_in;
    feed1     = en1 && sem_in;
    first     = 7'(3 * beta_of(beta_sel) + 1 + (pdly_en ? 1 : 0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sem_q  <= 1'b0;
      k0     <= '0;
      k1     <= '0;
      valid0 <= 1'b0;
      valid1 <= 1'b0;
    end else begin
      if (chan_tick) sem_q <= sem_in;
      if (clr) begin
        k0 <= '0;
        k1 <= '0;
      end
      if (en0) begin
        valid0 <= feed0 && (k0 >= first);
        if (feed0 && k0 != '1) k0 <= k0 + 1'b1;
      end
      if (en1) begin
        valid1 <= feed1 && (k1 >= first);
        if (feed1 && k1 != '1) k1 <= k1 + 1'b1;
      end
    end
  end

endmodule
