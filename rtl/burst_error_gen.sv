// burst_error_gen: burst error generator used to test the codec.
//
// A maximal-length 36-bit shift-register sequence (period 2**36-1) runs on
// its own clock strobe (307.2 kHz on the original test set). At every data
// bit, if the newest pat_len bits of the sequence are all ones (the
// "selected pattern", probability 2**-pat_len), the data bit is inverted: an
// isolated error, so pat_len sets the error rate. If, at the same moment, a
// second 3-bit pattern (three further sequence bits, all ones) is present,
// which happens one time in eight, a burst of burst_len consecutive inverted
// data bits (1..64) is produced instead of the single error.
//
// The sequence length, its clock, the 3-bit second pattern, the one-in-eight
// ratio and the 1..64 burst range follow the source. The feedback polynomial
// (x^36 + x^25 + 1), the all-ones form of both patterns, the bits used for
// the second pattern, and evaluating them once per data bit are this design's
// choices. While a burst is running no new error events start.
//
// Timing: prbs_tick advances the sequence; bit_tick marks a data bit, and
// dout = din ^ err is combinational for that bit. err and in_burst are
// combinational.
module burst_error_gen #(
  parameter logic [35:0] SEED = 36'h0_1234_5678
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       prbs_tick,    // sequence clock strobe
  input  logic       bit_tick,     // data bit strobe
  input  logic       din,
  input  logic [4:0] pat_len,      // selected pattern length, 1..31 bits
  input  logic [6:0] burst_len,    // burst length, 1..64 bits
  input  logic       burst_en,     // allow bursts
  output logic       dout,
  output logic       err,          // this data bit is inverted
  output logic       in_burst      // this bit belongs to a burst
);
  logic [35:0] lfsr;
  logic [6:0]  burst_left;   // burst bits still to invert after this one
  logic [30:0] mask;
  logic        hit, second;

  always_comb begin
    mask     = 31'((32'd1 << pat_len) - 1);
    hit      = (pat_len != '0) && ((lfsr[30:0] & mask) == mask);
    second   = burst_en && (lfsr[35:33] == 3'b111);
    in_burst = (burst_left != '0) || (hit && second && burst_len > 7'd1);
    err      = bit_tick && ((burst_left != '0) || hit);
    dout     = din ^ err;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr       <= SEED;
      burst_left <= '0;
    end else begin
      if (prbs_tick) lfsr <= {lfsr[34:0], lfsr[35] ^ lfsr[24]};
      if (bit_tick) begin
        if (burst_left != '0)  burst_left <= burst_left - 1'b1;
        else if (hit && second && burst_len != '0) burst_left <= burst_len - 1'b1;
      end
    end
  end

  initial assert (SEED != '0) else $error("SEED must be non-zero");

endmodule
