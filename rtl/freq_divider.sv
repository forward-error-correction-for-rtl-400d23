// freq_divider: 2.4 kHz to 1.2 kHz divider of the decoder, steered by the bit
// synchronizer.
//
// Divides the channel-bit strobe by two, producing two interleaved 1.2 kHz
// strobes: en_odd on channel bits with an odd index since message start (the
// parity bit of phase 0's pairs) and en_even on the others (phase 1). At the
// first channel bit of a message the divider is re-phased so that this bit
// counts as index 0 (an information bit). out_tick, the decoder's 1.2 kHz
// output clock, follows whichever of the two the bit synchronizer selected.
// The source shows a frequency divider fed by the bit synchronizer; the
// re-phasing at message start is this design's choice.
//
// Timing: all outputs are combinational from chan_tick and registered state.
module freq_divider (
  input  logic clk,
  input  logic rst_n,
  input  logic chan_tick,   // 2.4 kHz strobe
  input  logic msg_start,   // this channel bit is the first of a message
  input  logic phase,       // 0: deliver phase 0, 1: phase 1
  output logic en_odd,      // phase 0 pair complete
  output logic en_even,     // phase 1 pair complete
  output logic out_tick     // 1.2 kHz output clock strobe
);
  logic next_odd;   // index parity of the next channel bit
  logic cur_odd;

  assign cur_odd  = msg_start ? 1'b0 : next_odd;
  assign en_odd   = chan_tick &&  cur_odd;
  assign en_even  = chan_tick && !cur_odd;
  assign out_tick = phase ? en_even : en_odd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         next_odd <= 1'b0;
    else if (chan_tick) next_odd <= ~cur_odd;
  end

endmodule
