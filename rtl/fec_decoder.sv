// fec_decoder: decoder board of the hardwired diffuse-code codec.
//
// The 2.4 kb/s channel stream enters a short delay chain (D, D and an optional
// 2D). For every channel bit, the bit itself is taken as a parity bit and the
// bit one channel slot earlier (three slots earlier with the two-bit parity
// delay switched in) as its information bit. Pairs completed on odd channel
// bits feed the phase 0 syndrome decoder, pairs completed on even bits the
// phase 1 decoder, so both ways of demultiplexing the stream are decoded at
// once. The bit synchronizer counts the corrections of both decoders over
// 50-bit windows and moves the output to the other phase when the current
// one is clearly out of step (a channel bit was lost). Decoded bits of both
// phases wait one window in the output delay before the phase switch, and
// the S/E message logic tags which of them are message data; the tag becomes
// the output S/E MESS. The frequency divider provides the two phase strobes
// and the 1.2 kHz output clock.
//
// The block structure (input delays and switch, parity bit generator,
// syndrome register, threshold logic, bit synchronizer, 100-channel-bit delay
// with phase switch, frequency divider, S/E message logic) follows the
// source. Running two decoders rather than one time-shared register at the
// channel rate is this design's choice and behaves the same.
//
// Timing: chan_tick strobes each 2.4 kHz channel bit; chan_data and sem_in are
// sampled on it. out_tick strobes each 1.2 kHz output bit; out_data and
// out_sem are registered and valid from that strobe until the next one.
// Latency: 3*beta+1 information periods for decoding plus WINDOW (50) for the
// synchronizer, plus a few channel bits.
module fec_decoder
  import fec_pkg::*;
#(
  parameter int unsigned BMAX        = BETA_MAX,
  parameter int unsigned SYNC_WINDOW = 50,
  parameter int unsigned SYNC_THRESH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      chan_tick,   // 2.4 kHz channel clock strobe
  input  logic      chan_data,   // 2.4 kb/s coded stream
  input  logic      sem_in,      // input S/E MESS
  input  beta_sel_e beta_sel,    // shift register length control
  input  logic      pdly_en,     // parity delay control
  output logic      out_tick,    // 1.2 kHz output clock strobe
  output logic      out_data,    // 1.2 kb/s decoded data
  output logic      out_sem,     // output S/E MESS
  output logic      phase,       // demultiplexing phase in use
  output logic      resync,      // one-clock pulse when the phase changes
  output logic      corr_ev      // one-clock pulse when the phase in use corrects a bit
);
  logic [2:0] dly;               // dly[k]: channel bit k+1 slots before the current one
  logic       info_tap, par_tap;
  logic       clr, msg_start;
  logic       en0, en1, feed0, feed1;
  logic       v0, v1;
  logic       d0, d1, c0, c1;

  // Input delays and parity delay switch.
  assign par_tap  = chan_data;
  assign info_tap = pdly_en ? dly[2] : dly[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         dly <= '0;
    else if (clr)       dly <= '0;
    else if (chan_tick) dly <= {dly[1:0], chan_data};
  end

  freq_divider u_div (
    .clk, .rst_n, .chan_tick, .msg_start, .phase,
    .en_odd (en0), .en_even (en1), .out_tick
  );

  dec_msg_logic u_msg (
    .clk, .rst_n, .chan_tick, .sem_in, .beta_sel, .pdly_en,
    .en0, .en1, .clr, .msg_start, .feed0, .feed1,
    .valid0 (v0), .valid1 (v1)
  );

  syndrome_decoder #(.BMAX(BMAX)) u_dec0 (
    .clk, .rst_n, .clr, .en (feed0), .beta_sel,
    .info_in (info_tap), .par_in (par_tap),
    .dout (d0), .corr (c0)
  );

  syndrome_decoder #(.BMAX(BMAX)) u_dec1 (
    .clk, .rst_n, .clr, .en (feed1), .beta_sel,
    .info_in (info_tap), .par_in (par_tap),
    .dout (d1), .corr (c1)
  );

  bit_synchronizer #(.WINDOW(SYNC_WINDOW), .THRESH(SYNC_THRESH)) u_sync (
    .clk, .rst_n, .clr (msg_start),
    .en0 (feed0), .corr0 (c0), .en1 (feed1), .corr1 (c1),
    .phase, .switched (resync)
  );

  sync_delay #(.WINDOW(SYNC_WINDOW)) u_out (
    .clk, .rst_n,
    .en0, .d0, .v0, .en1, .d1, .v1,
    .phase, .out_tick,
    .dout (out_data), .vout (out_sem)
  );

  assign corr_ev = phase ? (feed1 && c1) : (feed0 && c0);

endmodule
