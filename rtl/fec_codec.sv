// fec_codec: the hardwired forward error-correction codec for a 1.2 kb/s
// aeronautical satellite data channel.
//
// The codec protects messages with a rate-1/2 systematic diffuse
// convolutional code (parity p_n = i_n ^ i_(n-beta) ^ i_(n-2beta) ^
// i_(n-3beta-1)) that corrects random errors and bursts of up to 2*beta
// channel bits, and decodes it with a one-step majority (threshold) decoder.
// Encoder and decoder are independent boards that sit at opposite ends of the
// link, so they stand side by side here, each with its own ports; a test
// bench or the system closes the loop through the modem and channel. The
// spread beta (4, 8, 12 or 16) and the optional two-bit parity delay (used
// with differentially encoded PSK, where channel errors come in pairs) are
// switch settings shared by both ends.
//
// Two further units stand beside the hardwired codec with their own ports:
// the interface hardware of the microprocessor version of the codec (the
// processor, which encodes and decodes in software, connects to its mp_*
// ports), and the burst error generator used to test the codec (beg_*), which
// a test set-up places between the encoder output and the decoder input.
//
// Timing: one system clock; the 1.2 kHz and 2.4 kHz bit clocks are one-cycle
// strobes. See fec_encoder, fec_decoder, mp_interface and burst_error_gen
// for the details of each unit.
module fec_codec
  import fec_pkg::*;
#(
  parameter int unsigned SYNC_WINDOW = 50,   // bit synchronizer window (information bits)
  parameter int unsigned SYNC_THRESH = 4     // corrections per window that mark a phase as wrong
) (
  input  logic      clk,
  input  logic      rst_n,
  input  beta_sel_e beta_sel,       // shift register length control
  input  logic      pdly_en,        // parity bit delay control
  // encoder: user side
  input  logic      enc_info_tick,  // 1.2 kHz data clock strobe
  input  logic      enc_data_in,
  input  logic      enc_sem_in,
  // encoder: modem side
  output logic      enc_chan_tick,  // 2.4 kHz clock strobe
  output logic      enc_chan_data,
  output logic      enc_sem_out,
  output logic      enc_pll_locked,
  // decoder: modem side
  input  logic      dec_chan_tick,
  input  logic      dec_chan_data,
  input  logic      dec_sem_in,
  // decoder: user side
  output logic      dec_out_tick,   // 1.2 kHz clock strobe
  output logic      dec_out_data,
  output logic      dec_out_sem,
  output logic      dec_phase,
  output logic      dec_resync,
  output logic      dec_corr,
  // microprocessor codec interface
  input  logic       mp_ei_tick,
  input  logic       mp_ei_data,
  input  logic       mp_ei_sem,
  input  logic       mp_ei_ack,
  output logic [7:0] mp_ei_byte,
  output logic [7:0] mp_ei_ctrl,
  output logic       mp_ei_irq,
  output logic       mp_ei_overrun,
  input  logic       mp_di_tick,
  input  logic       mp_di_data,
  input  logic       mp_di_sem,
  input  logic       mp_di_ack,
  output logic [7:0] mp_di_byte,
  output logic [7:0] mp_di_ctrl,
  output logic       mp_di_irq,
  output logic       mp_di_overrun,
  input  logic       mp_eo_wr,
  input  logic [7:0] mp_eo_data,
  input  logic [7:0] mp_eo_par,
  input  logic [7:0] mp_eo_ctrl,
  input  logic       mp_eo_ack,
  input  logic       mp_eo_tick,
  output logic       mp_eo_chan_data,
  output logic       mp_eo_sem,
  output logic       mp_eo_irq,
  output logic       mp_eo_full,
  input  logic       mp_do_wr,
  input  logic [7:0] mp_do_byte,
  input  logic [7:0] mp_do_ctrl,
  input  logic       mp_do_ack,
  input  logic       mp_do_tick,
  output logic       mp_do_data,
  output logic       mp_do_sem,
  output logic       mp_do_irq,
  output logic       mp_do_full,
  // burst error generator
  input  logic       beg_prbs_tick,
  input  logic       beg_bit_tick,
  input  logic       beg_din,
  input  logic [4:0] beg_pat_len,
  input  logic [6:0] beg_burst_len,
  input  logic       beg_burst_en,
  output logic       beg_dout,
  output logic       beg_err,
  output logic       beg_in_burst
);

  fec_encoder u_enc (
    .clk, .rst_n,
    .info_tick  (enc_info_tick),
    .data_in    (enc_data_in),
    .sem_in     (enc_sem_in),
    .beta_sel, .pdly_en,
    .chan_tick  (enc_chan_tick),
    .chan_data  (enc_chan_data),
    .sem_out    (enc_sem_out),
    .pll_locked (enc_pll_locked)
  );

  fec_decoder #(
    .BMAX        (BETA_MAX),
    .SYNC_WINDOW (SYNC_WINDOW),
    .SYNC_THRESH (SYNC_THRESH)
  ) u_dec (
    .clk, .rst_n,
    .chan_tick (dec_chan_tick),
    .chan_data (dec_chan_data),
    .sem_in    (dec_sem_in),
    .beta_sel, .pdly_en,
    .out_tick  (dec_out_tick),
    .out_data  (dec_out_data),
    .out_sem   (dec_out_sem),
    .phase     (dec_phase),
    .resync    (dec_resync),
    .corr_ev   (dec_corr)
  );

  mp_interface u_mp (
    .clk, .rst_n,
    .ei_tick (mp_ei_tick), .ei_data (mp_ei_data), .ei_sem (mp_ei_sem), .ei_ack (mp_ei_ack),
    .ei_byte (mp_ei_byte), .ei_ctrl (mp_ei_ctrl), .ei_irq (mp_ei_irq), .ei_overrun (mp_ei_overrun),
    .di_tick (mp_di_tick), .di_data (mp_di_data), .di_sem (mp_di_sem), .di_ack (mp_di_ack),
    .di_byte (mp_di_byte), .di_ctrl (mp_di_ctrl), .di_irq (mp_di_irq), .di_overrun (mp_di_overrun),
    .eo_wr (mp_eo_wr), .eo_data (mp_eo_data), .eo_par (mp_eo_par), .eo_ctrl (mp_eo_ctrl),
    .eo_ack (mp_eo_ack), .eo_tick (mp_eo_tick),
    .eo_chan_data (mp_eo_chan_data), .eo_sem (mp_eo_sem), .eo_irq (mp_eo_irq), .eo_full (mp_eo_full),
    .do_wr (mp_do_wr), .do_byte (mp_do_byte), .do_ctrl (mp_do_ctrl), .do_ack (mp_do_ack),
    .do_tick (mp_do_tick),
    .do_data (mp_do_data), .do_sem (mp_do_sem), .do_irq (mp_do_irq), .do_full (mp_do_full)
  );

  burst_error_gen u_beg (
    .clk, .rst_n,
    .prbs_tick (beg_prbs_tick),
    .bit_tick  (beg_bit_tick),
    .din       (beg_din),
    .pat_len   (beg_pat_len),
    .burst_len (beg_burst_len),
    .burst_en  (beg_burst_en),
    .dout      (beg_dout),
    .err       (beg_err),
    .in_burst  (beg_in_burst)
  );

endmodule
