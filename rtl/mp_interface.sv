// mp_interface: interface hardware of the microprocessor version of the
// codec, where a processor does the encoding and decoding in software eight
// bits at a time.
//
// It holds the four ports the processor needs: the encoder input and the
// decoder input collect eight serial bits with a control byte and interrupt
// on the 8th; the encoder output takes data, parity and control bytes and
// multiplexes them onto the 2.4 kb/s channel; the decoder output takes a
// byte of interleaved information and parity bits with a control byte and
// sends the information bits at 1.2 kb/s. The processor itself is not part
// of this block: its bus signals are the ports. The choice of these four
// ports follows the source; their grouping into one block is this design's.
//
// Timing: see the four port modules; every strobe is one system clock wide.
module mp_interface (
  input  logic       clk,
  input  logic       rst_n,
  // encoder input (1.2 kb/s user data)
  input  logic       ei_tick,
  input  logic       ei_data,
  input  logic       ei_sem,
  input  logic       ei_ack,
  output logic [7:0] ei_byte,
  output logic [7:0] ei_ctrl,
  output logic       ei_irq,
  output logic       ei_overrun,
  // decoder input (2.4 kb/s channel data)
  input  logic       di_tick,
  input  logic       di_data,
  input  logic       di_sem,
  input  logic       di_ack,
  output logic [7:0] di_byte,
  output logic [7:0] di_ctrl,
  output logic       di_irq,
  output logic       di_overrun,
  // encoder output (2.4 kb/s channel)
  input  logic       eo_wr,
  input  logic [7:0] eo_data,
  input  logic [7:0] eo_par,
  input  logic [7:0] eo_ctrl,
  input  logic       eo_ack,
  input  logic       eo_tick,
  output logic       eo_chan_data,
  output logic       eo_sem,
  output logic       eo_irq,
  output logic       eo_full,
  // decoder output (1.2 kb/s user data)
  input  logic       do_wr,
  input  logic [7:0] do_byte,
  input  logic [7:0] do_ctrl,
  input  logic       do_ack,
  input  logic       do_tick,
  output logic       do_data,
  output logic       do_sem,
  output logic       do_irq,
  output logic       do_full
);

  mp_serial_in u_enc_in (
    .clk, .rst_n, .bit_tick (ei_tick), .din (ei_data), .sem (ei_sem), .ack (ei_ack),
    .data (ei_byte), .ctrl (ei_ctrl), .irq (ei_irq), .overrun (ei_overrun)
  );

  mp_serial_in u_dec_in (
    .clk, .rst_n, .bit_tick (di_tick), .din (di_data), .sem (di_sem), .ack (di_ack),
    .data (di_byte), .ctrl (di_ctrl), .irq (di_irq), .overrun (di_overrun)
  );

  mp_enc_out u_enc_out (
    .clk, .rst_n, .wr (eo_wr), .wdata (eo_data), .wpar (eo_par), .wctrl (eo_ctrl),
    .ack (eo_ack), .chan_tick (eo_tick),
    .chan_data (eo_chan_data), .sem_out (eo_sem), .irq (eo_irq), .full (eo_full)
  );

  mp_dec_out u_dec_out (
    .clk, .rst_n, .wr (do_wr), .wbyte (do_byte), .wctrl (do_ctrl),
    .ack (do_ack), .out_tick (do_tick),
    .out_data (do_data), .sem_out (do_sem), .irq (do_irq), .full (do_full)
  );

endmodule
