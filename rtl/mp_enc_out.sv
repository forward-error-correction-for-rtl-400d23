// mp_enc_out: encoder output port of the microprocessor codec interface.
//
// The processor writes a data byte, a parity byte and a control byte into a
// holding buffer. When the serialiser is free it takes the buffer and sends
// the byte pair bit by bit at the channel rate, data bit i then parity bit i
// (bit 0 first), driving S/E MESS from control bit i during both slots. When
// the buffer has been taken an interrupt asks for the next byte; the double
// buffering lets the processor write it while the current one is sent, so
// the stream has no gaps. With nothing to send the line idles at 0 with
// S/E MESS low. The multiplexing, the control byte and the interrupt follow
// the source; the bit order, raising the interrupt when the holding buffer
// is free, and the 'full' status are this design's choices.
//
// Timing: wr loads the holding buffer (ignored while it is full, unless the
// serialiser empties it in the same cycle).
// chan_tick strobes each channel bit; chan_data and sem_out are registered
// and change on it.
module mp_enc_out (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [7:0] wdata,
  input  logic [7:0] wpar,
  input  logic [7:0] wctrl,
  input  logic       ack,         // clears irq
  input  logic       chan_tick,
  output logic       chan_data,
  output logic       sem_out,
  output logic       irq,         // holding buffer free
  output logic       full
);
  typedef struct packed {
    logic [7:0] d;
    logic [7:0] p;
    logic [7:0] c;
  } out_byte_t;

  out_byte_t hold, cur;
  logic      cur_valid;
  logic [3:0] slot;   // 0..15: bit slot within cur
  logic       load;   // the serialiser takes the holding buffer now
  logic       accept; // a processor write is taken now

  assign load   = chan_tick && !cur_valid && full;
  assign accept = wr && (!full || load);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= '0; cur <= '0; cur_valid <= 1'b0; full <= 1'b0; slot <= '0;
      chan_data <= 1'b0; sem_out <= 1'b0; irq <= 1'b0;
    end else begin
      if (ack) irq <= 1'b0;
      if (accept)    hold <= '{d: wdata, p: wpar, c: wctrl};
      if (accept)    full <= 1'b1;
      else if (load) full <= 1'b0;
      if (chan_tick) begin
        if (cur_valid) begin
          chan_data <= slot[0] ? cur.p[slot[3:1]] : cur.d[slot[3:1]];
          sem_out   <= cur.c[slot[3:1]];
          slot      <= slot + 1'b1;
          if (slot == 4'd15) cur_valid <= 1'b0;
        end else if (full) begin
          // start the next byte in this slot
          cur       <= hold;
          cur_valid <= 1'b1;
          irq       <= 1'b1;
          chan_data <= hold.d[0];
          sem_out   <= hold.c[0];
          slot      <= 4'd1;
        end else begin
          chan_data <= 1'b0;
          sem_out   <= 1'b0;
        end
      end
    end
  end

endmodule
