// mp_dec_out: decoder output port of the microprocessor codec interface.
//
// The processor hands over a byte in which information and parity bits
// alternate (information bits in the even positions 0, 2, 4, 6) together with
// a control byte. The port keeps the information bits only and sends them one
// per output bit clock, bit 0 first, driving S/E MESS from the control bit of
// the same position. Like the encoder output it is double buffered: a
// holding buffer accepts the next byte while the current one is sent, and an
// interrupt is raised whenever the holding buffer has been taken. The
// demultiplexing and the control byte follow the source; the bit positions,
// the order and the interrupt timing are this design's choices.
//
// Timing: wr loads the holding buffer (ignored while it is full, unless the
// serialiser empties it in the same cycle). out_tick strobes each 1.2 kb/s
// output bit; out_data and sem_out are registered and change on it.
module mp_dec_out (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [7:0] wbyte,
  input  logic [7:0] wctrl,
  input  logic       ack,
  input  logic       out_tick,
  output logic       out_data,
  output logic       sem_out,
  output logic       irq,
  output logic       full
);
  logic [7:0] hold_b, hold_c, cur_b, cur_c;
  logic       cur_valid;
  logic [1:0] slot;      // information bit 0..3 of cur
  logic       load, accept;

  assign load   = out_tick && !cur_valid && full;
  assign accept = wr && (!full || load);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_b <= '0; hold_c <= '0; cur_b <= '0; cur_c <= '0;
      cur_valid <= 1'b0; full <= 1'b0; slot <= '0;
      out_data <= 1'b0; sem_out <= 1'b0; irq <= 1'b0;
    end else begin
      if (ack) irq <= 1'b0;
      if (accept) begin
        hold_b <= wbyte;
        hold_c <= wctrl;
      end
      if (accept)    full <= 1'b1;
      else if (load) full <= 1'b0;
      if (out_tick) begin
        if (cur_valid) begin
          out_data <= cur_b[{slot, 1'b0}];
          sem_out  <= cur_c[{slot, 1'b0}];
          slot     <= slot + 1'b1;
          if (slot == 2'd3) cur_valid <= 1'b0;
        end else if (full) begin
          cur_b     <= hold_b;
          cur_c     <= hold_c;
          cur_valid <= 1'b1;
          irq       <= 1'b1;
          out_data  <= hold_b[0];
          sem_out   <= hold_c[0];
          slot      <= 2'd1;
        end else begin
          out_data <= 1'b0;
          sem_out  <= 1'b0;
        end
      end
    end
  end

endmodule
