// mp_serial_in: serial-to-parallel input port of the microprocessor codec
// interface (one for the encoder input, one for the decoder input).
//
// Bits arriving while S/E MESS is high are collected eight at a time. A
// counter finds the 8th bit slot; at that point the data byte and a control
// byte, with a 1 in every position that holds a valid message bit, are
// latched for the processor and an interrupt is raised. If the message ends
// inside a byte, the remaining slots are clocked in as zeros with control 0,
// so the processor learns where the last valid bit is. The processor clears
// the interrupt with 'ack' after reading; a byte arriving before that sets
// 'overrun'. The source gives the byte collection, the control byte and the
// interrupt on the 8th bit; bit order (first bit in bit 0), the acknowledge
// and the overrun flag are this design's choices.
//
// Timing: bit_tick strobes each serial bit; din and sem are sampled on it.
// data/ctrl/irq change on the clock edge of the 8th slot.
module mp_serial_in (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_tick,
  input  logic       din,
  input  logic       sem,        // S/E MESS
  input  logic       ack,        // processor has read the byte
  output logic [7:0] data,
  output logic [7:0] ctrl,
  output logic       irq,
  output logic       overrun
);
  logic [6:0] sh_d, sh_c;   // bits collected so far (slots 0..6)
  logic [2:0] slot;         // next bit position
  logic       busy;         // a byte is being collected
  logic       take;

  assign take = bit_tick && (sem || busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_d <= '0; sh_c <= '0; slot <= '0; busy <= 1'b0;
      data <= '0; ctrl <= '0; irq <= 1'b0; overrun <= 1'b0;
    end else begin
      if (ack) irq <= 1'b0;
      if (take) begin
        if (slot == 3'd7) begin
          data    <= {sem & din, sh_d};
          ctrl    <= {sem,       sh_c};
          irq     <= 1'b1;
          overrun <= overrun | (irq & ~ack);
          sh_d    <= '0;
          sh_c    <= '0;
          busy    <= 1'b0;
        end else begin
          sh_d[slot] <= sem & din;
          sh_c[slot] <= sem;
          busy       <= 1'b1;
        end
        slot <= slot + 1'b1;
      end
    end
  end

endmodule
