// sync_delay: output delay line and phase switch of the decoder.
//
// The bit synchronizer needs a whole window of decoded bits before it can
// decide which demultiplexing phase is right, so the decoded bits of both
// phases are held back by one window (WINDOW information bits, i.e. twice as
// many channel bits) before the phase switch picks one of them. Each entry
// carries the decoded bit and its message tag; the chosen entry is registered
// as the 1.2 kb/s output bit and the output S/E MESS. The source delays the
// interleaved channel-rate stream by 100 channel bits and switches between it
// and a one-bit-later copy; keeping one line per phase is the equivalent
// arrangement chosen here.
//
// Timing: line 0 shifts on en0, line 1 on en1; the output updates on
// out_tick, which is en0 or en1 according to 'phase'.
module sync_delay #(
  parameter int unsigned WINDOW = 50
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en0,
  input  logic d0,
  input  logic v0,
  input  logic en1,
  input  logic d1,
  input  logic v1,
  input  logic phase,
  input  logic out_tick,
  output logic dout,
  output logic vout
);
  typedef struct packed {
    logic d;
    logic v;
  } tagged_bit_t;

  tagged_bit_t line0 [WINDOW];
  tagged_bit_t line1 [WINDOW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WINDOW; i++) begin
        line0[i] <= '0;
        line1[i] <= '0;
      end
      dout <= 1'b0;
      vout <= 1'b0;
    end else begin
      if (en0) begin
        line0[0] <= '{d: d0, v: v0};
        for (int i = 1; i < WINDOW; i++) line0[i] <= line0[i-1];
      end
      if (en1) begin
        line1[0] <= '{d: d1, v: v1};
        for (int i = 1; i < WINDOW; i++) line1[i] <= line1[i-1];
      end
      if (out_tick) begin
        dout <= phase ? line1[WINDOW-1].d : line0[WINDOW-1].d;
        vout <= phase ? line1[WINDOW-1].v : line0[WINDOW-1].v;
      end
    end
  end

endmodule
