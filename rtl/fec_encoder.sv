// fec_encoder: encoder board of the hardwired diffuse-code codec.
//
// Information bits arrive at 1.2 kb/s with a level signal S/E MESS that is
// high while the input carries message data. Each information bit is shifted
// into the parity generator (3*beta+1 stages, cleared between messages) and
// the information and parity bits are multiplexed into the 2.4 kb/s channel
// stream: information bit in the first half of each information period,
// parity bit in the second. When S/E MESS falls, zeros are fed into the
// information slots until the last message bit has passed the whole parity
// register (3*beta+1 slots), so every parity bit that depends on the message
// is sent. With the parity delay switched in, each parity bit is sent two
// channel bits later (one more zero slot closes the message). The output
// S/E MESS is high over exactly the channel bits of the coded message,
// overhead included. The channel clock comes from a clock doubler standing in
// for the PLL.
//
// The source gives the parity generator, the zero fill, the parity delay and
// the block structure (parity generator, parity bit delay, S/E message logic,
// PLL, multiplexer). The strobe-based timing, the one idle information slot
// forced after each message (the decoder relies on S/E MESS going low to
// clear its registers) and dropping input data that arrives during the zero
// fill are this design's choices.
//
// Timing: all state changes on clk. info_tick is the 1.2 kHz strobe; data_in
// and sem_in are sampled on it. chan_tick (output) marks every 2.4 kHz slot;
// chan_data and sem_out are registered and change only on chan_tick.
// The closing assertion (every data strobe is also a channel strobe) is
// disabled during reset; that clause is a synchronous use of rst_n, which is
// why lint reports rst_n as both an asynchronous and a synchronous signal.
// No logic uses it synchronously.
module fec_encoder
  import fec_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      info_tick,   // 1.2 kHz data clock strobe
  input  logic      data_in,     // 1.2 kb/s information bit
  input  logic      sem_in,      // S/E MESS: message data present
  input  beta_sel_e beta_sel,    // shift register length control
  input  logic      pdly_en,     // parity bit delay control (0 or 2 bits)
  output logic      chan_tick,   // 2.4 kHz channel clock strobe
  output logic      chan_data,   // 2.4 kb/s coded stream
  output logic      sem_out,     // S/E MESS for the coded stream
  output logic      pll_locked
);
  typedef enum logic [1:0] {ENC_IDLE, ENC_MSG, ENC_FLUSH} enc_state_e;

  enc_state_e  state;
  logic [6:0]  flush_left;      // zero-fill slots still to send
  logic        info_bit;        // bit entering the register this period
  logic        shift_en;
  logic        clr;
  logic        parity;
  logic        p_reg;           // parity bit of the current period
  logic        p_dly;           // parity bit of the previous period
  logic        active;          // this period is part of the coded message
  logic        unused_tail;

  clock_doubler u_pll (
    .clk, .rst_n,
    .ref_tick (info_tick),
    .out_tick (chan_tick),
    .locked   (pll_locked)
  );

  // S/E message logic: what happens in this information period.
  always_comb begin
    active   = 1'b0;
    info_bit = 1'b0;
    unique case (state)
      ENC_IDLE:  begin active = sem_in;              info_bit = sem_in & data_in; end
      ENC_MSG:   begin active = 1'b1;                info_bit = sem_in & data_in; end
      ENC_FLUSH: begin active = (flush_left != '0);  info_bit = 1'b0;             end
      default:   ;
    endcase
    shift_en = info_tick && active;
    clr      = info_tick && !active;
  end

  diffuse_parity_gen u_pgen (
    .clk, .rst_n,
    .clr, .en (shift_en),
    .beta_sel,
    .din    (info_bit),
    .parity (parity),
    .tail   (unused_tail)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ENC_IDLE;
      flush_left <= '0;
    end else if (info_tick) begin
      unique case (state)
        ENC_IDLE: if (sem_in) state <= ENC_MSG;
        ENC_MSG:  if (!sem_in) begin
          // this period is the first zero-fill slot
          state      <= ENC_FLUSH;
          flush_left <= 7'(flush_len(beta_sel, pdly_en) - 1);
        end
        ENC_FLUSH: begin
          if (flush_left == '0) state <= ENC_IDLE;
          else                  flush_left <= flush_left - 1'b1;
        end
        default: state <= ENC_IDLE;
      endcase
    end
  end

  // Parity bit delay and output multiplexer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_reg     <= 1'b0;
      p_dly     <= 1'b0;
      chan_data <= 1'b0;
      sem_out   <= 1'b0;
    end else if (chan_tick) begin
      p_dly <= p_reg;
      if (info_tick) begin
        p_reg     <= active ? parity : 1'b0;
        chan_data <= info_bit;
        sem_out   <= active;
      end else begin
        chan_data <= pdly_en ? p_dly : p_reg;
      end
    end
  end

  // Every data strobe must also be a channel strobe.
  assert property (@(posedge clk) disable iff (!rst_n) info_tick |-> chan_tick);

endmodule
