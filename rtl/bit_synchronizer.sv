// bit_synchronizer: detects a lost channel bit and picks the demultiplexing
// phase that makes sense.
//
// If the receiver drops one channel bit, information and parity bits swap
// places and the decoder starts to "correct" a large share of the bits. The
// decoder therefore runs two syndrome decoders, one on each phase of the
// channel stream (phase 0: the bit after message start is information;
// phase 1: the stream taken one channel bit later). This block counts the
// corrections each phase makes over windows of WINDOW information bits. At
// the end of a window, if the phase in use made at least THRESH corrections
// and the other made fewer than THRESH, the decoder is switched to the other
// phase. The output data is delayed by one window (elsewhere) so the decision
// covers the very bits it was based on.
//
// Window 50 and threshold 4 are the source's numbers; reading the rule as
// "switch when the current phase reaches the threshold and the other stays
// below it" combines the source's two statements of it. Counting on the phase
// 0 strobe, and returning to phase 0 at each message start, are this design's
// choices.
//
// Timing: en0/en1 are the strobes at which the two decoders deliver a bit,
// corr0/corr1 their correction flags. 'phase' is registered and changes only
// at a window end; 'switched' pulses for one clock when it does.
module bit_synchronizer #(
  parameter int unsigned WINDOW = 50,
  parameter int unsigned THRESH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,        // message start: back to phase 0, empty counters
  input  logic en0,
  input  logic corr0,
  input  logic en1,
  input  logic corr1,
  output logic phase,      // 0 or 1: phase whose decoded bits are delivered
  output logic switched
);
  localparam int unsigned CW = $clog2(WINDOW + 1);

  logic [CW-1:0] pos;          // information bits seen in this window (phase 0)
  logic [CW-1:0] cnt0, cnt1;   // corrections in this window, saturating
  logic [CW-1:0] c0_now, c1_now;
  logic          win_end;
  logic          cur_bad, alt_ok;

  always_comb begin
    c0_now  = (en0 && corr0 && cnt0 != CW'(WINDOW)) ? cnt0 + 1'b1 : cnt0;
    c1_now  = (en1 && corr1 && cnt1 != CW'(WINDOW)) ? cnt1 + 1'b1 : cnt1;
    win_end = en0 && (pos == CW'(WINDOW - 1));
    cur_bad = phase ? (c1_now >= CW'(THRESH)) : (c0_now >= CW'(THRESH));
    alt_ok  = phase ? (c0_now <  CW'(THRESH)) : (c1_now <  CW'(THRESH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos      <= '0;
      cnt0     <= '0;
      cnt1     <= '0;
      phase    <= 1'b0;
      switched <= 1'b0;
    end else if (clr) begin
      pos      <= '0;
      cnt0     <= '0;
      cnt1     <= '0;
      phase    <= 1'b0;
      switched <= 1'b0;
    end else begin
      switched <= 1'b0;
      if (win_end) begin
        pos  <= '0;
        cnt0 <= '0;
        cnt1 <= '0;
        if (cur_bad && alt_ok) begin
          phase    <= ~phase;
          switched <= 1'b1;
        end
      end else begin
        if (en0) pos <= pos + 1'b1;
        cnt0 <= c0_now;
        cnt1 <= c1_now;
      end
    end
  end

  initial assert (THRESH >= 1 && THRESH <= WINDOW)
    else $error("THRESH must lie in 1..WINDOW");

endmodule
