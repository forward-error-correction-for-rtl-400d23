// clock_doubler: digital stand-in for the encoder's phase-locked loop, which
// turns the 1.2 kHz data clock into the 2.4 kHz channel clock.
//
// All of the codec runs on one fast system clock; the bit clocks are one-cycle
// strobes. This block measures the spacing of the incoming reference strobes
// in system-clock cycles and emits an output strobe on every reference strobe
// and a second one half a period later, so the output runs at twice the
// reference rate and stays phase-aligned to it. 'locked' rises once a full
// reference period has been measured; before that only the reference strobes
// pass. The period-measuring method is this design's own: the source only
// names a PLL and its two frequencies.
//
// Timing: out_tick is combinational on the reference edge and registered-count
// based for the mid-period edge. The reference period must be at least 4
// system clocks and shorter than 2**CNT_W.
module clock_doubler #(
  parameter int unsigned CNT_W = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_tick,   // 1.2 kHz strobe
  output logic out_tick,   // 2.4 kHz strobe, every other one coincides with ref_tick
  output logic locked
);
  logic [CNT_W-1:0] cnt;      // cycles since the last reference strobe
  logic [CNT_W-1:0] period;   // last measured period
  logic             seen;     // a reference strobe has been seen
  logic             mid_tick;

  assign mid_tick = locked && !ref_tick && (cnt + 1'b1 == (period >> 1));
  assign out_tick = ref_tick || mid_tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      period <= '0;
      seen   <= 1'b0;
      locked <= 1'b0;
    end else if (ref_tick) begin
      if (seen) begin
        period <= cnt + 1'b1;
        locked <= 1'b1;
      end
      seen <= 1'b1;
      cnt  <= '0;
    end else if (cnt != '1) begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
