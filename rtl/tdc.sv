// tdc: time-to-digital converter of the DP matching processor.
//
// Counts clock ticks from the rising step at the start of the matching
// phase until the step reaches the goal node. The count is encoded while the
// step travels and freezes when it arrives. The code has 2^CODE_W levels
// (256) and saturates at the top level, which also ends the conversion. An
// offset of `offset` ticks is skipped before counting begins, so that the
// 256-level window can be placed above the delay that every path has; the
// offset is this design's addition.
//
// Timing: with start (the step) rising in tick t0 and stop rising in tick
// t0+D, code = clamp(D - offset, 0, 2^CODE_W - 1) from tick t0+D on, and
// done is high from then until start falls. Clearing happens while start is
// low.
module tdc #(
  parameter int unsigned CODE_W = 8,
  parameter int unsigned OFF_W  = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              stop,
  input  logic [OFF_W-1:0]  offset,
  output logic [CODE_W-1:0] code,
  output logic              done
);

  logic [OFF_W-1:0] pre_q;
  logic             sat;

  assign sat  = &code;
  assign done = start & (stop | sat);

  always_ff @(posedge clk) begin
    if (!rst_n || !start) begin
      pre_q <= '0;
      code  <= '0;
    end else if (!done) begin
      if (pre_q != offset) pre_q <= pre_q + 1'b1;
      else                 code  <= code + 1'b1;
    end
  end

endmodule
