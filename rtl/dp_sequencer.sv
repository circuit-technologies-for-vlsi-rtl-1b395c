// dp_sequencer: phase control of the DP matching processor.
//
// One match runs in two phases. In the delay-setting phase ENABLE is high:
// the sequencer first clears every delay line for one tick (diagonal lines
// to all-unfired, horizontal / vertical lines to the skip penalty, the
// converters' lines to their values), then raises REF and holds it for
// SET_TICKS ticks, long enough for the latest possible pulse (element value
// 63 plus width 31) to end. It then drops ENABLE and REF and raises the step
// at node (0, 0) for the DP matching phase, and waits for the time-to-digital
// converter. The step stays high, and the result valid, until the next start.
// The two phases and the ENABLE, REF and step signals follow the document;
// the tick counts and the state machine are this design's choices.
//
// Ports: start (one-tick pulse, ignored while busy), tdc_done; outputs clr,
// enable, ref_o, step, done (high with a valid result), busy.
module dp_sequencer #(
  parameter int unsigned SET_TICKS = 100
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic tdc_done,
  output logic clr,
  output logic enable,
  output logic ref_o,
  output logic step,
  output logic done,
  output logic busy
);

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_SET, S_MATCH, S_DONE} state_e;
  state_e state_q;
  logic [$clog2(SET_TICKS + 1)-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE: if (start) state_q <= S_CLR;
        S_CLR: begin
          state_q <= S_SET;
          cnt_q   <= '0;
        end
        S_SET: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == ($bits(cnt_q))'(SET_TICKS - 1)) state_q <= S_MATCH;
        end
        S_MATCH: if (tdc_done) state_q <= S_DONE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    clr    = (state_q == S_CLR);
    enable = (state_q == S_CLR) || (state_q == S_SET);
    ref_o  = (state_q == S_SET);
    step   = (state_q == S_MATCH) || (state_q == S_DONE);
    done   = (state_q == S_DONE);
    busy   = (state_q == S_CLR) || (state_q == S_SET) || (state_q == S_MATCH);
  end

endmodule
