// dp_matching_processor: dynamic-programming (DP) sequence matcher built
// from delay-encoding logic.
//
// The processor compares two 16-element vectors of 6-bit elements, an input
// X and a template T, allowing elements to be skipped or shifted, and
// returns the penalty of the best alignment. All signals are digital levels;
// the arithmetic happens in time. Each element value is turned into the
// position of a pulse (element_pulse_converter); ANDing the pulses of T[i]
// and X[j] gives a write pulse whose width falls as their difference grows,
// and that pulse programs the diagonal delay line between nodes (i, j) and
// (i+1, j+1) of the network (dp_network). Horizontal and vertical lines hold
// a constant skip penalty. A step launched into node (0, 0) then reaches
// node (16, 16) first along the path of least total delay, and the
// time-to-digital converter (tdc) turns that arrival time into a code.
//
// In this clocked version one domino element is one clock tick, so with
// pulse width w and skip penalty p the result, before the converter's
// offset, is the DP recurrence over
//     diag(i,j) = 32 - max(0, w - |T[i] - X[j]|),  H = V = p.
//
// Ports: x_we / t_we with elem_idx, elem_val load the element registers;
// pulse_width (5 bits, common to all converters), skip_pen (4 bits) and
// tdc_offset configure a match; start runs one; enable_o is high in the
// delay-setting phase, step_o in the matching phase; goal_o is the step
// arriving at the last node; done and score give the result.
module dp_matching_processor #(
  parameter int unsigned N      = 16,
  parameter int unsigned ELEM_W = 6,
  parameter int unsigned WID_W  = 5,
  parameter int unsigned PEN_W  = 4,
  parameter int unsigned DIAG_N = 32,
  parameter int unsigned HV_N   = 16,
  parameter int unsigned POS_N  = 64,
  parameter int unsigned WID_N  = 32,
  parameter int unsigned CODE_W = 8,
  parameter int unsigned OFF_W  = 10,
  parameter int unsigned DPW    = $clog2(DIAG_N + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // element registers
  input  logic                    x_we,
  input  logic                    t_we,
  input  logic [$clog2(N)-1:0]    elem_idx,
  input  logic [ELEM_W-1:0]       elem_val,
  // configuration
  input  logic [WID_W-1:0]        pulse_width,
  input  logic [PEN_W-1:0]        skip_pen,
  input  logic [OFF_W-1:0]        tdc_offset,
  // control and result
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic [CODE_W-1:0]       score,
  output logic                    enable_o,
  output logic                    step_o,
  output logic                    goal_o,
  output logic [N-1:0][N-1:0][DPW-1:0] diag_delay
);

  logic clr, enable, ref_s, step, goal, tdc_done;
  logic [N-1:0] pulse_x, pulse_t;

  dp_sequencer #(.SET_TICKS(POS_N + WID_N + 4)) u_seq (
    .clk, .rst_n, .start, .tdc_done,
    .clr, .enable, .ref_o (ref_s), .step, .done, .busy
  );

  for (genvar e = 0; e < N; e++) begin : g_epc
    logic [ELEM_W-1:0] xv, tv;
    element_pulse_converter #(
      .ELEM_W(ELEM_W), .WID_W(WID_W), .POS_N(POS_N), .WID_N(WID_N)
    ) u_x (
      .clk, .rst_n,
      .load     (x_we && elem_idx == e),
      .load_val (elem_val),
      .width    (pulse_width),
      .clr,
      .ref_i    (ref_s),
      .pulse    (pulse_x[e]),
      .value_q  (xv)
    );
    element_pulse_converter #(
      .ELEM_W(ELEM_W), .WID_W(WID_W), .POS_N(POS_N), .WID_N(WID_N)
    ) u_t (
      .clk, .rst_n,
      .load     (t_we && elem_idx == e),
      .load_val (elem_val),
      .width    (pulse_width),
      .clr,
      .ref_i    (ref_s),
      .pulse    (pulse_t[e]),
      .value_q  (tv)
    );
  end

  dp_network #(
    .N(N), .DIAG_N(DIAG_N), .HV_N(HV_N), .PEN_W(PEN_W)
  ) u_net (
    .clk, .rst_n, .clr, .enable,
    .pulse_x, .pulse_t, .skip_pen,
    .step, .goal, .diag_delay
  );

  tdc #(.CODE_W(CODE_W), .OFF_W(OFF_W)) u_tdc (
    .clk, .rst_n,
    .start  (step),
    .stop   (goal),
    .offset (tdc_offset),
    .code   (score),
    .done   (tdc_done)
  );

  assign enable_o = enable;
  assign step_o   = step;
  assign goal_o   = goal;

endmodule
