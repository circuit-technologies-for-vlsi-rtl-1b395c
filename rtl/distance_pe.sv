// distance_pe: one SIMD distance-computation unit of the VQ processor.
//
// Each accumulate step computes
//     Acc += (-1)^SIGN * 2^SHIFT * |IN - TMP|
// where IN is the input element broadcast by the controller and TMP the
// template element read from the SRAM. With SHIFT = SIGN = 0 the unit sums a
// Manhattan distance; sequences of shifted, signed steps multiply each term
// by a weight (Booth recoding halves the number of steps).
//
// The datapath is built the way the prototype builds it, with no multiplier
// and no separate absolute-value incrementer:
//   * an 8-bit adder forms IN - TMP; when the result is negative its bits are
//     inverted, which gives |IN - TMP| - 1;
//   * a 16-bit left shifter shifts that value by SHIFT, feeding '1's into the
//     vacated bits when the difference was negative, which adds 2^SHIFT - 1;
//   * the 24-bit accumulator adder adds (or, for SIGN, adds the inverse of)
//     the shifter output, and its carry-in supplies the last 1, so that
//     carry-in plus shift-in bits make up the missing 2^SHIFT.
// The accumulator wraps modulo 2^24, so intermediate negative values of a
// Booth sequence are harmless as long as the final distance is below 2^24.
//
// The unit holds four 24-bit distance registers; a store copies the
// accumulator into the selected one, so one unit serves up to four templates.
//
// Timing: clr, acc and store act at the rising clock edge; acc and clr are
// exclusive with store (store wins). tmp must be valid in the cycle acc is
// high. Reset (active low, synchronous to clk) clears the accumulator and the
// distance registers; the reset value is this design's choice.
module distance_pe
  import vq_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  pe_ctrl_t                ctrl,
  input  logic [ELEM_W-1:0]       tmp,
  output logic [DIST_W-1:0]       acc_q,
  output logic [N_DR-1:0][DIST_W-1:0] dr_q
);

  // 8-bit absolute-subtraction adder: IN + ~TMP + 1
  logic [ELEM_W:0]   diff;          // 9 bits, bit 8 = no borrow
  logic              neg;
  logic [ELEM_W-1:0] mag_m;         // |d| when positive, |d|-1 when negative

  always_comb begin
    diff  = {1'b0, ctrl.in_elem} + {1'b0, ~tmp} + 9'd1;
    neg   = ~diff[ELEM_W];
    mag_m = neg ? ~diff[ELEM_W-1:0] : diff[ELEM_W-1:0];
  end

  // 16-bit left shifter with shift-in bits
  localparam int unsigned SH_W = 16;
  logic [SH_W-1:0] shifted;
  logic [SH_W-1:0] shift_in;

  always_comb begin
    shift_in = neg ? ((SH_W'(1) << ctrl.shift) - SH_W'(1)) : '0;
    shifted  = (SH_W'(mag_m) << ctrl.shift) | shift_in;
  end

  // 24-bit accumulator adder. Value to add is shifted + cin_abs, where
  // cin_abs = neg. For SIGN: acc - (shifted + c) = acc + ~shifted + (1 - c).
  logic [DIST_W-1:0] addend;
  logic              cin;
  logic [DIST_W-1:0] acc_next;

  always_comb begin
    addend   = ctrl.sign ? ~DIST_W'(shifted) : DIST_W'(shifted);
    cin      = ctrl.sign ^ neg;
    acc_next = acc_q + addend + DIST_W'(cin);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q <= '0;
      dr_q  <= '0;
    end else if (ctrl.store) begin
      dr_q[ctrl.dr_sel] <= acc_q;
    end else if (ctrl.clr) begin
      acc_q <= '0;
    end else if (ctrl.acc) begin
      acc_q <= acc_next;
    end
  end

endmodule
