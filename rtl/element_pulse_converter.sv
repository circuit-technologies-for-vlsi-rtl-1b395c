// element_pulse_converter: turns a vector element into a timing pulse.
//
// Holds a 6-bit element value register and two programmable delay lines.
// The 64-element position line is preset to the element value; the
// 32-element width line is preset to a pulse width shared by all converters.
// When the common reference REF rises, the position line's output rises v
// ticks later and starts the width line, whose output rises another w ticks
// later. The pulse is (position output AND NOT width output): it is high for
// w ticks starting v ticks after REF. Two such pulses ANDed together overlap
// for max(0, w - |v1 - v2|) ticks, which is how element mismatch is turned
// into a write-pulse width.
//
// Ports: load/load_val write the element register; clr clears both lines
// (and presets them); ref_i is REF; pulse is the output. Timing: with REF
// rising in tick t0 the pulse is high in ticks t0+v .. t0+v+w-1.
module element_pulse_converter #(
  parameter int unsigned ELEM_W = 6,
  parameter int unsigned WID_W  = 5,
  parameter int unsigned POS_N  = 64,
  parameter int unsigned WID_N  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ELEM_W-1:0] load_val,
  input  logic [WID_W-1:0]  width,
  input  logic              clr,
  input  logic              ref_i,
  output logic              pulse,
  output logic [ELEM_W-1:0] value_q
);

  localparam int unsigned PPW = $clog2(POS_N + 1);
  localparam int unsigned WPW = $clog2(WID_N + 1);

  logic pos_out, wid_out;
  logic [PPW-1:0] pos_rem;
  logic [WPW-1:0] wid_rem;

  always_ff @(posedge clk) begin
    if (!rst_n)    value_q <= '0;
    else if (load) value_q <= load_val;
  end

  prog_delay_line #(.N(POS_N)) u_pos (
    .clk, .rst_n, .clr,
    .preset    (PPW'(value_q)),
    .phi       (ref_i),
    .out       (pos_out),
    .remaining (pos_rem)
  );

  prog_delay_line #(.N(WID_N)) u_wid (
    .clk, .rst_n, .clr,
    .preset    (WPW'(width)),
    .phi       (pos_out),
    .out       (wid_out),
    .remaining (wid_rem)
  );

  assign pulse = pos_out & ~wid_out;

endmodule
