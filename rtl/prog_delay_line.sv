// prog_delay_line: programmable domino delay line of the DP matching
// processor, in a clocked form.
//
// The line is a chain of N domino elements. In this design time is counted
// in clock ticks and one domino element takes one tick to fire, so a delay
// of r elements is a delay of r clocks. An element, once fired, stays fired
// until the line is cleared; while PHI is high the first unfired element
// next to a fired one (or element 0) fires at every tick.
//
// The delay is programmed in one of two ways, as in the document:
//   * by a write pulse on PHI after a clear with preset = N: the domino runs
//     for as many ticks as the pulse is wide and stops; the unfired elements
//     left are the delay (a wide pulse gives a short delay);
//   * by the preset decoder during the clear: elements 0 .. N-preset-1 are
//     precharged as already fired, so exactly `preset` elements remain.
// When the step then arrives on PHI the domino resumes from where it stopped
// and OUT rises once the last element has fired: OUT rises exactly r ticks
// after PHI, r being the unfired count (0 ticks when r = 0).
//
// Ports: clr (synchronous clear with preset), preset (0..N elements left),
// phi (write pulse or step), out = phi AND last element fired.
module prog_delay_line #(
  parameter int unsigned N  = 32,
  parameter int unsigned PW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic [PW-1:0] preset,
  input  logic          phi,
  output logic          out,
  output logic [PW-1:0] remaining
);

  logic [N-1:0] fired;
  logic [N-1:0] pre_fired;   // decoder: elements precharged as fired

  always_comb begin
    for (int k = 0; k < N; k++)
      pre_fired[k] = (32'(k) + 32'(preset) < N);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fired <= '0;
    end else if (clr) begin
      fired <= pre_fired;
    end else if (phi) begin
      fired <= fired | {fired[N-2:0], 1'b1};
    end
  end

  assign out = phi & fired[N-1];

  // number of unfired elements, for observation
  always_comb begin
    remaining = '0;
    for (int k = 0; k < N; k++)
      remaining = remaining + PW'(~fired[k]);
  end

endmodule
