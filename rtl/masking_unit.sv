// masking_unit: variable masking unit between the distance registers and
// the winner-take-all circuit of the VQ processor.
//
// One masking element per distance register (128 in the prototype). Each
// element has a one-bit masking register. Unmasked, it passes the bit-
// inverted distance, i.e. a similarity, so that the maximum-finding WTA
// finds the minimum distance. Masked, it passes all zeros, which the WTA
// ignores. The masking registers are written through the variable-binary-
// block decoder: one write sets or clears the registers of a whole aligned
// power-of-two block.
//
// Timing: mask_we writes at the rising edge; sim_out is combinational from
// dist_in and the registers. Reset (active low, synchronous) unmasks all
// inputs, which is this design's choice.
module masking_unit #(
  parameter int unsigned N      = 128,
  parameter int unsigned DIST_W = 24,
  parameter int unsigned AW     = $clog2(N)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         mask_we,
  input  logic [AW:0]                  mask_code,   // block address code
  input  logic                         mask_val,    // 1 = masked
  input  logic [N-1:0][DIST_W-1:0]     dist_in,
  output logic [N-1:0][DIST_W-1:0]     sim_out,
  output logic [N-1:0]                 mask_q
);

  logic [N-1:0] sel;

  vbb_decoder #(.N_TARGET(N)) u_dec (
    .code (mask_code),
    .sel  (sel)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)
      mask_q <= '0;
    else if (mask_we)
      for (int i = 0; i < N; i++)
        if (sel[i]) mask_q[i] <= mask_val;
  end

  always_comb begin
    for (int i = 0; i < N; i++)
      sim_out[i] = mask_q[i] ? '0 : ~dist_in[i];
  end

endmodule
