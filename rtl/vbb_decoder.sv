// vbb_decoder: variable-binary-block address decoder of the masking unit.
//
// A code of LOG2(N_TARGET)+1 bits selects an aligned block of targets whose
// size is a power of two. The position p of the lowest '1' in the code gives
// the block size 2^p; the code with that bit cleared, shifted right by one,
// is the first target of the block. For 16 targets, code 20 (10100b) selects
// targets 8..11. Code 0 selects nothing (this design's choice).
//
// Structure, as in the document's decoder: a "don't care" generator turns the
// block size into flags D[b] (1 for target address bits below p), a
// predecoder takes the upper code bits, and each target's AND decoder
// requires every address bit b to match code bit b+1 unless D[b] is set.
// Purely combinational, constant depth in the number of targets.
module vbb_decoder #(
  parameter int unsigned N_TARGET = 128,
  parameter int unsigned AW       = $clog2(N_TARGET)
) (
  input  logic [AW:0]         code,
  output logic [N_TARGET-1:0] sel
);

  logic [AW-1:0] dc;        // don't-care flags for target address bits
  logic [AW-1:0] pre;       // predecoded upper address bits
  logic          any_one;

  // don't-care generator: D[b] = no '1' in code[b:0]
  always_comb begin
    logic seen;
    seen = 1'b0;
    for (int b = 0; b < AW; b++) begin
      seen  = seen | code[b];
      dc[b] = ~seen;
    end
    any_one = |code;
    pre     = code[AW:1];
  end

  // main decoder: one AND per target
  always_comb begin
    for (int t = 0; t < N_TARGET; t++) begin
      logic hit;
      hit = any_one;
      for (int b = 0; b < AW; b++)
        hit = hit & (dc[b] | (pre[b] == t[b]));
      sel[t] = hit;
    end
  end

endmodule
