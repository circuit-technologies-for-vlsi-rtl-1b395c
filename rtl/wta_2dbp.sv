// wta_2dbp: two-dimensional bit-propagating (2DBP) winner-take-all.
//
// Finds the largest of N_IN similarity words and its location. The circuit
// is a tournament tree of log2(N_IN) stages. Each tree node is a chain of
// bit comparators (wta_bit_comparator), not a carry-look-ahead word
// comparator: comparison starts at the MSB with both STATE signals '1', the
// STATE pair ripples toward the LSB, and every BIT_OUT goes straight up to
// the same bit of the next stage. Results therefore travel two ways at once,
// along the word and up the tree, and the combinational delay grows as
// n + log N rather than n * log N.
//
// The tree resolves SLICE_W bits per clock (6 in the prototype). Wider words
// take W / SLICE_W clocks, most significant slice first (4 clocks for 24
// bits). Between clocks every node keeps its LSB STATE pair in a register
// and starts the next slice from it instead of from '1','1'; a node that has
// decided keeps its decision, a tied node goes on comparing. How slices are
// chained is this design's choice; the document only says the operation is
// repeated over several clocks.
//
// The location encoder mirrors the tree: starting from the final stage, each
// encoder stage follows the side whose final STATE is '1', preferring input 0
// when both are '1' (priority encoding on ties, lowest index wins).
//
// Interface and timing: pulse start for one clock with sim_in valid; sim_in
// must stay stable until done. done pulses NSLICE clocks after the start
// clock, together with win_loc and win_value (the winner's full word), which
// then hold until the next start. busy is high from the clock after start
// through the clock that raises done.
module wta_2dbp #(
  parameter int unsigned N_IN    = 128,
  parameter int unsigned W       = 24,
  parameter int unsigned SLICE_W = 6,
  parameter int unsigned LOC_W   = $clog2(N_IN)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [N_IN-1:0][W-1:0]  sim_in,
  output logic                    busy,
  output logic                    done,
  output logic [LOC_W-1:0]        win_loc,
  output logic [W-1:0]            win_value
);

  localparam int unsigned NSLICE = W / SLICE_W;
  localparam int unsigned L      = LOC_W;          // tournament stages
  localparam int unsigned SW     = (NSLICE > 1) ? $clog2(NSLICE) : 1;

  logic [SW-1:0]      slice_q;
  logic               first_slice;
  assign first_slice = (slice_q == '0);

  // bit offset of the current slice in a word, MSB slice first
  localparam int unsigned OW = $clog2(W);
  logic [OW-1:0] slice_off;
  assign slice_off = OW'((NSLICE - 1 - 32'(slice_q)) * SLICE_W);

  // carried node states between slices, one pair per tree node
  logic [N_IN-2:0]    sq0, sq1;
  // final (LSB) STATE pair of every node in the current slice
  logic [N_IN-2:0]    fs0, fs1;
  // bits of the final stage
  logic [SLICE_W-1:0] top_bits;

  // Node numbering: stage s holds nodes BASE(s) .. BASE(s)+(N_IN>>(s+1))-1,
  // with BASE(s) = N_IN - (N_IN >> s).

  // tournament tree of bit-comparator chains
  for (genvar s = 0; s < L; s++) begin : g_stage
    localparam int unsigned NN   = N_IN >> (s + 1);
    localparam int unsigned BASE = N_IN - (N_IN >> s);
    logic [SLICE_W-1:0] bin  [2*NN];   // bits entering this stage
    logic [SLICE_W-1:0] bout [NN];     // bits leaving this stage

    for (genvar i = 0; i < 2 * NN; i++) begin : g_in
      if (s == 0) begin : g_leaf
        // input slice selection, MSB slice first
        assign bin[i] = sim_in[i][slice_off +: SLICE_W];
      end else begin : g_inner
        assign bin[i] = g_stage[s-1].bout[i];
      end
    end

    for (genvar k = 0; k < NN; k++) begin : g_node
      logic [SLICE_W-1:0] bo;
      for (genvar b = SLICE_W - 1; b >= 0; b--) begin : g_bit
        logic si0, si1, so0, so1;
        if (b == SLICE_W - 1) begin : g_msb
          assign si0 = first_slice ? 1'b1 : sq0[BASE+k];
          assign si1 = first_slice ? 1'b1 : sq1[BASE+k];
        end else begin : g_chain
          assign si0 = g_bit[b+1].so0;
          assign si1 = g_bit[b+1].so1;
        end
        wta_bit_comparator u_bc (
          .state_in0  (si0),
          .state_in1  (si1),
          .bit_in0    (bin[2*k][b]),
          .bit_in1    (bin[2*k+1][b]),
          .state_out0 (so0),
          .state_out1 (so1),
          .bit_out    (bo[b])
        );
      end
      assign bout[k]      = bo;
      assign fs0[BASE+k]  = g_bit[0].so0;
      assign fs1[BASE+k]  = g_bit[0].so1;
    end
  end

  assign top_bits = g_stage[L-1].bout[0];

  // reflected encoder: track the winner from the final stage down; stage s
  // contributes location bit s and picks input 0 when its STATE is '1'
  for (genvar s = L - 1; s >= 0; s--) begin : g_enc
    localparam int unsigned BASE = N_IN - (N_IN >> s);
    logic [L-1:0] idx;   // winner index among the inputs of stage s
    if (s == L - 1) begin : g_root
      assign idx = L'(fs0[BASE] ? 1'b0 : 1'b1);
    end else begin : g_down
      logic [L-1:0] up;
      assign up  = g_enc[s+1].idx;
      assign idx = {up[L-2:0], ~fs0[BASE + 32'(up)]};
    end
  end

  logic [LOC_W-1:0] loc_c;
  assign loc_c = g_enc[0].idx;

  // slice sequencing
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      slice_q   <= '0;
      win_loc   <= '0;
      win_value <= '0;
      sq0       <= '1;
      sq1       <= '1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        slice_q <= '0;
        if (start) busy <= 1'b1;
      end else begin
        sq0 <= fs0;
        sq1 <= fs1;
        win_value[slice_off +: SLICE_W] <= top_bits;
        if (slice_q == SW'(NSLICE - 1)) begin
          busy    <= 1'b0;
          done    <= 1'b1;
          slice_q <= '0;
          win_loc <= loc_c;
        end else begin
          slice_q <= slice_q + 1'b1;
        end
      end
    end
  end

  // the word must split into whole slices
  initial begin
    assert (W % SLICE_W == 0) else $error("W must be a multiple of SLICE_W");
  end

endmodule
