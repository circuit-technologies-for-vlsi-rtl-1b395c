// vq_processor: general-purpose digital vector-quantization processor.
//
// Finds, among up to 128 stored template vectors, the one nearest to an
// input vector, with a choice of distance function and winner search. The
// blocks are those of the prototype:
//   * template_sram  - 4 banks x 256 rows x 256 bits; one row gives one 8-bit
//                      element to each of the 32 distance units;
//   * distance_pe x32 - Acc += (-1)^SIGN * 2^SHIFT * |IN - TMP|, with four
//                      24-bit distance registers each (128 distances);
//   * masking_unit   - 128 masking elements, block-addressed, that pass the
//                      bit-inverted distance (a similarity) or zero;
//   * wta_2dbp       - 128-input, 24-bit, 6-bits-per-clock two-dimensional
//                      bit-propagating winner-take-all (4 clocks per search);
//   * vq_controller  - instruction decoder.
//
// Distance register k of unit p is WTA input k*32 + p, so template bank k
// feeds WTA inputs 32k .. 32k+31; the returned location code is therefore
// (bank << 5) | unit. This numbering is this design's choice.
//
// Interface: templates are written a byte at a time through the tmpl_* port
// (bank, row = element index, lane = unit). Instructions go in on
// instr_valid / instr_ready. Each OP_WTA produces one res_valid pulse with
// the winner's location code and its distance (the WTA returns the
// similarity, which is inverted back). Local winner search and winner
// sorting are done by the host with OP_MASK instructions between searches.
module vq_processor
  import vq_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // template load port
  input  logic                 tmpl_we,
  input  logic [BANK_W-1:0]    tmpl_bank,
  input  logic [ROW_W-1:0]     tmpl_row,
  input  logic [$clog2(N_PE)-1:0] tmpl_lane,
  input  logic [ELEM_W-1:0]    tmpl_data,
  // instruction port
  input  logic                 instr_valid,
  input  logic [31:0]          instr,
  output logic                 instr_ready,
  // result
  output logic                 res_valid,
  output logic [LOC_W-1:0]     res_loc,
  output logic [DIST_W-1:0]    res_dist,
  // observation
  output logic [N_WTA-1:0]     mask_state,
  output logic                 stall
);

  logic                   sram_rd_en;
  logic [BANK_W-1:0]      sram_rd_bank;
  logic [ROW_W-1:0]       sram_rd_row;
  logic [SRAM_COLS-1:0]   sram_rd_data;
  pe_ctrl_t               pe_ctrl;
  logic                   mask_we;
  logic [VBB_W-1:0]       mask_code;
  logic                   mask_val;
  logic                   wta_start, wta_busy, wta_done;
  logic [DIST_W-1:0]      wta_value;

  logic [N_PE-1:0][N_DR-1:0][DIST_W-1:0] pe_dr;
  logic [N_WTA-1:0][DIST_W-1:0]          dist_w;
  logic [N_WTA-1:0][DIST_W-1:0]          sim;

  vq_controller u_ctrl (
    .clk, .rst_n,
    .instr_valid, .instr, .instr_ready,
    .sram_rd_en, .sram_rd_bank, .sram_rd_row,
    .pe_ctrl,
    .mask_we, .mask_code, .mask_val,
    .wta_start, .wta_busy,
    .stall
  );

  template_sram #(
    .N_BANK (N_BANK),
    .ROWS   (SRAM_ROWS),
    .COLS   (SRAM_COLS)
  ) u_sram (
    .clk,
    .wr_en   (tmpl_we),
    .wr_bank (tmpl_bank),
    .wr_row  (tmpl_row),
    .wr_lane (tmpl_lane),
    .wr_data (tmpl_data),
    .rd_en   (sram_rd_en),
    .rd_bank (sram_rd_bank),
    .rd_row  (sram_rd_row),
    .rd_data (sram_rd_data)
  );

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    logic [DIST_W-1:0] acc_unused;
    distance_pe u_pe (
      .clk, .rst_n,
      .ctrl  (pe_ctrl),
      .tmp   (sram_rd_data[p*ELEM_W +: ELEM_W]),
      .acc_q (acc_unused),
      .dr_q  (pe_dr[p])
    );
    for (genvar k = 0; k < N_DR; k++) begin : g_dr
      assign dist_w[k*N_PE + p] = pe_dr[p][k];
    end
  end

  masking_unit #(.N(N_WTA), .DIST_W(DIST_W)) u_mask (
    .clk, .rst_n,
    .mask_we, .mask_code, .mask_val,
    .dist_in (dist_w),
    .sim_out (sim),
    .mask_q  (mask_state)
  );

  wta_2dbp #(.N_IN(N_WTA), .W(DIST_W), .SLICE_W(SLICE_W)) u_wta (
    .clk, .rst_n,
    .start     (wta_start),
    .sim_in    (sim),
    .busy      (wta_busy),
    .done      (wta_done),
    .win_loc   (res_loc),
    .win_value (wta_value)
  );

  assign res_valid = wta_done;
  assign res_dist  = ~wta_value;

endmodule
