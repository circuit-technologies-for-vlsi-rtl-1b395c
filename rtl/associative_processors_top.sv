// associative_processors_top: the two digital associative processors side
// by side.
//
// vq_processor is the general-purpose vector-quantization engine: 32 SIMD
// distance units over a 32 KB template SRAM, block-addressed masking and a
// 128-input two-dimensional bit-propagating winner-take-all. It answers
// "which stored template is nearest to this vector" with programmable
// distance weighting and winner-search options.
//
// dp_matching_processor is the delay-encoding-logic DP matcher for two
// 16-element sequences: it answers "how well do these sequences match when
// elements may be skipped or shifted".
//
// The two share only clock and reset; each keeps its own ports, prefixed
// vq_ and dp_. See the two modules for their interfaces and timing.
module associative_processors_top
  import vq_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // ---- VQ processor ----
  input  logic                   vq_tmpl_we,
  input  logic [BANK_W-1:0]      vq_tmpl_bank,
  input  logic [ROW_W-1:0]       vq_tmpl_row,
  input  logic [$clog2(N_PE)-1:0] vq_tmpl_lane,
  input  logic [ELEM_W-1:0]      vq_tmpl_data,
  input  logic                   vq_instr_valid,
  input  logic [31:0]            vq_instr,
  output logic                   vq_instr_ready,
  output logic                   vq_res_valid,
  output logic [LOC_W-1:0]       vq_res_loc,
  output logic [DIST_W-1:0]      vq_res_dist,
  output logic [N_WTA-1:0]       vq_mask_state,
  output logic                   vq_stall,
  // ---- DP matching processor ----
  input  logic                   dp_x_we,
  input  logic                   dp_t_we,
  input  logic [3:0]             dp_elem_idx,
  input  logic [5:0]             dp_elem_val,
  input  logic [4:0]             dp_pulse_width,
  input  logic [3:0]             dp_skip_pen,
  input  logic [9:0]             dp_tdc_offset,
  input  logic                   dp_start,
  output logic                   dp_busy,
  output logic                   dp_done,
  output logic [7:0]             dp_score,
  output logic                   dp_enable,
  output logic                   dp_step,
  output logic                   dp_goal,
  output logic [15:0][15:0][5:0] dp_diag_delay
);

  vq_processor u_vq (
    .clk, .rst_n,
    .tmpl_we     (vq_tmpl_we),
    .tmpl_bank   (vq_tmpl_bank),
    .tmpl_row    (vq_tmpl_row),
    .tmpl_lane   (vq_tmpl_lane),
    .tmpl_data   (vq_tmpl_data),
    .instr_valid (vq_instr_valid),
    .instr       (vq_instr),
    .instr_ready (vq_instr_ready),
    .res_valid   (vq_res_valid),
    .res_loc     (vq_res_loc),
    .res_dist    (vq_res_dist),
    .mask_state  (vq_mask_state),
    .stall       (vq_stall)
  );

  dp_matching_processor u_dp (
    .clk, .rst_n,
    .x_we        (dp_x_we),
    .t_we        (dp_t_we),
    .elem_idx    (dp_elem_idx),
    .elem_val    (dp_elem_val),
    .pulse_width (dp_pulse_width),
    .skip_pen    (dp_skip_pen),
    .tdc_offset  (dp_tdc_offset),
    .start       (dp_start),
    .busy        (dp_busy),
    .done        (dp_done),
    .score       (dp_score),
    .enable_o    (dp_enable),
    .step_o      (dp_step),
    .goal_o      (dp_goal),
    .diag_delay  (dp_diag_delay)
  );

endmodule
