// vq_controller: instruction decoder and sequencer of the VQ processor.
//
// Instructions arrive on a valid/ready port, one 32-bit word per accepted
// cycle (format in vq_pkg). The controller drives the template SRAM read
// port directly from the accepted word and passes everything else through
// one pipeline register, so that the distance units see the control of an
// OP_ACC in the same cycle as the SRAM row it fetched, and so that clears,
// stores, mask writes and winner searches take effect in program order.
//
// OP_WTA starts the winner-take-all from the pipeline register. While the
// search runs (and in the cycle it is being started) instr_ready is low: the
// host is stalled, since a store or mask write would change the WTA inputs
// mid-search. The instruction set, the pipeline and the stall rule are this
// design's own; the processor is only described as decoding instructions
// and controlling the other blocks.
//
// Timing: an OP_ACC accepted in cycle t reads the SRAM in t and accumulates
// at the end of t+1. OP_CLR / OP_STORE / OP_MASK act at the end of t+1.
// sram_rd_bank and sram_rd_row are therefore wires from the instruction
// word, not registers: the SRAM itself is the first pipeline stage.
// OP_WTA pulses wta_start in t+1; the result follows NSLICE clocks later.
module vq_controller
  import vq_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // instruction port
  input  logic               instr_valid,
  input  logic [31:0]        instr,
  output logic               instr_ready,
  // template SRAM read port
  output logic               sram_rd_en,
  output logic [BANK_W-1:0]  sram_rd_bank,
  output logic [ROW_W-1:0]   sram_rd_row,
  // distance units
  output pe_ctrl_t           pe_ctrl,
  // masking unit
  output logic               mask_we,
  output logic [VBB_W-1:0]   mask_code,
  output logic               mask_val,
  // winner-take-all
  output logic               wta_start,
  input  logic               wta_busy,
  // activity counters for observation
  output logic               stall
);

  instr_t  ins;
  logic    accept;
  instr_t  pipe_q;
  logic    pipe_v_q;

  assign ins         = instr_t'(instr);
  assign instr_ready = ~(wta_busy | (pipe_v_q & (pipe_q.op == OP_WTA)));
  assign accept      = instr_valid & instr_ready;
  assign stall       = instr_valid & ~instr_ready;

  // SRAM read issued in the accept cycle
  assign sram_rd_en   = accept & (ins.op == OP_ACC);
  assign sram_rd_bank = BANK_W'(ins.bank);
  assign sram_rd_row  = ROW_W'(ins.row);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pipe_v_q <= 1'b0;
      pipe_q   <= '0;
    end else begin
      pipe_v_q <= accept;
      if (accept) pipe_q <= ins;
    end
  end

  // decode of the pipeline stage
  always_comb begin
    pe_ctrl         = '0;
    pe_ctrl.in_elem = pipe_q.in_elem;
    pe_ctrl.shift   = pipe_q.shift;
    pe_ctrl.sign    = pipe_q.sign;
    pe_ctrl.dr_sel  = pipe_q.bank;
    mask_code       = VBB_W'(pipe_q.row);
    mask_val        = pipe_q.bank[0];
    mask_we         = 1'b0;
    wta_start       = 1'b0;
    if (pipe_v_q) begin
      unique case (pipe_q.op)
        OP_CLR:   pe_ctrl.clr   = 1'b1;
        OP_ACC:   pe_ctrl.acc   = 1'b1;
        OP_STORE: pe_ctrl.store = 1'b1;
        OP_MASK:  mask_we       = 1'b1;
        OP_WTA:   wta_start     = 1'b1;
        default:  ;
      endcase
    end
  end

endmodule
