// tb_vq_controller: self-checking test of the instruction decoder. Issues
// each opcode and checks the SRAM read in the accept cycle, the decoded
// control one cycle later, and the stall of the instruction port while a
// winner search is being started and while the WTA reports busy.
module tb_vq_controller;
  import vq_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0;
  logic instr_valid = 0;
  logic [31:0] instr;
  logic instr_ready;
  logic sram_rd_en;
  logic [1:0] sram_rd_bank;
  logic [7:0] sram_rd_row;
  pe_ctrl_t pe_ctrl;
  logic mask_we;
  logic [7:0] mask_code;
  logic mask_val;
  logic wta_start;
  logic wta_busy = 0;
  logic stall;

  vq_controller dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] mk(opcode_e op, int bank, int row, int inv,
                                     int sh, int sg);
    instr_t t;
    t = '0; t.op = op; t.bank = 2'(bank); t.row = 8'(row);
    t.in_elem = 8'(inv); t.shift = 3'(sh); t.sign = 1'(sg);
    return 32'(t);
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    instr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // OP_ACC: SRAM read now, accumulate next cycle
    instr_valid = 1; instr = mk(OP_ACC, 2, 77, 200, 5, 1);
    #1;
    chk(instr_ready && sram_rd_en && sram_rd_bank == 2 && sram_rd_row == 77, "acc read");
    @(negedge clk);
    instr = mk(OP_STORE, 3, 0, 0, 0, 0);
    #1;
    chk(!sram_rd_en, "no read for store");
    chk(pe_ctrl.acc && !pe_ctrl.clr && !pe_ctrl.store && pe_ctrl.in_elem == 200 &&
        pe_ctrl.shift == 5 && pe_ctrl.sign, "acc decode");
    @(negedge clk);
    instr = mk(OP_CLR, 0, 0, 0, 0, 0);
    #1;
    chk(pe_ctrl.store && pe_ctrl.dr_sel == 3 && !pe_ctrl.acc, "store decode");
    @(negedge clk);
    instr = mk(OP_MASK, 1, 20, 0, 0, 0);
    #1;
    chk(pe_ctrl.clr && !pe_ctrl.acc, "clr decode");
    @(negedge clk);
    instr = mk(OP_WTA, 0, 0, 0, 0, 0);
    #1;
    chk(mask_we && mask_code == 20 && mask_val, "mask decode");
    @(negedge clk);
    instr = mk(OP_NOP, 0, 0, 0, 0, 0);
    #1;
    chk(wta_start, "wta start");
    chk(!instr_ready && stall, "stall while wta starts");
    @(negedge clk);
    wta_busy = 1;
    #1;
    chk(!wta_start && !instr_ready && stall, "stall while busy");
    repeat (3) @(negedge clk);
    wta_busy = 0;
    #1;
    chk(instr_ready && !stall, "ready after wta");
    @(negedge clk);
    instr_valid = 0;
    #1;
    chk(!pe_ctrl.acc && !pe_ctrl.clr && !pe_ctrl.store && !mask_we && !wta_start, "nop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
