// tb_distance_pe: self-checking test of one distance-computation unit.
// Drives random Manhattan sums and random weighted (shift / sign) sequences
// and compares the accumulator and the four distance registers with a
// reference computed as Acc += (-1)^SIGN * 2^SHIFT * |IN - TMP| mod 2^24.
module tb_distance_pe;
  import vq_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0;
  pe_ctrl_t ctrl;
  logic [7:0] tmp;
  logic [23:0] acc_q;
  logic [3:0][23:0] dr_q;

  distance_pe dut (.*);

  logic [23:0] ref_acc;
  logic [23:0] ref_dr [4];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_acc(input logic [7:0] a, input logic [7:0] t,
                          input logic [2:0] sh, input logic sg);
    int d;
    @(negedge clk);
    ctrl = '0; ctrl.acc = 1; ctrl.in_elem = a; ctrl.shift = sh; ctrl.sign = sg;
    tmp = t;
    d = (int'(a) > int'(t)) ? int'(a) - int'(t) : int'(t) - int'(a);
    if (sg) ref_acc = ref_acc - 24'(d << sh);
    else    ref_acc = ref_acc + 24'(d << sh);
    @(negedge clk);
    ctrl = '0;
    checks++;
    if (acc_q !== ref_acc) begin
      failures++;
      $display("acc mismatch in=%0d tmp=%0d sh=%0d sg=%0d got %0d exp %0d",
               a, t, sh, sg, acc_q, ref_acc);
    end
  endtask

  task automatic do_clr();
    @(negedge clk); ctrl = '0; ctrl.clr = 1; ref_acc = 0;
    @(negedge clk); ctrl = '0;
  endtask

  task automatic do_store(input int k);
    @(negedge clk); ctrl = '0; ctrl.store = 1; ctrl.dr_sel = 2'(k);
    ref_dr[k] = ref_acc;
    @(negedge clk); ctrl = '0;
  endtask

  initial begin
    ctrl = '0; tmp = 0; ref_acc = 0;
    for (int k = 0; k < 4; k++) ref_dr[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // edge cases
    step_acc(8'd0, 8'd255, 3'd0, 1'b0);
    step_acc(8'd255, 8'd0, 3'd7, 1'b0);
    step_acc(8'd10, 8'd10, 3'd5, 1'b1);
    step_acc(8'd3, 8'd200, 3'd7, 1'b1);
    do_clr();
    for (int k = 0; k < 4; k++) begin
      // Manhattan distance over 64 elements
      for (int e = 0; e < 64; e++) step_acc(8'($urandom), 8'($urandom), 3'd0, 1'b0);
      // weighted terms: weight 7 = 8 - 1 (Booth), weight 3 = 4 - 1
      for (int e = 0; e < 16; e++) begin
        logic [7:0] a, t;
        a = 8'($urandom); t = 8'($urandom);
        step_acc(a, t, 3'd0, 1'b1);
        step_acc(a, t, 3'd3, 1'b0);
        step_acc(8'($urandom), 8'($urandom), 3'($urandom), 1'($urandom));
      end
      do_store(k);
      do_clr();
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (dr_q[k] !== ref_dr[k]) begin
        failures++;
        $display("DR%0d mismatch got %0d exp %0d", k, dr_q[k], ref_dr[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
