// tb_dp_shift_workload: the simple-sequence experiment on the DP matching
// processor at full size. Input and template are 16-element vectors that
// are zero except two elements of value 63, three apart; the template's pair
// is shifted by 0..6 positions. The DP score must equal the reference, be
// smallest at shift 0 and never fall as the shift grows, for several skip
// penalties. The same vectors are also matched with the largest skip
// penalty (15), the setting used to approach element-to-element matching.
module tb_dp_shift_workload;
  import dp_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, x_we = 0, t_we = 0, start = 0;
  logic [3:0] elem_idx;
  logic [5:0] elem_val;
  logic [4:0] pulse_width;
  logic [3:0] skip_pen;
  logic [9:0] tdc_offset;
  logic busy, done, enable_o, step_o, goal_o;
  logic [7:0] score;
  logic [15:0][15:0][5:0] diag_delay;

  dp_matching_processor dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t x, t;
    elem_idx = 0; elem_val = 0; pulse_width = 31; skip_pen = 2; tdc_offset = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (x[e]) x[e] = 0;
    x[4] = 63; x[7] = 63;
    for (int e = 0; e < 16; e++) begin
      @(negedge clk); x_we = 1; elem_idx = 4'(e); elem_val = 6'(x[e]);
    end
    @(negedge clk); x_we = 0;
    for (int pi = 0; pi < 3; pi++) begin
      int p, prev;
      p = (pi == 0) ? 2 : (pi == 1 ? 4 : 15);
      prev = -1;
      for (int s = 0; s <= 6; s++) begin
        int expd, donly;
        foreach (t[e]) t[e] = 0;
        t[4 + s] = 63; t[7 + s] = 63;
        for (int e = 0; e < 16; e++) begin
          @(negedge clk); t_we = 1; elem_idx = 4'(e); elem_val = 6'(t[e]);
        end
        @(negedge clk); t_we = 0; skip_pen = 4'(p);
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        while (!done) @(negedge clk);
        expd = dp_score(x, t, 16, 31, p, 32, donly);
        $display("penalty %0d shift %0d: score %0d (diagonal only %0d)", p, s, score, donly);
        checks++;
        if (int'(score) != expd) begin failures++; $display("  expected %0d", expd); end
        checks++;
        if (int'(score) < prev) begin failures++; $display("  score fell with larger shift"); end
        prev = int'(score);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
