// tb_masking_unit: self-checking test of the masking unit. Applies random
// block-address mask writes (set and clear), keeps a reference mask and
// checks both the masking registers and that every output is either the
// bit-inverted distance (unmasked) or zero (masked).
module tb_masking_unit;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0;
  logic mask_we = 0;
  logic [7:0] mask_code;
  logic mask_val;
  logic [127:0][23:0] dist_in, sim_out;
  logic [127:0] mask_q;

  masking_unit dut (.*);

  logic [127:0] ref_mask;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out();
    logic [127:0][23:0] e;
    for (int i = 0; i < 128; i++) e[i] = ref_mask[i] ? 24'd0 : ~dist_in[i];
    checks++;
    if (mask_q !== ref_mask) begin failures++; $display("mask %h vs %h", mask_q, ref_mask); end
    checks++;
    if (sim_out !== e) begin failures++; $display("sim_out mismatch"); end
  endtask

  initial begin
    ref_mask = '0;
    for (int i = 0; i < 128; i++) dist_in[i] = 24'($urandom);
    mask_code = 0; mask_val = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_out();
    for (int n = 0; n < 300; n++) begin
      int c, p, start;
      c = $urandom % 256;
      if (n % 40 == 0) c = 128;   // whole array
      @(negedge clk);
      mask_we = 1; mask_code = 8'(c); mask_val = 1'($urandom);
      if (c != 0) begin
        p = 0;
        while (((c >> p) & 1) == 0) p++;
        start = (c & ~(1 << p)) >> 1;
        for (int t = start; t < start + (1 << p); t++) ref_mask[t] = mask_val;
      end
      @(negedge clk);
      mask_we = 0;
      for (int i = 0; i < 128; i++) dist_in[i] = 24'($urandom);
      #1;
      check_out();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
