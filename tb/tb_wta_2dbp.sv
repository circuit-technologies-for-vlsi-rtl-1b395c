// tb_wta_2dbp: self-checking test of the 128-input, 24-bit, 6-bits-per-clock
// winner-take-all. Random inputs, inputs with forced ties in the upper
// slices and exact ties (lowest index must win), all-zero inputs, and a
// check that done comes exactly 4 clocks after start.
module tb_wta_2dbp;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, start = 0;
  logic [127:0][23:0] sim_in;
  logic busy, done;
  logic [6:0] win_loc;
  logic [23:0] win_value;

  wta_2dbp dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_and_check();
    int best, cyc;
    best = 0;
    for (int i = 1; i < 128; i++) if (sim_in[i] > sim_in[best]) best = i;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    // done rises at the 4th clock edge after the edge that samples start:
    // one edge per 6-bit slice. Counted in negedges from start, that is 5.
    checks++;
    if (cyc != 5) begin failures++; $display("latency %0d, expected 5", cyc); end
    checks++;
    if (win_loc !== 7'(best) || win_value !== sim_in[best]) begin
      failures++;
      $display("got loc %0d val %h, expected loc %0d val %h",
               win_loc, win_value, best, sim_in[best]);
    end
  endtask

  initial begin
    sim_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // all zero: location 0 by priority
    run_and_check();
    for (int n = 0; n < 200; n++) begin
      int mode;
      mode = n % 4;
      for (int i = 0; i < 128; i++) begin
        sim_in[i] = 24'($urandom);
        if (mode >= 1) sim_in[i][23:12] = 12'hABC;         // tie in 2 slices
        if (mode >= 2) sim_in[i][11:6]  = 6'($urandom % 2); // near ties
        if (mode == 3) sim_in[i][5:0]   = 6'($urandom % 3); // exact ties
      end
      run_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
