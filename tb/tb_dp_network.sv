// tb_dp_network: self-checking test of the 16 x 16 delay-line network. The
// testbench itself generates the element pulses (high in ticks v .. v+w-1
// after a reference), so the network is tested on its own: it checks every
// programmed diagonal delay and the arrival time of the step at the goal
// node against the DP reference, for random vectors, widths and penalties.
module tb_dp_network;
  import dp_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 16;
  logic rst_n = 0, clr = 0, enable = 0, step = 0, goal;
  logic [N-1:0] pulse_x, pulse_t;
  logic [3:0] skip_pen;
  logic [N-1:0][N-1:0][5:0] diag_delay;

  dp_network dut (.*);

  int skips_used = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t x, t;
    pulse_x = 0; pulse_t = 0; skip_pen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 24; n++) begin
      int w, p, expd, donly, tk, bad;
      w = (n % 4 == 0) ? 31 : 8 + $urandom % 24;
      p = $urandom % 16;
      for (int e = 0; e < N; e++) begin
        x[e] = $urandom % 64;
        // similar vectors, sometimes shifted by one element
        t[e] = (n % 2) ? ((e > 0) ? x[e-1] : 0) : x[e] + int'($urandom % 5) - 2;
        if (t[e] < 0) t[e] = 0; if (t[e] > 63) t[e] = 63;
      end
      if (n % 2) t[0] = x[0];
      expd = dp_score(x, t, N, w, p, 32, donly);
      if (expd < donly) skips_used++;
      // delay-setting phase
      @(negedge clk); skip_pen = 4'(p); enable = 1; clr = 1;
      @(negedge clk); clr = 0;
      for (int tick = 0; tick < 100; tick++) begin
        for (int e = 0; e < N; e++) begin
          pulse_x[e] = (tick >= x[e]) && (tick < x[e] + w);
          pulse_t[e] = (tick >= t[e]) && (tick < t[e] + w);
        end
        @(negedge clk);
      end
      pulse_x = 0; pulse_t = 0;
      bad = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (diag_delay[i][j] != 6'(diag_delay_f(t[i], x[j], w))) bad++;
      checks++;
      if (bad) begin failures++; $display("case %0d: %0d diagonal delays wrong", n, bad); end
      // matching phase
      enable = 0; step = 1;
      tk = 0;
      #1;
      while (!goal && tk < 700) begin @(negedge clk); tk++; #1; end
      checks++;
      if (tk != expd) begin
        failures++; $display("case %0d: arrival %0d expected %0d", n, tk, expd);
      end
      @(negedge clk); step = 0;
    end
    checks++;
    if (skips_used == 0) begin failures++; $display("no case used a skip path"); end
    $display("skip paths used in %0d cases", skips_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int diag_delay_f(int tv, int xv, int w);
    return dp_ref_pkg::diag_delay(tv, xv, w, 32);
  endfunction
endmodule
