// tb_dp_matching_processor: end-to-end test of the DP matching processor at
// its full size (16-element vectors, 6-bit elements). Loads X and T,
// runs matches and checks the 8-bit score against the DP reference with the
// converter offset applied, the ENABLE / step phase order, and that
// identical vectors, shifted vectors (skip paths), zero-clamped and
// saturated scores all occur. Also runs the document's single-non-zero-
// element experiment (Ts = 16, 32, 48 against swept Xs) and checks the
// score is smallest at Xs = Ts.
module tb_dp_matching_processor;
  import dp_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 16;
  logic rst_n = 0, x_we = 0, t_we = 0, start = 0;
  logic [3:0] elem_idx;
  logic [5:0] elem_val;
  logic [4:0] pulse_width;
  logic [3:0] skip_pen;
  logic [9:0] tdc_offset;
  logic busy, done, enable_o, step_o, goal_o;
  logic [7:0] score;
  logic [N-1:0][N-1:0][5:0] diag_delay;

  dp_matching_processor dut (.*);

  int n_ident = 0, n_skip = 0, n_sat = 0, n_zero = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input vec_t x, input vec_t t);
    for (int e = 0; e < N; e++) begin
      @(negedge clk); x_we = 1; t_we = 0; elem_idx = 4'(e); elem_val = 6'(x[e]);
      @(negedge clk); x_we = 0; t_we = 1; elem_val = 6'(t[e]);
    end
    @(negedge clk); t_we = 0;
  endtask

  task automatic run(output int sc);
    bit saw_enable_first;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    saw_enable_first = 0;
    while (!done) begin
      if (enable_o && !step_o) saw_enable_first = 1;
      if (step_o && enable_o) begin failures++; $display("phases overlap"); end
      @(negedge clk);
    end
    checks++;
    if (!saw_enable_first) begin failures++; $display("no delay-setting phase"); end
    sc = int'(score);
  endtask

  function automatic int clamp(int v);
    if (v < 0) return 0;
    if (v > 255) return 255;
    return v;
  endfunction

  initial begin
    vec_t x, t;
    int sc, expd, donly;
    pulse_width = 31; skip_pen = 4; tdc_offset = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 16; n++) begin
      int w, p, o;
      w = (n < 8) ? 31 : 12 + $urandom % 20;
      p = 1 + $urandom % 15;
      o = (n % 4 == 3) ? 200 : (n % 4 == 2 ? 256 : 0);
      if (n == 14) begin w = 0; p = 15; o = 0; end   // no overlap: saturates
      for (int e = 0; e < N; e++) x[e] = $urandom % 64;
      case (n % 3)
        0: for (int e = 0; e < N; e++) t[e] = x[e];                         // identical
        1: for (int e = 0; e < N; e++) t[e] = (e > 0) ? x[e-1] : x[0];      // shifted
        default: for (int e = 0; e < N; e++) t[e] = $urandom % 64;          // unrelated
      endcase
      pulse_width = 5'(w); skip_pen = 4'(p); tdc_offset = 10'(o);
      load(x, t);
      expd = dp_score(x, t, N, w, p, 32, donly);
      run(sc);
      checks++;
      if (sc != clamp(expd - o)) begin
        failures++; $display("case %0d: score %0d expected %0d (D=%0d)", n, sc, clamp(expd - o), expd);
      end
      if (n % 3 == 0) n_ident++;
      if (expd < donly) n_skip++;
      if (expd - o > 255) n_sat++;
      if (expd - o <= 0) n_zero++;
    end
    // single non-zero element experiment, pulse width 16, offset = intrinsic
    // 16 ticks per diagonal line of the all-zero elements
    for (int ts = 16; ts <= 48; ts += 16) begin
      int best_xs, best_sc;
      best_sc = 1 << 30; best_xs = -1;
      for (int xs = ts - 24; xs <= ts + 24; xs += 4) begin
        for (int e = 0; e < N; e++) begin x[e] = 0; t[e] = 0; end
        x[5] = xs; t[5] = ts;
        pulse_width = 5'd16; skip_pen = 4'd15; tdc_offset = 10'(16 * 16);
        load(x, t);
        expd = dp_score(x, t, N, 16, 15, 32, donly);
        run(sc);
        checks++;
        if (sc != clamp(expd - 256)) begin
          failures++; $display("Ts=%0d Xs=%0d: score %0d expected %0d", ts, xs, sc, clamp(expd - 256));
        end
        if (sc < best_sc) begin best_sc = sc; best_xs = xs; end
      end
      checks++;
      if (best_xs != ts) begin failures++; $display("Ts=%0d: minimum at Xs=%0d", ts, best_xs); end
    end
    $display("identical=%0d skip=%0d saturated=%0d clamped_to_zero=%0d", n_ident, n_skip, n_sat, n_zero);
    checks++;
    if (n_ident == 0 || n_skip == 0 || n_sat == 0 || n_zero == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
