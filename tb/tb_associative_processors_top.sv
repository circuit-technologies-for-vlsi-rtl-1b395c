// tb_associative_processors_top: end-to-end test of the whole design with
// every parameter at its default.
// VQ side: the recognition flow of the handwritten-digit experiment at full
// size - 128 templates of 64 elements stored, 80 of them activated by block
// addressing, Manhattan distances computed, and the top four candidates
// found by repeated winner search with size-1 block masking; then one
// weighted search (shifted and negative accumulate steps).
// DP side: an identical-vector match, a shifted-sequence match (which must
// take a skip path), and an element-to-element match emulated with the
// maximum skip penalty.
// Counts each mechanism (instruction stall, block mask write, weighted /
// negative accumulate, winner sort step, DP delay-setting and matching
// phases, DP skip path, TDC saturation) and fails if one never happens.
module tb_associative_processors_top;
  import vq_pkg::*;
  import dp_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0;
  logic vq_tmpl_we = 0;
  logic [1:0] vq_tmpl_bank;
  logic [7:0] vq_tmpl_row;
  logic [4:0] vq_tmpl_lane;
  logic [7:0] vq_tmpl_data;
  logic vq_instr_valid = 0;
  logic [31:0] vq_instr;
  logic vq_instr_ready, vq_res_valid, vq_stall;
  logic [6:0] vq_res_loc;
  logic [23:0] vq_res_dist;
  logic [127:0] vq_mask_state;
  logic dp_x_we = 0, dp_t_we = 0, dp_start = 0;
  logic [3:0] dp_elem_idx;
  logic [5:0] dp_elem_val;
  logic [4:0] dp_pulse_width;
  logic [3:0] dp_skip_pen;
  logic [9:0] dp_tdc_offset;
  logic dp_busy, dp_done, dp_enable, dp_step, dp_goal;
  logic [7:0] dp_score;
  logic [15:0][15:0][5:0] dp_diag_delay;

  associative_processors_top dut (.*);

  localparam int DIM = 64;
  int tmpl [128][DIM];
  int xin [DIM];
  bit masked [128];
  int n_stall = 0, n_mask = 0, n_neg = 0, n_sort = 0;
  int n_set = 0, n_match = 0, n_skip = 0, n_sat = 0;
  int res_q [$];
  int dist_q [$];

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && vq_res_valid) begin
    res_q.push_back(int'(vq_res_loc)); dist_q.push_back(int'(vq_res_dist));
  end
  always @(posedge clk) if (rst_n && vq_stall) n_stall++;

  function automatic logic [31:0] mk(opcode_e op, int bank, int row, int inv,
                                     int sh, int sg);
    instr_t t;
    t = '0; t.op = op; t.bank = 2'(bank); t.row = 8'(row);
    t.in_elem = 8'(inv); t.shift = 3'(sh); t.sign = 1'(sg);
    return 32'(t);
  endfunction

  task automatic send(input logic [31:0] w);
    @(negedge clk);
    vq_instr_valid = 1; vq_instr = w;
    #1;
    while (!vq_instr_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    vq_instr_valid = 0;
  endtask

  task automatic mask_block(input int code, input int val);
    int p, st;
    send(mk(OP_MASK, val, code, 0, 0, 0));
    n_mask++;
    p = 0; while (((code >> p) & 1) == 0) p++;
    st = (code & ~(1 << p)) >> 1;
    for (int i = st; i < st + (1 << p); i++) masked[i] = val;
  endtask

  function automatic int ref_winner(bit weighted, output int bd);
    int best;
    best = -1; bd = 0;
    for (int l = 0; l < 128; l++) if (!masked[l]) begin
      int s, d;
      s = 0;
      for (int e = 0; e < DIM; e++) begin
        d = tmpl[l][e] - xin[e]; if (d < 0) d = -d;
        s += (weighted && e < 8) ? 3 * d : d;
      end
      if (best < 0 || s < bd) begin best = l; bd = s; end
    end
    return best;
  endfunction

  task automatic search(input bit weighted, input string what, output int loc);
    int expd, n0, gd;
    loc = ref_winner(weighted, expd);
    n0 = res_q.size();
    send(mk(OP_WTA, 0, 0, 0, 0, 0));
    send(mk(OP_NOP, 0, 0, 0, 0, 0));     // waits behind the search
    while (res_q.size() == n0) @(negedge clk);
    gd = dist_q.pop_back();
    checks++;
    if (res_q.pop_back() != loc || gd != expd) begin
      failures++; $display("%s: winner differs from expected %0d (%0d)", what, loc, expd);
    end
  endtask

  task automatic dp_run(input vec_t x, input vec_t t, input int w, input int p,
                        input int o, input string what);
    int expd, donly, ex;
    for (int e = 0; e < 16; e++) begin
      @(negedge clk); dp_x_we = 1; dp_elem_idx = 4'(e); dp_elem_val = 6'(x[e]);
      @(negedge clk); dp_x_we = 0; dp_t_we = 1; dp_elem_val = 6'(t[e]);
      @(negedge clk); dp_t_we = 0;
    end
    dp_pulse_width = 5'(w); dp_skip_pen = 4'(p); dp_tdc_offset = 10'(o);
    @(negedge clk); dp_start = 1;
    @(negedge clk); dp_start = 0;
    if (dp_enable) n_set++;
    while (!dp_done) @(negedge clk);
    if (dp_step && !dp_enable) n_match++;
    expd = dp_ref_pkg::dp_score(x, t, 16, w, p, 32, donly);
    if (expd < donly) n_skip++;
    ex = expd - o; if (ex < 0) ex = 0;
    if (ex > 255) begin ex = 255; n_sat++; end
    checks++;
    if (int'(dp_score) != ex) begin
      failures++; $display("%s: DP score %0d expected %0d", what, dp_score, ex);
    end
  endtask

  initial begin
    vec_t x, t;
    int loc;
    vq_instr = 0; vq_tmpl_bank = 0; vq_tmpl_row = 0; vq_tmpl_lane = 0; vq_tmpl_data = 0;
    dp_elem_idx = 0; dp_elem_val = 0; dp_pulse_width = 31; dp_skip_pen = 4; dp_tdc_offset = 0;
    for (int e = 0; e < DIM; e++) xin[e] = $urandom % 256;
    for (int l = 0; l < 128; l++) begin
      masked[l] = 0;
      for (int e = 0; e < DIM; e++) begin
        tmpl[l][e] = (l % 10 == 3) ? xin[e] + int'($urandom % 31) - 15 : $urandom % 256;
        if (tmpl[l][e] < 0) tmpl[l][e] = 0;
        if (tmpl[l][e] > 255) tmpl[l][e] = 255;
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- VQ: load, compute, select 80 inputs, top four ----
    for (int l = 0; l < 128; l++)
      for (int e = 0; e < DIM; e++) begin
        @(negedge clk);
        vq_tmpl_we = 1; vq_tmpl_bank = 2'(l / 32); vq_tmpl_lane = 5'(l % 32);
        vq_tmpl_row = 8'(e); vq_tmpl_data = 8'(tmpl[l][e]);
      end
    @(negedge clk); vq_tmpl_we = 0;
    send(mk(OP_CLR, 0, 0, 0, 0, 0));
    for (int k = 0; k < 4; k++) begin
      for (int e = 0; e < DIM; e++) send(mk(OP_ACC, k, e, xin[e], 0, 0));
      send(mk(OP_STORE, k, 0, 0, 0, 0));
      send(mk(OP_CLR, 0, 0, 0, 0, 0));
    end
    mask_block(128, 1);
    mask_block(64, 0);
    mask_block((64 << 1) | 16, 0);
    for (int r = 0; r < 4; r++) begin
      search(0, $sformatf("top4 rank %0d", r), loc);
      mask_block((loc << 1) | 1, 1);
      n_sort++;
    end
    // ---- VQ: weight 3 = 4 - 1 on the first 8 elements ----
    mask_block(128, 0);
    send(mk(OP_CLR, 0, 0, 0, 0, 0));
    for (int k = 0; k < 4; k++) begin
      for (int e = 0; e < DIM; e++)
        if (e < 8) begin
          send(mk(OP_ACC, k, e, xin[e], 2, 0));
          send(mk(OP_ACC, k, e, xin[e], 0, 1)); n_neg++;
        end else send(mk(OP_ACC, k, e, xin[e], 0, 0));
      send(mk(OP_STORE, k, 0, 0, 0, 0));
      send(mk(OP_CLR, 0, 0, 0, 0, 0));
    end
    search(1, "weighted", loc);

    // ---- DP ----
    for (int e = 0; e < 16; e++) x[e] = $urandom % 64;
    t = x;
    dp_run(x, t, 31, 4, 0, "identical");
    for (int e = 0; e < 16; e++) t[e] = (e > 0) ? x[e-1] : x[0];
    dp_run(x, t, 31, 4, 0, "shifted");
    for (int e = 0; e < 16; e++) t[e] = $urandom % 64;
    dp_run(x, t, 8, 15, 0, "element-to-element");

    $display("stall=%0d mask=%0d neg_acc=%0d sort=%0d dp_set=%0d dp_match=%0d dp_skip=%0d dp_sat=%0d",
             n_stall, n_mask, n_neg, n_sort, n_set, n_match, n_skip, n_sat);
    checks++;
    if (n_stall == 0 || n_mask == 0 || n_neg == 0 || n_sort == 0 ||
        n_set == 0 || n_match == 0 || n_skip == 0 || n_sat == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
