// tb_vq_processor: end-to-end test of the VQ processor at full size (32
// units, 128 templates of 64 8-bit elements, 24-bit distances).
//  1. loads 128 random templates, some of them near copies of the input;
//  2. computes all 128 Manhattan distances and checks the winner;
//  3. sorts the top four winners by masking each winner with a block
//     address of size 1 and searching again;
//  4. activates only 80 of the 128 inputs with three block writes (as in the
//     handwritten-digit experiment) and checks the top four among them;
//  5. recomputes with per-element weights 1, 2, 3 and 7 made of shifted and
//     signed (Booth) accumulate steps and checks the winner.
// Winners are compared with a reference computed in the testbench; each
// search must take 4 WTA clocks. Stalls of the instruction port during a
// search are counted and must occur.
module tb_vq_processor;
  import vq_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0;
  logic tmpl_we = 0;
  logic [1:0] tmpl_bank;
  logic [7:0] tmpl_row;
  logic [4:0] tmpl_lane;
  logic [7:0] tmpl_data;
  logic instr_valid = 0;
  logic [31:0] instr;
  logic instr_ready, res_valid, stall;
  logic [6:0] res_loc;
  logic [23:0] res_dist;
  logic [127:0] mask_state;

  vq_processor dut (.*);

  localparam int DIM = 64;
  int tmpl [128][DIM];
  int xin [DIM];
  int wgt [DIM];
  bit masked [128];
  int stalls = 0, searches = 0;
  int res_q [$];
  int dist_q [$];
  longint start_time [$];
  int wta_latency_bad = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && res_valid) begin
    res_q.push_back(int'(res_loc));
    dist_q.push_back(int'(res_dist));
  end

  function automatic logic [31:0] mk(opcode_e op, int bank, int row, int inv,
                                     int sh, int sg);
    instr_t t;
    t = '0; t.op = op; t.bank = 2'(bank); t.row = 8'(row);
    t.in_elem = 8'(inv); t.shift = 3'(sh); t.sign = 1'(sg);
    return 32'(t);
  endfunction

  task automatic send(input logic [31:0] w);
    @(negedge clk);
    instr_valid = 1; instr = w;
    #1;
    while (!instr_ready) begin stalls++; @(negedge clk); #1; end
    @(negedge clk);
    instr_valid = 0;
  endtask

  task automatic mask_block(input int code, input int val);
    int p, st;
    send(mk(OP_MASK, val, code, 0, 0, 0));
    p = 0; while (((code >> p) & 1) == 0) p++;
    st = (code & ~(1 << p)) >> 1;
    for (int i = st; i < st + (1 << p); i++) masked[i] = val;
  endtask

  // distances for all 128 templates; weighted uses wgt[] via Booth steps
  task automatic compute(input bit weighted);
    send(mk(OP_CLR, 0, 0, 0, 0, 0));
    for (int k = 0; k < 4; k++) begin
      for (int e = 0; e < DIM; e++) begin
        if (!weighted) send(mk(OP_ACC, k, e, xin[e], 0, 0));
        else case (wgt[e])
          1: send(mk(OP_ACC, k, e, xin[e], 0, 0));
          2: send(mk(OP_ACC, k, e, xin[e], 1, 0));
          3: begin send(mk(OP_ACC, k, e, xin[e], 2, 0)); send(mk(OP_ACC, k, e, xin[e], 0, 1)); end
          default: begin send(mk(OP_ACC, k, e, xin[e], 3, 0)); send(mk(OP_ACC, k, e, xin[e], 0, 1)); end
        endcase
      end
      send(mk(OP_STORE, k, 0, 0, 0, 0));
      send(mk(OP_CLR, 0, 0, 0, 0, 0));
    end
  endtask

  function automatic int ref_dist(int loc, bit weighted);
    int s, d;
    s = 0;
    for (int e = 0; e < DIM; e++) begin
      d = tmpl[loc][e] - xin[e]; if (d < 0) d = -d;
      s += weighted ? d * wgt[e] : d;
    end
    return s;
  endfunction

  // reference winner among unmasked inputs, lowest location on ties
  function automatic int ref_winner(bit weighted, output int bd);
    int best;
    best = -1; bd = 0;
    for (int l = 0; l < 128; l++) if (!masked[l]) begin
      int d;
      d = ref_dist(l, weighted);
      if (best < 0 || d < bd) begin best = l; bd = d; end
    end
    return best;
  endfunction

  task automatic search_and_check(input bit weighted, input string what);
    int expl, expd, got, gotd, t0, n0, n0s;
    expl = ref_winner(weighted, expd);
    n0 = res_q.size();
    send(mk(OP_WTA, 0, 0, 0, 0, 0));
    // an instruction issued right behind the search must wait for it
    n0s = stalls;
    send(mk(OP_NOP, 0, 0, 0, 0, 0));
    // the WTA is busy one clock per 6-bit slice: 4 clocks for 24 bits
    checks++;
    if (stalls - n0s != 4) begin
      failures++; $display("%s: search busy %0d clocks, expected 4", what, stalls - n0s);
    end
    t0 = 0;
    while (res_q.size() == n0 && t0 < 50) begin @(negedge clk); t0++; end
    searches++;
    got = res_q.pop_back(); gotd = dist_q.pop_back();
    checks++;
    if (got != expl || gotd != expd) begin
      failures++;
      $display("%s: winner %0d (%0d), expected %0d (%0d)", what, got, gotd, expl, expd);
    end
  endtask

  task automatic top4(input bit weighted, input string what);
    for (int r = 0; r < 4; r++) begin
      int expl, expd;
      expl = ref_winner(weighted, expd);
      search_and_check(weighted, $sformatf("%s rank %0d", what, r));
      mask_block((expl << 1) | 1, 1);   // block of size 1 at the winner
    end
  endtask

  initial begin
    for (int e = 0; e < DIM; e++) begin xin[e] = $urandom % 256; wgt[e] = 1 + ($urandom % 4); end
    for (int e = 0; e < DIM; e++) if (wgt[e] == 4) wgt[e] = 7;
    for (int l = 0; l < 128; l++) begin
      masked[l] = 0;
      for (int e = 0; e < DIM; e++) begin
        if (l % 9 == 4) tmpl[l][e] = xin[e] + int'($urandom % 41) - 20;   // near copies
        else            tmpl[l][e] = $urandom % 256;
        if (tmpl[l][e] < 0) tmpl[l][e] = 0;
        if (tmpl[l][e] > 255) tmpl[l][e] = 255;
      end
    end
    tmpl[100] = tmpl[13];   // an exact tie: 13 must win over 100
    instr = 0; tmpl_bank = 0; tmpl_row = 0; tmpl_lane = 0; tmpl_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // template load: location l = bank*32 + lane, row = element
    for (int l = 0; l < 128; l++)
      for (int e = 0; e < DIM; e++) begin
        @(negedge clk);
        tmpl_we = 1; tmpl_bank = 2'(l / 32); tmpl_lane = 5'(l % 32);
        tmpl_row = 8'(e); tmpl_data = 8'(tmpl[l][e]);
      end
    @(negedge clk); tmpl_we = 0;

    compute(0);
    search_and_check(0, "manhattan");
    top4(0, "manhattan top4");
    // 80 of 128 active: mask all, unmask 0..63 and 64..79
    mask_block(128, 1);
    mask_block(64, 0);
    mask_block((64 << 1) | 16, 0);
    @(negedge clk);   // the write lands one cycle after acceptance
    checks++;
    if (mask_state !== {48'hFFFF_FFFF_FFFF, 80'h0}) begin
      failures++; $display("mask state %h", mask_state);
    end
    top4(0, "80-input top4");
    // weighted distance over all inputs
    mask_block(128, 0);
    compute(1);
    search_and_check(1, "weighted");
    top4(1, "weighted top4");

    $display("searches=%0d stalls=%0d", searches, stalls);
    checks++;
    if (stalls == 0) begin failures++; $display("no stall occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
