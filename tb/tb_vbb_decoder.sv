// tb_vbb_decoder: exhaustive self-checking test of the variable-binary-block
// decoder for 16 and for 128 targets. The reference selects targets
// start .. start+size-1 with size = 2^(lowest set bit) and
// start = (code with that bit cleared) >> 1; code 0 selects nothing.
module tb_vbb_decoder;
  int checks = 0, failures = 0;

  logic [4:0]   code16;
  logic [15:0]  sel16;
  logic [7:0]   code128;
  logic [127:0] sel128;

  vbb_decoder #(.N_TARGET(16))  dut16  (.code(code16),  .sel(sel16));
  vbb_decoder                   dut128 (.code(code128), .sel(sel128));

  function automatic logic [127:0] ref_sel(input int code, input int n);
    int p, size, start;
    logic [127:0] r;
    r = '0;
    if (code == 0) return r;
    p = 0;
    while (((code >> p) & 1) == 0) p++;
    size  = 1 << p;
    start = (code & ~(1 << p)) >> 1;
    for (int t = start; t < start + size && t < n; t++) r[t] = 1'b1;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // document example: 16 targets, code 20 selects 8..11
    code16 = 5'd20; #1;
    checks++;
    if (sel16 !== 16'h0F00) begin failures++; $display("code 20 -> %h", sel16); end
    for (int c = 0; c < 32; c++) begin
      code16 = 5'(c); #1;
      checks++;
      if (sel16 !== ref_sel(c, 16)[15:0]) begin
        failures++; $display("16: code %0d got %h", c, sel16);
      end
    end
    for (int c = 0; c < 256; c++) begin
      code128 = 8'(c); #1;
      checks++;
      if (sel128 !== ref_sel(c, 128)) begin
        failures++; $display("128: code %0d got %h", c, sel128);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
