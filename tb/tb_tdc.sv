// tb_tdc: self-checking test of the time-to-digital converter. Raises the
// step, raises stop D ticks later, and checks code = clamp(D - offset, 0,
// 255) and done; also checks saturation when stop never comes.
module tb_tdc;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, start = 0, stop = 0, done;
  logic [9:0] offset;
  logic [7:0] code;

  tdc dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    offset = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int d, o, e;
      d = $urandom % 400;
      o = (n % 3 == 0) ? 0 : $urandom % 200;
      e = d - o; if (e < 0) e = 0; if (e > 255) e = 255;
      @(negedge clk); offset = 10'(o); start = 1;
      for (int t = 0; t < d; t++) @(negedge clk);
      stop = 1;
      #1;
      if (e < 255) begin
        checks++;
        if (!done || code != 8'(e)) begin
          failures++; $display("d=%0d o=%0d code %0d exp %0d done %0b", d, o, code, e, done);
        end
      end
      repeat (5) @(negedge clk);
      checks++;
      if (code != 8'(e)) begin failures++; $display("code moved after stop"); end
      start = 0; stop = 0;
      @(negedge clk);
    end
    // never stops: saturates
    @(negedge clk); offset = 0; start = 1;
    repeat (300) @(negedge clk);
    checks++;
    if (code != 8'd255 || !done) begin failures++; $display("no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
