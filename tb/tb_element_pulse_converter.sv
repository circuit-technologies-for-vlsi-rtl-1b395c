// tb_element_pulse_converter: self-checking test of the element-to-pulse
// converter. For random element values and widths it raises REF and checks
// that the pulse is high exactly in ticks v .. v+w-1 after REF.
module tb_element_pulse_converter;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, load = 0, clr = 0, ref_i = 0, pulse;
  logic [5:0] load_val, value_q;
  logic [4:0] width;

  element_pulse_converter dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_val = 0; width = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 120; n++) begin
      int v, w, first, count, bad;
      v = (n < 4) ? n * 21 : $urandom % 64;
      w = (n < 4) ? 31 - n : $urandom % 32;
      @(negedge clk); load = 1; load_val = 6'(v); width = 5'(w);
      @(negedge clk); load = 0; clr = 1;
      @(negedge clk); clr = 0; ref_i = 1;
      first = -1; count = 0; bad = 0;
      for (int t = 0; t < 110; t++) begin
        #1;
        if (pulse) begin
          if (first < 0) first = t;
          count++;
          if (t < v || t >= v + w) bad = 1;
        end
        @(negedge clk);
      end
      ref_i = 0;
      checks++;
      if (bad || count != w || value_q != 6'(v)) begin
        failures++;
        $display("v=%0d w=%0d: first %0d count %0d", v, w, first, count);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
