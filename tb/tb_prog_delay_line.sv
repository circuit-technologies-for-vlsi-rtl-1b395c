// tb_prog_delay_line: self-checking test of the programmable domino delay
// line (32 elements). Programs it by write pulses of every width and by
// presets, then measures, in clock ticks, how long after the step OUT
// rises: N - min(width, N) for a write pulse, the preset for a preset.
module tb_prog_delay_line;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, clr = 0, phi = 0, out;
  logic [5:0] preset, remaining;

  prog_delay_line #(.N(32)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int expected, input string what);
    int t;
    @(negedge clk); phi = 1;
    t = 0;
    #1;
    while (!out && t < 100) begin @(negedge clk); t++; #1; end
    checks++;
    if (t != expected) begin
      failures++; $display("%s: delay %0d expected %0d", what, t, expected);
    end
    @(negedge clk); phi = 0;
  endtask

  initial begin
    preset = 32;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w <= 34; w++) begin
      @(negedge clk); clr = 1; preset = 32;
      @(negedge clk); clr = 0;
      repeat (w) begin phi = 1; @(negedge clk); end
      phi = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (remaining != 6'(32 - (w > 32 ? 32 : w))) begin
        failures++; $display("w=%0d remaining %0d", w, remaining);
      end
      measure(32 - (w > 32 ? 32 : w), $sformatf("pulse %0d", w));
    end
    for (int p = 0; p <= 32; p++) begin
      @(negedge clk); clr = 1; preset = 6'(p);
      @(negedge clk); clr = 0;
      measure(p, $sformatf("preset %0d", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
