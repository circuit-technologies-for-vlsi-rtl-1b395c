// tb_template_sram: self-checking test of the template SRAM.
// Writes random bytes to random (bank, row, lane) places, keeps a shadow
// copy, then reads back every written row and checks all 32 lanes and the
// one-cycle read latency.
module tb_template_sram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        wr_en = 0, rd_en = 0;
  logic [1:0]  wr_bank, rd_bank;
  logic [7:0]  wr_row, rd_row;
  logic [4:0]  wr_lane;
  logic [7:0]  wr_data;
  logic [255:0] rd_data;

  template_sram dut (.*);

  logic [255:0] shadow [1024];
  bit           used   [1024];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin shadow[i] = '0; used[i] = 0; end
    // initialise a set of rows completely first
    for (int r = 0; r < 40; r++)
      for (int l = 0; l < 32; l++) begin
        int a;
        a = (r * 37) % 1024;
        @(negedge clk);
        wr_en = 1; wr_bank = 2'(a >> 8); wr_row = 8'(a); wr_lane = 5'(l);
        wr_data = 8'($urandom);
        shadow[a][l*8 +: 8] = wr_data; used[a] = 1;
      end
    // random overwrites inside those rows
    for (int n = 0; n < 500; n++) begin
      int a, l;
      a = ((($urandom % 40)) * 37) % 1024; l = $urandom % 32;
      @(negedge clk);
      wr_en = 1; wr_bank = 2'(a >> 8); wr_row = 8'(a); wr_lane = 5'(l);
      wr_data = 8'($urandom);
      shadow[a][l*8 +: 8] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < 1024; a++) if (used[a]) begin
      @(negedge clk);
      rd_en = 1; rd_bank = 2'(a >> 8); rd_row = 8'(a);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== shadow[a]) begin
        failures++;
        $display("row %0d mismatch %h vs %h", a, rd_data, shadow[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
