// template_sram: on-chip template vector memory of the VQ processor.
//
// Four banks of ROWS x COLS bits (256 x 256 in the prototype, 32 KB in all).
// A row holds one 8-bit element for each of the 32 distance units, so one
// read delivers 256 bits, the element of 32 template vectors in parallel.
// In this design's mapping bank k holds the templates whose distances go to
// distance register k of each unit, and the row number is the element index.
//
// Ports: a byte-wide write port for loading templates (bank, row, byte lane)
// and a full-row read port. Timing: synchronous write; synchronous read with
// one cycle of latency (rd_data is valid the cycle after rd_en). The write
// port width and the latency are this design's choices.
module template_sram #(
  parameter int unsigned N_BANK = 4,
  parameter int unsigned ROWS   = 256,
  parameter int unsigned COLS   = 256,
  parameter int unsigned BYTES  = COLS / 8
) (
  input  logic                        clk,
  // write port, one byte per cycle
  input  logic                        wr_en,
  input  logic [$clog2(N_BANK)-1:0]   wr_bank,
  input  logic [$clog2(ROWS)-1:0]     wr_row,
  input  logic [$clog2(BYTES)-1:0]    wr_lane,
  input  logic [7:0]                  wr_data,
  // read port, one full row
  input  logic                        rd_en,
  input  logic [$clog2(N_BANK)-1:0]   rd_bank,
  input  logic [$clog2(ROWS)-1:0]     rd_row,
  output logic [COLS-1:0]             rd_data
);

  // One array; the bank number forms the upper address bits.
  localparam int unsigned DEPTH = N_BANK * ROWS;

  logic [BYTES-1:0][7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en)
      mem[{wr_bank, wr_row}][wr_lane] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      rd_data <= mem[{rd_bank, rd_row}];
  end

endmodule
