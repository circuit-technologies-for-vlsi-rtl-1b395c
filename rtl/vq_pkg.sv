// vq_pkg: sizes, instruction format and shared types of the general-purpose
// digital vector-quantization (VQ) processor.
//
// The sizes follow the prototype: 32 SIMD distance units, four 24-bit
// distance registers per unit (128 WTA inputs), 8-bit vector elements, a
// template SRAM of four banks of 256 x 256 bits, and a winner-take-all that
// resolves 6 bits per clock. The 32-bit instruction encoding defined here is
// this design's own; the processor is only described as decoding
// instructions fed to it.
package vq_pkg;

  localparam int unsigned N_PE      = 32;   // parallel distance units
  localparam int unsigned N_DR      = 4;    // distance registers per unit
  localparam int unsigned N_WTA     = N_PE * N_DR;  // 128 WTA inputs
  localparam int unsigned ELEM_W    = 8;    // vector element width
  localparam int unsigned DIST_W    = 24;   // distance / accumulator width
  localparam int unsigned SHIFT_W   = 3;    // weight shift amount
  localparam int unsigned SLICE_W   = 6;    // WTA bits per clock
  localparam int unsigned N_BANK    = 4;    // SRAM banks
  localparam int unsigned SRAM_ROWS = 256;  // rows per bank
  localparam int unsigned SRAM_COLS = 256;  // bits per row = N_PE * ELEM_W

  localparam int unsigned LOC_W   = $clog2(N_WTA);   // 7-bit location code
  localparam int unsigned VBB_W   = LOC_W + 1;       // block address code
  localparam int unsigned BANK_W  = $clog2(N_BANK);
  localparam int unsigned ROW_W   = $clog2(SRAM_ROWS);

  // Instruction opcodes (bits [31:28] of an instruction word).
  typedef enum logic [3:0] {
    OP_NOP   = 4'h0,  // no operation
    OP_CLR   = 4'h1,  // clear all accumulators
    OP_ACC   = 4'h2,  // acc += (-1)^sign * 2^shift * |in - sram[bank][row]|
    OP_STORE = 4'h3,  // distance register [dr] <= acc in every unit
    OP_MASK  = 4'h4,  // masking registers of a block <= value
    OP_WTA   = 4'h5   // winner search over all unmasked distance registers
  } opcode_e;

  // Field layout of an instruction word. Unused fields are ignored.
  //  [31:28] opcode
  //  [27:26] bank (OP_ACC) or distance-register index (OP_STORE)
  //  [25:18] SRAM row, i.e. element index (OP_ACC)
  //  [17:10] input element value IN (OP_ACC)
  //  [9:7]   SHIFT (OP_ACC)
  //  [6]     SIGN (OP_ACC)
  //  [5:0]   reserved
  // OP_MASK uses bank[0] as the mask value (1 = masked) and row as the
  // block address code.
  typedef struct packed {
    opcode_e           op;
    logic [1:0]        bank;
    logic [7:0]        row;
    logic [7:0]        in_elem;
    logic [2:0]        shift;
    logic              sign;
    logic [5:0]        rsvd;
  } instr_t;

  // Control bundle from the controller to every distance unit.
  typedef struct packed {
    logic               clr;     // clear accumulator
    logic               acc;     // accumulate one term
    logic [ELEM_W-1:0]  in_elem; // input vector element
    logic [SHIFT_W-1:0] shift;   // weight shift
    logic               sign;    // subtract instead of add
    logic               store;   // copy accumulator to a distance register
    logic [1:0]         dr_sel;  // which distance register
  } pe_ctrl_t;

endpackage
