// fir_pkg: constants and types shared by the multi-channel FIR filter bank.
//
// The filter bank stores 32-bit samples and 32-bit coefficients as pairs of
// 18-bit words in 1024 x 18 dual-port block memories, so that a single 18x18
// signed multiplier per channel can form a wide product in three passes.
// Word address layout of both memories (10 bits):
//   [9:8] block (0..3), [7:1] entry inside the block (0..127), [0] 0 = LSW, 1 = MSW.
// A 32-bit value x is split as MSW = x[31:16] sign-extended to 18 bits and
// LSW = x[15:0] zero-extended to 18 bits, so that x = MSW * 2^16 + LSW.
package fir_pkg;

  localparam int unsigned WORD_W    = 18;   // memory and multiplier operand width
  localparam int unsigned DATA_W    = 32;   // sample and coefficient width
  localparam int unsigned ADDR_W    = 10;   // word address of a 1024 x 18 memory
  localparam int unsigned ENTRY_W   = 9;    // address of a 32-bit entry (two words)
  localparam int unsigned NBLOCKS   = 4;    // blocks per memory = max. cascaded stages
  localparam int unsigned STAGE_W   = 2;    // selects a block / stage
  localparam int unsigned OFF_W     = 7;    // entry offset inside a block (128 entries)
  localparam int unsigned BLK_ENTRIES = 128;
  localparam int unsigned TAPS_W    = 8;    // tap count, 1..128
  localparam int unsigned PROD_W    = 36;   // 18x18 product
  localparam int unsigned ACC_W     = 48;   // accumulator
  localparam int unsigned SCALE_SH  = 16;   // cross-product sum is scaled down by 16 bits
  localparam int unsigned OUT_SHIFT = 1;    // result = sat32(acc << 1): Q1.31 coefficients
  localparam int unsigned DEC_W     = 2;    // log2 of the decimation period of a block
  localparam int unsigned PIPE_LAT  = 3;    // address -> memory -> product -> accumulator

  // FIR STATE passes: which halves of coefficient and sample are multiplied.
  typedef enum logic [1:0] {
    PASS_LM = 2'd0,   // coefficient LSW * sample MSW
    PASS_ML = 2'd1,   // coefficient MSW * sample LSW
    PASS_MM = 2'd2    // coefficient MSW * sample MSW (after the scale-down)
  } pass_e;

  // What the sample memory is written with in a write-back cycle.
  typedef enum logic [1:0] {
    WR_NONE   = 2'd0,
    WR_INPUT  = 2'd1,  // new input sample -> block 0 at sample write address 0
    WR_OUTPUT = 2'd2,  // stage result -> reserved output space in block 0
    WR_NEXT   = 2'd3   // stage result -> next block at its sample write address
  } wr_kind_e;

  // Fields of the address memory, one set per block / stage.
  typedef enum logic [1:0] {
    AM_SWA  = 2'd0,   // sample write address (entry offset of the newest sample)
    AM_LEN  = 2'd1,   // circular buffer length in entries, 1..128
    AM_TAPS = 2'd2,   // filter length of the stage, 1..LEN
    AM_OUT  = 2'd3    // absolute entry address of the stage's reserved output word pair
  } am_field_e;

  // Mode register.
  typedef struct packed {
    logic [NBLOCKS-1:0][DEC_W-1:0] dec_log2;   // block b's write address advances every 2^n samples
    logic [STAGE_W-1:0]            last_stage; // number of cascaded stages - 1
  } mode_t;

  // FIR Control Logic -> Address Processing Unit.
  typedef struct packed {
    logic               rd;       // fetch one product's operands this cycle
    logic               load;     // first tap of a pass: start from the filter start addresses
    pass_e              pass;
    wr_kind_e           wr;
    logic               ptr_upd;  // advance the write address of block `stage` (decimated)
    logic               done;     // all stages finished for this input sample
    logic [STAGE_W-1:0] stage;
  } apu_cmd_t;

  // FIR Control Logic -> every MAC unit.
  typedef struct packed {
    logic rd;      // operands are fetched this cycle; the product is accumulated later
    logic first;   // first product of a filter: the accumulator restarts
    logic scale;   // first product of the MSW*MSW pass: feedback is acc >>> 16
    logic wr;      // write a 32-bit value into the sample memory using both ports
    logic wr_in;   // 1: the new input sample, 0: the accumulator result
  } mac_ctrl_t;

  function automatic logic [WORD_W-1:0] lsw_of(input logic [DATA_W-1:0] x);
    return {{(WORD_W-16){1'b0}}, x[15:0]};
  endfunction

  function automatic logic [WORD_W-1:0] msw_of(input logic [DATA_W-1:0] x);
    return {{(WORD_W-16){x[DATA_W-1]}}, x[31:16]};
  endfunction

endpackage
