// me_pkg: constants and types shared by the motion-estimation micro core and
// the four-core extended unit built from it.
//
// The pixel width (8 bits), the accumulator width (16 bits), the block size
// (16x16 = 256 pixels) and the 64-bit cascaded accumulator come from the
// design description. The operation encodings are this implementation's own.
package me_pkg;

  localparam int unsigned PIX_W        = 8;    // one pixel per ADD module
  localparam int unsigned ACC_W        = 16;   // CSACC / converter / MMD width
  localparam int unsigned BLOCK_PIXELS = 256;  // 16x16 block matching
  localparam int unsigned WORD_W       = 16;   // width of each input bus word
  localparam int unsigned NUM_CORES    = 4;    // ME cores in the extended unit
  localparam int unsigned MAC_W        = 64;   // four cascaded 16-bit slices

  // Operation of one ME core's ADD path.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,  // x + y            (motion compensation)
    OP_SUB = 2'd1,  // x - y            (displaced frame difference)
    OP_SAD = 2'd2   // accumulate |x-y| (block matching)
  } core_op_e;

  // Configuration of the extended four-core unit.
  typedef enum logic {
    MODE_ME  = 1'b0,  // four independent ME cores
    MODE_MAC = 1'b1   // cores ganged into one multiply-accumulate unit
  } vsp_mode_e;

  // Cascade connections of one core's accumulator/converter slice when the
  // four cores are ganged into a 64-bit multiply-accumulate datapath. Slice 0
  // holds the least significant 16 bits; each slice receives from the slice
  // below it.
  typedef struct packed {
    logic              c1_en;       // CSACC1: accumulate this clock
    logic              c1_clr;      // CSACC1: start a new product
    logic              c1_shift2;   // CSACC1: multiply stored value by 4 first
    logic [ACC_W-1:0]  c1_addend;   // this slice's 16 bits of the Booth multiple
    logic              c1_cin;      // carry-vector LSB (slice 0: the +1 of a negation)
    logic [1:0]        c1_sh_s;     // sum bits shifted in from below
    logic [1:0]        c1_sh_c;     // carry bits shifted in from below
    logic              c2_en;       // CSACC2: add CSACC1's pair
    logic              c2_clr;      // CSACC2: start a new sum
    logic [1:0]        c2_cin;      // CSACC2 row carries from below
    logic              cv_load;     // converter: latch CSACC2's pair
    logic              cv_start;    // converter: begin (slice 0: go, others: done below)
    logic              cv_cin;      // converter: carry from below
  } slice_in_t;

  typedef struct packed {
    logic [1:0]        c1_sh_s;     // top two sum bits, to the slice above
    logic [1:0]        c1_sh_c;     // top two carry bits, to the slice above
    logic              c1_cout;     // CSACC1 carry out of the top bit
    logic [1:0]        c2_cout;     // CSACC2 row carries out of the top bit
    logic              cv_done;     // converter finished
    logic              cv_cout;     // converter final carry
    logic [ACC_W-1:0]  cv_result;   // converted 16 bits
  } slice_out_t;

endpackage
