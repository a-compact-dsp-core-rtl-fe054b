// dsplite_pkg - shared types and constants of the DSP-lite core.
//
// The core computes on 16-bit static floating-point (SFP) words: two's-complement
// fractions with the sign bit left of the radix point (Q1.15). Exponents exist only
// in the compiler, which inserts the 1-bit scalers/normalisers and barrel shifts that
// keep every value normalised. The hardware sees plain fractional arithmetic.
//
// The 64-bit microinstruction below drives one clock slot of the periodic schedule.
// Its width follows the document; the split into fields is this design's own. Per
// SIU memory it carries read addresses (these start an operation in the unit fed by
// that memory) and a write address plus a source select (these capture a result that
// is on one of the four result buses in this slot). Memory depths (16/16/8 words for
// the adder, multiplier and shifter queues; 2 x 2048 words of I/O buffer; 1024
// microinstructions) are this design's reading of the die layout, not printed sizes.
package dsplite_pkg;

  localparam int unsigned DATA_W      = 16;    // SFP word
  localparam int unsigned UINST_W     = 64;    // microinstruction
  localparam int unsigned UCODE_DEPTH = 1024;  // 8 KB of microinstructions
  localparam int unsigned UCODE_AW    = 10;
  localparam int unsigned IOBUF_DEPTH = 2048;  // words per ping/pong bank
  localparam int unsigned IOBUF_AW    = 11;
  localparam int unsigned IOREG_AW    = 10;    // input half / output half of a bank
  localparam int unsigned QDEPTH_2R   = 16;    // adder and multiplier input queues
  localparam int unsigned QDEPTH_1R   = 8;     // shifter input queue
  localparam int unsigned QAW_2R      = 4;
  localparam int unsigned QAW_1R      = 3;
  localparam int unsigned IO_VAW      = 6;     // virtual I/O address in a microinstruction
  localparam int unsigned NUM_REMAP   = 5;     // adder, mult, shifter queues; load, store

  typedef logic [DATA_W-1:0] word_t;

  // Result bus / write source codes of the 4-by-4 switch.
  typedef enum logic [2:0] {
    SRC_NONE = 3'd0,
    SRC_IN   = 3'd1,   // load unit ("I")
    SRC_ADD  = 3'd2,
    SRC_MUL  = 3'd3,
    SRC_SHF  = 3'd4
  } src_e;

  // Store source: the O register takes one of the three SFPU results.
  typedef enum logic [1:0] {
    ST_NONE = 2'd0,
    ST_ADD  = 2'd1,
    ST_MUL  = 2'd2,
    ST_SHF  = 2'd3
  } st_src_e;

  typedef struct packed {
    logic scale_a;   // >>1 on operand A
    logic scale_b;   // >>1 on operand B
    logic norm;      // >>1 on the 17-bit sum
    logic sub;       // A - B instead of A + B
  } add_ctl_t;

  typedef struct packed {
    logic [3:0] amt;    // 0..15
    logic       left;   // 1: shift left, 0: shift right
    logic       arith;  // right shift fills with the sign bit
  } shf_ctl_t;

  // 64-bit microinstruction, most significant field first.
  typedef struct packed {
    // adder queue (2R/1W) and adder control: 19 bits
    logic [QAW_2R-1:0] add_ra0;
    logic [QAW_2R-1:0] add_ra1;
    logic [QAW_2R-1:0] add_wa;
    src_e              add_wsel;
    add_ctl_t          add_ctl;
    // multiplier queue (2R/1W) and control: 16 bits
    logic [QAW_2R-1:0] mul_ra0;
    logic [QAW_2R-1:0] mul_ra1;
    logic [QAW_2R-1:0] mul_wa;
    src_e              mul_wsel;
    logic              mul_norm;  // <<1 on the product
    // shifter queue (1R/1W) and control: 15 bits
    logic [QAW_1R-1:0] shf_ra;
    logic [QAW_1R-1:0] shf_wa;
    src_e              shf_wsel;
    shf_ctl_t          shf_ctl;
    // load / store unit: 14 bits
    logic [IO_VAW-1:0] ld_va;
    st_src_e           st_sel;
    logic [IO_VAW-1:0] st_va;
  } uinst_t;

  // Stride / bound / enable of one address remapper.
  typedef struct packed {
    logic                en;
    logic [IOREG_AW-1:0] stride;
    logic [IOREG_AW:0]   bound;   // 0 .. 2**AW
  } remap_cfg_t;

  typedef remap_cfg_t [NUM_REMAP-1:0] remap_cfg_a;

  localparam int unsigned RM_ADD = 0;
  localparam int unsigned RM_MUL = 1;
  localparam int unsigned RM_SHF = 2;
  localparam int unsigned RM_LD  = 3;
  localparam int unsigned RM_ST  = 4;

endpackage
