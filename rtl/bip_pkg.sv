// bip_pkg: types, operation encodings and the register map shared by the
// binary image processor.
//
// The processor works on 1-bit pixels streamed in raster order. Every binary
// compute unit windows its input stream into an N x N neighbourhood and runs
// two binary compute elements (bitwise logic on the window rows, reduction,
// median) whose 1-bit results a set element can combine. The operation lists
// follow the source description; the numeric encodings, field widths and register
// addresses are this design's own choice.
package bip_pkg;

  // Bitwise operation of a binary logic element (NOT and PASS act on operand a).
  typedef enum logic [2:0] {
    LOP_AND  = 3'd0,
    LOP_OR   = 3'd1,
    LOP_NOT  = 3'd2,
    LOP_NAND = 3'd3,
    LOP_NOR  = 3'd4,
    LOP_XOR  = 3'd5,
    LOP_XNOR = 3'd6,
    LOP_PASS = 3'd7
  } logic_op_e;

  // Reduction over the active window bits (PASS returns the centre bit).
  typedef enum logic [2:0] {
    ROP_AND  = 3'd0,
    ROP_OR   = 3'd1,
    ROP_NAND = 3'd2,
    ROP_NOR  = 3'd3,
    ROP_XOR  = 3'd4,
    ROP_XNOR = 3'd5,
    ROP_PASS = 3'd6
  } red_op_e;

  // 1-bit set operation. "Addition" of two 1-bit sets is taken as XOR.
  typedef enum logic [2:0] {
    SOP_UNION     = 3'd0,  // a | b
    SOP_INTERSECT = 3'd1,  // a & b
    SOP_COMPL     = 3'd2,  // ~a
    SOP_SUBTRACT  = 3'd3,  // a & ~b
    SOP_XOR       = 3'd4,  // a ^ b
    SOP_PASS      = 3'd5   // a
  } set_op_e;

  // Source of a binary logic element operand (input control multiplexer).
  typedef enum logic [1:0] {
    ISEL_WINDOW = 2'd0,  // line-memory window of the unit's input stream
    ISEL_BLOCK  = 2'd1,  // block supplied by the external SDRAM port
    ISEL_PARAM  = 2'd2,  // parameter word of the register group
    ISEL_ZERO   = 2'd3
  } in_sel_e;

  // 1-bit result taps inside a compute unit, used by the set-element input
  // multiplexers (codes 1..6) and by the unit output multiplexer (0..7).
  typedef enum logic [2:0] {
    TAP_INPUT   = 3'd0,  // original (centre) input pixel of the unit
    TAP_E0_LOG  = 3'd1,  // element 0, centre bit of the logic result
    TAP_E0_RED  = 3'd2,  // element 0, reduction result
    TAP_E0_MED  = 3'd3,  // element 0, median result
    TAP_E1_LOG  = 3'd4,
    TAP_E1_RED  = 3'd5,
    TAP_E1_MED  = 3'd6,
    TAP_SET     = 3'd7   // set element result
  } tap_e;

  // Configuration of one binary compute element.
  typedef struct packed {
    in_sel_e   sel_a;
    in_sel_e   sel_b;
    logic_op_e lop;
    red_op_e   rop;
    logic [4:0] rank;     // rank-order threshold, 0 = median
    logic [31:0] param0;  // low N*N bits used, bit r*N+k = window row r, column k
    logic [31:0] param1;
  } bce_cfg_t;

  // Configuration of one binary compute unit.
  typedef struct packed {
    logic [2:0] src;        // 0: image input, k: output of unit k-1
    tap_e       set_a;
    tap_e       set_b;
    set_op_e    sop;
    tap_e       out_sel;
    logic [3:0] mask_size;  // odd, 1..N; active square around the centre
    logic       border;     // value read for positions outside the image
    bce_cfg_t   e0;
    bce_cfg_t   e1;
  } bcu_cfg_t;

  // Register map (word addresses on the 8-bit configuration bus).
  localparam logic [7:0] REG_WIDTH   = 8'h00;  // [15:0] image width in pixels
  localparam logic [7:0] REG_HEIGHT  = 8'h01;  // [15:0] image height in lines
  localparam logic [7:0] REG_OUTSEL  = 8'h02;  // [2:0]  unit routed to the output
  localparam logic [7:0] REG_UNIT0   = 8'h10;  // unit u at REG_UNIT0 + 16*u
  // Offsets inside a unit's 16-word page.
  localparam logic [3:0] UOFS_CTRL   = 4'h0;   // [2:0] src [5:3] set_a [8:6] set_b
                                               // [11:9] sop [14:12] out_sel
                                               // [18:15] mask_size [19] border
  localparam logic [3:0] UOFS_E0CTL  = 4'h1;   // [1:0] sel_a [3:2] sel_b [6:4] lop [9:7] rop
                                               // [14:10] rank (0 = median)
  localparam logic [3:0] UOFS_E0P0   = 4'h2;
  localparam logic [3:0] UOFS_E0P1   = 4'h3;
  localparam logic [3:0] UOFS_E1CTL  = 4'h4;
  localparam logic [3:0] UOFS_E1P0   = 4'h5;
  localparam logic [3:0] UOFS_E1P1   = 4'h6;

  // Active-square mask of size m (odd) centred in an n x n window.
  function automatic logic [63:0] active_mask(input int n, input int m);
    logic [63:0] r;
    int c;
    r = '0;
    c = (n - 1) / 2;
    for (int i = 0; i < n; i++)
      for (int k = 0; k < n; k++)
        if (i - c <= m / 2 && c - i <= m / 2 && k - c <= m / 2 && c - k <= m / 2)
          r[i*n+k] = 1'b1;
    return r;
  endfunction

endpackage
