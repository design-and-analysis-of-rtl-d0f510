// hoc_mult_pkg: shared sizes and types of the 8x8 higher-order-compressor
// multiplier.
//
// The multiplier is built for 8-bit unsigned operands only: its column plan
// (which compressor sits in which column, and which bits are left for the
// second stage) is worked out for the 8x8 dot diagram and does not scale
// with a parameter. WIDTH and PWIDTH are therefore constants here.
//
// stage1_left_t carries the bits of the columns that hold more bits than one
// 7:3 compressor can take in the first stage. They go straight to the second
// stage. Column numbers are 0-based bit weights (column c has weight 2^c).
package hoc_mult_pkg;

  localparam int unsigned WIDTH  = 8;          // operand width
  localparam int unsigned PWIDTH = 2 * WIDTH;  // product width

  // pp[i][j] = a[i] & b[j], weight 2^(i+j)
  typedef logic [WIDTH-1:0][WIDTH-1:0] pp_array_t;

  // Bits passed unreduced from stage 1 to stage 2, by column.
  typedef struct packed {
    logic [1:0] c15;  // y3 of column 13, carry of the column-14 full adder
    logic       c9;   // y2 of column 8
    logic [1:0] c8;   // {y2 of column 7, y3 of column 6}
    logic [2:0] c7;   // {y2 of column 6, y3 of column 5, 8th partial product}
    logic [1:0] c6;   // {y2 of column 5, y3 of column 4}
    logic       c5;   // y2 of column 4
  } stage1_left_t;

endpackage
