// nmul_pkg: constants and types shared by the multiplier and its final adder.
//
// The final adder is a 64-bit carry-skip adder cut into ten units whose sizes
// grow from the least significant end: 1, 3, 4, 5, 6, 7, 8, 9, 10 and 11 bits.
// Each unit above the 4-bit one can be cut ("sliced") once so that the adder
// works as several independent 8-, 16- or 32-bit adders. The slicing request
// arrives on two lines, part1 and part0, decoded inside each unit by a NAND,
// an inverter or a NOR. The unit sizes, the decoders per unit size and the
// place of each cut follow the published architecture; the numeric encoding
// of {part1,part0} is derived from those decoders (see lane_e).
package nmul_pkg;

  // Operand width of the multiplier and width of the final adder.
  localparam int unsigned MUL_W = 32;
  localparam int unsigned ADD_W = 64;
  localparam int unsigned N_UNITS = 10;

  // How a unit decodes {part1,part0} into its active-low cut enable PAR.
  typedef enum logic [1:0] {
    SLICE_NONE = 2'd0,  // never cut (1-, 3- and 4-bit units)
    SLICE_NAND = 2'd1,  // PAR = ~(part0 & part1): cut for 8-bit lanes only
    SLICE_INV  = 2'd2,  // PAR = ~part0: cut for 8- and 16-bit lanes
    SLICE_NOR  = 2'd3   // PAR = ~(part0 | part1): cut for 8-, 16- and 32-bit lanes
  } slice_e;

  // Lane width selected by {part1,part0}.
  typedef enum logic [1:0] {
    LANE_64 = 2'b00,
    LANE_16 = 2'b01,
    LANE_32 = 2'b10,
    LANE_8  = 2'b11
  } lane_e;

  typedef int unsigned uarr_t [N_UNITS];
  typedef int          iarr_t [N_UNITS];
  typedef slice_e      sarr_t [N_UNITS];

  // Unit widths, least significant unit first.
  localparam uarr_t UNIT_W   = '{1, 3, 4, 5, 6, 7, 8, 9, 10, 11};
  // Least significant bit of each unit.
  localparam uarr_t UNIT_LSB = '{0, 1, 4, 8, 13, 19, 26, 34, 43, 53};
  // Bit place inside the unit where the cut falls (-1: no cut).
  // Cuts land on the absolute bit positions 8, 16, 24, 32, 40, 48 and 56.
  localparam iarr_t UNIT_CUT = '{-1, -1, -1, 0, 3, 5, 6, 6, 5, 3};
  localparam sarr_t UNIT_SLICE = '{SLICE_NONE, SLICE_NONE, SLICE_NONE,
                                   SLICE_NAND, SLICE_INV,  SLICE_NAND,
                                   SLICE_NOR,  SLICE_NAND, SLICE_INV, SLICE_NAND};

endpackage
