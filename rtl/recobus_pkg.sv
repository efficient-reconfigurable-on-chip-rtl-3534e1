// recobus_pkg: constants and types shared by the reconfigurable bus (ReCoBus) RTL.
//
// The select generators of the bus are 16-entry look-up tables addressed by a
// 4-bit bus_enable value (a 4-input LUT used as a shift register). Address 4'hF
// selects table entry Q15, which after configuration always holds the lock bit
// 0, so 4'hF is the "nobody" address. Test-module function codes for the
// demonstrator are defined here too; the choice of the three functions (adder,
// Boolean function, permutation) follows the demonstrator's description, their
// exact formulas are this design's own.
package recobus_pkg;

  // Width of the module address carried on bus_enable (k = 4 input LUT).
  localparam int unsigned BE_W = 4;
  // Number of entries of one select-generator table (2**k).
  localparam int unsigned LUT_DEPTH = 1 << BE_W;
  // Address reserved for the cascade/lock entry Q15: selects no module.
  localparam logic [BE_W-1:0] BE_NONE = '1;

  typedef logic [BE_W-1:0]      be_t;
  typedef logic [LUT_DEPTH-1:0] lut_t;

  // Test-module functions of the demonstrator.
  typedef enum logic [1:0] {
    FUNC_ADD  = 2'd0,   // result = wr_data + wr_addr
    FUNC_XOR  = 2'd1,   // result = wr_data ^ ~wr_addr
    FUNC_PERM = 2'd2,   // result = bit-reversed wr_data
    FUNC_ROT  = 2'd3    // result = wr_data rotated left by one byte
  } func_e;

endpackage
