// dm2_pkg: types and default sizes shared by the DM2 adder modules.
//
// The DM2 adder adds two operands split into NUM_BLOCKS ripple-carry blocks
// of K bits each. Its full adders are dual mode logic (DML) gates of two
// kinds: Type A, whose outputs are pulled high in the dynamic-mode precharge
// phase, and Type B, whose outputs are pulled low. The default sizes (three
// blocks of four bits, a 12-bit adder) are the ones the design is built with.
package dm2_pkg;

  // Polarity of a DML full adder.
  typedef enum logic {
    FA_TYPE_A = 1'b0,  // true-polarity inputs, precharges outputs to 1
    FA_TYPE_B = 1'b1   // inverted-polarity inputs, discharges outputs to 0
  } fa_type_e;

  // Operating mode of the DML gates.
  typedef enum logic {
    DML_DYNAMIC = 1'b0,  // clocked: precharge phase then evaluation phase
    DML_STATIC  = 1'b1   // clock held inactive: behaves like static CMOS
  } dml_mode_e;

  // Default geometry: bits per ripple-carry block and number of blocks.
  parameter int unsigned DM2_K          = 4;
  parameter int unsigned DM2_NUM_BLOCKS = 3;

endpackage
