// Shared constants and types of the multiply-accumulate (MAC) unit.
//
// MAC_N is the operand width of the unit (64 bits); the product and the
// accumulator are 2*MAC_N bits wide. op_e selects whether the adder adds the
// product to the accumulator or subtracts it. mac_ctrl_t is the control that
// travels with a product through the product register.
package mac_pkg;
  localparam int unsigned MAC_N = 64;

  typedef enum logic {
    OP_ADD = 1'b0,
    OP_SUB = 1'b1
  } op_e;

  typedef struct packed {
    logic valid;   // a product is present
    logic clr;     // start a new sum: the old accumulator value is dropped
    op_e  op;      // add or subtract the product
  } mac_ctrl_t;
endpackage
