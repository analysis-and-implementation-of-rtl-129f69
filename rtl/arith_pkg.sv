// arith_pkg: types shared by the MAC unit and the top level.
// The MAC accepts one instruction per cycle; the instruction set follows the
// description of the MAC pipeline (multiply, multiply-accumulate, and an
// accumulator right shift in the last stage). NOP and the 2-bit encoding are
// this design's own choice.
package arith_pkg;
  typedef enum logic [1:0] {
    OP_NOP = 2'd0,  // accumulator holds its value
    OP_MUL = 2'd1,  // acc <= a*b       (accumulator feedback gated to zero)
    OP_MAC = 2'd2,  // acc <= acc + a*b
    OP_SHR = 2'd3   // acc <= acc >>> shamt (arithmetic right shift)
  } mac_op_e;
endpackage
