// alu: arithmetic unit of the basic 4-bit processor.
//
// Purely combinational. It adds, subtracts (a - b), increments and
// decrements a, passes b through (used for loads into A so that the zero
// flag follows the loaded value) and compares a with b. zero is set when
// the result is 0, or for ALU_CMP when a equals b. Results wrap modulo
// 2**DATA_W. The operations follow the processor's description (basic
// arithmetic, increment and decrement of the accumulator); the compare and
// pass operations and the zero flag are this design's choices, made so the
// conditional jumps have a condition to test.
module alu
#(
  parameter int unsigned DATA_W = rtos_pkg::DATA_W
) (
  input  rtos_pkg::alu_op_e           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y,
  output logic              zero
);
  always_comb begin
    unique case (op)
      rtos_pkg::ALU_ADD:  y = a + b;
      rtos_pkg::ALU_SUB:  y = a - b;
      rtos_pkg::ALU_INC:  y = a + 1'b1;
      rtos_pkg::ALU_DEC:  y = a - 1'b1;
      rtos_pkg::ALU_PASS: y = b;
      rtos_pkg::ALU_CMP:  y = a;
      default:  y = a;
    endcase
    zero = (op == rtos_pkg::ALU_CMP) ? (a == b) : (y == '0);
  end
endmodule
