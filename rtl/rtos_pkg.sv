// rtos_pkg: types and constants shared by the hardware RTOS.
//
// The machine is a 4-bit processor whose instruction word is {opcode[3:0],
// opvalue[3:0]}. Four tasks share it; task 0 has the highest priority and
// task 3 the lowest. Masks issued by system calls carry task 0 in their MSB
// and task 3 in their LSB.
//
// The opcode numbers 0, 2, 4, 6, 8, 10 and 15 are chosen so that the
// example program of the basic processor (no-op, load 5, store, output,
// jump, load B, load 6, add) decodes the same way as that trace. The other
// numbers, the MISC sub-operations and the system-call instructions are this
// design's own encoding.
package rtos_pkg;

  localparam int unsigned N_TASKS = 4;
  localparam int unsigned TASK_W  = 2;
  localparam int unsigned DATA_W  = 4;
  localparam int unsigned PC_W    = 4;
  localparam int unsigned ADDR_W  = 4;
  localparam int unsigned INSTR_W = 8;

  typedef enum logic [3:0] {
    OP_MISC  = 4'd0,   // sub-operation in opvalue, see misc_e
    OP_LDBI  = 4'd1,   // B <= imm
    OP_LDAI  = 4'd2,   // A <= imm
    OP_SETPC = 4'd3,   // system call: pc of task opvalue[1:0] <= A
    OP_STA   = 4'd4,   // RAM[addr] <= A
    OP_LDA   = 4'd5,   // A <= RAM[addr]
    OP_LDB   = 4'd6,   // B <= RAM[addr]
    OP_STB   = 4'd7,   // RAM[addr] <= B
    OP_ADD   = 4'd8,   // A <= A + B
    OP_CMPI  = 4'd9,   // Z <= (A == imm)
    OP_JMP   = 4'd10,  // pc <= addr
    OP_JZ    = 4'd11,  // if Z: pc <= addr
    OP_JNZ   = 4'd12,  // if !Z: pc <= addr
    OP_SUSP  = 4'd13,  // system call: suspend mask register <= imm
    OP_TRIG  = 4'd14,  // system call: trigger mask <= imm
    OP_OUTM  = 4'd15   // outport <= RAM[addr]
  } opcode_e;

  typedef enum logic [3:0] {
    MI_NOP   = 4'd0,
    MI_INCA  = 4'd1,   // A <= A + 1
    MI_DECA  = 4'd2,   // A <= A - 1
    MI_SUB   = 4'd3,   // A <= A - B
    MI_OUTA  = 4'd4,   // outport <= A
    MI_INA   = 4'd5,   // A <= inport
    MI_MOVAB = 4'd6,   // B <= A
    MI_MOVBA = 4'd7,   // A <= B
    MI_END   = 4'd8    // system call: end of this iteration of the task
  } misc_e;

  typedef struct packed {
    opcode_e           op;
    logic [DATA_W-1:0] val;
  } instr_t;

  typedef enum logic [1:0] {
    SC_END   = 2'd0,
    SC_SUSP  = 2'd1,
    SC_TRIG  = 2'd2,
    SC_SETPC = 2'd3
  } syscall_e;

  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,
    ALU_SUB  = 3'd1,
    ALU_INC  = 3'd2,
    ALU_DEC  = 3'd3,
    ALU_PASS = 3'd4,   // y = b
    ALU_CMP  = 3'd5    // y = a, zero = (a == b)
  } alu_op_e;

  typedef enum logic [1:0] {
    S_FETCH  = 2'd0,
    S_DECODE = 2'd1,
    S_EXEC   = 2'd2,
    S_MEM    = 2'd3
  } cpu_state_e;

  // Assemble one instruction word.
  function automatic logic [INSTR_W-1:0] asm(opcode_e op, logic [DATA_W-1:0] val);
    return {op, val};
  endfunction

endpackage
