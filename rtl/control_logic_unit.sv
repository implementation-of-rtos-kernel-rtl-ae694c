// control_logic_unit: fetch, decode and execute for the banked 4-bit
// processor, including the system-call instructions of the kernel.
//
// Every instruction takes three cycles, four when it touches the RAM:
//   S_FETCH  : take the task chosen by the switching logic (sel_task) as
//              the running task and present {task, pc} to the ROM. With no
//              ready task (sel_valid = 0) the unit waits here.
//   S_DECODE : latch the ROM word into the instruction register and advance
//              the running task's pc (incpc).
//   S_EXEC   : execute. ALU operations, loads of immediates, jumps (loadpc),
//              port transfers and system calls finish here. Loads, stores
//              and OUTM raise read or write on the RAM bus and go on to
//   S_MEM    : hold the request until ramack, then write A or B, or the
//              output port, with the read data.
// Because every task has its own register bank, switching task costs
// nothing beyond the fetch cycle every instruction has: a task that becomes
// ready with a higher priority takes over after the instruction in flight.
// bank_task is the bank to read: the selected task during fetch, the
// running task otherwise. System calls are passed on for one cycle on the
// sc_* outputs during S_EXEC.
// The instruction classes, the 3-4 cycle instruction time, the RAM
// handshake names and the output port follow the basic processor; the
// state sequence, the encoding (see rtos_pkg) and the input port are this
// design's choices.
module control_logic_unit
  import rtos_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  // switching logic
  input  logic [TASK_W-1:0]   sel_task,
  input  logic                sel_valid,
  output logic [TASK_W-1:0]   run_task,
  output logic                busy,
  // ROM
  input  logic [INSTR_W-1:0]  rom_instr,
  output logic [TASK_W-1:0]   rom_task,
  output logic [PC_W-1:0]     rom_pc,
  // RAM
  ram_if.master               ram,
  // register bank
  output logic [TASK_W-1:0]   bank_task,
  input  logic [DATA_W-1:0]   a,
  input  logic [DATA_W-1:0]   b,
  input  logic [PC_W-1:0]     pc,
  input  logic                z,
  output logic                we_a,
  output logic [DATA_W-1:0]   a_wdata,
  output logic                we_b,
  output logic [DATA_W-1:0]   b_wdata,
  output logic                we_pc,
  output logic [PC_W-1:0]     pc_wdata,
  output logic                we_z,
  output logic                z_wdata,
  // ALU
  output alu_op_e             alu_op,
  output logic [DATA_W-1:0]   alu_b,
  input  logic [DATA_W-1:0]   alu_y,
  input  logic                alu_zero,
  // system calls
  output logic                sc_valid,
  output syscall_e            sc_op,
  output logic [DATA_W-1:0]   sc_arg,
  output logic [TASK_W-1:0]   sc_task,
  output logic [DATA_W-1:0]   sc_a,
  // ports and status
  input  logic [DATA_W-1:0]   inport,
  output logic [DATA_W-1:0]   outport,
  output instr_t              ir_out,
  output logic                instr_done
);
  cpu_state_e        state;
  instr_t            ir;
  logic [TASK_W-1:0] cur;

  logic is_load, is_store;
  always_comb begin
    is_load  = ir.op inside {OP_LDA, OP_LDB, OP_OUTM};
    is_store = ir.op inside {OP_STA, OP_STB};
  end

  // Bank and ROM addressing.
  assign bank_task = (state == S_FETCH) ? sel_task : cur;
  assign rom_task  = sel_task;
  assign rom_pc    = pc;
  assign run_task  = cur;
  assign busy      = (state != S_FETCH) || sel_valid;
  assign ir_out    = ir;

  // RAM requests, held from S_EXEC until ramack.
  always_comb begin
    ram.read    = (state == S_EXEC || state == S_MEM) && is_load;
    ram.write   = (state == S_EXEC || state == S_MEM) && is_store;
    ram.task_id = cur;
    ram.addr    = ir.val;
    ram.wdata   = (ir.op == OP_STB) ? b : a;
  end

  // Datapath control.
  always_comb begin
    we_a = 1'b0; a_wdata = alu_y;
    we_b = 1'b0; b_wdata = a;
    we_pc = 1'b0; pc_wdata = pc + 1'b1;
    we_z = 1'b0; z_wdata = alu_zero;
    alu_op = ALU_PASS; alu_b = ir.val;
    sc_valid = 1'b0; sc_op = SC_END; sc_arg = ir.val; sc_task = cur; sc_a = a;
    instr_done = 1'b0;
    unique case (state)
      S_DECODE: we_pc = 1'b1;
      S_EXEC: begin
        instr_done = !(is_load || is_store);
        unique case (ir.op)
          OP_MISC: begin
            unique case (misc_e'(ir.val))
              MI_INCA:  begin alu_op = ALU_INC; we_a = 1'b1; we_z = 1'b1; end
              MI_DECA:  begin alu_op = ALU_DEC; we_a = 1'b1; we_z = 1'b1; end
              MI_SUB:   begin alu_op = ALU_SUB; alu_b = b; we_a = 1'b1; we_z = 1'b1; end
              MI_INA:   begin alu_op = ALU_PASS; alu_b = inport; we_a = 1'b1; we_z = 1'b1; end
              MI_MOVAB: we_b = 1'b1;
              MI_MOVBA: begin alu_op = ALU_PASS; alu_b = b; we_a = 1'b1; we_z = 1'b1; end
              MI_END:   begin sc_valid = 1'b1; sc_op = SC_END; end
              default:  ;
            endcase
          end
          OP_LDBI:  begin we_b = 1'b1; b_wdata = ir.val; end
          OP_LDAI:  begin alu_op = ALU_PASS; we_a = 1'b1; we_z = 1'b1; end
          OP_ADD:   begin alu_op = ALU_ADD; alu_b = b; we_a = 1'b1; we_z = 1'b1; end
          OP_CMPI:  begin alu_op = ALU_CMP; we_z = 1'b1; end
          OP_JMP:   begin we_pc = 1'b1; pc_wdata = ir.val; end
          OP_JZ:    begin we_pc = z;  pc_wdata = ir.val; end
          OP_JNZ:   begin we_pc = !z; pc_wdata = ir.val; end
          OP_SETPC: begin sc_valid = 1'b1; sc_op = SC_SETPC; end
          OP_SUSP:  begin sc_valid = 1'b1; sc_op = SC_SUSP; end
          OP_TRIG:  begin sc_valid = 1'b1; sc_op = SC_TRIG; end
          default:  ;
        endcase
      end
      S_MEM: begin
        if (ram.ramack) begin
          instr_done = 1'b1;
          unique case (ir.op)
            OP_LDA: begin alu_op = ALU_PASS; alu_b = ram.rdata; we_a = 1'b1; we_z = 1'b1; end
            OP_LDB: begin we_b = 1'b1; b_wdata = ram.rdata; end
            default: ;
          endcase
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_FETCH;
      ir      <= '0;
      cur     <= '0;
      outport <= '0;
    end else begin
      unique case (state)
        S_FETCH: if (sel_valid) begin
          cur   <= sel_task;
          state <= S_DECODE;
        end
        S_DECODE: begin
          ir    <= instr_t'(rom_instr);
          state <= S_EXEC;
        end
        S_EXEC: begin
          if (ir.op == OP_MISC && misc_e'(ir.val) == MI_OUTA) outport <= a;
          state <= (is_load || is_store) ? S_MEM : S_FETCH;
        end
        S_MEM: if (ram.ramack) begin
          if (ir.op == OP_OUTM) outport <= ram.rdata;
          state <= S_FETCH;
        end
        default: state <= S_FETCH;
      endcase
    end
  end

  // A RAM request is only answered while the unit waits for it.
  a_ack_in_mem: assert property (@(posedge clk) disable iff (rst)
    ram.ramack |-> (state == S_MEM));
endmodule
