// hw_rtos_top: a four-task RTOS kernel in hardware around a small 4-bit
// processor.
//
// The processor (control logic unit, ALU, ROM, RAM) runs one instruction
// at a time for whichever task the bank switching logic selects. Each task
// has its own register bank and its own ROM and RAM pages, so changing
// task is only a change of bank-select lines. The kernel decides who runs:
//   - a task_timer per task (down counter + shadow register holding the
//     period) pulses on time-out;
//   - the trigger controller keeps one trigger counter per task, counting
//     timer time-outs, interrupts (intr[i] for task i, on the rising edge)
//     and trigger-mask system calls, minus end-of-task system calls;
//   - the selective task blocker keeps the suspend mask written by the
//     suspend system call;
//   - the bank switching logic runs the highest-priority task (0 highest)
//     whose counter is nonzero and which is not suspended.
// System calls are instructions (END, SUSP mask, TRIG mask, SETPC) decoded
// by the system call interface. Masks carry task 0 in the MSB.
// All blocks run on the one clock; reset is synchronous and active high.
// Periods are written through cfg_*, the program image through prog_*.
// ready (bit i = task i may run) and timer_count show the kernel state;
// sig, trig_count, suspend_mask, runtaskid, areg/breg, pcvalue, opcode and
// opvalue expose the internal state that the timing diagrams of the design
// show.
module hw_rtos_top
  import rtos_pkg::*;
#(
  parameter int unsigned TIMER_W      = 8,
  parameter int unsigned TCNT_W       = 4,
  parameter int unsigned SHARED_WORDS = 4
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic [N_TASKS-1:0]             intr,
  input  logic                           cfg_we,
  input  logic [TASK_W-1:0]              cfg_task,
  input  logic [TIMER_W-1:0]             cfg_period,
  input  logic                           prog_we,
  input  logic [TASK_W+PC_W-1:0]         prog_addr,
  input  logic [INSTR_W-1:0]             prog_data,
  input  logic [DATA_W-1:0]              inport,
  output logic [DATA_W-1:0]              outport,
  output logic [TASK_W-1:0]              runtaskid,
  output logic                           cpu_busy,
  output logic [N_TASKS-1:0]             sig,
  output logic [N_TASKS-1:0]             ready,
  output logic [N_TASKS-1:0][TIMER_W-1:0] timer_count,
  output logic [N_TASKS-1:0][TCNT_W-1:0] trig_count,
  output logic [N_TASKS-1:0]             suspend_mask,
  output logic                           instr_done,
  output logic [PC_W-1:0]                pcvalue,
  output logic [3:0]                     opcode,
  output logic [DATA_W-1:0]              opvalue,
  output logic [N_TASKS-1:0][DATA_W-1:0] areg,
  output logic [N_TASKS-1:0][DATA_W-1:0] breg
);
  // kernel signals
  logic [N_TASKS-1:0] timeout, pending, blocked, end_task, trig_mask;
  logic [N_TASKS-1:0] susp_mask_w;
  logic               susp_we;
  logic [TASK_W-1:0]  sel_task;
  logic               sel_valid;
  // system calls
  logic               sc_valid;
  syscall_e           sc_op;
  logic [DATA_W-1:0]  sc_arg, sc_a;
  logic [TASK_W-1:0]  sc_task;
  logic               pc_set_we;
  logic [TASK_W-1:0]  pc_set_task;
  logic [DATA_W-1:0]  pc_set_val;
  // processor
  logic [INSTR_W-1:0] rom_instr;
  logic [TASK_W-1:0]  rom_task, bank_task;
  logic [PC_W-1:0]    rom_pc, pc;
  logic [DATA_W-1:0]  a, b, a_wdata, b_wdata, alu_b, alu_y;
  logic [PC_W-1:0]    pc_wdata;
  logic               z, we_a, we_b, we_pc, we_z, z_wdata, alu_zero;
  alu_op_e            alu_op;
  instr_t             ir;

  ram_if #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .TASK_W(TASK_W)) ram (.clk(clk));

  // ---------------- kernel ----------------
  for (genvar i = 0; i < N_TASKS; i++) begin : g_timer
    task_timer #(.TIMER_W(TIMER_W)) u_timer (
      .clk, .rst,
      .cfg_we     (cfg_we && cfg_task == TASK_W'(i)),
      .cfg_period (cfg_period),
      .timeout    (timeout[i]),
      .count      (timer_count[i])
    );
  end

  trigger_controller #(.N_TASKS(N_TASKS), .TCNT_W(TCNT_W)) u_trig (
    .clk, .rst, .intr, .timeout, .trig_mask, .end_task,
    .sig, .pending, .count(trig_count)
  );

  selective_task_blocker #(.N_TASKS(N_TASKS)) u_block (
    .clk, .rst, .we(susp_we), .mask(susp_mask_w),
    .suspend_mask, .blocked
  );

  bank_switching_logic #(.N_TASKS(N_TASKS)) u_switch (
    .pending, .blocked, .ready, .sel_task, .sel_valid
  );

  syscall_interface #(.N_TASKS(N_TASKS), .DATA_W(DATA_W)) u_sc (
    .clk, .rst, .sc_valid, .sc_op, .sc_arg, .sc_task, .sc_a,
    .end_task, .susp_we, .susp_mask(susp_mask_w), .trig_mask,
    .pc_set_we, .pc_set_task, .pc_set_val
  );

  // ---------------- processor ----------------
  program_rom #(.N_TASKS(N_TASKS), .PC_W(PC_W), .INSTR_W(INSTR_W)) u_rom (
    .clk, .prog_we, .prog_addr, .prog_data,
    .task_id(rom_task), .pc(rom_pc), .instr(rom_instr)
  );

  data_ram #(.N_TASKS(N_TASKS), .DATA_W(DATA_W), .ADDR_W(ADDR_W),
             .SHARED_WORDS(SHARED_WORDS)) u_ram (
    .clk, .rst, .ram(ram.slave)
  );

  register_bank #(.N_TASKS(N_TASKS), .DATA_W(DATA_W), .PC_W(PC_W)) u_bank (
    .clk, .rst,
    .rd_task(bank_task), .a, .b, .pc, .z,
    .wr_task(runtaskid), .we_a, .a_wdata, .we_b, .b_wdata,
    .we_pc, .pc_wdata, .we_z, .z_wdata,
    .pc_clr(end_task), .pc_set_we, .pc_set_task, .pc_set_val(PC_W'(pc_set_val)),
    .a_all(areg), .b_all(breg)
  );

  alu #(.DATA_W(DATA_W)) u_alu (
    .op(alu_op), .a, .b(alu_b), .y(alu_y), .zero(alu_zero)
  );

  control_logic_unit u_clu (
    .clk, .rst,
    .sel_task, .sel_valid, .run_task(runtaskid), .busy(cpu_busy),
    .rom_instr, .rom_task, .rom_pc,
    .ram(ram.master),
    .bank_task, .a, .b, .pc, .z,
    .we_a, .a_wdata, .we_b, .b_wdata, .we_pc, .pc_wdata, .we_z, .z_wdata,
    .alu_op, .alu_b, .alu_y, .alu_zero,
    .sc_valid, .sc_op, .sc_arg, .sc_task, .sc_a,
    .inport, .outport, .ir_out(ir), .instr_done
  );

  assign pcvalue = pc;
  assign opcode  = ir.op;
  assign opvalue = ir.val;
endmodule
