// syscall_interface: turns system-call instructions into kernel actions.
//
// The control logic unit raises sc_valid for one cycle while it executes a
// system call, with the call kind (sc_op), its operand (sc_arg), the
// calling task (sc_task) and the caller's accumulator (sc_a).
//   SC_END   : end_task gets the caller's bit (one-hot, bit i = task i) in
//              the same cycle; it decrements the caller's trigger counter
//              and returns its program counter to 0.
//   SC_SUSP  : susp_we/susp_mask write the suspend mask register (MSB =
//              task 0) in the same cycle.
//   SC_TRIG  : the mask goes into the trigger mask register. That register
//              holds it for exactly one cycle and then clears itself, so
//              each marked task is triggered once. The counters therefore
//              move one cycle after the call, so the calling task runs one
//              more instruction before a task it triggered can take over.
//   SC_SETPC : pc_set_* load the program counter of task sc_arg with sc_a,
//              so a task can make another one resume at a chosen point.
// End-of-task, suspend and trigger masks and the program-counter load come
// from the kernel and hybrid-RTOS description; the operand encoding and
// the same-cycle end/suspend strobes are this design's choices.
module syscall_interface
#(
  parameter int unsigned N_TASKS = rtos_pkg::N_TASKS,
  parameter int unsigned DATA_W  = rtos_pkg::DATA_W,
  localparam int unsigned TASK_W = (N_TASKS > 1) ? $clog2(N_TASKS) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               sc_valid,
  input  rtos_pkg::syscall_e           sc_op,
  input  logic [DATA_W-1:0]  sc_arg,
  input  logic [TASK_W-1:0]  sc_task,
  input  logic [DATA_W-1:0]  sc_a,
  output logic [N_TASKS-1:0] end_task,
  output logic               susp_we,
  output logic [N_TASKS-1:0] susp_mask,
  output logic [N_TASKS-1:0] trig_mask,
  output logic               pc_set_we,
  output logic [TASK_W-1:0]  pc_set_task,
  output logic [DATA_W-1:0]  pc_set_val
);
  always_comb begin
    end_task    = '0;
    if (sc_valid && sc_op == rtos_pkg::SC_END) end_task[sc_task] = 1'b1;
    susp_we     = sc_valid && (sc_op == rtos_pkg::SC_SUSP);
    susp_mask   = sc_arg[N_TASKS-1:0];
    pc_set_we   = sc_valid && (sc_op == rtos_pkg::SC_SETPC);
    pc_set_task = sc_arg[TASK_W-1:0];
    pc_set_val  = sc_a;
  end

  // Self-clearing trigger mask register.
  always_ff @(posedge clk) begin
    if (rst)                              trig_mask <= '0;
    else if (sc_valid && sc_op == rtos_pkg::SC_TRIG) trig_mask <= sc_arg[N_TASKS-1:0];
    else                                  trig_mask <= '0;
  end
endmodule
