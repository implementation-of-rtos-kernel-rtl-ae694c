// bank_switching_logic: chooses which task owns the processor.
//
// A task is ready when its trigger counter is nonzero (pending) and the
// suspend mask does not block it. Priority is fixed: task 0 is the highest,
// task N_TASKS-1 the lowest. The choice is combinational; the control logic
// unit takes it at every instruction boundary, so a higher-priority task
// preempts a lower one after the instruction in flight, and the switch
// itself costs only the fetch cycle every instruction has. sel_task selects
// the register bank and the upper ROM and RAM address bits. sel_valid is 0
// when no task is ready and the processor idles.
// Hard-wired priority and the ready rule follow the kernel description.
module bank_switching_logic #(
  parameter int unsigned N_TASKS = 4,
  localparam int unsigned TASK_W = (N_TASKS > 1) ? $clog2(N_TASKS) : 1
) (
  input  logic [N_TASKS-1:0] pending,
  input  logic [N_TASKS-1:0] blocked,
  output logic [N_TASKS-1:0] ready,
  output logic [TASK_W-1:0]  sel_task,
  output logic               sel_valid
);
  always_comb begin
    ready     = pending & ~blocked;
    sel_task  = '0;
    sel_valid = 1'b0;
    for (int i = N_TASKS - 1; i >= 0; i--) begin
      if (ready[i]) begin
        sel_task  = TASK_W'(i);
        sel_valid = 1'b1;
      end
    end
  end
endmodule
