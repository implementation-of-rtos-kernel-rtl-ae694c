// trigger_controller: interrupt and task trigger controller with the
// per-task trigger counters.
//
// Each task has a counter of pending activations. It is incremented by
// that task's timer time-out, by a rising edge on that task's interrupt
// line, and by the task's bit in the trigger mask written by a system call
// (MSB = task 0). Several sources in the same cycle count once. It is
// decremented by the task's end-of-task system call. An increment and a
// decrement in the same cycle cancel. The counter saturates at its maximum
// and never goes below zero. sig shows the increment pulses; pending[i] is
// 1 while task i's counter is nonzero, which makes the task ready.
//
// Counters, their sources and the end-of-task decrement follow the kernel
// description. The counter width, edge detection on interrupts, one
// interrupt line per task and the merging of simultaneous sources are this
// design's choices.
module trigger_controller #(
  parameter int unsigned N_TASKS = 4,
  parameter int unsigned TCNT_W  = 4
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic [N_TASKS-1:0]              intr,
  input  logic [N_TASKS-1:0]              timeout,
  input  logic [N_TASKS-1:0]              trig_mask,  // MSB = task 0
  input  logic [N_TASKS-1:0]              end_task,   // bit i = task i
  output logic [N_TASKS-1:0]              sig,        // bit i = task i
  output logic [N_TASKS-1:0]              pending,
  output logic [N_TASKS-1:0][TCNT_W-1:0]  count
);
  logic [N_TASKS-1:0] intr_q;

  always_comb begin
    for (int i = 0; i < N_TASKS; i++) begin
      sig[i]     = timeout[i] | (intr[i] & ~intr_q[i]) | trig_mask[N_TASKS-1-i];
      pending[i] = (count[i] != '0);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      intr_q <= '0;
      count  <= '0;
    end else begin
      intr_q <= intr;
      for (int i = 0; i < N_TASKS; i++) begin
        if (sig[i] && !end_task[i]) begin
          if (count[i] != '1) count[i] <= count[i] + 1'b1;
        end else if (end_task[i] && !sig[i]) begin
          if (count[i] != '0) count[i] <= count[i] - 1'b1;
        end
      end
    end
  end
endmodule
