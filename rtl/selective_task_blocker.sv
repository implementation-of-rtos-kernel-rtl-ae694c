// selective_task_blocker: the suspend mask register.
//
// A suspend system call writes the whole mask at once (we for one cycle).
// The register keeps its value until the next suspend call. The mask's MSB
// is task 0 (highest priority) and its LSB task N_TASKS-1; a 1 blocks that
// task. blocked is the same information indexed by task number
// (blocked[i] = task i). Reset clears the mask, so no task is blocked.
// Everything but the reset value follows the kernel description.
module selective_task_blocker #(
  parameter int unsigned N_TASKS = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               we,
  input  logic [N_TASKS-1:0] mask,          // MSB = task 0
  output logic [N_TASKS-1:0] suspend_mask,  // MSB = task 0
  output logic [N_TASKS-1:0] blocked        // bit i = task i
);
  always_ff @(posedge clk) begin
    if (rst)     suspend_mask <= '0;
    else if (we) suspend_mask <= mask;
  end

  always_comb
    for (int i = 0; i < N_TASKS; i++) blocked[i] = suspend_mask[N_TASKS-1-i];
endmodule
