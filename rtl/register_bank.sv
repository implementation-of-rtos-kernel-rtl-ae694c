// register_bank: the banked registers of the four tasks.
//
// Every task has its own accumulator A, register B, program counter and
// zero flag, so a task switch needs no saving or restoring: the switching
// logic simply selects another bank. rd_task selects the bank that is read
// (combinationally); wr_task the bank that the we_* strobes write at the
// clock edge. Two kernel paths reach other banks: pc_clr (one-hot, bit i =
// task i) returns that task's program counter to 0 when it ends an
// iteration, and pc_set_* loads any task's program counter. Priority per
// program counter: pc_clr, then pc_set, then we_pc. Reset clears all banks.
// a_all/b_all expose every bank for observation.
// Banked A/B registers per task follow the design; banking the program
// counter and flag as well is how this design gives each task its own
// context.
module register_bank
#(
  parameter int unsigned N_TASKS = rtos_pkg::N_TASKS,
  parameter int unsigned DATA_W  = rtos_pkg::DATA_W,
  parameter int unsigned PC_W    = rtos_pkg::PC_W,
  localparam int unsigned TASK_W = (N_TASKS > 1) ? $clog2(N_TASKS) : 1
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic [TASK_W-1:0]              rd_task,
  output logic [DATA_W-1:0]              a,
  output logic [DATA_W-1:0]              b,
  output logic [PC_W-1:0]                pc,
  output logic                           z,
  input  logic [TASK_W-1:0]              wr_task,
  input  logic                           we_a,
  input  logic [DATA_W-1:0]              a_wdata,
  input  logic                           we_b,
  input  logic [DATA_W-1:0]              b_wdata,
  input  logic                           we_pc,
  input  logic [PC_W-1:0]                pc_wdata,
  input  logic                           we_z,
  input  logic                           z_wdata,
  input  logic [N_TASKS-1:0]             pc_clr,
  input  logic                           pc_set_we,
  input  logic [TASK_W-1:0]              pc_set_task,
  input  logic [PC_W-1:0]                pc_set_val,
  output logic [N_TASKS-1:0][DATA_W-1:0] a_all,
  output logic [N_TASKS-1:0][DATA_W-1:0] b_all
);
  logic [N_TASKS-1:0][DATA_W-1:0] a_q, b_q;
  logic [N_TASKS-1:0][PC_W-1:0]   pc_q;
  logic [N_TASKS-1:0]             z_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q  <= '0;
      b_q  <= '0;
      pc_q <= '0;
      z_q  <= '0;
    end else begin
      if (we_a) a_q[wr_task] <= a_wdata;
      if (we_b) b_q[wr_task] <= b_wdata;
      if (we_z) z_q[wr_task] <= z_wdata;
      for (int i = 0; i < N_TASKS; i++) begin
        if (pc_clr[i])                                  pc_q[i] <= '0;
        else if (pc_set_we && pc_set_task == TASK_W'(i)) pc_q[i] <= pc_set_val;
        else if (we_pc && wr_task == TASK_W'(i))          pc_q[i] <= pc_wdata;
      end
    end
  end

  assign a     = a_q[rd_task];
  assign b     = b_q[rd_task];
  assign pc    = pc_q[rd_task];
  assign z     = z_q[rd_task];
  assign a_all = a_q;
  assign b_all = b_q;
endmodule
