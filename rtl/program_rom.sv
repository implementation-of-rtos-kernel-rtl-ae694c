// program_rom: code memory of the four tasks.
//
// N_TASKS x 2**PC_W words of INSTR_W bits. The read address is {task_id,
// pc}: the task switcher drives the upper address lines, so each task has
// its own 16-instruction program and a task switch needs no change of the
// program counter. The read is synchronous: instr is valid the cycle after
// the address. The memory is read-only to the processor; prog_* is the
// load port through which the program image is written before the tasks
// are started (the role of the configuration step that fills an FPGA block
// RAM). Memory size from the 4-bit program counter and four tasks; the load
// port and the synchronous read are this design's choices.
module program_rom #(
  parameter int unsigned N_TASKS = 4,
  parameter int unsigned PC_W    = 4,
  parameter int unsigned INSTR_W = 8,
  localparam int unsigned TASK_W = (N_TASKS > 1) ? $clog2(N_TASKS) : 1
) (
  input  logic                     clk,
  input  logic                     prog_we,
  input  logic [TASK_W+PC_W-1:0]   prog_addr,
  input  logic [INSTR_W-1:0]       prog_data,
  input  logic [TASK_W-1:0]        task_id,
  input  logic [PC_W-1:0]          pc,
  output logic [INSTR_W-1:0]       instr
);
  logic [INSTR_W-1:0] mem [N_TASKS * (2**PC_W)];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
    instr <= mem[{task_id, pc}];
  end
endmodule
