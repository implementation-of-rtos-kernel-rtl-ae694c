// data_ram: data memory with the read/write/ramack handshake.
//
// Each task addresses 2**ADDR_W words. The task id on the bus supplies the
// upper address lines, so words 0 .. 2**ADDR_W-SHARED_WORDS-1 are private
// to the task. The top SHARED_WORDS addresses map to one common bank that
// all tasks see; tasks keep mutex variables and messages there. A read or
// write request is answered with ramack in the next cycle, with read data
// registered in rdata. Reset clears the memory, so mutex variables start
// unlocked.
// Task-selected upper address lines and the read/write/ramack signals
// follow the design. The shared words, the one-cycle answer and the reset
// clearing are this design's choices: per-task memories alone leave no
// place for the RAM-held mutex variables that tasks share.
module data_ram #(
  parameter int unsigned N_TASKS      = 4,
  parameter int unsigned DATA_W       = 4,
  parameter int unsigned ADDR_W       = 4,
  parameter int unsigned SHARED_WORDS = 4
) (
  input logic clk,
  input logic rst,
  ram_if.slave ram
);
  localparam int unsigned PRIV  = 2**ADDR_W - SHARED_WORDS;
  localparam int unsigned WORDS = N_TASKS * PRIV + SHARED_WORDS;
  localparam int unsigned IDX_W = $clog2(WORDS);

  logic [DATA_W-1:0] mem [WORDS];
  logic [IDX_W-1:0]  idx;

  always_comb begin
    if (int'(ram.addr) >= PRIV) idx = IDX_W'(N_TASKS * PRIV + (int'(ram.addr) - PRIV));
    else                        idx = IDX_W'(int'(ram.task_id) * PRIV + int'(ram.addr));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= '0;
      ram.ramack <= 1'b0;
      ram.rdata  <= '0;
    end else begin
      ram.ramack <= (ram.read || ram.write) && !ram.ramack;
      if (ram.write && !ram.ramack) mem[idx] <= ram.wdata;
      if (ram.read && !ram.ramack)  ram.rdata <= mem[idx];
    end
  end
endmodule
