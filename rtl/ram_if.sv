// ram_if: request/acknowledge bus between the control logic unit and the
// data RAM.
//
// The master raises read or write (never both) together with the task id,
// the word address and, for a write, the data, and holds them until ramack.
// The RAM answers with ramack one cycle later; for a read, rdata is valid in
// the ramack cycle. The task id forms the upper RAM address bits, so each
// task sees its own data words. The one-cycle answer is this design's
// choice; the handshake signal names follow the basic processor's trace.
interface ram_if #(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned TASK_W = 2
) (
  input logic clk
);
  logic              read;
  logic              write;
  logic [TASK_W-1:0] task_id;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] wdata;
  logic [DATA_W-1:0] rdata;
  logic              ramack;

  modport master (output read, write, task_id, addr, wdata, input rdata, ramack);
  modport slave  (input read, write, task_id, addr, wdata, output rdata, ramack);

  // A request is a read or a write, not both.
  a_one_request: assert property (@(posedge clk) !(read && write));
endinterface
