// tb_syscall_interface: each system-call kind is issued from each task with
// random operands. End and suspend strobes must appear in the same cycle;
// the trigger mask must appear for exactly the next cycle and then clear.
module tb_syscall_interface;
  import rtos_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sc_valid = 0;
  syscall_e sc_op = SC_END;
  logic [3:0] sc_arg = '0, sc_a = '0;
  logic [1:0] sc_task = '0;
  logic [3:0] end_task, susp_mask, trig_mask, pc_set_val;
  logic susp_we, pc_set_we;
  logic [1:0] pc_set_task;

  syscall_interface #(.N_TASKS(4), .DATA_W(4)) dut (.clk, .rst, .sc_valid, .sc_op, .sc_arg, .sc_task, .sc_a,
    .end_task, .susp_we, .susp_mask, .trig_mask, .pc_set_we, .pc_set_task, .pc_set_val);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 400; k++) begin
      logic [3:0] prev_trig;
      bit v;
      v = $urandom_range(0, 4) != 0;
      sc_valid = v; sc_op = syscall_e'($urandom_range(0, 3));
      sc_arg = 4'($urandom); sc_task = 2'($urandom); sc_a = 4'($urandom);
      #1;
      check(end_task == ((v && sc_op == SC_END) ? 4'(1 << sc_task) : 4'b0), $sformatf("end_task %b", end_task));
      check(susp_we == (v && sc_op == SC_SUSP) && (!susp_we || susp_mask == sc_arg), "suspend strobe");
      check(pc_set_we == (v && sc_op == SC_SETPC) && (!pc_set_we || (pc_set_task == sc_arg[1:0] && pc_set_val == sc_a)), "setpc strobe");
      prev_trig = (v && sc_op == SC_TRIG) ? sc_arg : 4'b0;
      @(negedge clk);
      sc_valid = 0;
      #1;
      check(trig_mask == prev_trig, $sformatf("trig_mask %b exp %b", trig_mask, prev_trig));
      @(negedge clk);
      check(trig_mask == 0, "trig_mask not cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
