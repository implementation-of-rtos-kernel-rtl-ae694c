// tb_hybrid_sync: the hybrid synchronisation recipes run as task programs
// on the full design at default parameters.
//   Mutex, lock found taken: task 2 holds the lock (shared word 15) while
//   task 1 interrupts. Task 1 sees the lock, sets the waiter flag (word 13)
//   and suspends itself. Task 2 finishes, frees the lock, sees the flag and
//   clears the suspend mask. Task 1 continues, clears the flag, retries and
//   increments the shared counter (word 14). The counter must end at 2,
//   the flag at 0, task 1 must have suspended itself, and task 1's END
//   must come before task 2's.
//   Wait on a task: task 1 marks a breakpoint in its private word 0, writes
//   its number into word 12 and triggers task 3, then ends. Task 3 produces
//   a result (7 in shared word 14), finds the waiter in word 12 and triggers it.
//   Task 1 starts again, sees its breakpoint, outputs the result and ends.
//   The trigger passes through the one-cycle trigger mask register, so
//   task 3 still executes the END that follows its TRIG before task 1 takes
//   over: the ends come in the order 1, 3, 1.
//   Run twice: the breakpoint must be cleared in between.
module tb_hybrid_sync;
  import rtos_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  logic [3:0] intr = '0;
  logic cfg_we = 0;
  logic [1:0] cfg_task = '0;
  logic [7:0] cfg_period = '0;
  logic prog_we = 0;
  logic [5:0] prog_addr = '0;
  logic [7:0] prog_data = '0;
  logic [3:0] inport = '0;
  logic [3:0] outport, sig, suspend_mask, pcvalue, opcode, opvalue;
  logic [1:0] runtaskid;
  logic cpu_busy, instr_done;
  logic [3:0][3:0] trig_count, areg, breg;
  logic [3:0] ready;
  logic [3:0][7:0] timer_count;

  hw_rtos_top dut (.clk, .rst, .intr, .cfg_we, .cfg_task, .cfg_period, .prog_we, .prog_addr, .prog_data,
    .inport, .outport, .runtaskid, .cpu_busy, .sig, .ready, .timer_count, .trig_count, .suspend_mask, .instr_done,
    .pcvalue, .opcode, .opvalue, .areg, .breg);

  always #5 clk = ~clk;

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic put(int t, int p, opcode_e op, int v);
    @(negedge clk);
    prog_we = 1; prog_addr = 6'(t * 16 + p); prog_data = asm(op, 4'(v));
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic interrupt(logic [3:0] m);
    @(negedge clk); intr = m;
    repeat (2) @(negedge clk); intr = '0;
  endtask

  task automatic wait_idle();
    int n = 0;
    do begin @(negedge clk); n++; end while ((cpu_busy || trig_count != '0) && n < 1000);
    check(n < 1000, "did not go idle");
  endtask

  int end_order [$];
  int self_suspended = 0;
  always @(negedge clk) if (!rst) begin
    if (instr_done && opcode == OP_MISC && opvalue == MI_END) end_order.push_back(int'(runtaskid));
    if (instr_done && opcode == OP_SUSP && opvalue == 4'b0100 && runtaskid == 1) self_suspended++;
  end

  initial begin
    int t0;
    for (int i = 0; i < 64; i++) put(i / 16, i % 16, OP_MISC, MI_END);
    // Mutex users. Task 1:
    put(1, 0, OP_LDA, 15);  put(1, 1, OP_JNZ, 10);  put(1, 2, OP_LDAI, 1); put(1, 3, OP_STA, 15);
    put(1, 4, OP_LDA, 14);  put(1, 5, OP_MISC, MI_INCA); put(1, 6, OP_STA, 14);
    put(1, 7, OP_LDAI, 0);  put(1, 8, OP_STA, 15);  put(1, 9, OP_MISC, MI_END);
    put(1, 10, OP_LDAI, 1); put(1, 11, OP_STA, 13); put(1, 12, OP_SUSP, 4'b0100);
    put(1, 13, OP_LDAI, 0); put(1, 14, OP_STA, 13); put(1, 15, OP_JMP, 0);
    // Task 2:
    put(2, 0, OP_LDA, 15);  put(2, 1, OP_JNZ, 0);   put(2, 2, OP_LDAI, 1); put(2, 3, OP_STA, 15);
    put(2, 4, OP_LDA, 14);  put(2, 5, OP_MISC, MI_INCA); put(2, 6, OP_MISC, MI_NOP); put(2, 7, OP_MISC, MI_NOP);
    put(2, 8, OP_STA, 14);  put(2, 9, OP_LDAI, 0);  put(2, 10, OP_STA, 15);
    put(2, 11, OP_LDA, 13); put(2, 12, OP_JZ, 14);  put(2, 13, OP_SUSP, 4'b0000); put(2, 14, OP_MISC, MI_END);
    // Task 3 reports: 15 if the waiter flag is still set, else the counter.
    put(3, 0, OP_LDA, 13);  put(3, 1, OP_JNZ, 4);   put(3, 2, OP_OUTM, 14); put(3, 3, OP_MISC, MI_END);
    put(3, 4, OP_LDAI, 15); put(3, 5, OP_MISC, MI_OUTA); put(3, 6, OP_MISC, MI_END);

    @(negedge clk); rst = 1; repeat (2) @(negedge clk); rst = 0;
    interrupt(4'b0100);
    // Interrupt task 1 once task 2 has taken the lock (its pc is past word 4).
    t0 = 0;
    do begin @(negedge clk); t0++; end while (!(runtaskid == 2 && pcvalue >= 5) && t0 < 200);
    interrupt(4'b0010);
    wait_idle();
    check(self_suspended == 1, $sformatf("task 1 suspended itself %0d times, expected once", self_suspended));
    check(end_order.size() == 2 && end_order[0] == 1 && end_order[1] == 2, "mutex ends not in order 1, 2");
    check(suspend_mask == 0, "suspension left in place");
    end_order.delete();
    interrupt(4'b1000);
    wait_idle();
    check(outport == 2, $sformatf("mutex report %0d, expected counter 2 and flag clear", outport));

    // Wait on a task. Task 1:
    for (int i = 16; i < 64; i++) put(i / 16, i % 16, OP_MISC, MI_END);
    put(1, 0, OP_LDA, 0);   put(1, 1, OP_JNZ, 8);   put(1, 2, OP_LDAI, 1); put(1, 3, OP_STA, 0);
    put(1, 4, OP_LDAI, 1);  put(1, 5, OP_STA, 12);  put(1, 6, OP_TRIG, 4'b0001); put(1, 7, OP_MISC, MI_END);
    put(1, 8, OP_LDAI, 0);  put(1, 9, OP_STA, 0);   put(1, 10, OP_OUTM, 14); put(1, 11, OP_MISC, MI_END);
    // Task 3:
    put(3, 0, OP_LDAI, 7);  put(3, 1, OP_STA, 14);  put(3, 2, OP_LDA, 12); put(3, 3, OP_CMPI, 1);
    put(3, 4, OP_JNZ, 8);   put(3, 5, OP_LDAI, 0);  put(3, 6, OP_STA, 12); put(3, 7, OP_TRIG, 4'b0100);
    put(3, 8, OP_MISC, MI_END);
    @(negedge clk); rst = 1; repeat (2) @(negedge clk); rst = 0;
    end_order.delete();
    for (int run = 0; run < 2; run++) begin
      interrupt(4'b0010);
      wait_idle();
      check(outport == 7, $sformatf("run %0d: waiter output %0d, expected 7", run, outport));
      check(end_order.size() == 3 * (run + 1), $sformatf("run %0d: %0d ends", run, end_order.size()));
      if (end_order.size() == 3 * (run + 1))
        check(end_order[3 * run] == 1 && end_order[3 * run + 1] == 3 && end_order[3 * run + 2] == 1,
              $sformatf("run %0d: end order wrong: %p", run, end_order));
      @(negedge clk); inport = 0;
      // Clear the output between runs so the second run must write it again.
      if (run == 0) begin
        put(0, 0, OP_LDAI, 0); put(0, 1, OP_MISC, MI_OUTA); put(0, 2, OP_MISC, MI_END);
        interrupt(4'b0001); wait_idle();
        check(outport == 0, "output not cleared between runs");
        void'(end_order.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
