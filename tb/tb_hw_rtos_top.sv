// tb_hw_rtos_top: end-to-end test of the hardware RTOS at its default
// parameters. Six scenarios, each after a reset, each with its own task
// programs loaded through the program port:
//   1 basic processor : task 0 alone runs the load/store/jump/add example
//                       and must take 33 cycles (3 or 4 per instruction).
//   2 competing tasks : tasks 2 and 3 periodic, tasks 0 and 1 started by
//                       interrupts while task 2 runs; task 2 is preempted,
//                       0 finishes before 1, the interrupt tasks run once.
//   3 series trigger  : 0 (interrupt) triggers 1, 1 triggers 2, 2 triggers 3.
//   4 blocking        : all four interrupted at once; task 0 suspends the
//                       other three and ends; nothing else may run.
//   5 mutex           : tasks 2 and 1 share a mutex and a counter in the
//                       shared RAM words; task 1 interrupts while task 2
//                       holds the lock and must wait until it is released.
//   6 resume point    : task 0 loads task 3's program counter and triggers
//                       it; task 3 must start from that point.
// Monitors check throughout that every instruction starts on the highest-
// priority ready task (trigger counter nonzero, not suspended), that a
// preempting interrupt takes over within 6 cycles, and that triggers equal
// completed iterations plus what the counters still hold. Each mechanism
// (timer, interrupt and mask triggers, preemption, suspension, resume,
// program-counter load, RAM handshake, shared RAM, idle) is counted and
// must occur at least once.
module tb_hw_rtos_top;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- stimulus helpers ----------------
  task automatic put(int t, int p, opcode_e op, int v);
    @(negedge clk);
    prog_we = 1; prog_addr = 6'(t * 16 + p); prog_data = asm(op, 4'(v));
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic clear_rom();
    for (int i = 0; i < 64; i++) put(i / 16, i % 16, OP_MISC, MI_END);
  endtask

  task automatic do_reset();
    @(negedge clk); rst = 1;
    repeat (2) @(negedge clk); rst = 0;
  endtask

  task automatic set_period(int t, int p);
    @(negedge clk); cfg_we = 1; cfg_task = 2'(t); cfg_period = 8'(p);
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic interrupt(logic [3:0] m);
    @(negedge clk); intr = m;
    repeat (2) @(negedge clk); intr = '0;
  endtask

  task automatic wait_idle(int max);
    int n = 0;
    do begin @(negedge clk); n++; end while ((cpu_busy || trig_count != '0 && !all_blocked()) && n < max);
    check(n < max, "system did not go idle");
  endtask

  function automatic bit all_blocked();
    for (int i = 0; i < 4; i++) if (trig_count[i] != 0 && !suspend_mask[3 - i]) return 0;
    return 1;
  endfunction

  function automatic int highest_ready();
    for (int i = 0; i < 4; i++) if (trig_count[i] != 0 && !suspend_mask[3 - i]) return i;
    return -1;
  endfunction

  // ---------------- monitors (sampled mid-cycle) ----------------
  int ends [4], trigs [4];
  int end_order [$];
  int n_timer = 0, n_intr = 0, n_mask = 0, n_preempt = 0, n_susp = 0, n_block_wait = 0;
  int n_resume = 0, n_setpc = 0, n_mem = 0, n_idle = 0, n_prio_checks = 0, n_shared = 0;
  int busy_total = 0, ready_mismatch = 0;
  int exp_next = -1, prev_task = 0, max_latency = 0;
  bit fetch_next = 0, was_done = 0;
  logic [3:0] intr_q = '0, susp_q = '0, trig_syscall_q = '0;
  int intr_wait [4];

  initial foreach (intr_wait[i]) intr_wait[i] = -1;

  always @(negedge clk) begin
    if (rst) begin
      fetch_next = 0; was_done = 0; exp_next = -1;
      intr_q = '0; susp_q = '0; trig_syscall_q = '0;
      foreach (intr_wait[i]) intr_wait[i] = -1;
    end else begin
      // Trigger sources.
      for (int i = 0; i < 4; i++) if (sig[i]) begin
        trigs[i]++;
        if (intr[i] && !intr_q[i]) n_intr++;
        else if (trig_syscall_q[3 - i]) n_mask++;
        else n_timer++;
      end
      trig_syscall_q = '0;
      // Priority rule: the instruction after a fetch belongs to the task
      // that was the highest ready one during the fetch cycle.
      if (fetch_next) begin
        if (exp_next >= 0) begin
          n_prio_checks++;
          check(int'(runtaskid) == exp_next, $sformatf("task %0d runs, task %0d was highest ready", runtaskid, exp_next));
          if (int'(runtaskid) != prev_task && int'(runtaskid) < prev_task && pending_unblocked_q[prev_task]) n_preempt++;
        end
        fetch_next = 0;
      end
      if (was_done || (!cpu_busy_q && cpu_busy)) begin
        exp_next = highest_ready();
        fetch_next = (exp_next >= 0);
        prev_task = int'(runtaskid);
        for (int i = 0; i < 4; i++) pending_unblocked_q[i] = (trig_count[i] != 0 && !suspend_mask[3 - i]);
      end
      was_done = instr_done;
      for (int i = 0; i < 4; i++)
        if (ready[i] != (trig_count[i] != 0 && !suspend_mask[3 - i])) ready_mismatch++;
      if (!cpu_busy) n_idle++;
      else busy_total++;
      // Completed instructions.
      if (instr_done) begin
        if (opcode == OP_MISC && opvalue == MI_END) begin ends[runtaskid]++; end_order.push_back(int'(runtaskid)); end
        if (opcode == OP_SUSP) n_susp++;
        if (opcode == OP_TRIG) trig_syscall_q = opvalue;
        if (opcode == OP_SETPC) n_setpc++;
        if (opcode inside {OP_LDA, OP_LDB, OP_STA, OP_STB, OP_OUTM}) begin
          n_mem++;
          if (opvalue >= 12) n_shared++;
        end
      end
      // Suspension effects.
      for (int i = 0; i < 4; i++)
        if (trig_count[i] != 0 && suspend_mask[3 - i] && (!cpu_busy || runtaskid > 2'(i))) begin n_block_wait++; break; end
      for (int i = 0; i < 4; i++) if (susp_q[i] && !suspend_mask[i]) n_resume++;
      susp_q = suspend_mask;
      // Preemption latency: cycles from an interrupt edge until its task runs.
      for (int i = 0; i < 4; i++) begin
        if (intr_wait[i] >= 0) begin
          if (int'(runtaskid) == i && cpu_busy) begin
            if (intr_wait[i] > max_latency) max_latency = intr_wait[i];
            check(intr_wait[i] <= 6, $sformatf("task %0d took %0d cycles to take over", i, intr_wait[i]));
            intr_wait[i] = -1;
          end else intr_wait[i]++;
        end
        if (intr[i] && !intr_q[i] && cpu_busy && runtaskid > 2'(i) && highest_before_is(i)) intr_wait[i] = 0;
      end
      intr_q = intr;
      cpu_busy_q = cpu_busy;
    end
  end
  logic cpu_busy_q = 0;
  bit pending_unblocked_q [4];

  // True when no task above i is ready, so i will be the next to run.
  function automatic bit highest_before_is(int i);
    for (int j = 0; j < i; j++) begin
      if (trig_count[j] != 0 && !suspend_mask[3 - j]) return 0;
      if (intr[j] && !intr_q[j]) return 0;
    end
    return !suspend_mask[3 - i];
  endfunction

  task automatic conservation(string where);
    for (int i = 0; i < 4; i++)
      check(trigs[i] == ends[i] + int'(trig_count[i]),
            $sformatf("%s: task %0d triggered %0d, ended %0d, counter %0d", where, i, trigs[i], ends[i], trig_count[i]));
  endtask

  task automatic clear_counts();
    foreach (ends[i]) begin ends[i] = 0; trigs[i] = 0; end
    end_order.delete();
  endtask

  // ---------------- scenarios ----------------
  initial begin
    int t0, busy_cycles;
    // 1: basic processor example on task 0.
    clear_rom();
    put(0, 0, OP_MISC, MI_NOP); put(0, 1, OP_LDAI, 5); put(0, 2, OP_STA, 3);
    put(0, 3, OP_OUTM, 3); put(0, 4, OP_JMP, 11); put(0, 11, OP_LDB, 3);
    put(0, 12, OP_LDAI, 6); put(0, 13, OP_ADD, 13); put(0, 14, OP_MISC, MI_OUTA);
    put(0, 15, OP_MISC, MI_END);
    do_reset(); clear_counts();
    busy_total = 0;
    interrupt(4'b0001);
    repeat (60) @(negedge clk);
    busy_cycles = busy_total;
    check(busy_cycles == 33, $sformatf("example took %0d cycles, expected 33", busy_cycles));
    check(areg[0] == 11 && breg[0] == 5 && outport == 11, $sformatf("example: A=%0d B=%0d out=%0d", areg[0], breg[0], outport));
    check(ends[0] == 1 && trig_count[0] == 0, "example did not end once");
    conservation("example");

    // 2: competing tasks.
    clear_rom();
    for (int t = 0; t < 4; t++) begin
      put(t, 0, OP_LDA, 0); put(t, 1, OP_MISC, MI_INCA); put(t, 2, OP_STA, 0);
    end
    put(0, 3, OP_MISC, MI_OUTA); put(0, 4, OP_MISC, MI_END);
    put(1, 3, OP_MISC, MI_OUTA); put(1, 4, OP_MISC, MI_END);
    for (int p = 3; p < 12; p++) put(2, p, OP_MISC, MI_NOP);
    put(2, 12, OP_MISC, MI_END);
    put(3, 3, OP_MISC, MI_END);
    do_reset(); clear_counts();
    set_period(2, 70); set_period(3, 110);
    check(timer_count[2] == 68 && timer_count[3] == 110 && timer_count[0] == 0, "timers not loaded with their periods");
    // wait until task 2 runs, then interrupt tasks 0 and 1
    t0 = 0;
    do begin @(negedge clk); t0++; end while (!(cpu_busy && runtaskid == 2 && pcvalue >= 4) && t0 < 400);
    interrupt(4'b0011);
    repeat (500) @(negedge clk);
    check(ends[0] == 1 && ends[1] == 1, $sformatf("interrupt tasks ran %0d and %0d times", ends[0], ends[1]));
    check(trig_count[0] == 0 && trig_count[1] == 0, "interrupt tasks left pending");
    begin
      int i0, i1;
      i0 = -1; i1 = -1;
      foreach (end_order[k]) begin
        if (end_order[k] == 0 && i0 < 0) i0 = k;
        if (end_order[k] == 1 && i1 < 0) i1 = k;
      end
      check(i0 >= 0 && i1 > i0, "task 0 did not finish before task 1");
    end
    check(ends[2] >= 6 && ends[3] >= 4, $sformatf("periodic tasks ran %0d and %0d times", ends[2], ends[3]));
    conservation("competing");
    set_period(2, 0); set_period(3, 0);
    wait_idle(300);

    // 3: triggering in series.
    clear_rom();
    put(0, 0, OP_LDAI, 5); put(0, 1, OP_TRIG, 4'b0100); put(0, 2, OP_MISC, MI_END);
    put(1, 0, OP_LDAI, 5); put(1, 1, OP_TRIG, 4'b0010); put(1, 2, OP_MISC, MI_END);
    put(2, 0, OP_LDAI, 5); put(2, 1, OP_TRIG, 4'b0001); put(2, 2, OP_MISC, MI_END);
    put(3, 0, OP_LDAI, 5); put(3, 1, OP_MISC, MI_OUTA); put(3, 2, OP_MISC, MI_END);
    do_reset(); clear_counts();
    interrupt(4'b0001);
    wait_idle(300);
    check(end_order.size() == 4 && end_order[0] == 0 && end_order[1] == 1 && end_order[2] == 2 && end_order[3] == 3,
          $sformatf("series order wrong (%0d ends)", end_order.size()));
    check(areg == {4'd5, 4'd5, 4'd5, 4'd5} && outport == 5, "series: registers or output wrong");
    conservation("series");

    // 4: task 0 blocks the other three.
    clear_rom();
    put(0, 0, OP_LDAI, 5); put(0, 1, OP_SUSP, 4'b0111); put(0, 2, OP_MISC, MI_END);
    for (int t = 1; t < 4; t++) begin put(t, 0, OP_LDAI, 5); put(t, 1, OP_MISC, MI_END); end
    do_reset(); clear_counts();
    interrupt(4'b1111);
    repeat (100) @(negedge clk);
    check(ends[0] == 1 && ends[1] == 0 && ends[2] == 0 && ends[3] == 0, "blocked tasks ran");
    check(trig_count[1] == 1 && trig_count[2] == 1 && trig_count[3] == 1 && trig_count[0] == 0, "blocked tasks lost their triggers");
    check(suspend_mask == 4'b0111 && !cpu_busy, "suspend mask not kept or processor not idle");
    check(areg[0] == 5 && areg[1] == 0 && areg[2] == 0 && areg[3] == 0, "blocked task registers changed");
    conservation("blocking");

    // 5: mutex in shared RAM (word 15 lock, word 14 counter).
    clear_rom();
    for (int t = 1; t <= 2; t++) begin
      put(t, 0, OP_LDA, 15); put(t, 1, OP_JNZ, 0); put(t, 2, OP_LDAI, 1); put(t, 3, OP_STA, 15);
      put(t, 4, OP_SUSP, (t == 2) ? 4'b0100 : 4'b0010);
      put(t, 5, OP_LDA, 14); put(t, 6, OP_MISC, MI_INCA); put(t, 7, OP_MISC, MI_NOP); put(t, 8, OP_MISC, MI_NOP);
      put(t, 9, OP_STA, 14); put(t, 10, OP_LDAI, 0); put(t, 11, OP_STA, 15); put(t, 12, OP_SUSP, 0);
      put(t, 13, OP_MISC, MI_END);
    end
    put(3, 0, OP_LDA, 14); put(3, 1, OP_MISC, MI_OUTA); put(3, 2, OP_MISC, MI_END);
    do_reset(); clear_counts();
    interrupt(4'b0100);
    t0 = 0;
    do begin @(negedge clk); t0++; end while (suspend_mask != 4'b0100 && t0 < 200);
    check(suspend_mask == 4'b0100, "task 2 never took the lock");
    interrupt(4'b0010);
    // Task 1 must not run while the lock is held.
    begin
      int ran_early = 0;
      t0 = 0;
      while (suspend_mask == 4'b0100 && t0 < 200) begin
        if (cpu_busy && runtaskid == 1) ran_early++;
        @(negedge clk); t0++;
      end
      check(ran_early == 0, "task 1 ran while task 2 held the mutex");
    end
    wait_idle(300);
    // Task 2's resume call lets task 1 in before task 2 reaches its end.
    check(end_order.size() == 2 && end_order[0] == 1 && end_order[1] == 2, "mutex users did not finish in order 1, 2");
    interrupt(4'b1000);
    wait_idle(100);
    check(outport == 2, $sformatf("shared counter %0d, expected 2", outport));
    check(suspend_mask == 0, "mutex left tasks suspended");
    conservation("mutex");

    // 6: resume point set with SETPC.
    clear_rom();
    put(0, 0, OP_LDAI, 5); put(0, 1, OP_SETPC, 3); put(0, 2, OP_TRIG, 4'b0001); put(0, 3, OP_MISC, MI_END);
    put(3, 0, OP_LDAI, 1); put(3, 1, OP_MISC, MI_OUTA); put(3, 2, OP_MISC, MI_END);
    put(3, 5, OP_LDAI, 9); put(3, 6, OP_MISC, MI_OUTA); put(3, 7, OP_MISC, MI_END);
    do_reset(); clear_counts();
    interrupt(4'b0001);
    wait_idle(100);
    check(outport == 9 && ends[3] == 1, $sformatf("task 3 did not resume at word 5 (out=%0d)", outport));
    interrupt(4'b1000);
    wait_idle(100);
    check(outport == 1, "task 3 did not restart from word 0 after ending");
    conservation("setpc");

    // Every mechanism must have happened.
    $display("mechanisms: timer=%0d intr=%0d mask=%0d preempt=%0d suspend=%0d blocked_wait=%0d resume=%0d setpc=%0d mem=%0d shared=%0d idle=%0d prio_checks=%0d max_latency=%0d",
             n_timer, n_intr, n_mask, n_preempt, n_susp, n_block_wait, n_resume, n_setpc, n_mem, n_shared, n_idle, n_prio_checks, max_latency);
    check(n_timer > 0, "no timer trigger");
    check(n_intr > 0, "no interrupt trigger");
    check(n_mask > 0, "no trigger-mask system call");
    check(n_preempt > 0, "no preemption");
    check(n_susp > 0, "no suspend system call");
    check(n_block_wait > 0, "no ready task was held back by the suspend mask");
    check(n_resume > 0, "no resume");
    check(n_setpc > 0, "no program-counter load");
    check(n_mem > 0 && n_shared > 0, "no RAM or shared RAM access");
    check(n_idle > 0, "processor never idle");
    check(n_prio_checks > 50, "too few priority checks");
    check(ready_mismatch == 0, $sformatf("ready output wrong in %0d task-cycles", ready_mismatch));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
