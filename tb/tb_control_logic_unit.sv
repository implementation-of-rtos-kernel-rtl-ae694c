// tb_control_logic_unit: the control logic unit with the ALU, register
// bank, ROM and RAM around it, the task selection driven from here.
//  - Task 0 runs the basic-processor example (no-op, load 5, store, output
//    from RAM, jump to 11, load B, load 6, add, output A, end); the
//    instruction sequence, the 3/4-cycle instruction times, the output
//    port and the final A = 11, B = 5 are checked.
//  - Task 1 exercises the remaining instructions and is preempted halfway
//    by task 3; its result must be unaffected (banked registers).
//  - Task 2 issues the system calls; their strobes are checked.
//  - With no task selected the unit must idle.
module tb_control_logic_unit;
  import rtos_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  logic [1:0] sel_task = '0, run_task, rom_task, bank_task, sc_task;
  logic sel_valid = 0, busy, instr_done;
  logic [7:0] rom_instr;
  logic [3:0] rom_pc, a, b, pc, a_wdata, b_wdata, pc_wdata, alu_b, alu_y, sc_arg, sc_a, outport;
  logic [3:0] inport = 4'd9;
  logic z, we_a, we_b, we_pc, we_z, z_wdata, alu_zero, sc_valid;
  alu_op_e alu_op;
  syscall_e sc_op;
  instr_t ir;
  logic prog_we = 0;
  logic [5:0] prog_addr = '0;
  logic [7:0] prog_data = '0;
  logic [3:0] pc_clr;
  logic [3:0][3:0] a_all, b_all;

  ram_if #(.DATA_W(4), .ADDR_W(4), .TASK_W(2)) bus (.clk(clk));

  control_logic_unit dut (.clk, .rst, .sel_task, .sel_valid, .run_task, .busy,
    .rom_instr, .rom_task, .rom_pc, .ram(bus.master), .bank_task, .a, .b, .pc, .z,
    .we_a, .a_wdata, .we_b, .b_wdata, .we_pc, .pc_wdata, .we_z, .z_wdata,
    .alu_op, .alu_b, .alu_y, .alu_zero, .sc_valid, .sc_op, .sc_arg, .sc_task, .sc_a,
    .inport, .outport, .ir_out(ir), .instr_done);

  alu u_alu (.op(alu_op), .a, .b(alu_b), .y(alu_y), .zero(alu_zero));
  program_rom u_rom (.clk, .prog_we, .prog_addr, .prog_data, .task_id(rom_task), .pc(rom_pc), .instr(rom_instr));
  data_ram u_ram (.clk, .rst, .ram(bus.slave));
  register_bank u_bank (.clk, .rst, .rd_task(bank_task), .a, .b, .pc, .z, .wr_task(run_task),
    .we_a, .a_wdata, .we_b, .b_wdata, .we_pc, .pc_wdata, .we_z, .z_wdata,
    .pc_clr, .pc_set_we(sc_valid && sc_op == SC_SETPC), .pc_set_task(sc_arg[1:0]), .pc_set_val(sc_a),
    .a_all, .b_all);
  assign pc_clr = (sc_valid && sc_op == SC_END) ? 4'(1 << sc_task) : 4'b0;

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
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

  // Monitor: instruction trace and per-instruction cycle counts.
  logic [7:0] trace [$];
  int since = 0, bad_cycles = 0;
  int per_task [4] = '{0, 0, 0, 0};
  always @(posedge clk) begin
    if (rst || !busy) since = 0;
    else begin
      since++;
      if (instr_done) begin
        int exp;
        exp = (ir.op inside {OP_STA, OP_STB, OP_LDA, OP_LDB, OP_OUTM}) ? 4 : 3;
        if (since != exp) begin
          bad_cycles++;
          $display("FAIL op %0d took %0d cycles, expected %0d", ir.op, since, exp);
        end
        trace.push_back(ir);
        per_task[run_task]++;
        since = 0;
      end
    end
  end

  // System-call strobes seen.
  logic [11:0] calls [$];
  always @(posedge clk) if (!rst && sc_valid) calls.push_back({2'(sc_op), sc_arg, 2'(sc_task), sc_a});

  task automatic run_until_end(int t);
    int guard = 0;
    sel_task = 2'(t); sel_valid = 1;
    do begin @(posedge clk); guard++; end
    while (!(sc_valid && sc_op == SC_END && sc_task == 2'(t)) && guard < 500);
    check(guard < 500, $sformatf("task %0d never ended", t));
  endtask

  task automatic run_instrs(int t, int n);
    sel_task = 2'(t); sel_valid = 1;
    repeat (n) begin
      do @(posedge clk); while (!instr_done);
    end
    @(negedge clk);
  endtask

  initial begin
    logic [7:0] exp0 [$];
    // Task 0: the basic processor example.
    put(0, 0, OP_MISC, MI_NOP); put(0, 1, OP_LDAI, 5); put(0, 2, OP_STA, 3);
    put(0, 3, OP_OUTM, 3); put(0, 4, OP_JMP, 11); put(0, 11, OP_LDB, 3);
    put(0, 12, OP_LDAI, 6); put(0, 13, OP_ADD, 13); put(0, 14, OP_MISC, MI_OUTA);
    put(0, 15, OP_MISC, MI_END);
    // Task 1: the other instructions.
    put(1, 0, OP_LDAI, 7); put(1, 1, OP_LDBI, 2); put(1, 2, OP_MISC, MI_SUB);
    put(1, 3, OP_MISC, MI_MOVAB); put(1, 4, OP_MISC, MI_INA); put(1, 5, OP_STB, 12);
    put(1, 6, OP_LDA, 12); put(1, 7, OP_CMPI, 5); put(1, 8, OP_JZ, 10);
    put(1, 9, OP_LDAI, 15); put(1, 10, OP_MISC, MI_DECA); put(1, 11, OP_JNZ, 13);
    put(1, 12, OP_LDAI, 14); put(1, 13, OP_MISC, MI_MOVBA); put(1, 14, OP_MISC, MI_INCA);
    put(1, 15, OP_MISC, MI_END);
    // Task 2: system calls.
    put(2, 0, OP_SUSP, 4'b0101); put(2, 1, OP_TRIG, 4'b1010); put(2, 2, OP_LDAI, 7);
    put(2, 3, OP_SETPC, 3); put(2, 4, OP_MISC, MI_END);
    // Task 3: a counting loop.
    put(3, 0, OP_MISC, MI_INCA); put(3, 1, OP_JMP, 0);

    repeat (2) @(negedge clk);
    rst = 0;

    run_until_end(0);
    @(negedge clk);
    exp0 = '{asm(OP_MISC, 0), asm(OP_LDAI, 5), asm(OP_STA, 3), asm(OP_OUTM, 3), asm(OP_JMP, 11),
             asm(OP_LDB, 3), asm(OP_LDAI, 6), asm(OP_ADD, 13), asm(OP_MISC, MI_OUTA),
             asm(OP_MISC, MI_END)};
    check(trace.size() == exp0.size(), $sformatf("task 0 ran %0d instructions", trace.size()));
    for (int i = 0; i < exp0.size() && i < trace.size(); i++)
      check(trace[i] == exp0[i], $sformatf("task 0 instruction %0d: %h exp %h", i, trace[i], exp0[i]));
    check(a_all[0] == 11 && b_all[0] == 5, $sformatf("task 0 A=%0d B=%0d, expected 11 and 5", a_all[0], b_all[0]));
    check(outport == 11, $sformatf("outport %0d, expected 11", outport));
    check(u_bank.pc_q[0] == 0, "task 0 pc not returned to 0 by end of task");

    // Task 1, preempted by task 3 after six instructions.
    run_instrs(1, 6);
    check(outport == 11, "outport changed by task 1");
    run_instrs(3, 4);
    check(a_all[3] == 2, $sformatf("task 3 A=%0d, expected 2", a_all[3]));
    run_until_end(1);
    @(negedge clk);
    // Taken jumps skip words 9 and 12: 14 instructions.
    check(per_task[1] == 14, $sformatf("task 1 executed %0d instructions, expected 14", per_task[1]));
    check(a_all[1] == 6 && b_all[1] == 5, $sformatf("task 1 A=%0d B=%0d, expected 6 and 5", a_all[1], b_all[1]));
    check(a_all[0] == 11 && b_all[0] == 5, "task 0 bank disturbed");

    // Task 2: system calls.
    calls.delete();
    run_until_end(2);
    @(negedge clk);
    check(calls.size() == 4, $sformatf("%0d system calls seen", calls.size()));
    if (calls.size() == 4) begin
      check(calls[0] == {2'(SC_SUSP), 4'b0101, 2'd2, 4'd0}, $sformatf("suspend call %h", calls[0]));
      check(calls[1] == {2'(SC_TRIG), 4'b1010, 2'd2, 4'd0}, $sformatf("trigger call %h", calls[1]));
      check(calls[2] == {2'(SC_SETPC), 4'd3, 2'd2, 4'd7}, $sformatf("setpc call %h", calls[2]));
      check(calls[3] == {2'(SC_END), 4'd8, 2'd2, 4'd7}, $sformatf("end call %h", calls[3]));
    end
    check(u_bank.pc_q[3] == 7, $sformatf("task 3 pc %0d after SETPC, expected 7", u_bank.pc_q[3]));

    // Idle.
    sel_valid = 0;
    @(negedge clk);
    repeat (3) @(negedge clk);
    begin
      int n;
      n = trace.size();
      repeat (10) @(negedge clk);
      check(trace.size() == n && !busy, "instructions ran with no task selected");
    end
    check(bad_cycles == 0, $sformatf("%0d instructions with a wrong cycle count", bad_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
