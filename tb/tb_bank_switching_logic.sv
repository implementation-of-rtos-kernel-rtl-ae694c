// tb_bank_switching_logic: all combinations of pending and blocked tasks.
// The expected choice is the lowest-numbered task that is pending and not
// blocked; none means sel_valid = 0.
module tb_bank_switching_logic;
  int checks = 0, failures = 0;
  logic [3:0] pending, blocked, ready;
  logic [1:0] sel_task;
  logic sel_valid;

  bank_switching_logic #(.N_TASKS(4)) dut (.pending, .blocked, .ready, .sel_task, .sel_valid);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int p = 0; p < 16; p++)
      for (int bl = 0; bl < 16; bl++) begin
        pending = 4'(p); blocked = 4'(bl);
        #1;
        exp = -1;
        for (int t = 3; t >= 0; t--) if (p[t] && !bl[t]) exp = t;
        checks++;
        if ((exp < 0 && sel_valid) || (exp >= 0 && (!sel_valid || int'(sel_task) != exp))
            || ready != 4'(p & ~bl)) begin
          failures++;
          $display("FAIL pending=%b blocked=%b sel=%0d valid=%b exp=%0d", pending, blocked, sel_task, sel_valid, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
