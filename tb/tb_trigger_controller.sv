// tb_trigger_controller: random interrupts, time-outs, trigger masks and
// end-of-task strobes against a model of the four trigger counters.
// The model counts an interrupt only on its rising edge, maps mask bit 3-i
// to task i, merges sources of one cycle, cancels an increment against a
// decrement, saturates at 15 and never goes below 0.
module tb_trigger_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [3:0] intr = '0, timeout = '0, trig_mask = '0, end_task = '0, sig, pending;
  logic [3:0][3:0] count;

  trigger_controller #(.N_TASKS(4), .TCNT_W(4)) dut (.clk, .rst, .intr, .timeout, .trig_mask, .end_task, .sig, .pending, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model [4];
  logic [3:0] intr_prev;
  int saturated = 0, cancels = 0;

  task automatic compare(string where);
    checks++;
    for (int i = 0; i < 4; i++)
      if (int'(count[i]) != model[i] || pending[i] != (model[i] != 0)) begin
        failures++;
        $display("FAIL %s task %0d count=%0d model=%0d", where, i, count[i], model[i]);
        break;
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (model[i]) model[i] = 0;
    intr_prev = '0;
    compare("reset");
    // Directed: a single interrupt held high counts once.
    intr = 4'b0001; repeat (5) @(negedge clk); intr = '0; model[0] = 1;
    @(negedge clk); compare("held interrupt");
    // Trigger mask 1000 triggers task 0, 0001 triggers task 3.
    trig_mask = 4'b0001; @(negedge clk); trig_mask = '0; model[3]++;
    compare("mask 0001");
    end_task = 4'b0001; @(negedge clk); end_task = '0; model[0]--;
    compare("end task 0");
    intr_prev = '0;
    for (int k = 0; k < 3000; k++) begin
      logic [3:0] inc;
      int mode;
      mode = $urandom_range(0, 3);
      intr      = 4'($urandom);
      timeout   = (mode == 0) ? 4'($urandom) : 4'($urandom) & 4'($urandom) & 4'($urandom);
      trig_mask = (mode == 1) ? 4'($urandom) : '0;
      end_task  = (mode >= 2) ? 4'($urandom) : 4'($urandom) & 4'($urandom);
      #1;
      for (int i = 0; i < 4; i++) begin
        inc[i] = (intr[i] && !intr_prev[i]) || timeout[i] || trig_mask[3 - i];
      end
      checks++;
      if (sig != inc) begin failures++; $display("FAIL sig=%b exp=%b", sig, inc); end
      for (int i = 0; i < 4; i++) begin
        if (inc[i] && !end_task[i]) begin
          if (model[i] < 15) model[i]++; else saturated++;
        end else if (end_task[i] && !inc[i]) begin
          if (model[i] > 0) model[i]--;
        end else if (inc[i] && end_task[i]) cancels++;
      end
      intr_prev = intr;
      @(negedge clk);
      compare($sformatf("step %0d", k));
    end
    checks++;
    if (saturated == 0 || cancels == 0) begin
      failures++; $display("FAIL saturation %0d / cancel %0d cases not reached", saturated, cancels);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
