// tb_task_timer: checks the period timer and its shadow register.
// A period of P must give exactly one timeout pulse every P cycles, period
// 0 must give none, and rewriting the period must restart the timer.
module tb_task_timer;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, cfg_we = 0;
  logic [7:0] cfg_period = '0, count;
  logic timeout;

  task_timer #(.TIMER_W(8)) dut (.clk, .rst, .cfg_we, .cfg_period, .timeout, .count);

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

  // Program period p, then watch n cycles; return pulse count and spacing.
  task automatic run_period(int p, int n);
    int pulses = 0, last = -1, bad_gap = 0;
    @(negedge clk); cfg_we = 1; cfg_period = 8'(p);
    @(negedge clk); cfg_we = 0; #1;
    for (int c = 1; c <= n; c++) begin
      if (timeout) begin
        pulses++;
        if (last >= 0 && c - last != p) bad_gap++;
        if (last < 0 && c != p) bad_gap++;
        last = c;
      end
      @(negedge clk);
    end
    if (p == 0) check(pulses == 0, $sformatf("period 0 gave %0d pulses", pulses));
    else begin
      check(pulses == n / p, $sformatf("period %0d: %0d pulses in %0d cycles", p, pulses, n));
      check(bad_gap == 0, $sformatf("period %0d: %0d wrong gaps", p, bad_gap));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    check(timeout == 0, "timeout after reset");
    run_period(5, 100);
    run_period(1, 20);
    run_period(0, 50);
    run_period(13, 130);
    run_period(255, 510);
    run_period(7, 70);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
