// tb_selective_task_blocker: the suspend mask register keeps each written
// mask until the next write, and blocked[i] reports task i, which is mask
// bit 3-i (the mask's MSB is task 0).
module tb_selective_task_blocker;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, we = 0;
  logic [3:0] mask = '0, suspend_mask, blocked;

  selective_task_blocker #(.N_TASKS(4)) dut (.clk, .rst, .we, .mask, .suspend_mask, .blocked);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] model;
    repeat (2) @(negedge clk);
    rst = 0;
    model = '0;
    checks++; if (suspend_mask != 0 || blocked != 0) failures++;
    for (int i = 0; i < 200; i++) begin
      we = ($urandom_range(0, 3) == 0);
      mask = 4'($urandom);
      @(negedge clk);
      if (we) model = mask;
      checks++;
      if (suspend_mask != model || blocked != {model[0], model[1], model[2], model[3]}) begin
        failures++;
        $display("FAIL step %0d mask=%b blocked=%b model=%b", i, suspend_mask, blocked, model);
      end
    end
    // Task 0 blocks tasks 1..3 (mask 0111): blocked must be 1110.
    we = 1; mask = 4'b0111; @(negedge clk); we = 0;
    checks++; if (blocked != 4'b1110) begin failures++; $display("FAIL 0111 -> %b", blocked); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
