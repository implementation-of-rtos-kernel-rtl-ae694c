// tb_program_rom: loads random words into every task's page and reads them
// back through {task_id, pc}, checking the one-cycle read latency.
module tb_program_rom;
  int checks = 0, failures = 0;
  logic clk = 0, prog_we = 0;
  logic [5:0] prog_addr = '0;
  logic [7:0] prog_data = '0, instr;
  logic [1:0] task_id = '0;
  logic [3:0] pc = '0;
  logic [7:0] model [64];

  program_rom #(.N_TASKS(4), .PC_W(4), .INSTR_W(8)) dut (.clk, .prog_we, .prog_addr, .prog_data, .task_id, .pc, .instr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 6'(i); prog_data = 8'($urandom); model[i] = prog_data;
    end
    @(negedge clk); prog_we = 0;
    for (int k = 0; k < 300; k++) begin
      int t, p;
      t = $urandom_range(0, 3); p = $urandom_range(0, 15);
      task_id = 2'(t); pc = 4'(p);
      @(negedge clk);
      checks++;
      if (instr != model[t * 16 + p]) begin
        failures++;
        $display("FAIL task %0d pc %0d: %h exp %h", t, p, instr, model[t * 16 + p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
