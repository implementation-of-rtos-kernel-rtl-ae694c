// tb_register_bank: random writes to random banks, end-of-task clears and
// program-counter loads, compared with a model of the four banks after each
// clock; every read port is checked through rd_task.
module tb_register_bank;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [1:0] rd_task = '0, wr_task = '0, pc_set_task = '0;
  logic [3:0] a, b, pc, a_wdata = '0, b_wdata = '0, pc_wdata = '0, pc_set_val = '0, pc_clr = '0;
  logic z, z_wdata = 0, we_a = 0, we_b = 0, we_pc = 0, we_z = 0, pc_set_we = 0;
  logic [3:0][3:0] a_all, b_all;

  register_bank #(.N_TASKS(4), .DATA_W(4), .PC_W(4)) dut (.clk, .rst, .rd_task, .a, .b, .pc, .z,
    .wr_task, .we_a, .a_wdata, .we_b, .b_wdata, .we_pc, .pc_wdata, .we_z, .z_wdata,
    .pc_clr, .pc_set_we, .pc_set_task, .pc_set_val, .a_all, .b_all);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] ma [4], mb [4], mpc [4];
  bit mz [4];

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 4; i++) begin ma[i] = 0; mb[i] = 0; mpc[i] = 0; mz[i] = 0; end
    for (int k = 0; k < 2000; k++) begin
      wr_task = 2'($urandom);
      we_a = $urandom; we_b = $urandom; we_pc = $urandom; we_z = $urandom;
      a_wdata = 4'($urandom); b_wdata = 4'($urandom); pc_wdata = 4'($urandom); z_wdata = $urandom;
      pc_clr = ($urandom_range(0, 3) == 0) ? 4'(1 << $urandom_range(0, 3)) : 4'b0;
      pc_set_we = ($urandom_range(0, 3) == 0); pc_set_task = 2'($urandom); pc_set_val = 4'($urandom);
      @(negedge clk);
      if (we_a) ma[wr_task] = a_wdata;
      if (we_b) mb[wr_task] = b_wdata;
      if (we_z) mz[wr_task] = z_wdata;
      for (int i = 0; i < 4; i++) begin
        if (pc_clr[i]) mpc[i] = 0;
        else if (pc_set_we && pc_set_task == 2'(i)) mpc[i] = pc_set_val;
        else if (we_pc && wr_task == 2'(i)) mpc[i] = pc_wdata;
      end
      for (int i = 0; i < 4; i++) begin
        rd_task = 2'(i);
        #1;
        checks++;
        if (a != ma[i] || b != mb[i] || pc != mpc[i] || z != mz[i] || a_all[i] != ma[i] || b_all[i] != mb[i]) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d bank %0d a=%h/%h b=%h/%h pc=%h/%h z=%b/%b", k, i, a, ma[i], b, mb[i], pc, mpc[i], z, mz[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
