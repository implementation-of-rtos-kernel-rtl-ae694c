// tb_data_ram: random reads and writes from all four tasks through the
// request/ramack handshake. Addresses 0..11 must be private to each task
// and 12..15 common to all; ramack must come exactly one cycle after the
// request and read data must be valid with it.
module tb_data_ram;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  ram_if #(.DATA_W(4), .ADDR_W(4), .TASK_W(2)) bus (.clk(clk));
  data_ram #(.N_TASKS(4), .DATA_W(4), .ADDR_W(4), .SHARED_WORDS(4)) dut (.clk, .rst, .ram(bus.slave));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] model [4][16];

  function automatic int shared_of(int t, int ad);
    return (ad >= 12) ? 0 : t;
  endfunction

  task automatic access(bit wr, int t, int ad, logic [3:0] d);
    bus.read = !wr; bus.write = wr; bus.task_id = 2'(t); bus.addr = 4'(ad); bus.wdata = d;
    @(negedge clk);
    checks++;
    if (!bus.ramack) begin failures++; $display("FAIL no ramack one cycle after request"); end
    if (!wr) begin
      checks++;
      if (bus.rdata != model[shared_of(t, ad)][ad]) begin
        failures++; $display("FAIL read task %0d addr %0d: %h exp %h", t, ad, bus.rdata, model[shared_of(t, ad)][ad]);
      end
    end else model[shared_of(t, ad)][ad] = d;
    bus.read = 0; bus.write = 0;
    @(negedge clk);
    checks++;
    if (bus.ramack) begin failures++; $display("FAIL ramack without request"); end
  endtask

  initial begin
    bus.read = 0; bus.write = 0; bus.task_id = 0; bus.addr = 0; bus.wdata = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 4; t++) for (int ad = 0; ad < 16; ad++) model[t][ad] = 0;
    // Each task writes its id+1 to private word 3; each must read back its own.
    for (int t = 0; t < 4; t++) access(1, t, 3, 4'(t + 1));
    for (int t = 0; t < 4; t++) access(0, t, 3, 0);
    // Task 1 writes shared word 15, task 3 must see it.
    access(1, 1, 15, 4'hA);
    access(0, 3, 15, 0);
    for (int k = 0; k < 1500; k++)
      access($urandom_range(0, 1), $urandom_range(0, 3), $urandom_range(0, 15), 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
