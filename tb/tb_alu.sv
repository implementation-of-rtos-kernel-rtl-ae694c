// tb_alu: exhaustive check of the ALU against an independent model.
// Every operation is applied to every pair of 4-bit operands; the result
// and the zero flag are compared with arithmetic done here in integers.
module tb_alu;
  import rtos_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  logic [3:0] a, b, y;
  logic zero;

  alu #(.DATA_W(4)) dut (.op, .a, .b, .y, .zero);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_y, ia, ib;
    bit exp_z;
    for (int o = 0; o < 6; o++)
      for (ia = 0; ia < 16; ia++)
        for (ib = 0; ib < 16; ib++) begin
          op = alu_op_e'(o); a = 4'(ia); b = 4'(ib);
          #1;
          case (o)
            0: exp_y = (ia + ib) % 16;
            1: exp_y = (ia - ib + 16) % 16;
            2: exp_y = (ia + 1) % 16;
            3: exp_y = (ia + 15) % 16;
            4: exp_y = ib;
            default: exp_y = ia;
          endcase
          exp_z = (o == 5) ? (ia == ib) : (exp_y == 0);
          checks++;
          if (int'(y) != exp_y || zero !== exp_z) begin
            failures++;
            if (failures < 10) $display("FAIL op=%0d a=%0d b=%0d y=%0d/%0d z=%0b/%0b", o, ia, ib, y, exp_y, zero, exp_z);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
