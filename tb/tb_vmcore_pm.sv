// tb_vmcore_pm: self-checking test of the program memory. The words are
// written into the array at time zero (as device configuration would) and
// read back at random addresses through the combinational read port.
module tb_vmcore_pm;
  logic [8:0]  addr = '0;
  logic [15:0] data;
  logic [15:0] ref_m [512];
  int checks = 0, failures = 0;

  vmcore_pm #(.PC_W(9)) dut (.addr, .data);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int i = 0; i < 512; i++) begin
      ref_m[i] = 16'($urandom);
      dut.rom[i] = ref_m[i];
    end
    for (int n = 0; n < 2000; n++) begin
      addr = 9'($urandom);
      #1;
      checks++;
      if (data != ref_m[addr]) begin
        failures++;
        if (failures < 10) $display("PM[%03x] = %04x, expected %04x", addr, data, ref_m[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
