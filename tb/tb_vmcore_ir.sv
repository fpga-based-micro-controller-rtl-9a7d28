// tb_vmcore_ir: self-checking test of the instruction register: load,
// bubble (NOP), the IR_L counting mode with IR_H held, and hold when the
// machine-cycle strobe is low. Compared with a reference register kept here.
module tb_vmcore_ir;
  logic        clk = 0, rst_n = 0, en = 0, load = 0, bubble = 0, count = 0;
  logic [15:0] pm_data = '0, ir, exp_ir;
  int checks = 0, failures = 0;

  vmcore_ir dut (.clk, .rst_n, .en, .load, .bubble, .count, .pm_data, .ir);

  always #5 clk = ~clk;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_ir = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      load = $urandom_range(0, 1);
      bubble = ($urandom_range(0, 5) == 0);
      count = ($urandom_range(0, 3) == 0);
      pm_data = 16'($urandom);
      @(posedge clk);
      if (en) begin
        if (count)     exp_ir = {exp_ir[15:8], 8'(exp_ir[7:0] + 1)};
        else if (load) exp_ir = bubble ? 16'h0000 : pm_data;
      end
      #1;
      checks++;
      if (ir != exp_ir) begin
        failures++;
        if (failures < 10) $display("IR %04x, expected %04x", ir, exp_ir);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
