// tb_vmcore_addr_regs: self-checking test of AR0, AR1 and Addr_Mux.
// Random byte loads, increments and BF shifts are compared with a reference
// model; the address bus must show the next value of the selected register
// (AR0, or AR1 placed at AR1_BASE).
module tb_vmcore_addr_regs;
  logic        clk = 0, rst_n = 0, en = 0;
  logic [7:0]  din = '0;
  logic        ar0_load = 0, ar1_load = 0, ar0_inc = 0, ar1_shift = 0, bf = 0, sel_ar1 = 0;
  logic [1:0]  idx = '0;
  logic [27:0] addr, ar0, m0, exp_addr;
  logic [15:0] ar1, m1;
  int checks = 0, failures = 0;

  vmcore_addr_regs #(.AR1_BASE(28'h0A00000)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m0 = 0; m1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      din = 8'($urandom); idx = 2'($urandom);
      ar0_load = ($urandom_range(0, 2) == 0); ar1_load = ($urandom_range(0, 2) == 0);
      ar0_inc = $urandom_range(0, 1); ar1_shift = $urandom_range(0, 1);
      bf = $urandom_range(0, 1); sel_ar1 = $urandom_range(0, 1);
      // now and then FF FF in the low bytes and an increment: carry across bytes
      if (n % 50 < 2) begin en = 1; ar0_load = 1; idx = 2'(n % 50); din = 8'hFF; end
      if (n % 50 == 2) begin en = 1; ar0_load = 0; ar0_inc = 1; end
      #1;
      exp_addr = sel_ar1 ? (28'h0A00000 | {12'd0, ar1_shift ? {m1[14:0], bf} : m1})
                         : (ar0_inc ? m0 + 1 : m0);
      checks++;
      if (addr != exp_addr) begin
        failures++;
        if (failures < 10) $display("addr %07x, expected %07x", addr, exp_addr);
      end
      @(posedge clk);
      if (en) begin
        if (ar0_load) case (idx)
          0: m0[7:0] = din; 1: m0[15:8] = din; 2: m0[23:16] = din; 3: m0[27:24] = din[3:0];
        endcase
        else if (ar0_inc) m0 = m0 + 1;
        if (ar1_load) begin if (idx[0]) m1[15:8] = din; else m1[7:0] = din; end
        else if (ar1_shift) m1 = {m1[14:0], bf};
      end
      #1;
      checks++;
      if (ar0 != m0 || ar1 != m1) begin
        failures++;
        if (failures < 10) $display("AR0 %07x AR1 %04x, expected %07x %04x", ar0, ar1, m0, m1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
