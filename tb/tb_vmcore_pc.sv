// tb_vmcore_pc: self-checking test of the program counter and its fetch
// address mux. Each cycle a random source is chosen; the fetch address must
// be the PC, the absolute address, the stack top or the vector, and after an
// advancing cycle the PC must be that address plus one.
module tb_vmcore_pc;
  import vmcore_pkg::*;
  logic        clk = 0, rst_n = 0, advance = 0;
  fetch_sel_e  sel = FETCH_PC;
  logic [13:0] abs_addr = '0;
  logic [8:0]  pull_addr = '0, fetch_addr, pc, exp_pc, exp_f;
  int checks = 0, failures = 0;

  vmcore_pc #(.PC_W(9), .INT_VECTOR(9'h004)) dut (.clk, .rst_n, .advance, .sel, .abs_addr, .pull_addr, .fetch_addr, .pc);

  always #5 clk = ~clk;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      sel = fetch_sel_e'($urandom_range(0, 3));
      if (n % 3 == 0) sel = FETCH_PC;
      abs_addr = 14'($urandom); pull_addr = 9'($urandom);
      advance = ($urandom_range(0, 3) != 0);
      #1;
      case (sel)
        FETCH_PC:   exp_f = exp_pc;
        FETCH_ABS:  exp_f = abs_addr[8:0];
        FETCH_PULL: exp_f = pull_addr;
        default:    exp_f = 9'h004;
      endcase
      checks++;
      if (fetch_addr != exp_f || pc != exp_pc) begin
        failures++;
        if (failures < 10) $display("fetch %03x pc %03x, expected %03x %03x", fetch_addr, pc, exp_f, exp_pc);
      end
      @(posedge clk);
      if (advance) exp_pc = exp_f + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
