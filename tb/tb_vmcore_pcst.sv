// tb_vmcore_pcst: self-checking test of the four-entry PC stack.
// Random pushes and pulls (including overflow and pulls from an empty stack)
// are compared with a queue-based reference that drops the oldest entry on
// overflow and returns zero from an empty stack.
module tb_vmcore_pcst;
  logic       clk = 0, rst_n = 0, push = 0, pull = 0;
  logic [8:0] din = '0, top;
  logic [2:0] count;
  logic       full, empty;
  int checks = 0, failures = 0;
  logic [8:0] ref_q [$];

  vmcore_pcst #(.PC_W(9), .DEPTH(4)) dut (.clk, .rst_n, .push, .pull, .din, .top, .count, .full, .empty);

  always #5 clk = ~clk;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      push = 0; pull = 0;
      case ($urandom_range(0, 2))
        0: begin push = 1; din = 9'($urandom); end
        1: pull = 1;
        default: ;
      endcase
      @(posedge clk);
      if (push) begin
        ref_q.push_front(din);
        if (ref_q.size() > 4) void'(ref_q.pop_back());
      end else if (pull && ref_q.size() > 0) void'(ref_q.pop_front());
      #1;
      checks++;
      if (count != 3'(ref_q.size()) || full != (ref_q.size() == 4) || empty != (ref_q.size() == 0) ||
          (ref_q.size() > 0 && top != ref_q[0]) || (ref_q.size() == 0 && top != 0)) begin
        failures++;
        if (failures < 10) $display("stack mismatch: count=%0d top=%03x, expected %0d", count, top, ref_q.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
