// tb_vmcore_file_reg: self-checking test of the File Register.
// Random writes and reads over the whole 512-byte space are compared with a
// reference array; the I/O addresses must read the peripheral inputs and
// produce the right strobes; flag and IEN updates must follow the rule that a
// direct write of SR or INTCR in the same cycle wins.
module tb_vmcore_file_reg;
  import vmcore_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic [8:0] raddr = '0, waddr = '0;
  logic       rd = 0, we = 0;
  logic [7:0] dout, wdata = '0;
  logic       c_we = 0, c_in = 0, z_we = 0, z_in = 0, bf_we = 0, bf_in = 0, ien_set = 0, ien_clr = 0;
  logic [7:0] r0, r1, r2, acc, sr, intcr;
  logic [7:0] uart_rdata = 8'h11, iosr_rdata = 8'h22, porta_rdata = 8'h33, madm_rdata = 8'h44;
  logic       uart_wr, uart_rd, dac_wr, porta_wr, madm_wr;
  logic [7:0] ref_m [512];
  int checks = 0, failures = 0;

  vmcore_file_reg dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] io_val(logic [8:0] a);
    case (a)
      9'h008: return uart_rdata;
      9'h009: return iosr_rdata;
      9'h00A: return porta_rdata;
      9'h00F: return madm_rdata;
      default: return ref_m[a];
    endcase
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) ref_m[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill the RAM part
    for (int i = 16; i < 512; i++) begin
      @(negedge clk); we = 1; waddr = 9'(i); wdata = 8'($urandom); ref_m[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      waddr = ($urandom_range(0, 2) == 0) ? 9'($urandom_range(0, 15)) : 9'($urandom);
      wdata = 8'($urandom);
      raddr = ($urandom_range(0, 2) == 0) ? 9'($urandom_range(0, 15)) : 9'($urandom);
      rd = $urandom_range(0, 1);
      c_we = $urandom_range(0, 1); c_in = $urandom_range(0, 1);
      z_we = $urandom_range(0, 1); z_in = $urandom_range(0, 1);
      bf_we = $urandom_range(0, 1); bf_in = $urandom_range(0, 1);
      ien_set = $urandom_range(0, 1); ien_clr = ($urandom_range(0, 3) == 0);
      uart_rdata = 8'($urandom); iosr_rdata = 8'($urandom);
      #1;
      check(dout == io_val(raddr), $sformatf("read %03x = %02x, expected %02x", raddr, dout, io_val(raddr)));
      check(uart_wr == (we && waddr == 9'h008) && dac_wr == (we && waddr == 9'h009) &&
            porta_wr == (we && waddr == 9'h00A) && madm_wr == (we && waddr == 9'h00F) &&
            uart_rd == (rd && raddr == 9'h008), "I/O strobes");
      @(posedge clk);
      if (we && !(waddr inside {9'h008, 9'h009, 9'h00A, 9'h00F})) ref_m[waddr] = wdata;
      if (!(we && waddr == 9'h005)) begin
        if (c_we)  ref_m[5][SR_C]  = c_in;
        if (z_we)  ref_m[5][SR_Z]  = z_in;
        if (bf_we) ref_m[5][SR_BF] = bf_in;
      end
      if (!(we && waddr == 9'h006)) begin
        if (ien_clr) ref_m[6][INT_IEN] = 0;
        else if (ien_set) ref_m[6][INT_IEN] = 1;
      end
      #1;
      check(r0 == ref_m[0] && r1 == ref_m[1] && r2 == ref_m[2] && acc == ref_m[4] &&
            sr == ref_m[5] && intcr == ref_m[6],
            $sformatf("system registers r0=%02x acc=%02x sr=%02x intcr=%02x, expected %02x %02x %02x %02x",
                      r0, acc, sr, intcr, ref_m[0], ref_m[4], ref_m[5], ref_m[6]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
