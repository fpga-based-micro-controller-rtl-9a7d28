// tb_vmcore_madm: self-checking test of the MADM decoder with its DAC
// controller, at 40 clocks per sample. Code bytes are written whenever the
// decoder requests one; every decoded sample is compared with a reference
// adaptive delta modulation decoder written here, the sample period is
// checked, the DAC must receive each sample, playback must stop when the
// data runs out, and a direct DAC write is honoured only while idle.
module tb_vmcore_madm;
  localparam int DIVN = 40;
  logic       clk = 0, rst_n = 0, code_wr = 0, dac_wr = 0;
  logic [7:0] wdata = '0, status;
  logic       req, running, dac_busy, sample_valid, dac_sck, dac_sdi, dac_cs_ld;
  logic [8:0] sample;
  int checks = 0, failures = 0;

  vmcore_madm #(.CLK_HZ(4000), .FS_HZ(100), .X_W(12), .STEP_MIN(8), .STEP_MAX(256), .SCK_HALF(1)) dut (.*);
  vmcore_dac_model u_model (.sck (dac_sck), .sdi (dac_sdi), .cs_ld (dac_cs_ld));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  int rx = 0, rstep = 8, rprev = 0;
  function automatic int ref_adm(int b);
    if (b == rprev) rstep = (rstep * 2 > 256) ? 256 : rstep * 2;
    else            rstep = (rstep / 2 < 8) ? 8 : rstep / 2;
    rprev = b;
    rx = b ? rx + rstep : rx - rstep;
    if (rx > 2047) rx = 2047;
    if (rx < -2048) rx = -2048;
    return (rx + 2048) / 8;
  endfunction

  int exp_q [$];
  int n_samples = 0, last_t = -1, period_bad = 0;
  always @(posedge clk) if (rst_n && sample_valid) begin
    int e;
    e = exp_q.pop_front();
    check(int'(sample) == e, $sformatf("sample %0d = %03x, expected %03x", n_samples, sample, e));
    if (last_t >= 0 && ($time - last_t) != DIVN * 10) period_bad++;
    last_t = $time;
    n_samples++;
  end

  task automatic write_code(input logic [7:0] b);
    @(negedge clk); code_wr = 1; wdata = b;
    @(negedge clk); code_wr = 0;
    for (int j = 7; j >= 0; j--) exp_q.push_back(ref_adm(int'(b[j])));
  endtask

  initial begin : watchdog
    #3ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] codes [12];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // direct DAC write while idle
    @(negedge clk); dac_wr = 1; wdata = 8'h9C;
    @(negedge clk); dac_wr = 0;
    wait (!dac_busy && u_model.loads == 1);
    check(u_model.code == 12'h9C0, "direct DAC write");
    // a primitive: all ones (slope overload), all zeros, alternating, random
    codes = '{8'hFF, 8'hFF, 8'hFF, 8'h00, 8'h00, 8'h55, 8'hAA, 8'hF0, 8'h0F, 8'h3C, 8'($urandom), 8'($urandom)};
    write_code(codes[0]);
    check(status[0] == 1'b1, "buffer full after write");
    for (int i = 1; i < 12; i++) begin
      wait (req);
      check(status == 8'b110, "status: playing, requesting");
      write_code(codes[i]);
      // a direct DAC write during playback is ignored
      if (i == 5) begin @(negedge clk); dac_wr = 1; wdata = 8'h01; @(negedge clk); dac_wr = 0; end
    end
    wait (!running);
    check(n_samples == 96, $sformatf("%0d samples decoded", n_samples));
    check(period_bad == 0, "one sample every 40 clocks");
    repeat (50) @(posedge clk);
    check(u_model.loads == 97 && u_model.bad_frames == 0, $sformatf("DAC loads %0d", u_model.loads));
    check(u_model.log_q[96] == {exp_last(), 3'b000}, "last DAC code equals last sample");
    // a new primitive starts from rest
    rx = 0; rstep = 8; rprev = 0;
    write_code(8'hC3);
    wait (!running && exp_q.size() == 0);
    check(n_samples == 104, "second primitive decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [8:0] last_s;
  always @(posedge clk) if (sample_valid) last_s = sample;
  function automatic logic [8:0] exp_last(); return last_s; endfunction
endmodule
