// vmcore_fpga_cfg_model: behavioural model of an FPGA's passive-serial
// configuration port, for testbenches.
//
// Not synthesizable logic. nconfig low clears the device: nstatus and
// conf_done go low and the byte count restarts. nstatus rises again
// NSTATUS_DLY after nconfig returns high. On each rising dclk edge data0 is
// shifted in, least significant bit first; every eighth bit completes a
// byte, which is appended to bytes_q. conf_done rises once NBYTES bytes
// have arrived. Setting fail_at to a byte number makes the model pull
// nstatus low when that byte completes (a bit-stream error), once.
module vmcore_fpga_cfg_model #(
  parameter int unsigned NBYTES      = 16,
  parameter time         NSTATUS_DLY = 200ns
) (
  input  logic nconfig,
  output logic nstatus,
  input  logic dclk,
  input  logic data0,
  output logic conf_done
);
  logic [7:0] sh = '0;
  int         nbit = 0;
  int         nconfigs = 0;     // nconfig pulses seen
  int         extra_clks = 0;   // dclk edges after conf_done
  int         fail_at = -1;
  logic [7:0] bytes_q [$];

  initial begin
    nstatus   = 1'b0;
    conf_done = 1'b0;
  end

  always @(negedge nconfig) begin
    nconfigs++;
    nstatus   = 1'b0;
    conf_done = 1'b0;
    nbit      = 0;
    bytes_q.delete();
  end

  always @(posedge nconfig) begin
    #(NSTATUS_DLY);
    if (nconfig) nstatus = 1'b1;
  end

  always @(posedge dclk) begin
    if (conf_done) extra_clks++;
    else if (nconfig && nstatus) begin
      sh = {data0, sh[7:1]};
      nbit++;
      if (nbit == 8) begin
        nbit = 0;
        bytes_q.push_back(sh);
        if (bytes_q.size() == fail_at) begin
          fail_at = -1;
          nstatus = 1'b0;
        end else if (bytes_q.size() == NBYTES) begin
          conf_done = 1'b1;
        end
      end
    end
  end
endmodule
