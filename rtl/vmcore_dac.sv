// vmcore_dac: controller for the serial, double-buffered 12-bit DAC.
//
// The source design converts samples with an LTC1451 serial DAC used in
// 9-bit mode. A 9-bit sample is sent as the 12-bit code {sample, 3'b000},
// most significant bit first: cs_ld goes low, each bit is put on sdi while
// sck is low and taken by the DAC on the rising edge of sck, and after the
// twelfth bit cs_ld returns high, which moves the code from the DAC's input
// shift register into its output register. sck stays low between frames.
// Each half period of sck lasts SCK_HALF clocks, so a frame takes
// 24*SCK_HALF + 2 clocks. start with data begins a frame when busy is low;
// a start while busy is ignored. The pin protocol follows the DAC's data
// sheet and the 9-bit alignment and the SCK_HALF default are choices made
// here.
module vmcore_dac #(
  parameter int unsigned SCK_HALF = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [8:0] data,
  output logic       busy,
  output logic       sck,
  output logic       sdi,
  output logic       cs_ld
);

  localparam int unsigned HW = $clog2(SCK_HALF + 1);

  logic [11:0]   sh;
  logic [3:0]    nbit;    // bits still to send
  logic [HW-1:0] hcnt;
  logic          ending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      sck    <= 1'b0;
      sdi    <= 1'b0;
      cs_ld  <= 1'b1;
      sh     <= '0;
      nbit   <= '0;
      hcnt   <= '0;
      ending <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        cs_ld  <= 1'b0;
        sh     <= {data[7:0], 3'b000, 1'b0};
        sdi    <= data[8];
        nbit   <= 4'd12;
        hcnt   <= '0;
        ending <= 1'b0;
      end
    end else if (ending) begin
      cs_ld  <= 1'b1;         // load the DAC register
      busy   <= 1'b0;
      ending <= 1'b0;
    end else if (hcnt != HW'(SCK_HALF - 1)) begin
      hcnt <= hcnt + 1'b1;
    end else begin
      hcnt <= '0;
      if (!sck) begin
        sck <= 1'b1;          // DAC samples sdi
      end else begin
        sck  <= 1'b0;
        nbit <= nbit - 4'd1;
        if (nbit == 4'd1) begin
          ending <= 1'b1;
        end else begin
          sdi <= sh[11];
          sh  <= {sh[10:0], 1'b0};
        end
      end
    end
  end

endmodule
