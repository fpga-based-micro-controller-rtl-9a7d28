// vmcore_madm: MADM decoder, the voice-primitive decompressor, with its
// serial DAC controller.
//
// Voice primitives are stored in the flash compressed by adaptive delta
// modulation, one bit per sample. The program reads them byte by byte and
// writes each byte to the decoder's File Register address (code_wr). The
// decoder keeps a one-byte buffer in front of an 8-bit shift register. At
// every sample tick (CLK_HZ/FS_HZ clocks, 11025 Hz in the source design) it
// takes the next bit, most significant first, and updates an X_W-bit signed
// integrator:
//     step <- min(2*step, STEP_MAX) if the bit equals the previous bit,
//             max(step/2, STEP_MIN) otherwise;
//     x    <- x + step for a 1, x - step for a 0, saturated to X_W bits.
// The top nine bits of x, in offset binary, are sent to the DAC (9-bit
// mode). When a tick finds both the shift register and the buffer empty the
// decoder stops and returns the integrator and step to rest, so the next
// primitive starts from silence. req (buffer empty while playing) asks the
// program for the next byte and can raise an interrupt.
//
// A write to the DAC address (dac_wr) sends {wdata, 0} straight to the DAC
// when the decoder is idle and the DAC is free, for raw PCM output.
//
// Status byte (read at the decoder's address): bit 0 buffer full, bit 1
// playing, bit 2 request.
//
// From the source design: the decoder's role, its sample rate, the 9-bit
// DAC mode and that it contains the DAC controller. Its modified ADM
// algorithm and the coefficient-based error correction are not given there:
// the step rule above is a plain adaptive delta modulation decoder chosen
// here, and no correction is applied (the program can still read the
// coefficient area of the flash through AR1).
module vmcore_madm #(
  parameter int unsigned CLK_HZ   = 20_000_000,
  parameter int unsigned FS_HZ    = 11_025,
  parameter int unsigned X_W      = 12,
  parameter int unsigned STEP_MIN = 8,
  parameter int unsigned STEP_MAX = 256,
  parameter int unsigned SCK_HALF = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       code_wr,
  input  logic       dac_wr,
  input  logic [7:0] wdata,
  output logic [7:0] status,
  output logic       req,
  output logic       running,
  output logic       dac_busy,
  output logic       sample_valid,  // one clock per decoded sample
  output logic [8:0] sample,
  output logic       dac_sck,
  output logic       dac_sdi,
  output logic       dac_cs_ld
);

  localparam int unsigned DIV = (CLK_HZ + FS_HZ / 2) / FS_HZ;
  localparam int unsigned TW  = $clog2(DIV + 1);
  localparam logic signed [X_W:0] XMAX = (X_W+1)'(2**(X_W-1) - 1);
  localparam logic signed [X_W:0] XMIN = -(X_W+1)'(2**(X_W-1));

  logic [TW-1:0]         tcnt;
  logic                  tick;
  logic [7:0]            buf_q, sh;
  logic                  buf_full;
  logic [3:0]            nleft;
  logic                  prev;
  logic signed [X_W-1:0] x;
  logic [X_W-1:0]        step;

  // sample clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         tcnt <= '0;
    else if (tcnt == TW'(DIV - 1))      tcnt <= '0;
    else                                tcnt <= tcnt + 1'b1;
  end
  assign tick = (tcnt == TW'(DIV - 1));

  // bit to decode at this tick
  logic                  have_bit, bit_v;
  logic [X_W-1:0]        step_n;
  logic signed [X_W:0]   x_sum;
  logic signed [X_W-1:0] x_n;

  always_comb begin
    have_bit = (nleft != 4'd0) || buf_full;
    bit_v    = (nleft != 4'd0) ? sh[7] : buf_q[7];
    if (bit_v == prev) step_n = (step >= X_W'(STEP_MAX / 2)) ? X_W'(STEP_MAX) : (step << 1);
    else               step_n = (step <= X_W'(2 * STEP_MIN)) ? X_W'(STEP_MIN) : (step >> 1);
    x_sum = bit_v ? ({x[X_W-1], x} + $signed({1'b0, step_n}))
                  : ({x[X_W-1], x} - $signed({1'b0, step_n}));
    if (x_sum > XMAX)      x_n = XMAX[X_W-1:0];
    else if (x_sum < XMIN) x_n = XMIN[X_W-1:0];
    else                   x_n = x_sum[X_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q        <= '0;
      buf_full     <= 1'b0;
      sh           <= '0;
      nleft        <= '0;
      prev         <= 1'b0;
      x            <= '0;
      step         <= X_W'(STEP_MIN);
      running      <= 1'b0;
      sample_valid <= 1'b0;
      sample       <= 9'h100;
    end else begin
      sample_valid <= 1'b0;
      if (tick && have_bit) begin
        running      <= 1'b1;
        prev         <= bit_v;
        step         <= step_n;
        x            <= x_n;
        sample       <= {~x_n[X_W-1], x_n[X_W-2 -: 8]};
        sample_valid <= 1'b1;
        if (nleft != 4'd0) begin
          sh    <= {sh[6:0], 1'b0};
          nleft <= nleft - 4'd1;
        end else begin
          sh       <= {buf_q[6:0], 1'b0};
          nleft    <= 4'd7;
          buf_full <= 1'b0;
        end
      end else if (tick) begin
        running <= 1'b0;
        prev    <= 1'b0;
        x       <= '0;
        step    <= X_W'(STEP_MIN);
      end
      if (code_wr) begin
        buf_q    <= wdata;
        buf_full <= 1'b1;
      end
    end
  end

  assign req    = running && !buf_full;
  assign status = {5'd0, req, running, buf_full};

  // DAC controller: decoded samples, or direct writes while idle
  logic       dac_start;
  logic [8:0] dac_data;
  assign dac_start = sample_valid || (dac_wr && !running && !dac_busy);
  assign dac_data  = sample_valid ? sample : {wdata, 1'b0};

  vmcore_dac #(.SCK_HALF(SCK_HALF)) u_dac (
    .clk   (clk),
    .rst_n (rst_n),
    .start (dac_start),
    .data  (dac_data),
    .busy  (dac_busy),
    .sck   (dac_sck),
    .sdi   (dac_sdi),
    .cs_ld (dac_cs_ld)
  );

endmodule
