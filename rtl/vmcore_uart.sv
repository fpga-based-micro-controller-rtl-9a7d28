// vmcore_uart: serial port to the host system.
//
// The host sends the text that drives voice synthesis, programs the flash
// and tests the system through this port. The frame is 8 data bits, least
// significant first, one start and one stop bit, no parity, at
// CLK_HZ/BAUD clocks per bit (the frame format and the default 115200 baud
// are choices made here; the source design only says the port exists).
//
// Transmitter: tx_start with tx_data starts a frame when idle; tx_busy is
// high until the stop bit has been sent (a start while busy is ignored).
// Receiver: rxd is synchronised by two flip-flops; a falling edge starts a
// frame, each bit is sampled in its middle, and a valid stop bit sets
// rx_ready with the byte in rx_data. rx_read clears rx_ready; a byte that
// arrives while rx_ready is still set is dropped and sets rx_overrun, which
// rx_read also clears.
module vmcore_uart #(
  parameter int unsigned CLK_HZ = 20_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  // transmitter
  input  logic       tx_start,
  input  logic [7:0] tx_data,
  output logic       tx_busy,
  output logic       txd,
  // receiver
  input  logic       rxd,
  input  logic       rx_read,
  output logic [7:0] rx_data,
  output logic       rx_ready,
  output logic       rx_overrun
);

  localparam int unsigned DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW  = $clog2(DIV + 1);

  // ------------------------------------------------------------ transmit
  logic [CW-1:0] tx_cnt;
  logic [3:0]    tx_bit;   // 0 start, 1..8 data, 9 stop
  logic [7:0]    tx_sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_busy <= 1'b0;
      txd     <= 1'b1;
      tx_cnt  <= '0;
      tx_bit  <= '0;
      tx_sh   <= '0;
    end else if (!tx_busy) begin
      if (tx_start) begin
        tx_busy <= 1'b1;
        tx_sh   <= tx_data;
        txd     <= 1'b0;
        tx_cnt  <= '0;
        tx_bit  <= '0;
      end
    end else if (tx_cnt != CW'(DIV - 1)) begin
      tx_cnt <= tx_cnt + 1'b1;
    end else begin
      tx_cnt <= '0;
      if (tx_bit == 4'd9) begin
        tx_busy <= 1'b0;
      end else begin
        tx_bit <= tx_bit + 4'd1;
        if (tx_bit == 4'd8) begin
          txd <= 1'b1;
        end else begin
          txd   <= tx_sh[0];
          tx_sh <= {1'b0, tx_sh[7:1]};
        end
      end
    end
  end

  // ------------------------------------------------------------- receive
  logic [1:0]    rx_sync;
  logic          rx_s;
  logic          rx_act;
  logic [CW-1:0] rx_cnt;
  logic [3:0]    rx_bit;
  logic [7:0]    rx_sh;

  assign rx_s = rx_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync    <= 2'b11;
      rx_act     <= 1'b0;
      rx_cnt     <= '0;
      rx_bit     <= '0;
      rx_sh      <= '0;
      rx_data    <= '0;
      rx_ready   <= 1'b0;
      rx_overrun <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[0], rxd};
      if (rx_read) begin
        rx_ready   <= 1'b0;
        rx_overrun <= 1'b0;
      end
      if (!rx_act) begin
        if (!rx_s) begin           // start bit edge
          rx_act <= 1'b1;
          rx_cnt <= CW'(DIV / 2);
          rx_bit <= '0;
        end
      end else if (rx_cnt != CW'(DIV - 1)) begin
        rx_cnt <= rx_cnt + 1'b1;
      end else begin
        rx_cnt <= '0;
        if (rx_bit == 4'd0) begin
          if (rx_s) rx_act <= 1'b0;  // false start
          rx_bit <= 4'd1;
        end else if (rx_bit != 4'd9) begin
          rx_sh  <= {rx_s, rx_sh[7:1]};
          rx_bit <= rx_bit + 4'd1;
        end else begin
          rx_act <= 1'b0;
          if (rx_s) begin          // valid stop bit
            if (rx_ready && !rx_read) begin
              rx_overrun <= 1'b1;
            end else begin
              rx_data  <= rx_sh;
              rx_ready <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
