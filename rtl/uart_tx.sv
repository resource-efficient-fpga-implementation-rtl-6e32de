// uart_tx: UART transmitter, bytes to serial line.
//
// Sends one 8N1 frame (start bit, eight data bits LSB first, stop bit) per
// accepted byte, each bit lasting CLKS_PER_BIT clock cycles, so a frame takes
// 10*CLKS_PER_BIT cycles. A byte is accepted when `start` is high while
// `busy` is low; `busy` stays high from the cycle after acceptance until the
// stop bit has been sent. The line idles high.
// Frame format and default bit rate (115200 baud at 100 MHz) are this
// design's choices; the accelerator only requires a UART link to the host.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,     // synchronous, active high
  input  logic [7:0] data,
  input  logic       start,   // request to send `data`
  output logic       busy,
  output logic       tx       // serial output
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    bit_idx;    // 0 = start bit, 1..8 = data, 9 = stop
  logic [9:0]    frame;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      tx      <= 1'b1;
      cnt     <= '0;
      bit_idx <= '0;
      frame   <= '1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        frame   <= {1'b1, data, 1'b0};
        busy    <= 1'b1;
        cnt     <= '0;
        bit_idx <= '0;
        tx      <= 1'b0;
      end
    end else begin
      if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt <= '0;
        if (bit_idx == 4'd9) begin
          busy <= 1'b0;
          tx   <= 1'b1;
        end else begin
          bit_idx <= bit_idx + 1'b1;
          tx      <= frame[bit_idx + 1'b1];
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
