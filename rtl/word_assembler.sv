// word_assembler: joins pairs of received bytes into 16-bit Q8.8 words.
//
// The host sends every 16-bit word as two 8-bit UART frames. This block
// holds the first byte and, when the second arrives, presents the complete
// word on `word` with a one-cycle `word_valid` pulse in the cycle after the
// second byte's `byte_valid`. The first byte of each pair is the low byte
// (little-endian); the byte order is this design's choice. `clear` drops a
// half-received word so that the next byte is taken as a low byte again.
module word_assembler (
  input  logic        clk,
  input  logic        rst,         // synchronous, active high
  input  logic        clear,       // resynchronise the byte pairing
  input  logic [7:0]  byte_in,
  input  logic        byte_valid,
  output logic [15:0] word,
  output logic        word_valid
);

  logic       have_low;
  logic [7:0] low_byte;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      have_low   <= 1'b0;
      low_byte   <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (byte_valid) begin
        if (!have_low) begin
          low_byte <= byte_in;
          have_low <= 1'b1;
        end else begin
          word       <= {byte_in, low_byte};
          word_valid <= 1'b1;
          have_low   <= 1'b0;
        end
      end
    end
  end

endmodule
