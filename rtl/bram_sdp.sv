// bram_sdp: simple dual-port block RAM (one write port, one read port).
//
// A synchronous memory of DEPTH words of DW bits, written in one port and
// read in the other, both on the same clock. The read is registered: the
// word at `rd_addr` appears on `rd_data` one cycle after `rd_en`, and
// `rd_data` holds its value while `rd_en` is low. A read of the address being
// written in the same cycle returns the old contents (read-first). This
// single-cycle read is what lets the MAC pipeline be fed every clock. The
// array is written so that FPGA tools infer block RAM from it, and carries a
// ram_style attribute asking for block RAM rather than distributed RAM, as
// every matrix array in this design is larger than 64 words of 16 bits. It is
// not reset, and its contents are undefined until written.
module bram_sdp #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);

  (* ram_style = "block" *) logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
