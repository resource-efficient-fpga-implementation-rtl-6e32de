// tb_bram_sdp: self-checking test of the simple dual-port block RAM.
// Writes random data to random addresses while reading random addresses,
// comparing each read (one cycle later) with a reference array, including
// same-address read-while-write (old data) and hold while rd_en is low.
module tb_bram_sdp;
  localparam int DW = 16, DEPTH = 40, AW = 6;
  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = 0, rd_addr = 0;
  logic [DW-1:0] wr_data = 0, rd_data;
  logic [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  bram_sdp #(.DW(DW), .DEPTH(DEPTH), .AW(AW)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    logic [DW-1:0] expd;
    // fill everything first
    for (int a = 0; a < DEPTH; a++) begin
      wr_en <= 1; wr_addr <= AW'(a); wr_data <= DW'($urandom); @(posedge clk);
      ref_mem[a] = wr_data;
    end
    wr_en <= 0;
    for (int n = 0; n < 300; n++) begin
      automatic int wa = $urandom_range(0, DEPTH - 1);
      automatic int ra = (n % 7 == 0) ? wa : $urandom_range(0, DEPTH - 1);
      automatic logic we = $urandom_range(0, 1);
      automatic logic [DW-1:0] wd = DW'($urandom);
      wr_en <= we; wr_addr <= AW'(wa); wr_data <= wd;
      rd_en <= 1; rd_addr <= AW'(ra);
      expd = ref_mem[ra];
      @(posedge clk);
      if (we) ref_mem[wa] = wd;
      wr_en <= 0; rd_en <= 0;
      #1;
      checks++;
      if (rd_data !== expd) begin failures++; $display("addr %0d got %h expected %h", ra, rd_data, expd); end
      if (n % 5 == 0) begin
        @(posedge clk); #1;
        checks++;
        if (rd_data !== expd) begin failures++; $display("read data not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
