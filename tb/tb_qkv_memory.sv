// tb_qkv_memory: self-checking test of the Q/K/V memory partitions.
// Loads 3*N*DK random words through the linear load port, then reads Q and
// K in parallel and V through its own port at random addresses and compares
// with the words that were loaded, one cycle after each read.
module tb_qkv_memory;
  localparam int N = 3, DK = 5, MW = N * DK, AW = $clog2(MW), LAW = $clog2(3 * MW);
  logic clk = 0;
  logic ld_en = 0;
  logic [LAW-1:0] ld_addr = 0;
  logic [15:0] ld_data = 0;
  logic qk_rd_en = 0, v_rd_en = 0;
  logic [AW-1:0] q_rd_addr = 0, k_rd_addr = 0, v_rd_addr = 0;
  logic [15:0] q_rd_data, k_rd_data, v_rd_data;
  logic [15:0] img [3 * MW];
  int checks = 0, failures = 0;

  qkv_memory #(.N(N), .DK(DK)) dut (.clk, .ld_en, .ld_addr, .ld_data, .qk_rd_en, .q_rd_addr,
    .k_rd_addr, .q_rd_data, .k_rd_data, .v_rd_en, .v_rd_addr, .v_rd_data);

  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < 3 * MW; a++) img[a] = 16'($urandom);
    for (int a = 0; a < 3 * MW; a++) begin
      @(negedge clk); ld_en = 1; ld_addr = LAW'(a); ld_data = img[a];
    end
    @(negedge clk); ld_en = 0;
    // an address past the three partitions must write nothing
    @(negedge clk); ld_en = 1; ld_addr = LAW'(3 * MW); ld_data = 16'hDEAD;
    @(negedge clk); ld_en = 0;
    for (int n = 0; n < 200; n++) begin
      automatic int qa = (n < MW) ? n : $urandom_range(0, MW - 1);
      automatic int ka = $urandom_range(0, MW - 1);
      automatic int va = (n < MW) ? MW - 1 - n : $urandom_range(0, MW - 1);
      @(negedge clk);
      qk_rd_en = 1; v_rd_en = 1;
      q_rd_addr = AW'(qa); k_rd_addr = AW'(ka); v_rd_addr = AW'(va);
      @(negedge clk);
      qk_rd_en = 0; v_rd_en = 0;
      checks += 3;
      if (q_rd_data !== img[qa])          begin failures++; $display("Q[%0d] %h", qa, q_rd_data); end
      if (k_rd_data !== img[MW + ka])     begin failures++; $display("K[%0d] %h", ka, k_rd_data); end
      if (v_rd_data !== img[2 * MW + va]) begin failures++; $display("V[%0d] %h", va, v_rd_data); end
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
