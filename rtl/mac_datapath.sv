// mac_datapath: two-stage pipelined Q8.8 multiply-accumulate unit.
//
// Computes one term of a dot product per clock, S = sum_k (Q_k * K_k) >> 8,
// for a stream of operand pairs that may run back to back from one dot
// product into the next with no gap:
//   stage 1  multiplier: the signed 16x16 product of `a` and `b` (32 bits)
//            is registered, together with the pair's `first`/`last` tags;
//   stage 2  accumulator: the product is rescaled to Q8.8 by an arithmetic
//            shift right by 8 (truncation toward minus infinity, the same as
//            a floor division by 256) and added to the accumulator, which is
//            restarted with the term alone when the pair is tagged `first`.
// When the pair tagged `last` leaves stage 2, the finished dot product is on
// `acc_out` (ACC_W bits, no precision lost) and `sat_out` (clamped to the
// 16-bit Q8.8 range) with `out_valid` high for one cycle; `ovf` marks that
// the clamp changed the value. Latency: the result of a dot product whose
// last pair enters in cycle t is valid in cycle t+2, so a stream of M pairs
// finishes M+2 cycles after its first pair entered.
// The multiplier, the >>8 rescale after each product and the accumulate
// follow the document; the accumulator width and the saturation to 16 bits
// are this design's choices.
module mac_datapath
  import sa_pkg::*;
#(
  parameter int unsigned ACC_W = 32
) (
  input  logic             clk,
  input  logic             rst,        // synchronous, active high
  input  logic             in_valid,
  input  logic             in_first,   // first pair of a dot product
  input  logic             in_last,    // last pair of a dot product
  input  q88_t             a,
  input  q88_t             b,
  output logic             out_valid,  // a finished dot product is on the outputs
  output logic signed [ACC_W-1:0] acc_out,
  output q88_t             sat_out,
  output logic             ovf
);

  localparam int unsigned FRAC_W = 8;   // Q8.8 fraction bits

  // stage 1
  logic signed [31:0] prod_r;
  logic               v1, first1, last1;
  // stage 2
  logic signed [ACC_W-1:0] acc_r;
  logic signed [ACC_W-1:0] term;
  logic signed [ACC_W-1:0] acc_next;
  logic signed [31:0]      prod_scaled;

  always_ff @(posedge clk) begin
    if (rst) begin
      prod_r <= '0;
      v1     <= 1'b0;
      first1 <= 1'b0;
      last1  <= 1'b0;
    end else begin
      v1     <= in_valid;
      first1 <= in_valid & in_first;
      last1  <= in_valid & in_last;
      if (in_valid) prod_r <= 32'(a) * 32'(b);
    end
  end

  always_comb begin
    prod_scaled = prod_r >>> FRAC_W;
    term        = ACC_W'(prod_scaled);
    acc_next    = (first1 ? '0 : acc_r) + term;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_r     <= '0;
      out_valid <= 1'b0;
      acc_out   <= '0;
      sat_out   <= '0;
      ovf       <= 1'b0;
    end else begin
      out_valid <= v1 & last1;
      if (v1) begin
        acc_r <= acc_next;
        if (last1) begin
          acc_out <= acc_next;
          sat_out <= sat_q88(64'(acc_next));
          ovf     <= (64'(acc_next) > 64'sd32767) || (64'(acc_next) < -64'sd32768);
        end
      end
    end
  end

  // a dot product is open between its first and its last pair
  logic open_dp;
  always_ff @(posedge clk) begin
    if (rst) open_dp <= 1'b0;
    else if (in_valid) open_dp <= !in_last;
  end

  // a dot product must start with a `first` pair before it can end
  a_first_before_last: assert property (@(posedge clk) disable iff (rst)
    (in_valid && in_last && !in_first) |-> open_dp)
    else $error("mac_datapath: last pair without an open dot product");

endmodule
