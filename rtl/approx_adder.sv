// approx_adder -- W-bit ripple-carry adder with approximate low bits.
//
// Bit positions 0 .. APPROX_LSBS-1 are approx5_fa cells (Sum = B, Cout = A);
// positions APPROX_LSBS .. W-1 are exact mirror_adder_fa cells. The result is
// therefore: low APPROX_LSBS bits equal to b's low bits, upper bits equal to
// a[W-1:K] + b[W-1:K] + a[K-1] (K = APPROX_LSBS), modulo 2^W. The error is
// confined to the low bits plus at most one unit of carry into bit K. A
// synthesis report shows the low K sum bits as wired straight to b; that is
// the approximation, not an error.
//
// Ports: a, b (W bits) in; sum (W bits) out. Purely combinational, no carry
// in or out (two's-complement wrap-around).
// Using the fifth approximation in the adders comes from the published design; the
// split into approximate low bits and exact high bits, its default width of
// 8 bits, and the ripple-carry chain are this design's choices.
module approx_adder #(
  parameter int unsigned W           = 37,
  parameter int unsigned APPROX_LSBS = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  initial begin
    assert (APPROX_LSBS <= W) else $error("APPROX_LSBS must not exceed W");
  end

  logic [W:0] carry;
  assign carry[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    if (i < APPROX_LSBS) begin : g_approx
      approx5_fa u_fa (
        .a(a[i]), .b(b[i]), .cin(carry[i]), .sum(sum[i]), .cout(carry[i+1])
      );
    end else begin : g_exact
      mirror_adder_fa u_fa (
        .a(a[i]), .b(b[i]), .cin(carry[i]), .sum(sum[i]), .cout(carry[i+1])
      );
    end
  end

  // The carry out of the top bit is dropped (modulo 2^W arithmetic).
  logic unused_carry;
  assign unused_carry = carry[W];
endmodule
