// approx_fir -- direct-form low-pass FIR filter with approximate adders.
//
// Every clock cycle with in_valid high, data_in is shifted into a TAPS-deep
// delay line (x[0] is the newest sample). Each delayed sample is multiplied
// by its coefficient with an exact signed 16x16 multiplier, and the TAPS
// products are summed by a chain of TAPS-1 approx_adder instances placed in
// series: s1 = p0 + p1, s2 = s1 + p2, ... . In each adder the low APPROX_LSBS
// bits use the fifth approximate full adder (Sum = B, Cout = A), the upper
// bits the exact mirror adder. The sum is shifted right by OUT_SHIFT bits,
// saturated to 16 bits and registered.
//
// Interface: clk, synchronous active-high rst; in_valid/data_in carry one
// 16-bit two's-complement sample per cycle at most; out_valid/data_out
// deliver the filtered sample one clock after the sample that produced it,
// and saturated is high when that sample was clipped to the 16-bit range.
// There is no back-pressure: the filter accepts a sample in every cycle.
// Reset clears the delay line and the output register.
//
// The filter specification, the coefficients, the 16-bit sample width and
// the use of the fifth approximate adder for the additions follow the
// published design. The direct-form structure with a series adder chain, exact
// multipliers, the output scaling and saturation, the handshake and the reset
// are this design's choices.
module approx_fir
  import fir_pkg::*;
#(
  parameter int unsigned APPROX_LSBS = 8,
  parameter int unsigned OUT_SHIFT   = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  sample_t        data_in,
  output logic           out_valid,
  output sample_t        data_out,
  output logic           saturated  // data_out was clipped this sample
);
  localparam acc_t OUT_MAX = acc_t'(2 ** (DATA_W - 1) - 1);
  localparam acc_t OUT_MIN = -acc_t'(2 ** (DATA_W - 1));

  sample_t x [TAPS];       // delay line, x[0] newest
  acc_t    prod [TAPS];    // sign-extended products
  acc_t    part [TAPS];    // part[k] = p0 + ... + pk through the adder chain
  acc_t    scaled;

  // Delay line.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) x[k] <= '0;
    end else if (in_valid) begin
      x[0] <= data_in;
      for (int k = 1; k < TAPS; k++) x[k] <= x[k-1];
    end
  end

  // Products. The new sample is used in the same cycle it arrives, so the
  // tap-0 product uses data_in and tap k uses x[k-1].
  always_comb begin
    prod[0] = acc_t'(data_in * COEFS[0]);
    for (int k = 1; k < TAPS; k++) prod[k] = acc_t'(x[k-1] * COEFS[k]);
  end

  // Series chain of approximate adders: running sum on operand a, new
  // product on operand b.
  assign part[0] = prod[0];
  for (genvar k = 1; k < TAPS; k++) begin : g_chain
    approx_adder #(.W(ACC_W), .APPROX_LSBS(APPROX_LSBS)) u_add (
      .a(part[k-1]), .b(prod[k]), .sum(part[k])
    );
  end

  assign scaled = part[TAPS-1] >>> OUT_SHIFT;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      data_out  <= '0;
      saturated <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (scaled > OUT_MAX) begin
          data_out  <= sample_t'(OUT_MAX);
          saturated <= 1'b1;
        end else if (scaled < OUT_MIN) begin
          data_out  <= sample_t'(OUT_MIN);
          saturated <= 1'b1;
        end else begin
          data_out  <= sample_t'(scaled);
          saturated <= 1'b0;
        end
      end
    end
  end
endmodule
