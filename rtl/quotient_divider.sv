// quotient_divider -- normalisation of the filtered pixel.
//
// Computes round(nu / de) as a Q_W-bit result by restoring division: the
// numerator is first increased by de/2 so the truncating division rounds to
// nearest, then Q_W compare-and-subtract steps produce the quotient from its
// most significant bit down. Since the numerator is a weighted sum of pixel
// values and the denominator the sum of the same weights, the quotient always
// fits the pixel width; a larger one saturates to all ones. A zero
// denominator gives 0.
//
// Purely combinational; the caller registers the result. That the quotient is
// only 8 bits wide is the document's; the rounding, the saturation and the
// restoring structure are this design's choices.
module quotient_divider #(
  parameter int unsigned NU_W = 36,
  parameter int unsigned DE_W = 28,
  parameter int unsigned Q_W  = 8
) (
  input  logic [NU_W-1:0] nu,
  input  logic [DE_W-1:0] de,
  output logic [Q_W-1:0]  q
);

  localparam int unsigned RW = ((NU_W + 1) > (DE_W + Q_W)) ? (NU_W + 1) : (DE_W + Q_W);

  always_comb begin
    logic [RW-1:0] rem;
    logic [RW-1:0] dsh;
    q   = '0;
    dsh = '0;
    rem = RW'(nu) + RW'(de >> 1);
    if (de == '0) begin
      q = '0;
    end else if (rem >= (RW'(de) << Q_W)) begin
      q = '1;
    end else begin
      for (int i = Q_W - 1; i >= 0; i--) begin
        dsh = RW'(de) << i;
        if (rem >= dsh) begin
          rem  = rem - dsh;
          q[i] = 1'b1;
        end
      end
    end
  end

endmodule
