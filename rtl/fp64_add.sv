// fp64_add: combinational IEEE-754 double-precision adder, used by each APE
// when two merged fibers hold the same coordinate.
//
// The smaller operand is aligned with guard, round and sticky bits, added or
// subtracted, renormalised with a leading-zero count and rounded to nearest,
// ties to even. Simplifications (this design's choice): subnormals are flushed
// to zero, exponent overflow gives infinity, exact cancellation gives +0 and
// NaN/infinity inputs are not treated specially.
module fp64_add (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);
  logic [63:0] x, z;            // |x| >= |z|
  logic [10:0] ex, ez;
  logic [11:0] d;
  logic [55:0] mx, mz, mzs;     // 1.f followed by guard, round, sticky
  logic [56:0] sum;
  logic [5:0]  lz;
  logic        found;
  logic signed [13:0] e;
  logic [53:0] mr;
  logic [52:0] mant;

  always_comb begin
    if (a[62:0] >= b[62:0]) begin x = a; z = b; end
    else                    begin x = b; z = a; end
    ex  = x[62:52];
    ez  = z[62:52];
    mx  = {1'b1, x[51:0], 3'b000};
    mz  = {1'b1, z[51:0], 3'b000};
    d   = {1'b0, ex} - {1'b0, ez};
    if (d >= 12'd56) mzs = {55'b0, 1'b1};
    else begin
      mzs = mz >> d;
      if ((mz & ((56'd1 << d) - 56'd1)) != 56'd0) mzs[0] = 1'b1;
    end
    e = $signed({3'b0, ex});
    if (x[63] == z[63]) sum = {1'b0, mx} + {1'b0, mzs};
    else                sum = {1'b0, mx} - {1'b0, mzs};
    if (sum[56]) begin
      sum = {1'b0, sum[56:2], sum[1] | sum[0]};
      e   = e + 14'sd1;
    end
    lz    = 6'd0;
    found = 1'b0;
    for (int i = 55; i >= 0; i--) begin
      if (!found && sum[i]) found = 1'b1;
      else if (!found) lz = lz + 6'd1;
    end
    sum  = sum << lz;
    e    = e - $signed({8'b0, lz});
    mant = sum[55:3];
    mr   = {1'b0, mant} + {53'b0, (sum[2] & (sum[1] | sum[0] | mant[0]))};
    if (mr[53]) begin
      mr = mr >> 1;
      e  = e + 14'sd1;
    end
    if (ez == 11'd0)            y = x;                      // z flushed to zero
    else if (ex == 11'd0)       y = 64'b0;                  // both zero
    else if (!found)            y = 64'b0;                  // exact cancellation
    else if (e <= 14'sd0)       y = {x[63], 63'b0};
    else if (e >= 14'sd2047)    y = {x[63], 11'h7ff, 52'b0};
    else                        y = {x[63], e[10:0], mr[51:0]};
  end
endmodule
