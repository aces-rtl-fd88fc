// fp64_mul: combinational IEEE-754 double-precision multiplier, used by each
// MPE for the scalar-vector product a(i,k) * B(k,:).
//
// The 53x53-bit significand product is normalised by at most one place and
// rounded to nearest, ties to even. Simplifications (this design's choice, the
// accelerator only states 64-bit double precision): subnormal inputs and
// results are flushed to signed zero, exponent overflow gives infinity, and
// NaN/infinity inputs are not treated specially.
module fp64_mul (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);
  logic        s;
  logic [10:0] ea, eb;
  logic [105:0] prod;
  logic [52:0] m;
  logic        g, st;
  logic [53:0] mr;
  logic signed [13:0] e;

  always_comb begin
    s    = a[63] ^ b[63];
    ea   = a[62:52];
    eb   = b[62:52];
    prod = {1'b1, a[51:0]} * {1'b1, b[51:0]};
    e    = $signed({3'b0, ea}) + $signed({3'b0, eb}) - 14'sd1023;
    if (prod[105]) begin
      m  = prod[105:53];
      g  = prod[52];
      st = |prod[51:0];
      e  = e + 14'sd1;
    end else begin
      m  = prod[104:52];
      g  = prod[51];
      st = |prod[50:0];
    end
    mr = {1'b0, m} + {53'b0, (g & (st | m[0]))};
    if (mr[53]) begin
      mr = mr >> 1;
      e  = e + 14'sd1;
    end
    if (ea == 11'd0 || eb == 11'd0 || e <= 14'sd0)
      y = {s, 63'b0};
    else if (e >= 14'sd2047)
      y = {s, 11'h7ff, 52'b0};
    else
      y = {s, e[10:0], mr[51:0]};
  end
endmodule
