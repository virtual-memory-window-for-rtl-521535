// IDEA multiplication modulo 2^16+1.
//
// Computes r = a * b mod (2^16 + 1), where the all-zero operand and result
// stand for 2^16. Purely combinational. It uses the usual low/high
// reduction: with p = a*b split into 16-bit halves lo and hi,
// a*b mod (2^16+1) = lo - hi, plus 1 when lo < hi. A zero operand x gives
// 1 - y (mod 2^16), since 2^16 = -1 modulo 2^16+1.
//
// The IDEA round and output transformation of the coprocessor use this
// unit; the document names the multipliers but not their structure, so the
// reduction scheme is this design's choice.
module idea_mul (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] r
);
  logic [31:0] p;
  logic [15:0] lo, hi;

  always_comb begin
    p  = 32'(a) * 32'(b);
    lo = p[15:0];
    hi = p[31:16];
    if (a == 16'd0)
      r = 16'd1 - b;
    else if (b == 16'd0)
      r = 16'd1 - a;
    else
      r = lo - hi + 16'(lo < hi);
  end
endmodule
