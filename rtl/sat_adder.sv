// sat_adder: two's complement adder with saturation to an unsigned range.
//
// Both inputs are WIDTH-bit two's complement numbers. The result is given as a
// WIDTH-1 bit unsigned number: a sum that overflows in the positive direction
// is clamped to all ones, and a sum that is negative is clamped to zero. The
// envelope generator uses it so that the envelope cannot wrap past 0 or past
// 16'hFFFF, and the note timer uses it to stop at its maximum.
// Purely combinational. Overflow is detected the usual way: both operands have
// the same sign and the sum's sign differs; the true sum then has the sign of
// the operands, so a positive overflow gives all ones and a negative one gives
// zero. The clamping rule follows the original design; sending a negative
// overflow to zero (a case the envelope and timer never produce, since one
// operand is always non-negative) is this design's choice. The WIDTH default
// of 17 matches the envelope adder.
module sat_adder #(
  parameter int unsigned WIDTH = 17
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-2:0] y
);
  logic [WIDTH-1:0] sum;
  logic             ovfl, neg;

  always_comb begin
    sum  = a + b;
    ovfl = (a[WIDTH-1] == b[WIDTH-1]) && (sum[WIDTH-1] != a[WIDTH-1]);
    neg  = sum[WIDTH-1];
    if (ovfl)     y = a[WIDTH-1] ? '0 : '1;
    else if (neg) y = '0;
    else          y = sum[WIDTH-2:0];
  end
endmodule
