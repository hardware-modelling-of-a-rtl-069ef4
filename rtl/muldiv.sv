// muldiv: the multiply/divide unit. Combinational, so mult, multu, div and
// divu complete in the processor's single cycle like every other
// instruction.
//   mult = 1, div = 0:  y[63:0]  = a * b
//   mult = 0, div = 1:  y[31:0]  = a / b (quotient), y[63:32] = remainder
// sign = 1 treats a and b as two's complement numbers, sign = 0 as unsigned.
// The datapath stores y[63:32] in hi and y[31:0] in lo.
// Inside, one multiplier works on operands widened by one bit (their sign,
// or 0), and one unsigned divider works on magnitudes; the signed quotient
// is negated when the operand signs differ and the remainder takes the
// dividend's sign, so division truncates toward zero. Division by zero
// gives a quotient of all ones and a remainder equal to a (as unsigned
// magnitudes, then sign-corrected). With neither mult nor div set y is 0.
// The sign convention, the divide-by-zero result and the internal structure
// are this design's choices.
module muldiv #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               mult,
  input  logic               div,
  input  logic               sign,
  output logic [2*WIDTH-1:0] y
);

  // ---- multiplier: (WIDTH+1) x (WIDTH+1) signed, low 2*WIDTH bits kept
  logic signed [WIDTH:0]     ma, mb;
  logic signed [2*WIDTH+1:0] prod;

  assign ma   = {sign & a[WIDTH-1], a};
  assign mb   = {sign & b[WIDTH-1], b};
  assign prod = ma * mb;

  // ---- divider on magnitudes
  logic             neg_a, neg_b;
  logic [WIDTH-1:0] ua, ub, uq, ur, q, r;

  assign neg_a = sign & a[WIDTH-1];
  assign neg_b = sign & b[WIDTH-1];
  assign ua    = neg_a ? -a : a;
  assign ub    = neg_b ? -b : b;

  always_comb begin
    if (ub == '0) begin
      uq = '1;
      ur = ua;
    end else begin
      uq = ua / ub;
      ur = ua % ub;
    end
  end

  assign q = (neg_a ^ neg_b) ? -uq : uq;
  assign r = neg_a ? -ur : ur;

  always_comb begin
    if (mult)     y = prod[2*WIDTH-1:0];
    else if (div) y = {r, q};
    else          y = '0;
  end

endmodule
