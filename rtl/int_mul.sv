// int_mul: unsigned W x W array multiplier built the way the classic AND / half-adder /
// full-adder array is drawn for the integer multiply-accumulate unit of the prime-field
// processor. Row 0 is the partial product A*B[0]; every further row i adds A*B[i] to the
// running sum shifted down one place with a ripple of adder cells (a half adder in the
// lowest position, full adders above it), and the lowest sum bit of each row leaves as
// product bit R[i]. The top row's sum and final carry give R[2W-1:W].
// Purely combinational; the 4-bit array of the source design is the W=4 instance. The
// cells are written as sum/carry equations rather than as separate cell instances.
module int_mul #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] r
);

  always_comb begin
    logic [W-1:0] s;      // sum bits carried to the next row
    logic         ctop;   // carry out of the top cell of the previous row
    logic [W-1:0] pp;
    logic [W-1:0] x;
    logic         c;
    r    = '0;
    s    = a & {W{b[0]}};
    ctop = 1'b0;
    r[0] = s[0];
    for (int i = 1; i < W; i++) begin
      pp = a & {W{b[i]}};
      x  = {ctop, s[W-1:1]};
      c  = 1'b0;
      for (int j = 0; j < W; j++) begin
        // j == 0 is a half adder (c is 0 there), the others are full adders
        s[j] = pp[j] ^ x[j] ^ c;
        c    = (pp[j] & x[j]) | (pp[j] & c) | (x[j] & c);
      end
      ctop = c;
      r[i] = s[0];
    end
    r[2*W-1:W] = {ctop, s[W-1:1]};
  end

endmodule
