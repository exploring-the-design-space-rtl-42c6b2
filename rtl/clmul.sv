// clmul: W x W carry-less (polynomial) multiplier for the binary-field processor. Each
// product bit R[k] is the XOR of all partial products A[i] AND B[j] with i + j = k, so the
// array is the integer multiplier's with every adder replaced by XOR gates and no carry
// chain at all; this is where its shorter critical path and smaller area come from. The
// top bit R[2W-1] is always 0. Purely combinational; the 4-bit array of the source design
// is the W=4 instance.
module clmul #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] r
);

  always_comb begin
    r = '0;
    for (int i = 0; i < W; i++) begin
      for (int j = 0; j < W; j++) begin
        r[i+j] = r[i+j] ^ (a[j] & b[i]);
      end
    end
  end

endmodule
