// neptun_alu: the DW-bit arithmetic-logic unit of the 16-bit ECC microcontroller. It does
// what the CPU is described as able to do: addition and subtraction with a carry/borrow
// chain for multi-precision arithmetic, AND, OR, XOR, and one-bit shifts through the
// carry. Combinational. For ALU_ADD cout is the carry out; for ALU_SUB cin and cout are
// borrows (y = a - b - cin, cout = 1 when the result wrapped). ALU_SHL shifts cin in at
// bit 0 and a[DW-1] out to cout; ALU_SHR shifts cin in at the top and a[0] out. zero flags
// an all-zero result. The encodings and flag conventions are this implementation's own.
module neptun_alu
  import ecc_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  alu_op_e      op,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic         cin,
  output logic [DW-1:0] y,
  output logic         cout,
  output logic         zero
);

  always_comb begin
    y    = '0;
    cout = 1'b0;
    unique case (op)
      ALU_ADD: {cout, y} = {1'b0, a} + {1'b0, b} + (DW+1)'(cin);
      ALU_SUB: {cout, y} = {1'b0, a} - {1'b0, b} - (DW+1)'(cin);
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SHL: {cout, y} = {a, cin};
      ALU_SHR: {y, cout} = {cin, a};
      default: y = a;
    endcase
    zero = (y == '0);
  end

endmodule
