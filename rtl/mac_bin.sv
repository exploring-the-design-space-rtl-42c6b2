// mac_bin: carry-less multiply-accumulate unit for product-scanning multiplication of
// binary polynomials. MAC_MUL XORs the 2W-bit carry-less product of a and b into the
// accumulator; as no carries arise, the accumulator is exactly 2W bits wide. MAC_SHR hands
// the high word down as the start of the next column, MAC_ADD XORs a single word in, and
// MAC_CLR clears it. A squaring uses MAC_MUL with a == b: the product is a with a zero bit
// inserted between neighbouring bits. MAC_MUL2 is treated as MAC_MUL (twice a product is
// zero in characteristic 2, so the engines never issue it).
// Timing: the command takes effect at the clock edge; acc_lo shows the registered
// accumulator. Command encoding is this implementation's choice.
module mac_bin
  import ecc_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  mac_op_e        op,
  input  logic [DW-1:0]   a,
  input  logic [DW-1:0]   b,
  output logic [DW-1:0]   acc_lo,
  output logic [2*DW-1:0] acc
);

  logic [2*DW-1:0] prod;

  clmul #(.W(DW)) u_mul (.a(a), .b(b), .r(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else begin
      unique case (op)
        MAC_CLR:           acc <= '0;
        MAC_MUL, MAC_MUL2: acc <= acc ^ prod;
        MAC_ADD:           acc <= acc ^ (2*DW)'(a);
        MAC_SHR:           acc <= acc >> DW;
        default:           acc <= acc;
      endcase
    end
  end

  assign acc_lo = acc[DW-1:0];

endmodule
