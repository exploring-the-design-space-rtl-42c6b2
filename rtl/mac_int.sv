// mac_int: integer multiply-accumulate unit used for product-scanning multi-precision
// multiplication. One column of the product is built by accumulating the DW x DW products
// A[i]*B[j] with i + j = k into the accumulator (MAC_MUL), or twice a product when a
// squaring uses each off-diagonal product once (MAC_MUL2). The low word of the accumulator
// is the column's result word; MAC_SHR then drops it and keeps the carries for the next
// column. MAC_ADD adds a single word, which the P-192 reduction uses to sum shifted copies
// of the product. The accumulator carries ACC_W - 2W guard bits so that up to
// 2^(ACC_W-2W-1) doubled products can be summed without overflow.
// Timing: the command takes effect at the clock edge; acc_lo shows the registered
// accumulator. The multiplier is the array of int_mul. Command encoding and guard width
// are this implementation's choice.
module mac_int
  import ecc_pkg::*;
#(
  parameter int unsigned DW     = 16,
  parameter int unsigned ACC_W = 2*DW + 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mac_op_e       op,
  input  logic [DW-1:0]  a,
  input  logic [DW-1:0]  b,
  output logic [DW-1:0]  acc_lo,
  output logic [ACC_W-1:0] acc
);

  logic [2*DW-1:0] prod;

  int_mul #(.W(DW)) u_mul (.a(a), .b(b), .r(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else begin
      unique case (op)
        MAC_CLR:  acc <= '0;
        MAC_MUL:  acc <= acc + ACC_W'(prod);
        MAC_MUL2: acc <= acc + (ACC_W'(prod) << 1);
        MAC_ADD:  acc <= acc + ACC_W'(a);
        MAC_SHR:  acc <= acc >> DW;
        default:  acc <= acc;
      endcase
    end
  end

  assign acc_lo = acc[DW-1:0];

endmodule
