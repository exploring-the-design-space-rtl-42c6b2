// tb_mac_int: drives random command sequences into the integer multiply-accumulate unit
// (16-bit words, and an 8-bit instance of the kind added for ECDSA on the binary-field
// processor) and compares the accumulator after every clock edge with a model kept here.
// It also runs one full product-scanning multiplication of two 6-word numbers and checks
// all 12 column words against the wide product.
module tb_mac_int;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mac_op_e op16, op8;
  logic [15:0] a16, b16, lo16;
  logic [39:0] acc16;
  logic [7:0]  a8, b8, lo8;
  logic [23:0] acc8;

  mac_int #(.DW(16)) u16 (.clk, .rst_n, .op(op16), .a(a16), .b(b16), .acc_lo(lo16), .acc(acc16));
  mac_int #(.DW(8))  u8  (.clk, .rst_n, .op(op8),  .a(a8),  .b(b8),  .acc_lo(lo8),  .acc(acc8));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [39:0] model(input logic [39:0] acc, input mac_op_e op,
                                        input logic [15:0] a, input logic [15:0] b,
                                        input int w, input int accw);
    logic [79:0] x;
    unique case (op)
      MAC_CLR:  x = 0;
      MAC_MUL:  x = 80'(acc) + 80'(a) * 80'(b);
      MAC_MUL2: x = 80'(acc) + 2 * 80'(a) * 80'(b);
      MAC_ADD:  x = 80'(acc) + 80'(a);
      MAC_SHR:  x = 80'(acc) >> w;
      default:  x = 80'(acc);
    endcase
    x = x & ((80'(1) << accw) - 1);
    return x[39:0];
  endfunction

  initial begin
    logic [39:0] e16, e8;
    logic [95:0] x, y;
    logic [191:0] p;
    op16 = MAC_CLR; op8 = MAC_CLR; a16 = 0; b16 = 0; a8 = 0; b8 = 0;
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    e16 = 0; e8 = 0;
    for (int n = 0; n < 3000; n++) begin
      op16 = mac_op_e'($urandom_range(0, 5));
      op8  = mac_op_e'($urandom_range(0, 5));
      a16 = 16'($urandom); b16 = 16'($urandom); a8 = 8'($urandom); b8 = 8'($urandom);
      e16 = model(e16, op16, a16, b16, 16, 40);
      e8  = model(e8, op8, {8'h0, a8}, {8'h0, b8}, 8, 24);
      @(negedge clk);
      checks += 2;
      if (acc16 !== e16 || lo16 !== e16[15:0]) begin
        failures++; $display("16-bit acc %h exp %h", acc16, e16);
        e16 = acc16;
      end
      if (acc8 !== e8[23:0] || lo8 !== e8[7:0]) begin
        failures++; $display("8-bit acc %h exp %h", acc8, e8);
        e8 = 40'(acc8);
      end
    end
    // product scanning of two 6-word numbers
    x = {$urandom, $urandom, $urandom}; y = {$urandom, $urandom, $urandom};
    p = '0;
    op8 = MAC_NOP;
    op16 = MAC_CLR; @(negedge clk);
    for (int k = 0; k < 11; k++) begin
      for (int i = 0; i < 6; i++)
        if (k - i >= 0 && k - i < 6) begin
          op16 = MAC_MUL; a16 = x[i*16 +: 16]; b16 = y[(k-i)*16 +: 16];
          @(negedge clk);
        end
      p[k*16 +: 16] = lo16;
      op16 = MAC_SHR; @(negedge clk);
    end
    p[176 +: 16] = lo16;
    checks++;
    if (p !== 192'(x) * 192'(y)) begin
      failures++; $display("product scanning %h exp %h", p, 192'(x) * 192'(y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
