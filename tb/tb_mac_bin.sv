// tb_mac_bin: drives random command sequences into the carry-less multiply-accumulate
// unit and compares the accumulator after every clock edge with a shift-and-XOR model kept
// here; then runs one product-scanning polynomial multiplication of two 6-word operands and
// checks the 12 column words against the full polynomial product.
module tb_mac_bin;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mac_op_e op;
  logic [15:0] a, b, lo;
  logic [31:0] acc;

  mac_bin #(.DW(16)) dut (.clk, .rst_n, .op, .a, .b, .acc_lo(lo), .acc);

  function automatic logic [191:0] pmul(input logic [95:0] x, input logic [95:0] y);
    logic [191:0] r = '0;
    for (int i = 0; i < 96; i++) if (y[i]) r ^= 192'(x) << i;
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    logic [95:0] x, y;
    logic [191:0] p;
    op = MAC_CLR; a = 0; b = 0;
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    e = 0;
    for (int n = 0; n < 3000; n++) begin
      op = mac_op_e'($urandom_range(0, 5));
      a = 16'($urandom); b = 16'($urandom);
      unique case (op)
        MAC_CLR:           e = 0;
        MAC_MUL, MAC_MUL2: e = e ^ pmul(96'(a), 96'(b))[31:0];
        MAC_ADD:           e = e ^ 32'(a);
        MAC_SHR:           e = e >> 16;
        default:           ;
      endcase
      @(negedge clk);
      checks++;
      if (acc !== e || lo !== e[15:0]) begin
        failures++; $display("acc %h exp %h after %s", acc, e, op.name());
        e = acc;
      end
    end
    x = {$urandom, $urandom, $urandom}; y = {$urandom, $urandom, $urandom};
    p = '0;
    op = MAC_CLR; @(negedge clk);
    for (int k = 0; k < 11; k++) begin
      for (int i = 0; i < 6; i++)
        if (k - i >= 0 && k - i < 6) begin
          op = MAC_MUL; a = x[i*16 +: 16]; b = y[(k-i)*16 +: 16];
          @(negedge clk);
        end
      p[k*16 +: 16] = lo;
      op = MAC_SHR; @(negedge clk);
    end
    p[176 +: 16] = lo;
    checks++;
    if (p !== pmul(x, y)) begin
      failures++; $display("product scanning %h exp %h", p, pmul(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
