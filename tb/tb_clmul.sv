// tb_clmul: checks the carry-less multiplier against a shift-and-XOR reference: every
// product of the 4-bit instance and random operands for the 16-bit instance, including that
// the top product bit stays 0 and that squaring spreads the bits of an operand apart.
module tb_clmul;
  int checks = 0, failures = 0;
  logic [3:0]  a4, b4;
  logic [7:0]  r4;
  logic [15:0] a16, b16;
  logic [31:0] r16;

  clmul #(.W(4))  u4  (.a(a4),  .b(b4),  .r(r4));
  clmul #(.W(16)) u16 (.a(a16), .b(b16), .r(r16));

  function automatic logic [31:0] ref_clmul(input logic [15:0] a, input logic [15:0] b);
    logic [31:0] x = '0;
    for (int i = 0; i < 16; i++) if (b[i]) x ^= 32'(a) << i;
    return x;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] sq;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        checks++;
        if (r4 !== ref_clmul(16'(i), 16'(j))[7:0] || r4[7]) begin
          failures++; $display("4-bit %h x %h = %h", a4, b4, r4);
        end
      end
    for (int n = 0; n < 2000; n++) begin
      a16 = 16'($urandom); b16 = (n % 4 == 0) ? a16 : 16'($urandom);
      #1;
      checks++;
      if (r16 !== ref_clmul(a16, b16)) begin
        failures++; $display("16-bit %h x %h = %h", a16, b16, r16);
      end
      if (a16 == b16) begin
        sq = '0;
        for (int k = 0; k < 16; k++) sq[2*k] = a16[k];
        checks++;
        if (r16 !== sq) begin
          failures++; $display("square of %h = %h", a16, r16);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
