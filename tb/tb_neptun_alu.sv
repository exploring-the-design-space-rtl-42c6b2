// tb_neptun_alu: applies random operands, carry inputs and operations to the ALU and
// compares result, carry/borrow and zero flag with values computed here.
module tb_neptun_alu;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  logic [15:0] a, b, y;
  logic cin, cout, zero;

  neptun_alu #(.DW(16)) dut (.op, .a, .b, .cin, .y, .cout, .zero);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ey;
    logic ec;
    int ia, ib;
    for (int n = 0; n < 5000; n++) begin
      op = alu_op_e'($urandom_range(0, 6));
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      if (n % 7 == 0) b = a;
      ia = int'(a); ib = int'(b);
      ec = 1'b0;
      unique case (op)
        ALU_ADD: begin ey = 16'(ia + ib + int'(cin)); ec = (ia + ib + int'(cin)) > 65535; end
        ALU_SUB: begin ey = 16'(ia - ib - int'(cin)); ec = (ia - ib - int'(cin)) < 0; end
        ALU_AND: ey = a & b;
        ALU_OR:  ey = a | b;
        ALU_XOR: ey = a ^ b;
        ALU_SHL: begin ey = 16'(ia * 2 + int'(cin)); ec = a[15]; end
        default: begin ey = 16'(ia / 2 + (cin ? 32768 : 0)); ec = a[0]; end
      endcase
      #1;
      checks++;
      if (y !== ey || cout !== ec || zero !== (ey == 0)) begin
        failures++;
        $display("%s a=%h b=%h cin=%b -> y=%h c=%b z=%b exp %h %b", op.name(), a, b, cin,
                 y, cout, zero, ey, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
