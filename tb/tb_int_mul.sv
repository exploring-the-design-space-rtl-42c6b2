// tb_int_mul: checks the array multiplier against the simulator's own multiplication:
// every product of the 4-bit instance (the size of the drawn array) and random operands
// plus corner values for the 16-bit instance. Combinational, so each check settles after
// a delay; a watchdog bounds the run.
module tb_int_mul;
  int checks = 0, failures = 0;
  logic [3:0]  a4, b4;
  logic [7:0]  r4;
  logic [15:0] a16, b16;
  logic [31:0] r16;

  int_mul #(.W(4))  u4  (.a(a4),  .b(b4),  .r(r4));
  int_mul #(.W(16)) u16 (.a(a16), .b(b16), .r(r16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        checks++;
        if (r4 !== 8'(i * j)) begin
          failures++; $display("4-bit %0d*%0d = %0d", i, j, r4);
        end
      end
    for (int n = 0; n < 2000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (n == 0) begin a16 = 16'hFFFF; b16 = 16'hFFFF; end
      if (n == 1) begin a16 = 16'h8000; b16 = 16'hFFFF; end
      #1;
      checks++;
      if (r16 !== 32'(a16) * 32'(b16)) begin
        failures++; $display("16-bit %h*%h = %h", a16, b16, r16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
