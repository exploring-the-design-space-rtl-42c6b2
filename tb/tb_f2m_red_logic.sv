// tb_f2m_red_logic: forms random products of two reduced F_2^191 elements, feeds their
// words to the reduction logic for each result word j as a word-serial user would
// (T[12+j], T[11+j], T[10+j], T[j], the top-bit word G from g_out) and compares every
// result word with the product reduced bit by bit modulo z^191 + z^9 + 1.
module tb_f2m_red_logic;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] t_hi, t_mid, t_lo, t_low, r;
  logic [7:0]  g, g_out;
  logic is_first, is_second, is_top;

  f2m_red_logic dut (.*);

  function automatic logic [383:0] pmul(input logic [191:0] x, input logic [191:0] y);
    logic [383:0] p = '0;
    for (int i = 0; i < 192; i++) if (y[i]) p ^= 384'(x) << i;
    return p;
  endfunction

  function automatic logic [191:0] pred(input logic [383:0] p);
    for (int i = 382; i >= 191; i--)
      if (p[i]) begin
        p[i] = 1'b0; p[i-191] = ~p[i-191]; p[i-182] = ~p[i-182];
      end
    return p[191:0];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [191:0] x, y, e;
    logic [383:0] p;
    logic [15:0] T [24];
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 6; i++) begin x[i*32 +: 32] = $urandom; y[i*32 +: 32] = $urandom; end
      if (n == 0) begin x = '1; y = '1; end
      x[191] = 0; y[191] = 0;
      p = pmul(x, y);
      e = pred(p);
      for (int i = 0; i < 24; i++) T[i] = p[i*16 +: 16];
      t_hi = T[23]; t_mid = T[22]; t_lo = 0; t_low = 0;
      is_first = 0; is_second = 0; is_top = 0; g = 0;
      #1;
      g = g_out;
      for (int j = 0; j < 12; j++) begin
        t_hi = T[12+j]; t_mid = T[11+j]; t_lo = (j > 0) ? T[10+j] : 16'h0; t_low = T[j];
        is_first = (j == 0); is_second = (j == 1); is_top = (j == 11);
        #1;
        checks++;
        if (r !== e[j*16 +: 16]) begin
          failures++; $display("n=%0d word %0d: %h exp %h", n, j, r, e[j*16 +: 16]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
