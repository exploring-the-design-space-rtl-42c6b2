// tb_fp_point_mult: the prime-field point multiplication run on ecc_top the way a
// controlling CPU would run it, as a sequence of field operations issued through the
// prime-field operation port. It computes the x-coordinate of Q = k x G on NIST P-192
// (curve y^2 = x^3 - 3x + b, G its base point, k a random 190-bit scalar):
//  - the Montgomery powering ladder on projective (X : Z) pairs whose difference is
//    always G, with the x-only addition and doubling formulae for short Weierstrass
//    curves (Brier-Joye / Izu-Takagi form; a = -3 is applied as a multiplication by
//    the stored constant p - 3). Per key bit they take 14 multiplications,
//    5 squarings and 13 additions/subtractions;
//  - the conversion x = X / Z with a^-1 = a^(p-2) by square and multiply.
// The source design uses different ladder formulae (12 mul, 4 sqr, 16 add per key bit)
// and a Montgomery inversion, whose steps it does not give; these stand in for them so
// the prime-field engine runs a whole point multiplication. The operation counts are
// checked, the result is compared with an affine double-and-add reference computed here,
// and the cycle count is printed.
// Ten field elements plus the engine's 24-word product area need 144 words, so the
// prime-field data memory is enlarged to 160 words and the address width to 8 bits.
module tb_fp_point_mult;
  import ecc_pkg::*;
  localparam int AW = 8;
  // word addresses
  localparam logic [AW-1:0] T_AT = 8'd0, XD_AT = 8'd24, B4_AT = 8'd36, X1_AT = 8'd48,
                            Z1_AT = 8'd60, X2_AT = 8'd72, Z2_AT = 8'd84, T1_AT = 8'd96,
                            T2_AT = 8'd108, T3_AT = 8'd120, AC_AT = 8'd132;
  // NIST P-192 domain parameters
  localparam logic [191:0] PP = P192;
  localparam logic [191:0] CB = 192'h64210519E59C80E70FA7E9AB72243049FEB8DEECC146B9B1;
  localparam logic [191:0] GX = 192'h188DA80EB03090F67CBF20EB43A18800F4FF0AFD82FF1012;
  localparam logic [191:0] GY = 192'h07192B95FFC8DA78631011ED6B24CDD573F977A11E794811;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic p_start, p_busy, p_done, p_host_en, p_host_we;
  fop_e p_op;
  logic [AW-1:0] p_a_base, p_b_base, p_c_base, p_t_base, p_host_addr;
  logic [W-1:0] p_host_wdata, p_host_rdata;
  logic b_start, b_busy, b_done, b_host_en, b_host_we;
  fop_e b_op;
  logic [AW-1:0] b_a_base, b_b_base, b_c_base, b_t_base, b_host_addr;
  logic [W-1:0] b_host_wdata, b_host_rdata;

  ecc_top #(.P_RAM_DEPTH(160), .AW(8)) dut (.*);

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference field and curve arithmetic
  function automatic logic [191:0] mmul(input logic [191:0] a, input logic [191:0] b);
    logic [383:0] x = 384'(a) * 384'(b);
    return 192'(x % 384'(PP));
  endfunction

  function automatic logic [191:0] madd_r(input logic [191:0] a, input logic [191:0] b);
    logic [192:0] s = 193'(a) + 193'(b);
    if (s >= 193'(PP)) s = s - 193'(PP);
    return s[191:0];
  endfunction

  function automatic logic [191:0] msub_r(input logic [191:0] a, input logic [191:0] b);
    return (a >= b) ? a - b : a + (PP - b);
  endfunction

  function automatic logic [191:0] minv(input logic [191:0] a);
    logic [191:0] e = PP - 192'd2, r = 192'd1;
    for (int i = 191; i >= 0; i--) begin
      r = mmul(r, r);
      if (e[i]) r = mmul(r, a);
    end
    return r;
  endfunction

  typedef struct packed { logic inf; logic [191:0] x, y; } pt_t;

  function automatic pt_t padd(input pt_t p, input pt_t q);
    pt_t r;
    logic [191:0] l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y != q.y || p.y == 0) begin r = '0; r.inf = 1; return r; end
      // l = (3x^2 - 3) / 2y
      l = msub_r(mmul(192'd3, mmul(p.x, p.x)), 192'd3);
      l = mmul(l, minv(madd_r(p.y, p.y)));
    end else begin
      l = mmul(msub_r(q.y, p.y), minv(msub_r(q.x, p.x)));
    end
    r.x = msub_r(msub_r(mmul(l, l), p.x), q.x);
    r.y = msub_r(mmul(l, msub_r(p.x, r.x)), p.y);
    r.inf = 0;
    return r;
  endfunction

  function automatic pt_t pmul(input logic [191:0] k, input pt_t p);
    pt_t r = '0;
    r.inf = 1;
    for (int i = 191; i >= 0; i--) begin
      r = padd(r, r);
      if (k[i]) r = padd(r, p);
    end
    return r;
  endfunction

  // ---------------- host access and field-operation issue
  int n_mul = 0, n_sqr = 0, n_add = 0;

  task automatic wr(input logic [AW-1:0] base, input logic [191:0] v);
    for (int i = 0; i < N; i++) begin
      p_host_en = 1; p_host_we = 1; p_host_addr = base + AW'(i); p_host_wdata = v[i*W +: W];
      @(negedge clk);
    end
    p_host_en = 0; p_host_we = 0;
  endtask

  task automatic rd(input logic [AW-1:0] base, output logic [191:0] v);
    v = '0;
    for (int i = 0; i < N; i++) begin
      p_host_en = 1; p_host_we = 0; p_host_addr = base + AW'(i);
      @(negedge clk);
      v[i*W +: W] = p_host_rdata;
    end
    p_host_en = 0;
  endtask

  task automatic fop(input fop_e o, input logic [AW-1:0] a, input logic [AW-1:0] b,
                     input logic [AW-1:0] c);
    p_op = o; p_a_base = a; p_b_base = b; p_c_base = c; p_t_base = T_AT;
    p_start = 1; @(negedge clk); p_start = 0;
    do @(negedge clk); while (!p_done);
    @(negedge clk);  // start is taken only while busy is low
    unique case (o)
      FOP_MUL: n_mul++;
      FOP_SQR: n_sqr++;
      default: n_add++;
    endcase
  endtask

  // (Xa, Za) <- (Xa, Za) + (Xb, Zb); their difference is the point with x = XD, Z = 1
  task automatic ladd(input logic [AW-1:0] xa, input logic [AW-1:0] za,
                      input logic [AW-1:0] xb, input logic [AW-1:0] zb);
    fop(FOP_MUL, xa, zb, T1_AT);        // Xa Zb
    fop(FOP_MUL, xb, za, T2_AT);        // Xb Za
    fop(FOP_MUL, za, zb, za);           // Za Zb
    fop(FOP_MUL, xa, xb, xa);           // Xa Xb
    fop(FOP_MUL, AC_AT, za, T3_AT);     // a Za Zb
    fop(FOP_ADD, xa, T3_AT, xa);        // Xa Xb + a Za Zb
    fop(FOP_ADD, T1_AT, T2_AT, T3_AT);  // Xa Zb + Xb Za
    fop(FOP_MUL, xa, T3_AT, xa);
    fop(FOP_ADD, xa, xa, xa);           // 2 (..)(..)
    fop(FOP_SQR, za, za, za);
    fop(FOP_MUL, B4_AT, za, za);        // 4b (Za Zb)^2
    fop(FOP_ADD, xa, za, xa);
    fop(FOP_SUB, T1_AT, T2_AT, T1_AT);
    fop(FOP_SQR, T1_AT, T1_AT, za);     // Z3 = (Xa Zb - Xb Za)^2
    fop(FOP_MUL, XD_AT, za, T1_AT);
    fop(FOP_SUB, xa, T1_AT, xa);        // X3
  endtask

  // (X, Z) <- 2 (X, Z)
  task automatic ldbl(input logic [AW-1:0] x, input logic [AW-1:0] z);
    fop(FOP_SQR, x, x, T1_AT);          // X^2
    fop(FOP_SQR, z, z, T2_AT);          // Z^2
    fop(FOP_MUL, AC_AT, T2_AT, T3_AT);  // a Z^2
    fop(FOP_MUL, x, z, z);              // X Z
    fop(FOP_SUB, T1_AT, T3_AT, x);      // X^2 - a Z^2
    fop(FOP_ADD, T1_AT, T3_AT, T1_AT);  // X^2 + a Z^2
    fop(FOP_SQR, x, x, x);
    fop(FOP_MUL, T1_AT, z, T1_AT);
    fop(FOP_ADD, T1_AT, T1_AT, T1_AT);
    fop(FOP_ADD, T1_AT, T1_AT, T1_AT);  // 4 X Z (X^2 + a Z^2)
    fop(FOP_MUL, B4_AT, T2_AT, T3_AT);  // 4b Z^2
    fop(FOP_MUL, z, T3_AT, z);          // 4b X Z^3
    fop(FOP_ADD, z, z, z);
    fop(FOP_SUB, x, z, x);              // X3 = (X^2 - a Z^2)^2 - 8b X Z^3
    fop(FOP_MUL, T2_AT, T3_AT, T2_AT);  // 4b Z^4
    fop(FOP_ADD, T1_AT, T2_AT, z);      // Z3
  endtask

  initial begin
    logic [191:0] k, e, xq;
    pt_t g, q;
    longint t0, c_ladder, c_inv;
    int m0, s0, a0, m1, s1;
    p_start = 0; b_start = 0; p_host_en = 0; p_host_we = 0; b_host_en = 0; b_host_we = 0;
    p_op = FOP_ADD; b_op = FOP_ADD;
    p_a_base = '0; p_b_base = '0; p_c_base = '0; p_t_base = '0; p_host_addr = '0;
    b_a_base = '0; b_b_base = '0; b_c_base = '0; b_t_base = '0; b_host_addr = '0;
    p_host_wdata = '0; b_host_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // base point on the curve: y^2 = x^3 - 3x + b
    checks++;
    if (mmul(GY, GY) !== madd_r(msub_r(mmul(mmul(GX, GX), GX), mmul(192'd3, GX)), CB)) begin
      failures++; $display("base point is not on the curve");
    end

    for (int i = 0; i < 6; i++) k[i*32 +: 32] = $urandom;
    k[191:190] = 2'b00;
    k[189] = 1'b1;
    g.inf = 0; g.x = GX; g.y = GY;
    wr(XD_AT, GX);
    wr(B4_AT, mmul(192'd4, CB));
    wr(AC_AT, PP - 192'd3);
    wr(X1_AT, GX);
    wr(Z1_AT, 192'd1);
    wr(X2_AT, GX);
    wr(Z2_AT, 192'd1);
    t0 = cyc;
    m0 = n_mul; s0 = n_sqr; a0 = n_add;
    ldbl(X2_AT, Z2_AT);
    for (int i = 188; i >= 0; i--) begin
      if (k[i]) begin
        ladd(X1_AT, Z1_AT, X2_AT, Z2_AT);
        ldbl(X2_AT, Z2_AT);
      end else begin
        ladd(X2_AT, Z2_AT, X1_AT, Z1_AT);
        ldbl(X1_AT, Z1_AT);
      end
    end
    c_ladder = cyc - t0;
    $display("ladder: %0d multiplications, %0d squarings, %0d additions over 189 key bits, %0d cycles",
             n_mul - m0, n_sqr - s0, n_add - a0, c_ladder);
    checks++;
    if (n_mul - m0 != 14 * 189 + 6 || n_sqr - s0 != 5 * 189 + 3 || n_add - a0 != 13 * 189 + 7) begin
      failures++; $display("ladder operation counts differ from 14M + 5S + 13A per bit");
    end
    // x = X1 / Z1, Z1^-1 = Z1^(p-2) by square and multiply into X2
    t0 = cyc;
    m1 = n_mul; s1 = n_sqr;
    e = PP - 192'd2;
    wr(X2_AT, 192'd1);
    for (int i = 191; i >= 0; i--) begin
      fop(FOP_SQR, X2_AT, X2_AT, X2_AT);
      if (e[i]) fop(FOP_MUL, X2_AT, Z1_AT, X2_AT);
    end
    c_inv = cyc - t0;
    $display("inversion: %0d multiplications, %0d squarings, %0d cycles",
             n_mul - m1, n_sqr - s1, c_inv);
    checks++;
    if (n_mul - m1 != $countones(e) || n_sqr - s1 != 192) begin
      failures++; $display("inversion operation counts are wrong");
    end
    fop(FOP_MUL, X1_AT, X2_AT, Z2_AT);
    rd(Z2_AT, xq);
    q = pmul(k, g);
    checks++;
    if (q.inf || xq !== q.x) begin
      failures++; $display("x(kG) = %h, reference %h", xq, q.x);
    end
    $display("Q = k x G: %0d cycles in all, x = %h", cyc - t0 + c_ladder, xq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
