// tb_f2m_point_mult: the binary-field workloads run on ecc_top the way a controlling CPU
// would run them, as sequences of field operations issued through the binary-field
// operation port:
//  1. inversion by Fermat's little theorem, a^-1 = a^(2^191 - 2), with the Itoh-Tsujii
//     chain 1, 2, 4, 5, 10, 11, 22, 23, 46, 47, 94, 95, 190: 190 squarings and 12
//     multiplications; the result is checked against a reference inverse and the
//     operation counts are checked;
//  2. the x-coordinate of Q = k x P by the Montgomery powering ladder with Lopez-Dahab
//     projective formulae (per key bit one addition: 4 mul, 1 sqr, 2 add; one doubling:
//     2 mul, 4 sqr, 1 add), followed by the conversion x = X1 / Z1 with the inversion
//     above. P is the base point of ANSI X9.62 c2tnb191v1; its curve equation is checked
//     first. The result is compared with an affine double-and-add reference computed here.
// The ladder needs eight field elements plus the engine's 24-word product area, 120 words,
// so the binary-field data memory is enlarged to 128 words for this test. Cycle counts are
// printed next to the operation counts.
module tb_f2m_point_mult;
  import ecc_pkg::*;
  localparam int AW = 7;
  // word addresses
  localparam logic [AW-1:0] T_AT = 7'd0, X_AT = 7'd24, BC_AT = 7'd36, X1_AT = 7'd48,
                            Z1_AT = 7'd60, X2_AT = 7'd72, Z2_AT = 7'd84, T1_AT = 7'd96,
                            T2_AT = 7'd108;
  // c2tnb191v1 domain parameters
  localparam logic [191:0] CA  = 192'h2866537B676752636A68F56554E12640276B649EF7526267;
  localparam logic [191:0] CB  = 192'h2E45EF571F00786F67B0081B9495A3D95462F5DE0AA185EC;
  localparam logic [191:0] GX  = 192'h36B3DAF8A23206F9C4F299D7B21A9C369137F2C84AE1AA0D;
  localparam logic [191:0] GY  = 192'h765BE73433B3F95E332932E70EA245CA2418EA0EF98018FB;

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

  ecc_top #(.B_RAM_DEPTH(128)) dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference field and curve arithmetic
  function automatic logic [191:0] fmul(input logic [191:0] a, input logic [191:0] b);
    logic [383:0] x = '0;
    for (int i = 0; i < 191; i++) if (b[i]) x ^= 384'(a) << i;
    for (int i = 380; i >= 191; i--)
      if (x[i]) begin x[i] = 0; x[i-191] = ~x[i-191]; x[i-182] = ~x[i-182]; end
    return x[191:0];
  endfunction

  function automatic logic [191:0] finv(input logic [191:0] a);
    // a^(2^191 - 2) by square and multiply
    logic [191:0] r = 192'd1;
    for (int i = 190; i >= 1; i--) r = fmul(fmul(r, r), a);
    return fmul(r, r);
  endfunction

  typedef struct packed { logic inf; logic [191:0] x, y; } pt_t;

  function automatic pt_t padd(input pt_t p, input pt_t q);
    pt_t r;
    logic [191:0] l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y != q.y || p.x == 0) begin r = '0; r.inf = 1; return r; end
      l = p.x ^ fmul(p.y, finv(p.x));
      r.x = fmul(l, l) ^ l ^ CA;
      r.y = fmul(p.x, p.x) ^ fmul(l, r.x) ^ r.x;
    end else begin
      l = fmul(p.y ^ q.y, finv(p.x ^ q.x));
      r.x = fmul(l, l) ^ l ^ p.x ^ q.x ^ CA;
      r.y = fmul(l, p.x ^ r.x) ^ r.x ^ p.y;
    end
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
    for (int i = 0; i < M; i++) begin
      b_host_en = 1; b_host_we = 1; b_host_addr = base + AW'(i); b_host_wdata = v[i*W +: W];
      @(negedge clk);
    end
    b_host_en = 0; b_host_we = 0;
  endtask

  task automatic rd(input logic [AW-1:0] base, output logic [191:0] v);
    v = '0;
    for (int i = 0; i < M; i++) begin
      b_host_en = 1; b_host_we = 0; b_host_addr = base + AW'(i);
      @(negedge clk);
      v[i*W +: W] = b_host_rdata;
    end
    b_host_en = 0;
  endtask

  task automatic fop(input fop_e o, input logic [AW-1:0] a, input logic [AW-1:0] b,
                     input logic [AW-1:0] c);
    b_op = o; b_a_base = a; b_b_base = b; b_c_base = c; b_t_base = T_AT;
    b_start = 1; @(negedge clk); b_start = 0;
    do @(negedge clk); while (!b_done);
    @(negedge clk);  // start is taken only while busy is low
    unique case (o)
      FOP_MUL: n_mul++;
      FOP_SQR: n_sqr++;
      default: n_add++;
    endcase
  endtask

  // out = a^-1 (a, out and tmp distinct; a kept)
  task automatic inv(input logic [AW-1:0] a, input logic [AW-1:0] out,
                     input logic [AW-1:0] tmp);
    int k = 1;
    // beta_k = a^(2^k - 1); beta_1 = a, beta_2 = a^2 * a
    fop(FOP_SQR, a, a, out);
    fop(FOP_MUL, out, a, out);
    k = 2;
    // remaining bits of 190 = 1011_1110b after "10": 1,1,1,1,1,0
    for (int s = 0; s < 6; s++) begin
      // double: beta_2k = beta_k^(2^k) * beta_k
      fop(FOP_SQR, out, out, tmp);
      for (int i = 1; i < k; i++) fop(FOP_SQR, tmp, tmp, tmp);
      fop(FOP_MUL, tmp, out, out);
      k = 2 * k;
      if (s < 5) begin
        // add one: beta_k+1 = beta_k^2 * a
        fop(FOP_SQR, out, out, out);
        fop(FOP_MUL, out, a, out);
        k = k + 1;
      end
    end
    // a^-1 = beta_190^2
    fop(FOP_SQR, out, out, out);
    checks++;
    if (k != 190) begin failures++; $display("inversion chain ended at %0d", k); end
  endtask

  // (Xa, Za) <- (Xa, Za) + (Xb, Zb), x the difference point's x-coordinate
  task automatic madd(input logic [AW-1:0] xa, input logic [AW-1:0] za,
                      input logic [AW-1:0] xb, input logic [AW-1:0] zb);
    fop(FOP_MUL, xa, zb, T1_AT);
    fop(FOP_MUL, xb, za, T2_AT);
    fop(FOP_ADD, T1_AT, T2_AT, za);
    fop(FOP_SQR, za, za, za);
    fop(FOP_MUL, T1_AT, T2_AT, xa);
    fop(FOP_MUL, X_AT, za, T1_AT);
    fop(FOP_ADD, xa, T1_AT, xa);
  endtask

  // (X, Z) <- 2 (X, Z)
  task automatic mdouble(input logic [AW-1:0] xa, input logic [AW-1:0] za);
    fop(FOP_SQR, za, za, T1_AT);
    fop(FOP_SQR, xa, xa, xa);
    fop(FOP_MUL, xa, T1_AT, za);
    fop(FOP_SQR, xa, xa, xa);
    fop(FOP_SQR, T1_AT, T1_AT, T1_AT);
    fop(FOP_MUL, BC_AT, T1_AT, T1_AT);
    fop(FOP_ADD, xa, T1_AT, xa);
  endtask

  initial begin
    logic [191:0] a, r, k, x1, z1, xq;
    pt_t g, q;
    longint t0, c_inv, c_kp;
    int m0, s0, a0;
    p_start = 0; b_start = 0; p_host_en = 0; p_host_we = 0; b_host_en = 0; b_host_we = 0;
    p_op = FOP_ADD; b_op = FOP_ADD;
    p_a_base = '0; p_b_base = '0; p_c_base = '0; p_t_base = '0; p_host_addr = '0;
    b_a_base = '0; b_b_base = '0; b_c_base = '0; b_t_base = '0; b_host_addr = '0;
    p_host_wdata = '0; b_host_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // base point on the curve: y^2 + xy = x^3 + a x^2 + b
    checks++;
    if ((fmul(GY, GY) ^ fmul(GX, GY)) !== (fmul(fmul(GX, GX), GX) ^ fmul(CA, fmul(GX, GX)) ^ CB)) begin
      failures++; $display("base point is not on the curve");
    end

    // ---- workload 1: inversion
    for (int n = 0; n < 2; n++) begin
      for (int i = 0; i < 6; i++) a[i*32 +: 32] = $urandom;
      a[191] = 0;
      wr(Z1_AT, a);
      m0 = n_mul; s0 = n_sqr;
      t0 = cyc;
      inv(Z1_AT, X2_AT, T2_AT);
      c_inv = cyc - t0;
      rd(X2_AT, r);
      checks++;
      if (r !== finv(a) || fmul(r, a) !== 192'd1) begin
        failures++; $display("inverse of %h: %h", a, r);
      end
      checks++;
      if (n_mul - m0 != 12 || n_sqr - s0 != 190) begin
        failures++; $display("inversion used %0d mul, %0d sqr", n_mul - m0, n_sqr - s0);
      end
      $display("inversion: %0d multiplications, %0d squarings, %0d cycles",
               n_mul - m0, n_sqr - s0, c_inv);
    end

    // ---- workload 2: Q = k x G, x-coordinate by the Montgomery ladder
    for (int i = 0; i < 6; i++) k[i*32 +: 32] = $urandom;
    k[191:190] = 2'b00;
    k[189] = 1'b1;
    g.inf = 0; g.x = GX; g.y = GY;
    wr(X_AT, GX);
    wr(BC_AT, CB);
    wr(X1_AT, GX);
    wr(Z1_AT, 192'd1);
    t0 = cyc;
    m0 = n_mul; s0 = n_sqr; a0 = n_add;
    // X2 = x^4 + b, Z2 = x^2
    fop(FOP_SQR, X_AT, X_AT, Z2_AT);
    fop(FOP_SQR, Z2_AT, Z2_AT, X2_AT);
    fop(FOP_ADD, X2_AT, BC_AT, X2_AT);
    for (int i = 188; i >= 0; i--) begin
      if (k[i]) begin
        madd(X1_AT, Z1_AT, X2_AT, Z2_AT);
        mdouble(X2_AT, Z2_AT);
      end else begin
        madd(X2_AT, Z2_AT, X1_AT, Z1_AT);
        mdouble(X1_AT, Z1_AT);
      end
    end
    $display("ladder: %0d multiplications, %0d squarings, %0d additions over 189 key bits",
             n_mul - m0, n_sqr - s0, n_add - a0);
    checks++;
    if (n_mul - m0 != 6 * 189 || n_sqr - s0 != 5 * 189 + 2 || n_add - a0 != 3 * 189 + 1) begin
      failures++; $display("ladder operation counts differ from 6M + 5S + 3A per bit");
    end
    // x = X1 / Z1
    inv(Z1_AT, X2_AT, T2_AT);
    fop(FOP_MUL, X1_AT, X2_AT, Z2_AT);
    c_kp = cyc - t0;
    rd(Z2_AT, xq);
    q = pmul(k, g);
    checks++;
    if (q.inf || xq !== q.x) begin
      failures++; $display("x(kG) = %h, reference %h", xq, q.x);
    end
    $display("Q = k x G: %0d cycles, x = %h", c_kp, xq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
