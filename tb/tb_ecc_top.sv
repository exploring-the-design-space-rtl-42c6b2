// tb_ecc_top: end-to-end test of both field processors at their default sizes. Operands
// are loaded through the host ports, field operations are started, and every result word is
// read back and compared with reference arithmetic computed here on 192/384-bit vectors
// (integer product modulo p for P-192, polynomial product reduced bit by bit modulo
// z^191 + z^9 + 1 for the binary field). Operand sets include random elements and edge
// cases chosen to drive each reduction path: addition that carries out, addition that
// lands on or above p without a carry, subtraction that borrows, multiplication whose
// reduction sum overflows 2^192, the final subtraction after a multiplication, and binary
// products whose fold reaches past bit 190. Each path is counted from the engines' state
// and must occur at least once. Cycle counts of the deterministic operations are checked.
module tb_ecc_top;
  import ecc_pkg::*;

  localparam int AW = 7;
  localparam logic [AW-1:0] A_AT = 7'd0, B_AT = 7'd12, C_AT = 7'd24, T_AT = 7'd40;
  localparam int NRAND = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic p_start, p_busy, p_done, p_host_en, p_host_we;
  fop_e p_op;
  logic [AW-1:0] p_a_base, p_b_base, p_c_base, p_t_base, p_host_addr;
  logic [W-1:0] p_host_wdata, p_host_rdata;
  logic b_start, b_busy, b_done, b_host_en, b_host_we;
  fop_e b_op;
  logic [AW-1:0] b_a_base, b_b_base, b_c_base, b_t_base, b_host_addr;
  logic [W-1:0] b_host_wdata, b_host_rdata;

  ecc_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters, sampled from the engines' state
  int n_add_carry = 0, n_cmp_sub = 0, n_sub_borrow = 0, n_fold = 0, n_mul_fix = 0;
  int n_b_gfold = 0, n_b_mul = 0, n_b_sqr = 0;
  always @(posedge clk) begin
    if (dut.u_fp.state == dut.u_fp.S_AS_W && dut.u_fp.idx == 6'(N-1)) begin
      if (dut.u_fp.op_q == FOP_ADD && dut.u_fp.alu_cout) n_add_carry++;
      if (dut.u_fp.op_q == FOP_SUB && dut.u_fp.alu_cout) n_sub_borrow++;
    end
    if (dut.u_fp.state == dut.u_fp.S_CMP_C && dut.u_fp.op_q == FOP_ADD &&
        (dut.u_fp.mem_rdata > p192_word(dut.u_fp.idx) || dut.u_fp.idx == 0) &&
        !(dut.u_fp.mem_rdata < p192_word(dut.u_fp.idx)))
      n_cmp_sub++;
    if (dut.u_fp.state == dut.u_fp.S_RED_OVF && dut.u_fp.mac_lo != 0) n_fold++;
    if (dut.u_fp.state == dut.u_fp.S_FIX_R && dut.u_fp.idx == 0 &&
        (dut.u_fp.op_q == FOP_MUL || dut.u_fp.op_q == FOP_SQR)) n_mul_fix++;
    if (dut.u_f2m.state == dut.u_f2m.S_RG_G && dut.u_f2m.red_g != 0) n_b_gfold++;
  end

  // ---------------- reference arithmetic
  function automatic logic [191:0] ref_fp(input fop_e op, input logic [191:0] a,
                                          input logic [191:0] b);
    logic [383:0] x;
    unique case (op)
      FOP_ADD: x = (384'(a) + 384'(b)) % 384'(P192);
      FOP_SUB: x = (384'(a) + 384'(P192) - 384'(b)) % 384'(P192);
      FOP_MUL: x = (384'(a) * 384'(b)) % 384'(P192);
      default: x = (384'(a) * 384'(a)) % 384'(P192);
    endcase
    return x[191:0];
  endfunction

  function automatic logic [191:0] ref_f2m(input fop_e op, input logic [191:0] a,
                                           input logic [191:0] b);
    logic [383:0] x;
    logic [191:0] bb;
    if (op == FOP_ADD || op == FOP_SUB) return a ^ b;
    bb = (op == FOP_SQR) ? a : b;
    x = '0;
    for (int i = 0; i < 191; i++) if (bb[i]) x ^= 384'(a) << i;
    for (int i = 380; i >= 191; i--)
      if (x[i]) begin
        x[i] = 1'b0;
        x[i-191] = ~x[i-191];
        x[i-191+9] = ~x[i-191+9];
      end
    return x[191:0];
  endfunction

  // ---------------- host-port helpers
  task automatic p_write(input logic [AW-1:0] base, input logic [191:0] v);
    for (int i = 0; i < N; i++) begin
      p_host_en = 1'b1; p_host_we = 1'b1;
      p_host_addr = base + AW'(i); p_host_wdata = v[i*W +: W];
      @(negedge clk);
    end
    p_host_en = 1'b0; p_host_we = 1'b0;
  endtask

  task automatic p_read(input logic [AW-1:0] base, output logic [191:0] v);
    for (int i = 0; i < N; i++) begin
      p_host_en = 1'b1; p_host_we = 1'b0; p_host_addr = base + AW'(i);
      @(negedge clk);
      v[i*W +: W] = p_host_rdata;
    end
    p_host_en = 1'b0;
  endtask

  task automatic b_write(input logic [AW-1:0] base, input logic [191:0] v);
    for (int i = 0; i < M; i++) begin
      b_host_en = 1'b1; b_host_we = 1'b1;
      b_host_addr = base + AW'(i); b_host_wdata = v[i*W +: W];
      @(negedge clk);
    end
    b_host_en = 1'b0; b_host_we = 1'b0;
  endtask

  task automatic b_read(input logic [AW-1:0] base, output logic [191:0] v);
    for (int i = 0; i < M; i++) begin
      b_host_en = 1'b1; b_host_we = 1'b0; b_host_addr = base + AW'(i);
      @(negedge clk);
      v[i*W +: W] = b_host_rdata;
    end
    b_host_en = 1'b0;
  endtask

  task automatic run_p(input fop_e op, input logic [191:0] a, input logic [191:0] b,
                       output longint cycles);
    logic [191:0] got, exp;
    longint t0;
    p_write(A_AT, a);
    p_write(B_AT, b);
    p_op = op; p_a_base = A_AT; p_b_base = B_AT; p_c_base = C_AT; p_t_base = T_AT;
    p_start = 1'b1;
    @(negedge clk);
    t0 = cyc;
    p_start = 1'b0;
    do @(negedge clk); while (!p_done);
    cycles = cyc - t0;
    @(negedge clk);
    p_read(C_AT, got);
    exp = ref_fp(op, a, b);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FP %s mismatch a=%h b=%h got=%h exp=%h", op.name(), a, b, got, exp);
    end
  endtask

  task automatic run_b(input fop_e op, input logic [191:0] a, input logic [191:0] b,
                       output longint cycles);
    logic [191:0] got, exp;
    longint t0;
    b_write(A_AT, a);
    b_write(B_AT, b);
    b_op = op; b_a_base = A_AT; b_b_base = B_AT; b_c_base = C_AT; b_t_base = T_AT;
    b_start = 1'b1;
    @(negedge clk);
    t0 = cyc;
    b_start = 1'b0;
    do @(negedge clk); while (!b_done);
    cycles = cyc - t0;
    @(negedge clk);
    b_read(C_AT, got);
    exp = ref_f2m(op, a, b);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("F2M %s mismatch a=%h b=%h got=%h exp=%h", op.name(), a, b, got, exp);
    end
  endtask

  function automatic logic [191:0] rnd192();
    logic [191:0] v;
    for (int i = 0; i < 6; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [191:0] rnd_p();
    logic [191:0] v;
    do v = rnd192(); while (v >= P192);
    return v;
  endfunction

  function automatic logic [191:0] rnd_b();
    logic [191:0] v = rnd192();
    v[191] = 1'b0;
    return v;
  endfunction

  // expected cycle counts of the binary-field operations, from the first cycle after the
  // start pulse to the done pulse: 3 cycles per word for an addition; 3 per word product,
  // 1 per column write, 3 to fetch the top words and 3 per result word for a
  // multiplication; 4 per diagonal product plus the same reduction for a squaring
  localparam longint B_ADD_CYC = 3 * M;
  localparam longint B_MUL_CYC = 3 * M * M + (2 * M - 1) + 1 + 3 + 3 * M;
  localparam longint B_SQR_CYC = 4 * M + 3 + 3 * M;
  // multiplication part of a prime-field product (without reduction and correction)
  localparam longint P_MUL_MIN = 3 * N * N + 2 * N + 112;

  initial begin
    logic [191:0] a, b;
    longint c;
    longint cmax_add = 0, cmax_mul = 0, cmax_sqr = 0;
    longint cb_add = 0, cb_mul = 0, cb_sqr = 0;
    fop_e ops[4] = '{FOP_ADD, FOP_SUB, FOP_MUL, FOP_SQR};
    p_start = 0; b_start = 0; p_host_en = 0; b_host_en = 0; p_host_we = 0; b_host_we = 0;
    p_op = FOP_ADD; b_op = FOP_ADD;
    p_a_base = '0; p_b_base = '0; p_c_base = '0; p_t_base = '0; p_host_addr = '0;
    b_a_base = '0; b_b_base = '0; b_c_base = '0; b_t_base = '0; b_host_addr = '0;
    p_host_wdata = '0; b_host_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- prime field: edge cases
    run_p(FOP_ADD, P192 - 1, 192'd1, c);                 // c == p, no carry
    run_p(FOP_ADD, P192 - 1, P192 - 1, c);               // carry out
    run_p(FOP_ADD, P192 - 1, 192'd5, c);                 // above p, no carry
    run_p(FOP_SUB, 192'd3, 192'd5, c);                   // borrow
    run_p(FOP_SUB, P192 - 1, P192 - 1, c);               // zero
    run_p(FOP_MUL, P192 - 1, P192 - 1, c);
    run_p(FOP_MUL, 192'h0, P192 - 1, c);
    run_p(FOP_SQR, P192 - 1, 192'd0, c);
    // sum word after reduction lands in [p, 2^192): a*1 with a >= p-... uses a = p-1 times 1
    run_p(FOP_MUL, {128'h0, 64'h1} << 128, {128'h0, 64'h1} << 64, c); // 2^192 -> 2^64+1
    run_p(FOP_MUL, P192 - 1, 192'd1, c);
    run_p(FOP_MUL, {64'hFFFFFFFF_FFFFFFFF, 64'hFFFFFFFF_FFFFFFFF, 64'h0}, 192'd1 << 64, c);
    // ---- prime field: random
    for (int r = 0; r < NRAND; r++) begin
      foreach (ops[o]) begin
        a = rnd_p(); b = rnd_p();
        run_p(ops[o], a, b, c);
        if (ops[o] == FOP_ADD && c > cmax_add) cmax_add = c;
        if (ops[o] == FOP_MUL && c > cmax_mul) cmax_mul = c;
        if (ops[o] == FOP_SQR && c > cmax_sqr) cmax_sqr = c;
        if (ops[o] == FOP_MUL) begin
          checks++;
          if (c < P_MUL_MIN) begin
            failures++;
            $display("FP MUL too fast: %0d cycles", c);
          end
        end
      end
    end

    // ---- binary field: edge cases
    run_b(FOP_MUL, {1'b0, {191{1'b1}}}, {1'b0, {191{1'b1}}}, c);
    run_b(FOP_SQR, {1'b0, {191{1'b1}}}, 192'd0, c);
    run_b(FOP_MUL, 192'd1 << 190, 192'd1 << 190, c);
    run_b(FOP_ADD, {1'b0, {191{1'b1}}}, 192'd1, c);
    // ---- binary field: random
    for (int r = 0; r < NRAND; r++) begin
      foreach (ops[o]) begin
        a = rnd_b(); b = rnd_b();
        run_b(ops[o], a, b, c);
        checks++;
        unique case (ops[o])
          FOP_ADD, FOP_SUB: if (c != B_ADD_CYC) begin
            failures++; $display("F2M ADD cycles %0d != %0d", c, B_ADD_CYC);
          end
          FOP_MUL: begin
            n_b_mul++;
            if (c != B_MUL_CYC) begin
              failures++; $display("F2M MUL cycles %0d != %0d", c, B_MUL_CYC);
            end
          end
          default: begin
            n_b_sqr++;
            if (c != B_SQR_CYC) begin
              failures++; $display("F2M SQR cycles %0d != %0d", c, B_SQR_CYC);
            end
          end
        endcase
        cb_add = (ops[o] == FOP_ADD) ? c : cb_add;
        cb_mul = (ops[o] == FOP_MUL) ? c : cb_mul;
        cb_sqr = (ops[o] == FOP_SQR) ? c : cb_sqr;
      end
    end

    $display("cycles  F_p: add<=%0d mul<=%0d sqr<=%0d   F_2^m: add=%0d mul=%0d sqr=%0d",
             cmax_add, cmax_mul, cmax_sqr, cb_add, cb_mul, cb_sqr);
    $display("events: add_carry=%0d add_cmp_sub=%0d sub_borrow=%0d fold=%0d mul_final_sub=%0d b_gfold=%0d b_mul=%0d b_sqr=%0d",
             n_add_carry, n_cmp_sub, n_sub_borrow, n_fold, n_mul_fix, n_b_gfold, n_b_mul, n_b_sqr);
    checks++; if (n_add_carry == 0) begin failures++; $display("no add with carry"); end
    checks++; if (n_cmp_sub == 0)   begin failures++; $display("no add >= p"); end
    checks++; if (n_sub_borrow == 0) begin failures++; $display("no sub borrow"); end
    checks++; if (n_fold == 0)      begin failures++; $display("no fold"); end
    checks++; if (n_mul_fix == 0)   begin failures++; $display("no final sub after mul"); end
    checks++; if (n_b_gfold == 0)   begin failures++; $display("no second binary fold"); end
    checks++; if (n_b_mul == 0 || n_b_sqr == 0) begin failures++; $display("no binary mul/sqr"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
