// tb_f2m_engine: runs the F_2^191 field unit against a memory model kept in this testbench
// (128 words, one cycle read latency). Operands are placed in memory directly, an operation
// is started, and after done the 12 result words are compared with a polynomial reference
// reduced bit by bit modulo z^191 + z^9 + 1. The operations have fixed schedules, so the
// cycle count from start to done is checked exactly: 3M for an addition, 3M^2 + 2M + 3 + 3M
// for a multiplication and 4M + 3 + 3M for a squaring (M = 12 words).
module tb_f2m_engine;
  import ecc_pkg::*;
  localparam int AW = 7;
  localparam logic [AW-1:0] A_AT = 7'd5, B_AT = 7'd20, C_AT = 7'd40, T_AT = 7'd70;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, mem_en, mem_we;
  fop_e op;
  logic [AW-1:0] a_base, b_base, c_base, t_base, mem_addr;
  logic [W-1:0] mem_wdata, mem_rdata;
  logic [W-1:0] mem [128];

  f2m_engine #(.AW(AW)) dut (.*);

  always_ff @(posedge clk) begin
    if (mem_en) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      else mem_rdata <= mem[mem_addr];
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [191:0] ref_b(input fop_e o, input logic [191:0] a,
                                         input logic [191:0] b);
    logic [383:0] x = '0;
    if (o == FOP_ADD || o == FOP_SUB) return a ^ b;
    if (o == FOP_SQR) b = a;
    for (int i = 0; i < 191; i++) if (b[i]) x ^= 384'(a) << i;
    for (int i = 380; i >= 191; i--)
      if (x[i]) begin x[i] = 0; x[i-191] = ~x[i-191]; x[i-182] = ~x[i-182]; end
    return x[191:0];
  endfunction

  task automatic run(input fop_e o, input logic [191:0] a, input logic [191:0] b);
    logic [191:0] got, exp;
    int cyc, ecyc;
    for (int i = 0; i < M; i++) begin
      mem[A_AT + AW'(i)] = a[i*W +: W];
      mem[B_AT + AW'(i)] = b[i*W +: W];
    end
    op = o; a_base = A_AT; b_base = B_AT; c_base = C_AT; t_base = T_AT;
    start = 1; @(negedge clk); start = 0;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!done);
    @(negedge clk);
    for (int i = 0; i < M; i++) got[i*W +: W] = mem[C_AT + AW'(i)];
    exp = ref_b(o, a, b);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s a=%h b=%h got=%h exp=%h", o.name(), a, b, got, exp);
    end
    unique case (o)
      FOP_MUL: ecyc = 3 * M * M + 2 * M + 3 + 3 * M;
      FOP_SQR: ecyc = 4 * M + 3 + 3 * M;
      default: ecyc = 3 * M;
    endcase
    checks++;
    if (cyc != ecyc) begin
      failures++; $display("%s took %0d cycles, expected %0d", o.name(), cyc, ecyc);
    end
  endtask

  function automatic logic [191:0] rnd_b();
    logic [191:0] v;
    for (int i = 0; i < 6; i++) v[i*32 +: 32] = $urandom;
    v[191] = 1'b0;
    return v;
  endfunction

  initial begin
    start = 0; op = FOP_ADD; a_base = 0; b_base = 0; c_base = 0; t_base = 0;
    @(negedge clk); rst_n = 1; @(negedge clk);
    run(FOP_MUL, {1'b0, {191{1'b1}}}, {1'b0, {191{1'b1}}});
    run(FOP_SQR, {1'b0, {191{1'b1}}}, 192'd0);
    run(FOP_MUL, 192'd1 << 190, 192'd1 << 190);
    run(FOP_MUL, 192'd1, 192'd1 << 190);
    for (int n = 0; n < 10; n++) begin
      run(FOP_ADD, rnd_b(), rnd_b());
      run(FOP_SUB, rnd_b(), rnd_b());
      run(FOP_MUL, rnd_b(), rnd_b());
      run(FOP_SQR, rnd_b(), 192'd0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
