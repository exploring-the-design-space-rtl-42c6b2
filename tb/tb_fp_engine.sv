// tb_fp_engine: runs the P-192 field unit against a memory model kept in this testbench
// (128 words, one cycle read latency). Operands are placed in memory directly, an operation
// is started, and after done the 12 result words are compared with wide-integer reference
// arithmetic modulo p. Edge cases cover sums equal to and above p, carries out of the top
// word, borrows, and products whose reduction needs the fold and the final subtraction;
// random operands cover the rest. The multiplication must also take no fewer cycles than
// its product-scanning schedule (3 cycles per word product, one per column, plus the
// reduction sum), and no operation may take longer than its worst case (see CMAX). The
// shortest and longest counts seen are printed per operation.
module tb_fp_engine;
  import ecc_pkg::*;
  localparam int AW = 7;
  localparam logic [AW-1:0] A_AT = 7'd3, B_AT = 7'd20, C_AT = 7'd40, T_AT = 7'd60;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, mem_en, mem_we;
  fop_e op;
  logic [AW-1:0] a_base, b_base, c_base, t_base, mem_addr;
  logic [W-1:0] mem_wdata, mem_rdata;
  logic [W-1:0] mem [128];

  fp_engine #(.AW(AW)) dut (.*);

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

  function automatic logic [191:0] ref_fp(input fop_e o, input logic [191:0] a,
                                          input logic [191:0] b);
    logic [383:0] x;
    unique case (o)
      FOP_ADD: x = (384'(a) + 384'(b)) % 384'(P192);
      FOP_SUB: x = (384'(a) + 384'(P192) - 384'(b)) % 384'(P192);
      FOP_MUL: x = (384'(a) * 384'(b)) % 384'(P192);
      default: x = (384'(a) * 384'(a)) % 384'(P192);
    endcase
    return x[191:0];
  endfunction

  // shortest and longest cycle count seen per operation, in fop_e order
  int cmin[4] = '{default: 1000000};
  int cmax[4] = '{default: 0};
  // bounds: the pass itself, plus at most two fold passes (24 cycles each), a full compare
  // (24) and a subtraction of p (24)
  localparam int CMAX[4] = '{84, 60, 665, 467};

  task automatic run(input fop_e o, input logic [191:0] a, input logic [191:0] b);
    logic [191:0] got, exp;
    int cyc;
    for (int i = 0; i < N; i++) begin
      mem[A_AT + AW'(i)] = a[i*W +: W];
      mem[B_AT + AW'(i)] = b[i*W +: W];
    end
    op = o; a_base = A_AT; b_base = B_AT; c_base = C_AT; t_base = T_AT;
    start = 1; @(negedge clk); start = 0;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!done);
    checks++;
    if (!busy) begin failures++; $display("busy low during operation"); end
    if (cyc < cmin[int'(o)]) cmin[int'(o)] = cyc;
    if (cyc > cmax[int'(o)]) cmax[int'(o)] = cyc;
    checks++;
    if (cyc > CMAX[int'(o)]) begin
      failures++; $display("%s took %0d cycles, more than %0d", o.name(), cyc, CMAX[int'(o)]);
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) got[i*W +: W] = mem[C_AT + AW'(i)];
    exp = ref_fp(o, a, b);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s a=%h b=%h got=%h exp=%h", o.name(), a, b, got, exp);
    end
    if (o == FOP_MUL) begin
      checks++;
      if (cyc < 3 * N * N + 2 * N + 112) begin
        failures++; $display("MUL took only %0d cycles", cyc);
      end
    end
  endtask

  function automatic logic [191:0] rnd_p();
    logic [191:0] v;
    do for (int i = 0; i < 6; i++) v[i*32 +: 32] = $urandom; while (v >= P192);
    return v;
  endfunction

  initial begin
    start = 0; op = FOP_ADD; a_base = 0; b_base = 0; c_base = 0; t_base = 0;
    @(negedge clk); rst_n = 1; @(negedge clk);
    run(FOP_ADD, P192 - 1, 192'd1);
    run(FOP_ADD, P192 - 1, P192 - 1);
    run(FOP_ADD, P192 - 2, 192'd7);
    run(FOP_ADD, 192'd12345, 192'd1);
    run(FOP_SUB, 192'd1, 192'd2);
    run(FOP_SUB, 192'd2, 192'd1);
    run(FOP_MUL, P192 - 1, P192 - 1);
    run(FOP_MUL, P192 - 1, 192'd1);
    run(FOP_SQR, P192 - 1, 192'd0);
    run(FOP_MUL, 192'd0, P192 - 1);
    for (int n = 0; n < 10; n++) begin
      run(FOP_ADD, rnd_p(), rnd_p());
      run(FOP_SUB, rnd_p(), rnd_p());
      run(FOP_MUL, rnd_p(), rnd_p());
      run(FOP_SQR, rnd_p(), 192'd0);
    end
    for (int i = 0; i < 4; i++)
      $display("%s: %0d to %0d cycles", fop_e'(i), cmin[i], cmax[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
