// ecc_top: the two multi-precision field processors compared by the design study, side by
// side. The prime-field side computes in F_p for NIST P-192 with an integer
// multiply-accumulate unit; the binary-field side computes in F_2^191 (c2tnb191v1) with a
// carry-less multiply-accumulate unit and the hardcoded reduction logic. Both use 16-bit
// words, a 16-bit ALU and a single-port data memory of their own (100 and 90 words, the
// entries the two point-multiplication processors need).
// Each side has a host port to its data memory and an operation port. The host port
// (p_/b_ host_en, host_we, host_addr, host_wdata, host_rdata with one cycle read latency)
// reaches the memory only while that side's engine is idle; host accesses while busy are
// ignored. An operation starts with a one-cycle start pulse carrying op and the word
// addresses of operand a, operand b, result c and a 24-word scratch area t; busy stays high
// until the one-cycle done pulse. The instruction fetch, program memory and register file
// of the original processors' CPU are not part of this design: the host (or a CPU added
// around it) plays their part by issuing field operations.
module ecc_top
  import ecc_pkg::*;
#(
  parameter int unsigned P_RAM_DEPTH = 100,
  parameter int unsigned B_RAM_DEPTH = 90,
  parameter int unsigned AW          = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  // prime-field processor
  input  logic          p_start,
  input  fop_e          p_op,
  input  logic [AW-1:0] p_a_base,
  input  logic [AW-1:0] p_b_base,
  input  logic [AW-1:0] p_c_base,
  input  logic [AW-1:0] p_t_base,
  output logic          p_busy,
  output logic          p_done,
  input  logic          p_host_en,
  input  logic          p_host_we,
  input  logic [AW-1:0] p_host_addr,
  input  logic [W-1:0]  p_host_wdata,
  output logic [W-1:0]  p_host_rdata,
  // binary-field processor
  input  logic          b_start,
  input  fop_e          b_op,
  input  logic [AW-1:0] b_a_base,
  input  logic [AW-1:0] b_b_base,
  input  logic [AW-1:0] b_c_base,
  input  logic [AW-1:0] b_t_base,
  output logic          b_busy,
  output logic          b_done,
  input  logic          b_host_en,
  input  logic          b_host_we,
  input  logic [AW-1:0] b_host_addr,
  input  logic [W-1:0]  b_host_wdata,
  output logic [W-1:0]  b_host_rdata
);

  // ---------------- prime field
  logic          pe_en, pe_we;
  logic [AW-1:0] pe_addr;
  logic [W-1:0]  pe_wdata, p_rdata;
  logic          pm_en, pm_we;
  logic [AW-1:0] pm_addr;
  logic [W-1:0]  pm_wdata;

  fp_engine #(.AW(AW)) u_fp (
    .clk, .rst_n,
    .start(p_start), .op(p_op),
    .a_base(p_a_base), .b_base(p_b_base), .c_base(p_c_base), .t_base(p_t_base),
    .busy(p_busy), .done(p_done),
    .mem_en(pe_en), .mem_we(pe_we), .mem_addr(pe_addr), .mem_wdata(pe_wdata),
    .mem_rdata(p_rdata)
  );

  always_comb begin
    if (p_busy) begin
      pm_en = pe_en;  pm_we = pe_we;  pm_addr = pe_addr;  pm_wdata = pe_wdata;
    end else begin
      pm_en = p_host_en;  pm_we = p_host_we;  pm_addr = p_host_addr;  pm_wdata = p_host_wdata;
    end
  end

  sp_ram #(.DEPTH(P_RAM_DEPTH), .DW(W), .AW(AW)) u_p_ram (
    .clk, .en(pm_en), .we(pm_we), .addr(pm_addr), .wdata(pm_wdata), .rdata(p_rdata)
  );
  assign p_host_rdata = p_rdata;

  // ---------------- binary field
  logic          be_en, be_we;
  logic [AW-1:0] be_addr;
  logic [W-1:0]  be_wdata, b_rdata;
  logic          bm_en, bm_we;
  logic [AW-1:0] bm_addr;
  logic [W-1:0]  bm_wdata;

  f2m_engine #(.AW(AW)) u_f2m (
    .clk, .rst_n,
    .start(b_start), .op(b_op),
    .a_base(b_a_base), .b_base(b_b_base), .c_base(b_c_base), .t_base(b_t_base),
    .busy(b_busy), .done(b_done),
    .mem_en(be_en), .mem_we(be_we), .mem_addr(be_addr), .mem_wdata(be_wdata),
    .mem_rdata(b_rdata)
  );

  always_comb begin
    if (b_busy) begin
      bm_en = be_en;  bm_we = be_we;  bm_addr = be_addr;  bm_wdata = be_wdata;
    end else begin
      bm_en = b_host_en;  bm_we = b_host_we;  bm_addr = b_host_addr;  bm_wdata = b_host_wdata;
    end
  end

  sp_ram #(.DEPTH(B_RAM_DEPTH), .DW(W), .AW(AW)) u_b_ram (
    .clk, .en(bm_en), .we(bm_we), .addr(bm_addr), .wdata(bm_wdata), .rdata(b_rdata)
  );
  assign b_host_rdata = b_rdata;

endmodule
