// sp_ram: single-port data memory of a field processor, DEPTH words of DW bits. One access
// per cycle: with en and we high the word at addr is written; with en high and we low it
// is read and appears on rdata after the clock edge (one cycle latency), where it stays
// until the next read. Written as an array so it maps onto a compiled single-port RAM
// macro; the default depth is the 100 entries the prime-field point-multiplication
// processor needs. Contents are not reset.
module sp_ram #(
  parameter int unsigned DEPTH = 100,
  parameter int unsigned DW    = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0]  wdata,
  output logic [DW-1:0]  rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        if (32'(addr) < DEPTH) mem[addr] <= wdata;
      end else begin
        rdata <= (32'(addr) < DEPTH) ? mem[addr] : '0;
      end
    end
  end

endmodule
