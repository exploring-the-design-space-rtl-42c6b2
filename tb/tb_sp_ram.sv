// tb_sp_ram: fills the 100-word data memory with random words, reads every word back and
// checks the one-cycle read latency, that read data hold while the memory is not read, and
// that a write does not disturb the read register.
module tb_sp_ram;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we;
  logic [6:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [100];

  sp_ram #(.DEPTH(100), .DW(16)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] held;
    en = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 100; i++) begin
      shadow[i] = 16'($urandom);
      en = 1; we = 1; addr = 7'(i); wdata = shadow[i];
      @(negedge clk);
    end
    for (int n = 0; n < 400; n++) begin
      int i = $urandom_range(0, 99);
      en = 1; we = 0; addr = 7'(i);
      @(negedge clk);
      checks++;
      if (rdata !== shadow[i]) begin
        failures++; $display("read %0d = %h exp %h", i, rdata, shadow[i]);
      end
      held = rdata;
      // idle cycle, then a write: the read register must keep its value
      en = 0; @(negedge clk);
      i = $urandom_range(0, 99);
      shadow[i] = 16'($urandom);
      en = 1; we = 1; addr = 7'(i); wdata = shadow[i];
      @(negedge clk);
      checks++;
      if (rdata !== held) begin
        failures++; $display("read data changed without a read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
