// tb_memory_bank: self-checking test of a memory bank: random writes and reads
// against a reference array, read data checked one cycle after the read, and
// rdata holding while the bank is idle.
module tb_memory_bank;
  localparam int WORDS = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we;
  logic [7:0] addr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  memory_bank #(.WORDS(WORDS), .W(32)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < WORDS; a++) begin
      en = 1; we = 1; addr = 8'(a); wdata = $urandom; ref_mem[a] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 2000; i++) begin
      en = 1; we = 1'($urandom_range(1)); addr = 8'($urandom); wdata = $urandom;
      @(negedge clk);
      if (we) ref_mem[addr] = wdata;
      else begin
        logic [31:0] held;
        check(rdata == ref_mem[addr], "read after one cycle");
        held = rdata;
        en = 0;
        @(negedge clk);
        check(rdata == held, "rdata holds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
