// tb_spawn_counter: self-checking test of the spawn counter: random increment
// pulses, count compared with a reference after every edge, and reset.
module tb_spawn_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic inc;
  logic [31:0] count, model;
  int checks = 0, failures = 0;

  spawn_counter #(.W(32)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; model = 0;
    @(negedge clk);
    check(count == 0, "reset");
    for (int i = 0; i < 1000; i++) begin
      inc = 1'($urandom_range(1));
      @(posedge clk);
      model += 32'(inc);
      @(negedge clk);
      check(count == model, "count");
    end
    rst_n = 0; @(negedge clk); check(count == 0, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
