// tb_termination_checker: self-checking test of the termination checker.
// Random counter values (often equal) and queue states; done must equal the
// condition "counts equal and queue empty" in the same cycle.
module tb_termination_checker;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] spawned, completed;
  logic queue_empty, done, expected;
  int checks = 0, failures = 0, hits = 0;

  termination_checker #(.W(32)) dut (.spawned, .completed, .queue_empty, .done);

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
    spawned = 0; completed = 0; queue_empty = 1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      spawned     = $urandom_range(20);
      completed   = ($urandom_range(1) == 1) ? spawned : $urandom_range(20);
      queue_empty = 1'($urandom_range(1));
      expected    = (spawned == completed) && queue_empty;
      if (expected) hits++;
      #1;
      check(done == expected, "done");
      @(negedge clk);
    end
    check(hits > 0, "condition reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
