// tb_termination_logic: self-checking test of the termination logic as a
// whole. A task stream is pushed and completed by modelled kernels; done must
// stay low while any pushed task is queued or running, including the cycle
// right after a push, and rise one edge after the last completion. The counters are checked
// against the number of pushed and finished tasks.
module tb_termination_logic;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic task_push, queue_empty, done;
  logic [N-1:0] kernel_done;
  logic [31:0] spawned, completed;
  int checks = 0, failures = 0;

  termination_logic #(.N(N), .W(32)) dut (.*);

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

  int pushed = 0, finished = 0, queued = 0, running = 0;
  int done_rises = 0;
  initial begin
    task_push = 0; kernel_done = 0; queue_empty = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int round = 0; round < 5; round++) begin
      int n, p;
      n = $urandom_range(5, 40);
      p = 0;
      while (p < n || queued > 0 || running > 0) begin
        // inputs of this cycle
        task_push = (p < n) && ($urandom_range(1) == 1);
        kernel_done = '0;
        for (int k = 0; k < N; k++)
          if ($countones(kernel_done) < running && $urandom_range(3) == 0) kernel_done[k] = 1'b1;
        queue_empty = (queued == 0);
        @(posedge clk);
        if (task_push) begin p++; pushed++; queued++; end
        finished += $countones(kernel_done);
        running  -= $countones(kernel_done);
        // move queued tasks to kernels
        while (queued > 0 && running < N && $urandom_range(1) == 1) begin queued--; running++; end
        @(negedge clk);
        check(spawned == 32'(pushed) && completed == 32'(finished), "counters");
        if (queued > 0 || running > 0) check(!done, "no early done");
      end
      task_push = 0; kernel_done = 0; queue_empty = 1;
      #1;
      check(done, "done right after last completion");
      if (done) done_rises++;
    end
    check(done_rises == 5, "five terminations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
