// tb_task_dispatcher: self-checking test of the task dispatcher. With random
// queue state and availability it checks, in every cycle, that a task is
// popped exactly when the queue is not empty and some kernel is free (same
// cycle, no waiting), that issue is one-hot and names a free kernel, and that
// the head is handed over. With all kernels free it checks the round-robin
// order: N consecutive issues reach N different kernels.
module tb_task_dispatcher;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic queue_empty, queue_pop;
  logic [31:0] queue_head, issue_task;
  logic [N-1:0] avail, issue;
  int checks = 0, failures = 0;

  task_dispatcher #(.N(N), .WIDTH(32)) dut (.*);

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
    queue_empty = 1; queue_head = 0; avail = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      queue_empty = ($urandom_range(3) == 0);
      queue_head  = $urandom;
      avail       = N'($urandom);
      #1;
      check(queue_pop == (!queue_empty && avail != 0), "pop when task and free kernel");
      check($onehot0(issue) && ((issue & ~avail) == 0), "issue one-hot to free kernel");
      check((issue != 0) == queue_pop, "issue with pop");
      if (queue_pop) check(issue_task == queue_head, "task handed over");
      @(negedge clk);
    end
    // round robin with all kernels free
    begin
      logic [N-1:0] seen;
      seen = '0;
      queue_empty = 0; avail = '1;
      for (int i = 0; i < N; i++) begin
        #1;
        seen |= issue;
        @(negedge clk);
      end
      check(seen == '1, "round robin covers all kernels");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
