// tb_dynamic_task_scheduler: self-checking test of the scheduler (queue,
// dispatcher and status register together). Kernels are modelled in the
// testbench with random task lengths, a few of them very long, as the load
// imbalance of graph queries produces. A model of the queue and of kernel
// availability checks in every cycle that a task starts exactly when a task is
// waiting and a kernel is free, only on a free kernel, in arrival order, and
// that every task is started exactly once. It counts the cycles where a task
// starts while another kernel is still busy with an older, longer task (the
// point of dynamic scheduling) and where tasks wait because all kernels are
// busy, and requires both to happen.
module tb_dynamic_task_scheduler;
  import dts_pkg::*;
  localparam int N = 4;
  localparam int NTASK = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic task_valid, task_ready, queue_empty, queue_full, task_push;
  task_t task_data, kernel_task;
  logic [N-1:0] kernel_start, kernel_ready, avail;
  int checks = 0, failures = 0;

  dynamic_task_scheduler #(.N(N), .DEPTH(8)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task_t qmodel[$];
  logic [N-1:0] free_model;
  int remaining[N];
  int started = 0, pushed = 0, overlap = 0, all_busy_wait = 0, full_seen = 0;

  initial begin
    task_valid = 0; task_data = 0; kernel_ready = 0;
    for (int k = 0; k < N; k++) remaining[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    free_model = '1;
    @(negedge clk);
    while (started < NTASK) begin
      task_valid = (pushed < NTASK) && ($urandom_range(99) < 60);
      task_data  = 32'(pushed) ^ 32'hA5000000;
      kernel_ready = '0;
      for (int k = 0; k < N; k++) if (remaining[k] == 1) kernel_ready[k] = 1'b1;
      #1;
      check((kernel_start != 0) == (qmodel.size() > 0 && free_model != 0), "start as soon as possible");
      check((kernel_start & ~free_model) == 0 && $onehot0(kernel_start), "start on a free kernel");
      if (kernel_start != 0) check(kernel_task == qmodel[0], "task order");
      check(queue_empty == (qmodel.size() == 0), "queue_empty");
      check(task_push == (task_valid && task_ready), "task_push");
      if (queue_full) full_seen++;
      if (qmodel.size() > 0 && free_model == 0) all_busy_wait++;
      if (kernel_start != 0) begin
        int longest;
        longest = 0;
        for (int k = 0; k < N; k++) if (remaining[k] > longest) longest = remaining[k];
        if (longest > 30) overlap++;
      end
      @(posedge clk);
      // model update at the edge
      for (int k = 0; k < N; k++) begin
        if (kernel_ready[k]) free_model[k] = 1'b1;
        if (remaining[k] > 0) remaining[k]--;
      end
      for (int k = 0; k < N; k++) if (kernel_start[k]) begin
        free_model[k] = 1'b0;
        remaining[k]  = ($urandom_range(9) == 0) ? $urandom_range(60, 120) : $urandom_range(2, 12);
        void'(qmodel.pop_front());
        started++;
      end
      if (task_valid && task_ready) begin qmodel.push_back(task_data); pushed++; end
      @(negedge clk);
    end
    check(pushed == NTASK && started == NTASK, "every task started once");
    check(overlap > 0, "short task started beside a long one");
    check(all_busy_wait > 0, "tasks waited for a free kernel");
    check(full_seen > 0, "queue back-pressure");
    $display("overlap=%0d all_busy_wait=%0d full=%0d", overlap, all_busy_wait, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
