// tb_task_queue: self-checking test of the task queue. Random pushes and pops
// (including pushes while full and pops while empty) are compared, cycle by
// cycle, with a queue model kept in the testbench: order of tasks, head,
// empty, full and push_ready. It also checks that a pushed task appears at the
// head one cycle later.
module tb_task_queue;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push_valid, push_ready, pop, empty, full;
  logic [31:0] push_data, head;
  int checks = 0, failures = 0;

  task_queue #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  logic [31:0] model[$];

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
    int full_seen;
    full_seen = 0;
    push_valid = 0; pop = 0; push_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && push_ready, "reset empty");
    // single push: visible one cycle later
    push_valid = 1; push_data = 32'hABCD0001;
    @(negedge clk);
    push_valid = 0; model.push_back(32'hABCD0001);
    check(!empty && head == 32'hABCD0001, "push latency 1");
    for (int cyc = 0; cyc < 2000; cyc++) begin
      // phases: fill-heavy then drain-heavy
      int pp;
      pp = ((cyc / 200) % 2 == 0) ? 80 : 25;
      push_valid = ($urandom_range(99) < pp);
      push_data  = $urandom;
      pop        = ($urandom_range(99) < 100 - pp);
      #1;
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(push_ready == (model.size() < DEPTH || (pop && model.size() > 0)), "push_ready");
      if (model.size() > 0) check(head == model[0], "head order");
      if (full) full_seen++;
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push_valid && push_ready) model.push_back(push_data);
      @(negedge clk);
    end
    check(full_seen > 0, "queue reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
