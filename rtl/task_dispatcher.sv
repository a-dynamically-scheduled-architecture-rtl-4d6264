// task_dispatcher: the Task Dispatcher of the dynamic task scheduler. In any
// cycle where the Task Queue is not empty and the Status Register shows at
// least one free kernel, it pops the head task and starts it on one free
// kernel, in the same cycle (a task is launched as soon as a kernel is free,
// without waiting for the other kernels, unlike fork-join group scheduling).
//
// Interface: issue is one-hot (or zero) and goes both to the kernels (start)
// and to the Status Register (clear availability); issue_task carries the task
// to the started kernel; queue_pop pops the queue. At most one task is issued
// per cycle, and free kernels are chosen round-robin: both are this design's
// choices.
module task_dispatcher #(
  parameter int unsigned N     = 4,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             queue_empty,
  input  logic [WIDTH-1:0] queue_head,
  output logic             queue_pop,
  input  logic [N-1:0]     avail,
  output logic [N-1:0]     issue,
  output logic [WIDTH-1:0] issue_task
);
  logic [N-1:0] grant;

  rr_arbiter #(.N(N)) u_arb (
    .clk(clk), .rst_n(rst_n), .req(avail), .advance(queue_pop), .grant(grant)
  );

  assign queue_pop  = !queue_empty && (avail != '0);
  assign issue      = queue_pop ? grant : '0;
  assign issue_task = queue_head;

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(issue));
endmodule
