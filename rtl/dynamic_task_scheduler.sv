// dynamic_task_scheduler: the Task Queue, Task Dispatcher and Status Register
// of the architecture wired together. Tasks enter through a valid/ready port
// into the queue; the dispatcher reads the head and the availability vector
// from the status register and issues a task to one free kernel per cycle
// (kernel_start one-hot, kernel_task the argument); the issue vector also
// clears that kernel's availability bit. Kernels pulse kernel_ready when they
// finish, which makes them available again one cycle later.
// Timing: a task pushed at cycle t can start at cycle t+1 at the earliest.
// queue_full is brought out for observation.
// queue_empty and task_push (a task entered the queue this cycle) go to the
// termination logic.
module dynamic_task_scheduler
  import dts_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         task_valid,
  output logic         task_ready,
  input  task_t        task_data,
  output logic [N-1:0] kernel_start,
  output task_t        kernel_task,
  input  logic [N-1:0] kernel_ready,
  output logic         queue_empty,
  output logic         queue_full,
  output logic         task_push,
  output logic [N-1:0] avail
);
  logic  pop;
  task_t head;

  task_queue #(.DEPTH(DEPTH), .WIDTH(TASK_W)) u_queue (
    .clk(clk), .rst_n(rst_n),
    .push_valid(task_valid), .push_ready(task_ready), .push_data(task_data),
    .pop(pop), .head(head), .empty(queue_empty), .full(queue_full)
  );

  task_dispatcher #(.N(N), .WIDTH(TASK_W)) u_disp (
    .clk(clk), .rst_n(rst_n),
    .queue_empty(queue_empty), .queue_head(head), .queue_pop(pop),
    .avail(avail), .issue(kernel_start), .issue_task(kernel_task)
  );

  status_register #(.N(N)) u_status (
    .clk(clk), .rst_n(rst_n),
    .kernel_ready(kernel_ready), .issue(kernel_start), .avail(avail)
  );

  assign task_push = task_valid && task_ready;
endmodule
