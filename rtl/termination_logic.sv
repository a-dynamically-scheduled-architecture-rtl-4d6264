// termination_logic: Spawn Counter, Complete Counter and Termination Checker
// wired together. task_push (a task accepted by the Task Queue this cycle)
// feeds the spawn counter, the kernels' completion pulses feed the complete
// counter, and the checker compares both counts and looks at queue_empty to
// drive done. The counts are also brought out. done rises as soon as the
// counter has caught up (one edge after the last completion pulse).
module termination_logic #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         task_push,
  input  logic [N-1:0] kernel_done,
  input  logic         queue_empty,
  output logic         done,
  output logic [W-1:0] spawned,
  output logic [W-1:0] completed
);
  spawn_counter #(.W(W)) u_spawn (
    .clk(clk), .rst_n(rst_n), .inc(task_push), .count(spawned)
  );

  complete_counter #(.N(N), .W(W)) u_complete (
    .clk(clk), .rst_n(rst_n), .done_vec(kernel_done), .count(completed)
  );

  termination_checker #(.W(W)) u_check (
    .spawned(spawned), .completed(completed),
    .queue_empty(queue_empty), .done(done)
  );
endmodule
