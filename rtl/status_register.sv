// status_register: the Status Register of the dynamic task scheduler. It holds
// one availability bit per kernel of the pool. A kernel sets its bit by
// pulsing kernel_ready when it has finished a task and can accept another; the
// Task Dispatcher clears the bit by pulsing issue when it starts a task on
// that kernel. Both take effect at the next clock edge; if both arrive for the
// same kernel in one cycle, issue wins (the new task is running). After reset
// every kernel is available. avail is the registered vector read by the
// dispatcher. The reset value and the update timing are this design's choices.
module status_register #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] kernel_ready,
  input  logic [N-1:0] issue,
  output logic [N-1:0] avail
);
  always_ff @(posedge clk) begin
    if (!rst_n) avail <= '1;
    else        avail <= (avail | kernel_ready) & ~issue;
  end

  // The dispatcher may only start a task on a kernel that is available.
  a_issue_avail: assert property (@(posedge clk) disable iff (!rst_n) (issue & ~avail) == '0);
endmodule
