// termination_checker: the Termination Checker. It watches the Task Queue and
// the two counters and raises done when the termination condition holds: the
// number of tasks spawned equals the number completed and the queue is empty,
// so every task that entered the queue has been executed.
// done is combinational on registered inputs (the counters and the queue
// state), so it falls in the cycle right after a task is pushed and rises in
// the cycle right after the last completion is counted. It is only meaningful
// once the producer of tasks has stopped pushing: between two pushes of a
// slow producer the condition can hold. Making the check combinational is
// this design's choice.
module termination_checker #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] spawned,
  input  logic [W-1:0] completed,
  input  logic         queue_empty,
  output logic         done
);
  assign done = (spawned == completed) && queue_empty;
endmodule
