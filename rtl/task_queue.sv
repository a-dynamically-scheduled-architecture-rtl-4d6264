// task_queue: the Task Queue of the dynamic task scheduler. New tasks are
// pushed at its tail; the Task Dispatcher reads the head and pops it when it
// starts the task on a free kernel. It is a plain first-in first-out circular
// buffer of DEPTH entries.
//
// Interface: push_valid/push_ready/push_data is a valid/ready handshake (a task
// enters on a cycle where both are high; push_ready is low when full). head is
// valid whenever empty is low; pop removes it at the clock edge and is ignored
// when empty. Push and pop may happen in the same cycle, also when full.
// A pushed task is visible at head one cycle later. Reset empties the queue.
// The depth, the width and the handshake are this design's choices; the role
// of the queue (storing the tasks ready for execution) is the architecture's.
module task_queue #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_valid,
  output logic             push_ready,
  input  logic [WIDTH-1:0] push_data,
  input  logic             pop,
  output logic [WIDTH-1:0] head,
  output logic             empty,
  output logic             full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic [AW:0]      count;
  logic             do_push, do_pop;

  assign empty      = (count == 0);
  assign full       = (count == (AW+1)'(DEPTH));
  assign do_pop     = pop && !empty;
  assign push_ready = !full || do_pop;
  assign do_push    = push_valid && push_ready;
  assign head       = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
