// spawn_counter: the Spawn Counter of the termination logic. It counts the
// tasks spawned, i.e. pushed into the Task Queue: inc is high for one cycle per
// accepted task and count increases at that clock edge. Reset clears it. The
// width W (32 bits, wrapping) is this design's choice; the termination check
// only compares it with the complete counter, so wrap-around is harmless as
// long as fewer than 2**W tasks are in flight.
module spawn_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  output logic [W-1:0] count
);
  always_ff @(posedge clk) begin
    if (!rst_n)   count <= '0;
    else if (inc) count <= count + 1'b1;
  end
endmodule
