// complete_counter: the Complete Counter of the termination logic. It counts
// the tasks the kernels of the pool have finished. Each kernel pulses its bit
// of done_vec for one cycle when it completes a task; since several kernels
// can finish in the same cycle, the counter adds the number of set bits at
// each clock edge. Reset clears it. Width W (wrapping) is this design's choice.
module complete_counter #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] done_vec,
  output logic [W-1:0] count
);
  logic [W-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < N; i++) ones = ones + W'(done_vec[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) count <= '0;
    else        count <= count + ones;
  end
endmodule
