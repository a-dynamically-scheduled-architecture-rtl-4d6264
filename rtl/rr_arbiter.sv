// rr_arbiter: round-robin one-hot arbiter. Among the set bits of req it grants
// the first one at or after the position following the last grant, so every
// requester is served within N grants. The choice is combinational; the
// pointer advances on the clock edge only when advance is high (the grant was
// actually used). Used by the task dispatcher to pick a free kernel and by the
// memory interface controller to pick a requester per bank.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;  // highest priority position

  always_comb begin
    grant = '0;
    for (int unsigned k = 0; k < N; k++) begin
      if (req[(int'(ptr) + k) % N] && grant == '0) grant[(int'(ptr) + k) % N] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (advance && grant != '0) begin
      for (int unsigned i = 0; i < N; i++)
        if (grant[i]) ptr <= IW'((i + 1) % N);
    end
  end
endmodule
