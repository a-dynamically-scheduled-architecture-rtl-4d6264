// tb_complete_counter: self-checking test of the complete counter: random
// completion vectors, including several kernels finishing in one cycle, with
// the count compared with a reference sum after every edge.
module tb_complete_counter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] done_vec;
  logic [31:0] count, model;
  int checks = 0, failures = 0, multi = 0;

  complete_counter #(.N(N), .W(32)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    done_vec = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; model = 0;
    @(negedge clk);
    check(count == 0, "reset");
    for (int i = 0; i < 1000; i++) begin
      done_vec = N'($urandom);
      if ($countones(done_vec) > 1) multi++;
      @(posedge clk);
      for (int k = 0; k < N; k++) model += 32'(done_vec[k]);
      @(negedge clk);
      check(count == model, "count");
    end
    check(multi > 0, "simultaneous completions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
