// tb_status_register: self-checking test of the status register. Kernels'
// ready notifications and dispatcher issues (only to available kernels, as the
// dispatcher guarantees) are driven at random, including both for one kernel
// in the same cycle, and the availability vector is compared after each edge
// with a model: set by ready, cleared by issue, issue winning, all set after
// reset.
module tb_status_register;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] kernel_ready, issue, avail, model;
  int checks = 0, failures = 0;

  status_register #(.N(N)) dut (.*);

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
    int both;
    both = 0;
    kernel_ready = 0; issue = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    model = '1;
    check(avail == '1, "all available after reset");
    for (int i = 0; i < 1000; i++) begin
      kernel_ready = N'($urandom);
      issue        = N'($urandom) & avail;
      if ((kernel_ready & issue) != 0) both++;
      @(posedge clk);
      model = (model | kernel_ready) & ~issue;
      @(negedge clk);
      check(avail == model, "avail");
    end
    check(both > 0, "ready and issue together exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
