// tb_query_kernel: self-checking test of one kernel against a memory model in
// the testbench (one request at a time, response one cycle after the grant,
// with random grant stalls in the second half). A random graph in compressed
// sparse row form is generated, one vertex with a high degree. Every vertex is
// run as a task; after each task the result word must hold the running number
// of edges matching the pattern, computed here from the generated graph.
// Without stalls each memory access takes 2 cycles, so done must come exactly
// 2*(2 + degree + (matched ? 1 : 0)) cycles after the cycle in which start is
// high.
module tb_query_kernel;
  import dts_pkg::*;
  localparam int V = 24;
  localparam int ROWPTR = 0, EDGES = 64, RESULT = 1000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done, busy, mreq_valid, mreq_ready, mrsp_valid;
  task_t task_in;
  query_cfg_t cfg;
  mem_req_t mreq;
  word_t mrsp_data;
  int checks = 0, failures = 0;

  query_kernel dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model
  word_t mem [1024];
  bit stall_on = 0;
  int fadds = 0;
  assign mreq_ready = !stall_on || ($urandom_range(2) != 0);
  always_ff @(posedge clk) begin
    mrsp_valid <= 1'b0;
    if (rst_n && mreq_valid && mreq_ready) begin
      mrsp_valid <= 1'b1;
      mrsp_data  <= (mreq.op == MEM_WRITE) ? '0 : mem[mreq.addr[9:0]];
      if (mreq.op == MEM_WRITE) mem[mreq.addr[9:0]] <= mreq.wdata;
      if (mreq.op == MEM_FADD) begin
        mem[mreq.addr[9:0]] <= mem[mreq.addr[9:0]] + mreq.wdata;
        fadds++;
      end
    end
  end

  int deg [V], nmatch [V];

  initial begin
    int e, expected;
    start = 0; task_in = 0; e = 0; expected = 0;
    cfg = '{rowptr_base: ROWPTR, edge_base: EDGES, pat_pred: 8'h07, pat_obj: 24'h000123, result_addr: RESULT};
    for (int v = 0; v < V; v++) begin
      deg[v] = (v == 5) ? 300 : $urandom_range(0, 12);
      nmatch[v] = 0;
      mem[ROWPTR + v] = e;
      for (int j = 0; j < deg[v]; j++) begin
        logic [7:0] p;
        logic [23:0] o;
        p = ($urandom_range(1) == 1) ? 8'h07 : 8'($urandom_range(1, 9));
        o = ($urandom_range(2) == 0) ? 24'h000123 : 24'($urandom_range(255));
        mem[EDGES + e] = make_edge(p, o);
        if (p == 8'h07 && o == 24'h000123) nmatch[v]++;
        e++;
      end
    end
    mem[ROWPTR + V] = e;
    mem[RESULT] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    for (int pass = 0; pass < 2; pass++) begin
      stall_on = (pass == 1);
      for (int v = 0; v < V; v++) begin
        int cycles;
        cycles = 0;
        start = 1; task_in = v;
        @(negedge clk);
        start = 0;
        check(busy, "busy after start");
        while (!done) begin @(negedge clk); cycles++; end
        expected += nmatch[v];
        if (!stall_on)
          check(cycles == 2 * (2 + deg[v] + (nmatch[v] > 0 ? 1 : 0)), "task cycle count");
        @(negedge clk);
        check(!busy && !done, "done is one pulse");
        check(mem[RESULT] == word_t'(expected), "result after task");
      end
    end
    check(fadds > 0, "fetch-and-add used");
    $display("nmatch=%0d fadds=%0d", expected, fadds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
