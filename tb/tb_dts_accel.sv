// tb_dts_accel: end-to-end test of the accelerator at its default parameters
// (4 kernels, 4 memory banks). It generates a graph with strongly unbalanced
// out-degrees (most vertices have a few edges, some have hundreds, like the
// outer-loop iterations of graph queries whose run times differ by orders of
// magnitude), loads it through the host port, pushes one task per vertex,
// waits for done and reads back the result word, which must equal the number
// of edges matching the pattern counted here. It also checks that done stays
// low until all tasks are finished, that the termination counters agree, and
// that the run is faster than one kernel running all tasks in sequence.
//
// Mechanisms that must each happen at least once (counted, and a failure if
// never seen): queue back-pressure, tasks waiting for a free kernel, a task
// launched while another kernel is still busy, several banks serving in one
// cycle, a requester waiting for its bank, and an atomic fetch-and-add. It
// prints a histogram of the number of memory banks busy per cycle.
module tb_dts_accel;
  import dts_pkg::*;
  localparam int NK = 4, NB = 4;
  localparam int V = 160;
  localparam int ROWPTR = 0, EDGES = 1024, RESULT = 60000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic task_valid, task_ready, done, host_req_valid, host_req_ready, host_rsp_valid, queue_full;
  task_t task_data;
  query_cfg_t cfg;
  mem_req_t host_req;
  word_t host_rsp_data;
  logic [NB-1:0] bank_busy;
  logic [NK-1:0] kernel_busy, kernel_avail;
  logic [31:0] tasks_spawned, tasks_completed;
  int checks = 0, failures = 0;

  dts_accel dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host(mem_req_t r, output word_t data);
    host_req = r; host_req_valid = 1'b1;
    #2;
    while (!host_req_ready) begin @(negedge clk); #2; end
    @(negedge clk);
    host_req_valid = 1'b0;
    #1;
    check(host_rsp_valid, "host response one cycle after grant");
    data = host_rsp_data;
  endtask

  // mechanism counters
  int backpressure = 0, wait_kernel = 0, launch_beside_busy = 0;
  int multi_bank = 0, bank_wait = 0, fadd = 0, early_done = 0;
  int hist [NB+1];
  bit running = 0;
  always @(posedge clk) if (rst_n && running) begin
    if (task_valid && !task_ready) backpressure++;
    if (!dut.queue_empty && kernel_avail == 0) wait_kernel++;
    if (dut.kstart != 0 && (kernel_busy & ~dut.kstart) != 0) launch_beside_busy++;
    if ($countones(bank_busy) > 1) multi_bank++;
    if ((dut.mreq_valid & ~dut.mreq_ready) != 0) bank_wait++;
    if (dut.u_mic.rmw != 0) fadd++;
    hist[$countones(bank_busy)]++;
  end

  int deg [V], nmatch [V];

  initial begin
    word_t d;
    int e, expected, pushed, cycles, tl;
    longint serial;
    for (int i = 0; i <= NB; i++) hist[i] = 0;
    task_valid = 0; task_data = 0; host_req_valid = 0; host_req = '0;
    cfg = '{rowptr_base: ROWPTR, edge_base: EDGES, pat_pred: 8'h03, pat_obj: 24'h00BEEF, result_addr: RESULT};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(done, "done with no tasks");
    // graph: CSR, unbalanced degrees
    e = 0; expected = 0; serial = 0;
    for (int v = 0; v < V; v++) begin
      deg[v] = ($urandom_range(15) == 0) ? $urandom_range(150, 400) : $urandom_range(0, 8);
      nmatch[v] = 0;
      host('{op: MEM_WRITE, addr: addr_t'(ROWPTR + v), wdata: word_t'(e)}, d);
      for (int j = 0; j < deg[v]; j++) begin
        logic [7:0] p;
        logic [23:0] o;
        p = ($urandom_range(2) == 0) ? 8'h03 : 8'($urandom_range(4, 20));
        o = ($urandom_range(1) == 0) ? 24'h00BEEF : 24'($urandom_range(1000));
        if (p == 8'h03 && o == 24'h00BEEF) nmatch[v]++;
        host('{op: MEM_WRITE, addr: addr_t'(EDGES + e), wdata: make_edge(p, o)}, d);
        e++;
      end
      expected += nmatch[v];
      tl = 2 * (2 + deg[v] + (nmatch[v] > 0 ? 1 : 0)) + 2;
      serial += longint'(tl);
    end
    host('{op: MEM_WRITE, addr: addr_t'(ROWPTR + V), wdata: word_t'(e)}, d);
    host('{op: MEM_WRITE, addr: addr_t'(RESULT), wdata: '0}, d);
    check(EDGES + e < RESULT, "graph fits below the result word");
    // run: push every vertex, bursts and gaps
    running = 1;
    pushed = 0; cycles = 0;
    while (pushed < V) begin
      task_valid = ($urandom_range(3) != 0);
      task_data  = task_t'(pushed);
      #2;
      if (task_valid && task_ready) pushed++;
      @(negedge clk);
      cycles++;
      if (pushed < V && done) early_done++;
    end
    task_valid = 0;
    #1;
    while (!done) begin
      if (kernel_busy != 0 || !dut.queue_empty) check(!done, "no done while work remains");
      @(negedge clk); #1;
      cycles++;
    end
    running = 0;
    check(kernel_busy == 0 && dut.queue_empty, "done only when all work finished");
    check(tasks_spawned == V && tasks_completed == V, "termination counters");
    host('{op: MEM_READ, addr: addr_t'(RESULT), wdata: '0}, d);
    check(d == word_t'(expected), "result equals matching edge count");
    $display("edges=%0d matches=%0d result=%0d cycles=%0d serial_estimate=%0d speedup=%0.2f",
             e, expected, d, cycles, serial, real'(serial) / real'(cycles));
    check(cycles * 2 < serial, "faster than one kernel running the tasks in sequence");
    $display("backpressure=%0d wait_kernel=%0d launch_beside_busy=%0d multi_bank=%0d bank_wait=%0d fadd=%0d",
             backpressure, wait_kernel, launch_beside_busy, multi_bank, bank_wait, fadd);
    for (int i = 0; i <= NB; i++) $display("banks busy %0d: %0d cycles", i, hist[i]);
    check(backpressure > 0, "queue back-pressure happened");
    check(wait_kernel > 0, "tasks waited for a free kernel");
    check(launch_beside_busy > 0, "task launched while another kernel busy");
    check(multi_bank > 0, "several banks busy in one cycle");
    check(bank_wait > 0, "bank conflict");
    check(fadd > 0, "atomic fetch-and-add");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
