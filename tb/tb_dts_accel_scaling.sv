// tb_dts_accel_scaling: runs one unbalanced graph workload on three copies of
// the accelerator with 4, 6 and 8 kernels, all with 4 memory banks, the three
// configurations the architecture was evaluated in. Each copy must return the
// matching-edge count computed here. For each it prints the run time, the
// speedup over one kernel running the tasks in sequence, and the share of run
// time during which 0..4 banks were busy (memory profile). As a reference it
// also estimates, from the tasks' uncontended lengths, the run time of
// fork-join group scheduling (groups of T tasks, each group waiting for its
// slowest task), which dynamic scheduling must beat. Checks: correct results,
// more kernels never slower, and dynamic scheduling faster than the fork-join
// estimate for every T.
module tb_dts_accel_scaling;
  import dts_pkg::*;
  localparam int NC = 3;
  localparam int NB = 4;
  localparam int TK [NC] = '{4, 6, 8};
  localparam int V = 300;
  localparam int ROWPTR = 0, EDGES = 1024, RESULT = 60000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  query_cfg_t cfg;
  logic     task_valid [NC], task_ready [NC], done [NC];
  task_t    task_data  [NC];
  logic     hv [NC], hr [NC], rv [NC];
  mem_req_t hq [NC];
  word_t    rd [NC];
  logic [NB-1:0] bank_busy [NC];
  bit       running [NC];
  int       hist [NC][NB+1];

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    logic [TK[c]-1:0] kbusy, kavail;
    logic qfull;
    logic [31:0] sp, cp;
    dts_accel #(.NUM_KERNELS(TK[c])) u_acc (
      .clk(clk), .rst_n(rst_n),
      .task_valid(task_valid[c]), .task_ready(task_ready[c]), .task_data(task_data[c]),
      .done(done[c]), .cfg(cfg),
      .host_req_valid(hv[c]), .host_req_ready(hr[c]), .host_req(hq[c]),
      .host_rsp_valid(rv[c]), .host_rsp_data(rd[c]),
      .bank_busy(bank_busy[c]), .kernel_busy(kbusy), .kernel_avail(kavail),
      .queue_full(qfull), .tasks_spawned(sp), .tasks_completed(cp)
    );
    always @(posedge clk) if (running[c]) hist[c][$countones(bank_busy[c])]++;
  end

  task automatic host(int c, mem_req_t r, output word_t data);
    hq[c] = r; hv[c] = 1'b1;
    #2;
    while (!hr[c]) begin @(negedge clk); #2; end
    @(negedge clk);
    hv[c] = 1'b0;
    #1;
    check(rv[c], "host response");
    data = rd[c];
  endtask

  word_t image_addr [$], image_data [$];
  int tlen [V];
  int cycles [NC];

  task automatic run(int c);
    int pushed, cyc;
    pushed = 0; cyc = 0;
    running[c] = 1;
    while (pushed < V || !done[c]) begin
      task_valid[c] = (pushed < V);
      task_data[c]  = task_t'(pushed);
      #2;
      if (task_valid[c] && task_ready[c]) pushed++;
      @(negedge clk);
      cyc++;
      #1;
    end
    task_valid[c] = 0;
    running[c] = 0;
    cycles[c] = cyc;
  endtask

  initial begin
    word_t d;
    int e, expected;
    longint serial;
    for (int c = 0; c < NC; c++) begin
      task_valid[c] = 0; task_data[c] = 0; hv[c] = 0; hq[c] = '0; running[c] = 0;
      for (int i = 0; i <= NB; i++) hist[c][i] = 0;
    end
    cfg = '{rowptr_base: ROWPTR, edge_base: EDGES, pat_pred: 8'h11, pat_obj: 24'h000042, result_addr: RESULT};
    // graph image, built once
    e = 0; expected = 0; serial = 0;
    for (int v = 0; v < V; v++) begin
      int dg, m;
      dg = ($urandom_range(19) == 0) ? $urandom_range(100, 300) : $urandom_range(0, 6);
      m = 0;
      image_addr.push_back(ROWPTR + v); image_data.push_back(e);
      for (int j = 0; j < dg; j++) begin
        logic [7:0] p;
        logic [23:0] o;
        p = ($urandom_range(2) == 0) ? 8'h11 : 8'($urandom_range(1, 16));
        o = ($urandom_range(1) == 0) ? 24'h000042 : 24'($urandom_range(1000));
        if (p == 8'h11 && o == 24'h000042) m++;
        image_addr.push_back(EDGES + e); image_data.push_back(make_edge(p, o));
        e++;
      end
      expected += m;
      tlen[v] = 2 * (2 + dg + (m > 0 ? 1 : 0)) + 2;
      serial += longint'(tlen[v]);
    end
    image_addr.push_back(ROWPTR + V); image_data.push_back(e);
    image_addr.push_back(RESULT);     image_data.push_back(0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < image_addr.size(); i++)
        host(c, '{op: MEM_WRITE, addr: image_addr[i], wdata: image_data[i]}, d);
    @(negedge clk);
    fork
      run(0);
      run(1);
      run(2);
    join
    for (int c = 0; c < NC; c++) begin
      longint fj;
      int total;
      host(c, '{op: MEM_READ, addr: addr_t'(RESULT), wdata: '0}, d);
      check(d == word_t'(expected), "result equals matching edge count");
      // fork-join estimate: groups of T consecutive tasks, each as long as its longest
      fj = 0;
      for (int g = 0; g < V; g += TK[c]) begin
        int mx;
        mx = 0;
        for (int k = g; k < g + TK[c] && k < V; k++) if (tlen[k] > mx) mx = tlen[k];
        fj += longint'(mx);
      end
      total = 0;
      for (int i = 0; i <= NB; i++) total += hist[c][i];
      $display("T=%0d CH=%0d: cycles=%0d speedup_over_serial=%0.2f fork_join_estimate=%0d result=%0d",
               TK[c], NB, cycles[c], real'(serial) / real'(cycles[c]), fj, d);
      for (int i = 0; i <= NB; i++)
        $display("  banks busy %0d: %0.1f%% of run time", i, 100.0 * real'(hist[c][i]) / real'(total));
      check(longint'(cycles[c]) < fj, "dynamic scheduling beats fork-join estimate");
    end
    check(cycles[1] <= cycles[0] && cycles[2] <= cycles[1], "more kernels never slower");
    $display("edges=%0d matches=%0d serial_estimate=%0d", e, expected, serial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
