// tb_mic: self-checking test of the memory interface controller with four
// requesters and four memory banks. Every requester runs its own random stream
// of reads and writes to a private address range that spreads over all banks,
// plus atomic fetch-and-adds of 1 to one shared counter word. Checks: every
// response arrives exactly one cycle after the grant, reads return the last
// value the requester wrote (reference copy in the testbench), the old values
// returned by the fetch-and-adds are all different and cover 0..total-1, and
// the counter ends at the total. It counts cycles with several banks serving
// requesters at once, cycles where a requester waits for its bank, and
// fetch-and-adds that hold their bank, and requires each to happen. During the
// write-back cycle of a fetch-and-add no requester may be granted that bank.
module tb_mic;
  import dts_pkg::*;
  localparam int NP = 4, NB = 4, BW = 256;
  localparam int OPS = 400;
  localparam int CNT_ADDR = 1001;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0] req_valid, req_ready, rsp_valid;
  mem_req_t req [NP];
  word_t rsp_data [NP];
  logic [NB-1:0] bank_en, bank_we;
  logic [7:0] bank_addr [NB];
  word_t bank_wdata [NB], bank_rdata [NB];
  int checks = 0, failures = 0;

  mic #(.NUM_PORTS(NP), .NUM_BANKS(NB), .BANK_WORDS(BW)) dut (.*);
  for (genvar b = 0; b < NB; b++) begin : g_b
    memory_bank #(.WORDS(BW), .W(32)) u_bank (
      .clk(clk), .en(bank_en[b]), .we(bank_we[b]), .addr(bank_addr[b]),
      .wdata(bank_wdata[b]), .rdata(bank_rdata[b]));
  end

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

  logic     v_a [NP];
  mem_req_t r_a [NP];
  for (genvar p = 0; p < NP; p++) begin : g_p
    assign req_valid[p] = v_a[p];
    assign req[p]       = r_a[p];
  end

  word_t shadow [NP][64];
  bit    fadd_seen [NP*OPS];
  int    fadd_total = 0, waits = 0, parallel = 0, rmw_cycles = 0;

  // one transaction: drive at the falling edge, wait for the grant, check the
  // response in the next cycle
  task automatic xact(int p, mem_req_t r, output word_t data);
    // other requesters drive at most 1 time unit after the falling edge:
    // sample the grant after that
    r_a[p] = r; v_a[p] = 1'b1;
    #2;
    while (!req_ready[p]) begin
      waits++;
      @(negedge clk); #2;
    end
    @(negedge clk);
    v_a[p] = 1'b0;
    #1;
    check(rsp_valid[p], "response one cycle after grant");
    data = rsp_data[p];
  endtask

  task automatic port_proc(int p);
    word_t d;
    // initialise the private range
    for (int i = 0; i < 64; i++) begin
      shadow[p][i] = $urandom;
      xact(p, '{op: MEM_WRITE, addr: addr_t'(p*64 + i), wdata: shadow[p][i]}, d);
    end
    for (int n = 0; n < OPS; n++) begin
      int kind = $urandom_range(9);
      int i = $urandom_range(63);
      if (kind < 4) begin
        xact(p, '{op: MEM_READ, addr: addr_t'(p*64 + i), wdata: '0}, d);
        check(d == shadow[p][i], "read returns written data");
      end else if (kind < 7) begin
        word_t w = $urandom;
        xact(p, '{op: MEM_WRITE, addr: addr_t'(p*64 + i), wdata: w}, d);
        shadow[p][i] = w;
      end else begin
        xact(p, '{op: MEM_FADD, addr: addr_t'(CNT_ADDR), wdata: 32'd1}, d);
        check(d < NP*OPS && !fadd_seen[d], "fetch-and-add old value unique");
        if (d < NP*OPS) fadd_seen[d] = 1'b1;
        fadd_total++;
      end
      if ($urandom_range(3) == 0) @(negedge clk);
    end
  endtask

  // A fetch-and-add granted on bank b must be followed, in the next cycle, by
  // its write-back on that bank, with no requester granted on it meanwhile.
  logic [NB-1:0] fadd_granted = '0;
  always @(posedge clk) if (rst_n) begin
    logic [NB-1:0] fg;
    if ($countones(req_valid & req_ready) > 1) parallel++;
    for (int b = 0; b < NB; b++) if (fadd_granted[b]) begin
      rmw_cycles++;
      check(bank_en[b] && bank_we[b], "fetch-and-add writes back");
      for (int p = 0; p < NP; p++)
        if (req_valid[p] && req_ready[p] && (req[p].addr % NB) == b)
          check(0, "no grant during fetch-and-add write-back");
    end
    fg = '0;
    for (int p = 0; p < NP; p++)
      if (req_valid[p] && req_ready[p] && req[p].op == MEM_FADD) fg[req[p].addr % NB] = 1'b1;
    fadd_granted <= fg;
  end

  initial begin
    word_t d;
    for (int p = 0; p < NP; p++) begin v_a[p] = 0; r_a[p] = '0; end
    for (int i = 0; i < NP*OPS; i++) fadd_seen[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    xact(0, '{op: MEM_WRITE, addr: addr_t'(CNT_ADDR), wdata: 32'd0}, d);
    @(negedge clk);
    fork
      port_proc(0);
      port_proc(1);
      port_proc(2);
      port_proc(3);
    join
    @(negedge clk);
    xact(1, '{op: MEM_READ, addr: addr_t'(CNT_ADDR), wdata: '0}, d);
    check(d == word_t'(fadd_total), "atomic counter total");
    for (int i = 0; i < fadd_total; i++) check(fadd_seen[i], "old values cover 0..total-1");
    check(parallel > 0, "several banks served at once");
    check(waits > 0, "bank conflict made a requester wait");
    check(rmw_cycles > 0, "fetch-and-add held its bank");
    $display("fadd=%0d parallel=%0d waits=%0d rmw=%0d", fadd_total, parallel, waits, rmw_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
