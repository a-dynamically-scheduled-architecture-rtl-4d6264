// mic: memory interface controller between NUM_PORTS requesters (the kernels
// of the pool, and in the top level also a host port) and NUM_BANKS banks of
// shared memory. It lets all requesters use the banks in parallel and resolves
// at run time which bank each request goes to.
//
// Address resolution: word-interleaved, bank = addr mod NUM_BANKS, word within
// the bank = addr / NUM_BANKS (NUM_BANKS must be a power of two). Each bank
// has its own round-robin arbiter over the requesters addressing it, so up to
// NUM_BANKS requests are served per cycle, one per bank.
//
// Handshake: a requester holds req_valid and req until req_ready (its grant);
// exactly one response (rsp_valid for one cycle, rsp_data) follows one cycle
// after the grant. Each requester must wait for the response before it issues
// its next request (checked by an assertion), so responses never collide.
// Reads return the word; writes return zero.
//
// Atomic fetch-and-add (MEM_FADD): granted like a read; in the next cycle the
// old word is returned to the requester and old + wdata is written back to the
// same bank, which grants nobody in that cycle. The read-modify-write is
// therefore atomic with respect to every other requester.
//
// The mapping, arbitration, operation set and latencies are this design's
// choices; the architecture specifies a multi-ported shared memory with
// dynamic address resolution and atomic operations.
module mic
  import dts_pkg::*;
#(
  parameter int unsigned NUM_PORTS  = 4,
  parameter int unsigned NUM_BANKS  = 4,
  parameter int unsigned BANK_WORDS = 16384
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // requester side (inputs-k / results-k)
  input  logic     [NUM_PORTS-1:0]      req_valid,
  output logic     [NUM_PORTS-1:0]      req_ready,
  input  mem_req_t                      req      [NUM_PORTS],
  output logic     [NUM_PORTS-1:0]      rsp_valid,
  output word_t                         rsp_data [NUM_PORTS],
  // bank side (inputs-m / results-m)
  output logic     [NUM_BANKS-1:0]      bank_en,
  output logic     [NUM_BANKS-1:0]      bank_we,
  output logic [$clog2(BANK_WORDS)-1:0] bank_addr  [NUM_BANKS],
  output word_t                         bank_wdata [NUM_BANKS],
  input  word_t                         bank_rdata [NUM_BANKS]
);
  localparam int unsigned BW  = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1;
  localparam int unsigned LAW = $clog2(BANK_WORDS);
  localparam int unsigned PW  = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1;

  typedef logic [LAW-1:0] laddr_t;

  function automatic logic [BW-1:0] bank_of(addr_t a);
    return (NUM_BANKS > 1) ? BW'(a % NUM_BANKS) : '0;
  endfunction

  function automatic laddr_t local_of(addr_t a);
    return LAW'(a / NUM_BANKS);
  endfunction

  // per-bank state of the response stage
  logic   [NUM_BANKS-1:0] pend;      // a granted request completes this cycle
  logic   [PW-1:0]        pend_port [NUM_BANKS];
  mem_op_e                pend_op   [NUM_BANKS];
  laddr_t                 pend_addr [NUM_BANKS];
  word_t                  pend_opnd [NUM_BANKS];

  logic [NUM_PORTS-1:0] hit   [NUM_BANKS];
  logic [NUM_PORTS-1:0] grant [NUM_BANKS];
  logic [NUM_BANKS-1:0] rmw;    // bank busy with the write half of a FADD
  logic [NUM_BANKS-1:0] accept; // bank takes a new request this cycle

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    always_comb begin
      for (int unsigned p = 0; p < NUM_PORTS; p++)
        hit[b][p] = req_valid[p] && (bank_of(req[p].addr) == BW'(b));
    end

    assign rmw[b]    = pend[b] && (pend_op[b] == MEM_FADD);
    assign accept[b] = !rmw[b] && (hit[b] != '0);

    logic [NUM_PORTS-1:0] arb_grant;
    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(hit[b]), .advance(accept[b]), .grant(arb_grant)
    );
    assign grant[b] = rmw[b] ? '0 : arb_grant;

    // the granted request, as seen by this bank
    logic [PW-1:0] gport;
    always_comb begin
      gport = '0;
      for (int unsigned p = 0; p < NUM_PORTS; p++)
        if (arb_grant[p]) gport = PW'(p);
    end

    always_comb begin
      bank_en[b]    = 1'b0;
      bank_we[b]    = 1'b0;
      bank_addr[b]  = local_of(req[gport].addr);
      bank_wdata[b] = req[gport].wdata;
      if (rmw[b]) begin
        bank_en[b]    = 1'b1;
        bank_we[b]    = 1'b1;
        bank_addr[b]  = pend_addr[b];
        bank_wdata[b] = bank_rdata[b] + pend_opnd[b];
      end else if (accept[b]) begin
        bank_en[b]    = 1'b1;
        bank_we[b]    = (req[gport].op == MEM_WRITE);
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        pend[b] <= 1'b0;
      end else begin
        pend[b] <= accept[b];
      end
      if (accept[b]) begin
        pend_port[b] <= gport;
        pend_op[b]   <= req[gport].op;
        pend_addr[b] <= local_of(req[gport].addr);
        pend_opnd[b] <= req[gport].wdata;
      end
    end
  end

  // requester side: ready = granted by the addressed bank; responses routed
  // back by the port number recorded with the request
  always_comb begin
    req_ready = '0;
    rsp_valid = '0;
    for (int unsigned p = 0; p < NUM_PORTS; p++) rsp_data[p] = '0;
    for (int unsigned b = 0; b < NUM_BANKS; b++) begin
      req_ready = req_ready | grant[b];
      if (pend[b]) begin
        rsp_valid[pend_port[b]] = 1'b1;
        rsp_data[pend_port[b]]  = (pend_op[b] == MEM_WRITE) ? '0 : bank_rdata[b];
      end
    end
  end

  // one outstanding request per requester: at most one response per port
  a_one_rsp: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(pend) == $countones(rsp_valid));
  a_pow2: assert property (@(posedge clk) (NUM_BANKS & (NUM_BANKS - 1)) == 0);
endmodule
