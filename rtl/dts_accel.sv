// dts_accel: an accelerator for graph methods built on dynamic task
// scheduling. A producer pushes tasks (here: subject vertices of a graph
// pattern search) into the Task Queue of the dynamic task scheduler; the Task
// Dispatcher starts each task on any kernel the Status Register shows as free,
// as soon as one is free, so long and short tasks overlap instead of a group
// of kernels waiting for its slowest member. NUM_KERNELS kernels share
// NUM_BANKS memory banks through the memory interface controller (MIC), which
// also provides the atomic fetch-and-add the kernels use to merge results.
// The termination logic counts spawned and completed tasks and raises done
// when they are equal and the queue is empty.
//
// Ports: task_valid/task_ready/task_data (tasks in), done, cfg (query set-up
// shared by all kernels), a host memory port (MIC requester number
// NUM_KERNELS, same handshake as a kernel's: one request outstanding, one
// response a cycle after the grant) for loading the graph and reading the
// result, and status outputs for observation: bank_busy (banks accessed this
// cycle), kernel_busy, kernel_avail (the status register), queue_full and the
// two termination counters. Reset is synchronous, active low.
//
// The block structure and its wiring follow the architecture: T=4 kernels and
// CH=4 memory channels are its main configuration. Queue depth, bank size,
// the host port and the kernel's computation are this design's choices.
module dts_accel
  import dts_pkg::*;
#(
  parameter int unsigned NUM_KERNELS = 4,
  parameter int unsigned NUM_BANKS   = 4,
  parameter int unsigned QUEUE_DEPTH = 16,
  parameter int unsigned BANK_WORDS  = 16384
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   task_valid,
  output logic                   task_ready,
  input  task_t                  task_data,
  output logic                   done,
  input  query_cfg_t             cfg,
  input  logic                   host_req_valid,
  output logic                   host_req_ready,
  input  mem_req_t               host_req,
  output logic                   host_rsp_valid,
  output word_t                  host_rsp_data,
  output logic [NUM_BANKS-1:0]   bank_busy,
  output logic [NUM_KERNELS-1:0] kernel_busy,
  output logic [NUM_KERNELS-1:0] kernel_avail,
  output logic                   queue_full,
  output logic [31:0]            tasks_spawned,
  output logic [31:0]            tasks_completed
);
  localparam int unsigned NP  = NUM_KERNELS + 1;
  localparam int unsigned LAW = $clog2(BANK_WORDS);

  logic [NUM_KERNELS-1:0] kstart, kdone;
  task_t                  ktask;
  logic                   queue_empty, task_push;

  dynamic_task_scheduler #(.N(NUM_KERNELS), .DEPTH(QUEUE_DEPTH)) u_sched (
    .clk(clk), .rst_n(rst_n),
    .task_valid(task_valid), .task_ready(task_ready), .task_data(task_data),
    .kernel_start(kstart), .kernel_task(ktask), .kernel_ready(kdone),
    .queue_empty(queue_empty), .queue_full(queue_full), .task_push(task_push),
    .avail(kernel_avail)
  );

  termination_logic #(.N(NUM_KERNELS), .W(32)) u_term (
    .clk(clk), .rst_n(rst_n), .task_push(task_push), .kernel_done(kdone),
    .queue_empty(queue_empty), .done(done), .spawned(tasks_spawned),
    .completed(tasks_completed)
  );

  // MIC requesters: kernels 0..NUM_KERNELS-1, host last
  logic     [NP-1:0] mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t          mreq     [NP];
  word_t             mrsp_data[NP];

  for (genvar k = 0; k < NUM_KERNELS; k++) begin : g_kernel
    query_kernel u_kernel (
      .clk(clk), .rst_n(rst_n),
      .start(kstart[k]), .task_in(ktask), .done(kdone[k]), .busy(kernel_busy[k]),
      .cfg(cfg),
      .mreq_valid(mreq_valid[k]), .mreq_ready(mreq_ready[k]), .mreq(mreq[k]),
      .mrsp_valid(mrsp_valid[k]), .mrsp_data(mrsp_data[k])
    );
  end

  assign mreq_valid[NUM_KERNELS] = host_req_valid;
  assign mreq[NUM_KERNELS]       = host_req;
  assign host_req_ready          = mreq_ready[NUM_KERNELS];
  assign host_rsp_valid          = mrsp_valid[NUM_KERNELS];
  assign host_rsp_data           = mrsp_data[NUM_KERNELS];

  logic [NUM_BANKS-1:0] bank_en, bank_we;
  logic [LAW-1:0]       bank_addr  [NUM_BANKS];
  word_t                bank_wdata [NUM_BANKS];
  word_t                bank_rdata [NUM_BANKS];

  mic #(.NUM_PORTS(NP), .NUM_BANKS(NUM_BANKS), .BANK_WORDS(BANK_WORDS)) u_mic (
    .clk(clk), .rst_n(rst_n),
    .req_valid(mreq_valid), .req_ready(mreq_ready), .req(mreq),
    .rsp_valid(mrsp_valid), .rsp_data(mrsp_data),
    .bank_en(bank_en), .bank_we(bank_we), .bank_addr(bank_addr),
    .bank_wdata(bank_wdata), .bank_rdata(bank_rdata)
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    memory_bank #(.WORDS(BANK_WORDS), .W(32)) u_bank (
      .clk(clk), .en(bank_en[b]), .we(bank_we[b]), .addr(bank_addr[b]),
      .wdata(bank_wdata[b]), .rdata(bank_rdata[b])
    );
  end

  assign bank_busy = bank_en;
endmodule
