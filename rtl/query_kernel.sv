// query_kernel: one kernel of the pool. It executes one task at a time: one
// iteration of the outer loop of a graph pattern search. The task is a subject
// vertex v. The graph sits in shared memory in compressed sparse row form
// (see dts_pkg::query_cfg_t). The kernel reads rowptr[v] and rowptr[v+1], reads
// each out-edge word of v and counts the edges whose predicate and object
// equal the configured triple pattern (?x <pred> <obj>), and, if it found any,
// adds the count to the result word with an atomic fetch-and-add, so kernels
// never lose each other's updates. A task takes 2 + degree(v) memory round
// trips, plus one when it matched, so task lengths vary with the data, as in the
// queries the architecture targets.
//
// Interface: start (one cycle, only while busy is low) hands over task_in.
// done pulses for one cycle when the task is finished; it notifies the status
// register (the kernel can take another task from the next cycle on) and the
// complete counter. Memory: one request at a time on the mreq valid/ready
// port, waiting for mrsp_valid before the next one.
//
// The architecture's kernels are generated from each query by high-level
// synthesis and are not specified; this single-pattern matcher is this design's
// own example of such a kernel, with the kernel-side interface the architecture
// describes (task start, completion notification, shared memory with atomics).
module query_kernel
  import dts_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  task_t      task_in,
  output logic       done,
  output logic       busy,
  input  query_cfg_t cfg,
  output logic       mreq_valid,
  input  logic       mreq_ready,
  output mem_req_t   mreq,
  input  logic       mrsp_valid,
  input  word_t      mrsp_data
);
  typedef enum logic [3:0] {
    S_IDLE, S_RP0, S_RP0_W, S_RP1, S_RP1_W, S_EDGE, S_EDGE_W, S_ADD, S_ADD_W, S_DONE
  } state_e;

  state_e state;
  task_t  v;
  word_t  cur, last, count;

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  always_comb begin
    mreq_valid = 1'b0;
    mreq       = '{op: MEM_READ, addr: '0, wdata: '0};
    unique case (state)
      S_RP0:  begin mreq_valid = 1'b1; mreq.addr = cfg.rowptr_base + v; end
      S_RP1:  begin mreq_valid = 1'b1; mreq.addr = cfg.rowptr_base + v + 1; end
      S_EDGE: begin mreq_valid = 1'b1; mreq.addr = cfg.edge_base + cur; end
      S_ADD:  begin
        mreq_valid = 1'b1;
        mreq.op    = MEM_FADD;
        mreq.addr  = cfg.result_addr;
        mreq.wdata = count;
      end
      default: ;
    endcase
  end

  logic match;
  assign match = (mrsp_data[31:24] == cfg.pat_pred) && (mrsp_data[23:0] == cfg.pat_obj);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      v     <= '0;
      cur   <= '0;
      last  <= '0;
      count <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          v     <= task_in;
          count <= '0;
          state <= S_RP0;
        end
        S_RP0:   if (mreq_ready) state <= S_RP0_W;
        S_RP0_W: if (mrsp_valid) begin cur <= mrsp_data; state <= S_RP1; end
        S_RP1:   if (mreq_ready) state <= S_RP1_W;
        S_RP1_W: if (mrsp_valid) begin
          last  <= mrsp_data;
          state <= (cur < mrsp_data) ? S_EDGE : S_DONE;
        end
        S_EDGE:   if (mreq_ready) state <= S_EDGE_W;
        S_EDGE_W: if (mrsp_valid) begin
          cur <= cur + 1;
          if (match) count <= count + 1;
          if (cur + 1 < last)          state <= S_EDGE;
          else if (match || count != 0) state <= S_ADD;
          else                          state <= S_DONE;
        end
        S_ADD:   if (mreq_ready) state <= S_ADD_W;
        S_ADD_W: if (mrsp_valid) state <= S_DONE;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
