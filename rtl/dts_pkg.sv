// dts_pkg: types and constants shared by the dynamically scheduled task
// architecture: task and data widths, the memory request format used between
// the kernels (and the host) and the memory interface controller, and the
// query configuration every kernel of the pool receives.
//
// Memory operations are word-addressed. A request carries an operation, a
// word address and write data. MEM_FADD is the atomic fetch-and-add: the
// controller returns the old word and stores old + wdata without letting any
// other requester reach that bank in between. The operation set and all
// widths are this design's own choices.
package dts_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned TASK_W = 32;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [TASK_W-1:0] task_t;

  typedef enum logic [1:0] {
    MEM_READ  = 2'd0,
    MEM_WRITE = 2'd1,
    MEM_FADD  = 2'd2
  } mem_op_e;

  typedef struct packed {
    mem_op_e op;
    addr_t   addr;
    word_t   wdata;
  } mem_req_t;

  // Graph layout in shared memory (compressed sparse rows) and the triple
  // pattern (?x <pred> <obj>) a kernel matches against the out-edges of the
  // subject vertex it is given. Edge word: [31:24] predicate, [23:0] object.
  typedef struct packed {
    addr_t       rowptr_base;  // rowptr[v] .. rowptr[v+1]-1 index the edges of v
    addr_t       edge_base;    // edge word e is at edge_base + e
    logic [7:0]  pat_pred;
    logic [23:0] pat_obj;
    addr_t       result_addr;  // match count is added here atomically
  } query_cfg_t;

  function automatic word_t make_edge(logic [7:0] pred, logic [23:0] obj);
    return {pred, obj};
  endfunction

endpackage
