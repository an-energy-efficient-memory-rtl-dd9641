// smma_pkg: types and constants shared by the software-managed-memory (SMM)
// data memory architecture.
//
// Every VLIW lane issues at most one memory operation per cycle. An operation
// is a load or a store with a base register value, an immediate offset that is
// added to it, and (for stores) the value to be written, just like a regular
// load/store. Only Lane 0 can choose between its own SMM and the L1 data
// cache; every other lane always addresses its own SMM. The 32-bit data and
// address width is this design's choice (a 32-bit VLIW is assumed).
package smma_pkg;

  localparam int unsigned XLEN = 32;

  typedef enum logic [1:0] {
    OP_NOP   = 2'd0,
    OP_LOAD  = 2'd1,
    OP_STORE = 2'd2
  } mem_op_e;

  // Which address space a Lane 0 operation goes to. Lanes 1..N-1 must use
  // TGT_SMM.
  typedef enum logic {
    TGT_SMM   = 1'b0,
    TGT_CACHE = 1'b1
  } mem_tgt_e;

  // One lane's memory operation for the current bundle.
  typedef struct packed {
    mem_op_e          op;
    mem_tgt_e         tgt;
    logic [XLEN-1:0]  base;   // base register value
    logic [XLEN-1:0]  imm;    // sign-extended immediate offset
    logic [XLEN-1:0]  wdata;  // store value
  } lane_req_t;

endpackage
