// smma_mem_arch: data memory architecture of an N-issue VLIW processor with one
// software-managed memory (SMM) per lane.
//
// Instead of giving the cache more ports, every lane gets a small single-ported
// SMM of its own. Each lane sees only its own SMM, and the SMM address spaces are
// independent of each other and of main memory, so the compiler can schedule one
// SMM access per lane per cycle without any port conflict. Lane 0 additionally
// owns the single port of the L1 data cache; an operation in Lane 0 selects
// either its SMM or the cache (tgt field). The defaults are the evaluated
// configuration: 8 lanes, 2 KB per SMM (16 KB in all) and a 16 KB L1 cache.
//
// Interface: req[l] is lane l's memory operation of the current bundle
// (OP_NOP for none). A bundle is accepted in a cycle with stall = 0. Loaded
// values appear on rdata[l] with rvalid[l] = 1 in the first cycle after
// acceptance with stall = 0: one cycle later for SMM accesses and cache hits,
// later on a cache miss, during which stall is high and the processor must
// hold its next bundle. The mem_* port goes to the next level of the regular
// memory hierarchy. The stall protocol and the port formats are this design's
// own choices.
module smma_mem_arch
  import smma_pkg::*;
#(
  parameter int unsigned LANES       = 8,
  parameter int unsigned SMM_BYTES   = 2048,
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned LINE_BYTES  = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  lane_req_t       req    [LANES],
  output logic [XLEN-1:0] rdata  [LANES],
  output logic            rvalid [LANES],
  output logic            stall,
  // next level of the regular memory hierarchy (behind the L1 cache)
  output logic            mem_req,
  output logic            mem_we,
  output logic [XLEN-1:0] mem_addr,
  output logic [XLEN-1:0] mem_wdata,
  input  logic            mem_gnt,
  input  logic [XLEN-1:0] mem_rdata
);

  logic [XLEN-1:0] smm_rdata  [LANES];
  logic            smm_rvalid [LANES];
  logic            c_valid, c_rvalid;
  logic [XLEN-1:0] c_rdata;
  logic            lane0_cache_q;   // Lane 0's last accepted op used the cache

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic smm_valid;
    if (l == 0) begin : g_l0
      assign smm_valid = (req[l].op != OP_NOP) && (req[l].tgt == TGT_SMM);
    end else begin : g_ln
      assign smm_valid = (req[l].op != OP_NOP);
    end

    smm_lane_unit #(.BYTES(SMM_BYTES)) u_smm (
      .clk       (clk),
      .rst_n     (rst_n),
      .stall     (stall),
      .req_valid (smm_valid),
      .req_we    (req[l].op == OP_STORE),
      .base      (req[l].base),
      .imm       (req[l].imm),
      .wdata     (req[l].wdata),
      .rdata     (smm_rdata[l]),
      .rvalid    (smm_rvalid[l])
    );

    if (l > 0) begin : g_out
      assign rdata[l]  = smm_rdata[l];
      assign rvalid[l] = smm_rvalid[l];
    end
  end

  assign c_valid = (req[0].op != OP_NOP) && (req[0].tgt == TGT_CACHE);

  l1_dcache #(.CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES)) u_l1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .req_valid (c_valid),
    .req_we    (req[0].op == OP_STORE),
    .req_addr  (req[0].base + req[0].imm),
    .req_wdata (req[0].wdata),
    .stall     (stall),
    .rdata     (c_rdata),
    .rvalid    (c_rvalid),
    .mem_req   (mem_req),
    .mem_we    (mem_we),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata),
    .mem_gnt   (mem_gnt),
    .mem_rdata (mem_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      lane0_cache_q <= 1'b0;
    else if (!stall) lane0_cache_q <= c_valid;
  end

  assign rdata[0]  = lane0_cache_q ? c_rdata  : smm_rdata[0];
  assign rvalid[0] = lane0_cache_q ? c_rvalid : smm_rvalid[0];

  // Only Lane 0 can reach the data cache.
  for (genvar l = 1; l < LANES; l++) begin : g_chk
    a_no_cache : assert property (@(posedge clk) disable iff (!rst_n)
      req[l].op != OP_NOP |-> req[l].tgt == TGT_SMM)
      else $error("lane %0d addressed the data cache", l);
  end

endmodule
