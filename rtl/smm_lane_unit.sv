// smm_lane_unit: the SMM load/store unit of one VLIW lane, together with the
// lane's private SMM.
//
// An SMM instruction works like an ordinary load or store: the effective byte
// address is base + imm, and the addressed word of this lane's own SMM is read
// or written. Every lane has its own, independent address space starting at 0,
// so no lane or memory number is encoded anywhere. Address bits above the SMM
// size are ignored (the space wraps) and the two low bits are ignored (word
// accesses only); both are this design's choices.
//
// Timing: an operation is accepted in a cycle where op != OP_NOP and
// stall = 0. A load's value appears on rdata with rvalid = 1 in the first
// cycle after acceptance in which stall is low; while the shared pipeline stall
// is high (another lane's cache miss), nothing is accepted and the result is
// held, so that all lanes of a bundle deliver their results together.
module smm_lane_unit
  import smma_pkg::*;
#(
  parameter int unsigned BYTES = 2048
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            stall,     // pipeline held: ignore req, hold result
  input  logic            req_valid, // the lane's op targets this SMM
  input  logic            req_we,    // 1 = store, 0 = load
  input  logic [XLEN-1:0] base,
  input  logic [XLEN-1:0] imm,
  input  logic [XLEN-1:0] wdata,
  output logic [XLEN-1:0] rdata,
  output logic            rvalid
);

  localparam int unsigned WORDS = BYTES * 8 / XLEN;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [XLEN-1:0] ea;
  logic            acc;
  logic            load_q;

  assign ea  = base + imm;
  assign acc = req_valid && !stall;

  smm_ram #(.BYTES(BYTES), .DATA_W(XLEN)) u_ram (
    .clk   (clk),
    .en    (acc),
    .we    (req_we),
    .addr  (ea[AW+1:2]),
    .wdata (wdata),
    .rdata (rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      load_q <= 1'b0;
    else if (!stall) load_q <= req_valid && !req_we;
  end

  assign rvalid = load_q && !stall;

endmodule
