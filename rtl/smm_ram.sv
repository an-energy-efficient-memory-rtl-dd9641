// smm_ram: one software-managed memory (SMM), the private scratchpad of a
// single VLIW lane.
//
// A plain single-ported word array: no tag array and no comparators, because
// software decides what lives in it. Each cycle it performs at most one access.
// A write (en=1, we=1) stores wdata at addr. A read (en=1, we=0) returns the
// word on rdata one clock later, and rdata keeps that value until the next read,
// so a stalled pipeline still sees its load result. The 2 KB default size is
// the size used per lane in the evaluated 8-issue processor; the word width and
// the one-cycle synchronous read are this design's choices.
module smm_ram #(
  parameter int unsigned BYTES  = 2048,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned WORDS = BYTES * 8 / DATA_W,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
