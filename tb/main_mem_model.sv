// main_mem_model: behavioural model of the next memory level behind the L1
// data cache (testbench only, not synthesizable logic of the design).
//
// One word per transfer. A request held for LAT cycles is granted (mem_gnt=1)
// in its LAT+1-th cycle; a write is stored at that clock edge and a read returns
// its word on mem_rdata in the granting cycle. Every word starts out as
// init_word(byte address), so a testbench can predict untouched contents.
module main_mem_model #(
  parameter int unsigned WORDS = 65536,
  parameter int unsigned LAT   = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mem_req,
  input  logic        mem_we,
  input  logic [31:0] mem_addr,
  input  logic [31:0] mem_wdata,
  output logic        mem_gnt,
  output logic [31:0] mem_rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  int unsigned wait_q;
  int unsigned reads, writes;

  function automatic logic [31:0] init_word(logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h5a3c_96e1;
  endfunction

  initial begin
    for (int unsigned i = 0; i < WORDS; i++) mem[i] = init_word(i << 2);
  end

  assign mem_gnt   = mem_req && (wait_q == LAT);
  assign mem_rdata = mem[mem_addr[AW+1:2]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_q <= 0;
      reads  <= 0;
      writes <= 0;
    end else if (mem_req) begin
      if (mem_gnt) begin
        wait_q <= 0;
        if (mem_we) begin
          mem[mem_addr[AW+1:2]] <= mem_wdata;
          writes <= writes + 1;
        end else begin
          reads <= reads + 1;
        end
      end else begin
        wait_q <= wait_q + 1;
      end
    end
  end
endmodule
