// tb_l1_dcache: self-checking test of the L1 data cache at its default 16 KB
// size, against a flat reference memory and an independent model of a
// direct-mapped, write-back, write-allocate cache with 32-byte lines.
//
// Random word loads and stores go to a 64 KB region (four addresses per cache
// set) with a bias towards a few hot lines. For every access the test predicts
// hit, clean miss or dirty miss and checks the returned data, the number of
// stall cycles (0 on a hit, 8 x (LAT+1) per line transfer otherwise) and the
// number of words written back. Each of the three cases must occur.
module tb_l1_dcache;
  import smma_pkg::*;
  localparam int unsigned LAT       = 2;
  localparam int unsigned MEM_WORDS = 16384;   // 64 KB
  localparam int unsigned LINES     = 512;

  logic        clk = 1'b0, rst_n;
  logic        req_valid, req_we, stall, rvalid;
  logic [31:0] req_addr, req_wdata, rdata;
  logic        mem_req, mem_we, mem_gnt;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;

  logic [31:0] ref_mem [MEM_WORDS];
  logic [17:0] m_tag   [LINES];
  logic        m_valid [LINES];
  logic        m_dirty [LINES];
  int checks = 0, failures = 0;
  int n_hit = 0, n_clean_miss = 0, n_dirty_miss = 0;

  l1_dcache dut (.clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_we(req_we),
                 .req_addr(req_addr), .req_wdata(req_wdata), .stall(stall), .rdata(rdata),
                 .rvalid(rvalid), .mem_req(mem_req), .mem_we(mem_we), .mem_addr(mem_addr),
                 .mem_wdata(mem_wdata), .mem_gnt(mem_gnt), .mem_rdata(mem_rdata));

  main_mem_model #(.WORDS(MEM_WORDS), .LAT(LAT)) u_mem (
    .clk(clk), .rst_n(rst_n), .mem_req(mem_req), .mem_we(mem_we), .mem_addr(mem_addr),
    .mem_wdata(mem_wdata), .mem_gnt(mem_gnt), .mem_rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // One access, issued at a negedge with stall low; returns at the negedge of
  // the cycle in which the result is due.
  task automatic access(input logic we, input logic [31:0] addr, input logic [31:0] data);
    logic [8:0]  idx;
    logic [17:0] tag;
    int          exp_stall, stall_cycles, wb0;
    logic [31:0] exp;
    idx = addr[13:5];
    tag = addr[31:14];
    wb0 = u_mem.writes;
    if (m_valid[idx] && m_tag[idx] == tag) begin
      exp_stall = 0; n_hit++;
    end else if (m_valid[idx] && m_dirty[idx]) begin
      exp_stall = 16 * (LAT + 1); n_dirty_miss++;
    end else begin
      exp_stall = 8 * (LAT + 1); n_clean_miss++;
    end
    if (!(m_valid[idx] && m_tag[idx] == tag)) begin
      m_valid[idx] = 1; m_tag[idx] = tag; m_dirty[idx] = 0;
    end
    if (we) begin
      m_dirty[idx] = 1;
      ref_mem[addr[15:2]] = data;
    end
    exp = ref_mem[addr[15:2]];
    req_valid = 1; req_we = we; req_addr = addr; req_wdata = data;
    @(negedge clk);
    req_valid = $urandom_range(0, 1);   // garbage while stalled must be ignored
    req_we = $urandom_range(0, 1); req_addr = $urandom; req_wdata = $urandom;
    stall_cycles = 0;
    while (stall) begin
      stall_cycles++;
      @(negedge clk);
    end
    req_valid = 0;
    #1;
    check(stall_cycles == exp_stall, $sformatf("stall cycles %0d expected %0d", stall_cycles, exp_stall));
    check(u_mem.writes - wb0 == (exp_stall == 16 * (LAT + 1) ? 8 : 0), "write-back word count");
    check(rvalid == !we, "rvalid");
    if (!we) check(rdata == exp, $sformatf("load %h: got %h expected %h", addr, rdata, exp));
  endtask

  initial begin
    logic [31:0] a;
    rst_n = 0; req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0;
    for (int i = 0; i < MEM_WORDS; i++) ref_mem[i] = u_mem.init_word(32'(i) << 2);
    for (int i = 0; i < LINES; i++) begin m_valid[i] = 0; m_dirty[i] = 0; m_tag[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 6000; n++) begin
      if ($urandom_range(0, 99) < 60)
        // hot set: 4 lines that alias in two sets, plus neighbours
        a = {16'b0, 2'($urandom_range(0, 3)), 4'($urandom_range(0, 1)), 5'($urandom_range(0, 7)) , 3'b0, 2'b0};
      else
        a = {16'b0, 14'($urandom_range(0, 16383)), 2'b0};
      access($urandom_range(0, 99) < 40, a, $urandom);
      if ($urandom_range(0, 9) == 0) @(negedge clk);
    end
    check(n_hit > 0 && n_clean_miss > 0 && n_dirty_miss > 0, "coverage");
    $display("hits %0d clean misses %0d dirty misses %0d", n_hit, n_clean_miss, n_dirty_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
