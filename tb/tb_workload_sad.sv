// tb_workload_sad: sum-of-absolute-differences benchmark (block matching) on
// the SMM design (defaults: 8 x 2 KB SMM, 16 KB L1) and on a cache-only
// baseline with a 32 KB L1. The testbench acts as an 8-issue core whose
// arithmetic fits in free issue slots, so only memory bundles are timed.
//
// Sizes are this test's choice: a 16x16 current block (one pixel per 32-bit
// word) is matched against CAND candidate blocks of a 48x48 reference window.
// SMM design: a preamble copies the reused current block into the SMMs of
// lanes 1..7 (1-consecutive: pixel p in lane 1 + p % 7, word p / 7); then every
// bundle pairs one reference pixel from the cache (Lane 0) with the matching
// current pixel from an SMM. Baseline: both pixels come through the one cache
// port. Checked: every operand, every SAD, the kernel bundle counts, and that
// the SMM design is faster and uses less data-memory energy (per-access
// energies as in tb_workload_matmul).
module tb_workload_sad;
  import smma_pkg::*;
  localparam int unsigned L         = 8;
  localparam int unsigned MEM_WORDS = 16384;
  localparam int unsigned BS        = 16;     // block size
  localparam int unsigned WS        = 48;     // reference window size
  localparam int unsigned CAND      = 6;      // candidate positions
  localparam logic [31:0] CUR_BASE = 32'h0000, REF_BASE = 32'h1000;

  logic        clk = 1'b0, rst_n;
  lane_req_t   req_s [L], req_b [L], breq [L];
  logic [31:0] rdata_s [L], rdata_b [L], res [L];
  logic        rvalid_s [L], rvalid_b [L];
  logic        stall_s, stall_b;
  logic        mreq_s, mwe_s, mgnt_s, mreq_b, mwe_b, mgnt_b;
  logic [31:0] maddr_s, mwdata_s, mrdata_s, maddr_b, mwdata_b, mrdata_b;

  int checks = 0, failures = 0;
  longint cyc, bundles, c_rd, c_wr, s_rd, s_wr;
  logic [31:0] cur [BS*BS];
  logic [31:0] win [WS*WS];
  int          cdx [CAND], cdy [CAND];

  smma_mem_arch dut (
    .clk(clk), .rst_n(rst_n), .req(req_s), .rdata(rdata_s), .rvalid(rvalid_s), .stall(stall_s),
    .mem_req(mreq_s), .mem_we(mwe_s), .mem_addr(maddr_s), .mem_wdata(mwdata_s),
    .mem_gnt(mgnt_s), .mem_rdata(mrdata_s));
  main_mem_model #(.WORDS(MEM_WORDS), .LAT(2)) u_mem_s (
    .clk(clk), .rst_n(rst_n), .mem_req(mreq_s), .mem_we(mwe_s), .mem_addr(maddr_s),
    .mem_wdata(mwdata_s), .mem_gnt(mgnt_s), .mem_rdata(mrdata_s));

  smma_mem_arch #(.CACHE_BYTES(32768)) base_dut (
    .clk(clk), .rst_n(rst_n), .req(req_b), .rdata(rdata_b), .rvalid(rvalid_b), .stall(stall_b),
    .mem_req(mreq_b), .mem_we(mwe_b), .mem_addr(maddr_b), .mem_wdata(mwdata_b),
    .mem_gnt(mgnt_b), .mem_rdata(mrdata_b));
  main_mem_model #(.WORDS(MEM_WORDS), .LAT(2)) u_mem_b (
    .clk(clk), .rst_n(rst_n), .mem_req(mreq_b), .mem_we(mwe_b), .mem_addr(maddr_b),
    .mem_wdata(mwdata_b), .mem_gnt(mgnt_b), .mem_rdata(mrdata_b));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic lane_req_t mk(input mem_op_e op, input mem_tgt_e tgt,
                                   input logic [31:0] addr, input logic [31:0] wdata);
    lane_req_t r;
    r.op = op; r.tgt = tgt; r.base = addr; r.imm = 0; r.wdata = wdata;
    return r;
  endfunction

  task automatic clear();
    for (int l = 0; l < L; l++) breq[l] = mk(OP_NOP, TGT_SMM, 0, 0);
  endtask

  task automatic issue(input bit on_base);
    for (int l = 0; l < L; l++)
      if (breq[l].op != OP_NOP) begin
        if (breq[l].tgt == TGT_CACHE) begin
          if (breq[l].op == OP_LOAD) c_rd++; else c_wr++;
        end else begin
          if (breq[l].op == OP_LOAD) s_rd++; else s_wr++;
        end
      end
    if (on_base) req_b = breq; else req_s = breq;
    bundles++;
    cyc++;
    @(negedge clk);
    for (int l = 0; l < L; l++) begin
      req_b[l] = mk(OP_NOP, TGT_SMM, 0, 0);
      req_s[l] = mk(OP_NOP, TGT_SMM, 0, 0);
    end
    while (on_base ? stall_b : stall_s) begin
      cyc++;
      @(negedge clk);
    end
    #1;
    for (int l = 0; l < L; l++) res[l] = on_base ? rdata_b[l] : rdata_s[l];
  endtask

  function automatic logic [31:0] absdiff(input logic [31:0] a, input logic [31:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  task automatic run(input bit on_base, output longint cycles, output longint energy_fj);
    longint kb0, kernel;
    logic [31:0] sad, exp_sad, r, c;
    int lane, word;
    cyc = 0; bundles = 0; c_rd = 0; c_wr = 0; s_rd = 0; s_wr = 0;
    if (!on_base) begin
      // preamble, software-pipelined: store pixel p-1 while loading pixel p
      for (int p = 0; p <= BS * BS; p++) begin
        clear();
        if (p > 0) begin
          lane = 1 + (p - 1) % 7; word = (p - 1) / 7;
          breq[lane] = mk(OP_STORE, TGT_SMM, 32'(word * 4), res[0]);
        end
        if (p < BS * BS) breq[0] = mk(OP_LOAD, TGT_CACHE, CUR_BASE + 32'(p * 4), 0);
        issue(0);
        if (p < BS * BS) check(res[0] == cur[p], "preamble pixel");
      end
    end
    kb0 = bundles;
    for (int ci = 0; ci < CAND; ci++) begin
      sad = 0; exp_sad = 0;
      for (int p = 0; p < BS * BS; p++) begin
        int y, x;
        logic [31:0] raddr;
        y = p / BS; x = p % BS;
        raddr = REF_BASE + 32'(((cdy[ci] + y) * WS + cdx[ci] + x) * 4);
        exp_sad += absdiff(win[(cdy[ci] + y) * WS + cdx[ci] + x], cur[p]);
        clear();
        breq[0] = mk(OP_LOAD, TGT_CACHE, raddr, 0);
        if (on_base) begin
          issue(1);
          r = res[0];
          clear(); breq[0] = mk(OP_LOAD, TGT_CACHE, CUR_BASE + 32'(p * 4), 0); issue(1);
          c = res[0];
        end else begin
          lane = 1 + p % 7; word = p / 7;
          breq[lane] = mk(OP_LOAD, TGT_SMM, 32'(word * 4), 0);
          issue(0);
          r = res[0];
          c = res[lane];
        end
        check(r == win[(cdy[ci] + y) * WS + cdx[ci] + x], "reference pixel");
        check(c == cur[p], "current pixel");
        sad += absdiff(r, c);
      end
      check(sad == exp_sad, $sformatf("SAD of candidate %0d", ci));
    end
    kernel = bundles - kb0;
    check(kernel == longint'(CAND * BS * BS * (on_base ? 2 : 1)), "kernel bundle count");
    cycles = cyc;
    if (on_base) energy_fj = c_rd * 41970 + c_wr * 38100;
    else         energy_fj = c_rd * 24510 + c_wr * 26050 + s_rd * 3800 + s_wr * 7050;
    $display("SAD %s: %0d cycles, cache %0d rd, SMM %0d rd %0d wr, %0d pJ",
             on_base ? "baseline  " : "SMM design", cycles, c_rd, s_rd, s_wr, energy_fj / 1000);
  endtask

  initial begin
    longint cs, cb, es, eb;
    rst_n = 0;
    for (int l = 0; l < L; l++) begin
      req_s[l] = mk(OP_NOP, TGT_SMM, 0, 0);
      req_b[l] = mk(OP_NOP, TGT_SMM, 0, 0);
    end
    #1;
    for (int p = 0; p < BS * BS; p++) begin
      cur[p] = $urandom_range(0, 255);
      u_mem_s.mem[(CUR_BASE >> 2) + p] = cur[p];
      u_mem_b.mem[(CUR_BASE >> 2) + p] = cur[p];
    end
    for (int p = 0; p < WS * WS; p++) begin
      win[p] = $urandom_range(0, 255);
      u_mem_s.mem[(REF_BASE >> 2) + p] = win[p];
      u_mem_b.mem[(REF_BASE >> 2) + p] = win[p];
    end
    for (int ci = 0; ci < CAND; ci++) begin
      cdx[ci] = $urandom_range(0, WS - BS);
      cdy[ci] = $urandom_range(0, WS - BS);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(1'b1, cb, eb);
    run(1'b0, cs, es);
    $display("SAD speed-up %0d.%02d, energy %0d%% of baseline", cb / cs, (cb * 100 / cs) % 100,
             es * 100 / eb);
    check(cs < cb, "SMM design not faster");
    check(es < eb, "SMM design not more energy-efficient");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
