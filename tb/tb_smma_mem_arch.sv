// tb_smma_mem_arch: end-to-end test of the whole data memory architecture with
// every parameter at its default (8 lanes, 2 KB SMM per lane, 16 KB L1 cache).
// The testbench plays the VLIW core: it issues one bundle of up to eight memory
// operations per cycle and holds the next bundle while stall is high.
//
// Phase 1 issues random bundles (every lane a random SMM load/store, Lane 0
// sometimes a cache access) and checks every result against per-lane SMM
// reference arrays and a flat reference of main memory.
// Phase 2 runs a 10x10 integer matrix multiply the way the compiler maps it:
// A and B are written to main memory through the cache, a preamble copies A
// into Lane 0's SMM (consecutive allocation) and the columns of B into the SMMs
// of Lanes 1..7 (one column every 10 words), the kernel then reads eight
// operands per cycle, and C is stored through the cache and read back.
// Checked: all data, the product, one bundle per cycle in the kernel (200
// cycles), and that each mechanism occurred: 8-wide SMM bundles, cache hits,
// cache-miss stalls, dirty write-backs, SMM results held across a stall.
module tb_smma_mem_arch;
  import smma_pkg::*;
  localparam int unsigned L         = 8;
  localparam int unsigned SMM_WORDS = 512;
  localparam int unsigned MEM_WORDS = 16384;
  localparam int unsigned N         = 10;

  logic            clk = 1'b0, rst_n;
  lane_req_t       req    [L];
  logic [31:0]     rdata  [L];
  logic            rvalid [L];
  logic            stall;
  logic            mem_req, mem_we, mem_gnt;
  logic [31:0]     mem_addr, mem_wdata, mem_rdata;

  logic [31:0] smm_ref [L][SMM_WORDS];
  logic [31:0] ref_mem [MEM_WORDS];
  logic [31:0] res     [L];
  int checks = 0, failures = 0;
  int n_wide = 0, n_chit = 0, n_miss = 0, n_wb = 0, n_held = 0;
  logic c_acc_q = 0;   // a cache access was accepted at the last edge
  longint cycle = 0;

  smma_mem_arch dut (
    .clk(clk), .rst_n(rst_n), .req(req), .rdata(rdata), .rvalid(rvalid), .stall(stall),
    .mem_req(mem_req), .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
    .mem_gnt(mem_gnt), .mem_rdata(mem_rdata));

  main_mem_model #(.WORDS(MEM_WORDS), .LAT(2)) u_mem (
    .clk(clk), .rst_n(rst_n), .mem_req(mem_req), .mem_we(mem_we), .mem_addr(mem_addr),
    .mem_wdata(mem_wdata), .mem_gnt(mem_gnt), .mem_rdata(mem_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
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

  function automatic lane_req_t mk(input mem_op_e op, input mem_tgt_e tgt,
                                   input logic [31:0] base, input logic [31:0] imm,
                                   input logic [31:0] wdata);
    lane_req_t r;
    r.op = op; r.tgt = tgt; r.base = base; r.imm = imm; r.wdata = wdata;
    return r;
  endfunction

  task automatic nop_all();
    for (int l = 0; l < L; l++) req[l] = mk(OP_NOP, TGT_SMM, 0, 0, 0);
  endtask

  // Issue the bundle in req[] at a negedge with stall low, wait for its
  // results, check them and leave them in res[]. Returns at the negedge of
  // the result cycle, where the next bundle may be set up.
  task automatic bundle();
    logic [31:0] exp [L];
    logic        ld  [L];
    logic [31:0] ea;
    int          nsmm = 0, st = 0, wb0;
    logic        smm_load = 0;
    wb0 = u_mem.writes;
    for (int l = 0; l < L; l++) begin
      ea    = req[l].base + req[l].imm;
      ld[l] = (req[l].op == OP_LOAD);
      exp[l] = '0;
      if (req[l].op != OP_NOP && req[l].tgt == TGT_SMM) begin
        nsmm++;
        if (ld[l]) smm_load = 1;
        if (req[l].op == OP_STORE) smm_ref[l][ea[10:2]] = req[l].wdata;
        else exp[l] = smm_ref[l][ea[10:2]];
      end else if (req[l].op != OP_NOP) begin
        if (req[l].op == OP_STORE) ref_mem[ea[15:2]] = req[l].wdata;
        else exp[l] = ref_mem[ea[15:2]];
      end
    end
    if (nsmm == L) n_wide++;
    @(negedge clk);
    nop_all();
    while (stall) begin
      st++;
      @(negedge clk);
    end
    #1;
    if (st > 0) begin
      n_miss++;
      if (smm_load) n_held++;
    end
    if (u_mem.writes != wb0) n_wb++;
    for (int l = 0; l < L; l++) begin
      check(rvalid[l] == ld[l], $sformatf("lane %0d rvalid", l));
      if (ld[l]) check(rdata[l] == exp[l],
                       $sformatf("lane %0d data %h expected %h", l, rdata[l], exp[l]));
      res[l] = rdata[l];
    end
  endtask

  // ---------------------------------------------------------------- phase 2
  logic [31:0] A [N][N], B [N][N], C [N][N];
  localparam logic [31:0] A_BASE = 32'h1000, B_BASE = 32'h2000, C_BASE = 32'h3000;

  task automatic matmul();
    logic [31:0] acc [N][N];
    logic [31:0] a_ik;
    longint      t0, kernel_cycles;
    int          lane, word;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j] = $urandom_range(0, 1000);
        B[i][j] = $urandom_range(0, 1000);
        acc[i][j] = 0;
      end
    // A and B into main memory through the cache
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        nop_all(); req[0] = mk(OP_STORE, TGT_CACHE, A_BASE, 32'((i * N + j) * 4), A[i][j]); bundle();
        nop_all(); req[0] = mk(OP_STORE, TGT_CACHE, B_BASE, 32'((i * N + j) * 4), B[i][j]); bundle();
      end
    // preamble: A row-major into Lane 0's SMM, column j of B into the SMM of
    // lane 1 + j % 7 at word (j / 7) * N + k
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        nop_all(); req[0] = mk(OP_LOAD, TGT_CACHE, A_BASE, 32'((i * N + k) * 4), 0); bundle();
        nop_all(); req[0] = mk(OP_STORE, TGT_SMM, 0, 32'((i * N + k) * 4), res[0]); bundle();
      end
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++) begin
        nop_all(); req[0] = mk(OP_LOAD, TGT_CACHE, B_BASE, 32'((k * N + j) * 4), 0); bundle();
        lane = 1 + j % 7; word = (j / 7) * N + k;
        nop_all(); req[lane] = mk(OP_STORE, TGT_SMM, 32'(word * 4), 0, res[0]); bundle();
      end
    // kernel: two bundles per (i,k), eight SMM reads per bundle where possible
    t0 = cycle;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++)
        for (int g = 0; g < 2; g++) begin
          nop_all();
          if (g == 0) req[0] = mk(OP_LOAD, TGT_SMM, 32'(i * N * 4), 32'(k * 4), 0);
          for (int l = 1; l < L; l++)
            if (7 * g + l - 1 < N)
              req[l] = mk(OP_LOAD, TGT_SMM, 32'(g * N * 4), 32'(k * 4), 0);
          bundle();
          if (g == 0) a_ik = res[0];
          for (int l = 1; l < L; l++)
            if (7 * g + l - 1 < N)
              acc[i][7 * g + l - 1] += a_ik * res[l];
        end
    kernel_cycles = cycle - t0;
    check(kernel_cycles == 2 * N * N,
          $sformatf("kernel took %0d cycles, expected %0d", kernel_cycles, 2 * N * N));
    // C back to memory through the cache, then read back and compare
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        nop_all(); req[0] = mk(OP_STORE, TGT_CACHE, C_BASE, 32'((i * N + j) * 4), acc[i][j]); bundle();
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        logic [31:0] s;
        s = 0;
        for (int k = 0; k < N; k++) s += A[i][k] * B[k][j];
        nop_all(); req[0] = mk(OP_LOAD, TGT_CACHE, C_BASE, 32'((i * N + j) * 4), 0); bundle();
        check(res[0] == s, $sformatf("C[%0d][%0d]=%0d expected %0d", i, j, res[0], s));
      end
  endtask

  initial begin
    rst_n = 0;
    nop_all();
    for (int i = 0; i < MEM_WORDS; i++) ref_mem[i] = u_mem.init_word(32'(i) << 2);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // fill every SMM so that every later load has a known value
    for (int w = 0; w < SMM_WORDS; w++) begin
      for (int l = 0; l < L; l++) req[l] = mk(OP_STORE, TGT_SMM, 32'(w * 4), 0, $urandom);
      bundle();
    end
    // phase 1: random bundles
    for (int n = 0; n < 3000; n++) begin
      for (int l = 0; l < L; l++) begin
        mem_op_e op;
        int r;
        r = $urandom_range(0, 9);
        op = (r < 1) ? OP_NOP : (r < 6) ? OP_LOAD : OP_STORE;
        req[l] = mk(op, TGT_SMM, {21'b0, 11'($urandom)}, 32'($urandom_range(0, 255)), $urandom);
      end
      if ($urandom_range(0, 2) == 0) begin
        req[0].tgt = TGT_CACHE;
        if ($urandom_range(0, 1) == 0)
          req[0].base = {16'b0, 2'($urandom_range(0, 3)), 4'($urandom_range(0, 1)), 10'($urandom)};
        else
          req[0].base = {16'b0, 16'($urandom)};
        req[0].imm = 0;
        if (req[0].op == OP_NOP) req[0].op = OP_LOAD;
      end
      bundle();
      if ($urandom_range(0, 9) == 0) @(negedge clk);
    end
    // phase 2: matrix multiply
    matmul();
    $display("8-wide bundles %0d, stalled bundles %0d, with held SMM loads %0d, write-backs %0d",
             n_wide, n_miss, n_held, n_wb);
    check(n_wide > 0, "8-wide SMM bundle occurred");
    check(n_miss > 0, "cache-miss stall occurred");
    check(n_held > 0, "SMM result held across a stall occurred");
    check(n_wb > 0, "dirty write-back occurred");
    check(n_chit > 0, "cache hit occurred");
    $display("cache hits %0d", n_chit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cache hits: a cache access accepted and not followed by a stall
  always @(posedge clk) begin
    if (c_acc_q && !stall) n_chit <= n_chit + 1;
    c_acc_q <= !stall && req[0].op != OP_NOP && req[0].tgt == TGT_CACHE;
  end
endmodule
