// tb_workload_matmul: the matrix-multiply benchmarks (10x10, 16x16, 32x32,
// 32-bit integers) run on two memory systems, with the testbench acting as an
// 8-issue VLIW core whose arithmetic always fits in the free issue slots, so
// only memory bundles are timed.
//
//  - SMM design (smma_mem_arch at its defaults: 8 x 2 KB SMM, 16 KB L1):
//    a preamble copies A and B from the cache into the SMMs, then every (i,k)
//    step reads A[i][k] and the whole row B[k][*] with up to eight SMM loads
//    per cycle: ceil((N+1)/8) bundles. B[k][j] lives in lane j%8 at word
//    (j/8)*N+k (one column per N words); A[i][k] in lane a_lane(i) at word
//    256 + (i / free_lanes)*N + k, in the slots the last B bundle leaves free.
//  - Baseline (same module with a 32 KB L1, SMMs unused): every operand goes
//    through the single cache port: N+1 bundles per (i,k).
// C is stored through the cache in both. The test checks every loaded operand
// and the product, the kernel bundle counts, and that the SMM design is faster
// and spends less dynamic data-memory energy. Energy per access (65 nm):
// 16 KB cache 24.51 pJ read / 26.05 pJ write, 32 KB cache 41.97 / 38.10,
// 2 KB SMM 3.80 / 7.05.
module tb_workload_matmul;
  import smma_pkg::*;
  localparam int unsigned L         = 8;
  localparam int unsigned MEM_WORDS = 16384;
  localparam int unsigned NMAX      = 32;
  localparam logic [31:0] A_BASE = 32'h0000, B_BASE = 32'h1000, C_BASE = 32'h2000;

  logic        clk = 1'b0, rst_n;
  lane_req_t   req_s [L], req_b [L], breq [L];
  logic [31:0] rdata_s [L], rdata_b [L], res [L];
  logic        rvalid_s [L], rvalid_b [L];
  logic        stall_s, stall_b;
  logic        mreq_s, mwe_s, mgnt_s, mreq_b, mwe_b, mgnt_b;
  logic [31:0] maddr_s, mwdata_s, mrdata_s, maddr_b, mwdata_b, mrdata_b;

  int checks = 0, failures = 0;
  longint cyc, bundles, c_rd, c_wr, s_rd, s_wr;

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
    repeat (2000000) @(posedge clk);
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

  // Issue breq[] on one of the two systems and return its results in res[].
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

  logic [31:0] A [NMAX][NMAX], B [NMAX][NMAX];
  logic [31:0] brow [NMAX];

  function automatic int a_lane(input int n, input int i);
    return (n % 8) + i % (8 - n % 8);
  endfunction
  function automatic int a_word(input int n, input int i, input int k);
    return 256 + (i / (8 - n % 8)) * n + k;
  endfunction

  // Run one N x N multiply on one system; returns cycles and energy (fJ).
  task automatic run(input int n, input bit on_base, output longint cycles,
                     output longint energy_fj, output longint kernel_bundles);
    logic [31:0] acc [NMAX];
    logic [31:0] a_ik, s;
    longint      kb0;
    int          nb;
    cyc = 0; bundles = 0; c_rd = 0; c_wr = 0; s_rd = 0; s_wr = 0;
    if (!on_base) begin
      // preamble: A and B from main memory (through the cache) into the SMMs;
      // the SMM store of one element shares a bundle with the next cache load
      // whenever it is not in Lane 0
      for (int e = 0; e <= 2 * n * n; e++) begin
        int pl; logic [31:0] pw;
        clear();
        if (e > 0) begin
          int p = e - 1;
          if (p < n * n) begin
            pl = a_lane(n, p / n); pw = 32'(a_word(n, p / n, p % n));
          end else begin
            int k = (p - n * n) / n, j = (p - n * n) % n;
            pl = j % 8; pw = 32'((j / 8) * n + k);
          end
          breq[pl] = mk(OP_STORE, TGT_SMM, pw << 2, res[0]);
          if (pl == 0 && e < 2 * n * n) begin
            issue(0);
            clear();
          end
        end
        if (e < n * n)
          breq[0] = mk(OP_LOAD, TGT_CACHE, A_BASE + 32'(e * 4), 0);
        else if (e < 2 * n * n)
          breq[0] = mk(OP_LOAD, TGT_CACHE, B_BASE + 32'((e - n * n) * 4), 0);
        issue(0);
      end
    end
    kb0 = bundles;
    nb  = on_base ? n + 1 : (n + 8) / 8;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) acc[j] = 0;
      for (int k = 0; k < n; k++) begin
        if (on_base) begin
          clear(); breq[0] = mk(OP_LOAD, TGT_CACHE, A_BASE + 32'((i * n + k) * 4), 0); issue(1);
          a_ik = res[0];
          check(a_ik == A[i][k], "baseline A operand");
          for (int j = 0; j < n; j++) begin
            clear(); breq[0] = mk(OP_LOAD, TGT_CACHE, B_BASE + 32'((k * n + j) * 4), 0); issue(1);
            check(res[0] == B[k][j], "baseline B operand");
            acc[j] += a_ik * res[0];
          end
        end else begin
          for (int g = 0; g < nb; g++) begin
            clear();
            for (int l = 0; l < L; l++)
              if (g * 8 + l < n) breq[l] = mk(OP_LOAD, TGT_SMM, 32'(((g * n) + k) * 4), 0);
            if (g == nb - 1) breq[a_lane(n, i)] = mk(OP_LOAD, TGT_SMM, 32'(a_word(n, i, k) * 4), 0);
            issue(0);
            if (g == nb - 1) a_ik = res[a_lane(n, i)];
            for (int l = 0; l < L; l++)
              if (g * 8 + l < n) begin
                check(res[l] == B[k][g * 8 + l], "SMM B operand");
                brow[g * 8 + l] = res[l];   // kept until A[i][k] arrives
              end
          end
          check(a_ik == A[i][k], "SMM A operand");
          for (int j = 0; j < n; j++) acc[j] += a_ik * brow[j];
        end
      end
      for (int j = 0; j < n; j++) begin
        clear(); breq[0] = mk(OP_STORE, TGT_CACHE, C_BASE + 32'((i * n + j) * 4), acc[j]);
        issue(on_base);
      end
    end
    kernel_bundles = bundles - kb0 - n * n;   // C stores excluded
    check(kernel_bundles == longint'(n * n * nb),
          $sformatf("N=%0d kernel bundles %0d expected %0d", n, kernel_bundles, n * n * nb));
    cycles = cyc;
    if (on_base) energy_fj = c_rd * 41970 + c_wr * 38100;
    else         energy_fj = c_rd * 24510 + c_wr * 26050 + s_rd * 3800 + s_wr * 7050;
    $display("N=%0d %s: %0d cycles, cache %0d rd %0d wr, SMM %0d rd %0d wr, %0d pJ",
             n, on_base ? "baseline  " : "SMM design", cycles, c_rd, c_wr, s_rd, s_wr,
             energy_fj / 1000);
    // read C back (not counted)
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        s = 0;
        for (int k = 0; k < n; k++) s += A[i][k] * B[k][j];
        clear(); breq[0] = mk(OP_LOAD, TGT_CACHE, C_BASE + 32'((i * n + j) * 4), 0);
        issue(on_base);
        check(res[0] == s, $sformatf("N=%0d C[%0d][%0d]", n, i, j));
      end
  endtask

  initial begin
    int sizes [3] = '{10, 16, 32};
    longint cs, cb, es, eb, ks, kbb;
    rst_n = 0;
    for (int l = 0; l < L; l++) begin
      req_s[l] = mk(OP_NOP, TGT_SMM, 0, 0);
      req_b[l] = mk(OP_NOP, TGT_SMM, 0, 0);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (sizes[z]) begin
      int n;
      n = sizes[z];
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          A[i][j] = $urandom_range(0, 1 << 12);
          B[i][j] = $urandom_range(0, 1 << 12);
          u_mem_s.mem[(A_BASE >> 2) + i * n + j] = A[i][j];
          u_mem_b.mem[(A_BASE >> 2) + i * n + j] = A[i][j];
          u_mem_s.mem[(B_BASE >> 2) + i * n + j] = B[i][j];
          u_mem_b.mem[(B_BASE >> 2) + i * n + j] = B[i][j];
        end
      // start each size from an empty cache, as a fresh program would
      rst_n = 0;
      @(negedge clk);
      rst_n = 1;
      @(negedge clk);
      run(n, 1'b1, cb, eb, kbb);
      run(n, 1'b0, cs, es, ks);
      $display("N=%0d speed-up %0d.%02d, energy %0d%% of baseline", n, cb / cs,
               (cb * 100 / cs) % 100, es * 100 / eb);
      check(cs < cb, $sformatf("N=%0d SMM design not faster", n));
      check(es < eb, $sformatf("N=%0d SMM design not more energy-efficient", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
