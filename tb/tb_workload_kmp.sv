// tb_workload_kmp: Knuth-Morris-Pratt string matching on the SMM design
// (defaults: 8 x 2 KB SMM, 16 KB L1) and on a cache-only baseline with a 32 KB
// L1. The testbench acts as the core and times memory bundles only.
//
// Sizes are this test's choice: a TL-character text (one character per 32-bit
// word, 4-letter alphabet so that partial matches are frequent) is searched for
// an M-character pattern. The pattern and its failure table are the reused
// data: the SMM design keeps the pattern in Lane 1's SMM and the failure table
// in Lane 2's SMM (copied in by a preamble), so one bundle fetches the next text
// character from the cache together with pat[q] and fail[q-1]. The baseline
// fetches each of them through the single cache port. Checked: every operand,
// every match position against a direct search, and that the SMM design is not
// slower and uses less data-memory energy (per-access energies as in
// tb_workload_matmul).
module tb_workload_kmp;
  import smma_pkg::*;
  localparam int unsigned L         = 8;
  localparam int unsigned MEM_WORDS = 16384;
  localparam int unsigned TL        = 1500;   // text length
  localparam int unsigned M         = 6;      // pattern length
  localparam logic [31:0] TEXT_BASE = 32'h0000, PAT_BASE = 32'h2000, FAIL_BASE = 32'h2100;

  logic        clk = 1'b0, rst_n;
  lane_req_t   req_s [L], req_b [L], breq [L];
  logic [31:0] rdata_s [L], rdata_b [L], res [L];
  logic        rvalid_s [L], rvalid_b [L];
  logic        stall_s, stall_b;
  logic        mreq_s, mwe_s, mgnt_s, mreq_b, mwe_b, mgnt_b;
  logic [31:0] maddr_s, mwdata_s, mrdata_s, maddr_b, mwdata_b, mrdata_b;

  int checks = 0, failures = 0;
  longint cyc, bundles, c_rd, c_wr, s_rd, s_wr;
  logic [31:0] text [TL];
  logic [31:0] pat  [M];
  logic [31:0] fail [M];

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

  task automatic run(input bit on_base, output longint cycles, output longint energy_fj,
                     output int nmatch);
    int q, i;
    logic [31:0] c, pq, fq;
    cyc = 0; bundles = 0; c_rd = 0; c_wr = 0; s_rd = 0; s_wr = 0;
    nmatch = 0;
    if (!on_base) begin
      // preamble: pattern into Lane 1, failure table into Lane 2
      for (int e = 0; e <= 2 * M; e++) begin
        clear();
        if (e > 0) begin
          if (e - 1 < M) breq[1] = mk(OP_STORE, TGT_SMM, 32'((e - 1) * 4), res[0]);
          else           breq[2] = mk(OP_STORE, TGT_SMM, 32'((e - 1 - M) * 4), res[0]);
        end
        if (e < M)          breq[0] = mk(OP_LOAD, TGT_CACHE, PAT_BASE + 32'(e * 4), 0);
        else if (e < 2 * M) breq[0] = mk(OP_LOAD, TGT_CACHE, FAIL_BASE + 32'((e - M) * 4), 0);
        issue(0);
      end
    end
    q = 0;
    for (i = 0; i < TL; i++) begin
      // fetch text[i] together with pat[q] and fail[q-1]
      clear();
      breq[0] = mk(OP_LOAD, TGT_CACHE, TEXT_BASE + 32'(i * 4), 0);
      if (on_base) begin
        issue(1); c = res[0];
        clear(); breq[0] = mk(OP_LOAD, TGT_CACHE, PAT_BASE + 32'(q * 4), 0); issue(1); pq = res[0];
      end else begin
        breq[1] = mk(OP_LOAD, TGT_SMM, 32'(q * 4), 0);
        breq[2] = mk(OP_LOAD, TGT_SMM, 32'((q > 0 ? q - 1 : 0) * 4), 0);
        issue(0); c = res[0]; pq = res[1]; fq = res[2];
        if (q > 0) check(fq == fail[q - 1], "SMM fail operand");
      end
      check(c == text[i], "text operand");
      check(pq == pat[q], "pattern operand");
      while (q > 0 && pq != c) begin
        if (on_base) begin
          clear(); breq[0] = mk(OP_LOAD, TGT_CACHE, FAIL_BASE + 32'((q - 1) * 4), 0); issue(1);
          fq = res[0];
          check(fq == fail[q - 1], "baseline fail operand");
        end
        q = int'(fq);
        clear();
        if (on_base) begin
          breq[0] = mk(OP_LOAD, TGT_CACHE, PAT_BASE + 32'(q * 4), 0); issue(1); pq = res[0];
        end else begin
          breq[1] = mk(OP_LOAD, TGT_SMM, 32'(q * 4), 0);
          breq[2] = mk(OP_LOAD, TGT_SMM, 32'((q > 0 ? q - 1 : 0) * 4), 0);
          issue(0); pq = res[1]; fq = res[2];
        end
        check(pq == pat[q], "pattern operand after fall-back");
      end
      if (pq == c) q++;
      if (q == M) begin
        check(i - M + 1 >= 0 && is_match(i - M + 1), $sformatf("false match at %0d", i - M + 1));
        nmatch++;
        q = int'(fail[M - 1]);
      end
    end
    cycles = cyc;
    if (on_base) energy_fj = c_rd * 41970 + c_wr * 38100;
    else         energy_fj = c_rd * 24510 + c_wr * 26050 + s_rd * 3800 + s_wr * 7050;
    $display("KMP %s: %0d cycles, cache %0d rd, SMM %0d rd %0d wr, %0d pJ, %0d matches",
             on_base ? "baseline  " : "SMM design", cycles, c_rd, s_rd, s_wr, energy_fj / 1000,
             nmatch);
  endtask

  function automatic bit is_match(input int pos);
    for (int k = 0; k < M; k++) if (text[pos + k] != pat[k]) return 0;
    return 1;
  endfunction

  initial begin
    longint cs, cb, es, eb;
    int ms, mb, direct;
    rst_n = 0;
    for (int l = 0; l < L; l++) begin
      req_s[l] = mk(OP_NOP, TGT_SMM, 0, 0);
      req_b[l] = mk(OP_NOP, TGT_SMM, 0, 0);
    end
    #1;
    for (int k = 0; k < M; k++) pat[k] = (k % 3 == 2) ? 32'd1 : 32'd0;
    // failure table: length of the longest proper border of pat[0..k]
    fail[0] = 0;
    for (int k = 1, b = 0; k < M; k++) begin
      while (b > 0 && pat[k] != pat[b]) b = int'(fail[b - 1]);
      if (pat[k] == pat[b]) b++;
      fail[k] = 32'(b);
    end
    for (int i = 0; i < TL; i++) text[i] = ($urandom_range(0, 3) == 0) ? 32'($urandom_range(1, 3)) : 32'd0;
    for (int i = 0; i < TL; i++) begin
      u_mem_s.mem[(TEXT_BASE >> 2) + i] = text[i];
      u_mem_b.mem[(TEXT_BASE >> 2) + i] = text[i];
    end
    for (int k = 0; k < M; k++) begin
      u_mem_s.mem[(PAT_BASE >> 2) + k]  = pat[k];
      u_mem_b.mem[(PAT_BASE >> 2) + k]  = pat[k];
      u_mem_s.mem[(FAIL_BASE >> 2) + k] = fail[k];
      u_mem_b.mem[(FAIL_BASE >> 2) + k] = fail[k];
    end
    direct = 0;
    for (int pos = 0; pos + M <= TL; pos++) if (is_match(pos)) direct++;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(1'b1, cb, eb, mb);
    run(1'b0, cs, es, ms);
    $display("KMP speed-up %0d.%02d, energy %0d%% of baseline, %0d matches", cb / cs,
             (cb * 100 / cs) % 100, es * 100 / eb, direct);
    check(direct > 0, "text contains the pattern");
    check(mb == direct && ms == direct, "match count");
    check(cs <= cb, "SMM design slower");
    check(es < eb, "SMM design not more energy-efficient");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
