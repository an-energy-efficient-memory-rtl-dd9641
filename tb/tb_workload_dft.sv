// tb_workload_dft: discrete Fourier transform and its inverse (integer,
// Q14 twiddles) on the SMM design (defaults: 8 x 2 KB SMM, 16 KB L1) and on a
// cache-only baseline with a 32 KB L1. The testbench acts as the core and
// times memory bundles only.
//
// Sizes are this test's choice: N = 64 points. The reused data are the input
// vector and the cos/sin tables. The SMM design's preamble copies them in; the
// forward kernel then handles two input points per bundle: x[n] from lane 0/3,
// cos from lane 1/4 and sin from lane 2/5 (the tables are held twice, so that
// two different twiddles can be read in one cycle). The forward kernel leaves
// its result in the SMMs of lanes 6 (Re) and 7 (Im), so the inverse needs no
// preamble; it reads one Re/Im pair per bundle and the twiddles of two points
// in the first bundle of each pair (N*N bundles). The baseline
// reads every operand through the single cache port. Checked: every operand,
// the forward result against a direct computation, the round trip (inverse
// of forward equals the input within rounding), the kernel bundle counts, and
// that the SMM design is faster and uses less data-memory energy.
module tb_workload_dft;
  import smma_pkg::*;
  localparam int unsigned L         = 8;
  localparam int unsigned MEM_WORDS = 16384;
  localparam int unsigned N         = 64;
  localparam logic [31:0] X_BASE = 32'h0000, COS_BASE = 32'h0400, SIN_BASE = 32'h0800,
                          RE_BASE = 32'h0C00, IM_BASE = 32'h1000;

  logic        clk = 1'b0, rst_n;
  lane_req_t   req_s [L], req_b [L], breq [L];
  logic [31:0] rdata_s [L], rdata_b [L], res [L];
  logic        rvalid_s [L], rvalid_b [L];
  logic        stall_s, stall_b;
  logic        mreq_s, mwe_s, mgnt_s, mreq_b, mwe_b, mgnt_b;
  logic [31:0] maddr_s, mwdata_s, mrdata_s, maddr_b, mwdata_b, mrdata_b;

  int checks = 0, failures = 0;
  longint cyc, bundles, c_rd, c_wr, s_rd, s_wr;
  int          xin [N];                 // input samples
  int          cosq [N], sinq [N];      // twiddles, Q14
  int          fre [N], fim [N];        // forward transform

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

  // SMM layout: x[n] in lane 3*(n%2) word n/2; cos[m] in lanes 1 and 4 word m;
  // sin[m] in lanes 2 and 5 word m; forward Re[k] in lane 6 and Im[k] in
  // lane 7 at word k (written by the forward kernel, read by the inverse).
  task automatic run(input bit on_base, output longint cycles, output longint energy_fj);
    longint kb0;
    int     are, aim, m, err;
    logic [31:0] v [4];
    cyc = 0; bundles = 0; c_rd = 0; c_wr = 0; s_rd = 0; s_wr = 0;
    if (!on_base) begin
      // preamble: load from cache, store into one or two SMMs in the next bundle
      for (int e = 0; e <= 3 * N; e++) begin
        clear();
        if (e > 0) begin
          int p;
          p = e - 1;
          if (p < N) begin
            breq[3 * (p % 2)] = mk(OP_STORE, TGT_SMM, 32'((p / 2) * 4), res[0]);
          end else if (p < 2 * N) begin
            breq[1] = mk(OP_STORE, TGT_SMM, 32'((p - N) * 4), res[0]);
            breq[4] = mk(OP_STORE, TGT_SMM, 32'((p - N) * 4), res[0]);
          end else begin
            breq[2] = mk(OP_STORE, TGT_SMM, 32'((p - 2 * N) * 4), res[0]);
            breq[5] = mk(OP_STORE, TGT_SMM, 32'((p - 2 * N) * 4), res[0]);
          end
          if (p < N && p % 2 == 0 && e < 3 * N) begin
            issue(0);
            clear();
          end
        end
        if (e < N)          breq[0] = mk(OP_LOAD, TGT_CACHE, X_BASE + 32'(e * 4), 0);
        else if (e < 2 * N) breq[0] = mk(OP_LOAD, TGT_CACHE, COS_BASE + 32'((e - N) * 4), 0);
        else if (e < 3 * N) breq[0] = mk(OP_LOAD, TGT_CACHE, SIN_BASE + 32'((e - 2 * N) * 4), 0);
        issue(0);
      end
    end
    // forward: X[k] = sum x[n] * W^(nk)
    kb0 = bundles;
    for (int k = 0; k < N; k++) begin
      are = 0; aim = 0;
      for (int n = 0; n < N; n += 2) begin
        if (on_base) begin
          for (int h = 0; h < 2; h++) begin
            m = ((n + h) * k) % N;
            clear(); breq[0] = mk(OP_LOAD, TGT_CACHE, X_BASE + 32'((n + h) * 4), 0); issue(1); v[0] = res[0];
            clear(); breq[0] = mk(OP_LOAD, TGT_CACHE, COS_BASE + 32'(m * 4), 0); issue(1); v[1] = res[0];
            clear(); breq[0] = mk(OP_LOAD, TGT_CACHE, SIN_BASE + 32'(m * 4), 0); issue(1); v[2] = res[0];
            check(int'(v[0]) == xin[n + h] && int'(v[1]) == cosq[m] && int'(v[2]) == sinq[m],
                  "forward operands");
            are += int'(v[0]) * int'(v[1]);
            aim -= int'(v[0]) * int'(v[2]);
          end
        end else begin
          clear();
          for (int h = 0; h < 2; h++) begin
            m = ((n + h) * k) % N;
            breq[3 * h]     = mk(OP_LOAD, TGT_SMM, 32'(((n + h) / 2) * 4), 0);
            breq[3 * h + 1] = mk(OP_LOAD, TGT_SMM, 32'(m * 4), 0);
            breq[3 * h + 2] = mk(OP_LOAD, TGT_SMM, 32'(m * 4), 0);
          end
          issue(0);
          for (int h = 0; h < 2; h++) begin
            m = ((n + h) * k) % N;
            v[0] = res[3 * h]; v[1] = res[3 * h + 1]; v[2] = res[3 * h + 2];
            check(int'(v[0]) == xin[n + h] && int'(v[1]) == cosq[m] && int'(v[2]) == sinq[m],
                  "forward operands");
            are += int'(v[0]) * int'(v[1]);
            aim -= int'(v[0]) * int'(v[2]);
          end
        end
      end
      check(are == fre[k] && aim == fim[k], $sformatf("forward X[%0d]", k));
      // keep the result: SMM design in lanes 6/7, baseline through the cache
      clear();
      if (on_base) begin
        breq[0] = mk(OP_STORE, TGT_CACHE, RE_BASE + 32'(k * 4), are); issue(1);
        clear(); breq[0] = mk(OP_STORE, TGT_CACHE, IM_BASE + 32'(k * 4), aim); issue(1);
      end else begin
        breq[6] = mk(OP_STORE, TGT_SMM, 32'(k * 4), are);
        breq[7] = mk(OP_STORE, TGT_SMM, 32'(k * 4), aim);
        issue(0);
      end
    end
    check(bundles - kb0 == longint'(on_base ? N * N * 3 + 2 * N : N * N / 2 + N),
          "forward bundle count");
    // inverse: x[n] = (1/N) sum X[k] * W^(-nk); twiddles Q14, result rounded
    kb0 = bundles;
    err = 0;
    for (int n = 0; n < N; n++) begin
      longint acc;
      acc = 0;
      for (int k = 0; k < N; k += 2) begin
        for (int h = 0; h < 2; h++) begin
          int xr, xi, c, s;
          m = (n * (k + h)) % N;
          if (on_base) begin
            clear(); breq[0] = mk(OP_LOAD, TGT_CACHE, RE_BASE + 32'((k + h) * 4), 0); issue(1); xr = int'(res[0]);
            clear(); breq[0] = mk(OP_LOAD, TGT_CACHE, IM_BASE + 32'((k + h) * 4), 0); issue(1); xi = int'(res[0]);
            clear(); breq[0] = mk(OP_LOAD, TGT_CACHE, COS_BASE + 32'(m * 4), 0); issue(1); c = int'(res[0]);
            clear(); breq[0] = mk(OP_LOAD, TGT_CACHE, SIN_BASE + 32'(m * 4), 0); issue(1); s = int'(res[0]);
          end else begin
            if (h == 0) begin
              int m1;
              m1 = (n * (k + 1)) % N;
              clear();
              breq[6] = mk(OP_LOAD, TGT_SMM, 32'(k * 4), 0);
              breq[7] = mk(OP_LOAD, TGT_SMM, 32'(k * 4), 0);
              breq[1] = mk(OP_LOAD, TGT_SMM, 32'(m * 4), 0);
              breq[2] = mk(OP_LOAD, TGT_SMM, 32'(m * 4), 0);
              breq[4] = mk(OP_LOAD, TGT_SMM, 32'(m1 * 4), 0);
              breq[5] = mk(OP_LOAD, TGT_SMM, 32'(m1 * 4), 0);
              issue(0);
              for (int l = 0; l < L; l++) v2[l] = res[l];
              clear();
              breq[6] = mk(OP_LOAD, TGT_SMM, 32'((k + 1) * 4), 0);
              breq[7] = mk(OP_LOAD, TGT_SMM, 32'((k + 1) * 4), 0);
              issue(0);
              xr = int'(v2[6]); xi = int'(v2[7]); c = int'(v2[1]); s = int'(v2[2]);
            end else begin
              xr = int'(res[6]); xi = int'(res[7]); c = int'(v2[4]); s = int'(v2[5]);
            end
          end
          check(xr == fre[k + h] && xi == fim[k + h] && c == cosq[m] && s == sinq[m],
                "inverse operands");
          // Re{(xr + j xi)(c + j s)} = xr c - xi s
          acc += longint'(xr) * c - longint'(xi) * s;
        end
      end
      // scale: two Q14 products and 1/N
      acc = (acc + (longint'(N) << 27)) / (longint'(N) << 28);
      if (acc != longint'(xin[n]) && acc != longint'(xin[n]) + 1 && acc != longint'(xin[n]) - 1)
        err++;
    end
    check(err == 0, $sformatf("round trip: %0d samples off by more than 1", err));
    check(bundles - kb0 == longint'(on_base ? N * N * 4 : N * N), "inverse bundle count");
    cycles = cyc;
    if (on_base) energy_fj = c_rd * 41970 + c_wr * 38100;
    else         energy_fj = c_rd * 24510 + c_wr * 26050 + s_rd * 3800 + s_wr * 7050;
    $display("DFT+IDFT %s: %0d cycles, cache %0d rd %0d wr, SMM %0d rd %0d wr, %0d pJ",
             on_base ? "baseline  " : "SMM design", cycles, c_rd, c_wr, s_rd, s_wr,
             energy_fj / 1000);
  endtask

  logic [31:0] v2 [L];

  initial begin
    longint cs, cb, es, eb;
    rst_n = 0;
    for (int l = 0; l < L; l++) begin
      req_s[l] = mk(OP_NOP, TGT_SMM, 0, 0);
      req_b[l] = mk(OP_NOP, TGT_SMM, 0, 0);
    end
    #1;
    for (int i = 0; i < N; i++) begin
      real ang;
      ang     = 2.0 * 3.14159265358979 * i / N;
      cosq[i] = int'($rtoi($cos(ang) * 16384.0 + ($cos(ang) >= 0 ? 0.5 : -0.5)));
      sinq[i] = int'($rtoi($sin(ang) * 16384.0 + ($sin(ang) >= 0 ? 0.5 : -0.5)));
      xin[i]  = $urandom_range(0, 2000) - 1000;
    end
    for (int k = 0; k < N; k++) begin
      fre[k] = 0; fim[k] = 0;
      for (int n = 0; n < N; n++) begin
        fre[k] += xin[n] * cosq[(n * k) % N];
        fim[k] -= xin[n] * sinq[(n * k) % N];
      end
    end
    for (int i = 0; i < N; i++) begin
      u_mem_s.mem[(X_BASE >> 2) + i]   = 32'(xin[i]);
      u_mem_b.mem[(X_BASE >> 2) + i]   = 32'(xin[i]);
      u_mem_s.mem[(COS_BASE >> 2) + i] = 32'(cosq[i]);
      u_mem_b.mem[(COS_BASE >> 2) + i] = 32'(cosq[i]);
      u_mem_s.mem[(SIN_BASE >> 2) + i] = 32'(sinq[i]);
      u_mem_b.mem[(SIN_BASE >> 2) + i] = 32'(sinq[i]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(1'b1, cb, eb);
    run(1'b0, cs, es);
    $display("DFT+IDFT speed-up %0d.%02d, energy %0d%% of baseline", cb / cs,
             (cb * 100 / cs) % 100, es * 100 / eb);
    check(cs < cb, "SMM design not faster");
    check(es < eb, "SMM design not more energy-efficient");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
