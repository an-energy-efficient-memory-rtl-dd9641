// tb_smm_lane_unit: self-checking test of one lane's SMM load/store unit at
// its default 2 KB size. Random loads and stores (base + imm, with stray upper
// address bits that must wrap) are issued under a random pipeline stall.
// A reference array predicts every load; the test checks that a load result
// appears exactly in the first unstalled cycle after the load was accepted,
// that nothing is accepted while stalled, and that results are held.
module tb_smm_lane_unit;
  import smma_pkg::*;
  localparam int unsigned WORDS = 512;

  logic            clk = 1'b0, rst_n;
  logic            stall, req_valid, req_we;
  logic [31:0]     base, imm, wdata, rdata;
  logic            rvalid;
  logic [31:0]     ref_mem [WORDS];
  logic [31:0]     exp_data;
  logic            pend;
  int checks = 0, failures = 0;
  int n_stalled_loads = 0, n_wraps = 0;

  smm_lane_unit dut (.clk(clk), .rst_n(rst_n), .stall(stall), .req_valid(req_valid),
                     .req_we(req_we), .base(base), .imm(imm), .wdata(wdata),
                     .rdata(rdata), .rvalid(rvalid));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ea;
    rst_n = 0; stall = 0; req_valid = 0; req_we = 0; base = 0; imm = 0; wdata = 0;
    pend = 0; exp_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // initialise the whole SMM
    for (int i = 0; i < WORDS; i++) begin
      req_valid = 1; req_we = 1; base = 32'(i * 4); imm = 0; wdata = $urandom;
      ref_mem[i] = wdata;
      @(negedge clk);
    end
    req_valid = 0;
    @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      // drive cycle n
      stall     = ($urandom_range(0, 99) < 30);
      req_valid = ($urandom_range(0, 99) < 85);
      req_we    = ($urandom_range(0, 99) < 40);
      base      = $urandom;
      imm       = 32'($urandom_range(0, 4095)) - 32'd2048;
      if ($urandom_range(0, 3) != 0) base = {21'b0, base[10:0]};
      else n_wraps++;
      ea        = base + imm;
      wdata     = $urandom;
      #1;
      // outputs of this cycle
      checks++;
      if (rvalid !== (pend && !stall)) begin
        failures++;
        $display("FAIL rvalid=%b expected %b (cycle %0d)", rvalid, pend && !stall, n);
      end
      if (pend) begin
        checks++;
        if (rdata !== exp_data) begin
          failures++;
          $display("FAIL rdata=%h expected %h (cycle %0d)", rdata, exp_data, n);
        end
      end
      // reference update for the clock edge that ends this cycle
      if (!stall) begin
        pend = req_valid && !req_we;
        if (req_valid && req_we) ref_mem[ea[10:2]] = wdata;
        if (req_valid && !req_we) exp_data = ref_mem[ea[10:2]];
      end else if (pend) begin
        n_stalled_loads++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_stalled_loads == 0 || n_wraps == 0) begin
      failures++;
      $display("FAIL coverage: stalled loads %0d wraps %0d", n_stalled_loads, n_wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
