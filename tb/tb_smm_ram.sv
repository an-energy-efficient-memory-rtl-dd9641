// tb_smm_ram: self-checking test of one SMM array at its default 2 KB size.
// Fills every word, then mixes random reads and writes against a reference
// array; checks the one-cycle read latency and that rdata holds its value
// across idle cycles and writes.
module tb_smm_ram;
  localparam int unsigned WORDS = 512;
  logic        clk = 1'b0;
  logic        en, we;
  logic [8:0]  addr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [WORDS];
  logic [31:0] last;
  int checks = 0, failures = 0;

  smm_ram dut (.clk(clk), .en(en), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      en = 1; we = 1; addr = 9'(i); wdata = $urandom;
      ref_mem[i] = wdata;
      @(negedge clk);
    end
    en = 1; we = 0; addr = 0; last = ref_mem[0];
    @(negedge clk);
    check(rdata, last, "first read");
    en = 0;
    for (int n = 0; n < 3000; n++) begin
      int kind;
      kind = $urandom_range(0, 3);
      addr = 9'($urandom_range(0, WORDS - 1));
      if (kind == 0) begin
        en = 1; we = 1; wdata = $urandom;
        ref_mem[addr] = wdata;
        @(negedge clk);
        check(rdata, last, "rdata held across write");
      end else if (kind == 1) begin
        en = 0; we = $urandom_range(0, 1); wdata = $urandom;
        @(negedge clk);
        check(rdata, last, "rdata held while idle");
      end else begin
        en = 1; we = 0;
        last = ref_mem[addr];
        @(negedge clk);
        check(rdata, last, "read one cycle later");
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
