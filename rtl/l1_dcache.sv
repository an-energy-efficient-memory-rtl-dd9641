// l1_dcache: the L1 data cache behind Lane 0 (the "MEM" unit of the lane).
//
// Only Lane 0 reaches the regular data memory hierarchy; it does so through
// this single-ported cache. The 16 KB default is the cache size of the
// evaluated SMM processor (half of the baseline's 32 KB, the other half having
// gone into the SMMs). Organisation, line size and policies are not part of
// the architecture and are this design's own, simplest choices:
// direct-mapped, 32-byte lines, write-back with write-allocate, word accesses.
//
// Tags, valid and dirty bits are held in flip-flops and compared in the cycle
// a request is accepted; the data array is one line wide, read synchronously,
// and written with per-word enables.
//
// Timing: a request is accepted when req_valid = 1 and stall = 0.
//  - hit:  a store is written at the accepting edge; a load returns its word
//          on rdata with rvalid = 1 in the next cycle. No stall.
//  - miss: stall goes high from the next cycle. If the victim line is dirty it
//          is first written to the next memory level word by word (S_EVICT),
//          then the new line is fetched word by word (S_REFILL), the store data
//          merged in. In the first cycle with stall low again a load's word is
//          on rdata with rvalid = 1.
// Next-level port: one word per transfer; a transfer completes in a cycle with
// mem_req = 1 and mem_gnt = 1, read data is taken from mem_rdata in that cycle.
module l1_dcache
  import smma_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned LINE_BYTES  = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  // Lane 0 request
  input  logic            req_valid,
  input  logic            req_we,
  input  logic [XLEN-1:0] req_addr,
  input  logic [XLEN-1:0] req_wdata,
  output logic            stall,
  output logic [XLEN-1:0] rdata,
  output logic            rvalid,
  // next memory level
  output logic            mem_req,
  output logic            mem_we,
  output logic [XLEN-1:0] mem_addr,
  output logic [XLEN-1:0] mem_wdata,
  input  logic            mem_gnt,
  input  logic [XLEN-1:0] mem_rdata
);

  localparam int unsigned WPL    = LINE_BYTES / 4;           // words per line
  localparam int unsigned LINES  = CACHE_BYTES / LINE_BYTES;
  localparam int unsigned OFF_W  = $clog2(WPL);
  localparam int unsigned IDX_W  = $clog2(LINES);
  localparam int unsigned TAG_W  = XLEN - IDX_W - OFF_W - 2;
  localparam int unsigned LINE_W = WPL * XLEN;

  typedef enum logic [1:0] {S_IDLE, S_EVICT, S_REFILL} state_e;

  state_e              state;
  logic [TAG_W-1:0]    tag_q   [LINES];
  logic [LINES-1:0]    valid_q;
  logic [LINES-1:0]    dirty_q;
  logic [LINE_W-1:0]   data_mem [LINES];
  logic [LINE_W-1:0]   dout;           // line read at the last accepted request
  logic [XLEN-1:0]     linebuf [WPL];  // refilled line

  // request fields
  logic [TAG_W-1:0]    r_tag;
  logic [IDX_W-1:0]    r_idx;
  logic [OFF_W-1:0]    r_off;
  logic                accept, hit;

  // miss bookkeeping
  logic [TAG_W-1:0]    m_tag, v_tag;
  logic [IDX_W-1:0]    m_idx;
  logic [OFF_W-1:0]    m_off;
  logic                m_we;
  logic [XLEN-1:0]     m_wdata;
  logic [OFF_W-1:0]    cnt;

  // response
  logic                resp_q, resp_buf_q;
  logic [OFF_W-1:0]    off_q;

  // data array write port
  logic                dw_en;
  logic [IDX_W-1:0]    dw_idx;
  logic [WPL-1:0]      dw_mask;
  logic [LINE_W-1:0]   dw_line;
  logic [XLEN-1:0]     fill_word;

  assign r_tag  = req_addr[XLEN-1 -: TAG_W];
  assign r_idx  = req_addr[OFF_W+2 +: IDX_W];
  assign r_off  = req_addr[2 +: OFF_W];
  assign stall  = (state != S_IDLE);
  assign accept = req_valid && !stall;
  assign hit    = valid_q[r_idx] && (tag_q[r_idx] == r_tag);

  // word arriving from the next level, with the missed store merged in
  assign fill_word = (m_we && cnt == m_off) ? m_wdata : mem_rdata;

  // next-level port
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    if (state == S_EVICT) begin
      mem_req   = 1'b1;
      mem_we    = 1'b1;
      mem_addr  = {v_tag, m_idx, cnt, 2'b00};
      mem_wdata = dout[cnt*XLEN +: XLEN];
    end else if (state == S_REFILL) begin
      mem_req   = 1'b1;
      mem_addr  = {m_tag, m_idx, cnt, 2'b00};
    end
  end

  // data array write port: a store hit writes one word, the last refill
  // transfer writes the whole line
  always_comb begin
    dw_en   = 1'b0;
    dw_idx  = r_idx;
    dw_mask = '0;
    dw_line = '0;
    if (accept && hit && req_we) begin
      dw_en          = 1'b1;
      dw_mask[r_off] = 1'b1;
      dw_line        = {WPL{req_wdata}};
    end else if (state == S_REFILL && mem_gnt && cnt == OFF_W'(WPL - 1)) begin
      dw_en   = 1'b1;
      dw_idx  = m_idx;
      dw_mask = '1;
      for (int w = 0; w < WPL; w++)
        dw_line[w*XLEN +: XLEN] = (w == WPL - 1) ? fill_word : linebuf[w];
    end
  end

  always_ff @(posedge clk) begin
    if (dw_en)
      for (int w = 0; w < WPL; w++)
        if (dw_mask[w]) data_mem[dw_idx][w*XLEN +: XLEN] <= dw_line[w*XLEN +: XLEN];
    if (accept)
      dout <= data_mem[r_idx];
  end

  // tags and refill buffer (no reset needed: qualified by valid_q / state)
  always_ff @(posedge clk) begin
    if (state == S_REFILL && mem_gnt) begin
      linebuf[cnt] <= fill_word;
      if (cnt == OFF_W'(WPL - 1)) tag_q[m_idx] <= m_tag;
    end
    if (accept && !hit) begin
      m_tag   <= r_tag;
      m_idx   <= r_idx;
      m_off   <= r_off;
      m_we    <= req_we;
      m_wdata <= req_wdata;
      v_tag   <= tag_q[r_idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      valid_q    <= '0;
      dirty_q    <= '0;
      cnt        <= '0;
      resp_q     <= 1'b0;
      resp_buf_q <= 1'b0;
      off_q      <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          resp_q     <= accept && hit && !req_we;
          resp_buf_q <= 1'b0;
          off_q      <= r_off;
          if (accept) begin
            if (hit) begin
              if (req_we) dirty_q[r_idx] <= 1'b1;
            end else begin
              cnt   <= '0;
              state <= (valid_q[r_idx] && dirty_q[r_idx]) ? S_EVICT : S_REFILL;
            end
          end
        end
        S_EVICT: begin
          if (mem_gnt) begin
            cnt <= cnt + 1'b1;
            if (cnt == OFF_W'(WPL - 1)) state <= S_REFILL;
          end
        end
        S_REFILL: begin
          if (mem_gnt) begin
            cnt <= cnt + 1'b1;
            if (cnt == OFF_W'(WPL - 1)) begin
              valid_q[m_idx] <= 1'b1;
              dirty_q[m_idx] <= m_we;
              resp_q         <= !m_we;
              resp_buf_q     <= 1'b1;
              off_q          <= m_off;
              state          <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign rdata  = resp_buf_q ? linebuf[off_q] : dout[off_q*XLEN +: XLEN];
  assign rvalid = resp_q && !stall;

endmodule
