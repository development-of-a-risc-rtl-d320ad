// cache: set-associative blocking cache, used as the instruction cache
// (4 KiB direct-mapped, WAYS = 1) and the data cache (4 KiB 2-way,
// WAYS = 2); sizes and associativity are the document's.
// The core side holds c_req with a physical address until c_done. A
// cacheable read that hits completes in the same cycle (combinational tag
// compare and data read). A read miss refills the whole LINE_BYTES line with
// one bus read per word, then completes as a hit. Writes are write-through
// without allocation: every write goes to the bus and, when the line is
// present, also updates the cached copy, so memory is always current and
// an instruction cache invalidation (FENCE.I) is all that self-modifying
// code needs. Uncached accesses (c_uncached, used for device registers) go
// straight to the bus. Replacement in the 2-way case is least-recently-used
// with one bit per set. `inval` clears every valid bit, including that of a line whose refill is
// under way. Line size, the
// write policy and the replacement policy are this design's choices.
module cache
  import rv32x_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 4096,
  parameter int unsigned WAYS       = 2,
  parameter int unsigned LINE_BYTES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        c_req,
  input  logic        c_we,
  input  logic        c_uncached,
  input  logic [31:0] c_addr,
  input  logic [31:0] c_wdata,
  input  logic [3:0]  c_wstrb,
  output logic        c_done,
  output logic [31:0] c_rdata,
  input  logic        inval,
  output bus_req_t    bus_req,
  input  bus_rsp_t    bus_rsp
);
  localparam int unsigned SETS = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned WPL  = LINE_BYTES / 4;
  localparam int OW = $clog2(LINE_BYTES);
  localparam int IW = $clog2(SETS);
  localparam int WW = $clog2(WPL);
  localparam int TW = 32 - OW - IW;
  localparam int WYW = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic [31:0]   data  [WAYS][SETS*WPL];
  logic [TW-1:0] tags  [WAYS][SETS];
  logic          vld   [WAYS][SETS];
  logic          lru   [SETS];

  typedef enum logic [1:0] { C_IDLE, C_FILL, C_SINGLE } st_e;
  st_e st;

  logic [IW-1:0] idx;
  logic [TW-1:0] tag;
  logic [WW-1:0] wsel;
  assign idx  = c_addr[OW +: IW];
  assign tag  = c_addr[31 -: TW];
  assign wsel = c_addr[2 +: WW];

  logic           hit;
  logic [WYW-1:0] hway;
  always_comb begin
    hit  = 1'b0;
    hway = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (vld[w][idx] && tags[w][idx] == tag) begin
        hit  = 1'b1;
        hway = WYW'(w);
      end
    end
  end

  // latched request for bus activity
  logic [31:0]    l_addr, l_wdata;
  logic [3:0]     l_wstrb;
  logic           l_we, l_hit;
  logic [WYW-1:0] l_way;
  logic [WW-1:0]  fcnt;
  logic           fill_stale;  // invalidated while this line was being filled

  assign bus_req.valid = (st != C_IDLE);
  assign bus_req.we    = (st == C_SINGLE) && l_we;
  assign bus_req.addr  = (st == C_FILL) ? {l_addr[31:OW], fcnt, 2'b00} : l_addr;
  assign bus_req.wdata = l_wdata;
  assign bus_req.wstrb = (st == C_SINGLE && l_we) ? l_wstrb : 4'b0000;

  logic rd_hit_now;
  assign rd_hit_now = (st == C_IDLE) && c_req && !c_we && !c_uncached && hit;

  always_comb begin
    c_done  = rd_hit_now || (st == C_SINGLE && bus_rsp.ack);
    c_rdata = (st == C_SINGLE) ? bus_rsp.rdata : data[hway][{idx, wsel}];
  end

  logic [IW-1:0] l_idx;
  assign l_idx = l_addr[OW +: IW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE;
      for (int w = 0; w < WAYS; w++)
        for (int s = 0; s < SETS; s++) begin vld[w][s] <= 1'b0; tags[w][s] <= '0; end
      for (int s = 0; s < SETS; s++) lru[s] <= 1'b0;
      l_addr <= '0; l_wdata <= '0; l_wstrb <= '0; l_we <= 1'b0; l_hit <= 1'b0;
      l_way <= '0; fcnt <= '0; fill_stale <= 1'b0;
    end else begin
      if (inval) begin
        for (int w = 0; w < WAYS; w++)
          for (int s = 0; s < SETS; s++) vld[w][s] <= 1'b0;
      end
      unique case (st)
        C_IDLE: begin
          if (rd_hit_now && WAYS > 1) lru[idx] <= (hway == '0);
          if (c_req && !rd_hit_now && !inval) begin
            l_addr  <= c_addr;
            l_wdata <= c_wdata;
            l_wstrb <= c_wstrb;
            l_we    <= c_we;
            l_hit   <= hit && !c_uncached;
            l_way   <= hit ? hway : ((WAYS > 1) ? WYW'(lru[idx]) : '0);
            fcnt    <= '0;
            fill_stale <= 1'b0;
            st      <= (c_we || c_uncached) ? C_SINGLE : C_FILL;
          end
        end
        C_FILL: begin
          if (inval) fill_stale <= 1'b1;
          if (bus_rsp.ack) begin
          data[l_way][{l_idx, fcnt}] <= bus_rsp.rdata;
          if (fcnt == WW'(WPL - 1)) begin
            tags[l_way][l_idx] <= l_addr[31 -: TW];
            vld[l_way][l_idx]  <= !inval && !fill_stale;
            st <= C_IDLE;
          end else begin
            vld[l_way][l_idx] <= 1'b0;
          end
          fcnt <= fcnt + 1'b1;
          end
        end
        C_SINGLE: if (bus_rsp.ack) begin
          if (l_we && l_hit) begin
            for (int b = 0; b < 4; b++)
              if (l_wstrb[b]) data[l_way][{l_idx, l_addr[2 +: WW]}][8*b +: 8] <= l_wdata[8*b +: 8];
          end
          st <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
