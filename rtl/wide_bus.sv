// wide_bus: wide data-cache port. Each access reads a whole LINE_BYTES cache line, and
// up to MAX_SERVE (4) pending loads that fall in that line are served by the same access.
// Loads enter a QD-deep request buffer (req_valid/req_ready), kept in arrival order.
// Each cycle the bus is free (acc_ready), the oldest request picks the line, the first
// MAX_SERVE buffered requests in that line leave the buffer together, and the line
// address goes to the cache (acc_valid, acc_line). The cache answers each access in
// order with rsp_valid and the line data; the unit then returns, on MAX_SERVE result
// slots, each served load's tag and its 8-byte word. acc_n reports how many loads an
// access serves. The grouping of up to four loads per line follows the mechanism; the
// buffer, in-order cache interface and 8-byte words are this design's choices.
module wide_bus
  import l2m_pkg::*;
#(
  parameter int LINE_BYTES = 32,
  parameter int MAX_SERVE  = 4,
  parameter int QD         = 8,
  parameter int GD         = 4,     // accesses in flight in the cache
  parameter int TAG_W      = RM_IDX_W + UREG_W
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  output logic       req_ready,
  input  addr_t      req_addr,
  input  logic [TAG_W-1:0] req_tag,
  output logic       acc_valid,
  input  logic       acc_ready,
  output addr_t      acc_line,                 // byte address of the line
  output logic [$clog2(MAX_SERVE+1)-1:0] acc_n,
  input  logic       rsp_valid,
  input  logic [LINE_BYTES*8-1:0] rsp_line,
  output logic       res_valid [MAX_SERVE],
  output logic [TAG_W-1:0] res_tag [MAX_SERVE],
  output data_t      res_data  [MAX_SERVE]
);
  localparam int OFF_W  = $clog2(LINE_BYTES);
  localparam int WORDS  = LINE_BYTES / 8;
  localparam int WSEL_W = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int NW     = $clog2(MAX_SERVE + 1);
  localparam int GW     = $clog2(GD);

  typedef struct packed {
    logic              [MAX_SERVE-1:0] v;
    logic [MAX_SERVE-1:0][TAG_W-1:0]   tag;
    logic [MAX_SERVE-1:0][WSEL_W-1:0]  wsel;
  } group_t;

  logic             bv [QD];
  addr_t            ba [QD];
  logic [TAG_W-1:0] bt [QD];
  group_t           gq [GD];
  logic [GW-1:0]    grp, gwp;
  logic [GW:0]      gcnt;

  function automatic addr_t line_of(addr_t a);
    return {a[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
  endfunction

  logic    take [QD];
  group_t  g;
  logic    fire;
  int      nfree;
  always_comb begin
    automatic int n = 0;
    g = '0;
    for (int i = 0; i < QD; i++) begin
      take[i] = 1'b0;
      if (bv[0] && bv[i] && line_of(ba[i]) == line_of(ba[0]) && n < MAX_SERVE) begin
        take[i]  = 1'b1;
        g.v[n]   = 1'b1;
        g.tag[n] = bt[i];
        g.wsel[n] = WSEL_W'(ba[i][OFF_W-1:3]);
        n++;
      end
    end
    acc_valid = bv[0] && int'(gcnt) < GD;
    acc_line  = line_of(ba[0]);
    acc_n     = acc_valid ? NW'(n) : '0;
    fire      = acc_valid && acc_ready;
    nfree = 0;
    for (int i = 0; i < QD; i++) if (!bv[i] || (fire && take[i])) nfree++;
    req_ready = nfree > 0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < QD; i++) begin bv[i] <= 1'b0; ba[i] <= '0; bt[i] <= '0; end
      for (int i = 0; i < GD; i++) gq[i] <= '0;
      grp <= '0; gwp <= '0; gcnt <= '0;
    end else begin
      automatic int j = 0;
      automatic int c = int'(gcnt);
      // compact the kept requests to the front, then append the new one
      for (int i = 0; i < QD; i++) begin bv[i] <= 1'b0; end
      for (int i = 0; i < QD; i++)
        if (bv[i] && !(fire && take[i])) begin
          bv[j] <= 1'b1; ba[j] <= ba[i]; bt[j] <= bt[i];
          j++;
        end
      if (req_valid && req_ready) begin
        bv[j] <= 1'b1; ba[j] <= req_addr; bt[j] <= req_tag;
      end
      if (fire) begin
        gq[gwp] <= g;
        gwp <= gwp + 1'b1;
        c++;
      end
      if (rsp_valid && gcnt != '0) begin
        grp <= grp + 1'b1;
        c--;
      end
      gcnt <= ($bits(gcnt))'(c);
    end
  end

  always_comb
    for (int s = 0; s < MAX_SERVE; s++) begin
      res_valid[s] = rsp_valid && gcnt != '0 && gq[grp].v[s];
      res_tag[s]   = gq[grp].tag[s];
      res_data[s]  = rsp_line[int'(gq[grp].wsel[s])*64 +: 64];
    end
endmodule
