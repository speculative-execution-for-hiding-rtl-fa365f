// stride_pred: set-associative stride predictor extended with the S (selected) bit.
// Each entry holds a load PC tag, the last effective address, the last stride, a 2-bit
// confidence counter and S. A load is "strided" once the same non-zero stride has been
// seen CONF_TH times in a row. Two lookup ports (decode, prefetch) are combinational.
// Training (one load address per cycle) and the NSPORT S-bit updates from the commit
// stage take effect at the next clock edge; a missing PC is allocated on training with
// round-robin replacement inside its set, while S updates for absent PCs are ignored.
// The 4-way x 512-set geometry and the S bit follow the mechanism's description; the
// confidence rule, indexing (PC bits above bit 2) and replacement are this design's choice.
module stride_pred
  import l2m_pkg::*;
#(
  parameter int SETS    = 512,
  parameter int WAYS    = 4,
  parameter int CONF_TH = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  pc_t      lk_pc   [2],
  output sp_info_t lk_info [2],
  input  logic     tr_valid,
  input  pc_t      tr_pc,
  input  addr_t    tr_addr,
  input  s_upd_t   s_upd [NSPORT]
);
  localparam int IW = $clog2(SETS);
  localparam int WW = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int TW = PC_W - 2 - IW;

  typedef struct packed {
    logic          v;
    logic [TW-1:0] tag;
    addr_t         last;
    addr_t         stride;
    logic [1:0]    conf;
    logic          s;
  } sp_entry_t;

  sp_entry_t       tab [SETS][WAYS];
  logic [WW-1:0]   rr  [SETS];

  function automatic logic [IW-1:0] idx_of(pc_t pc);
    return pc[IW+1:2];
  endfunction
  function automatic logic [TW-1:0] tag_of(pc_t pc);
    return pc[PC_W-1:IW+2];
  endfunction

  // lookups
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      lk_info[p] = '0;
      for (int w = 0; w < WAYS; w++) begin
        if (tab[idx_of(lk_pc[p])][w].v && tab[idx_of(lk_pc[p])][w].tag == tag_of(lk_pc[p])) begin
          lk_info[p].hit       = 1'b1;
          lk_info[p].strided   = (tab[idx_of(lk_pc[p])][w].conf >= 2'(CONF_TH))
                                 && (tab[idx_of(lk_pc[p])][w].stride != '0);
          lk_info[p].s         = tab[idx_of(lk_pc[p])][w].s;
          lk_info[p].last_addr = tab[idx_of(lk_pc[p])][w].last;
          lk_info[p].stride    = tab[idx_of(lk_pc[p])][w].stride;
        end
      end
    end
  end

  // training hit detection
  logic          tr_hit;
  logic [WW-1:0] tr_way;
  always_comb begin
    tr_hit = 1'b0;
    tr_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (tab[idx_of(tr_pc)][w].v && tab[idx_of(tr_pc)][w].tag == tag_of(tr_pc)) begin
        tr_hit = 1'b1;
        tr_way = WW'(w);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SETS; i++) begin
        rr[i] <= '0;
        for (int w = 0; w < WAYS; w++) tab[i][w] <= '0;
      end
    end else begin
      // S-bit updates from the commit stage
      for (int p = 0; p < NSPORT; p++)
        if (s_upd[p].valid && s_upd[p].pc != '0)
          for (int w = 0; w < WAYS; w++)
            if (tab[idx_of(s_upd[p].pc)][w].v && tab[idx_of(s_upd[p].pc)][w].tag == tag_of(s_upd[p].pc))
              tab[idx_of(s_upd[p].pc)][w].s <= s_upd[p].set;
      // training with an executed load address
      if (tr_valid) begin
        if (tr_hit) begin
          automatic sp_entry_t e = tab[idx_of(tr_pc)][tr_way];
          automatic addr_t ns = tr_addr - e.last;
          e.last = tr_addr;
          if (ns == e.stride) begin
            if (e.conf != 2'd3) e.conf = e.conf + 2'd1;
          end else begin
            e.stride = ns;
            e.conf   = 2'd0;
          end
          tab[idx_of(tr_pc)][tr_way].last   <= e.last;
          tab[idx_of(tr_pc)][tr_way].stride <= e.stride;
          tab[idx_of(tr_pc)][tr_way].conf   <= e.conf;
        end else begin
          tab[idx_of(tr_pc)][rr[idx_of(tr_pc)]] <= '{v: 1'b1, tag: tag_of(tr_pc), last: tr_addr,
                                                    stride: '0, conf: 2'd0, s: 1'b0};
          rr[idx_of(tr_pc)] <= rr[idx_of(tr_pc)] + 1'b1;
        end
      end
    end
  end
endmodule
