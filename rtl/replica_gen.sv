// replica_gen: builds the replica micro-ops of replicated instructions. Requests (an RM
// entry index) arrive on two push ports, from a new allocation at decode and from a
// refill at commit, into a GQ-deep FIFO; space_o is high while two more fit. For the head
// request it emits NREGS micro-ops (k = 0..NREGS-1), one per cycle while uop_ready is high:
//   * load:  address range_first + k*stride, destination REGS_ID*NREPL + k;
//   * ALU:   each replicated source reads register PSETj*NREPL + OFFj + k (the producer's
//            set recorded at allocation), the other source is SR;
//            destination REGS_ID*NREPL + k.
// Entry fields are sampled when replica 0 is emitted and held for the rest of the set,
// so a refill of the same entry cannot disturb a set in progress. If a producer (looked
// up by PC1/PC2) is no longer in the table or no longer owns the recorded set, the
// entry is returned (abort_o) before any replica leaves. The FIFO and one-replica-per-cycle rate are this design's choices.
module replica_gen
  import l2m_pkg::*;
#(
  parameter int GQ = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push0, push1,
  input  rm_idx_t   push0_idx, push1_idx,
  output logic      space_o,
  // RM table access
  output rm_idx_t   rd_idx,
  input  rm_entry_t rd_ent,
  output pc_t       prod_pc [2],
  input  logic      prod_hit [2],
  input  rm_entry_t prod_ent [2],
  output logic      abort_o,
  output rm_idx_t   abort_idx,
  // replica output
  output replica_t  uop,
  input  logic      uop_ready
);
  localparam int QW = $clog2(GQ);

  rm_idx_t          q [GQ];
  logic [QW-1:0]    rp, wp;
  logic [QW:0]      cnt;
  logic             busy;
  rm_idx_t          cur;
  logic [CNT_W-1:0] k;
  rm_entry_t        snap;

  rm_entry_t         e;
  logic [USET_W-1:0] pset [2];
  logic              prod_ok;

  assign space_o = int'(cnt) <= GQ - 2;
  assign rd_idx  = cur;

  assign e          = (k == '0) ? rd_ent : snap;
  assign prod_pc[0] = e.pc1;
  assign prod_pc[1] = e.pc2;

  always_comb begin
    prod_ok = 1'b1;
    for (int j = 0; j < 2; j++) begin
      pset[j] = (j == 0) ? e.pset1 : e.pset2;
      if (k == '0 && e.kind == RK_ALU && prod_pc[j] != '0 &&
          (!prod_hit[j] || prod_ent[j].regs_id != pset[j])) prod_ok = 1'b0;
    end
    abort_o   = busy && k == '0 && !prod_ok;
    abort_idx = cur;

    uop        = '0;
    uop.valid  = busy && prod_ok && e.st != RM_FREE;
    uop.kind   = e.kind;
    uop.op     = e.op;
    uop.pc     = e.pc;
    uop.rm_idx = cur;
    uop.dst    = ureg_t'(int'(e.regs_id) * NREPL + int'(k));
    uop.addr   = e.range_first + addr_t'(e.sr) * addr_t'(k);
    uop.s1_ureg = e.kind == RK_ALU && e.pc1 != '0;
    uop.s2_ureg = e.kind == RK_ALU && e.pc2 != '0;
    uop.s1_reg  = ureg_t'(int'(pset[0]) * NREPL + int'(e.off1) + int'(k));
    uop.s2_reg  = ureg_t'(int'(pset[1]) * NREPL + int'(e.off2) + int'(k));
    uop.s1_val  = e.sr;
    uop.s2_val  = e.sr;
  end

  logic pop;
  logic done;
  assign done = busy && (abort_o || e.st == RM_FREE || (uop.valid && uop_ready && k == e.nregs - 1'b1));
  assign pop  = (!busy || done) && cnt != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; cnt <= '0;
      busy <= 1'b0; cur <= '0; k <= '0; snap <= '0;
      for (int i = 0; i < GQ; i++) q[i] <= '0;
    end else begin
      automatic logic [QW-1:0] w = wp;
      automatic int c = int'(cnt);
      if (push0) begin q[w] <= push0_idx; w = w + 1'b1; c = c + 1; end
      if (push1) begin q[w] <= push1_idx; w = w + 1'b1; c = c + 1; end
      if (pop) begin
        cur  <= q[rp];
        rp   <= rp + 1'b1;
        busy <= 1'b1;
        k    <= '0;
        c = c - 1;
      end else if (done) begin
        busy <= 1'b0;
        k    <= '0;
      end else if (uop.valid && uop_ready) begin
        k <= k + 1'b1;
      end
      if (busy && k == '0 && uop.valid && uop_ready) begin
        snap     <= rd_ent;
      end
      wp  <= w;
      cnt <= ($bits(cnt))'(c);
    end
  end
endmodule
