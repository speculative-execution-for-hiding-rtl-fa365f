// decode_ctrl: decode-stage decisions of the mechanism (third and fourth steps), purely
// combinational, one instruction per cycle.
//  * Validation: when the instruction's PC hits a LIVE Replication Maps entry, its
//    replicas are checked. A load checks that the stride predictor still reports the
//    stride kept in the entry. An ALU instruction checks, for each source that was
//    replicated when the entry was made (PC1/PC2 non-zero), that the rename map still
//    marks the source as replicated (R) with the same producer PC (PPC); for its
//    non-replicated source it checks that the operand value is known and equals SR.
//    It also checks that each replicated producer, looked up by PPC in the RM table,
//    still owns the register set the entry reads and has just used the replica
//    paired with the one about to be reused
//    (producer decode - 1 == OFFj + decode), so that a producer re-made or refilled
//    out of step invalidates its consumers.
//    On success, if a replica is still unused (decode < NREGS), the instruction reuses
//    upper-level register REGS_ID*NREPL + decode (reuse_o, adv_o) and skips execution.
//    On failure the entry is killed and a fresh replication is attempted; the same
//    happens to an entry whose replicas were all used and committed without a refill.
//  * Replication: a load the stride predictor calls strided and whose S bit is set, or an
//    ALU instruction with at least one source marked R (and its other source value
//    known), requests a new RM entry. An ALU entry starts at the producers' current
//    decode positions (OFF1/OFF2) and gets as many replicas as they have left. A load's replicas start at last address + 2 strides
//    (the decoding instance itself is taken to be last address + 1 stride).
//  * wr_repl_o tells the rename map to set R and PPC for the destination.
// Because the check is made before the instruction is marked as reusing, a failed
// check needs no recovery here: the instruction simply executes. Requiring a known
// operand value for the SR check, the producer alignment check and offsets, and the
// replica address offset are this design's choices.
module decode_ctrl
  import l2m_pkg::*;
(
  input  dec_inst_t di,
  input  sp_info_t  sp,
  input  rmap_ext_t src_f [2],
  input  logic      rm_hit,
  input  rm_idx_t   rm_idx,
  input  rm_entry_t rm_ent,
  input  logic      prod_hit [2],   // RM lookups of the sources' PPC
  input  rm_entry_t prod_ent [2],
  input  logic      al_ok,
  output rm_alloc_t al,
  output logic      alloc_o,      // replication started (allocation succeeded)
  output logic      adv_o,
  output logic      kill_o,
  output logic      reuse_o,
  output ureg_t     reuse_reg,
  output logic      wr_repl_o
);
  logic is_load, is_alu, hit, val_ok, want;
  logic [1:0] sv, r, rdy;
  pc_t  [1:0] epc;
  data_t [1:0] val;

  always_comb begin
    is_load = di.valid && di.cls == CLS_LOAD && di.dst_v;
    is_alu  = di.valid && di.cls == CLS_ALU && di.dst_v;
    sv  = {di.src2_v, di.src1_v};
    rdy = {di.src2_rdy, di.src1_rdy};
    val = {di.src2_val, di.src1_val};
    r   = {src_f[1].r & di.src2_v, src_f[0].r & di.src1_v};
    epc = {rm_ent.pc2, rm_ent.pc1};
    hit = (is_load || is_alu) && rm_hit;

    // validation
    if (is_load) begin
      val_ok = rm_ent.kind == RK_LOAD && sp.hit && sp.stride == addr_t'(rm_ent.sr);
    end else begin
      val_ok = rm_ent.kind == RK_ALU;
      for (int j = 0; j < 2; j++) begin
        if (epc[j] != '0) begin
          if (!(r[j] && src_f[j].ppc == epc[j])) val_ok = 1'b0;
          // the producer must be at the replica paired with ours
          if (!prod_hit[j] || prod_ent[j].decode == '0 ||
              prod_ent[j].regs_id != ((j == 0) ? rm_ent.pset1 : rm_ent.pset2) ||
              prod_ent[j].decode - 1'b1 != ((j == 0) ? rm_ent.off1 : rm_ent.off2) + rm_ent.decode)
            val_ok = 1'b0;
        end else if (sv[j]) begin
          if (r[j] || !rdy[j] || val[j] != rm_ent.sr) val_ok = 1'b0;
        end
      end
    end
    reuse_o   = hit && val_ok && rm_ent.decode < rm_ent.nregs;
    adv_o     = reuse_o;
    // a fully used entry that could not be refilled is replaced
    kill_o    = hit && (!val_ok || (rm_ent.decode == rm_ent.nregs && rm_ent.commit == rm_ent.nregs));
    reuse_reg = ureg_t'(int'(rm_ent.regs_id) * NREPL + int'(rm_ent.decode));

    // replication request
    al = '0;
    al.pc = di.pc;
    al.op = di.op;
    if (is_load) begin
      want     = sp.hit && sp.strided && sp.s;
      al.kind  = RK_LOAD;
      al.nregs = CNT_W'(NREPL);
      al.first = sp.last_addr + (sp.stride << 1);
      al.sr    = data_t'(sp.stride);
    end else begin
      want    = is_alu && (r != 2'b00);
      al.kind = RK_ALU;
      al.pc1  = r[0] ? src_f[0].ppc : '0;
      al.pc2  = r[1] ? src_f[1].ppc : '0;
      al.off1 = r[0] ? prod_ent[0].decode : '0;
      al.off2 = r[1] ? prod_ent[1].decode : '0;
      al.pset1 = prod_ent[0].regs_id;
      al.pset2 = prod_ent[1].regs_id;
      al.nregs = CNT_W'(NREPL);
      for (int j = 0; j < 2; j++)
        if (r[j]) begin
          if (!prod_hit[j] || prod_ent[j].decode >= prod_ent[j].nregs) want = 1'b0;
          else if (prod_ent[j].nregs - prod_ent[j].decode < al.nregs)
            al.nregs = prod_ent[j].nregs - prod_ent[j].decode;
        end
      for (int j = 0; j < 2; j++)
        if (sv[j] && !r[j]) begin
          if (!rdy[j]) want = 1'b0;
          al.sr = val[j];
        end
    end
    al.valid  = want && (!hit || kill_o);
  end
  assign alloc_o   = al.valid && al_ok;
  assign wr_repl_o = (hit && val_ok && !kill_o) || alloc_o;
endmodule
