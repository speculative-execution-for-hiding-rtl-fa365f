// rm_table: Replication Maps (RM) table, 4-way set associative x 64 sets, indexed by
// PC. Each entry ties a replicated instruction to the set of NREPL upper-level
// registers its replicas write (REGS_ID holds the set number; register k of the set is
// REGS_ID*NREPL + k) and tracks them with the fields NREGS, decode (next replica to be
// validated), commit (replicas validated and committed), issue (replicas not yet
// written back), PC1/PC2 (producer PCs of the sources), AC (branch-mispredict age),
// RANGE (first/last replica address of a load) and SR (value of a non-replicated
// source; for a load it keeps the stride).
//
// Entry life: FREE -> LIVE on allocation -> DRAIN when killed (failed validation, AC
// reaching MAX_AC, a committing store inside RANGE) -> FREE once issue is 0, so that
// registers still being written are never handed out again. Allocation picks, within
// the PC's set, the least recently used entry among the empty and deallocatable ones
// (LIVE with decode == commit and issue == 0); it fails when there is none or no
// register set is free. Register sets are not kept in a free list: a set is busy when
// any non-FREE entry names it, so a mass release needs no extra logic. A set is also
// held (not handed out, not refilled) while an ALU entry whose replicas are not all
// written back reads it as a producer set (PSET1/PSET2, copied at allocation).
// An ALU entry made while its producer's set was partly consumed pairs its replica 0
// with replica OFF1/OFF2 of the producer's set and has NREGS below NREPL.
// When commit reaches NREGS and no replica of the entry is still unwritten, the entry
// is refilled (decode = commit = 0, offsets 0,
// NREGS = NREPL, loads move RANGE on by NREPL strides) and refill_o asks for a new set.
// clr_valid/clr_set name the register sets whose old contents become stale in this
// cycle (the set of a new entry, the set of a refilled entry).
// On a branch misprediction every LIVE entry copies commit into decode and increments AC.
// Committing store addresses are registered once (one extra cycle of store commit
// latency) before the range check.
//
// Lookups and reads are combinational; every update takes effect at the clock edge.
// Field semantics follow the mechanism's description; the DRAIN state, the register-set
// encoding of REGS_ID, the OFF1/OFF2 and PSET1/PSET2 fields, the 8-byte word granularity of the range check, resetting AC on
// validation, and the extra OP/kind fields (needed to rebuild replicas on refill) are
// this design's choices.
module rm_table
  import l2m_pkg::*;
#(
  parameter int NWB = 5,   // replica write-back ports
  parameter int NST = 2    // committing stores per cycle
) (
  input  logic      clk,
  input  logic      rst_n,
  // decode lookup by PC (LIVE entries only)
  input  pc_t       dk_pc,
  output logic      dk_hit,
  output rm_idx_t   dk_idx,
  output rm_entry_t dk_ent,
  // producer lookups by PC (replica generator and decode validation)
  input  pc_t       pk_pc  [NPK],
  output logic      pk_hit [NPK],
  output rm_entry_t pk_ent [NPK],
  // read by index
  input  rm_idx_t   rd_idx,
  output rm_entry_t rd_ent,
  // allocation
  input  rm_alloc_t al,
  output logic      al_ok,
  output rm_idx_t   al_idx,
  input  logic      gen_space,   // replica generator can take a request
  // decode-side updates
  input  logic      adv_valid,
  input  rm_idx_t   adv_idx,
  input  logic      kill_valid,
  input  rm_idx_t   kill_idx,
  // commit of a validated instruction
  input  logic      cm_valid,
  input  rm_idx_t   cm_idx,
  output logic      refill_o,
  output rm_idx_t   refill_idx,
  // register sets whose contents become stale (new allocation, refill)
  output logic      clr_valid [2],
  output logic [USET_W-1:0] clr_set [2],
  // replica write-backs
  input  logic      wb_valid [NWB],
  input  rm_idx_t   wb_idx   [NWB],
  // replica generator could not build an entry
  input  logic      abort_valid,
  input  rm_idx_t   abort_idx,
  // branch misprediction and committing stores
  input  logic      br_mis,
  input  st_commit_t st [NST],
  output logic      ev_store_kill,
  output logic      ev_ac_kill
);
  localparam int SW = $clog2(RM_SETS);
  localparam int WW = $clog2(RM_WAYS);

  rm_entry_t      ent [RM_N];
  logic [WW-1:0]  age [RM_SETS][RM_WAYS];
  st_commit_t     st_q [NST];

  function automatic logic [SW-1:0] set_of(pc_t pc);
    return pc[SW+1:2];
  endfunction

  // ---------------- lookups ----------------
  function automatic logic [RM_IDX_W:0] find(pc_t pc);
    logic [RM_IDX_W:0] r = '0;
    for (int w = 0; w < RM_WAYS; w++) begin
      automatic int i = int'(set_of(pc)) * RM_WAYS + w;
      if (ent[i].st == RM_LIVE && ent[i].pc == pc && pc != '0) r = {1'b1, RM_IDX_W'(i)};
    end
    return r;
  endfunction

  always_comb begin
    {dk_hit, dk_idx} = find(dk_pc);
    dk_ent = ent[dk_idx];
  end
  for (genvar p = 0; p < NPK; p++) begin : g_pk
    rm_idx_t pk_idx;
    always_comb begin
      {pk_hit[p], pk_idx} = find(pk_pc[p]);
      pk_ent[p] = ent[pk_idx];
    end
  end
  assign rd_ent = ent[rd_idx];

  // ---------------- allocation ----------------
  logic [USETS-1:0]  set_busy, ref_busy;
  logic              free_set_ok;
  logic [USET_W-1:0] free_set;
  logic              victim_ok, victim_has_set;
  logic [WW-1:0]     victim_way;

  function automatic logic candidate(rm_entry_t e);
    return (e.st == RM_FREE) || (e.issue == '0 && (e.st == RM_DRAIN || e.decode == e.commit));
  endfunction

  always_comb begin
    set_busy = '0;
    ref_busy = '0;
    for (int i = 0; i < RM_N; i++) begin
      if (ent[i].st != RM_FREE) set_busy[ent[i].regs_id] = 1'b1;
      // a producer's set stays untouched while replicas reading it are outstanding
      if (ent[i].st != RM_FREE && ent[i].kind == RK_ALU && ent[i].issue != '0) begin
        if (ent[i].pc1 != '0) ref_busy[ent[i].pset1] = 1'b1;
        if (ent[i].pc2 != '0) ref_busy[ent[i].pset2] = 1'b1;
      end
    end
    set_busy = set_busy | ref_busy;
    free_set_ok = 1'b0;
    free_set    = '0;
    for (int s = USETS - 1; s >= 0; s--)
      if (!set_busy[s]) begin
        free_set_ok = 1'b1;
        free_set    = USET_W'(s);
      end
    victim_ok  = 1'b0;
    victim_way = '0;
    for (int w = 0; w < RM_WAYS; w++) begin
      automatic int i = int'(set_of(al.pc)) * RM_WAYS + w;
      if (candidate(ent[i]) &&
          (!victim_ok || age[set_of(al.pc)][w] > age[set_of(al.pc)][victim_way])) begin
        victim_ok  = 1'b1;
        victim_way = WW'(w);
      end
    end
    al_idx         = RM_IDX_W'(int'(set_of(al.pc)) * RM_WAYS + int'(victim_way));
    victim_has_set = ent[al_idx].st != RM_FREE && !ref_busy[ent[al_idx].regs_id];
    al_ok          = victim_ok && gen_space && (victim_has_set || free_set_ok);
    clr_valid[0]   = al.valid && al_ok;
    clr_set[0]     = victim_has_set ? ent[al_idx].regs_id : free_set;
  end

  // ---------------- refill on commit ----------------
  always_comb begin
    refill_o   = cm_valid && ent[cm_idx].st == RM_LIVE && ent[cm_idx].issue == '0 &&
                 !ref_busy[ent[cm_idx].regs_id] &&
                 (ent[cm_idx].commit + 1'b1) == ent[cm_idx].nregs && gen_space;
    refill_idx = cm_idx;
    clr_valid[1] = refill_o;
    clr_set[1]   = ent[cm_idx].regs_id;
  end

  // ---------------- write-back counting ----------------
  logic [CNT_W-1:0] wb_cnt [RM_N];
  always_comb begin
    for (int i = 0; i < RM_N; i++) begin
      wb_cnt[i] = '0;
      for (int p = 0; p < NWB; p++)
        if (wb_valid[p] && wb_idx[p] == RM_IDX_W'(i)) wb_cnt[i] = wb_cnt[i] + 1'b1;
    end
  end

  // store range hits (registered store addresses)
  function automatic logic in_range(rm_entry_t e, addr_t a);
    automatic addr_t lo = (e.range_first < e.range_last) ? e.range_first : e.range_last;
    automatic addr_t hi = (e.range_first < e.range_last) ? e.range_last  : e.range_first;
    return (a >> 3) >= (lo >> 3) && (a >> 3) <= (hi >> 3);
  endfunction

  logic [RM_N-1:0] st_hit;
  always_comb begin
    for (int i = 0; i < RM_N; i++) begin
      st_hit[i] = 1'b0;
      for (int p = 0; p < NST; p++)
        if (st_q[p].valid && ent[i].st == RM_LIVE && ent[i].kind == RK_LOAD &&
            in_range(ent[i], st_q[p].addr))
          st_hit[i] = 1'b1;
    end
  end
  assign ev_store_kill = |st_hit;

  always_comb begin
    ev_ac_kill = 1'b0;
    for (int i = 0; i < RM_N; i++)
      if (br_mis && ent[i].st == RM_LIVE && 32'(ent[i].ac) + 1 >= MAX_AC) ev_ac_kill = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RM_N; i++) ent[i] <= '0;
      for (int s = 0; s < RM_SETS; s++)
        for (int w = 0; w < RM_WAYS; w++) age[s][w] <= WW'(w);
      for (int p = 0; p < NST; p++) st_q[p] <= '0;
    end else begin
      st_q <= st;
      for (int i = 0; i < RM_N; i++) begin
        automatic rm_entry_t e = ent[i];
        e.issue = e.issue - wb_cnt[i];
        if (br_mis && e.st == RM_LIVE) begin
          e.decode = e.commit;
          if (32'(e.ac) + 1 >= MAX_AC) e.st = RM_DRAIN;
          else e.ac = e.ac + 1'b1;
        end
        if (st_hit[i]) e.st = RM_DRAIN;
        if (cm_valid && cm_idx == RM_IDX_W'(i) && e.st == RM_LIVE) begin
          if (refill_o) begin
            e.decode = '0;
            e.commit = '0;
            e.off1   = '0;
            e.off2   = '0;
            e.nregs  = CNT_W'(NREPL);
            e.issue  = e.issue + CNT_W'(NREPL);
            if (e.kind == RK_LOAD) begin
              e.range_first = e.range_last + addr_t'(e.sr);
              e.range_last  = e.range_last + addr_t'(e.sr) * addr_t'(e.nregs);
            end
          end else begin
            e.commit = e.commit + 1'b1;
            if (e.decode < e.commit) e.decode = e.commit;
          end
        end
        if (adv_valid && adv_idx == RM_IDX_W'(i) && e.st == RM_LIVE && e.decode < e.nregs) begin
          e.decode = e.decode + 1'b1;
          e.ac     = '0;
        end
        if (kill_valid && kill_idx == RM_IDX_W'(i) && e.st == RM_LIVE) e.st = RM_DRAIN;
        if (abort_valid && abort_idx == RM_IDX_W'(i)) begin
          e.st    = RM_FREE;
          e.issue = '0;
        end
        if (e.st == RM_DRAIN && e.issue == '0) e.st = RM_FREE;
        ent[i] <= e;
      end
      if (al.valid && al_ok) begin
        automatic rm_entry_t n = '0;
        n.st          = RM_LIVE;
        n.pc          = al.pc;
        n.kind        = al.kind;
        n.op          = al.op;
        n.regs_id     = victim_has_set ? ent[al_idx].regs_id : free_set;
        n.nregs       = al.nregs;
        n.issue       = al.nregs;
        n.off1        = al.off1;
        n.off2        = al.off2;
        n.pc1         = al.pc1;
        n.pc2         = al.pc2;
        n.pset1       = al.pset1;
        n.pset2       = al.pset2;
        n.sr          = al.sr;
        n.range_first = al.first;
        n.range_last  = al.first + addr_t'(al.sr) * addr_t'(NREPL - 1);
        ent[al_idx]  <= n;
      end
      // LRU: the allocated or validated way becomes the most recent of its set
      for (int u = 0; u < 2; u++) begin
        automatic logic    do_t = (u == 0) ? (al.valid && al_ok) : adv_valid;
        automatic rm_idx_t ti   = (u == 0) ? al_idx : adv_idx;
        if (do_t && !(u == 1 && al.valid && al_ok && al_idx[RM_IDX_W-1:WW] == adv_idx[RM_IDX_W-1:WW])) begin
          for (int w = 0; w < RM_WAYS; w++)
            if (age[ti[RM_IDX_W-1:WW]][w] < age[ti[RM_IDX_W-1:WW]][ti[WW-1:0]])
              age[ti[RM_IDX_W-1:WW]][w] <= age[ti[RM_IDX_W-1:WW]][w] + 1'b1;
          age[ti[RM_IDX_W-1:WW]][ti[WW-1:0]] <= '0;
        end
      end
    end
  end
endmodule
