// tb_rm_table: exercises the Replication Maps table: allocation fields, write-back
// counting on several ports, decode/commit counters, refill when commit reaches NREGS,
// branch mispredictions (decode <- commit, AC, kill at MAX_AC), kill by a committing
// store inside RANGE (one cycle after it is presented), draining of killed entries until
// their replicas are written back, LRU choice among deallocatable ways, refusal when a
// set has no candidate, abort, distinct register sets for live entries, the register
// sets reported stale on allocation and refill, and that a set read by outstanding
// ALU replicas is neither given to a new entry nor refilled.
module tb_rm_table;
  import l2m_pkg::*;
  logic clk = 0, rst_n = 0;
  pc_t dk_pc; logic dk_hit; rm_idx_t dk_idx; rm_entry_t dk_ent;
  pc_t pk_pc [NPK]; logic pk_hit [NPK]; rm_entry_t pk_ent [NPK];
  rm_idx_t rd_idx; rm_entry_t rd_ent;
  rm_alloc_t al; logic al_ok; rm_idx_t al_idx; logic gen_space;
  logic adv_valid, kill_valid, cm_valid, refill_o, abort_valid, br_mis;
  rm_idx_t adv_idx, kill_idx, cm_idx, refill_idx, abort_idx;
  logic wb_valid [5]; rm_idx_t wb_idx [5];
  st_commit_t st [2];
  logic ev_store_kill, ev_ac_kill;
  logic clr_valid [2]; logic [USET_W-1:0] clr_set [2];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rm_table dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask
  task automatic look(input pc_t p); dk_pc = p; #1; endtask
  task automatic alloc_load(input pc_t p, input addr_t first, input addr_t stride, output rm_idx_t idx);
    al = '0; al.valid = 1; al.pc = p; al.kind = RK_LOAD; al.nregs = 4; al.first = first; al.sr = data_t'(stride);
    #1 chk(al_ok && clr_valid[0], $sformatf("alloc ok %h", p));
    clr_s = clr_set[0]; idx = al_idx; tick(); al = '0;
  endtask
  task automatic wb_all(input rm_idx_t idx, input int n);
    for (int p = 0; p < 5; p++) begin wb_valid[p] = p < n; wb_idx[p] = idx; end
    tick(); for (int p = 0; p < 5; p++) wb_valid[p] = 0;
  endtask
  task automatic adv(input rm_idx_t idx); adv_valid = 1; adv_idx = idx; tick(); adv_valid = 0; endtask
  task automatic cm(input rm_idx_t idx); cm_valid = 1; cm_idx = idx; tick(); cm_valid = 0; endtask

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam pc_t A = 32'h0000_1010;
  logic [USET_W-1:0] clr_s;
  initial begin
    automatic rm_idx_t ia, ib, iv [4];
    automatic logic [USET_W-1:0] sets_seen [int];
    automatic logic r;
    dk_pc = 0; for (int j = 0; j < NPK; j++) pk_pc[j] = 0; rd_idx = 0; al = '0; gen_space = 1;
    adv_valid = 0; kill_valid = 0; cm_valid = 0; abort_valid = 0; br_mis = 0;
    adv_idx = 0; kill_idx = 0; cm_idx = 0; abort_idx = 0;
    for (int p = 0; p < 5; p++) begin wb_valid[p] = 0; wb_idx[p] = 0; end
    st[0] = '0; st[1] = '0;
    #12 rst_n = 1; tick();
    look(A); chk(!dk_hit, "empty");
    // --- allocation fields
    alloc_load(A, 32'h2000, 8, ia);
    look(A);
    chk(dk_hit && dk_idx == ia && dk_ent.nregs == 4 && dk_ent.issue == 4 && dk_ent.decode == 0 &&
        dk_ent.commit == 0 && dk_ent.range_first == 32'h2000 && dk_ent.range_last == 32'h2018 &&
        dk_ent.kind == RK_LOAD && dk_ent.ac == 0, "fields after alloc");
    chk(dk_ent.regs_id == clr_s, "the new entry's register set is cleared");
    pk_pc[3] = A; #1 chk(pk_hit[3] && pk_ent[3].pc == A && !pk_hit[0], "producer port");
    rd_idx = ia; #1 chk(rd_ent.pc == A, "read by index");
    wb_all(ia, 3); look(A); chk(dk_ent.issue == 1, "three write-backs in one cycle");
    wb_all(ia, 1); look(A); chk(dk_ent.issue == 0, "issue reaches 0");
    // --- decode / commit / branch mispredictions
    adv(ia); adv(ia); cm(ia);
    look(A); chk(dk_ent.decode == 2 && dk_ent.commit == 1, "decode 2 commit 1");
    br_mis = 1; #1 chk(!ev_ac_kill, "first mispredict keeps entry"); tick(); br_mis = 0;
    look(A); chk(dk_hit && dk_ent.decode == 1 && dk_ent.ac == 1, "decode <- commit, AC 1");
    br_mis = 1; #1 chk(ev_ac_kill, "AC reaches MAX_AC"); tick(); br_mis = 0;
    look(A); chk(!dk_hit, "entry released at MAX_AC");
    // --- refill
    alloc_load(A, 32'h3000, 16, ia);
    wb_all(ia, 4);
    repeat (4) adv(ia);
    look(A); chk(dk_ent.decode == 4, "all replicas used");
    adv(ia); look(A); chk(dk_ent.decode == 4, "decode saturates at NREGS");
    repeat (3) cm(ia);
    cm_valid = 1; cm_idx = ia; #1 chk(refill_o && refill_idx == ia && clr_valid[1] && clr_set[1] == dk_ent.regs_id, "refill request"); tick(); cm_valid = 0;
    look(A);
    chk(dk_ent.decode == 0 && dk_ent.commit == 0 && dk_ent.issue == 4 &&
        dk_ent.range_first == 32'h3040 && dk_ent.range_last == 32'h3070, "refilled set");
    wb_all(ia, 4);
    // --- ALU entry with a partial set: refill restores NREGS and clears the offsets
    al = '0; al.valid = 1; al.pc = 32'h0000_2020; al.kind = RK_ALU; al.pc1 = A; al.off1 = 2; al.nregs = 2;
    #1 ib = al_idx; tick(); al = '0;
    look(32'h0000_2020); chk(dk_hit && dk_ent.nregs == 2 && dk_ent.issue == 2 && dk_ent.off1 == 2, "partial ALU set");
    wb_all(ib, 2); adv(ib); adv(ib); cm(ib);
    cm_valid = 1; cm_idx = ib; #1 chk(refill_o, "refill after NREGS commits"); tick(); cm_valid = 0;
    look(32'h0000_2020); chk(dk_ent.nregs == 4 && dk_ent.off1 == 0 && dk_ent.issue == 4, "full set after refill");
    wb_all(ib, 4);
    // --- store inside RANGE kills (one cycle later), outside does not
    st[0] = '{valid: 1, addr: 32'h2000}; tick(); st[0] = '0; tick();
    look(A); chk(dk_hit, "store outside range");
    st[1] = '{valid: 1, addr: 32'h3054}; tick(); st[1] = '0;
    look(A); chk(dk_hit, "store check one cycle late");
    #1 chk(ev_store_kill, "store kill event"); tick();
    look(A); chk(!dk_hit, "store inside range kills");
    // --- kill with replicas outstanding: registers stay busy until written back
    alloc_load(A, 32'h4000, 8, ia);
    rd_idx = ia; #1;
    kill_valid = 1; kill_idx = ia; tick(); kill_valid = 0;
    look(A); chk(!dk_hit && rd_ent.st == RM_DRAIN, "drain while issue > 0");
    wb_all(ia, 4); tick(); #1 chk(rd_ent.st == RM_FREE, "freed after write-backs");
    // --- victim choice: four ways of one set
    for (int w = 0; w < 4; w++) alloc_load(A + pc_t'(256 * w), 32'h5000, 8, iv[w]);
    al = '0; al.valid = 0; al.pc = A + 32'h400; #1 chk(!al_ok, "no candidate while replicas pending");
    wb_all(iv[2], 4); wb_all(iv[1], 4);
    al.pc = A + 32'h400; #1 chk(al_ok && al_idx == iv[1], "LRU among deallocatable ways");
    adv(iv[1]);
    al.pc = A + 32'h400; #1 chk(al_ok && al_idx == iv[2], "decode != commit is not deallocatable");
    gen_space = 0; #1 chk(!al_ok, "no allocation without generator space"); gen_space = 1;
    // --- abort
    abort_valid = 1; abort_idx = iv[3]; tick(); abort_valid = 0;
    look(A + 32'h300); chk(!dk_hit, "abort frees");
    // --- a set read by outstanding ALU replicas is neither handed out nor refilled
    begin
      automatic rm_idx_t ix, iy, iz, iw;
      automatic logic [USET_W-1:0] sx, sz;
      alloc_load(32'h7000, 32'h9000, 8, ix); wb_all(ix, 4);
      rd_idx = ix; #1 sx = rd_ent.regs_id;
      al = '0; al.valid = 1; al.pc = 32'h7104; al.kind = RK_ALU; al.pc1 = 32'h7000; al.pset1 = sx; al.nregs = 4;
      #1 iy = al_idx; tick(); al = '0;
      kill_valid = 1; kill_idx = ix; tick(); kill_valid = 0;
      rd_idx = ix; #1 chk(rd_ent.st == RM_FREE, "producer entry released");
      alloc_load(32'h7208, 32'h9800, 8, iz);
      rd_idx = iz; #1 chk(rd_ent.regs_id != sx && clr_s != sx, "referenced set not reused");
      wb_all(iz, 4); repeat (4) adv(iz);
      rd_idx = iz; #1 sz = rd_ent.regs_id;
      al = '0; al.valid = 1; al.pc = 32'h730c; al.kind = RK_ALU; al.pc1 = 32'h7208; al.pset1 = sz; al.nregs = 4;
      #1 iw = al_idx; tick(); al = '0;
      repeat (3) cm(iz);
      cm_valid = 1; cm_idx = iz; #1 chk(!refill_o && !clr_valid[1], "referenced set not refilled"); tick(); cm_valid = 0;
      wb_all(iy, 4); wb_all(iw, 4);
    end
    // --- distinct register sets for many live entries
    for (int i = 0; i < 100; i++) begin
      automatic rm_idx_t x;
      alloc_load(32'h8000 + pc_t'(4 * i), 32'h0, 4, x);
    end
    r = 1;
    for (int i = 0; i < RM_N; i++) begin
      rd_idx = rm_idx_t'(i); #1;
      if (rd_ent.st != RM_FREE) begin
        if (sets_seen.exists(int'(rd_ent.regs_id))) r = 0;
        sets_seen[int'(rd_ent.regs_id)] = 1;
      end
    end
    chk(r && sets_seen.num() >= 100, "distinct register sets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
