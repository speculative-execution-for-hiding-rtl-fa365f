// tb_l2miss_top: end-to-end run of the mechanism, at its default sizes, with this
// testbench playing the core. The core runs a loop whose body is
//   SL1: r1 = load [A1 + 8n]   (strided)      SL2: r2 = load [A2 + 64n] (strided, unused)
//   SL3: r3 = load [A3 + 16n]  (strided)      L2M: r5 = load [pointer]  (misses L2)
//   IS1: r6 = r1 + r20         IS2: r7 = r3 + r20
//   DEP: r8 = r5 + r1          IS3: r9 = r7 + r21
//   BR,  ST: store [A4 + 8n]
// decoding one instruction per cycle and committing it one cycle later. Load replicas
// are served by a two-cycle data-cache model, ALU replicas are executed by a model that
// waits until their upper-level sources are written. Every reused value that comes back
// from the upper register file is compared with the value the instruction would
// compute. Along the way the test changes r20 (failed validation), commits a store into
// a replicated range, mispredicts branches, lets a load hit L2 (deselection) and sends
// L2 misses of a strided load to the prefetcher; each mechanism is counted and must
// have happened. After the loop's missing load hits L2 for a few iterations, SL1 must
// not be replicated again until that load misses again. The data-cache port is busy
// three cycles in eight so that load replicas group into wide accesses.
module tb_l2miss_top;
  import l2m_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dec_inst_t  dec_i;
  logic [7:0] dec_ltag;
  logic       dec_reuse, dec_replicated;
  ureg_t      dec_reuse_reg;
  rm_idx_t    dec_rm_idx;
  pc_t        dec_rob_spc [NSPORT];
  logic       cp_rsp_valid [4];
  logic [7:0] cp_rsp_tag [4];
  data_t      cp_rsp_data [4];
  logic       ld_train_valid;
  pc_t        ld_train_pc;
  addr_t      ld_train_addr;
  cmt_inst_t  cmt_i;
  st_commit_t st_i [2];
  logic       br_mis, l2miss_valid, pf_valid, pf_ready;
  pc_t        l2miss_pc;
  addr_t      l2miss_addr, pf_addr;
  replica_t   alu_uop_o;
  logic       alu_uop_ready;
  rwb_t       alu_wb_i;
  ureg_t      urf_rd_reg [2];
  data_t      urf_rd_data [2];
  logic       dc_acc_valid, dc_acc_ready, dc_rsp_valid;
  addr_t      dc_acc_line;
  logic [2:0] dc_acc_n;
  logic [255:0] dc_rsp_line;
  logic ev_sel, ev_desel, ev_s_upd, ev_alloc, ev_reuse, ev_kill;
  logic ev_refill, ev_abort, ev_store_kill, ev_ac_kill, ev_pf_drop;

  l2miss_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // ---------------- memory and data cache ----------------
  function automatic data_t mem(addr_t a);
    addr_t w = {a[31:3], 3'b000};
    return {w ^ 32'h5A5A_0000, w};
  endfunction
  logic v1, v2; addr_t l1, l2;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin v1 <= 0; v2 <= 0; l1 <= 0; l2 <= 0; end
    else begin v1 <= dc_acc_valid && dc_acc_ready; l1 <= dc_acc_line; v2 <= v1; l2 <= l1; end
  always_comb begin
    dc_rsp_valid = v2;
    for (int w = 0; w < 4; w++) dc_rsp_line[w*64 +: 64] = mem(l2 + addr_t'(8 * w));
  end
  // the cache port is taken by other traffic in 3 of every 8 cycles, so load replicas
  // queue up and several can share one line access
  logic [2:0] dc_busy_cnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dc_busy_cnt <= '0; else dc_busy_cnt <= dc_busy_cnt + 1'b1;
  assign dc_acc_ready = dc_busy_cnt < 3'd5;
  assign pf_ready = 1'b1;

  // ---------------- ALU replica execution ----------------
  replica_t aq [$];
  rwb_t     wb_next;
  assign alu_uop_ready = aq.size() < 16;
  always_comb begin
    urf_rd_reg[0] = aq.size() > 0 ? aq[0].s1_reg : '0;
    urf_rd_reg[1] = aq.size() > 0 ? aq[0].s2_reg : '0;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin alu_wb_i <= '0; end
    else begin
      alu_wb_i <= '0;
      if (aq.size() > 0 && (!aq[0].s1_ureg || dut.u_urf.rdy[aq[0].s1_reg]) &&
          (!aq[0].s2_ureg || dut.u_urf.rdy[aq[0].s2_reg])) begin
        automatic data_t a = aq[0].s1_ureg ? urf_rd_data[0] : aq[0].s1_val;
        automatic data_t b = aq[0].s2_ureg ? urf_rd_data[1] : aq[0].s2_val;
        alu_wb_i <= '{valid: 1'b1, rm_idx: aq[0].rm_idx, dst: aq[0].dst, data: a + b};
        void'(aq.pop_front());
      end
      if (alu_uop_o.valid && alu_uop_ready) aq.push_back(alu_uop_o);
    end
  end

  // ---------------- reuse checking ----------------
  data_t exp_val [256];
  logic  exp_pend [256];
  int    n_reuse_pc [pc_t];
  int    n_cp_ok = 0;
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < 4; p++) if (cp_rsp_valid[p]) begin
      checks++;
      if (!exp_pend[cp_rsp_tag[p]] || cp_rsp_data[p] != exp_val[cp_rsp_tag[p]]) begin
        failures++;
        $display("FAIL reused value tag %0d: got %h expected %h", cp_rsp_tag[p], cp_rsp_data[p],
                 exp_val[cp_rsp_tag[p]]);
      end else n_cp_ok++;
      exp_pend[cp_rsp_tag[p]] <= 1'b0;
    end

  // ---------------- event counters ----------------
  int c_sel, c_desel, c_supd, c_alloc, c_reuse, c_kill, c_refill, c_abort, c_stk, c_ack, c_pfd;
  int c_pf, c_grp, c_aluwb;
  always @(posedge clk) if (rst_n) begin
    c_sel   += int'(ev_sel);   c_desel += int'(ev_desel); c_supd  += int'(ev_s_upd);
    c_alloc += int'(ev_alloc); c_reuse += int'(ev_reuse); c_kill  += int'(ev_kill);
    c_refill += int'(ev_refill); c_abort += int'(ev_abort); c_stk += int'(ev_store_kill);
    c_ack   += int'(ev_ac_kill); c_pfd += int'(ev_pf_drop);
    c_pf    += int'(pf_valid && pf_ready); c_grp += int'(dc_acc_valid && dc_acc_n > 1);
    c_aluwb += int'(alu_wb_i.valid);
  end

  // ---------------- the core: decode and commit ----------------
  localparam pc_t P_SL1 = 32'h100, P_SL2 = 32'h104, P_SL3 = 32'h108, P_L2M = 32'h10c,
                  P_IS1 = 32'h110, P_IS2 = 32'h114, P_DEP = 32'h118, P_IS3 = 32'h11c,
                  P_BR  = 32'h120, P_ST  = 32'h124;
  localparam addr_t A1 = 32'h1_0000, A2 = 32'h4_0000, A3 = 32'h2_0000, A4 = 32'h7_0000;
  data_t K = 7;
  int    tag = 0;
  int    sl1_alloc_late = 0, sl1_realloc = 0;
  cmt_inst_t pend;

  task automatic issue(input pc_t pc, input iclass_e cls, input int s1, input int s2, input int d,
                       input logic s2rdy, input data_t s2val, input data_t value,
                       input addr_t addr, input logic miss, input st_commit_t st);
    @(negedge clk);
    cmt_i = pend;                       // previous instruction commits
    st_i[0] = st; st_i[1] = '0;
    dec_i = '0;
    dec_i.valid = 1; dec_i.pc = pc; dec_i.cls = cls; dec_i.op = 8'h01;
    dec_i.src1_v = s1 >= 0; dec_i.src1 = lreg_t'(s1 < 0 ? 0 : s1);
    dec_i.src2_v = s2 >= 0; dec_i.src2 = lreg_t'(s2 < 0 ? 0 : s2);
    dec_i.dst_v = d >= 0;   dec_i.dst = lreg_t'(d < 0 ? 0 : d);
    dec_i.src2_rdy = s2rdy; dec_i.src2_val = s2val;
    dec_ltag = 8'(tag);
    ld_train_valid = cls == CLS_LOAD; ld_train_pc = pc; ld_train_addr = addr;
    #1;
    if (dec_reuse) begin
      exp_val[tag[7:0]] = value;
      exp_pend[tag[7:0]] = 1'b1;
      if (n_reuse_pc.exists(pc)) n_reuse_pc[pc]++; else n_reuse_pc[pc] = 1;
      tag++;
    end
    pend = '0;
    pend.valid = 1; pend.pc = pc; pend.cls = cls;
    pend.src1_v = dec_i.src1_v; pend.src1 = dec_i.src1;
    pend.src2_v = dec_i.src2_v; pend.src2 = dec_i.src2;
    pend.dst_v = dec_i.dst_v; pend.dst = dec_i.dst;
    pend.l2miss = miss;
    for (int p = 0; p < NSPORT; p++) pend.spc[p] = dec_rob_spc[p];
    pend.reused = dec_reuse; pend.rm_idx = dec_rm_idx;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      cmt_i = pend; pend = '0; dec_i = '0; ld_train_valid = 0; st_i[0] = '0; st_i[1] = '0;
    end
  endtask

  task automatic iteration(input int n, input logic miss, input st_commit_t st_in, input logic mis_after_is1);
    automatic st_commit_t st = st_in;
    automatic data_t v1 = mem(A1 + addr_t'(8 * n));
    automatic data_t v3 = mem(A3 + addr_t'(16 * n));
    automatic addr_t pa = 32'h8_0000 + addr_t'((n * 7919) % 4096) * 64;
    issue(P_SL1, CLS_LOAD, 10, -1, 1, 0, 0, v1, A1 + addr_t'(8 * n), 0, '0);
    if (n >= 53 && n <= 55 && dec_replicated) sl1_alloc_late++;
    if (n >= 56 && n <= 60 && dec_replicated) sl1_realloc++;
    issue(P_SL2, CLS_LOAD, 11, -1, 2, 0, 0, mem(A2 + addr_t'(64 * n)), A2 + addr_t'(64 * n), 0, '0);
    issue(P_SL3, CLS_LOAD, 12, -1, 3, 0, 0, v3, A3 + addr_t'(16 * n), 0, '0);
    issue(P_L2M, CLS_LOAD, 5, -1, 5, 0, 0, 0, pa, miss, '0);
    issue(P_IS1, CLS_ALU, 1, 20, 6, 1, K, v1 + K, 0, 0, '0);
    if (mis_after_is1) begin
      @(negedge clk); cmt_i = pend; pend = '0; dec_i = '0; ld_train_valid = 0; br_mis = 1;
      @(negedge clk); cmt_i = '0; br_mis = 1;
      @(negedge clk); br_mis = 0;
    end
    issue(P_IS2, CLS_ALU, 3, 20, 7, 1, K, v3 + K, 0, 0, '0);
    issue(P_DEP, CLS_ALU, 1, 5, 8, 0, 0, 0, 0, 0, '0);
    issue(P_IS3, CLS_ALU, 7, 21, 9, 1, 3, v3 + K + 3, 0, 0, '0);
    issue(P_BR, CLS_BRANCH, 9, -1, -1, 0, 0, 0, 0, 0, '0);
    if (!st.valid) begin st.valid = 1'b1; st.addr = A4 + addr_t'(8 * n); end
    issue(P_ST, CLS_STORE, 13, 14, -1, 0, 0, 0, 0, 0, st);
  endtask

  initial begin
    #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    dec_i = '0; dec_ltag = 0; ld_train_valid = 0; ld_train_pc = 0; ld_train_addr = 0;
    cmt_i = '0; st_i[0] = '0; st_i[1] = '0; br_mis = 0; l2miss_valid = 0; l2miss_pc = 0;
    l2miss_addr = 0; pend = '0;
    for (int i = 0; i < 256; i++) begin exp_pend[i] = 0; exp_val[i] = 0; end
    {c_sel, c_desel, c_supd, c_alloc, c_reuse, c_kill, c_refill, c_abort, c_stk, c_ack, c_pfd} = '0;
    {c_pf, c_grp, c_aluwb} = '0;
    #22 rst_n = 1;
    for (int n = 0; n < 70; n++) begin
      automatic st_commit_t st = '0;
      automatic logic miss = !(n >= 50 && n <= 54);
      if (n == 30) K = 9;                                        // r20 changes
      if (n == 20 || n == 52) begin st.valid = 1'b1; st.addr = A1 + addr_t'(8 * (n + 1)); end
      if (n == 6) fork
        begin                                                    // SL2 misses L2 twice
          l2miss_valid = 1; l2miss_pc = P_SL2; l2miss_addr = A2 + 64 * 6;
          @(negedge clk); l2miss_addr = A2 + 64 * 7;
          @(negedge clk); l2miss_valid = 0;
        end
      join_none
      if (n == 40) begin idle(4); br_mis = 1; @(negedge clk); br_mis = 0; end
      if (n == 41) begin idle(4); br_mis = 1; @(negedge clk); br_mis = 0; end
      iteration(n, miss, st, n == 44);
      idle(n % 3);
    end
    idle(60);
    $display("events: sel=%0d desel=%0d s_upd=%0d alloc=%0d reuse=%0d kill=%0d refill=%0d abort=%0d",
             c_sel, c_desel, c_supd, c_alloc, c_reuse, c_kill, c_refill, c_abort);
    $display("        store_kill=%0d ac_kill=%0d prefetch=%0d pf_drop=%0d wide_groups=%0d alu_wb=%0d copies_ok=%0d",
             c_stk, c_ack, c_pf, c_pfd, c_grp, c_aluwb, n_cp_ok);
    chk(c_sel > 0, "selection by an L2-miss load");
    chk(c_desel > 0, "deselection by a DLT hit");
    chk(c_supd > 0, "S bits updated");
    chk(c_alloc > 0, "replication");
    chk(c_reuse > 0, "reuse of precomputed data");
    chk(c_kill > 0, "failed validation");
    chk(c_refill > 0, "refill of a used set");
    chk(c_abort > 0, "replica generation aborted");
    chk(c_stk > 0, "store inside a replicated range");
    chk(c_ack > 0, "release by AC = MAX_AC");
    chk(c_pf >= 4, "prefetch burst");
    chk(c_pfd > 0, "prefetch dropped while busy");
    chk(c_grp > 0, "wide access serving several loads");
    chk(c_aluwb > 0, "ALU replicas executed");
    chk(sl1_alloc_late == 0, "no replication after deselection");
    chk(sl1_realloc > 0, "replication again once the load misses L2 again");
    chk(n_reuse_pc.exists(P_SL1) && n_reuse_pc.exists(P_SL3) && n_reuse_pc.exists(P_IS1) &&
        n_reuse_pc.exists(P_IS2) && n_reuse_pc.exists(P_IS3), "every replicated instruction reused");
    chk(!n_reuse_pc.exists(P_SL2) && !n_reuse_pc.exists(P_DEP) && !n_reuse_pc.exists(P_L2M),
        "unselected strided load and dependent instructions never reused");
    for (int i = 0; i < 256; i++) chk(!exp_pend[i], $sformatf("copy %0d returned", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
