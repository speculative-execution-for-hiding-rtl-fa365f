// l2miss_top: the L2miss speculative-replication mechanism, attached to a superscalar
// core whose pipeline, reorder buffer, issue queue, lower register file and caches stay
// outside and reach it through the ports below.
//  decode side  (one instruction per cycle): dec_i is looked up in the stride predictor,
//               the extended rename map and the Replication Maps (RM) table. The unit
//               answers in the same cycle with dec_reuse (take the value of upper-level
//               register dec_reuse_reg: a copy to the lower level with tag dec_ltag
//               waits until that register has been written, then cp_rsp_* returns the
//               value two cycles after the copy starts), dec_replicated (new
//               replicas are being built), the RM index and the StridedPCs the ROB keeps.
//  commit side: cmt_i drives the strided-load selection (Dependence Mask, Delinquent Load
//               Table, S bits) and, for reused instructions, the RM commit count;
//               st_i gives up to two committing store addresses; br_mis a branch
//               misprediction.
//  replicas:    load replicas go to the wide data-cache bus (dc_*), whose results are
//               written into the upper register file; ALU replicas leave on alu_uop_o
//               for the core's issue queue and come back on alu_wb_i. urf_rd_* lets the
//               core read their operands.
//  prefetch:    an L2 miss of a load with a confirmed stride (l2miss_*) starts a burst of
//               four prefetch addresses on pf_*.
// ev_* pulse once per cycle in which the named event happened.
// Sizes are the evaluated configuration (64 logical registers, 4-way x 512-set stride
// predictor, 8-entry DLT, 4-way x 64-set RM table, 4 replicas, 768 upper registers,
// 32-byte lines). Handling one instruction per cycle at decode and commit, instead of
// the 8-wide core, is this design's simplification.
// Lint notes rst_n as used both asynchronously and synchronously: the synchronous use
// is only the disable condition of the a_copy_room assertion and builds no logic.
module l2miss_top
  import l2m_pkg::*;
#(
  parameter int LINE_BYTES = 32,
  parameter int LTAG_W     = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // decode
  input  dec_inst_t  dec_i,
  input  logic [LTAG_W-1:0] dec_ltag,
  output logic       dec_reuse,
  output ureg_t      dec_reuse_reg,
  output logic       dec_replicated,
  output rm_idx_t    dec_rm_idx,
  output pc_t        dec_rob_spc [NSPORT],
  output logic       cp_rsp_valid [4],
  output logic [LTAG_W-1:0] cp_rsp_tag [4],
  output data_t      cp_rsp_data  [4],
  // load training of the stride predictor
  input  logic       ld_train_valid,
  input  pc_t        ld_train_pc,
  input  addr_t      ld_train_addr,
  // commit
  input  cmt_inst_t  cmt_i,
  input  st_commit_t st_i [2],
  input  logic       br_mis,
  // prefetch
  input  logic       l2miss_valid,
  input  pc_t        l2miss_pc,
  input  addr_t      l2miss_addr,
  output logic       pf_valid,
  input  logic       pf_ready,
  output addr_t      pf_addr,
  // ALU replicas
  output replica_t   alu_uop_o,
  input  logic       alu_uop_ready,
  input  rwb_t       alu_wb_i,
  input  ureg_t      urf_rd_reg  [2],
  output data_t      urf_rd_data [2],
  // data cache, wide port
  output logic       dc_acc_valid,
  input  logic       dc_acc_ready,
  output addr_t      dc_acc_line,
  output logic [2:0] dc_acc_n,
  input  logic       dc_rsp_valid,
  input  logic [LINE_BYTES*8-1:0] dc_rsp_line,
  // events
  output logic       ev_sel, ev_desel, ev_s_upd, ev_alloc, ev_reuse, ev_kill,
  output logic       ev_refill, ev_abort, ev_store_kill, ev_ac_kill, ev_pf_drop
);
  localparam int WTAG_W = RM_IDX_W + UREG_W;

  // ---------------- stride predictor ----------------
  pc_t      sp_lk_pc [2];
  sp_info_t sp_info  [2];
  s_upd_t   s_upd    [NSPORT];
  pc_t      pf_sp_pc;

  assign sp_lk_pc[0] = dec_i.pc;
  assign sp_lk_pc[1] = pf_sp_pc;

  stride_pred u_sp (
    .clk, .rst_n, .lk_pc(sp_lk_pc), .lk_info(sp_info),
    .tr_valid(ld_train_valid), .tr_pc(ld_train_pc), .tr_addr(ld_train_addr),
    .s_upd(s_upd)
  );

  // ---------------- decode: rename map extension, RM, decisions ----------------
  rmap_ext_t src_f [2];
  logic      wr_repl;

  rename_ext u_ren (
    .clk, .rst_n, .di(dec_i), .strided(sp_info[0].hit && sp_info[0].strided),
    .wr_repl(wr_repl), .src_f(src_f), .rob_spc(dec_rob_spc)
  );

  logic      rm_hit;
  rm_idx_t   rm_idx;
  rm_entry_t rm_ent;
  rm_idx_t   rm_rd_idx;
  rm_entry_t rm_rd_ent;
  rm_alloc_t al;
  logic      al_ok, alloc, adv, kill, gen_space, refill, abort;
  logic      clr_valid [2];
  logic [USET_W-1:0] clr_set [2];
  rm_idx_t   al_idx, refill_idx, abort_idx;
  logic      rm_wb_valid [5];
  rm_idx_t   rm_wb_idx   [5];
  pc_t       prod_pc [2];
  logic      prod_hit [2];
  rm_entry_t prod_ent [2];
  logic      vprod_hit [2];
  rm_entry_t vprod_ent [2];
  pc_t       pk_pc  [NPK];
  logic      pk_hit [NPK];
  rm_entry_t pk_ent [NPK];

  always_comb begin
    pk_pc[0] = prod_pc[0];
    pk_pc[1] = prod_pc[1];
    pk_pc[2] = src_f[0].ppc;
    pk_pc[3] = src_f[1].ppc;
    for (int j = 0; j < 2; j++) begin
      prod_hit[j]  = pk_hit[j];
      prod_ent[j]  = pk_ent[j];
      vprod_hit[j] = pk_hit[2 + j];
      vprod_ent[j] = pk_ent[2 + j];
    end
  end


  decode_ctrl u_dec (
    .di(dec_i), .sp(sp_info[0]), .src_f(src_f),
    .rm_hit(rm_hit), .rm_idx(rm_idx), .rm_ent(rm_ent),
    .prod_hit(vprod_hit), .prod_ent(vprod_ent),
    .al_ok(al_ok), .al(al), .alloc_o(alloc), .adv_o(adv), .kill_o(kill),
    .reuse_o(dec_reuse), .reuse_reg(dec_reuse_reg), .wr_repl_o(wr_repl)
  );

  assign dec_replicated = alloc;
  assign dec_rm_idx     = alloc ? al_idx : rm_idx;

  rm_table u_rm (
    .clk, .rst_n,
    .dk_pc(dec_i.pc), .dk_hit(rm_hit), .dk_idx(rm_idx), .dk_ent(rm_ent),
    .pk_pc(pk_pc), .pk_hit(pk_hit), .pk_ent(pk_ent),
    .rd_idx(rm_rd_idx), .rd_ent(rm_rd_ent),
    .al(al), .al_ok(al_ok), .al_idx(al_idx), .gen_space(gen_space),
    .adv_valid(adv), .adv_idx(rm_idx),
    .kill_valid(kill), .kill_idx(rm_idx),
    .cm_valid(cmt_i.valid && cmt_i.reused), .cm_idx(cmt_i.rm_idx),
    .refill_o(refill), .refill_idx(refill_idx),
    .clr_valid(clr_valid), .clr_set(clr_set),
    .wb_valid(rm_wb_valid), .wb_idx(rm_wb_idx),
    .abort_valid(abort), .abort_idx(abort_idx),
    .br_mis(br_mis), .st(st_i),
    .ev_store_kill(ev_store_kill), .ev_ac_kill(ev_ac_kill)
  );

  // ---------------- replica generation ----------------
  replica_t uop;
  logic     uop_ready, wb_req_ready;

  replica_gen u_gen (
    .clk, .rst_n,
    .push0(alloc), .push0_idx(al_idx), .push1(refill), .push1_idx(refill_idx),
    .space_o(gen_space),
    .rd_idx(rm_rd_idx), .rd_ent(rm_rd_ent),
    .prod_pc(prod_pc), .prod_hit(prod_hit), .prod_ent(prod_ent),
    .abort_o(abort), .abort_idx(abort_idx),
    .uop(uop), .uop_ready(uop_ready)
  );

  assign uop_ready = (uop.kind == RK_LOAD) ? wb_req_ready : alu_uop_ready;
  always_comb begin
    alu_uop_o       = uop;
    alu_uop_o.valid = uop.valid && uop.kind == RK_ALU;
  end

  // ---------------- wide bus and upper register file ----------------
  logic              res_valid [4];
  logic [WTAG_W-1:0] res_tag   [4];
  data_t             res_data  [4];

  wide_bus #(.LINE_BYTES(LINE_BYTES), .MAX_SERVE(4), .TAG_W(WTAG_W)) u_wb (
    .clk, .rst_n,
    .req_valid(uop.valid && uop.kind == RK_LOAD), .req_ready(wb_req_ready),
    .req_addr(uop.addr), .req_tag({uop.rm_idx, uop.dst}),
    .acc_valid(dc_acc_valid), .acc_ready(dc_acc_ready), .acc_line(dc_acc_line),
    .acc_n(dc_acc_n), .rsp_valid(dc_rsp_valid), .rsp_line(dc_rsp_line),
    .res_valid(res_valid), .res_tag(res_tag), .res_data(res_data)
  );

  logic             urf_we   [5];
  ureg_t            urf_wreg [5];
  data_t            urf_wd   [5];
  logic             cp_in_ready;

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      urf_we[p]      = res_valid[p];
      urf_wreg[p]    = res_tag[p][UREG_W-1:0];
      urf_wd[p]      = res_data[p];
      rm_wb_valid[p] = res_valid[p];
      rm_wb_idx[p]   = res_tag[p][WTAG_W-1:UREG_W];
    end
    urf_we[4]      = alu_wb_i.valid;
    urf_wreg[4]    = alu_wb_i.dst;
    urf_wd[4]      = alu_wb_i.data;
    rm_wb_valid[4] = alu_wb_i.valid;
    rm_wb_idx[4]   = alu_wb_i.rm_idx;
  end

  upper_rf #(.NWR(5), .NRD(2), .COPY_PORTS(4), .COPY_LAT(2), .TAG_W(LTAG_W)) u_urf (
    .clk, .rst_n,
    .wr_en(urf_we), .wr_reg(urf_wreg), .wr_data(urf_wd),
    .clr_en(clr_valid), .clr_set(clr_set),
    .rd_reg(urf_rd_reg), .rd_data(urf_rd_data),
    .cp_in_valid(dec_reuse), .cp_in_ready(cp_in_ready), .cp_in_reg(dec_reuse_reg),
    .cp_in_tag(dec_ltag),
    .cp_rsp_valid(cp_rsp_valid), .cp_rsp_tag(cp_rsp_tag), .cp_rsp_data(cp_rsp_data)
  );

  // the copy queue is sized so that a reuse never finds it full
  a_copy_room: assert property (@(posedge clk) disable iff (!rst_n) dec_reuse |-> cp_in_ready);

  // ---------------- commit: strided-load selection ----------------
  logic indep;
  commit_select u_cs (
    .clk, .rst_n, .ci(cmt_i), .s_upd(s_upd),
    .trig_miss(ev_sel), .trig_clear(ev_desel), .indep(indep)
  );
  always_comb begin
    ev_s_upd = 1'b0;
    for (int p = 0; p < NSPORT; p++) if (s_upd[p].valid) ev_s_upd = 1'b1;
  end

  // ---------------- prefetch ----------------
  prefetch_gen #(.DEPTH(4)) u_pf (
    .clk, .rst_n, .miss_valid(l2miss_valid), .miss_pc(l2miss_pc), .miss_addr(l2miss_addr),
    .sp_pc(pf_sp_pc), .sp(sp_info[1]),
    .pf_valid(pf_valid), .pf_ready(pf_ready), .pf_addr(pf_addr), .dropped_o(ev_pf_drop)
  );

  assign ev_alloc  = alloc;
  assign ev_reuse  = dec_reuse;
  assign ev_kill   = kill;
  assign ev_refill = refill;
  assign ev_abort  = abort;
endmodule
