// tb_decode_ctrl: directed cases for the decode-stage decisions: replication of strided
// loads with S set and of ALU instructions with replicated sources (with the allocation
// fields), reuse of a validated replica and the register it names, a failed validation
// (stride change, producer PC change, R lost, SR value change) killing the entry and
// replicating again, an exhausted entry, and instructions that must be left alone.
module tb_decode_ctrl;
  import l2m_pkg::*;
  dec_inst_t di; sp_info_t sp; rmap_ext_t src_f [2];
  logic rm_hit; rm_idx_t rm_idx; rm_entry_t rm_ent; logic al_ok;
  logic prod_hit [2]; rm_entry_t prod_ent [2];
  rm_alloc_t al; logic alloc_o, adv_o, kill_o, reuse_o, wr_repl_o; ureg_t reuse_reg;
  int checks = 0, failures = 0;

  decode_ctrl dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  localparam pc_t PL = 32'h100, PA = 32'h200, PP = 32'h180;
  task automatic set_load();
    di = '0; di.valid = 1; di.pc = PL; di.cls = CLS_LOAD; di.src1_v = 1; di.src1 = 3; di.dst_v = 1; di.dst = 4;
    sp = '{hit: 1, strided: 1, s: 1, last_addr: 32'h1000, stride: 32'h10};
    src_f[0] = '0; src_f[1] = '0; rm_hit = 0; rm_idx = 5; rm_ent = '0; al_ok = 1;
    prod_hit[0] = 0; prod_hit[1] = 0; prod_ent[0] = '0; prod_ent[1] = '0;
  endtask
  task automatic set_alu();
    di = '0; di.valid = 1; di.pc = PA; di.cls = CLS_ALU; di.src1_v = 1; di.src1 = 4; di.src2_v = 1; di.src2 = 7;
    di.dst_v = 1; di.dst = 8; di.src2_rdy = 1; di.src2_val = 64'd99; di.op = 8'h21;
    sp = '0; src_f[0] = '{spc: PL, ppc: PP, r: 1}; src_f[1] = '0;
    rm_hit = 0; rm_idx = 9; rm_ent = '0; al_ok = 1;
    prod_hit[0] = 1; prod_hit[1] = 0; prod_ent[0] = '0; prod_ent[1] = '0;
    prod_ent[0].st = RM_LIVE; prod_ent[0].pc = PP; prod_ent[0].nregs = 4; prod_ent[0].decode = 1;
  endtask
  function automatic rm_entry_t ent(rm_kind_e k, pc_t p1, data_t sr, int dec);
    rm_entry_t e = '0;
    e.st = RM_LIVE; e.kind = k; e.pc1 = p1; e.sr = sr; e.regs_id = 8'd10; e.nregs = 4;
    e.decode = CNT_W'(dec); return e;
  endfunction

  initial begin
    set_load(); #1;
    chk(al.valid && alloc_o && wr_repl_o && al.kind == RK_LOAD && al.first == 32'h1020 &&
        al.sr == 64'h10 && al.pc == PL && !reuse_o && !kill_o, "replicate strided load with S");
    al_ok = 0; #1 chk(al.valid && !alloc_o && !wr_repl_o, "allocation refused");
    set_load(); sp.s = 0; #1 chk(!al.valid && !wr_repl_o, "S clear: no replication");
    set_load(); sp.strided = 0; #1 chk(!al.valid, "not strided: no replication");
    set_load(); rm_hit = 1; rm_ent = ent(RK_LOAD, 0, 64'h10, 1); #1;
    chk(reuse_o && adv_o && !kill_o && !al.valid && wr_repl_o && reuse_reg == 10 * 4 + 1, "load reuse");
    rm_ent.decode = 4; #1 chk(!reuse_o && !kill_o && !adv_o && wr_repl_o, "exhausted entry");
    set_load(); rm_hit = 1; rm_ent = ent(RK_LOAD, 0, 64'h10, 0); sp.stride = 32'h20; #1;
    chk(kill_o && !reuse_o && al.valid && al.sr == 64'h20 && alloc_o, "stride change: kill and replicate");
    set_alu(); #1;
    chk(al.valid && alloc_o && al.kind == RK_ALU && al.pc1 == PP && al.pc2 == 0 && al.sr == 64'd99 &&
        al.op == 8'h21 && wr_repl_o && al.off1 == 1 && al.nregs == 3, "replicate ALU with one replicated source");
    prod_ent[0].decode = 4; #1 chk(!al.valid, "producer set used up: no replication");
    set_alu(); prod_hit[0] = 0; #1 chk(!al.valid, "producer not in RM: no replication");
    di.src2_rdy = 0; #1 chk(!al.valid, "non-replicated source unknown: no replication");
    set_alu(); src_f[0].r = 0; #1 chk(!al.valid && !wr_repl_o, "no replicated source");
    set_alu(); rm_hit = 1; rm_ent = ent(RK_ALU, PP, 64'd99, 2); prod_ent[0].decode = 3; #1;
    chk(reuse_o && !kill_o && reuse_reg == 42, "ALU reuse");
    prod_ent[0].decode = 2; #1 chk(kill_o && !reuse_o, "producer out of step");
    prod_ent[0].decode = 4; rm_ent.off1 = 1; rm_ent.nregs = 3; #1 chk(reuse_o && !kill_o, "offset pairing");
    prod_ent[0].decode = 3; rm_ent.off1 = 0; rm_ent.nregs = 4;
    src_f[0].ppc = 32'h184; #1 chk(kill_o && !reuse_o, "producer changed");
    set_alu(); rm_hit = 1; rm_ent = ent(RK_ALU, PP, 64'd99, 2); prod_ent[0].decode = 3; src_f[0].r = 0; #1;
    chk(kill_o && !reuse_o && !al.valid, "source no longer replicated");
    set_alu(); rm_hit = 1; rm_ent = ent(RK_ALU, PP, 64'd99, 2); prod_ent[0].decode = 3; di.src2_val = 64'd98; #1;
    chk(kill_o && !reuse_o && al.valid && al.sr == 64'd98, "SR changed: kill and replicate");
    set_alu(); di.valid = 0; rm_hit = 1; rm_ent = ent(RK_ALU, PP, 64'd99, 2); #1;
    chk(!reuse_o && !kill_o && !al.valid && !wr_repl_o, "invalid slot");
    set_alu(); di.cls = CLS_BRANCH; #1 chk(!al.valid && !reuse_o, "branch ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
