// tb_replica_gen: a model of the RM table answers the generator's reads. Checks the
// four load replicas (addresses first + k*stride, destinations REGS_ID*4 + k), the ALU
// replicas (sources from the producer's set from its offset on, and SR; as many as the
// entry's NREGS),
// request order when both ports push in one cycle, holding under back-pressure, use of
// the fields sampled at replica 0 when the entry changes mid-set, abort when a producer
// is missing, and the space flag.
module tb_replica_gen;
  import l2m_pkg::*;
  logic clk = 0, rst_n = 0;
  logic push0, push1, space_o, abort_o, uop_ready;
  rm_idx_t push0_idx, push1_idx, rd_idx, abort_idx;
  rm_entry_t rd_ent; pc_t prod_pc [2]; logic prod_hit [2]; rm_entry_t prod_ent [2];
  replica_t uop;
  rm_entry_t ents [RM_N];
  int checks = 0, failures = 0, got = 0, aborts = 0;
  replica_t seen [$];
  always #5 clk = ~clk;

  replica_gen dut (.*);

  always_comb begin
    rd_ent = ents[rd_idx];
    for (int j = 0; j < 2; j++) begin
      prod_hit[j] = 0; prod_ent[j] = '0;
      for (int i = 0; i < RM_N; i++)
        if (ents[i].st == RM_LIVE && ents[i].pc == prod_pc[j] && prod_pc[j] != 0) begin
          prod_hit[j] = 1; prod_ent[j] = ents[i];
        end
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (uop.valid && uop_ready) seen.push_back(uop);
    if (abort_o) begin aborts++; checks++; if (abort_idx != 8) failures++; end
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic rm_entry_t mk(rm_kind_e k, pc_t pc, pc_t p1, int rs, addr_t first, data_t sr);
    rm_entry_t e = '0;
    e.st = RM_LIVE; e.kind = k; e.pc = pc; e.pc1 = p1; e.regs_id = USET_W'(rs);
    e.range_first = first; e.sr = sr; e.nregs = 4; e.issue = 4; e.op = 8'h5;
    return e;
  endfunction

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < RM_N; i++) ents[i] = '0;
    ents[3] = mk(RK_LOAD, 32'h100, 0, 5, 32'h1000, 64'd8);
    ents[7] = mk(RK_ALU, 32'h200, 32'h100, 9, 0, 64'd55);
    ents[7].off1 = 1; ents[7].nregs = 3; ents[7].pset1 = 5;
    ents[8] = mk(RK_ALU, 32'h300, 32'h1234, 11, 0, 64'd1);
    push0 = 0; push1 = 0; push0_idx = 0; push1_idx = 0; uop_ready = 1;
    #12 rst_n = 1;
    @(negedge clk);
    chk(space_o, "space when empty");
    push0 = 1; push0_idx = 3; push1 = 1; push1_idx = 7;
    @(negedge clk); push0 = 0; push1 = 0;
    // back-pressure and a change of the entry after replica 0
    repeat (2) @(negedge clk);
    ents[3].range_first = 32'h9999;
    uop_ready = 0; repeat (3) @(negedge clk); uop_ready = 1;
    repeat (12) @(negedge clk);
    chk(seen.size() == 7, $sformatf("4 + 3 replicas, got %0d", seen.size()));
    for (int k = 0; k < 4 && seen.size() == 7; k++) begin
      chk(seen[k].kind == RK_LOAD && seen[k].addr == 32'h1000 + 8 * k && seen[k].dst == ureg_t'(20 + k) &&
          seen[k].rm_idx == 3, $sformatf("load replica %0d", k));
      if (k < 3)
      chk(seen[4 + k].kind == RK_ALU && seen[4 + k].s1_ureg && seen[4 + k].s1_reg == ureg_t'(21 + k) &&
          !seen[4 + k].s2_ureg && seen[4 + k].s2_val == 55 && seen[4 + k].dst == ureg_t'(36 + k) &&
          seen[4 + k].op == 8'h5 && seen[4 + k].rm_idx == 7, $sformatf("alu replica %0d", k));
    end
    // missing producer
    seen.delete();
    push0 = 1; push0_idx = 8; @(negedge clk); push0 = 0;
    repeat (6) @(negedge clk);
    chk(aborts == 1 && seen.size() == 0, "abort without replicas");
    // fill the queue while stalled
    uop_ready = 0;
    push0 = 1; push0_idx = 3;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      if (!space_o) push0 = 0;
    end
    push0 = 0;
    chk(!space_o, "space flag drops when nearly full");
    uop_ready = 1; repeat (40) @(negedge clk);
    chk(space_o && seen.size() % 4 == 0 && seen.size() >= 24, "queue drains");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
