// tb_commit_select: commit-stage selection. An L2-miss load on r5 starts select mode:
// an independent instruction sets the S bits of the StridedPCs in its ROB entry, a
// dependent one (through r5, or through a register written from r5) selects nothing.
// A later L2 hit of the same load (DLT hit) starts deselect mode, which clears S.
// A load hitting L2 that is not in the DLT changes nothing.
module tb_commit_select;
  import l2m_pkg::*;
  logic clk = 0, rst_n = 0;
  cmt_inst_t ci;
  s_upd_t s_upd [NSPORT];
  logic trig_miss, trig_clear, indep;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  commit_select dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic cmt_inst_t mk(iclass_e c, pc_t pc, int s1, int s2, int d, logic miss,
                                   pc_t p0, pc_t p1, pc_t p2);
    cmt_inst_t x = '0;
    x.valid = 1; x.pc = pc; x.cls = c;
    x.src1_v = s1 >= 0; x.src1 = lreg_t'(s1 < 0 ? 0 : s1);
    x.src2_v = s2 >= 0; x.src2 = lreg_t'(s2 < 0 ? 0 : s2);
    x.dst_v = d >= 0; x.dst = lreg_t'(d < 0 ? 0 : d);
    x.l2miss = miss; x.spc[0] = p0; x.spc[1] = p1;
    return x;
  endfunction

  localparam pc_t LD = 32'h400, SL1 = 32'h100, SL3 = 32'h120;
  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ci = '0;
    #12 rst_n = 1; @(negedge clk);
    // before any trigger nothing is selected
    ci = mk(CLS_ALU, 32'h200, 1, 2, 3, 0, SL1, 0, 0); #1
    chk(!indep && !s_upd[0].valid, "inactive before trigger");
    @(negedge clk);
    ci = mk(CLS_LOAD, LD, 4, -1, 5, 1, 0, 0, 0); #1
    chk(trig_miss && !trig_clear, "miss trigger");
    @(negedge clk);
    ci = mk(CLS_ALU, 32'h404, 1, 2, 6, 0, SL1, SL3, 0); #1   // independent
    chk(indep && s_upd[0].valid && s_upd[0].pc == SL1 && s_upd[0].set &&
        s_upd[1].valid && s_upd[1].pc == SL3, "IS selects SL1 SL3");
    @(negedge clk);
    ci = mk(CLS_ALU, 32'h408, 5, 1, 7, 0, 0, SL1, 0); #1     // depends on r5
    chk(!indep && !s_upd[1].valid, "dependent on miss");
    @(negedge clk);
    ci = mk(CLS_ALU, 32'h40c, 7, -1, 8, 0, SL3, 0, 0); #1    // depends through r7
    chk(!indep && !s_upd[0].valid, "transitively dependent");
    @(negedge clk);
    ci = mk(CLS_LOAD, 32'h410, 2, -1, 9, 0, SL3, 0, 32'h410); #1  // independent strided load
    chk(indep && s_upd[0].valid && s_upd[0].pc == SL3 && !s_upd[1].valid, "independent load selects its source's strided load");
    @(negedge clk);
    ci = mk(CLS_STORE, 32'h414, 1, 2, -1, 0, SL1, 0, 0); #1
    chk(!s_upd[0].valid, "stores do not select");
    @(negedge clk);
    ci = mk(CLS_LOAD, 32'h500, 4, -1, 5, 0, 0, 0, 0); #1      // L2 hit, not in DLT
    chk(!trig_miss && !trig_clear, "no trigger for unknown load");
    @(negedge clk);
    ci = mk(CLS_LOAD, LD, 4, -1, 5, 0, 0, 0, 0); #1           // DLT hit
    chk(trig_clear && !trig_miss, "DLT hit trigger");
    @(negedge clk);
    ci = mk(CLS_ALU, 32'h404, 1, 2, 6, 0, SL1, SL3, 0); #1
    chk(indep && s_upd[0].valid && !s_upd[0].set && s_upd[1].valid && !s_upd[1].set, "deselect");
    @(negedge clk);
    ci = mk(CLS_ALU, 32'h408, 5, -1, 7, 0, SL1, 0, 0); #1
    chk(!s_upd[0].valid, "dependent in deselect mode");
    @(negedge clk);
    ci = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
