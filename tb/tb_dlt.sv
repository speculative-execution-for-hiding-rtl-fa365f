// tb_dlt: checks the Delinquent Load Table: hits after insertion, LRU replacement of
// the least recently inserted/refreshed PC when the 8 entries are full, and that a
// refresh protects an entry from replacement.
module tb_dlt;
  import l2m_pkg::*;
  logic clk = 0, rst_n = 0;
  pc_t  lk_pc, ins_pc;
  logic lk_hit, ins_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dlt dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic ins(input pc_t p);
    ins_valid = 1; ins_pc = p; @(posedge clk); #1; ins_valid = 0;
  endtask
  function automatic pc_t P(int i); return pc_t'(32'h1000 + 16 * i); endfunction

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ins_valid = 0; ins_pc = 0; lk_pc = 0;
    #12 rst_n = 1; @(posedge clk); #1;
    for (int i = 0; i < 8; i++) begin lk_pc = P(i); #1 chk(!lk_hit, "empty"); end
    for (int i = 0; i < 8; i++) ins(P(i));
    for (int i = 0; i < 8; i++) begin lk_pc = P(i); #1 chk(lk_hit, $sformatf("hit %0d", i)); end
    ins(P(0));              // refresh P0: P1 is now the LRU
    ins(P(8));              // evicts P1
    lk_pc = P(1); #1 chk(!lk_hit, "P1 evicted");
    lk_pc = P(0); #1 chk(lk_hit, "P0 kept");
    lk_pc = P(8); #1 chk(lk_hit, "P8 present");
    ins(P(9));              // evicts P2
    lk_pc = P(2); #1 chk(!lk_hit, "P2 evicted");
    for (int i = 3; i < 10; i++) begin lk_pc = P(i); #1 chk(lk_hit, $sformatf("still %0d", i)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
