// tb_stride_pred: trains the stride predictor with load address streams and checks
// stride detection (strided only after the stride repeats twice), last address, a
// stride change resetting confidence, S-bit set/clear through the update ports,
// round-robin replacement inside a set, and the second lookup port.
module tb_stride_pred;
  import l2m_pkg::*;
  logic clk = 0, rst_n = 0;
  pc_t      lk_pc [2];
  sp_info_t lk_info [2];
  logic     tr_valid;
  pc_t      tr_pc;
  addr_t    tr_addr;
  s_upd_t   s_upd [NSPORT];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  stride_pred dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic train(input pc_t p, input addr_t a);
    tr_valid = 1; tr_pc = p; tr_addr = a; @(posedge clk); #1; tr_valid = 0;
  endtask
  task automatic supd(input pc_t p, input logic s, input int port);
    s_upd[port] = '{valid: 1'b1, pc: p, set: s}; @(posedge clk); #1; s_upd[port] = '0;
  endtask

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam pc_t PA = 32'h0040_0100;
  initial begin
    tr_valid = 0; tr_pc = 0; tr_addr = 0; lk_pc[0] = 0; lk_pc[1] = 0;
    for (int p = 0; p < NSPORT; p++) s_upd[p] = '0;
    #12 rst_n = 1; @(posedge clk); #1;
    lk_pc[0] = PA; #1 chk(!lk_info[0].hit, "miss before training");
    train(PA, 32'h1000);
    #1 chk(lk_info[0].hit && !lk_info[0].strided && lk_info[0].last_addr == 32'h1000, "allocated");
    train(PA, 32'h1008);
    #1 chk(!lk_info[0].strided && lk_info[0].stride == 8, "first stride");
    train(PA, 32'h1010);
    #1 chk(!lk_info[0].strided, "one repeat");
    train(PA, 32'h1018);
    #1 chk(lk_info[0].strided && lk_info[0].stride == 8 && lk_info[0].last_addr == 32'h1018, "confirmed");
    lk_pc[1] = PA; #1 chk(lk_info[1].strided && lk_info[1].stride == 8, "port 1");
    chk(!lk_info[0].s, "S clear at start");
    supd(PA, 1, 1);
    #1 chk(lk_info[0].s, "S set via port 1");
    supd(PA, 0, 0);
    #1 chk(!lk_info[0].s, "S cleared via port 0");
    supd(PA, 1, 1);
    train(PA, 32'h1100);
    #1 chk(!lk_info[0].strided && lk_info[0].stride == 32'he8 && lk_info[0].s, "stride change");
    // 5 PCs mapping to the same set (index = PC[10:2]) evict the oldest allocation
    for (int i = 1; i <= 4; i++) train(PA + pc_t'(i * 2048), addr_t'(i));
    lk_pc[0] = PA; #1 chk(!lk_info[0].hit, "round robin victim");
    for (int i = 1; i <= 4; i++) begin
      lk_pc[0] = PA + pc_t'(i * 2048); #1 chk(lk_info[0].hit && lk_info[0].last_addr == addr_t'(i), "set members");
    end
    // a negative stride
    for (int i = 0; i < 4; i++) train(32'h0040_0200, addr_t'(32'h2000 - 4 * i));
    lk_pc[0] = 32'h0040_0200; #1 chk(lk_info[0].strided && lk_info[0].stride == addr_t'(-4), "negative stride");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
