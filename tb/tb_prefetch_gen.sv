// tb_prefetch_gen: an L2 miss of a load with a confirmed stride yields exactly four
// prefetch addresses addr+k*stride, one per cycle; back-pressure holds the address;
// a miss without a confirmed stride yields none; a miss during a burst is dropped.
module tb_prefetch_gen;
  import l2m_pkg::*;
  logic clk = 0, rst_n = 0;
  logic miss_valid, pf_valid, pf_ready, dropped_o;
  pc_t miss_pc, sp_pc;
  addr_t miss_addr, pf_addr;
  sp_info_t sp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  prefetch_gen dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    miss_valid = 0; miss_pc = 0; miss_addr = 0; pf_ready = 1; sp = '0;
    #12 rst_n = 1;
    @(negedge clk);
    miss_valid = 1; miss_pc = 32'h480; miss_addr = 32'h8000;
    sp = '{hit: 1, strided: 0, s: 0, last_addr: 32'h8000, stride: 64};
    #1 chk(sp_pc == 32'h480, "lookup pc");
    @(negedge clk); miss_valid = 0;
    chk(!pf_valid, "no prefetch without confirmed stride");
    miss_valid = 1; sp.strided = 1;
    @(negedge clk); miss_valid = 0;
    for (int k = 1; k <= 4; k++) begin
      chk(pf_valid && pf_addr == 32'h8000 + 64 * k, $sformatf("pf %0d", k));
      if (k == 2) begin
        pf_ready = 0; miss_valid = 1; miss_addr = 32'h9000; #1;
        chk(dropped_o, "miss dropped while busy");
        @(negedge clk); miss_valid = 0; pf_ready = 1;
        chk(pf_valid && pf_addr == 32'h8000 + 64 * k, "held under back-pressure");
      end
      @(negedge clk);
    end
    chk(!pf_valid, "exactly four");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
