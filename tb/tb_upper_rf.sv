// tb_upper_rf: writes random values through all write ports and reads them back; checks
// that a copy of a ready register returns its value and tag exactly two cycles later,
// that clearing a register set marks exactly its four registers not ready, that a copy
// of a cleared register waits until the register is written, and that at
// most four waiting copies start per cycle, the fifth one cycle later.
module tb_upper_rf;
  import l2m_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  wr_en [5]; ureg_t wr_reg [5]; data_t wr_data [5];
  logic clr_en [2]; logic [USET_W-1:0] clr_set [2];
  ureg_t rd_reg [2]; data_t rd_data [2];
  logic cp_in_valid, cp_in_ready; ureg_t cp_in_reg; logic [7:0] cp_in_tag;
  logic cp_rsp_valid [4]; logic [7:0] cp_rsp_tag [4]; data_t cp_rsp_data [4];
  data_t shadow [UREGS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  upper_rf dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic int nrsp();
    int n = 0;
    for (int p = 0; p < 4; p++) if (cp_rsp_valid[p]) n++;
    return n;
  endfunction
  function automatic logic has(input logic [7:0] tag, input data_t d);
    for (int p = 0; p < 4; p++) if (cp_rsp_valid[p] && cp_rsp_tag[p] == tag && cp_rsp_data[p] == d) return 1;
    return 0;
  endfunction

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < 5; p++) begin wr_en[p] = 0; wr_reg[p] = 0; wr_data[p] = 0; end
    clr_en[0] = 0; clr_en[1] = 0; clr_set[0] = 0; clr_set[1] = 0; cp_in_valid = 0; cp_in_reg = 0; cp_in_tag = 0;
    rd_reg[0] = 0; rd_reg[1] = 0;
    #12 rst_n = 1;
    for (int r = 0; r < UREGS; r += 5) begin
      @(negedge clk);
      for (int p = 0; p < 5; p++) begin
        wr_en[p] = (r + p) < UREGS; wr_reg[p] = ureg_t'(r + p);
        wr_data[p] = {$urandom, $urandom};
        if (r + p < UREGS) shadow[r + p] = wr_data[p];
      end
    end
    @(negedge clk);
    for (int p = 0; p < 5; p++) wr_en[p] = 0;
    for (int r = 0; r < UREGS; r += 37) begin
      rd_reg[0] = ureg_t'(r); rd_reg[1] = ureg_t'(UREGS - 1 - r); #1;
      chk(rd_data[0] == shadow[r] && rd_data[1] == shadow[UREGS - 1 - r], "read port");
    end
    // ready registers: two-cycle copy
    for (int n = 0; n < 30; n++) begin
      automatic ureg_t rr = ureg_t'($urandom_range(0, UREGS - 1));
      @(negedge clk);
      cp_in_valid = 1; cp_in_reg = rr; cp_in_tag = 8'(n);
      @(negedge clk); cp_in_valid = 0;
      chk(nrsp() == 0, "nothing after one cycle");
      @(negedge clk);
      chk(nrsp() == 1 && has(8'(n), shadow[rr]), $sformatf("copy %0d", n));
    end
    // sets 25 and 26 (registers 100..107) cleared through both clear ports, five
    // copies waiting, then written together
    @(negedge clk); clr_en[0] = 1; clr_set[0] = 8'd25; clr_en[1] = 1; clr_set[1] = 8'd26;
    @(negedge clk); clr_en[0] = 0; clr_en[1] = 0;
    rd_reg[0] = ureg_t'(104); #1;
    chk(dut.rdy[104] == 1'b0 && dut.rdy[107] == 1'b0 && dut.rdy[99] == 1'b1 && dut.rdy[108] == 1'b1,
        "set clear touches exactly its registers");
    for (int i = 0; i < 5; i++) begin
      cp_in_valid = 1; cp_in_reg = ureg_t'(100 + i); cp_in_tag = 8'(200 + i);
      @(negedge clk);
    end
    cp_in_valid = 0;
    repeat (4) begin @(negedge clk); chk(nrsp() == 0, "waiting for write"); end
    for (int p = 0; p < 5; p++) begin
      wr_en[p] = 1; wr_reg[p] = ureg_t'(100 + p); wr_data[p] = 64'(1000 + p); shadow[100 + p] = wr_data[p];
    end
    @(negedge clk); for (int p = 0; p < 5; p++) wr_en[p] = 0;   // ready now: 4 start
    @(negedge clk);
    @(negedge clk);
    chk(nrsp() == 4 && has(8'(200), 64'd1000) && has(8'(203), 64'd1003), "four copies per cycle");
    @(negedge clk);
    chk(nrsp() == 1 && has(8'(204), 64'd1004), "fifth copy one cycle later");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
