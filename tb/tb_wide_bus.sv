// tb_wide_bus: random loads over a few cache lines are pushed into the wide bus while a
// cache model answers each line access two cycles later. Checks that every load is
// served exactly once with the 8-byte word of its address, that an access never serves
// more than four loads, and that accesses serving 1 and 4 loads both happen.
module tb_wide_bus;
  import l2m_pkg::*;
  localparam int TW = 18;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, acc_valid, acc_ready, rsp_valid;
  addr_t req_addr, acc_line;
  logic [TW-1:0] req_tag;
  logic [2:0] acc_n;
  logic [255:0] rsp_line;
  logic res_valid [4]; logic [TW-1:0] res_tag [4]; data_t res_data [4];
  int checks = 0, failures = 0;
  int hist [5];
  addr_t sent_addr [int];
  int served [int];
  always #5 clk = ~clk;

  wide_bus dut (.*);

  function automatic data_t word_of(addr_t a);
    addr_t w = {a[31:3], 3'b000};
    return {w ^ 32'hA5A5_0000, w};
  endfunction

  // cache model: fixed two-cycle latency, one access per cycle
  logic v1, v2; addr_t l1, l2;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin v1 <= 0; v2 <= 0; l1 <= 0; l2 <= 0; end
    else begin v1 <= acc_valid && acc_ready; l1 <= acc_line; v2 <= v1; l2 <= l1; end
  always_comb begin
    rsp_valid = v2;
    for (int w = 0; w < 4; w++) rsp_line[w*64 +: 64] = word_of(l2 + addr_t'(8 * w));
  end

  always @(posedge clk) if (rst_n) begin
    if (acc_valid && acc_ready) begin
      hist[acc_n]++;
      checks++;
      if (acc_n == 0 || acc_n > 4) begin failures++; $display("FAIL acc_n %0d", acc_n); end
    end
    for (int s = 0; s < 4; s++) if (res_valid[s]) begin
      checks++;
      if (!sent_addr.exists(int'(res_tag[s])) || res_data[s] != word_of(sent_addr[int'(res_tag[s])])) begin
        failures++; $display("FAIL data tag %0d", res_tag[s]);
      end
      served[int'(res_tag[s])]++;
    end
  end

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int n = 0;
    for (int i = 0; i < 5; i++) hist[i] = 0;
    req_valid = 0; req_addr = 0; req_tag = 0; acc_ready = 1;
    #12 rst_n = 1;
    while (n < 400) begin
      @(negedge clk);
      acc_ready = $urandom_range(0, 3) != 0;
      req_valid = $urandom_range(0, 5) != 0;
      req_addr  = 32'h1000 + addr_t'($urandom_range(0, 3) * 32) + addr_t'($urandom_range(0, 31));
      req_tag   = TW'(n);
      #1;
      if (req_valid && req_ready) begin sent_addr[n] = req_addr; n++; end
    end
    @(negedge clk); req_valid = 0; acc_ready = 1;
    repeat (40) @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      checks++;
      if (!served.exists(i) || served[i] != 1) begin failures++; $display("FAIL served %0d", i); end
    end
    checks++;
    if (hist[1] == 0 || hist[4] == 0) begin failures++; $display("FAIL grouping coverage"); end
    $display("served per access: 1:%0d 2:%0d 3:%0d 4:%0d", hist[1], hist[2], hist[3], hist[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
