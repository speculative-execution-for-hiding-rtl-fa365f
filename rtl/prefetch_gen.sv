// prefetch_gen: stride prefetcher of the baseline core the mechanism is built on. When a
// load misses in L2 (miss_valid) and the stride predictor has confirmed its stride, it
// issues DEPTH = 4 prefetch addresses, miss address + k*stride for k = 1..DEPTH, one per
// cycle while pf_ready is high, toward the L2 cache. It looks the missing load's PC up
// in the stride predictor through sp_pc/sp. A miss that arrives while a burst is still
// being issued is dropped (dropped_o pulses). The depth and the trigger condition follow
// the evaluated configuration; the one-burst-at-a-time policy is this design's choice.
module prefetch_gen
  import l2m_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     miss_valid,
  input  pc_t      miss_pc,
  input  addr_t    miss_addr,
  output pc_t      sp_pc,
  input  sp_info_t sp,
  output logic     pf_valid,
  input  logic     pf_ready,
  output addr_t    pf_addr,
  output logic     dropped_o
);
  localparam int KW = $clog2(DEPTH + 1);
  logic          busy;
  addr_t         base, stride;
  logic [KW-1:0] k;

  assign sp_pc     = miss_pc;
  assign pf_valid  = busy;
  assign pf_addr   = base + stride * addr_t'(k);
  assign dropped_o = miss_valid && sp.strided && busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; base <= '0; stride <= '0; k <= '0;
    end else if (busy) begin
      if (pf_ready) begin
        if (int'(k) == DEPTH) busy <= 1'b0;
        k <= k + 1'b1;
      end
    end else if (miss_valid && sp.hit && sp.strided) begin
      busy   <= 1'b1;
      base   <= miss_addr;
      stride <= sp.stride;
      k      <= KW'(1);
    end
  end
endmodule
