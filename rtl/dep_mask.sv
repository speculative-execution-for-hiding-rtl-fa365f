// dep_mask: Dependence Mask (DM), one bit per logical register, used at commit to tell
// whether an instruction depends on the last triggering load. trig clears every bit
// except the trigger load's destination. While active, each committing instruction
// is independent when none of its valid source bits is set, and its destination bit is
// written with the OR of its source bits. The independence result is combinational for
// the instruction presented this cycle; the mask update happens at the clock edge.
// Behaviour follows the mechanism's description; the 'active' flag (nothing is reported
// before the first trigger) is this design's choice.
module dep_mask
  import l2m_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  trig,
  input  lreg_t trig_dst,
  input  logic  in_valid,
  input  logic  src1_v, src2_v, dst_v,
  input  lreg_t src1, src2, dst,
  output logic  active,
  output logic  indep,
  output logic [NLREG-1:0] dm
);
  logic dep;
  always_comb begin
    dep   = (src1_v && dm[src1]) || (src2_v && dm[src2]);
    indep = active && in_valid && !dep;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dm     <= '0;
      active <= 1'b0;
    end else if (trig) begin
      dm           <= '0;
      dm[trig_dst] <= 1'b1;
      active       <= 1'b1;
    end else if (active && in_valid && dst_v) begin
      dm[dst] <= dep;
    end
  end
endmodule
