// commit_select: second step of the mechanism, strided-load selection at commit.
// A committing load that missed in L2 restarts the Dependence Mask from its destination
// register, is recorded in the Delinquent Load Table, and puts the unit in "select" mode:
// every following independent ALU instruction or load then sets the S bit of the
// strided loads whose PCs its ROB entry carries (the StridedPCs of its two sources).
// A strided load is therefore selected only through an independent instruction that
// uses its value, never by itself. A committing load that hits in L2 but whose PC is
// in the DLT restarts the mask the same way in "deselect" mode, and the following
// independent instructions clear those S bits instead. One instruction is handled per
// cycle; s_upd is combinational and is applied by the stride predictor at the clock edge.
// The trigger instruction itself selects nothing, and only ALU instructions and loads
// select, which are this design's choices.
module commit_select
  import l2m_pkg::*;
#(
  parameter int DLT_ENTRIES = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  cmt_inst_t ci,
  output s_upd_t    s_upd [NSPORT],
  output logic      trig_miss,    // selection fired by an L2-miss load
  output logic      trig_clear,   // deselection fired by a DLT hit
  output logic      indep         // committing instruction found independent
);
  logic is_load, dlt_hit, set_mode, dm_active, dm_indep;
  logic [NLREG-1:0] dm;

  assign is_load    = ci.cls == CLS_LOAD;
  assign trig_miss  = ci.valid && is_load && ci.dst_v && ci.l2miss;
  assign trig_clear = ci.valid && is_load && ci.dst_v && !ci.l2miss && dlt_hit;

  dlt #(.ENTRIES(DLT_ENTRIES)) u_dlt (
    .clk, .rst_n,
    .lk_pc(ci.pc), .lk_hit(dlt_hit),
    .ins_valid(trig_miss || trig_clear), .ins_pc(ci.pc)
  );

  dep_mask u_dm (
    .clk, .rst_n,
    .trig(trig_miss || trig_clear), .trig_dst(ci.dst),
    .in_valid(ci.valid && !trig_miss && !trig_clear),
    .src1_v(ci.src1_v), .src2_v(ci.src2_v), .dst_v(ci.dst_v),
    .src1(ci.src1), .src2(ci.src2), .dst(ci.dst),
    .active(dm_active), .indep(dm_indep), .dm(dm)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) set_mode <= 1'b0;
    else if (trig_miss) set_mode <= 1'b1;
    else if (trig_clear) set_mode <= 1'b0;
  end

  assign indep = dm_indep && (ci.cls == CLS_ALU || ci.cls == CLS_LOAD);

  always_comb begin
    for (int p = 0; p < NSPORT; p++) begin
      s_upd[p].valid = indep && ci.spc[p] != '0;
      s_upd[p].pc    = ci.spc[p];
      s_upd[p].set   = set_mode;
    end
  end
endmodule
