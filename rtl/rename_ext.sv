// rename_ext: the fields added to the rename map table, one entry per logical register:
// StridedPC (PC of the strided load at the root of the value's dependence graph), PPC
// (PC of the replicated instruction that produced the value) and R (value produced by a
// replicated instruction). The decode stage reads the two source entries
// combinationally (src_f) and writes the destination entry at the clock edge:
//   * a load writes its own PC as StridedPC when the stride predictor calls it strided,
//     and 0 otherwise;
//   * an ALU instruction copies the first non-zero StridedPC of its sources (src1 first);
//   * any other instruction with a destination writes 0;
//   * PPC/R are set to the instruction's PC / 1 when it was replicated or validated
//     (wr_repl), and cleared otherwise.
// rob_spc gives the ROB its copy of the two source StridedPCs. Propagation rules follow
// the mechanism; the treatment of non-load, non-ALU instructions is this design's
// choice.
module rename_ext
  import l2m_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  dec_inst_t di,
  input  logic      strided,     // stride predictor: this load is strided
  input  logic      wr_repl,     // instruction replicated or validated this cycle
  output rmap_ext_t src_f [2],
  output pc_t       rob_spc [NSPORT]
);
  rmap_ext_t map [NLREG];
  pc_t       new_spc;

  always_comb begin
    src_f[0] = di.src1_v ? map[di.src1] : '0;
    src_f[1] = di.src2_v ? map[di.src2] : '0;
    rob_spc[0] = src_f[0].spc;
    rob_spc[1] = src_f[1].spc;
    unique case (di.cls)
      CLS_LOAD: new_spc = strided ? di.pc : '0;
      CLS_ALU:  new_spc = (src_f[0].spc != '0) ? src_f[0].spc : src_f[1].spc;
      default:  new_spc = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NLREG; i++) map[i] <= '0;
    end else if (di.valid && di.dst_v) begin
      map[di.dst].spc <= new_spc;
      map[di.dst].ppc <= wr_repl ? di.pc : '0;
      map[di.dst].r   <= wr_repl;
    end
  end
endmodule
