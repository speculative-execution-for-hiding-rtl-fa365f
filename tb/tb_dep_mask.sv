// tb_dep_mask: drives random instruction streams with occasional triggers through the
// Dependence Mask and compares the independence result and mask with a reference model.
module tb_dep_mask;
  import l2m_pkg::*;
  logic clk = 0, rst_n = 0;
  logic trig, in_valid, src1_v, src2_v, dst_v, active, indep;
  lreg_t trig_dst, src1, src2, dst;
  logic [NLREG-1:0] dm, ref_dm;
  logic ref_act;
  int checks = 0, failures = 0, n_indep = 0, n_dep = 0;
  always #5 clk = ~clk;

  dep_mask dut (.*);

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic logic exp_ind;
    trig = 0; in_valid = 0; {src1_v, src2_v, dst_v} = 0; {trig_dst, src1, src2, dst} = 0;
    ref_dm = 0; ref_act = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      trig     = ($urandom_range(0, 30) == 0);
      trig_dst = lreg_t'($urandom_range(0, 7));
      in_valid = !trig && $urandom_range(0, 3) != 0;
      src1_v = $urandom_range(0, 3) != 0; src2_v = $urandom_range(0, 1) != 0;
      dst_v  = $urandom_range(0, 4) != 0;
      src1 = lreg_t'($urandom_range(0, 7)); src2 = lreg_t'($urandom_range(0, 7));
      dst  = lreg_t'($urandom_range(0, 7));
      #1;
      exp_ind = ref_act && in_valid && !((src1_v && ref_dm[src1]) || (src2_v && ref_dm[src2]));
      checks++;
      if (indep !== exp_ind) begin failures++; $display("FAIL indep n=%0d", n); end
      if (exp_ind) n_indep++; else if (in_valid && ref_act) n_dep++;
      @(posedge clk);
      if (trig) begin ref_dm = '0; ref_dm[trig_dst] = 1; ref_act = 1; end
      else if (ref_act && in_valid && dst_v)
        ref_dm[dst] = (src1_v && ref_dm[src1]) || (src2_v && ref_dm[src2]);
      #1;
      checks++;
      if (dm !== ref_dm || active !== ref_act) begin failures++; $display("FAIL dm n=%0d", n); end
    end
    checks++;
    if (n_indep < 50 || n_dep < 50) begin failures++; $display("FAIL coverage %0d %0d", n_indep, n_dep); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
