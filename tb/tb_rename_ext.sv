// tb_rename_ext: random decode stream through the extended rename map, compared with a
// reference model of the StridedPC / PPC / R propagation rules and of the ROB copy.
module tb_rename_ext;
  import l2m_pkg::*;
  logic clk = 0, rst_n = 0;
  dec_inst_t di;
  logic strided, wr_repl;
  rmap_ext_t src_f [2];
  pc_t rob_spc [NSPORT];
  rmap_ext_t m [NLREG];
  int checks = 0, failures = 0, n_prop = 0;
  always #5 clk = ~clk;

  rename_ext dut (.*);

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic rmap_ext_t e1, e2;
    automatic pc_t nspc;
    di = '0; strided = 0; wr_repl = 0;
    for (int i = 0; i < NLREG; i++) m[i] = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      di = '0;
      di.valid = $urandom_range(0, 5) != 0;
      di.pc = pc_t'({$urandom_range(1, 255), 2'b00});
      case ($urandom_range(0, 3))
        0: di.cls = CLS_LOAD; 1, 2: di.cls = CLS_ALU; default: di.cls = CLS_BRANCH;
      endcase
      di.src1_v = $urandom_range(0, 3) != 0; di.src2_v = $urandom_range(0, 1) != 0;
      di.dst_v = $urandom_range(0, 5) != 0;
      di.src1 = lreg_t'($urandom_range(0, 7)); di.src2 = lreg_t'($urandom_range(0, 7));
      di.dst = lreg_t'($urandom_range(0, 7));
      strided = $urandom_range(0, 1) != 0; wr_repl = $urandom_range(0, 2) == 0;
      #1;
      e1 = di.src1_v ? m[di.src1] : '0;
      e2 = di.src2_v ? m[di.src2] : '0;
      checks++;
      if (src_f[0] !== e1 || src_f[1] !== e2 || rob_spc[0] !== e1.spc || rob_spc[1] !== e2.spc ||
          1'b0) begin
        failures++; $display("FAIL read n=%0d", n);
      end
      if (di.cls == CLS_LOAD) nspc = strided ? di.pc : '0;
      else if (di.cls == CLS_ALU) nspc = (e1.spc != 0) ? e1.spc : e2.spc;
      else nspc = '0;
      if (di.cls == CLS_ALU && nspc != 0) n_prop++;
      if (di.valid && di.dst_v) m[di.dst] = '{spc: nspc, ppc: wr_repl ? di.pc : '0, r: wr_repl};
    end
    checks++;
    if (n_prop < 100) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
