// upper_rf: upper (slow) level of the two-level hierarchical register file. It holds
// the precomputed results of replicas until a validating instruction moves one down to
// the lower, fast level with a copy operation.
//  * NWR write ports take replica results and set the register's ready bit; each of
//    the two clr ports clears the ready bits of a whole set of NREPL registers when
//    the set is handed to a new or refilled RM entry. A write in the same cycle wins.
//  * Copy requests (one per cycle, cp_in_*) wait in a CQ-deep queue, like a copy
//    instruction in the issue queue, until their register is ready. Each cycle up to
//    COPY_PORTS (4) ready requests, oldest first, start; each returns the value with its
//    tag COPY_LAT = 2 cycles after it starts (start before edge n, cp_rsp_* valid after
//    edge n+1). A request whose register is already ready starts in the cycle it arrives.
//  * NRD combinational read ports serve replica ALU operands.
// If two write ports name the same register, the higher-numbered port wins. 768
// registers, four moves per cycle and the 2-cycle copy follow the evaluated
// configuration; the ready bits, queue, 64-bit width and read ports are this design's
// choices. The register array itself is not reset; the ready bits are.
module upper_rf
  import l2m_pkg::*;
#(
  parameter int NREGS      = UREGS,
  parameter int NWR        = 5,
  parameter int NRD        = 2,
  parameter int COPY_PORTS = 4,
  parameter int COPY_LAT   = 2,
  parameter int CQ         = 8,
  parameter int TAG_W      = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en   [NWR],
  input  ureg_t      wr_reg  [NWR],
  input  data_t      wr_data [NWR],
  input  logic       clr_en  [2],
  input  logic [USET_W-1:0] clr_set [2],
  input  ureg_t      rd_reg  [NRD],
  output data_t      rd_data [NRD],
  input  logic       cp_in_valid,
  output logic       cp_in_ready,
  input  ureg_t      cp_in_reg,
  input  logic [TAG_W-1:0] cp_in_tag,
  output logic       cp_rsp_valid [COPY_PORTS],
  output logic [TAG_W-1:0] cp_rsp_tag [COPY_PORTS],
  output data_t      cp_rsp_data  [COPY_PORTS]
);
  data_t            regs [NREGS];
  logic [NREGS-1:0] rdy;

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWR; p++)
      if (wr_en[p] && int'(wr_reg[p]) < NREGS) regs[wr_reg[p]] <= wr_data[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdy <= '0;
    else begin
      for (int c = 0; c < 2; c++)
        if (clr_en[c])
          for (int k = 0; k < NREPL; k++)
            if (int'(clr_set[c]) * NREPL + k < NREGS) rdy[int'(clr_set[c]) * NREPL + k] <= 1'b0;
      for (int p = 0; p < NWR; p++)
        if (wr_en[p] && int'(wr_reg[p]) < NREGS) rdy[wr_reg[p]] <= 1'b1;
    end
  end

  always_comb
    for (int p = 0; p < NRD; p++) rd_data[p] = regs[rd_reg[p]];

  // ---------------- copy wait queue (arrival order, compacted) ----------------
  logic             qv [CQ + 1];
  ureg_t            qr [CQ + 1];
  logic [TAG_W-1:0] qt [CQ + 1];
  logic             start [CQ + 1];
  logic             sv [COPY_PORTS];
  ureg_t            sr [COPY_PORTS];
  logic [TAG_W-1:0] st [COPY_PORTS];

  logic             vq [CQ];
  ureg_t            rq [CQ];
  logic [TAG_W-1:0] tq [CQ];

  assign cp_in_ready = !vq[CQ-1];

  // slot CQ is the request arriving this cycle
  always_comb begin
    automatic int n = 0;
    for (int i = 0; i < CQ; i++) begin
      qv[i] = vq[i]; qr[i] = rq[i]; qt[i] = tq[i];
    end
    qv[CQ] = cp_in_valid && cp_in_ready; qr[CQ] = cp_in_reg; qt[CQ] = cp_in_tag;
    for (int p = 0; p < COPY_PORTS; p++) begin sv[p] = 1'b0; sr[p] = '0; st[p] = '0; end
    for (int i = 0; i <= CQ; i++) begin
      start[i] = 1'b0;
      if (qv[i] && rdy[qr[i]] && n < COPY_PORTS) begin
        start[i] = 1'b1;
        sv[n] = 1'b1; sr[n] = qr[i]; st[n] = qt[i];
        n++;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CQ; i++) begin vq[i] <= 1'b0; rq[i] <= '0; tq[i] <= '0; end
    end else begin
      automatic int j = 0;
      for (int i = 0; i < CQ; i++) vq[i] <= 1'b0;
      for (int i = 0; i <= CQ; i++)
        if (qv[i] && !start[i] && j < CQ) begin
          vq[j] <= 1'b1; rq[j] <= qr[i]; tq[j] <= qt[i];
          j++;
        end
    end
  end

  // copy pipeline: stage s holds what started s+1 edges ago
  logic             pv [COPY_LAT][COPY_PORTS];
  logic [TAG_W-1:0] pt [COPY_LAT][COPY_PORTS];
  data_t            pd [COPY_LAT][COPY_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < COPY_LAT; s++)
        for (int p = 0; p < COPY_PORTS; p++) begin
          pv[s][p] <= 1'b0; pt[s][p] <= '0; pd[s][p] <= '0;
        end
    end else begin
      for (int p = 0; p < COPY_PORTS; p++) begin
        pv[0][p] <= sv[p];
        pt[0][p] <= st[p];
        pd[0][p] <= regs[sr[p]];
        for (int s = 1; s < COPY_LAT; s++) begin
          pv[s][p] <= pv[s-1][p];
          pt[s][p] <= pt[s-1][p];
          pd[s][p] <= pd[s-1][p];
        end
      end
    end
  end

  always_comb
    for (int p = 0; p < COPY_PORTS; p++) begin
      cp_rsp_valid[p] = pv[COPY_LAT-1][p];
      cp_rsp_tag[p]   = pt[COPY_LAT-1][p];
      cp_rsp_data[p]  = pd[COPY_LAT-1][p];
    end
endmodule
