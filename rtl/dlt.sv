// dlt: Delinquent Load Table. Fully associative table of the PCs of loads that missed
// in L2 and for which strided loads were selected; ENTRIES = 8 with LRU replacement as
// the mechanism specifies. lk_pc is compared combinationally (lk_hit). A request with
// ins_valid inserts the PC (or refreshes it when already present, which is also how a
// lookup hit is marked as recently used); the change is visible after the clock edge.
// LRU is kept as an age rank per entry (0 = most recent); invalid entries are filled first.
module dlt
  import l2m_pkg::*;
#(
  parameter int ENTRIES = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  pc_t  lk_pc,
  output logic lk_hit,
  input  logic ins_valid,
  input  pc_t  ins_pc
);
  localparam int AW = $clog2(ENTRIES);
  logic          v    [ENTRIES];
  pc_t           pcs  [ENTRIES];
  logic [AW-1:0] age  [ENTRIES];

  always_comb begin
    lk_hit = 1'b0;
    for (int i = 0; i < ENTRIES; i++) if (v[i] && pcs[i] == lk_pc) lk_hit = 1'b1;
  end

  logic [AW-1:0] ins_slot;
  always_comb begin
    ins_slot = '0;
    // default victim: oldest entry
    for (int i = 0; i < ENTRIES; i++) if (age[i] == AW'(ENTRIES - 1)) ins_slot = AW'(i);
    // an invalid entry is preferred
    for (int i = ENTRIES - 1; i >= 0; i--) if (!v[i]) ins_slot = AW'(i);
    for (int i = 0; i < ENTRIES; i++) if (v[i] && pcs[i] == ins_pc) begin
      ins_slot = AW'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        v[i]   <= 1'b0;
        pcs[i] <= '0;
        age[i] <= AW'(i);
      end
    end else if (ins_valid) begin
      for (int i = 0; i < ENTRIES; i++)
        if (age[i] < age[ins_slot]) age[i] <= age[i] + 1'b1;
      age[ins_slot] <= '0;
      v[ins_slot]   <= 1'b1;
      pcs[ins_slot] <= ins_pc;
    end
  end
endmodule
