// emc_tlb: the EMC's translation buffers, one 32-entry buffer per core.
//
// Each buffer is fully associative and is filled as a circular buffer: a PTE
// that arrives with a chain is written at the core's insert pointer, which
// then advances, so the buffer holds the last pages sent for that core.
// A shootdown from a core invalidates the entry holding the given page. There
// is no page walker: a lookup that misses tells the engine to halt the chain.
// Sizes and the circular fill follow the document; the page size (4 kB), the
// two lookup ports (one per ALU), and that a PTE already resident is not written twice are
// this design's choices. Lookup is combinational; fills and invalidations
// take effect on the next clock edge.
module emc_tlb
  import emc_pkg::*;
#(
  parameter int unsigned N_CORES = NCORES,
  parameter int unsigned ENTRIES = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // lookups, one per ALU
  input  logic [1:0][$clog2(N_CORES)-1:0] q_core,
  input  logic [1:0][VA_W-1:0]       q_va,
  output logic [1:0]                 q_hit,
  output logic [1:0][PA_W-1:0]       q_pa,
  // fill with a PTE shipped along with a chain
  input  logic                       f_vld,
  input  logic [$clog2(N_CORES)-1:0] f_core,
  input  logic [VPN_W-1:0]           f_vpn,
  input  logic [PPN_W-1:0]           f_ppn,
  // shootdown
  input  logic                       i_vld,
  input  logic [$clog2(N_CORES)-1:0] i_core,
  input  logic [VPN_W-1:0]           i_vpn
);
  localparam int unsigned EW = $clog2(ENTRIES);
  logic             vld [N_CORES][ENTRIES];
  logic [VPN_W-1:0] vpn [N_CORES][ENTRIES];
  logic [PPN_W-1:0] ppn [N_CORES][ENTRIES];
  logic [EW-1:0]    ptr [N_CORES];

  logic f_present;

  always_comb begin
    q_hit = '0;
    q_pa  = '0;
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < ENTRIES; i++)
        if (vld[q_core[p]][i] && vpn[q_core[p]][i] == q_va[p][VA_W-1:PAGE_W]) begin
          q_hit[p] = 1'b1;
          q_pa[p]  = {ppn[q_core[p]][i], q_va[p][PAGE_W-1:0]};
        end
    f_present = 1'b0;
    for (int i = 0; i < ENTRIES; i++)
      if (vld[f_core][i] && vpn[f_core][i] == f_vpn) f_present = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CORES; c++) begin
        ptr[c] <= '0;
        for (int i = 0; i < ENTRIES; i++) begin
          vld[c][i] <= 1'b0;
          vpn[c][i] <= '0;
          ppn[c][i] <= '0;
        end
      end
    end else begin
      if (i_vld)
        for (int i = 0; i < ENTRIES; i++)
          if (vpn[i_core][i] == i_vpn) vld[i_core][i] <= 1'b0;
      if (f_vld && !f_present) begin
        vld[f_core][ptr[f_core]] <= 1'b1;
        vpn[f_core][ptr[f_core]] <= f_vpn;
        ppn[f_core][ptr[f_core]] <= f_ppn;
        ptr[f_core] <= ptr[f_core] + 1'b1;
      end
    end
  end
endmodule
