// emc_miss_pred: LLC miss predictor of the EMC.
//
// One array of 3-bit saturating counters per core, indexed by a hash of the
// PC of a load. A load whose counter is above the threshold is predicted to
// miss in the LLC and is sent straight to the memory controller instead of to
// the LLC. Training: an LLC miss increments the counter, an LLC hit
// decrements it. The counter width and the per-core arrays follow the
// document; the array size (256 per core), the hash (the 8-bit PC hash
// carried in the uop) and the threshold (predict a miss when the counter is 4
// or more) are this design's choices. Lookup is combinational, training takes
// effect on the next clock edge. Counters reset to 0 (predict hit).
module emc_miss_pred
  import emc_pkg::*;
#(
  parameter int unsigned N_CORES = NCORES,
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned CW      = 3,
  parameter int unsigned THRESH  = 3       // predict miss when counter > THRESH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // lookup
  input  logic [$clog2(N_CORES)-1:0] q_core,
  input  logic [PCH_W-1:0]           q_pch,
  output logic                       q_miss,
  // training
  input  logic                       t_vld,
  input  logic [$clog2(N_CORES)-1:0] t_core,
  input  logic [PCH_W-1:0]           t_pch,
  input  logic                       t_llc_miss
);
  localparam int unsigned IW = $clog2(ENTRIES);
  logic [CW-1:0] ctr [N_CORES][ENTRIES];

  function automatic logic [IW-1:0] hidx(input logic [PCH_W-1:0] h);
    return IW'(h);
  endfunction

  assign q_miss = ctr[q_core][hidx(q_pch)] > CW'(THRESH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CORES; c++)
        for (int i = 0; i < ENTRIES; i++) ctr[c][i] <= '0;
    end else if (t_vld) begin
      if (t_llc_miss) begin
        if (ctr[t_core][hidx(t_pch)] != {CW{1'b1}})
          ctr[t_core][hidx(t_pch)] <= ctr[t_core][hidx(t_pch)] + 1'b1;
      end else if (ctr[t_core][hidx(t_pch)] != '0) begin
        ctr[t_core][hidx(t_pch)] <= ctr[t_core][hidx(t_pch)] - 1'b1;
      end
    end
  end
endmodule
