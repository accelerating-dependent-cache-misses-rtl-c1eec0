// emc_rrt: register remapping table of the chain generation unit.
//
// Maps core physical registers (CPRs) to EMC physical registers (EPRs). As in
// the document's example it is a list of (CPR, EPR) pairs; EPRs are handed out
// by a counter that starts at 0 on clear and saturates at the number of EMC
// registers. Up to two entries are allocated per cycle (the
// source miss and the first woken uop share the first cycle). Two lookup ports rename the sources of the uop being added, and a
// decoded vector tells, for every CPR at once, whether it is mapped: the
// chain generator uses it to test every uop of the window in one cycle.
// Allocation returns the EPR the new entry gets in the same cycle; the entry
// is visible to lookups from the next cycle. The entry count and the
// saturating counter follow the document; the ports are this design's.
module emc_rrt
  import emc_pkg::*;
#(
  parameter int unsigned N     = NEPR,
  parameter int unsigned NC    = NCPR
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  // up to two allocations per cycle, slot 0 first
  input  logic [1:0]              alloc,
  input  logic [1:0][$clog2(NC)-1:0] alloc_cpr,
  output logic [1:0][$clog2(N)-1:0]  alloc_epr,
  output logic [$clog2(N+1)-1:0]  used,        // EPRs handed out
  output logic                    full,        // counter saturated
  input  logic [$clog2(NC)-1:0]   lk_cpr0,
  output logic                    lk_hit0,
  output logic [$clog2(N)-1:0]    lk_epr0,
  input  logic [$clog2(NC)-1:0]   lk_cpr1,
  output logic                    lk_hit1,
  output logic [$clog2(N)-1:0]    lk_epr1,
  output logic [NC-1:0]           mapped
);
  logic [$clog2(NC)-1:0] cpr [N];
  logic [$clog2(N+1)-1:0] cnt;

  assign full         = (cnt == ($clog2(N+1))'(N));
  assign used         = cnt;
  assign alloc_epr[0] = cnt[$clog2(N)-1:0];
  assign alloc_epr[1] = alloc[0] ? cnt[$clog2(N)-1:0] + 1'b1 : cnt[$clog2(N)-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < N; i++) cpr[i] <= '0;
    end else if (clear) begin
      cnt <= '0;
    end else begin
      // the counter saturates: allocations beyond N are dropped
      if (alloc[0] && cnt < ($clog2(N+1))'(N)) cpr[alloc_epr[0]] <= alloc_cpr[0];
      if (alloc[1] && ({1'b0, cnt} + alloc[0]) < ($clog2(N+1)+1)'(N)) cpr[alloc_epr[1]] <= alloc_cpr[1];
      if (({1'b0, cnt} + alloc[0] + alloc[1]) > ($clog2(N+1)+1)'(N)) cnt <= ($clog2(N+1))'(N);
      else cnt <= cnt + alloc[0] + alloc[1];
    end
  end

  // A later mapping of the same CPR (not produced by a renamed window) would
  // win: the loop keeps the highest matching EPR.
  always_comb begin
    lk_hit0 = 1'b0; lk_epr0 = '0;
    lk_hit1 = 1'b0; lk_epr1 = '0;
    mapped  = '0;
    for (int i = 0; i < N; i++) begin
      if (i < cnt) begin
        if (cpr[i] == lk_cpr0) begin lk_hit0 = 1'b1; lk_epr0 = ($clog2(N))'(i); end
        if (cpr[i] == lk_cpr1) begin lk_hit1 = 1'b1; lk_epr1 = ($clog2(N))'(i); end
        mapped[cpr[i]] = 1'b1;
      end
    end
  end
endmodule
