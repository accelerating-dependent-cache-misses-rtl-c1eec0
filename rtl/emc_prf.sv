// emc_prf: the physical register file of one EMC context.
//
// 16 registers of 64 bits, each with a ready bit. Results written from the
// common data bus set the ready bit; clearing at chain start resets all ready
// bits. The source miss's destination is written from the DRAM fill through
// the same write ports. Four read ports serve the two dispatch slots, and a
// fifth serves the live-out return to the core. Size follows the document;
// the port counts are this design's choices (three result buses: two ALUs and
// the memory path). Writes on the clock edge, reads combinational with no
// bypass (the engine bypasses the CDB itself).
module emc_prf
  import emc_pkg::*;
#(
  parameter int unsigned N  = NEPR,
  parameter int unsigned NW = 3,
  parameter int unsigned NR = 5
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic [NW-1:0]                 we,
  input  logic [NW-1:0][$clog2(N)-1:0]  wa,
  input  logic [NW-1:0][XLEN-1:0]       wd,
  input  logic [NR-1:0][$clog2(N)-1:0]  ra,
  output logic [NR-1:0][XLEN-1:0]       rd,
  output logic [NR-1:0]                 rrdy,
  output logic [N-1:0]                  ready
);
  logic [N-1:0][XLEN-1:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r     <= '0;
      ready <= '0;
    end else begin
      if (clear) ready <= '0;
      for (int w = 0; w < NW; w++)
        if (we[w]) begin
          r[wa[w]]     <= wd[w];
          ready[wa[w]] <= 1'b1;
        end
    end
  end

  always_comb
    for (int p = 0; p < NR; p++) begin
      rd[p]   = r[ra[p]];
      rrdy[p] = ready[ra[p]];
    end
endmodule
