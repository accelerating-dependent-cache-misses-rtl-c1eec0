// emc_uop_buffer: the front end of one EMC context.
//
// Holds one renamed dependence chain of up to 16 uops. The chain arrives in a
// single transfer from the ring interface and is then read out in program
// order by the dispatch logic, up to two uops per cycle (the back end is
// 2-wide). There is no fetch, decode or rename behind it. The size and the
// absence of a fetch/decode path follow the document; the one-shot load and
// the in-order two-per-cycle read port are this design's choices.
// Load and advance take effect on the clock edge; the head uops are
// combinational outputs.
module emc_uop_buffer
  import emc_pkg::*;
#(
  parameter int unsigned N = CHAIN_MAX
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  euop_t [N-1:0]          load_uops,
  input  logic [$clog2(N+1)-1:0] load_cnt,
  input  logic [$clog2(N+1)-1:0] load_start,  // first uop to dispatch
  output euop_t                  head0,
  output euop_t                  head1,
  output logic                   vld0,
  output logic                   vld1,
  input  logic [1:0]             advance,     // uops taken this cycle (0..2)
  output logic                   empty
);
  euop_t [N-1:0]          buf_q;
  logic [$clog2(N+1)-1:0] rd, cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      rd    <= '0;
      cnt   <= '0;
    end else if (load) begin
      buf_q <= load_uops;
      rd    <= load_start;
      cnt   <= load_cnt;
    end else begin
      rd <= rd + ($clog2(N+1))'(advance);
    end
  end

  assign vld0  = rd < cnt;
  assign vld1  = (rd + 1'b1) < cnt;
  assign head0 = buf_q[rd[$clog2(N)-1:0]];
  assign head1 = buf_q[rd[$clog2(N)-1:0] + 1'b1];
  assign empty = !vld0;
endmodule
