// emc_rs: the reservation station of the EMC back end.
//
// Eight entries shared by both contexts. Uops enter from dispatch, up to two
// per cycle, with a ready bit per source. Each cycle every waiting source
// compares its tag (context, EMC register) with the tags broadcast on the
// result buses and sets its ready bit on a match (wakeup). Up to two entries
// whose sources are all ready are selected and leave the station (2-wide
// issue). An exception in a context flushes that context's entries.
// The size, the wakeup by tag broadcast and the 2-wide issue follow the
// document. The select policy (lowest-numbered ready entry first, new uops
// placed in the lowest free entries) is this design's choice. Wakeup takes
// effect on the clock edge, so a uop can issue the cycle after its last
// source was broadcast; the selected entries are combinational outputs.
module emc_rs
  import emc_pkg::*;
#(
  parameter int unsigned N   = NRS,
  parameter int unsigned NWB = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           ins_vld,
  input  rs_ent_t [1:0]        ins_ent,
  output logic [$clog2(N+1)-1:0] n_free,
  input  logic [NWB-1:0]       wb_vld,
  input  tag_t [NWB-1:0]       wb_tag,
  output logic [1:0]           iss_vld,
  output rs_ent_t [1:0]        iss_ent,
  input  logic                 flush,
  input  logic [CTX_W-1:0]     flush_ctx
);
  rs_ent_t [N-1:0] e;
  logic    [N-1:0] v;
  logic    [N-1:0] rdy;
  logic [$clog2(N)-1:0] sel0, sel1, fr0, fr1;
  logic s0, s1f, f0, f1;

  function automatic logic woken(input rs_ent_t x, input esrc_t s,
                                 input logic [NWB-1:0] wv, input tag_t [NWB-1:0] wt);
    logic m;
    m = 1'b0;
    for (int k = 0; k < NWB; k++)
      if (wv[k] && wt[k].ctx == x.ctx && wt[k].epr == s.idx[EPR_W-1:0]) m = 1'b1;
    return m;
  endfunction

  always_comb begin
    for (int i = 0; i < N; i++) rdy[i] = v[i] && e[i].s1_rdy && e[i].s2_rdy;
    s0 = 1'b0; s1f = 1'b0; sel0 = '0; sel1 = '0;
    for (int i = N-1; i >= 0; i--)
      if (rdy[i]) begin sel1 = sel0; s1f = s0; sel0 = ($clog2(N))'(i); s0 = 1'b1; end
    f0 = 1'b0; f1 = 1'b0; fr0 = '0; fr1 = '0;
    for (int i = N-1; i >= 0; i--)
      if (!v[i]) begin fr1 = fr0; f1 = f0; fr0 = ($clog2(N))'(i); f0 = 1'b1; end
    n_free = '0;
    for (int i = 0; i < N; i++) if (!v[i]) n_free = n_free + 1'b1;
    iss_vld = {s1f, s0};
    iss_ent[0] = e[sel0];
    iss_ent[1] = e[sel1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
      e <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (v[i]) begin
          if (e[i].s1.vld && !e[i].s1.li && woken(e[i], e[i].s1, wb_vld, wb_tag)) e[i].s1_rdy <= 1'b1;
          if (e[i].s2.vld && !e[i].s2.li && woken(e[i], e[i].s2, wb_vld, wb_tag)) e[i].s2_rdy <= 1'b1;
        end
      end
      if (s0)  v[sel0] <= 1'b0;
      if (s1f) v[sel1] <= 1'b0;
      // Insertion: the second uop takes the second free entry only when the
      // first also inserts; otherwise it takes the first.
      if (ins_vld[0] && f0) begin v[fr0] <= 1'b1; e[fr0] <= ins_ent[0]; end
      if (ins_vld[1]) begin
        if (ins_vld[0] && f1) begin v[fr1] <= 1'b1; e[fr1] <= ins_ent[1]; end
        else if (!ins_vld[0] && f0) begin v[fr0] <= 1'b1; e[fr0] <= ins_ent[1]; end
      end
      if (flush)
        for (int i = 0; i < N; i++) if (e[i].ctx == flush_ctx) v[i] <= 1'b0;
    end
  end
endmodule
