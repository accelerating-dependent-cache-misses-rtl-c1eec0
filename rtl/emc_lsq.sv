// emc_lsq: the load/store queue of one EMC context.
//
// Eight entries, allocated in program order at dispatch and kept until the
// chain ends (a chain carries at most eight loads and stores), so the entry
// number is also the program order. The ALUs deliver the translated address
// (and, for a store, its data). A store only writes its data here: EMC
// stores are register spills and never write the cache; their data goes back
// to the core with the live-outs. A load may proceed once every older store
// has its address. If the youngest older store to the same 8-byte word
// exists, its data is forwarded; otherwise the load asks the data cache.
// A cache miss becomes a memory request, to the LLC or straight to the memory
// controller as the engine's miss predictor decides, and the load then waits
// for its line to arrive. Several loads can wait at once (non-blocking).
// Loads that have their data are written back on the memory result bus one
// per cycle, oldest first.
// The size, the store handling and the non-blocking loads follow the
// document; forwarding, the "all older store addresses known" rule, aligned
// 8-byte accesses and the request and write-back arbitration are this
// design's choices. All requests are valid/grant pairs: an output is offered
// combinationally and the entry advances on the clock edge it is granted.
module emc_lsq
  import emc_pkg::*;
#(
  parameter int unsigned N = NLSQ
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  // allocation in program order, slot 0 older than slot 1; al_idx[1] is
  // the entry slot 1 gets when slot 0 allocates too, al_idx[0] otherwise
  input  logic [1:0]             al_vld,
  input  logic [1:0]             al_st,
  input  logic [1:0][EPR_W-1:0]  al_dst,
  input  logic [1:0][PCH_W-1:0]  al_pch,
  output logic [1:0][$clog2(N)-1:0] al_idx,
  output logic [$clog2(N+1)-1:0] n_free,
  // address (and store data) from the ALUs
  input  logic [1:0]             ad_vld,
  input  logic [1:0][$clog2(N)-1:0] ad_idx,
  input  logic [1:0][PA_W-1:0]   ad_paddr,
  input  logic [1:0][XLEN-1:0]   ad_data,
  // data cache request / response
  output logic                   cq_vld,
  output logic [$clog2(N)-1:0]   cq_idx,
  output logic [PA_W-1:0]        cq_paddr,
  input  logic                   cq_gnt,
  input  logic                   cr_vld,
  input  logic [$clog2(N)-1:0]   cr_idx,
  input  logic                   cr_hit,
  input  logic [XLEN-1:0]        cr_data,
  // memory request after a cache miss
  output logic                   mq_vld,
  output logic [$clog2(N)-1:0]   mq_idx,
  output logic [PA_W-1:0]        mq_paddr,
  output logic [PCH_W-1:0]       mq_pch,
  input  logic                   mq_gnt,
  // lines arriving on chip: [0] a DRAM fill, [1] LLC hit data
  input  logic [1:0]             ln_vld,
  input  logic [1:0][LADDR_W-1:0] ln_laddr,
  input  logic [1:0][LINE_W-1:0] ln_data,
  // load write-back
  output logic                   wb_vld,
  output logic [EPR_W-1:0]       wb_dst,
  output logic [XLEN-1:0]        wb_data,
  input  logic                   wb_gnt,
  // state
  output logic                   all_done,   // every allocated entry finished
  output logic [$clog2(N+1)-1:0] n_used,
  input  logic [$clog2(N)-1:0]   rd_idx,     // read an entry for the live-outs
  output logic                   rd_st,
  output logic [PA_W-1:0]        rd_paddr,
  output logic [XLEN-1:0]        rd_data
);
  typedef enum logic [2:0] {
    L_ADDR,    // waiting for its address
    L_READY,   // address known, not yet sent
    L_CACHE,   // in the data cache pipeline
    L_MREQ,    // cache miss, memory request not yet accepted
    L_MWAIT,   // waiting for the line
    L_WB,      // has data, waiting for the result bus
    L_DONE
  } lstate_e;

  localparam int unsigned IW = $clog2(N);

  logic [N-1:0]            st;
  lstate_e                 state [N];
  logic [N-1:0][PA_W-1:0]  paddr;
  logic [N-1:0][XLEN-1:0]  data;
  logic [N-1:0][EPR_W-1:0] dst;
  logic [N-1:0][PCH_W-1:0] pch;
  logic [$clog2(N+1)-1:0]  tail;

  assign n_used   = tail;
  assign n_free   = ($clog2(N+1))'(N) - tail;
  assign al_idx[0] = tail[IW-1:0];
  assign al_idx[1] = tail[IW-1:0] + 1'b1;   // slot 1 when slot 0 also allocates
  logic [1:0][IW-1:0] wr_idx;
  assign wr_idx[0] = tail[IW-1:0];
  assign wr_idx[1] = al_vld[0] ? tail[IW-1:0] + 1'b1 : tail[IW-1:0];

  // issue candidate: the oldest ready load all of whose older stores have
  // addresses; forwarding source: youngest older store to the same word
  logic          ld_sel;
  logic [IW-1:0] ld_idx;
  logic          fwd_hit;
  logic [XLEN-1:0] fwd_data;
  always_comb begin
    logic blocked;
    ld_sel = 1'b0; ld_idx = '0; fwd_hit = 1'b0; fwd_data = '0;
    blocked = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (i < tail) begin
        if (st[i]) begin
          if (state[i] == L_ADDR) blocked = 1'b1;
        end else if (!ld_sel && !blocked && state[i] == L_READY) begin
          ld_sel = 1'b1;
          ld_idx = IW'(i);
        end
      end
    end
    for (int j = 0; j < N; j++)
      if (ld_sel && j < int'(ld_idx) && st[j] &&
          paddr[j][PA_W-1:3] == paddr[ld_idx][PA_W-1:3]) begin
        fwd_hit  = 1'b1;
        fwd_data = data[j];
      end
  end

  assign cq_vld   = ld_sel && !fwd_hit;
  assign cq_idx   = ld_idx;
  assign cq_paddr = paddr[ld_idx];

  // memory request and write-back candidates, oldest first
  always_comb begin
    mq_vld = 1'b0; mq_idx = '0;
    wb_vld = 1'b0; wb_dst = '0; wb_data = '0;
    for (int i = N-1; i >= 0; i--) begin
      if (i < tail && state[i] == L_MREQ) begin mq_vld = 1'b1; mq_idx = IW'(i); end
    end
    for (int i = N-1; i >= 0; i--) begin
      if (i < tail && state[i] == L_WB) begin
        wb_vld = 1'b1; wb_dst = dst[i]; wb_data = data[i];
      end
    end
  end
  assign mq_paddr = paddr[mq_idx];
  assign mq_pch   = pch[mq_idx];

  logic [IW-1:0] wb_idx;
  always_comb begin
    wb_idx = '0;
    for (int i = N-1; i >= 0; i--) if (i < tail && state[i] == L_WB) wb_idx = IW'(i);
  end

  always_comb begin
    all_done = 1'b1;
    for (int i = 0; i < N; i++) if (i < tail && state[i] != L_DONE) all_done = 1'b0;
  end

  assign rd_st    = st[rd_idx];
  assign rd_paddr = paddr[rd_idx];
  assign rd_data  = data[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tail <= '0; st <= '0; paddr <= '0; data <= '0; dst <= '0; pch <= '0;
      for (int i = 0; i < N; i++) state[i] <= L_DONE;
    end else if (clear) begin
      tail <= '0;
    end else begin
      for (int k = 0; k < 2; k++)
        if (al_vld[k]) begin
          st[wr_idx[k]]    <= al_st[k];
          dst[wr_idx[k]]   <= al_dst[k];
          pch[wr_idx[k]]   <= al_pch[k];
          state[wr_idx[k]] <= L_ADDR;
        end
      tail <= tail + al_vld[0] + al_vld[1];
      for (int k = 0; k < 2; k++)
        if (ad_vld[k]) begin
          paddr[ad_idx[k]] <= ad_paddr[k];
          if (st[ad_idx[k]]) begin
            data[ad_idx[k]]  <= ad_data[k];
            state[ad_idx[k]] <= L_DONE;
          end else begin
            state[ad_idx[k]] <= L_READY;
          end
        end
      if (ld_sel && fwd_hit) begin
        data[ld_idx]  <= fwd_data;
        state[ld_idx] <= L_WB;
      end else if (cq_vld && cq_gnt) begin
        state[ld_idx] <= L_CACHE;
      end
      if (cr_vld) begin
        if (cr_hit) begin
          data[cr_idx]  <= cr_data;
          state[cr_idx] <= L_WB;
        end else begin
          state[cr_idx] <= L_MREQ;
        end
      end
      if (mq_vld && mq_gnt) state[mq_idx] <= L_MWAIT;
      for (int p = 0; p < 2; p++)
        if (ln_vld[p])
          for (int i = 0; i < N; i++)
            if (i < tail && (state[i] == L_MWAIT || (state[i] == L_MREQ && !(mq_vld && mq_gnt && mq_idx == IW'(i))))
                && paddr[i][PA_W-1:OFF_W] == ln_laddr[p]) begin
              data[i]  <= ln_data[p][paddr[i][OFF_W-1:3]*XLEN +: XLEN];
              state[i] <= L_WB;
            end
      if (wb_vld && wb_gnt) state[wb_idx] <= L_DONE;
    end
  end
endmodule
