// emc_engine: the compute engine of the Enhanced Memory Controller.
//
// Runs dependence chains shipped from the cores, right where data from DRAM
// enters the chip. Each of the NCTX contexts holds one chain: a uop buffer,
// a private 16-register PRF, a live-in vector and an 8-entry LSQ. The back
// end is shared: an 8-entry reservation station, two integer ALUs, a TLB of
// 32 entries per core, the 4 kB data cache and the LLC miss predictor.
//
// Life of a chain:
//  1. Accept. A free context takes the chain: uops into the uop buffer,
//     live-ins into the live-in vector, the PTE of the source miss (when
//     sent) into the core's TLB. The PRF and LSQ are cleared.
//  2. Source data. The context first probes the data cache for the line of
//     the source miss (it is there if DRAM delivered it before the chain
//     arrived); otherwise it waits until the line is transmitted from DRAM.
//     The addressed word is written to the source's destination register.
//  3. Run. Uops leave the buffer in order, up to two per cycle (from one
//     context per cycle, alternating), into the reservation station, and
//     loads/stores also take an LSQ entry. Ready uops issue out of order, two
//     per cycle, read their operands from the PRF or the live-in vector, and
//     execute in an ALU. The result is registered and broadcast on the next
//     cycle on the result/tag bus (common data bus, CDB) of that ALU, which
//     writes the PRF and wakes up waiting uops. Loads and stores use the ALU
//     for their address, which the TLB translates before the LSQ gets it.
//     A third CDB port carries load data from the LSQs. Loads query the data
//     cache first; a miss is sent to the LLC, or directly to the memory
//     controller when the miss predictor says the LLC will miss.
//  4. Live-outs. When every uop has finished, the context sends each
//     destination register (EMC register number and value) and then each
//     store (address and data) back to its core, one per cycle, and reports
//     the chain done.
//  Exceptions: a branch whose computed direction differs from the core's
//  prediction, a TLB miss, or a cancel from the core (memory ordering
//  violation) stops the context. It flushes its uops and, after three cycles
//  in which in-flight cache accesses drain, reports the status without
//  live-outs so that the core re-executes the chain itself.
//  Every executed load or store sends a message (ROB position, physical
//  address) to its core so the core's LSQ can track it.
//
// Interfaces are valid/ready where the other side may refuse (chain in,
// LLC and memory requests, live-outs) and plain valid pulses otherwise.
// Reset is asynchronous and active low. Lint reports rst_n as used both
// asynchronously and synchronously: the synchronous use is the disable
// condition of the two concurrent assertions at the end, which exist only
// for simulation, so the warning stands.
//
// What follows the document: the structures and their sizes, 2-wide
// out-of-order issue with tag broadcast wakeup, the data cache holding lines
// arriving from DRAM, direct memory requests on a predicted LLC miss, the
// live-out return, the per-core TLBs filled by PTEs sent with the chain, and
// the halt on branch mispredictions and TLB misses. This design's own
// choices: the three CDB ports, the issue/dispatch policies, the ALU latency
// (one cycle), the memory-message and live-out formats, the three-cycle
// abort drain, and that the predictor is trained only by LLC responses.
module emc_engine
  import emc_pkg::*;
#(
  parameter int unsigned N_CTX   = NCTX,
  parameter int unsigned N_CORES = NCORES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // chains from the cores
  input  logic                 ch_vld,
  output logic                 ch_rdy,
  input  chain_t               ch,
  // every line transmitted from DRAM to the chip
  input  logic                 df_vld,
  input  logic [LADDR_W-1:0]   df_laddr,
  input  logic [LINE_W-1:0]    df_data,
  // requests to the LLC (tag echoed in the response)
  output logic                 llc_req_vld,
  input  logic                 llc_req_rdy,
  output logic [PA_W-1:0]      llc_req_paddr,
  output logic [CORE_W-1:0]    llc_req_core,
  output logic [11:0]          llc_req_tag,
  input  logic                 llc_rsp_vld,
  input  logic [11:0]          llc_rsp_tag,
  input  logic                 llc_rsp_hit,     // data follows from DRAM on a miss
  input  logic [LADDR_W-1:0]   llc_rsp_laddr,
  input  logic [LINE_W-1:0]    llc_rsp_data,
  // requests sent directly to the memory controller queue
  output logic                 mc_req_vld,
  input  logic                 mc_req_rdy,
  output logic [PA_W-1:0]      mc_req_paddr,
  output logic [CORE_W-1:0]    mc_req_core,
  // coherence and translation maintenance
  input  logic                 inv_vld,
  input  logic [LADDR_W-1:0]   inv_laddr,
  input  logic                 sd_vld,
  input  logic [CORE_W-1:0]    sd_core,
  input  logic [VPN_W-1:0]     sd_vpn,
  // cancel from a core (memory disambiguation)
  input  logic                 cancel_vld,
  input  logic [CORE_W-1:0]    cancel_core,
  // memory-operation messages to the cores, one per ALU
  output logic [1:0]           mx_vld,
  output logic [1:0][CORE_W-1:0] mx_core,
  output logic [1:0][ROB_W-1:0]  mx_rob,
  output logic [1:0][PA_W-1:0]   mx_paddr,
  output logic [1:0]           mx_st,
  // live-outs
  output logic                 lo_vld,
  input  logic                 lo_rdy,
  output logic [CORE_W-1:0]    lo_core,
  output logic                 lo_store,        // 0: register, 1: store data
  output logic [EPR_W-1:0]     lo_epr,
  output logic [PA_W-1:0]      lo_paddr,
  output logic [XLEN-1:0]      lo_data,
  // chain completion
  output logic                 cd_vld,
  output logic [CORE_W-1:0]    cd_core,
  output logic [1:0]           cd_status,       // cstat_e, or 3: cancelled
  output logic [N_CTX-1:0]     ctx_busy
);
  if ($bits(euop_t) > 48) begin : g_uop_size
    $error("EMC uop exceeds 6 bytes");
  end

  localparam int unsigned CW  = (N_CTX > 1) ? $clog2(N_CTX) : 1;
  localparam int unsigned LQW = $clog2(NLSQ);
  localparam int unsigned DTW = 1 + CTX_W + LQW;   // data cache tag: {probe, ctx, LSQ entry}

  typedef enum logic [2:0] {C_IDLE, C_WSRC, C_RUN, C_LIVEOUT, C_ABORT, C_DONE} cstate_e;

  cstate_e                cst   [N_CTX];
  logic [CORE_W-1:0]      ccore [N_CTX];
  logic [LADDR_W-1:0]     csrc  [N_CTX];
  logic [2:0]             cword [N_CTX];
  logic [EPR_W-1:0]       cdst  [N_CTX];
  logic [4:0]             cndst [N_CTX];
  logic [5:0]             cinfl [N_CTX];
  logic [4:0]             clo   [N_CTX];
  logic [1:0]             cabt  [N_CTX];
  logic [1:0]             cstat [N_CTX];

  // ------------------------------------------------------------------
  // per-context structures
  euop_t [N_CTX-1:0]      h0, h1;
  logic  [N_CTX-1:0]      hv0, hv1, bempty;
  logic  [N_CTX-1:0][1:0] badv;
  logic  [N_CTX-1:0]      acc;          // context accepts the chain
  logic  [N_CTX-1:0][NLIVEIN-1:0][XLEN-1:0] li_all;

  logic  [N_CTX-1:0][3:0]              prf_we;
  logic  [N_CTX-1:0][3:0][EPR_W-1:0]   prf_wa;
  logic  [N_CTX-1:0][3:0][XLEN-1:0]    prf_wd;
  logic  [4:0][EPR_W-1:0]              prf_ra;
  logic  [N_CTX-1:0][4:0][XLEN-1:0]    prf_rd;
  logic  [N_CTX-1:0][NEPR-1:0]         prf_rdy;

  logic  [N_CTX-1:0][1:0]              lq_al_vld;
  logic  [1:0]                         lq_al_st;
  logic  [1:0][EPR_W-1:0]              lq_al_dst;
  logic  [1:0][PCH_W-1:0]              lq_al_pch;
  logic  [N_CTX-1:0][1:0][LQW-1:0]     lq_al_idx;
  logic  [N_CTX-1:0][$clog2(NLSQ+1)-1:0] lq_free, lq_used;
  logic  [N_CTX-1:0][1:0]              lq_ad_vld;
  logic  [1:0][LQW-1:0]                lq_ad_idx;
  logic  [1:0][PA_W-1:0]               lq_ad_paddr;
  logic  [1:0][XLEN-1:0]               lq_ad_data;
  logic  [N_CTX-1:0]                   lq_cq_vld, lq_cq_gnt, lq_cr_vld;
  logic  [N_CTX-1:0][LQW-1:0]          lq_cq_idx;
  logic  [N_CTX-1:0][PA_W-1:0]         lq_cq_paddr;
  logic  [N_CTX-1:0]                   lq_mq_vld, lq_mq_gnt;
  logic  [N_CTX-1:0][LQW-1:0]          lq_mq_idx;
  logic  [N_CTX-1:0][PA_W-1:0]         lq_mq_paddr;
  logic  [N_CTX-1:0][PCH_W-1:0]        lq_mq_pch;
  logic  [N_CTX-1:0][1:0]              lq_ln_vld;
  logic  [N_CTX-1:0]                   lq_wb_vld, lq_wb_gnt;
  logic  [N_CTX-1:0][EPR_W-1:0]        lq_wb_dst;
  logic  [N_CTX-1:0][XLEN-1:0]         lq_wb_data;
  logic  [N_CTX-1:0]                   lq_done;
  logic  [N_CTX-1:0]                   lq_rd_st;
  logic  [N_CTX-1:0][PA_W-1:0]         lq_rd_paddr;
  logic  [N_CTX-1:0][XLEN-1:0]         lq_rd_data;
  logic  [N_CTX-1:0]                   lq_clear;

  // data cache response (shared)
  logic            dc_req_vld, dc_req_rdy, dc_rsp_vld, dc_rsp_hit;
  logic [PA_W-1:0] dc_req_paddr;
  logic [DTW-1:0]  dc_req_tag, dc_rsp_tag;
  logic [N_CTX-1:0] cprb, prb_gnt;   // source-line probe of the data cache pending / granted
  logic [XLEN-1:0] dc_rsp_data;

  // common data bus
  logic [2:0]            cdb_vld;
  tag_t [2:0]            cdb_tag;
  logic [2:0][XLEN-1:0]  cdb_data;

  // ------------------------------------------------------------------
  // chain acceptance: lowest free context
  always_comb begin
    acc = '0;
    for (int c = N_CTX-1; c >= 0; c--)
      if (cst[c] == C_IDLE) begin acc = '0; acc[c] = ch_vld; end
  end
  always_comb begin
    ch_rdy = 1'b0;
    for (int c = 0; c < N_CTX; c++) if (cst[c] == C_IDLE) ch_rdy = 1'b1;
  end

  // ------------------------------------------------------------------
  // dispatch: one context per cycle, up to two uops in order
  logic           dsp_prio;
  logic [CW-1:0]  dc;
  logic           dc_any;
  logic [1:0]     dsp;               // uops dispatched this cycle
  rs_ent_t [1:0]  ins_ent;
  logic [$clog2(NRS+1)-1:0] rs_free;
  logic [1:0]     iss_vld;
  rs_ent_t [1:0]  iss_ent;
  logic           rs_flush;
  logic [CTX_W-1:0] rs_flush_ctx;

  always_comb begin
    dc_any = 1'b0;
    dc     = '0;
    for (int k = 0; k < N_CTX; k++) begin
      int c;
      c = (k + int'(dsp_prio)) % N_CTX;
      if (!dc_any && cst[c] == C_RUN && !bempty[c]) begin dc_any = 1'b1; dc = CW'(c); end
    end
  end

  function automatic logic src_ready(input esrc_t s, input logic [NEPR-1:0] rdy,
                                     input logic [CW-1:0] cx, input logic [2:0] cv,
                                     input tag_t [2:0] ct);
    logic r;
    r = !s.vld || s.li || rdy[s.idx[EPR_W-1:0]];
    for (int p = 0; p < 3; p++)
      if (cv[p] && ct[p].ctx == CTX_W'(cx) && ct[p].epr == s.idx[EPR_W-1:0]) r = 1'b1;
    return r;
  endfunction

  always_comb begin
    euop_t u0, u1;
    logic  m0, m1;
    u0 = h0[dc];
    u1 = h1[dc];
    m0 = is_mem_op(u0.op);
    m1 = is_mem_op(u1.op);
    dsp = '0;
    if (dc_any && hv0[dc] && rs_free >= 1 && (!m0 || lq_free[dc] >= 1)) begin
      dsp[0] = 1'b1;
      if (hv1[dc] && rs_free >= 2 &&
          ($clog2(NLSQ+1))'({1'b0, m0} + {1'b0, m1}) <= lq_free[dc])
        dsp[1] = 1'b1;
    end
    lq_al_st  = {u1.op == OP_ST, u0.op == OP_ST};
    lq_al_dst = {u1.dst, u0.dst};
    lq_al_pch = {u1.pch, u0.pch};
    lq_al_vld = '0;
    lq_al_vld[dc] = {dsp[1] && m1, dsp[0] && m0};
    for (int k = 0; k < 2; k++) begin
      euop_t u;
      u = (k == 0) ? u0 : u1;
      ins_ent[k].ctx      = CTX_W'(dc);
      ins_ent[k].op       = u.op;
      ins_ent[k].has_dst  = u.has_dst;
      ins_ent[k].dst      = u.dst;
      ins_ent[k].s1       = u.s1;
      ins_ent[k].s1_rdy   = src_ready(u.s1, prf_rdy[dc], dc, cdb_vld, cdb_tag);
      ins_ent[k].s2       = u.s2;
      ins_ent[k].s2_rdy   = src_ready(u.s2, prf_rdy[dc], dc, cdb_vld, cdb_tag);
      ins_ent[k].br_taken = u.br_taken;
      ins_ent[k].pch      = u.pch;
      ins_ent[k].rob      = u.rob;
      ins_ent[k].lsq      = (k == 1 && dsp[0] && m0) ? lq_al_idx[dc][1] : lq_al_idx[dc][0];
    end
    // the second uop depends on the first: its source cannot be ready yet
    if (u1.s1.vld && !u1.s1.li && u0.has_dst && u1.s1.idx[EPR_W-1:0] == u0.dst) ins_ent[1].s1_rdy = 1'b0;
    if (u1.s2.vld && !u1.s2.li && u0.has_dst && u1.s2.idx[EPR_W-1:0] == u0.dst) ins_ent[1].s2_rdy = 1'b0;
    badv = '0;
    badv[dc] = {1'b0, dsp[0]} + {1'b0, dsp[1]};
  end

  emc_rs #(.N(NRS), .NWB(3)) u_rs (
    .clk, .rst_n,
    .ins_vld(dsp), .ins_ent(ins_ent), .n_free(rs_free),
    .wb_vld(cdb_vld), .wb_tag(cdb_tag),
    .iss_vld(iss_vld), .iss_ent(iss_ent),
    .flush(rs_flush), .flush_ctx(rs_flush_ctx)
  );

  // ------------------------------------------------------------------
  // issue: operand read and ALUs
  logic [1:0][XLEN-1:0] opa, opb, alu_res;
  logic [1:0]           alu_tkn;
  logic [1:0]           iss_ok;

  assign prf_ra[0] = iss_ent[0].s1.idx[EPR_W-1:0];
  assign prf_ra[1] = iss_ent[0].s2.idx[EPR_W-1:0];
  assign prf_ra[2] = iss_ent[1].s1.idx[EPR_W-1:0];
  assign prf_ra[3] = iss_ent[1].s2.idx[EPR_W-1:0];

  always_comb
    for (int k = 0; k < 2; k++) begin
      rs_ent_t e;
      e = iss_ent[k];
      opa[k] = e.s1.li ? li_all[e.ctx][e.s1.idx] : prf_rd[e.ctx][2*k];
      opb[k] = !e.s2.vld ? '0 : e.s2.li ? li_all[e.ctx][e.s2.idx] : prf_rd[e.ctx][2*k+1];
      iss_ok[k] = iss_vld[k] && !(rs_flush && e.ctx == rs_flush_ctx);
    end

  for (genvar k = 0; k < 2; k++) begin : g_alu
    emc_alu u_alu (
      .op(iss_ent[k].op), .a(opa[k]), .b(opb[k]), .b_vld(iss_ent[k].s2.vld),
      .result(alu_res[k]), .taken(alu_tkn[k])
    );
  end

  // execute-stage registers
  logic    [1:0]           xv;
  rs_ent_t [1:0]           xe;
  logic    [1:0][XLEN-1:0] xr, xb;
  logic    [1:0]           xt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xv <= '0; xe <= '0; xr <= '0; xb <= '0; xt <= '0;
    end else begin
      for (int k = 0; k < 2; k++) begin
        xv[k] <= iss_ok[k];
        xe[k] <= iss_ent[k];
        xr[k] <= alu_res[k];
        xb[k] <= opb[k];
        xt[k] <= alu_tkn[k];
      end
    end
  end

  // ------------------------------------------------------------------
  // execute stage: CDB, branch check, translation
  logic [1:0][CORE_W-1:0] tq_core;
  logic [1:0][VA_W-1:0]   tq_va;
  logic [1:0]             tq_hit;
  logic [1:0][PA_W-1:0]   tq_pa;
  logic [N_CTX-1:0]       ex_mispred, ex_tlbmiss, ex_cancel;
  logic [1:0]             xlive;

  always_comb begin
    ex_mispred = '0;
    ex_tlbmiss = '0;
    lq_ad_vld  = '0;
    mx_vld     = '0;
    for (int k = 0; k < 2; k++) begin
      xlive[k]   = xv[k] && cst[xe[k].ctx] == C_RUN;
      tq_core[k] = ccore[xe[k].ctx];
      tq_va[k]   = xr[k][VA_W-1:0];
      cdb_vld[k] = xlive[k] && xe[k].has_dst && !is_mem_op(xe[k].op);
      cdb_tag[k] = '{ctx: xe[k].ctx, epr: xe[k].dst};
      cdb_data[k] = xr[k];
      if (xlive[k] && (xe[k].op == OP_BEQ || xe[k].op == OP_BNE) && xt[k] != xe[k].br_taken)
        ex_mispred[xe[k].ctx] = 1'b1;
      if (xlive[k] && is_mem_op(xe[k].op)) begin
        if (!tq_hit[k]) ex_tlbmiss[xe[k].ctx] = 1'b1;
        else begin
          lq_ad_vld[xe[k].ctx][k] = 1'b1;
          mx_vld[k] = 1'b1;
        end
      end
      lq_ad_idx[k]   = xe[k].lsq;
      lq_ad_paddr[k] = tq_pa[k];
      lq_ad_data[k]  = xb[k];
      mx_core[k]  = ccore[xe[k].ctx];
      mx_rob[k]   = xe[k].rob;
      mx_paddr[k] = tq_pa[k];
      mx_st[k]    = xe[k].op == OP_ST;
    end
    for (int c = 0; c < N_CTX; c++)
      ex_cancel[c] = cancel_vld && cancel_core == ccore[c] &&
                     (cst[c] == C_WSRC || cst[c] == C_RUN);
    // a mispredicted branch or missing translation blocks the other
    // context's memory update only within its own context
    for (int k = 0; k < 2; k++)
      if (ex_mispred[xe[k].ctx] || ex_tlbmiss[xe[k].ctx]) begin
        lq_ad_vld[xe[k].ctx] = '0;
        mx_vld[k] = 1'b0;
      end
  end

  emc_tlb #(.N_CORES(N_CORES), .ENTRIES(32)) u_tlb (
    .clk, .rst_n,
    .q_core(tq_core), .q_va(tq_va), .q_hit(tq_hit), .q_pa(tq_pa),
    .f_vld(ch_vld && ch_rdy && ch.pte_vld), .f_core(ch.core),
    .f_vpn(ch.pte_vpn), .f_ppn(ch.pte_ppn),
    .i_vld(sd_vld), .i_core(sd_core), .i_vpn(sd_vpn)
  );

  // the RS flush serves one context per cycle; two simultaneous aborts are
  // flushed one after the other (the second during its drain)
  always_comb begin
    rs_flush = 1'b0;
    rs_flush_ctx = '0;
    for (int c = N_CTX-1; c >= 0; c--)
      if (ex_mispred[c] || ex_tlbmiss[c] || ex_cancel[c] ||
          (cst[c] == C_ABORT && cabt[c] != 2'd0)) begin
        rs_flush = 1'b1;
        rs_flush_ctx = CTX_W'(c);
      end
  end

  // ------------------------------------------------------------------
  // memory result bus: one LSQ write-back per cycle
  logic          wb_prio;
  always_comb begin
    logic got;
    got = 1'b0;
    lq_wb_gnt = '0;
    cdb_vld[2] = 1'b0;
    cdb_tag[2] = '0;
    cdb_data[2] = '0;
    for (int k = 0; k < N_CTX; k++) begin
      int c;
      c = (k + int'(wb_prio)) % N_CTX;
      if (!got && lq_wb_vld[c]) begin
        got = 1'b1;
        lq_wb_gnt[c] = 1'b1;
        cdb_vld[2] = cst[c] == C_RUN;
        cdb_tag[2] = '{ctx: CTX_W'(c), epr: lq_wb_dst[c]};
        cdb_data[2] = lq_wb_data[c];
      end
    end
  end

  // ------------------------------------------------------------------
  // data cache port: one LSQ request per cycle
  always_comb begin
    logic got;
    got = 1'b0;
    lq_cq_gnt = '0;
    prb_gnt = '0;
    dc_req_vld = 1'b0;
    dc_req_paddr = '0;
    dc_req_tag = '0;
    // a newly accepted context first looks for its source line in the cache
    for (int c = 0; c < N_CTX; c++) begin
      if (!got && cprb[c] && cst[c] == C_WSRC) begin
        got = 1'b1;
        dc_req_vld   = 1'b1;
        dc_req_paddr = {csrc[c], cword[c], 3'b000};
        dc_req_tag   = {1'b1, CTX_W'(c), LQW'(0)};
        prb_gnt[c]   = dc_req_rdy;
      end
    end
    for (int k = 0; k < N_CTX; k++) begin
      int c;
      c = (k + int'(wb_prio)) % N_CTX;
      if (!got && lq_cq_vld[c] && cst[c] == C_RUN) begin
        got = 1'b1;
        dc_req_vld   = 1'b1;
        dc_req_paddr = lq_cq_paddr[c];
        dc_req_tag   = {1'b0, CTX_W'(c), lq_cq_idx[c]};
        lq_cq_gnt[c] = dc_req_rdy;
      end
    end
    for (int c = 0; c < N_CTX; c++)
      lq_cr_vld[c] = dc_rsp_vld && !dc_rsp_tag[DTW-1] && dc_rsp_tag[LQW +: CTX_W] == CTX_W'(c);
  end

  emc_dcache #(.SIZE_B(4096), .WAYS(4), .TAG_IW(DTW)) u_dcache (
    .clk, .rst_n,
    .req_vld(dc_req_vld), .req_rdy(dc_req_rdy), .req_paddr(dc_req_paddr), .req_tag(dc_req_tag),
    .rsp_vld(dc_rsp_vld), .rsp_hit(dc_rsp_hit), .rsp_data(dc_rsp_data), .rsp_tag(dc_rsp_tag),
    .fill_vld(df_vld), .fill_laddr(df_laddr), .fill_data(df_data),
    .inv_vld(inv_vld), .inv_laddr(inv_laddr)
  );

  // ------------------------------------------------------------------
  // memory requests: LLC or straight to the memory controller
  logic [CORE_W-1:0] mp_qcore;
  logic [PCH_W-1:0]  mp_qpch;
  logic              mp_miss;
  logic              mq_any;
  logic [CW-1:0]     mq_c;

  always_comb begin
    mq_any = 1'b0;
    mq_c   = '0;
    for (int k = 0; k < N_CTX; k++) begin
      int c;
      c = (k + int'(wb_prio)) % N_CTX;
      if (!mq_any && lq_mq_vld[c] && cst[c] == C_RUN) begin mq_any = 1'b1; mq_c = CW'(c); end
    end
  end
  assign mp_qcore = ccore[mq_c];
  assign mp_qpch  = lq_mq_pch[mq_c];
  always_comb begin
    llc_req_vld   = mq_any && !mp_miss;
    llc_req_paddr = lq_mq_paddr[mq_c];
    llc_req_core  = ccore[mq_c];
    llc_req_tag   = {PCH_W'(lq_mq_pch[mq_c]), CTX_W'(mq_c), LQW'(lq_mq_idx[mq_c])};
    mc_req_vld    = mq_any && mp_miss;
    mc_req_paddr  = lq_mq_paddr[mq_c];
    mc_req_core   = ccore[mq_c];
    lq_mq_gnt = '0;
    lq_mq_gnt[mq_c] = mq_any && (mp_miss ? mc_req_rdy : llc_req_rdy);
  end

  logic [CTX_W-1:0] rsp_ctx;
  assign rsp_ctx = llc_rsp_tag[CTX_W+LQW-1:LQW];

  emc_miss_pred #(.N_CORES(N_CORES), .ENTRIES(256), .CW(3), .THRESH(3)) u_mpred (
    .clk, .rst_n,
    .q_core(mp_qcore), .q_pch(mp_qpch), .q_miss(mp_miss),
    .t_vld(llc_rsp_vld), .t_core(ccore[rsp_ctx]),
    .t_pch(llc_rsp_tag[11:12-PCH_W]), .t_llc_miss(!llc_rsp_hit)
  );

  // ------------------------------------------------------------------
  // live-out port: lowest context in C_LIVEOUT
  logic          lo_any;
  logic [CW-1:0] lo_c;
  always_comb begin
    lo_any = 1'b0;
    lo_c   = '0;
    for (int c = N_CTX-1; c >= 0; c--)
      if (cst[c] == C_LIVEOUT) begin lo_any = 1'b1; lo_c = CW'(c); end
  end
  logic lo_reg_phase;
  assign lo_reg_phase = clo[lo_c] < cndst[lo_c];
  assign prf_ra[4] = clo[lo_c][EPR_W-1:0];
  logic [LQW-1:0] lo_lq;
  assign lo_lq = LQW'(clo[lo_c] - cndst[lo_c]);
  assign lo_vld   = lo_any && (lo_reg_phase || lq_rd_st[lo_c]) &&
                    (clo[lo_c] < cndst[lo_c] + 5'(lq_used[lo_c]));
  assign lo_core  = ccore[lo_c];
  assign lo_store = !lo_reg_phase;
  assign lo_epr   = clo[lo_c][EPR_W-1:0];
  assign lo_paddr = lo_reg_phase ? '0 : lq_rd_paddr[lo_c];
  assign lo_data  = lo_reg_phase ? prf_rd[lo_c][4] : lq_rd_data[lo_c];

  // chain done report: lowest context in C_DONE
  logic          cd_any;
  logic [CW-1:0] cd_c;
  always_comb begin
    cd_any = 1'b0;
    cd_c   = '0;
    for (int c = N_CTX-1; c >= 0; c--)
      if (cst[c] == C_DONE) begin cd_any = 1'b1; cd_c = CW'(c); end
  end
  assign cd_vld    = cd_any;
  assign cd_core   = ccore[cd_c];
  assign cd_status = cstat[cd_c];

  // ------------------------------------------------------------------
  // per-context instances and control
  // number of register live-outs of the offered chain
  logic [4:0] ch_nd;
  always_comb begin
    ch_nd = '0;
    for (int i = 0; i < CHAIN_MAX; i++)
      if (i < int'(ch.n_uops) && ch.uops[i].has_dst) ch_nd = ch_nd + 1'b1;
  end

  for (genvar c = 0; c < N_CTX; c++) begin : g_ctx
    logic src_hit, prb_hit;
    assign src_hit = cst[c] == C_WSRC && df_vld && df_laddr == csrc[c];
    assign prb_hit = cst[c] == C_WSRC && dc_rsp_vld && dc_rsp_hit && dc_rsp_tag[DTW-1] &&
                     dc_rsp_tag[LQW +: CTX_W] == CTX_W'(c);

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)          cprb[c] <= 1'b0;
      else if (acc[c])     cprb[c] <= 1'b1;
      else if (prb_gnt[c] || cst[c] != C_WSRC) cprb[c] <= 1'b0;

    emc_uop_buffer #(.N(CHAIN_MAX)) u_ub (
      .clk, .rst_n,
      .load(acc[c]), .load_uops(ch.uops), .load_cnt(ch.n_uops), .load_start(5'd1),
      .head0(h0[c]), .head1(h1[c]), .vld0(hv0[c]), .vld1(hv1[c]),
      .advance(badv[c]), .empty(bempty[c])
    );

    livein_vector #(.N(NLIVEIN)) u_li (
      .clk, .rst_n, .clear(1'b0),
      .sh0_vld(1'b0), .sh0_data('0), .sh1_vld(1'b0), .sh1_data('0),
      .ld_vld(acc[c]), .ld_data(ch.li), .ld_cnt(ch.n_li),
      .rd_idx0('0), .rd_data0(), .rd_idx1('0), .rd_data1(),
      .all_data(li_all[c]), .count()
    );

    always_comb begin
      for (int p = 0; p < 3; p++) begin
        prf_we[c][p] = cdb_vld[p] && cdb_tag[p].ctx == CTX_W'(c);
        prf_wa[c][p] = cdb_tag[p].epr;
        prf_wd[c][p] = cdb_data[p];
      end
      prf_we[c][3] = src_hit || prb_hit;
      prf_wa[c][3] = cdst[c];
      prf_wd[c][3] = src_hit ? df_data[cword[c]*XLEN +: XLEN] : dc_rsp_data;
    end

    emc_prf #(.N(NEPR), .NW(4), .NR(5)) u_prf (
      .clk, .rst_n, .clear(acc[c]),
      .we(prf_we[c]), .wa(prf_wa[c]), .wd(prf_wd[c]),
      .ra(prf_ra), .rd(prf_rd[c]), .rrdy(), .ready(prf_rdy[c])
    );

    assign lq_ln_vld[c] = {llc_rsp_vld && llc_rsp_hit && rsp_ctx == CTX_W'(c), df_vld};
    assign lq_clear[c]  = acc[c];

    emc_lsq #(.N(NLSQ)) u_lsq (
      .clk, .rst_n, .clear(lq_clear[c]),
      .al_vld(lq_al_vld[c]), .al_st(lq_al_st), .al_dst(lq_al_dst), .al_pch(lq_al_pch),
      .al_idx(lq_al_idx[c]), .n_free(lq_free[c]),
      .ad_vld(lq_ad_vld[c]), .ad_idx(lq_ad_idx), .ad_paddr(lq_ad_paddr), .ad_data(lq_ad_data),
      .cq_vld(lq_cq_vld[c]), .cq_idx(lq_cq_idx[c]), .cq_paddr(lq_cq_paddr[c]), .cq_gnt(lq_cq_gnt[c]),
      .cr_vld(lq_cr_vld[c]), .cr_idx(dc_rsp_tag[LQW-1:0]), .cr_hit(dc_rsp_hit), .cr_data(dc_rsp_data),
      .mq_vld(lq_mq_vld[c]), .mq_idx(lq_mq_idx[c]), .mq_paddr(lq_mq_paddr[c]), .mq_pch(lq_mq_pch[c]),
      .mq_gnt(lq_mq_gnt[c]),
      .ln_vld(lq_ln_vld[c]), .ln_laddr({llc_rsp_laddr, df_laddr}), .ln_data({llc_rsp_data, df_data}),
      .wb_vld(lq_wb_vld[c]), .wb_dst(lq_wb_dst[c]), .wb_data(lq_wb_data[c]), .wb_gnt(lq_wb_gnt[c]),
      .all_done(lq_done[c]), .n_used(lq_used[c]),
      .rd_idx((lo_c == CW'(c)) ? lo_lq : '0), .rd_st(lq_rd_st[c]),
      .rd_paddr(lq_rd_paddr[c]), .rd_data(lq_rd_data[c])
    );

    assign ctx_busy[c] = cst[c] != C_IDLE;

    // uops leaving the execute stage this cycle
    logic [1:0] xdone;
    always_comb
      for (int k = 0; k < 2; k++) xdone[k] = xv[k] && xe[k].ctx == CTX_W'(c);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cst[c] <= C_IDLE; ccore[c] <= '0; csrc[c] <= '0; cword[c] <= '0;
        cdst[c] <= '0; cndst[c] <= '0; cinfl[c] <= '0; clo[c] <= '0;
        cabt[c] <= '0; cstat[c] <= '0;
      end else begin
        cinfl[c] <= cinfl[c] + 6'(badv[c]) - 6'(xdone[0]) - 6'(xdone[1]);
        unique case (cst[c])
          C_IDLE: if (acc[c]) begin
            cst[c]   <= C_WSRC;
            ccore[c] <= ch.core;
            csrc[c]  <= ch.src_paddr[PA_W-1:OFF_W];
            cword[c] <= ch.src_paddr[OFF_W-1:3];
            cdst[c]  <= ch.uops[0].dst;
            cndst[c] <= ch_nd;
            clo[c]   <= '0;
            cinfl[c] <= '0;
            cstat[c] <= ST_OK;
          end
          C_WSRC: begin
            if (ex_cancel[c]) begin cst[c] <= C_ABORT; cabt[c] <= 2'd3; cstat[c] <= 2'd3; end
            else if (src_hit || prb_hit) cst[c] <= C_RUN;
          end
          C_RUN: begin
            if (ex_mispred[c])      begin cst[c] <= C_ABORT; cabt[c] <= 2'd3; cstat[c] <= ST_MISPRED; end
            else if (ex_tlbmiss[c]) begin cst[c] <= C_ABORT; cabt[c] <= 2'd3; cstat[c] <= ST_TLBMISS; end
            else if (ex_cancel[c])  begin cst[c] <= C_ABORT; cabt[c] <= 2'd3; cstat[c] <= 2'd3; end
            else if (bempty[c] && cinfl[c] == '0 && lq_done[c] && !(|xdone)) cst[c] <= C_LIVEOUT;
          end
          C_LIVEOUT: if (lo_c == CW'(c)) begin
            if (clo[c] >= cndst[c] + 5'(lq_used[c])) cst[c] <= C_DONE;
            else if (!lo_vld || lo_rdy) clo[c] <= clo[c] + 1'b1;
          end
          C_ABORT: begin
            cabt[c] <= cabt[c] - 1'b1;
            if (cabt[c] == 2'd0) cst[c] <= C_DONE;
          end
          C_DONE: if (cd_c == CW'(c)) cst[c] <= C_IDLE;
          default: cst[c] <= C_IDLE;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsp_prio <= 1'b0;
      wb_prio  <= 1'b0;
    end else begin
      dsp_prio <= !dsp_prio;
      wb_prio  <= !wb_prio;
    end
  end

  // each accepted chain names at least its source miss
  a_chain_len: assert property (@(posedge clk) disable iff (!rst_n)
    (ch_vld && ch_rdy) |-> (ch.n_uops >= 5'd1 && ch.n_uops <= 5'(CHAIN_MAX)));
  a_lo_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (lo_vld && !lo_rdy) |=> lo_vld);
endmodule
