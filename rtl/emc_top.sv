// emc_top: a quad-core processor's Enhanced Memory Controller subsystem.
//
// Each core has a chain generation unit and a 3-bit dependent-miss counter.
// When a core stalls on an LLC miss with a full window and the counter says
// a dependent miss is likely, its unit collects the uops that depend on the
// miss and ships them as a chain. A round-robin arbiter passes one chain at a
// time to the EMC engine at the memory controller, which accepts it when one
// of its two contexts is free. The engine runs the chain as soon as the
// source miss's data arrives from DRAM, issues the chain's own loads to its
// data cache, the LLC or directly to DRAM, and returns the live-out registers
// and store data to the home core.
//
// The cores, the LLC slices, the ring interconnect, the memory controller's
// request scheduler and DRAM are outside this block: their side of every
// connection is a port. Per core the ports carry the trigger, the instruction
// window (head first), the core register ready bits and two register read
// ports, and the counter's training. On the memory side they carry the DRAM
// line stream, LLC requests and responses, direct memory-controller requests,
// coherence invalidations, TLB shootdowns, cancels, memory-operation
// messages, live-outs and chain completions (all tagged with the core).
// The structure follows the document's quad-core system with one memory
// controller; the round-robin chain arbiter and the port formats are this
// design's own. Lint reports rst_n as flopped both synchronously and
// asynchronously; the synchronous use is the disable condition of the
// engine's simulation-only assertions, so the warning stands. Port 0 of each
// core's pseudo-broadcast tag is the window head's destination register, a
// direct wire.
module emc_top
  import emc_pkg::*;
#(
  parameter int unsigned N_CORES = NCORES,
  parameter int unsigned N_CTX   = NCTX,
  parameter int unsigned WIN     = ROB_N
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // per core
  input  logic [N_CORES-1:0]                   stall_miss,
  input  logic [N_CORES-1:0][PA_W-1:0]         src_paddr,
  input  logic [N_CORES-1:0]                   pte_send,
  input  logic [N_CORES-1:0][VPN_W-1:0]        pte_vpn,
  input  logic [N_CORES-1:0][PPN_W-1:0]        pte_ppn,
  input  cuop_t [N_CORES-1:0][WIN-1:0]         rob,
  input  logic [N_CORES-1:0][NCPR-1:0]         cpr_ready,
  output logic [N_CORES-1:0][1:0][CPR_W-1:0]   prf_raddr,
  input  logic [N_CORES-1:0][1:0][XLEN-1:0]    prf_rdata,
  input  logic [N_CORES-1:0]                   dm_inc,      // miss had a dependent miss
  input  logic [N_CORES-1:0]                   dm_dec,      // miss had none
  output logic [N_CORES-1:0][1:0]              pb_vld,
  output logic [N_CORES-1:0][1:0][CPR_W-1:0]   pb_tag,
  output logic [N_CORES-1:0][WIN-1:0]          in_chain,
  output logic [N_CORES-1:0]                   gen_busy,
  output logic [N_CORES-1:0]                   chain_sent,  // chain accepted by the EMC
  // memory side
  input  logic                                 df_vld,
  input  logic [LADDR_W-1:0]                   df_laddr,
  input  logic [LINE_W-1:0]                    df_data,
  output logic                                 llc_req_vld,
  input  logic                                 llc_req_rdy,
  output logic [PA_W-1:0]                      llc_req_paddr,
  output logic [CORE_W-1:0]                    llc_req_core,
  output logic [11:0]                          llc_req_tag,
  input  logic                                 llc_rsp_vld,
  input  logic [11:0]                          llc_rsp_tag,
  input  logic                                 llc_rsp_hit,
  input  logic [LADDR_W-1:0]                   llc_rsp_laddr,
  input  logic [LINE_W-1:0]                    llc_rsp_data,
  output logic                                 mc_req_vld,
  input  logic                                 mc_req_rdy,
  output logic [PA_W-1:0]                      mc_req_paddr,
  output logic [CORE_W-1:0]                    mc_req_core,
  input  logic                                 inv_vld,
  input  logic [LADDR_W-1:0]                   inv_laddr,
  input  logic                                 sd_vld,
  input  logic [CORE_W-1:0]                    sd_core,
  input  logic [VPN_W-1:0]                     sd_vpn,
  input  logic                                 cancel_vld,
  input  logic [CORE_W-1:0]                    cancel_core,
  output logic [1:0]                           mx_vld,
  output logic [1:0][CORE_W-1:0]               mx_core,
  output logic [1:0][ROB_W-1:0]                mx_rob,
  output logic [1:0][PA_W-1:0]                 mx_paddr,
  output logic [1:0]                           mx_st,
  output logic                                 lo_vld,
  input  logic                                 lo_rdy,
  output logic [CORE_W-1:0]                    lo_core,
  output logic                                 lo_store,
  output logic [EPR_W-1:0]                     lo_epr,
  output logic [PA_W-1:0]                      lo_paddr,
  output logic [XLEN-1:0]                      lo_data,
  output logic                                 cd_vld,
  output logic [CORE_W-1:0]                    cd_core,
  output logic [1:0]                           cd_status,
  output logic [N_CTX-1:0]                     ctx_busy
);
  logic   [N_CORES-1:0] g_vld, g_rdy, likely;
  chain_t [N_CORES-1:0] g_ch;

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    dep_miss_counter #(.W(3)) u_dmc (
      .clk, .rst_n, .inc(dm_inc[c]), .dec(dm_dec[c]), .likely(likely[c]), .count()
    );
    chain_gen #(.W(WIN)) u_gen (
      .clk, .rst_n, .core_id(CORE_W'(c)),
      .stall_miss(stall_miss[c]), .likely(likely[c]), .src_paddr(src_paddr[c]),
      .pte_send(pte_send[c]), .pte_vpn(pte_vpn[c]), .pte_ppn(pte_ppn[c]),
      .rob(rob[c]), .cpr_ready(cpr_ready[c]),
      .prf_raddr(prf_raddr[c]), .prf_rdata(prf_rdata[c]),
      .pb_vld(pb_vld[c]), .pb_tag(pb_tag[c]),
      .ch_vld(g_vld[c]), .ch_rdy(g_rdy[c]), .ch(g_ch[c]),
      .in_chain(in_chain[c]), .busy(gen_busy[c])
    );
  end

  // round-robin chain arbiter
  logic [CORE_W-1:0] rr, sel;
  logic              any;
  logic              e_rdy;
  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int k = 0; k < N_CORES; k++) begin
      int c;
      c = (k + int'(rr)) % N_CORES;
      if (!any && g_vld[c]) begin any = 1'b1; sel = CORE_W'(c); end
    end
    g_rdy = '0;
    g_rdy[sel] = any && e_rdy;
  end
  assign chain_sent = g_rdy & g_vld;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rr <= '0;
    else if (any && e_rdy) rr <= sel + 1'b1;

  emc_engine #(.N_CTX(N_CTX), .N_CORES(N_CORES)) u_emc (
    .clk, .rst_n,
    .ch_vld(any), .ch_rdy(e_rdy), .ch(g_ch[sel]),
    .df_vld, .df_laddr, .df_data,
    .llc_req_vld, .llc_req_rdy, .llc_req_paddr, .llc_req_core, .llc_req_tag,
    .llc_rsp_vld, .llc_rsp_tag, .llc_rsp_hit, .llc_rsp_laddr, .llc_rsp_data,
    .mc_req_vld, .mc_req_rdy, .mc_req_paddr, .mc_req_core,
    .inv_vld, .inv_laddr, .sd_vld, .sd_core, .sd_vpn,
    .cancel_vld, .cancel_core,
    .mx_vld, .mx_core, .mx_rob, .mx_paddr, .mx_st,
    .lo_vld, .lo_rdy, .lo_core, .lo_store, .lo_epr, .lo_paddr, .lo_data,
    .cd_vld, .cd_core, .cd_status, .ctx_busy
  );
endmodule
