// tb_emc_top: four cores, their chain generation units and dependent-miss
// counters, the chain arbiter and the EMC engine, all at default sizes
// (256-entry windows, two contexts). A model of the cores' register files,
// of the LLC, of the memory controller and of DRAM surrounds the design.
//
// Round 1: all four cores stall on a source miss at once.
//   core 0  pointer chase (the document's example); checks all six live-outs
//   core 1  spill/fill pair and a load of another word of the source line
//           (LSQ forwarding, EMC data cache hit, store live-out)
//   core 2  a branch the core predicted wrongly (misprediction status)
//   core 3  a load through a page the EMC does not hold (TLB miss status)
//   Four chains for two contexts: the arbiter and context-full back-pressure
//   are exercised.
// Round 2:
//   core 0  five chains whose dependent load misses the LLC at one PC; the
//           fifth goes straight to the memory controller
//   core 2  a chain cancelled by the core before its source data arrives
//   core 3  stalls with a low dependent-miss counter: no chain is built
//   core 1  a chain whose source line is already in the EMC data cache
// Every mechanism is counted; one that never happened counts as a failure.
module tb_emc_top;
  import emc_pkg::*;
  localparam int NC = NCORES;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m); checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end endtask

  logic [NC-1:0] stall_miss, pte_send, dm_inc, dm_dec, gen_busy, chain_sent;
  logic [NC-1:0][PA_W-1:0] src_paddr; logic [NC-1:0][VPN_W-1:0] pte_vpn; logic [NC-1:0][PPN_W-1:0] pte_ppn;
  cuop_t [NC-1:0][ROB_N-1:0] rob; logic [NC-1:0][NCPR-1:0] cpr_ready;
  logic [NC-1:0][1:0][CPR_W-1:0] prf_raddr; logic [NC-1:0][1:0][XLEN-1:0] prf_rdata;
  logic [NC-1:0][1:0] pb_vld; logic [NC-1:0][1:0][CPR_W-1:0] pb_tag; logic [NC-1:0][ROB_N-1:0] in_chain;
  logic df_vld; logic [LADDR_W-1:0] df_laddr; logic [LINE_W-1:0] df_data;
  logic llc_req_vld, llc_req_rdy; logic [PA_W-1:0] llc_req_paddr; logic [CORE_W-1:0] llc_req_core; logic [11:0] llc_req_tag;
  logic llc_rsp_vld, llc_rsp_hit; logic [11:0] llc_rsp_tag; logic [LADDR_W-1:0] llc_rsp_laddr; logic [LINE_W-1:0] llc_rsp_data;
  logic mc_req_vld, mc_req_rdy; logic [PA_W-1:0] mc_req_paddr; logic [CORE_W-1:0] mc_req_core;
  logic inv_vld, sd_vld, cancel_vld; logic [LADDR_W-1:0] inv_laddr; logic [CORE_W-1:0] sd_core, cancel_core; logic [VPN_W-1:0] sd_vpn;
  logic [1:0] mx_vld, mx_st; logic [1:0][CORE_W-1:0] mx_core; logic [1:0][ROB_W-1:0] mx_rob; logic [1:0][PA_W-1:0] mx_paddr;
  logic lo_vld, lo_rdy, lo_store, cd_vld; logic [CORE_W-1:0] lo_core, cd_core; logic [1:0] cd_status; logic [EPR_W-1:0] lo_epr;
  logic [PA_W-1:0] lo_paddr; logic [XLEN-1:0] lo_data; logic [NCTX-1:0] ctx_busy;

  emc_top dut (.*);

  // ---------------- core register files: value of Cn at core c
  logic [63:0] cval [NC][NCPR];
  always_comb for (int c = 0; c < NC; c++) for (int p = 0; p < 2; p++) prf_rdata[c][p] = cval[c][prf_raddr[c][p]];

  // ---------------- memory model
  localparam int LLC_LAT = 8, DRAM_LAT = 25;
  logic [63:0] mem [logic [PA_W-4:0]];
  bit          in_llc [logic [LADDR_W-1:0]];
  function automatic logic [63:0] rdw(logic [PA_W-1:0] pa);
    if (mem.exists(pa[PA_W-1:3])) return mem[pa[PA_W-1:3]];
    return {24'h0, pa[PA_W-1:3], 3'b0} ^ 64'h5A5A_0000_0000_0000;
  endfunction
  function automatic logic [LINE_W-1:0] line(logic [LADDR_W-1:0] la);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < 8; w++) l[w*64 +: 64] = rdw({la, 3'(w), 3'b0});
    return l;
  endfunction
  typedef struct { int due; logic [LADDR_W-1:0] la; logic [11:0] tag; bit hit; } ev_t;
  ev_t dq [$], lq [$];
  int cyc;
  always @(posedge clk) cyc <= cyc + 1;
  assign llc_req_rdy = 1'b1;
  assign mc_req_rdy  = 1'b1;
  assign lo_rdy      = 1'b1;

  // mechanism counters
  int n_chain, n_arb, n_full, n_llc, n_llc_hit, n_llc_miss, n_mc, n_dch, n_fwd, n_lo, n_lo_st, n_mx;
  int n_ok, n_mispred, n_tlbmiss, n_cancel, n_filtered, n_pb, n_prb;
  always @(posedge clk) if (rst_n) begin
    n_chain <= n_chain + $countones(chain_sent);
    if ($countones(dut.g_vld) > 1) n_arb <= n_arb + 1;
    if (dut.any && !dut.e_rdy) n_full <= n_full + 1;
    if (dut.u_emc.dc_rsp_vld && dut.u_emc.dc_rsp_hit) n_dch <= n_dch + 1;
    if ((dut.u_emc.g_ctx[0].u_lsq.ld_sel && dut.u_emc.g_ctx[0].u_lsq.fwd_hit) ||
        (dut.u_emc.g_ctx[1].u_lsq.ld_sel && dut.u_emc.g_ctx[1].u_lsq.fwd_hit)) n_fwd <= n_fwd + 1;
    n_mx <= n_mx + mx_vld[0] + mx_vld[1];
    n_pb <= n_pb + $countones(pb_vld);
    if (dut.u_emc.g_ctx[0].prb_hit || dut.u_emc.g_ctx[1].prb_hit) n_prb <= n_prb + 1;
    if (llc_req_vld) begin
      ev_t e; e.due = cyc + LLC_LAT; e.la = llc_req_paddr[PA_W-1:OFF_W]; e.tag = llc_req_tag;
      e.hit = in_llc.exists(e.la); lq.push_back(e); n_llc++;
      if (e.hit) n_llc_hit++;
      else begin ev_t d; d.due = cyc + LLC_LAT + DRAM_LAT; d.la = e.la; d.tag = 0; d.hit = 0; dq.push_back(d); n_llc_miss++; end
    end
    if (mc_req_vld) begin
      ev_t d; d.due = cyc + DRAM_LAT; d.la = mc_req_paddr[PA_W-1:OFF_W]; d.tag = 0; d.hit = 0; dq.push_back(d); n_mc++;
    end
    // the core's own source miss is filled from DRAM some time after its chain left
    for (int c = 0; c < NC; c++) if (chain_sent[c]) begin
      ev_t d; d.due = cyc + DRAM_LAT; d.la = src_paddr[c][PA_W-1:OFF_W]; d.tag = 0; d.hit = 0;
      if (!(hold_src[c])) dq.push_back(d); else held[c] = d;
    end
  end
  bit hold_src [NC]; ev_t held [NC];
  always @(negedge clk) begin
    df_vld = 0; llc_rsp_vld = 0;
    if (dq.size() > 0 && dq[0].due <= cyc) begin
      df_vld = 1; df_laddr = dq[0].la; df_data = line(dq[0].la); void'(dq.pop_front());
    end
    if (lq.size() > 0 && lq[0].due <= cyc) begin
      llc_rsp_vld = 1; llc_rsp_tag = lq[0].tag; llc_rsp_hit = lq[0].hit; llc_rsp_laddr = lq[0].la;
      llc_rsp_data = line(lq[0].la); void'(lq.pop_front());
    end
  end

  // ---------------- results returned to the cores
  logic [63:0] lo_reg [NC][16]; int lo_nreg [NC]; int lo_nst [NC];
  logic [63:0] lo_st_data [NC]; logic [PA_W-1:0] lo_st_pa [NC];
  int done_cnt [NC]; logic [1:0] done_stat [NC];
  always @(posedge clk) if (rst_n) begin
    if (lo_vld && lo_rdy) begin
      if (lo_store) begin lo_nst[lo_core]++; lo_st_data[lo_core] <= lo_data; lo_st_pa[lo_core] <= lo_paddr; n_lo_st++; end
      else begin lo_reg[lo_core][lo_epr] <= lo_data; lo_nreg[lo_core]++; end
      n_lo++;
    end
    if (cd_vld) begin
      done_cnt[cd_core]++; done_stat[cd_core] <= cd_status;
      case (cd_status) 2'd0: n_ok++; 2'd1: n_mispred++; 2'd2: n_tlbmiss++; default: n_cancel++; endcase
    end
  end
  // order in which the EMC accepts chains
  int acc_order [$];
  always @(posedge clk) if (rst_n) for (int c = 0; c < NC; c++) if (chain_sent[c]) acc_order.push_back(c);
  // a core stops stalling once its chain is accepted
  always @(posedge clk) for (int c = 0; c < NC; c++) if (chain_sent[c]) stall_miss[c] <= 1'b0;

  // ---------------- helpers
  function automatic cuop_t U(op_e op, int dst, int s1, int s2, logic imm_v, int imm, int pc);
    cuop_t u;
    u = '0; u.vld = 1; u.op = op; u.has_dst = dst >= 0; u.dst = 8'(dst < 0 ? 0 : dst);
    u.s1_v = s1 >= 0; u.s1 = 8'(s1 < 0 ? 0 : s1);
    u.s2_v = (s2 >= 0) || imm_v; u.s2_imm = imm_v; u.s2 = 8'(s2 < 0 ? 0 : s2); u.imm = 32'(imm);
    u.pc = 16'(pc);
    return u;
  endfunction
  function automatic logic [VA_W-1:0] va(int core, int off); return {36'h0_0070_0000 + 36'(core), 12'(off)}; endfunction
  function automatic logic [PA_W-1:0] pa(int core, int off); return {28'h00_3300 + 28'(core), 12'(off)}; endfunction
  // prepare core c: window, ready bits, source miss, PTE
  task automatic setup(input int c, input logic [PA_W-1:0] src, input bit send_pte);
    for (int i = 0; i < ROB_N; i++) rob[c][i] = '0;
    // unrelated older-than-nothing filler after the chain: independent work
    for (int i = 8; i < ROB_N; i++) rob[c][i] = U(OP_ADD, 200 + (i % 50), 150, -1, 1, i, 16'h7000 + i);
    cpr_ready[c] = '1;
    src_paddr[c] = src; pte_send[c] = send_pte;
    pte_vpn[c] = 36'h0_0070_0000 + 36'(c); pte_ppn[c] = 28'h00_3300 + 28'(c);
  endtask
  task automatic pulse_dm(input int c, input bit up, input int n);
    repeat (n) begin @(negedge clk); if (up) dm_inc[c] = 1; else dm_dec[c] = 1; @(negedge clk); dm_inc[c] = 0; dm_dec[c] = 0; end
  endtask
  task automatic wait_done(input int c, input int n);
    int t; t = 0;
    while (done_cnt[c] < n && t < 2000) begin @(negedge clk); t++; end
    chk(done_cnt[c] >= n, $sformatf("core %0d: chain %0d finished", c, n));
  endtask

  initial begin
    int k;
    stall_miss = '0; pte_send = '0; dm_inc = '0; dm_dec = '0; src_paddr = '0; pte_vpn = '0; pte_ppn = '0;
    rob = '0; cpr_ready = '1; inv_vld = 0; inv_laddr = '0; sd_vld = 0; sd_core = '0; sd_vpn = '0;
    cancel_vld = 0; cancel_core = '0; df_vld = 0; df_laddr = '0; df_data = '0; llc_rsp_vld = 0;
    llc_rsp_tag = '0; llc_rsp_hit = 0; llc_rsp_laddr = '0; llc_rsp_data = '0; cyc = 0;
    {n_chain, n_arb, n_full, n_llc, n_llc_hit, n_llc_miss, n_mc, n_dch, n_fwd, n_lo, n_lo_st, n_mx} = '0;
    {n_ok, n_mispred, n_tlbmiss, n_cancel, n_filtered, n_pb, n_prb} = '0;
    for (int c = 0; c < NC; c++) begin
      lo_nreg[c] = 0; lo_nst[c] = 0; done_cnt[c] = 0; hold_src[c] = 0;
      for (int r = 0; r < NCPR; r++) cval[c][r] = 64'(r) * 64'h100 + 64'(c) * 64'h1_0000 + 64'd7;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < NC; c++) pulse_dm(c, 1, 4);
    chk(dut.likely == 4'b1111, "dependent-miss counters trained");

    // ---------------- round 1
    // core 0: C1 <- [A]; C9 <- C1; C12 <- C9 + 0x18; C10 <- [C12]; C16 <- C10 + 4; C19 <- [C16]
    setup(0, 40'h9_1000_0080, 1);
    mem[40'h9_1000_0080 >> 3] = 64'(va(0, 12'h300)) - 64'h18;
    mem[pa(0, 12'h300) >> 3]  = 64'(va(0, 12'h9c0)) - 64'h4;
    mem[pa(0, 12'h9c0) >> 3]  = 64'hFEED_FACE_0BAD_F00D;
    in_llc[pa(0, 12'h9c0) >> 6] = 1;
    rob[0][0] = U(OP_LD, 1, 8, -1, 0, 0, 16'h100);
    rob[0][1] = U(OP_MOV, 9, 1, -1, 0, 0, 16'h104);
    rob[0][2] = U(OP_ADD, 12, 9, -1, 1, 32'h18, 16'h108);
    rob[0][3] = U(OP_LD, 10, 12, -1, 0, 0, 16'h10c);
    rob[0][4] = U(OP_ADD, 16, 10, -1, 1, 32'h4, 16'h110);
    rob[0][5] = U(OP_LD, 19, 16, -1, 0, 0, 16'h114);
    foreach (rob[0][i]) if (rob[0][i].has_dst && i < 8) cpr_ready[0][rob[0][i].dst] = 0;
    // core 1: C1 <- [S]; spill C1 to [C20]; C2 <- [C20]; C3 <- [C21] (same line as S)
    setup(1, pa(1, 12'h040), 1);
    cval[1][20] = 64'(va(1, 12'h800)); cval[1][21] = 64'(va(1, 12'h058));
    rob[1][0] = U(OP_LD, 1, 8, -1, 0, 0, 16'h200);
    rob[1][1] = U(OP_ST, -1, 20, 1, 0, 0, 16'h204); rob[1][1].spill = 1;
    rob[1][2] = U(OP_LD, 2, 20, -1, 0, 0, 16'h208); rob[1][2].spill = 1;
    rob[1][3] = U(OP_ADD, 3, 1, 21, 0, 0, 16'h20c);    // C3 <- C1 + C21
    rob[1][4] = U(OP_SUB, 4, 3, 1, 0, 0, 16'h210);     // C4 <- C3 - C1 = C21
    rob[1][5] = U(OP_LD, 5, 4, -1, 0, 0, 16'h214);     // [va(1, 0x058)]
    foreach (rob[1][i]) if (rob[1][i].has_dst && i < 8) cpr_ready[1][rob[1][i].dst] = 0;
    // core 2: C1 <- [M]; branch on C1 == 0 predicted taken (it is not); C3 <- C1 + 1
    setup(2, 40'h9_2000_0000, 1);
    rob[2][0] = U(OP_LD, 1, 8, -1, 0, 0, 16'h300);
    rob[2][1] = U(OP_BEQ, -1, 1, -1, 1, 0, 16'h304); rob[2][1].br_taken = 1;
    rob[2][2] = U(OP_ADD, 3, 1, -1, 1, 1, 16'h308);
    cpr_ready[2][1] = 0; cpr_ready[2][3] = 0;
    // core 3: C1 <- [T]; C2 <- [C1] where [T] points to a page the EMC does not hold
    setup(3, 40'h9_3000_0000, 0);
    rob[3][0] = U(OP_LD, 1, 8, -1, 0, 0, 16'h400);
    rob[3][1] = U(OP_LD, 2, 1, -1, 0, 0, 16'h404);
    cpr_ready[3][1] = 0; cpr_ready[3][2] = 0;
    @(negedge clk);
    stall_miss = '1;
    for (int c = 0; c < NC; c++) wait_done(c, 1);
    chk(done_stat[0] == ST_OK && lo_nreg[0] == 6, "core 0: six live-outs");
    chk(lo_reg[0][0] == 64'(va(0, 12'h300)) - 64'h18 && lo_reg[0][1] == lo_reg[0][0], "core 0: E0, E1");
    chk(lo_reg[0][2] == 64'(va(0, 12'h300)) && lo_reg[0][3] == 64'(va(0, 12'h9c0)) - 64'h4, "core 0: E2, E3");
    chk(lo_reg[0][4] == 64'(va(0, 12'h9c0)) && lo_reg[0][5] == 64'hFEED_FACE_0BAD_F00D, "core 0: E4, E5");
    chk(done_stat[1] == ST_OK && lo_nreg[1] == 5 && lo_nst[1] == 1, "core 1: five registers and a store");
    chk(lo_reg[1][1] == rdw(pa(1, 12'h040)) && lo_st_data[1] == rdw(pa(1, 12'h040)) && lo_st_pa[1] == pa(1, 12'h800), "core 1: spill/fill");
    chk(lo_reg[1][4] == rdw(pa(1, 12'h058)), "core 1: load from the source line");
    chk(done_stat[2] == ST_MISPRED && lo_nreg[2] == 0, "core 2: misprediction, no live-outs");
    chk(done_stat[3] == ST_TLBMISS && lo_nreg[3] == 0, "core 3: TLB miss, no live-outs");
    chk(n_chain == 4, "four chains accepted");
    // the short chains (cores 3, 2) are offered first and take both contexts;
    // cores 0 and 1 then wait, and round-robin after core 2 favours core 0
    chk(acc_order.size() == 4 && acc_order[0] == 3 && acc_order[1] == 2 && acc_order[2] == 0 && acc_order[3] == 1,
        "round-robin acceptance order 3, 2, 0, 1");

    // ---------------- round 2
    // core 3: counter low, stalls, must not build a chain
    pulse_dm(3, 0, 4);
    chk(!dut.likely[3], "core 3 counter low");
    setup(3, 40'h9_3000_1000, 1);
    rob[3][0] = U(OP_LD, 1, 8, -1, 0, 0, 16'h400);
    rob[3][1] = U(OP_LD, 2, 1, -1, 0, 0, 16'h404);
    cpr_ready[3][1] = 0; cpr_ready[3][2] = 0;
    // core 2: to be cancelled; its source fill is held back
    setup(2, 40'h9_2000_1000, 1);
    rob[2][0] = U(OP_LD, 1, 8, -1, 0, 0, 16'h300);
    rob[2][1] = U(OP_ADD, 3, 1, -1, 1, 1, 16'h308);
    cpr_ready[2][1] = 0; cpr_ready[2][3] = 0;
    hold_src[2] = 1;
    k = n_chain;
    @(negedge clk); stall_miss[3] = 1; stall_miss[2] = 1;
    while (!chain_sent[2]) @(negedge clk);
    repeat (30) @(negedge clk);
    chk(n_chain == k + 1 && stall_miss[3] && !gen_busy[3], "core 3: no chain while the counter is low");
    if (n_chain == k + 1) n_filtered++;
    stall_miss[3] = 0;
    cancel_vld = 1; cancel_core = 2; @(negedge clk); cancel_vld = 0;
    wait_done(2, 2);
    chk(done_stat[2] == 2'd3 && lo_nreg[2] == 0, "core 2: cancelled");
    // core 0: same PC misses the LLC repeatedly
    for (int i = 0; i < 5; i++) begin
      int l0, m0;
      l0 = n_llc; m0 = n_mc;
      setup(0, 40'h9_1100_0000 + 40'(i * 64), 1);
      mem[(40'h9_1100_0000 + 40'(i * 64)) >> 3] = 64'(va(0, 12'h000)) + 64'(i * 64);
      rob[0][0] = U(OP_LD, 1, 8, -1, 0, 0, 16'h500);
      rob[0][1] = U(OP_LD, 2, 1, -1, 0, 0, 16'h504);
      cpr_ready[0][1] = 0; cpr_ready[0][2] = 0;
      @(negedge clk); stall_miss[0] = 1;
      wait_done(0, i + 2);
      chk(done_stat[0] == ST_OK && lo_reg[0][1] == rdw(pa(0, i * 64)), "core 0: predicted load value");
      if (i < 4) chk(n_llc == l0 + 1 && n_mc == m0, "core 0: through the LLC");
      else       chk(n_llc == l0 && n_mc == m0 + 1, "core 0: straight to the memory controller");
      repeat (LLC_LAT + 2) @(negedge clk);
    end

    // core 1: the source line arrived before the chain; no fill is delivered
    setup(1, pa(1, 12'h040), 1);
    rob[1][0] = U(OP_LD, 1, 8, -1, 0, 0, 16'h200);
    rob[1][1] = U(OP_XOR, 2, 1, 21, 0, 0, 16'h218);
    cpr_ready[1][1] = 0; cpr_ready[1][2] = 0;
    hold_src[1] = 1;
    @(negedge clk); stall_miss[1] = 1;
    wait_done(1, 2);
    chk(done_stat[1] == ST_OK && lo_reg[1][1] == (rdw(pa(1, 12'h040)) ^ cval[1][21]), "core 1: source word from the data cache");

    // ---------------- every mechanism must have occurred
    chk(n_chain > 0,    "mechanism: chain generated and sent");
    chk(n_pb > 0,       "mechanism: pseudo wakeup broadcast");
    chk(n_arb > 0,      "mechanism: chain arbitration between cores");
    chk(n_full > 0,     "mechanism: both contexts busy, chain held");
    chk(n_llc_hit > 0,  "mechanism: EMC load hits the LLC");
    chk(n_llc_miss > 0, "mechanism: EMC load misses the LLC, DRAM fill");
    chk(n_mc > 0,       "mechanism: predicted miss sent to the memory controller");
    chk(n_dch > 0,      "mechanism: EMC data cache hit");
    chk(n_fwd > 0,      "mechanism: store-to-load forwarding");
    chk(n_lo > 0 && n_lo_st > 0, "mechanism: register and store live-outs");
    chk(n_mx > 0,       "mechanism: executed memory op reported to the core");
    chk(n_ok > 0,       "mechanism: chain completed");
    chk(n_mispred > 0,  "mechanism: branch misprediction");
    chk(n_tlbmiss > 0,  "mechanism: TLB miss");
    chk(n_cancel > 0,   "mechanism: cancel");
    chk(n_filtered > 0, "mechanism: chain suppressed by the dependent-miss counter");
    chk(n_prb > 0,      "mechanism: source line found in the data cache");
    $display("mechanisms: chains=%0d pb=%0d arb=%0d full=%0d llc=%0d llc_hit=%0d llc_miss=%0d mc=%0d dc_hit=%0d fwd=%0d lo=%0d lo_st=%0d ok=%0d mispred=%0d tlb=%0d cancel=%0d filtered=%0d src_in_cache=%0d",
             n_chain, n_pb, n_arb, n_full, n_llc, n_llc_hit, n_llc_miss, n_mc, n_dch, n_fwd, n_lo, n_lo_st, n_ok, n_mispred, n_tlbmiss, n_cancel, n_filtered, n_prb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (30000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
