// tb_emc_workload: a homogeneous quad-core pointer-chasing workload on the
// full-size EMC subsystem (four cores, 256-entry windows, two contexts).
//
// Every core runs the same loop, ITER times: its window holds a node walk of
// two dependent levels behind the source miss,
//     C1 <- load [C8]        source miss: pointer to the first node - 0x10
//     C2 <- C1 + 0x10
//     C3 <- load [C2]        first node: pointer to the second node - 0x28
//     C4 <- C3 + 0x28
//     C5 <- load [C4]        second node: the payload
// with an unrelated uop in between. The nodes are fresh random addresses in
// the core's own page and the LLC holds each of them with probability 1/2,
// so the EMC's miss predictor keeps changing its mind. The source line
// comes from DRAM at a random time after the chain was accepted, or, in one
// iteration out of four, before the chain is even built, which the engine
// must find in its data cache. The four cores run concurrently and compete
// for the two contexts. Every chain's five live-outs are checked against
// the values the testbench wrote into memory; LLC, memory controller and
// DRAM are behavioural models with fixed latencies.
module tb_emc_workload;
  import emc_pkg::*;
  localparam int NC = NCORES;
  localparam int ITER = 24;
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

  assign prf_rdata = '0;            // the chains read no core register
  assign llc_req_rdy = 1'b1;
  assign mc_req_rdy  = 1'b1;
  assign lo_rdy      = 1'b1;

  // ---------------- memory model
  localparam int LLC_LAT = 8, DRAM_LAT = 25;
  logic [63:0] mem [logic [PA_W-4:0]];
  bit          in_llc [logic [LADDR_W-1:0]];
  function automatic logic [63:0] rdw(logic [PA_W-1:0] pa);
    if (mem.exists(pa[PA_W-1:3])) return mem[pa[PA_W-1:3]];
    return {24'h0, pa[PA_W-1:3], 3'b0} ^ 64'h3C3C_0000_0000_0000;
  endfunction
  function automatic logic [LINE_W-1:0] line(logic [LADDR_W-1:0] la);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < 8; w++) l[w*64 +: 64] = rdw({la, 3'(w), 3'b0});
    return l;
  endfunction
  typedef struct { int due; logic [LADDR_W-1:0] la; logic [11:0] tag; bit hit; } ev_t;
  ev_t dq [$], lq [$], eq [$];       // DRAM fills, LLC responses, early source fills
  int cyc;
  bit late_src [NC]; int src_delay [NC];
  int n_llc_hit, n_llc_miss, n_mc, n_early, n_chains;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    if (llc_req_vld) begin
      ev_t e; e.due = cyc + LLC_LAT; e.la = llc_req_paddr[PA_W-1:OFF_W]; e.tag = llc_req_tag;
      e.hit = in_llc.exists(e.la); lq.push_back(e);
      if (e.hit) n_llc_hit++;
      else begin ev_t d; d.due = cyc + LLC_LAT + DRAM_LAT; d.la = e.la; d.tag = 0; d.hit = 0; dq.push_back(d); n_llc_miss++; end
    end
    if (mc_req_vld) begin
      ev_t d; d.due = cyc + DRAM_LAT; d.la = mc_req_paddr[PA_W-1:OFF_W]; d.tag = 0; d.hit = 0; dq.push_back(d); n_mc++;
    end
    for (int c = 0; c < NC; c++) if (chain_sent[c]) begin
      n_chains++;
      if (late_src[c]) begin
        ev_t d; d.due = cyc + src_delay[c]; d.la = src_paddr[c][PA_W-1:OFF_W]; d.tag = 0; d.hit = 0; dq.push_back(d);
      end
    end
  end
  always @(negedge clk) begin
    df_vld = 0; llc_rsp_vld = 0;
    if (eq.size() > 0) begin
      df_vld = 1; df_laddr = eq[0].la; df_data = line(eq[0].la); void'(eq.pop_front());
    end else if (dq.size() > 0 && dq[0].due <= cyc) begin
      df_vld = 1; df_laddr = dq[0].la; df_data = line(dq[0].la); void'(dq.pop_front());
    end
    if (lq.size() > 0 && lq[0].due <= cyc) begin
      llc_rsp_vld = 1; llc_rsp_tag = lq[0].tag; llc_rsp_hit = lq[0].hit; llc_rsp_laddr = lq[0].la;
      llc_rsp_data = line(lq[0].la); void'(lq.pop_front());
    end
  end

  // ---------------- results
  logic [63:0] lo_reg [NC][16]; int done_cnt [NC]; logic [1:0] done_stat [NC];
  always @(posedge clk) if (rst_n) begin
    if (lo_vld && !lo_store) lo_reg[lo_core][lo_epr] <= lo_data;
    if (cd_vld) begin done_cnt[cd_core]++; done_stat[cd_core] <= cd_status; end
  end
  always @(posedge clk) for (int c = 0; c < NC; c++) if (chain_sent[c]) stall_miss[c] <= 1'b0;

  function automatic cuop_t U(op_e op, int dst, int s1, logic imm_v, int imm, int pc);
    cuop_t u;
    u = '0; u.vld = 1; u.op = op; u.has_dst = dst >= 0; u.dst = 8'(dst < 0 ? 0 : dst);
    u.s1_v = s1 >= 0; u.s1 = 8'(s1 < 0 ? 0 : s1);
    u.s2_v = imm_v; u.s2_imm = imm_v; u.imm = 32'(imm); u.pc = 16'(pc);
    return u;
  endfunction
  function automatic logic [VA_W-1:0] va(int c, int off); return {36'h0_0090_0000 + 36'(c), 12'(off)}; endfunction
  function automatic logic [PA_W-1:0] pa(int c, int off); return {28'h00_4400 + 28'(c), 12'(off)}; endfunction

  // one core's loop; the node lines of a core never repeat, and their cache
  // sets stay below 12 so that the early source lines (set 12 + core) are
  // never evicted before their chain arrives
  task automatic run_core(input int c);
    for (int k = 0; k < ITER; k++) begin
      logic [PA_W-1:0] s; int o1, o2; logic [63:0] v0, v2, pay; int t;
      bit early;
      early = (k % 4) == 3;
      // lines 2k and 2k+1 (counted over sets 0..11 only) of the page hold the two nodes
      o1 = ((2 * k) % 12 + 16 * ((2 * k) / 12)) * 64 + 8 * ($urandom % 8);
      o2 = ((2 * k + 1) % 12 + 16 * ((2 * k + 1) / 12)) * 64 + 8 * ($urandom % 8);
      s  = early ? {8'h9D, 4'(c), 8'(k), 10'h0, 4'hC + 4'(c), 6'h0} + 40'(8 * ($urandom % 8))
                 : {8'h9C, 4'(c), 8'(k), 10'h0, 4'($urandom % 12), 6'h0} + 40'(8 * ($urandom % 8));
      v0  = 64'(va(c, o1)) - 64'h10;
      v2  = 64'(va(c, o2)) - 64'h28;
      pay = {$urandom, $urandom};
      mem[s[PA_W-1:3]] = v0; mem[pa(c, o1) >> 3] = v2; mem[pa(c, o2) >> 3] = pay;
      if ($urandom % 2) in_llc[pa(c, o1) >> 6] = 1;
      if ($urandom % 2) in_llc[pa(c, o2) >> 6] = 1;
      for (int i = 0; i < ROB_N; i++) rob[c][i] = '0;
      rob[c][0] = U(OP_LD, 1, 8, 0, 0, 16'h900);
      rob[c][1] = U(OP_ADD, 2, 1, 1, 32'h10, 16'h904);
      rob[c][2] = U(OP_ADD, 60, 61, 1, 5, 16'h908);          // unrelated
      rob[c][3] = U(OP_LD, 3, 2, 0, 0, 16'h90c);
      rob[c][4] = U(OP_ADD, 4, 3, 1, 32'h28, 16'h910);
      rob[c][5] = U(OP_LD, 5, 4, 0, 0, 16'h914);
      cpr_ready[c] = '1;
      for (int r = 1; r <= 5; r++) cpr_ready[c][r] = 1'b0;
      src_paddr[c] = s; pte_send[c] = 1; pte_vpn[c] = 36'h0_0090_0000 + 36'(c); pte_ppn[c] = 28'h00_4400 + 28'(c);
      late_src[c] = !early; src_delay[c] = int'($urandom % 40);
      @(negedge clk);
      if (early) begin ev_t e; e.due = 0; e.la = s[PA_W-1:OFF_W]; e.tag = 0; e.hit = 0; eq.push_back(e); n_early++; end
      stall_miss[c] = 1;
      t = 0;
      while (done_cnt[c] < k + 1 && t < 3000) begin @(negedge clk); t++; end
      chk(done_cnt[c] == k + 1 && done_stat[c] == ST_OK, $sformatf("core %0d iteration %0d completed", c, k));
      chk(lo_reg[c][0] == v0 && lo_reg[c][1] == 64'(va(c, o1)) && lo_reg[c][2] == v2 &&
          lo_reg[c][3] == 64'(va(c, o2)) && lo_reg[c][4] == pay, $sformatf("core %0d iteration %0d live-outs", c, k));
      repeat ($urandom % 10) @(negedge clk);
    end
  endtask

  initial begin
    stall_miss = '0; pte_send = '0; dm_inc = '0; dm_dec = '0; src_paddr = '0; pte_vpn = '0; pte_ppn = '0;
    rob = '0; cpr_ready = '1; inv_vld = 0; inv_laddr = '0; sd_vld = 0; sd_core = '0; sd_vpn = '0;
    cancel_vld = 0; cancel_core = '0; df_vld = 0; df_laddr = '0; df_data = '0; llc_rsp_vld = 0;
    llc_rsp_tag = '0; llc_rsp_hit = 0; llc_rsp_laddr = '0; llc_rsp_data = '0; cyc = 0;
    n_llc_hit = 0; n_llc_miss = 0; n_mc = 0; n_early = 0; n_chains = 0;
    for (int c = 0; c < NC; c++) begin done_cnt[c] = 0; late_src[c] = 0; src_delay[c] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    // all four cores see dependent misses: counters to 4
    repeat (4) begin @(negedge clk); dm_inc = '1; @(negedge clk); dm_inc = '0; end
    fork
      run_core(0);
      run_core(1);
      run_core(2);
      run_core(3);
    join
    chk(n_chains == NC * ITER, "one chain per iteration");
    chk(n_llc_hit > 0 && n_llc_miss > 0 && n_mc > 0 && n_early > 0, "hits, misses, direct requests and early source lines all occurred");
    $display("workload: chains=%0d llc_hit=%0d llc_miss=%0d direct=%0d early_src=%0d cycles=%0d",
             n_chains, n_llc_hit, n_llc_miss, n_mc, n_early, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (60000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
