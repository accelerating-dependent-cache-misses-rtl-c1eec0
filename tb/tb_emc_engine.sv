// tb_emc_engine: the EMC engine with a testbench model of the LLC, the
// memory controller and DRAM.
//  T1 the document's pointer chase (source load, MOV, ADD 0x18, load, ADD 4,
//     load): checks every live-out value, that the first dependent load
//     misses the LLC and is filled from DRAM, the second hits the LLC.
//  T2 a spill/fill pair: the load gets the stored value from the LSQ, the
//     store comes back as a live-out, no memory request is made.
//  T3 a load from a line that just came from DRAM hits the EMC data cache.
//  T4 after four LLC misses of one PC, a load of that PC goes straight to
//     the memory controller.
//  T5 a mispredicted branch and T6 a missing translation stop the chain
//     with the right status and no live-outs; T7 a cancel from the core.
//  T8 both contexts busy: a third chain is refused until one finishes.
//  T9 a chain whose source line came from DRAM before the chain did finds
//     the source word in the data cache and runs without another fill.
module tb_emc_engine;
  import emc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m); checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end endtask

  logic ch_vld, ch_rdy; chain_t ch;
  logic df_vld; logic [LADDR_W-1:0] df_laddr; logic [LINE_W-1:0] df_data;
  logic llc_req_vld, llc_req_rdy; logic [PA_W-1:0] llc_req_paddr; logic [1:0] llc_req_core; logic [11:0] llc_req_tag;
  logic llc_rsp_vld, llc_rsp_hit; logic [11:0] llc_rsp_tag; logic [LADDR_W-1:0] llc_rsp_laddr; logic [LINE_W-1:0] llc_rsp_data;
  logic mc_req_vld, mc_req_rdy; logic [PA_W-1:0] mc_req_paddr; logic [1:0] mc_req_core;
  logic inv_vld, sd_vld, cancel_vld; logic [LADDR_W-1:0] inv_laddr; logic [1:0] sd_core, cancel_core; logic [VPN_W-1:0] sd_vpn;
  logic [1:0] mx_vld, mx_st; logic [1:0][1:0] mx_core; logic [1:0][7:0] mx_rob; logic [1:0][PA_W-1:0] mx_paddr;
  logic lo_vld, lo_rdy, lo_store, cd_vld; logic [1:0] lo_core, cd_core, cd_status; logic [3:0] lo_epr;
  logic [PA_W-1:0] lo_paddr; logic [63:0] lo_data; logic [1:0] ctx_busy;

  emc_engine dut (.*);

  // ---------------- memory model
  localparam int LLC_LAT = 6, DRAM_LAT = 20;
  logic [63:0] mem [logic [PA_W-4:0]];       // overrides, per 8-byte word
  bit          in_llc [logic [LADDR_W-1:0]];
  function automatic logic [63:0] rdw(logic [PA_W-1:0] pa);
    if (mem.exists(pa[PA_W-1:3])) return mem[pa[PA_W-1:3]];
    return {24'h0, pa[PA_W-1:3], 3'b0} ^ 64'hC0DE_0000_0000_0000;
  endfunction
  function automatic logic [LINE_W-1:0] line(logic [LADDR_W-1:0] la);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < 8; w++) l[w*64 +: 64] = rdw({la, 3'(w), 3'b0});
    return l;
  endfunction
  typedef struct { int due; logic [LADDR_W-1:0] la; logic [11:0] tag; bit hit; } ev_t;
  ev_t dq [$], lq [$];
  int cyc;
  int n_llc, n_llc_hit, n_mc, n_mx;
  always @(posedge clk) cyc <= cyc + 1;
  assign llc_req_rdy = 1'b1;
  assign mc_req_rdy  = 1'b1;
  assign lo_rdy      = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (llc_req_vld) begin
      ev_t e; e.due = cyc + LLC_LAT; e.la = llc_req_paddr[PA_W-1:OFF_W]; e.tag = llc_req_tag;
      e.hit = in_llc.exists(e.la); lq.push_back(e); n_llc++;
      if (!e.hit) begin ev_t d; d.due = cyc + LLC_LAT + DRAM_LAT; d.la = e.la; d.tag = 0; d.hit = 0; dq.push_back(d); end
    end
    if (mc_req_vld) begin
      ev_t d; d.due = cyc + DRAM_LAT; d.la = mc_req_paddr[PA_W-1:OFF_W]; d.tag = 0; d.hit = 0; dq.push_back(d); n_mc++;
    end
    n_mx <= n_mx + mx_vld[0] + mx_vld[1];
  end
  // drive responses on the negative edge
  logic src_fill_vld; logic [LADDR_W-1:0] src_fill_la;
  always @(negedge clk) begin
    df_vld = 0; llc_rsp_vld = 0;
    if (src_fill_vld) begin df_vld = 1; df_laddr = src_fill_la; df_data = line(src_fill_la); end
    else if (dq.size() > 0 && dq[0].due <= cyc) begin
      df_vld = 1; df_laddr = dq[0].la; df_data = line(dq[0].la); void'(dq.pop_front());
    end
    if (lq.size() > 0 && lq[0].due <= cyc) begin
      llc_rsp_vld = 1; llc_rsp_tag = lq[0].tag; llc_rsp_hit = lq[0].hit; llc_rsp_laddr = lq[0].la;
      llc_rsp_data = line(lq[0].la); if (lq[0].hit) n_llc_hit++; void'(lq.pop_front());
    end
  end

  // ---------------- live-out monitor
  logic [63:0] lo_reg [4][16]; int lo_nreg [4]; int lo_nst [4];
  logic [63:0] lo_st_data [4]; logic [PA_W-1:0] lo_st_pa [4];
  int done_cnt [4]; logic [1:0] done_stat [4];
  always @(posedge clk) if (rst_n) begin
    if (lo_vld && lo_rdy) begin
      if (lo_store) begin lo_nst[lo_core]++; lo_st_data[lo_core] <= lo_data; lo_st_pa[lo_core] <= lo_paddr; end
      else begin lo_reg[lo_core][lo_epr] <= lo_data; lo_nreg[lo_core]++; end
    end
    if (cd_vld) begin done_cnt[cd_core]++; done_stat[cd_core] <= cd_status; end
  end

  // ---------------- helpers
  function automatic euop_t E(op_e op, int dst, int s1, bit s1li, int s2, bit s2li, int pch);
    euop_t u;
    u = '0; u.op = op; u.has_dst = dst >= 0; u.dst = 4'(dst < 0 ? 0 : dst);
    u.s1 = '{vld: s1 >= 0, li: s1li, idx: 4'(s1 < 0 ? 0 : s1)};
    u.s2 = '{vld: s2 >= 0, li: s2li, idx: 4'(s2 < 0 ? 0 : s2)};
    u.pch = 8'(pch); u.rob = 8'(dst + 1);
    return u;
  endfunction
  task automatic send(input chain_t c);
    @(negedge clk); ch = c; ch_vld = 1;
    while (!ch_rdy) @(negedge clk);
    @(posedge clk); #1; ch_vld = 0;
  endtask
  task automatic src_fill(input logic [PA_W-1:0] pa);
    @(negedge clk); src_fill_vld = 1; src_fill_la = pa[PA_W-1:OFF_W];
    @(negedge clk); src_fill_vld = 0;
  endtask
  task automatic wait_done(input int core, input int n);
    int t; t = 0;
    while (done_cnt[core] < n && t < 500) begin @(negedge clk); t++; end
    chk(done_cnt[core] >= n, $sformatf("chain of core %0d finished", core));
  endtask
  function automatic chain_t base(int core, logic [PA_W-1:0] src, int n);
    chain_t c;
    c = '0; c.core = 2'(core); c.src_paddr = src; c.n_uops = 5'(n);
    c.pte_vld = 1; c.pte_vpn = 36'h0_0040_0000 + 36'(core); c.pte_ppn = 28'h00_5000 + 28'(core);
    c.uops[0] = E(OP_LD, 0, -1, 0, -1, 0, 1);
    return c;
  endfunction
  // virtual address on the page given to core c, and its physical address
  function automatic logic [VA_W-1:0] va(int core, int off); return {36'h0_0040_0000 + 36'(core), 12'(off)}; endfunction
  function automatic logic [PA_W-1:0] pa(int core, int off); return {28'h00_5000 + 28'(core), 12'(off)}; endfunction

  initial begin
    chain_t c;
    int t_start, n0, st0;
    ch_vld = 0; ch = '0; src_fill_vld = 0; src_fill_la = 0; inv_vld = 0; inv_laddr = 0; sd_vld = 0; sd_core = 0; sd_vpn = 0;
    cancel_vld = 0; cancel_core = 0; df_vld = 0; df_laddr = 0; df_data = 0; llc_rsp_vld = 0; llc_rsp_tag = 0; llc_rsp_hit = 0;
    llc_rsp_laddr = 0; llc_rsp_data = 0; cyc = 0; n_llc = 0; n_llc_hit = 0; n_mc = 0; n_mx = 0;
    foreach (lo_nreg[i]) begin lo_nreg[i] = 0; lo_nst[i] = 0; done_cnt[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;

    // ---------------- T1: pointer chase of the document (core 1)
    // A holds (VA of B) - 0x18; B holds (VA of C) - 4; C holds the final value
    mem[40'h9_0000_1040 >> 3] = 64'(va(1, 12'h200)) - 64'h18;
    mem[pa(1, 12'h200) >> 3]  = 64'(va(1, 12'h6c0)) - 64'h4;
    mem[pa(1, 12'h6c0) >> 3]  = 64'hDEAD_0000_1234_5678;
    in_llc[pa(1, 12'h6c0) >> 6] = 1;
    c = base(1, 40'h9_0000_1040, 6);
    c.uops[1] = E(OP_MOV, 1, 0, 0, -1, 0, 2);
    c.uops[2] = E(OP_ADD, 2, 1, 0, 0, 1, 3);
    c.uops[3] = E(OP_LD,  3, 2, 0, -1, 0, 4);
    c.uops[4] = E(OP_ADD, 4, 3, 0, 1, 1, 5);
    c.uops[5] = E(OP_LD,  5, 4, 0, -1, 0, 6);
    c.n_li = 2; c.li[0] = 64'h18; c.li[1] = 64'h4;
    send(c);
    chk(ctx_busy != 0, "context taken");
    repeat (5) @(negedge clk);
    chk(lo_nreg[1] == 0 && done_cnt[1] == 0, "waits for the source data");
    src_fill(40'h9_0000_1040);
    wait_done(1, 1);
    chk(done_stat[1] == ST_OK && lo_nreg[1] == 6 && lo_nst[1] == 0, "six live-out registers");
    chk(lo_reg[1][0] == 64'(va(1, 12'h200)) - 64'h18 && lo_reg[1][1] == lo_reg[1][0], "E0, E1");
    chk(lo_reg[1][2] == 64'(va(1, 12'h200)), "E2 = address of B");
    chk(lo_reg[1][3] == 64'(va(1, 12'h6c0)) - 64'h4 && lo_reg[1][4] == 64'(va(1, 12'h6c0)), "E3, E4");
    chk(lo_reg[1][5] == 64'hDEAD_0000_1234_5678, "E5 = value at C");
    chk(n_llc == 2 && n_llc_hit == 1 && n_mc == 0, "B misses, C hits in the LLC");
    chk(n_mx == 2, "a message per executed load");

    // ---------------- T2: spill/fill (core 2)
    n0 = n_llc;
    c = base(2, 40'h9_0000_2000, 3);
    c.uops[1] = E(OP_ST, -1, 0, 1, 0, 0, 7);           // [L0] <- E0
    c.uops[2] = E(OP_LD, 1, 0, 1, -1, 0, 8);           // E1 <- [L0]
    c.n_li = 1; c.li[0] = 64'(va(2, 12'h100));
    send(c);
    src_fill(40'h9_0000_2000);
    wait_done(2, 1);
    chk(done_stat[2] == ST_OK && lo_reg[2][1] == lo_reg[2][0] && lo_reg[2][0] == rdw(40'h9_0000_2000), "fill forwarded from spill");
    chk(lo_nst[2] == 1 && lo_st_pa[2] == pa(2, 12'h100) && lo_st_data[2] == lo_reg[2][0], "store returned as live-out");
    chk(n_llc == n0 && n_mc == 0, "no memory request for the fill");

    // ---------------- T3: data cache hit on a line just arrived from DRAM
    n0 = n_llc;
    c = base(3, pa(3, 12'h040), 2);
    c.uops[1] = E(OP_LD, 1, 0, 1, -1, 0, 9);           // another word of the source line
    c.n_li = 1; c.li[0] = 64'(va(3, 12'h048));
    send(c);
    src_fill(pa(3, 12'h040));
    t_start = cyc;
    wait_done(3, 1);
    chk(lo_reg[3][1] == rdw(pa(3, 12'h048)) && n_llc == n0 && n_mc == 0, "EMC data cache hit");

    // ---------------- T4: miss predictor sends the load straight to DRAM
    for (int i = 0; i < 5; i++) begin
      n0 = n_llc; st0 = n_mc;
      c = base(0, 40'h8_0000_0000 + 40'(i * 64), 2);
      c.uops[1] = E(OP_LD, 1, 0, 1, -1, 0, 8'h77);
      c.n_li = 1; c.li[0] = 64'(va(0, 12'h400 + i * 64));
      send(c);
      src_fill(40'h8_0000_0000 + 40'(i * 64));
      wait_done(0, i + 1);
      chk(lo_reg[0][1] == rdw(pa(0, 12'h400 + i * 64)), "predicted load value");
      if (i < 4) chk(n_llc == n0 + 1 && n_mc == st0, "LLC path while the counter is low");
      else       chk(n_llc == n0 && n_mc == st0 + 1, "direct memory request after four LLC misses");
      repeat (LLC_LAT + 2) @(negedge clk);
    end

    // ---------------- T5: mispredicted branch (core 1)
    c = base(1, 40'h9_0000_3000, 3);
    c.uops[1] = E(OP_BEQ, -1, 0, 0, 0, 1, 10); c.uops[1].br_taken = 1;   // E0 == 0 ? predicted taken
    c.uops[2] = E(OP_ADD, 1, 0, 0, 0, 1, 11);
    c.n_li = 1; c.li[0] = 64'h0;
    n0 = lo_nreg[1];
    send(c);
    src_fill(40'h9_0000_3000);
    wait_done(1, 2);
    chk(done_stat[1] == ST_MISPRED && lo_nreg[1] == n0, "branch misprediction reported, no live-outs");

    // ---------------- T6: translation not resident (core 2, page of core 0)
    sd_vld = 1; sd_core = 2; sd_vpn = 36'h0_0040_0002;   // shoot down core 2's page
    @(negedge clk); sd_vld = 0;
    c = base(2, 40'h9_0000_4000, 2); c.pte_vld = 0;
    c.uops[1] = E(OP_LD, 1, 0, 1, -1, 0, 12);
    c.n_li = 1; c.li[0] = 64'(va(2, 12'h100));
    n0 = lo_nreg[2];
    send(c);
    src_fill(40'h9_0000_4000);
    wait_done(2, 2);
    chk(done_stat[2] == ST_TLBMISS && lo_nreg[2] == n0, "TLB miss halts the chain");

    // ---------------- T7 + T8: two contexts, third refused, cancel
    c = base(0, 40'h9_0000_5000, 2); c.uops[1] = E(OP_ADD, 1, 0, 0, 0, 1, 13); c.n_li = 1; c.li[0] = 64'd5;
    send(c);
    c = base(1, 40'h9_0000_6000, 2); c.uops[1] = E(OP_SUB, 1, 0, 0, 0, 1, 14); c.n_li = 1; c.li[0] = 64'd5;
    send(c);
    @(negedge clk); #1;
    chk(ctx_busy == 2'b11, "both contexts busy");
    ch = base(3, 40'h9_0000_7000, 2); ch.uops[1] = E(OP_XOR, 1, 0, 0, 0, 1, 15); ch.n_li = 1; ch.li[0] = 64'hff;
    ch_vld = 1; #1;
    chk(!ch_rdy, "third chain refused");
    @(negedge clk); cancel_vld = 1; cancel_core = 0;
    @(negedge clk); cancel_vld = 0;
    wait_done(0, 6);
    chk(done_stat[0] == 2'd3, "cancelled chain reported");
    while (!ch_rdy) @(negedge clk);
    @(posedge clk); #1; ch_vld = 0;
    src_fill(40'h9_0000_6000);
    wait_done(1, 3);
    chk(done_stat[1] == ST_OK && lo_reg[1][1] == rdw(40'h9_0000_6000) - 64'd5, "second context result");
    src_fill(40'h9_0000_7000);
    wait_done(3, 2);
    chk(lo_reg[3][1] == (rdw(40'h9_0000_7000) ^ 64'hff), "third chain ran after a context freed");

    // ---------------- T9: source line delivered before the chain (still in the data cache)
    n0 = n_llc;
    c = base(3, pa(3, 12'h040), 2);
    c.uops[1] = E(OP_ADD, 1, 0, 0, 0, 1, 16); c.n_li = 1; c.li[0] = 64'd9;
    send(c);
    wait_done(3, 3);
    chk(done_stat[3] == ST_OK && lo_reg[3][0] == rdw(pa(3, 12'h040)) && lo_reg[3][1] == rdw(pa(3, 12'h040)) + 64'd9 && n_llc == n0,
        "source word taken from the data cache, no fill needed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
