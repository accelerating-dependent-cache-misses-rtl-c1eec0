// tb_chain_gen: dependence chain generation at full window size (256).
//  1. The document's example (mcf): source MEM_LD C8->C1, MOV C1->C9,
//     ADD C9,0x18->C12, MEM_LD C12->C10, ADD C10,0x4->C16, MEM_LD C16->C19,
//     with unrelated uops in between. Expected chain: LD ->E0, MOV E0->E1,
//     ADD E1,L0->E2, LD E2->E3, ADD E3,L1->E4, LD E4->E5, live-ins 0x18 and
//     0x4; uops added in cycles 0..4 (two in cycle 0), offered in cycle 5.
//  2. Filtering: a ready core register becomes a live-in read from the PRF,
//     a floating-point uop and its dependents stay out, a store that is not a
//     spill stays out, a spill store and a branch go in.
//  3. A 20-uop dependent sequence is cut at 16 uops.
//  4. No chain when the dependent-miss counter does not say "likely".
module tb_chain_gen;
  import emc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic stall_miss, likely, pte_send, ch_vld, ch_rdy, busy;
  logic [PA_W-1:0] src_paddr; logic [VPN_W-1:0] pte_vpn; logic [PPN_W-1:0] pte_ppn;
  cuop_t [ROB_N-1:0] rob; logic [NCPR-1:0] cpr_ready; logic [1:0][CPR_W-1:0] prf_raddr; logic [1:0][XLEN-1:0] prf_rdata;
  logic [1:0] pb_vld; logic [1:0][CPR_W-1:0] pb_tag; chain_t ch; logic [ROB_N-1:0] in_chain;
  chain_gen dut (.clk, .rst_n, .core_id(2'd2), .stall_miss, .likely, .src_paddr, .pte_send, .pte_vpn, .pte_ppn,
    .rob, .cpr_ready, .prf_raddr, .prf_rdata, .pb_vld, .pb_tag, .ch_vld, .ch_rdy, .ch, .in_chain, .busy);
  task automatic chk(input logic c, input string m); checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end endtask

  // core PRF model: value of Cn is n * 0x100 + 7
  always_comb for (int p = 0; p < 2; p++) prf_rdata[p] = 64'(prf_raddr[p]) * 64'h100 + 64'd7;

  function automatic cuop_t U(op_e op, int dst, int s1, int s2, logic imm_v, int imm);
    cuop_t u;
    u = '0; u.vld = 1; u.op = op; u.has_dst = dst >= 0; u.dst = 8'(dst < 0 ? 0 : dst);
    u.s1_v = s1 >= 0; u.s1 = 8'(s1 < 0 ? 0 : s1);
    u.s2_v = (s2 >= 0) || imm_v; u.s2_imm = imm_v; u.s2 = 8'(s2 < 0 ? 0 : s2); u.imm = 32'(imm);
    u.pc = 16'h4000 + 16'(dst < 0 ? 0 : dst);
    return u;
  endfunction
  function automatic logic esrc_is(esrc_t s, logic li, int idx);
    return s.vld && s.li == li && s.idx == 4'(idx);
  endfunction

  int cyc, pbn; int pbs [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pb_vld[0]) pbs.push_back(cyc * 1000 + int'(pb_tag[0]));
    if (pb_vld[1]) pbs.push_back(cyc * 1000 + int'(pb_tag[1]));
  end

  initial begin
    int t0, toff;
    stall_miss = 0; likely = 1; pte_send = 1; pte_vpn = 36'h12345; pte_ppn = 28'h777; src_paddr = 40'hA_BCDE_F040;
    rob = '0; cpr_ready = '1; ch_rdy = 0; cyc = 0;
    // ---------------- 1: the document's example
    for (int c = 0; c < 32; c++) if (c inside {1, 9, 12, 10, 16, 19, 30}) cpr_ready[c] = 0;
    rob[0] = U(OP_LD, 1, 8, -1, 0, 0);
    rob[1] = U(OP_OTHER, 30, 3, 4, 0, 0);              // unrelated
    rob[2] = U(OP_MOV, 9, 1, -1, 0, 0);
    rob[3] = U(OP_ADD, 31, 5, -1, 1, 1);               // unrelated, ready sources
    rob[4] = U(OP_ADD, 12, 9, -1, 1, 32'h18);
    rob[5] = U(OP_LD, 10, 12, -1, 0, 0);
    rob[6] = U(OP_ADD, 16, 10, -1, 1, 32'h4);
    rob[7] = U(OP_LD, 19, 16, -1, 0, 0);
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); stall_miss = 1; t0 = cyc;
    @(negedge clk); stall_miss = 0;
    toff = 0;
    while (!ch_vld && toff < 40) begin @(negedge clk); toff++; end
    chk(cyc - t0 == 5, $sformatf("chain offered in cycle 5 (got %0d)", cyc - t0));
    chk(ch.n_uops == 6 && ch.n_li == 2 && ch.core == 2, "six uops, two live-ins");
    chk(ch.uops[0].op == OP_LD && ch.uops[0].has_dst && ch.uops[0].dst == 0, "MEM_LD ->E0");
    chk(ch.uops[1].op == OP_MOV && esrc_is(ch.uops[1].s1, 0, 0) && ch.uops[1].dst == 1 && ch.uops[1].rob == 2, "MOV E0->E1");
    chk(ch.uops[2].op == OP_ADD && esrc_is(ch.uops[2].s1, 0, 1) && esrc_is(ch.uops[2].s2, 1, 0) && ch.uops[2].dst == 2, "ADD E1,L0->E2");
    chk(ch.uops[3].op == OP_LD && esrc_is(ch.uops[3].s1, 0, 2) && !ch.uops[3].s2.vld && ch.uops[3].dst == 3, "MEM_LD E2->E3");
    chk(ch.uops[4].op == OP_ADD && esrc_is(ch.uops[4].s1, 0, 3) && esrc_is(ch.uops[4].s2, 1, 1) && ch.uops[4].dst == 4, "ADD E3,L1->E4");
    chk(ch.uops[5].op == OP_LD && esrc_is(ch.uops[5].s1, 0, 4) && ch.uops[5].dst == 5 && ch.uops[5].rob == 7, "MEM_LD E4->E5");
    chk(ch.li[0] == 64'h18 && ch.li[1] == 64'h4, "live-ins 0x18, 0x4");
    chk(ch.src_paddr == 40'hA_BCDE_F040 && ch.pte_vld && ch.pte_vpn == 36'h12345 && ch.pte_ppn == 28'h777, "source address and PTE");
    chk(in_chain[7:0] == 8'b1111_0101, "window entries in the chain");
    // pseudo wakeup broadcasts, one cycle per uop, two in cycle 0
    chk(pbs.size() == 6, "six broadcasts");
    if (pbs.size() == 6) begin
      chk(pbs[0] == t0 * 1000 + 1 && pbs[1] == t0 * 1000 + 9, "cycle 0 broadcasts C1, C9");
      chk(pbs[2] == (t0 + 1) * 1000 + 12 && pbs[3] == (t0 + 2) * 1000 + 10 &&
          pbs[4] == (t0 + 3) * 1000 + 16 && pbs[5] == (t0 + 4) * 1000 + 19, "C12, C10, C16, C19 in cycles 1-4");
    end
    @(negedge clk); chk(ch_vld, "held until accepted"); ch_rdy = 1;
    @(negedge clk); ch_rdy = 0; #1; chk(!busy && !ch_vld, "idle after hand-off");
    // ---------------- 2: filtering
    rob = '0; cpr_ready = '1;
    for (int c = 40; c < 60; c++) cpr_ready[c] = 0;
    rob[0] = U(OP_LD, 40, 8, -1, 0, 0);
    rob[1] = U(OP_ADD, 41, 40, 20, 0, 0);                 // C20 ready -> live-in 0x1407
    rob[2] = U(OP_OTHER, 42, 41, -1, 0, 0);               // floating point: excluded
    rob[3] = U(OP_ADD, 43, 42, -1, 1, 1);                 // depends on excluded uop
    rob[4] = U(OP_ST, -1, 21, 41, 0, 0);                  // store, not a spill: excluded
    rob[5] = U(OP_ST, -1, 22, 41, 0, 0); rob[5].spill = 1; // spill: included
    rob[6] = U(OP_BNE, -1, 41, -1, 1, 0); rob[6].br_taken = 1;
    rob[7] = U(OP_LD, 44, 41, -1, 1, 8);
    pbs = {};
    @(negedge clk); stall_miss = 1; @(negedge clk); stall_miss = 0;
    toff = 0; while (!ch_vld && toff < 40) begin @(negedge clk); toff++; end
    chk(ch.n_uops == 5, $sformatf("filtered chain of 5 (got %0d)", ch.n_uops));
    chk(ch.uops[1].op == OP_ADD && esrc_is(ch.uops[1].s2, 1, 0) && ch.li[0] == 64'h1407, "ready source read into live-in");
    chk(ch.uops[2].op == OP_ST && ch.uops[2].rob == 5 && esrc_is(ch.uops[2].s1, 1, 1) && esrc_is(ch.uops[2].s2, 0, 1) && ch.li[1] == 64'h1607, "spill store");
    chk(ch.uops[3].op == OP_BNE && ch.uops[3].br_taken && esrc_is(ch.uops[3].s2, 1, 2) && ch.li[2] == 64'h0, "branch with prediction");
    chk(ch.uops[4].op == OP_LD && ch.uops[4].dst == 2 && ch.li[3] == 64'h8, "load with displacement");
    chk(in_chain[7:0] == 8'b1110_0011, "excluded entries");
    ch_rdy = 1; @(negedge clk); ch_rdy = 0;
    // ---------------- 3: 16-uop limit
    rob = '0; cpr_ready = '1;
    for (int c = 100; c < 130; c++) cpr_ready[c] = 0;
    rob[0] = U(OP_LD, 100, 8, -1, 0, 0);
    for (int i = 1; i < 21; i++) rob[i] = U(OP_SUB, 100 + i, 99 + i, -1, 0, 0);
    @(negedge clk); stall_miss = 1; @(negedge clk); stall_miss = 0;
    toff = 0; while (!ch_vld && toff < 40) begin @(negedge clk); toff++; end
    chk(ch.n_uops == 16 && ch.uops[15].dst == 15 && ch.uops[15].rob == 15, "cut at 16 uops");
    chk(toff == 14, $sformatf("16 uops assembled in 15 cycles (got %0d)", toff + 1));
    ch_rdy = 1; @(negedge clk); ch_rdy = 0;
    // ---------------- 4: not likely
    likely = 0;
    @(negedge clk); stall_miss = 1; repeat (3) @(negedge clk); stall_miss = 0;
    chk(!busy && !ch_vld, "no chain unless a dependent miss is likely");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
