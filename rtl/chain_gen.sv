// chain_gen: dependence chain generation unit at a core.
//
// When retirement is blocked by an LLC miss at the head of a full ROB and the
// dependent-miss counter says a dependent miss is likely, this unit walks
// forward through the instruction window from the source miss and collects
// the uops that depend on it, renamed for the EMC:
//
//  cycle 0  the source miss (ROB head) gets EMC register E0 in the register
//           remapping table (RRT); its destination tag is pseudo-broadcast,
//           and the first uop it wakes is added in the same cycle.
//  cycle n  the oldest uop not yet in the chain that is allowed at the EMC,
//           whose sources are each either ready at the core or mapped in the
//           RRT, and at least one of which is mapped (i.e. it was woken by the
//           chain) is added: mapped sources become EMC registers, ready
//           sources are read from the core PRF into the live-in vector,
//           immediates are shifted into the live-in vector, and its
//           destination gets the next EMC register. Its tag is broadcast.
//
// The walk ends when no further uop wakes up, when the chain holds 16 uops,
// or when the next uop would not fit (no live-in entries, no EMC register,
// or a ninth load/store for the eight LSQ entries). The finished chain, the
// live-ins, the source miss address and (when the core's TLB says the EMC
// does not hold it) the source page's PTE are then offered to the EMC with
// valid/ready. With the document's six-uop example the uops are added in
// cycles 0 to 4 and the chain is offered in cycle 5.
//
// Allowed uops: the integer operations, loads, branches (sent with their
// predicted direction) and stores that the core identified as register
// spills. A load the core flags as the matching fill (its LSQ forwards the
// load from a spill store) counts as woken once a spill store is in the
// chain, even when its address register is ready at the core. The window is presented by the core with its head (the source
// miss) at index 0. Following the document: the trigger, the pseudo wakeup
// walk, the RRT with a saturating EPR counter, the live-in shift register and
// the 16-uop limit. This design's choices: one uop added per cycle (two in
// cycle 0), oldest first, a source miss that wakes nothing is dropped, the window presentation, and the extra stop
// conditions for live-ins and LSQ entries.
module chain_gen
  import emc_pkg::*;
#(
  parameter int unsigned W = ROB_N            // window entries examined
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [CORE_W-1:0]      core_id,
  // trigger
  input  logic                   stall_miss,  // full-window stall, LLC miss at head
  input  logic                   likely,      // dependent-miss counter
  input  logic [PA_W-1:0]        src_paddr,
  input  logic                   pte_send,    // source PTE not resident at the EMC
  input  logic [VPN_W-1:0]       pte_vpn,
  input  logic [PPN_W-1:0]       pte_ppn,
  // instruction window, head at 0
  input  cuop_t [W-1:0]          rob,
  input  logic [NCPR-1:0]        cpr_ready,
  output logic [1:0][CPR_W-1:0]  prf_raddr,
  input  logic [1:0][XLEN-1:0]   prf_rdata,
  // pseudo wakeup broadcast on the core CDB
  output logic [1:0]             pb_vld,
  output logic [1:0][CPR_W-1:0]  pb_tag,
  // chain to the EMC
  output logic                   ch_vld,
  input  logic                   ch_rdy,
  output chain_t                 ch,
  output logic [W-1:0]           in_chain,    // window entries sent to the EMC
  output logic                   busy
);
  typedef enum logic [1:0] {G_IDLE, G_WALK, G_SEND} gstate_e;
  gstate_e st;

  euop_t [CHAIN_MAX-1:0] uops;
  logic  [4:0]           n_uops;
  logic  [3:0]           n_mem;
  logic  [PA_W-1:0]      s_paddr;
  logic                  s_pte;
  logic  [VPN_W-1:0]     s_vpn;
  logic  [PPN_W-1:0]     s_ppn;

  logic                  start;
  assign start = st == G_IDLE && stall_miss && likely && rob[0].vld && rob[0].op == OP_LD &&
                 rob[0].has_dst;

  // RRT and live-in vector
  logic [1:0]                 rrt_alloc;
  logic [1:0][CPR_W-1:0]      rrt_cpr;
  logic [1:0][EPR_W-1:0]      rrt_epr;
  logic [$clog2(NEPR+1)-1:0]  rrt_used;
  logic                       rrt_full, rrt_clear;
  logic                       lk_hit0, lk_hit1;
  logic [EPR_W-1:0]           lk_epr0, lk_epr1;
  logic [NCPR-1:0]            rrt_mapped, mapped;
  logic                       li_sh0, li_sh1, li_clear;
  logic [XLEN-1:0]            li_d0, li_d1;
  logic [NLIVEIN-1:0][XLEN-1:0] li_all;
  logic [$clog2(NLIVEIN+1)-1:0] li_cnt;

  // CPRs mapped this cycle or before (the source is mapped in cycle 0)
  always_comb begin
    mapped = rrt_mapped;
    if (start) mapped[rob[0].dst] = 1'b1;
  end

  // candidate: oldest window entry woken by the chain
  logic [W-1:0]       added;
  logic               spill_seen;   // a spill store is already in the chain
  logic               cand;
  logic [$clog2(W)-1:0] ci;
  always_comb begin
    cand = 1'b0;
    ci   = '0;
    for (int i = W-1; i >= 1; i--) begin
      cuop_t u;
      logic ok1, ok2, m1, m2, mf, allowed;
      u = rob[i];
      allowed = u.vld && is_chain_op(u.op) && (u.op != OP_ST || u.spill);
      m1  = u.s1_v && mapped[u.s1];
      m2  = u.s2_v && !u.s2_imm && mapped[u.s2];
      ok1 = !u.s1_v || m1 || cpr_ready[u.s1];
      ok2 = !u.s2_v || u.s2_imm || m2 || cpr_ready[u.s2];
      mf  = u.op == OP_LD && u.spill && spill_seen && !start;  // fill of a chain spill
      if (!(added[i] && !start) && allowed && ok1 && ok2 && (m1 || m2 || mf) && (st == G_WALK || start)) begin
        cand = 1'b1;
        ci   = ($clog2(W))'(i);
      end
    end
  end

  cuop_t cu;
  assign cu = rob[ci];
  assign prf_raddr[0] = cu.s1;
  assign prf_raddr[1] = cu.s2;

  // renaming of the candidate's sources
  logic c_m1, c_m2, c_li1, c_li2;
  logic [EPR_W-1:0] c_e1, c_e2;
  logic [1:0] c_nli;
  always_comb begin
    c_m1  = cu.s1_v && mapped[cu.s1];
    c_m2  = cu.s2_v && !cu.s2_imm && mapped[cu.s2];
    c_li1 = cu.s1_v && !c_m1;
    c_li2 = cu.s2_v && !c_m2;
    c_nli = {1'b0, c_li1} + {1'b0, c_li2};
    // in cycle 0 the only mapping is the source's, which gets E0
    c_e1 = (start) ? '0 : lk_epr0;
    c_e2 = (start) ? '0 : lk_epr1;
  end

  // does the candidate fit?
  logic [4:0] base_n;
  logic [$clog2(NEPR+1)-1:0] base_epr;
  logic       fits;
  always_comb begin
    base_n   = start ? 5'd1 : n_uops;
    base_epr = start ? ($clog2(NEPR+1))'(1) : rrt_used;
    fits = cand &&
           base_n < 5'(CHAIN_MAX) &&
           (32'(li_cnt) + 32'(c_nli) <= NLIVEIN) &&
           (!cu.has_dst || base_epr < ($clog2(NEPR+1))'(NEPR)) &&
           (!is_mem_op(cu.op) || n_mem < 4'(NLSQ));
  end

  // the uop as it goes to the EMC
  euop_t new_u, src_u;
  always_comb begin
    logic [LI_W-1:0] l0;
    l0 = li_cnt[LI_W-1:0];
    new_u          = '0;
    new_u.op       = cu.op;
    new_u.has_dst  = cu.has_dst;
    new_u.dst      = start ? rrt_epr[1] : rrt_epr[0];
    new_u.s1.vld   = cu.s1_v;
    new_u.s1.li    = c_li1;
    new_u.s1.idx   = c_li1 ? l0 : LI_W'(c_e1);
    new_u.s2.vld   = cu.s2_v;
    new_u.s2.li    = c_li2;
    new_u.s2.idx   = c_li2 ? (c_li1 ? l0 + 1'b1 : l0) : LI_W'(c_e2);
    new_u.br_taken = cu.br_taken;
    new_u.pch      = cu.pc[7:0] ^ cu.pc[15:8];
    new_u.rob      = ROB_W'(ci);
    src_u          = '0;
    src_u.op       = OP_LD;
    src_u.has_dst  = 1'b1;
    src_u.dst      = '0;
    src_u.pch      = rob[0].pc[7:0] ^ rob[0].pc[15:8];
    src_u.rob      = '0;
  end

  logic add;
  assign add = fits;

  // RRT writes: source (cycle 0) in slot 0, added uop in slot 1 (cycle 0)
  // or slot 0 (later cycles)
  always_comb begin
    rrt_alloc = '0;
    rrt_cpr   = '0;
    if (start) begin
      rrt_alloc[0] = 1'b1;
      rrt_cpr[0]   = rob[0].dst;
      rrt_alloc[1] = add && cu.has_dst;
      rrt_cpr[1]   = cu.dst;
    end else begin
      rrt_alloc[0] = add && cu.has_dst;
      rrt_cpr[0]   = cu.dst;
    end
  end

  // live-in shifts: source 1 data, then source 2 data or immediate
  always_comb begin
    li_sh0 = add && c_li1;
    li_d0  = prf_rdata[0];
    li_sh1 = add && c_li2;
    li_d1  = cu.s2_imm ? sext32(cu.imm) : prf_rdata[1];
  end

  emc_rrt #(.N(NEPR), .NC(NCPR)) u_rrt (
    .clk, .rst_n, .clear(rrt_clear),
    .alloc(rrt_alloc), .alloc_cpr(rrt_cpr), .alloc_epr(rrt_epr),
    .used(rrt_used), .full(rrt_full),
    .lk_cpr0(cu.s1), .lk_hit0(lk_hit0), .lk_epr0(lk_epr0),
    .lk_cpr1(cu.s2), .lk_hit1(lk_hit1), .lk_epr1(lk_epr1),
    .mapped(rrt_mapped)
  );

  livein_vector #(.N(NLIVEIN)) u_li (
    .clk, .rst_n, .clear(li_clear),
    .sh0_vld(li_sh0), .sh0_data(li_d0), .sh1_vld(li_sh1), .sh1_data(li_d1),
    .ld_vld(1'b0), .ld_data('0), .ld_cnt('0),
    .rd_idx0('0), .rd_data0(), .rd_idx1('0), .rd_data1(),
    .all_data(li_all), .count(li_cnt)
  );

  // the walk is over when nothing (more) fits
  logic walk_end;
  assign walk_end = (st == G_WALK && !add) ||
                    (add && (base_n + 1'b1) == 5'(CHAIN_MAX));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= G_IDLE; uops <= '0; n_uops <= '0; n_mem <= '0; added <= '0; spill_seen <= 1'b0;
      s_paddr <= '0; s_pte <= 1'b0; s_vpn <= '0; s_ppn <= '0;
    end else begin
      unique case (st)
        G_IDLE: if (start) begin
          st      <= !add ? G_IDLE : walk_end ? G_SEND : G_WALK;
          s_paddr <= src_paddr;
          s_pte   <= pte_send;
          s_vpn   <= pte_vpn;
          s_ppn   <= pte_ppn;
          uops    <= '0;
          uops[0] <= src_u;
          added   <= '0;
          added[0] <= 1'b1;
          n_uops  <= add ? 5'd2 : 5'd1;
          n_mem   <= (add && is_mem_op(cu.op)) ? 4'd1 : 4'd0;
          spill_seen <= add && cu.op == OP_ST;
          if (add) begin
            uops[1]   <= new_u;
            added[ci] <= 1'b1;
          end
        end
        G_WALK: begin
          if (add) begin
            uops[n_uops[3:0]] <= new_u;
            added[ci] <= 1'b1;
            n_uops <= n_uops + 1'b1;
            if (is_mem_op(cu.op)) n_mem <= n_mem + 1'b1;
            if (cu.op == OP_ST) spill_seen <= 1'b1;
          end
          if (walk_end) st <= (ch_rdy && !add) ? G_IDLE : G_SEND;
        end
        G_SEND: if (ch_rdy) st <= G_IDLE;
        default: st <= G_IDLE;
      endcase
    end
  end

  // the chain is offered as soon as the walk ends
  assign ch_vld    = (st == G_WALK && !add) || st == G_SEND;
  assign rrt_clear = (ch_vld && ch_rdy) || (start && !add);
  assign li_clear  = ch_vld && ch_rdy;
  assign busy      = st != G_IDLE;
  assign in_chain  = added;

  always_comb begin
    ch           = '0;
    ch.core      = core_id;
    ch.n_uops    = n_uops;
    ch.n_li      = 5'(li_cnt);
    ch.src_paddr = s_paddr;
    ch.pte_vld   = s_pte;
    ch.pte_vpn   = s_vpn;
    ch.pte_ppn   = s_ppn;
    ch.uops      = uops;
    ch.li        = li_all;
  end

  always_comb begin
    pb_vld    = '0;
    pb_tag    = '0;
    pb_vld[0] = start;
    pb_tag[0] = rob[0].dst;
    pb_vld[1] = add && cu.has_dst;
    pb_tag[1] = cu.dst;
  end
endmodule
