// emc_pkg: types and constants shared by the Enhanced Memory Controller (EMC)
// and by the chain generation unit at each core.
//
// The sizes follow the quad-core configuration: two EMC contexts, each with a
// 16-uop buffer, a 16-register physical register file, a 16-entry live-in
// vector and 8 load/store queue entries; an 8-entry reservation station; a
// 2-wide back end; a 32-entry TLB per core; a 4 kB, 4-way data cache; 3-bit
// counters for the dependent-miss and LLC-miss predictors; a 256-entry ROB at
// the core. Data width (64 bit, x86-64), the physical address width (40 bit),
// the virtual address width (48 bit), 4 kB pages and the uop encoding are this
// design's own choices. The EMC uop is packed into the 6 bytes the transfer
// format allows (checked by an assertion in emc_engine).
package emc_pkg;

  localparam int unsigned XLEN      = 64;   // integer register width
  localparam int unsigned VA_W      = 48;   // virtual address bits
  localparam int unsigned PA_W      = 40;   // physical address bits
  localparam int unsigned PAGE_W    = 12;   // 4 kB pages
  localparam int unsigned VPN_W     = VA_W - PAGE_W;
  localparam int unsigned PPN_W     = PA_W - PAGE_W;
  localparam int unsigned LINE_B    = 64;   // cache line bytes
  localparam int unsigned LINE_W    = LINE_B * 8;
  localparam int unsigned OFF_W     = 6;    // byte offset in a line
  localparam int unsigned LADDR_W   = PA_W - OFF_W;  // line address bits

  localparam int unsigned NCORES    = 4;    // cores sharing the EMC
  localparam int unsigned NCTX      = 2;    // EMC issue contexts
  localparam int unsigned CHAIN_MAX = 16;   // uops per chain / uop buffer entries
  localparam int unsigned NEPR      = 16;   // EMC physical registers per context
  localparam int unsigned NLIVEIN   = 16;   // live-in vector entries per context
  localparam int unsigned NLSQ      = 8;    // LSQ entries per context
  localparam int unsigned NRS       = 8;    // reservation station entries
  localparam int unsigned ROB_N     = 256;  // core ROB entries
  localparam int unsigned NCPR      = 256;  // core physical registers

  localparam int unsigned EPR_W     = $clog2(NEPR);
  localparam int unsigned LI_W      = $clog2(NLIVEIN);
  localparam int unsigned CPR_W     = $clog2(NCPR);
  localparam int unsigned ROB_W     = $clog2(ROB_N);
  localparam int unsigned CORE_W    = $clog2(NCORES);
  localparam int unsigned CTX_W     = (NCTX > 1) ? $clog2(NCTX) : 1;
  localparam int unsigned PCH_W     = 8;    // PC hash carried in an EMC uop

  // Operations. The EMC executes the integer subset; anything else (floating
  // point, vector, ...) is OP_OTHER and never enters a chain.
  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,
    OP_SUB  = 4'd1,
    OP_MOV  = 4'd2,
    OP_AND  = 4'd3,
    OP_OR   = 4'd4,
    OP_XOR  = 4'd5,
    OP_NOT  = 4'd6,
    OP_SHL  = 4'd7,
    OP_SHR  = 4'd8,
    OP_SAR  = 4'd9,
    OP_SEXT = 4'd10,  // sign-extend: src2 low bits give the source width (8/16/32)
    OP_LD   = 4'd11,  // load 64 bit from src1 (+ src2 when present)
    OP_ST   = 4'd12,  // store src2 to address src1
    OP_BEQ  = 4'd13,  // branch, taken when src1 == src2
    OP_BNE  = 4'd14,  // branch, taken when src1 != src2
    OP_OTHER = 4'd15
  } op_e;

  // An EMC source operand names either an EMC physical register or a live-in.
  typedef struct packed {
    logic            vld;
    logic            li;     // 1: live-in vector entry, 0: EMC physical register
    logic [LI_W-1:0] idx;
  } esrc_t;

  // A renamed uop as held in the EMC uop buffer (38 of the 48 bits).
  typedef struct packed {
    op_e              op;
    logic             has_dst;
    logic [EPR_W-1:0] dst;
    esrc_t            s1;
    esrc_t            s2;
    logic             br_taken;   // direction predicted by the core
    logic [PCH_W-1:0] pch;        // hash of the uop's PC
    logic [ROB_W-1:0] rob;        // position in the home core's ROB
  } euop_t;

  // A uop as seen in the core's instruction window.
  typedef struct packed {
    logic             vld;
    op_e              op;
    logic             has_dst;
    logic [CPR_W-1:0] dst;
    logic             s1_v;
    logic [CPR_W-1:0] s1;
    logic             s2_v;
    logic             s2_imm;     // src2 is the immediate below
    logic [CPR_W-1:0] s2;
    logic [31:0]      imm;        // sign-extended to XLEN
    logic [15:0]      pc;         // low PC bits
    logic             br_taken;
    logic             spill;      // store: a register spill; load: the fill of a spill
  } cuop_t;

  // A complete chain as shipped from a core to the EMC.
  typedef struct packed {
    logic [CORE_W-1:0]                    core;
    logic [4:0]                           n_uops;    // including the source miss
    logic [4:0]                           n_li;
    logic [PA_W-1:0]                      src_paddr; // address of the source miss
    logic                                 pte_vld;   // a PTE comes with the chain
    logic [VPN_W-1:0]                     pte_vpn;
    logic [PPN_W-1:0]                     pte_ppn;
    euop_t [CHAIN_MAX-1:0]                uops;      // uops[0] is the source miss
    logic  [NLIVEIN-1:0][XLEN-1:0]        li;
  } chain_t;

  // Result tag on the common data bus.
  typedef struct packed {
    logic [CTX_W-1:0] ctx;
    logic [EPR_W-1:0] epr;
  } tag_t;

  // Outcome of a chain reported to its home core.
  typedef enum logic [1:0] {
    ST_OK      = 2'd0,
    ST_MISPRED = 2'd1,  // a branch in the chain was mispredicted by the core
    ST_TLBMISS = 2'd2   // a page translation was not resident in the EMC TLB
  } cstat_e;


  // Reservation station entry. The station holds source descriptors and ready
  // bits only; operand values are read from the PRF or the live-in vector
  // when the uop issues.
  typedef struct packed {
    logic [CTX_W-1:0]     ctx;
    op_e                  op;
    logic                 has_dst;
    logic [EPR_W-1:0]     dst;
    esrc_t                s1;
    logic                 s1_rdy;
    esrc_t                s2;
    logic                 s2_rdy;
    logic                 br_taken;
    logic [PCH_W-1:0]     pch;
    logic [ROB_W-1:0]     rob;
    logic [$clog2(NLSQ)-1:0] lsq;   // LSQ entry of a load or store
  } rs_ent_t;

  function automatic logic is_mem_op(input op_e op);
    return op == OP_LD || op == OP_ST;
  endfunction

  function automatic logic [XLEN-1:0] sext32(input logic [31:0] v);
    return {{(XLEN-32){v[31]}}, v};
  endfunction

  function automatic logic is_chain_op(input op_e op);
    return op != OP_OTHER;
  endfunction

endpackage
