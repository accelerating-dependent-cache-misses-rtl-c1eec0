// emc_dcache: the EMC data cache.
//
// 4 kB, 4-way set associative, 64-byte lines (16 sets). It holds the lines
// most recently transmitted from DRAM to the chip: every line returning from
// DRAM through the memory controller is written into it (fill port), so a
// chain that loads data which has just entered the chip hits here. Lines are
// replaced first-in first-out within a set. The LLC directory keeps the cache
// coherent by invalidating lines (invalidate port). EMC stores do not write
// the cache; they stay in the load/store queue.
// Access takes two cycles through one port: a request accepted in cycle t
// (tags and data read in t+1) returns hit and the addressed 64-bit word in
// cycle t+2, with the requester's tag echoed. A fill uses the port and blocks
// a request in the same cycle. Size, associativity, latency and the single
// port follow the document; FIFO replacement, aligned 8-byte reads and the
// fill priority are this design's choices.
module emc_dcache
  import emc_pkg::*;
#(
  parameter int unsigned SIZE_B = 4096,
  parameter int unsigned WAYS   = 4,
  parameter int unsigned TAG_IW = 8        // width of the echoed request tag
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup port
  input  logic               req_vld,
  output logic               req_rdy,
  input  logic [PA_W-1:0]    req_paddr,
  input  logic [TAG_IW-1:0]  req_tag,
  output logic               rsp_vld,
  output logic               rsp_hit,
  output logic [XLEN-1:0]    rsp_data,
  output logic [TAG_IW-1:0]  rsp_tag,
  // fill from DRAM
  input  logic               fill_vld,
  input  logic [LADDR_W-1:0] fill_laddr,
  input  logic [LINE_W-1:0]  fill_data,
  // coherence invalidation
  input  logic               inv_vld,
  input  logic [LADDR_W-1:0] inv_laddr
);
  localparam int unsigned SETS  = SIZE_B / (LINE_B * WAYS);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = LADDR_W - SET_W;

  logic              vld  [SETS][WAYS];
  logic [TAG_W-1:0]  tag  [SETS][WAYS];
  logic [LINE_W-1:0] data [SETS][WAYS];
  logic [WAY_W-1:0]  fifo [SETS];

  // stage 1: accepted request
  logic              s1_vld;
  logic [PA_W-1:0]   s1_paddr;
  logic [TAG_IW-1:0] s1_tag;

  function automatic logic [SET_W-1:0] set_of(input logic [LADDR_W-1:0] la);
    return la[SET_W-1:0];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input logic [LADDR_W-1:0] la);
    return la[LADDR_W-1:SET_W];
  endfunction

  assign req_rdy = !fill_vld;

  // hit detection of the stage-1 request
  logic              h_hit;
  logic [XLEN-1:0]   h_word;
  logic [LADDR_W-1:0] s1_la;
  assign s1_la = s1_paddr[PA_W-1:OFF_W];
  always_comb begin
    h_hit  = 1'b0;
    h_word = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[set_of(s1_la)][w] && tag[set_of(s1_la)][w] == tag_of(s1_la)) begin
        h_hit  = 1'b1;
        h_word = data[set_of(s1_la)][w][s1_paddr[OFF_W-1:3]*XLEN +: XLEN];
      end
  end

  // fill: reuse the way already holding the line, else the FIFO victim
  logic             f_present;
  logic [WAY_W-1:0] f_way;
  always_comb begin
    f_present = 1'b0;
    f_way     = fifo[set_of(fill_laddr)];
    for (int w = 0; w < WAYS; w++)
      if (vld[set_of(fill_laddr)][w] && tag[set_of(fill_laddr)][w] == tag_of(fill_laddr)) begin
        f_present = 1'b1;
        f_way     = WAY_W'(w);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_vld <= 1'b0; s1_paddr <= '0; s1_tag <= '0;
      rsp_vld <= 1'b0; rsp_hit <= 1'b0; rsp_data <= '0; rsp_tag <= '0;
      for (int s = 0; s < SETS; s++) begin
        fifo[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          vld[s][w] <= 1'b0;
          tag[s][w] <= '0;
        end
      end
    end else begin
      s1_vld   <= req_vld && req_rdy;
      s1_paddr <= req_paddr;
      s1_tag   <= req_tag;
      rsp_vld  <= s1_vld;
      rsp_hit  <= h_hit;
      rsp_data <= h_word;
      rsp_tag  <= s1_tag;
      if (inv_vld)
        for (int w = 0; w < WAYS; w++)
          if (tag[set_of(inv_laddr)][w] == tag_of(inv_laddr)) vld[set_of(inv_laddr)][w] <= 1'b0;
      if (fill_vld) begin
        vld[set_of(fill_laddr)][f_way] <= 1'b1;
        tag[set_of(fill_laddr)][f_way] <= tag_of(fill_laddr);
        if (!f_present) fifo[set_of(fill_laddr)] <= fifo[set_of(fill_laddr)] + 1'b1;
      end
    end
  end

  // data array without reset
  always_ff @(posedge clk)
    if (fill_vld) data[set_of(fill_laddr)][f_way] <= fill_data;
endmodule
