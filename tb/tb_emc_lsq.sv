// tb_emc_lsq: one context's LSQ with a store (register spill), a load of the
// same word (fill, must forward and must wait for the store's address), a
// load of another word of the stored line (must not forward; it hits in the
// data cache), and a load that misses and waits for its line. The cache and
// memory are played by the testbench.
module tb_emc_lsq;
  import emc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear; logic [1:0] al_vld, al_st; logic [1:0][3:0] al_dst; logic [1:0][7:0] al_pch; logic [1:0][2:0] al_idx;
  logic [3:0] n_free, n_used; logic [1:0] ad_vld; logic [1:0][2:0] ad_idx; logic [1:0][PA_W-1:0] ad_paddr; logic [1:0][63:0] ad_data;
  logic cq_vld, cq_gnt, cr_vld, cr_hit, mq_vld, mq_gnt, wb_vld, wb_gnt, all_done, rd_st;
  logic [2:0] cq_idx, cr_idx, mq_idx, rd_idx; logic [PA_W-1:0] cq_paddr, mq_paddr, rd_paddr; logic [63:0] cr_data, wb_data, rd_data;
  logic [7:0] mq_pch; logic [1:0] ln_vld; logic [1:0][LADDR_W-1:0] ln_laddr; logic [1:0][LINE_W-1:0] ln_data; logic [3:0] wb_dst;
  emc_lsq dut (.clk, .rst_n, .clear, .al_vld, .al_st, .al_dst, .al_pch, .al_idx, .n_free,
    .ad_vld, .ad_idx, .ad_paddr, .ad_data, .cq_vld, .cq_idx, .cq_paddr, .cq_gnt, .cr_vld, .cr_idx, .cr_hit, .cr_data,
    .mq_vld, .mq_idx, .mq_paddr, .mq_pch, .mq_gnt, .ln_vld, .ln_laddr, .ln_data, .wb_vld, .wb_dst, .wb_data, .wb_gnt,
    .all_done, .n_used, .rd_idx, .rd_st, .rd_paddr, .rd_data);
  task automatic chk(input logic c, input string m); checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end endtask

  // write-backs seen
  logic [63:0] wbv [16]; logic [15:0] wbs;
  always @(posedge clk) if (rst_n && wb_vld && wb_gnt) begin wbv[wb_dst] <= wb_data; wbs[wb_dst] <= 1'b1; end

  initial begin
    clear = 0; al_vld = 0; al_st = 0; al_dst = 0; al_pch = 0; ad_vld = 0; ad_idx = 0; ad_paddr = 0; ad_data = 0;
    cq_gnt = 0; cr_vld = 0; cr_idx = 0; cr_hit = 0; cr_data = 0; mq_gnt = 0; ln_vld = 0; ln_laddr = 0; ln_data = 0;
    wb_gnt = 1; rd_idx = 0; wbs = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // store (0), load same word (1)
    @(negedge clk); al_vld = 2'b11; al_st = 2'b01; al_dst = {4'd5, 4'd0}; al_pch = {8'h11, 8'h00}; #1;
    chk(al_idx[0] == 0 && al_idx[1] == 1, "allocation order");
    // load hit (2), load miss (3)
    @(negedge clk); al_vld = 2'b11; al_st = 2'b00; al_dst = {4'd7, 4'd6}; al_pch = {8'h33, 8'h22};
    @(negedge clk); al_vld = 0; #1; chk(n_used == 4 && n_free == 4, "four entries used");
    // the fill gets its address before the spill: it must wait
    ad_vld = 2'b01; ad_idx[0] = 3'd1; ad_paddr[0] = 40'h12340;
    @(negedge clk); ad_vld = 0; #1;
    chk(!cq_vld && !wb_vld, "load waits for older store address");
    ad_vld = 2'b11; ad_idx = {3'd2, 3'd0}; ad_paddr = {40'h12348, 40'h12340}; ad_data[0] = 64'hfeed_beef;
    @(negedge clk); ad_vld = 0;
    @(negedge clk);
    repeat (2) @(negedge clk);
    chk(wbs[5] && wbv[5] == 64'hfeed_beef, "store-to-load forwarding");
    // load 2 reads another word of the stored line: no forwarding
    #1; chk(cq_vld && cq_idx == 2 && cq_paddr == 40'h12348, "other word of the stored line goes to the cache");
    cq_gnt = 1; @(negedge clk); cq_gnt = 0; #1; chk(!cq_vld, "one request");
    @(negedge clk); cr_vld = 1; cr_idx = 2; cr_hit = 1; cr_data = 64'h1234; @(negedge clk); cr_vld = 0;
    @(negedge clk); chk(wbs[6] && wbv[6] == 64'h1234, "cache hit write-back");
    // load 3: address, cache miss, memory request, line
    ad_vld = 2'b10; ad_idx[1] = 3'd3; ad_paddr[1] = 40'hABC58; @(negedge clk); ad_vld = 0;
    #1; chk(cq_vld && cq_idx == 3, "second cache request");
    cq_gnt = 1; @(negedge clk); cq_gnt = 0;
    cr_vld = 1; cr_idx = 3; cr_hit = 0; @(negedge clk); cr_vld = 0; #1;
    chk(mq_vld && mq_paddr == 40'hABC58 && mq_pch == 8'h33, "memory request after miss");
    mq_gnt = 1; @(negedge clk); mq_gnt = 0;
    repeat (3) @(negedge clk); #1; chk(!all_done && !wbs[7], "waits for the line");
    ln_vld = 2'b10; ln_laddr[1] = 34'h1234; ln_data[1] = '0;             // unrelated line
    @(negedge clk); ln_vld = 2'b01; ln_laddr[0] = 40'hABC58 >> 6;
    for (int w = 0; w < 8; w++) ln_data[0][w*64 +: 64] = 64'(w + 100);
    @(negedge clk); ln_vld = 0;
    @(negedge clk); #1;
    chk(wbs[7] && wbv[7] == 64'd103, "line arrival completes the load");
    chk(all_done, "all done");
    rd_idx = 0; #1; chk(rd_st && rd_paddr == 40'h12340 && rd_data == 64'hfeed_beef, "store readout");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; #1; chk(n_used == 0 && all_done, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
