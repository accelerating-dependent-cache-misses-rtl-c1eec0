// tb_emc_tlb: fills a core's 32-entry TLB beyond capacity and checks the
// circular replacement (the oldest page is the one lost), per-core
// separation, address translation and shootdown.
module tb_emc_tlb;
  import emc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0][1:0] q_core; logic [1:0][VA_W-1:0] q_va; logic [1:0] q_hit; logic [1:0][PA_W-1:0] q_pa;
  logic f_vld, i_vld; logic [1:0] f_core, i_core; logic [VPN_W-1:0] f_vpn, i_vpn; logic [PPN_W-1:0] f_ppn;
  emc_tlb dut (.clk, .rst_n, .q_core, .q_va, .q_hit, .q_pa, .f_vld, .f_core, .f_vpn, .f_ppn, .i_vld, .i_core, .i_vpn);

  task automatic look(input int p, input int core, input int vpn, input logic exp_hit, input int exp_ppn);
    q_core[p] = 2'(core); q_va[p] = {VPN_W'(vpn), 12'h abc}; #1;
    checks++;
    if (q_hit[p] != exp_hit || (exp_hit && q_pa[p] != {PPN_W'(exp_ppn), 12'habc})) begin
      failures++; $display("FAIL core%0d vpn%0h hit=%b pa=%h", core, vpn, q_hit[p], q_pa[p]);
    end
  endtask

  initial begin
    f_vld = 0; i_vld = 0; f_core = 0; i_core = 0; f_vpn = 0; i_vpn = 0; f_ppn = 0; q_core = 0; q_va = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 33; i++) begin
      @(negedge clk); f_vld = 1; f_core = 0; f_vpn = VPN_W'(100 + i); f_ppn = PPN_W'(7000 + i);
    end
    @(negedge clk); f_vld = 1; f_core = 3; f_vpn = 100; f_ppn = 5;
    @(negedge clk); f_vld = 0;
    look(0, 0, 100, 0, 0);          // overwritten by the 33rd fill
    look(1, 0, 101, 1, 7001);
    look(0, 0, 132, 1, 7032);
    look(1, 3, 100, 1, 5);
    look(0, 1, 101, 0, 0);
    @(negedge clk); i_vld = 1; i_core = 0; i_vpn = 101;
    @(negedge clk); i_vld = 0;
    look(0, 0, 101, 0, 0);
    look(1, 0, 102, 1, 7002);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
