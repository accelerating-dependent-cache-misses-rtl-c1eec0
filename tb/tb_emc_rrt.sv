// tb_emc_rrt: allocates core registers to EMC registers (one and two per
// cycle) and checks the EPR numbering, lookups, the mapped vector, the
// saturation at 16 and clear.
module tb_emc_rrt;
  import emc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear, full; logic [1:0] alloc; logic [1:0][7:0] acpr; logic [1:0][3:0] aepr; logic [4:0] used;
  logic [7:0] l0, l1; logic h0, h1; logic [3:0] e0, e1; logic [255:0] mapped;
  emc_rrt dut (.clk, .rst_n, .clear, .alloc, .alloc_cpr(acpr), .alloc_epr(aepr), .used, .full,
    .lk_cpr0(l0), .lk_hit0(h0), .lk_epr0(e0), .lk_cpr1(l1), .lk_hit1(h1), .lk_epr1(e1), .mapped);
  task automatic chk(input logic c, input string m); checks++; if (!c) begin failures++; $display("FAIL %s", m); end endtask
  initial begin
    clear = 0; alloc = 0; acpr = 0; l0 = 0; l1 = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // the document's example: C1->E0 and C9->E1 in the first cycle, then C12, C10, C16, C19
    @(negedge clk); alloc = 2'b11; acpr[0] = 8'd1; acpr[1] = 8'd9; #1;
    chk(aepr[0] == 0 && aepr[1] == 1, "two allocations in one cycle");
    foreach (acpr[k]) ;
    @(negedge clk); alloc = 2'b01; acpr[0] = 8'd12; #1; chk(aepr[0] == 2, "E2");
    @(negedge clk); acpr[0] = 8'd10; #1; chk(aepr[0] == 3, "E3");
    @(negedge clk); acpr[0] = 8'd16; #1; chk(aepr[0] == 4, "E4");
    @(negedge clk); acpr[0] = 8'd19; #1; chk(aepr[0] == 5, "E5");
    @(negedge clk); alloc = 0;
    l0 = 8'd12; l1 = 8'd19; #1;
    chk(h0 && e0 == 2 && h1 && e1 == 5, "lookup C12/C19");
    l0 = 8'd8; #1; chk(!h0, "C8 unmapped");
    chk(mapped == (256'(1) << 1 | 256'(1) << 9 | 256'(1) << 12 | 256'(1) << 10 | 256'(1) << 16 | 256'(1) << 19), "mapped vector");
    chk(used == 6 && !full, "count 6");
    for (int i = 0; i < 12; i++) begin @(negedge clk); alloc = 2'b01; acpr[0] = 8'(100 + i); end
    @(negedge clk); alloc = 0; #1;
    chk(full && used == 16, "saturates at 16");
    l0 = 8'd109; #1; chk(h0 && e0 == 15, "last EPR 15");
    l1 = 8'd110; #1; chk(!h1, "allocation beyond 16 dropped");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; #1;
    chk(used == 0 && mapped == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
