// tb_emc_dcache: fills lines, reads words back with the two-cycle latency,
// fills a fifth line into one set to check FIFO replacement, invalidates a
// line, and checks that a fill blocks a request in the same cycle.
module tb_emc_dcache;
  import emc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic req_vld, req_rdy, rsp_vld, rsp_hit, fill_vld, inv_vld;
  logic [PA_W-1:0] req_paddr; logic [7:0] req_tag, rsp_tag; logic [63:0] rsp_data;
  logic [LADDR_W-1:0] fill_laddr, inv_laddr; logic [LINE_W-1:0] fill_data;
  emc_dcache dut (.clk, .rst_n, .req_vld, .req_rdy, .req_paddr, .req_tag, .rsp_vld, .rsp_hit, .rsp_data, .rsp_tag,
    .fill_vld, .fill_laddr, .fill_data, .inv_vld, .inv_laddr);
  task automatic chk(input logic c, input string m); checks++; if (!c) begin failures++; $display("FAIL %s", m); end endtask

  function automatic logic [63:0] word_of(logic [LADDR_W-1:0] la, int w);
    return {la[31:0] ^ 32'h5a5a0000, 32'(w) * 32'h1111};
  endfunction
  task automatic fill(input logic [LADDR_W-1:0] la);
    @(negedge clk); fill_vld = 1; fill_laddr = la;
    for (int w = 0; w < 8; w++) fill_data[w*64 +: 64] = word_of(la, w);
    @(negedge clk); fill_vld = 0;
  endtask
  task automatic rd(input logic [LADDR_W-1:0] la, input int w, input logic exp_hit);
    @(negedge clk); req_vld = 1; req_paddr = {la, 3'(w), 3'b000}; req_tag = 8'(w + 16 * exp_hit); #1;
    chk(req_rdy, "port ready");
    @(negedge clk); req_vld = 0; #1; chk(!rsp_vld, "no response after one cycle");
    @(negedge clk); #1;
    chk(rsp_vld && rsp_hit == exp_hit && rsp_tag == 8'(w + 16 * exp_hit) && (!exp_hit || rsp_data == word_of(la, w)),
        $sformatf("read line %h word %0d", la, w));
  endtask

  initial begin
    req_vld = 0; fill_vld = 0; inv_vld = 0; req_paddr = 0; req_tag = 0; fill_laddr = 0; inv_laddr = 0; fill_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    rd(34'h100, 0, 0);
    // five lines mapping to set 3
    for (int i = 0; i < 5; i++) fill(LADDR_W'(i * 16 + 3));
    rd(LADDR_W'(3), 2, 0);            // the first line was replaced
    for (int i = 1; i < 5; i++) rd(LADDR_W'(i * 16 + 3), i, 1);
    fill(LADDR_W'(16 + 3));            // refill of a resident line does not replace another
    rd(LADDR_W'(32 + 3), 7, 1);
    @(negedge clk); inv_vld = 1; inv_laddr = LADDR_W'(32 + 3); @(negedge clk); inv_vld = 0;
    rd(LADDR_W'(32 + 3), 7, 0);
    rd(LADDR_W'(48 + 3), 5, 1);
    // single port: a fill blocks a request
    @(negedge clk); fill_vld = 1; fill_laddr = 34'h777; req_vld = 1; #1;
    chk(!req_rdy, "fill takes the port");
    @(negedge clk); fill_vld = 0; req_vld = 0;
    repeat (2) @(negedge clk); #1; chk(!rsp_vld, "blocked request not answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
