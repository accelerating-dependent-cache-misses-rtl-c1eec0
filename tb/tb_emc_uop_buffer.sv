// tb_emc_uop_buffer: loads a chain and reads it back in order at random
// rates of 0..2 uops per cycle.
module tb_emc_uop_buffer;
  import emc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic load, v0, v1, empty; euop_t [15:0] uops; euop_t h0, h1; logic [4:0] cnt, start; logic [1:0] adv;
  emc_uop_buffer dut (.clk, .rst_n, .load, .load_uops(uops), .load_cnt(cnt), .load_start(start),
    .head0(h0), .head1(h1), .vld0(v0), .vld1(v1), .advance(adv), .empty);
  initial begin
    int rd;
    load = 0; adv = 0; cnt = 0; start = 0;
    for (int i = 0; i < 16; i++) begin uops[i] = '0; uops[i].rob = 8'(i * 7 + 3); uops[i].dst = 4'(i); end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      @(negedge clk); load = 1; cnt = 5'($urandom_range(1, 16)); start = 5'(t % 2);
      @(negedge clk); load = 0;
      rd = int'(start);
      while (rd < int'(cnt)) begin
        #1;
        checks++;
        if (!v0 || h0.rob != uops[rd].rob || v1 != (rd + 1 < int'(cnt)) || (v1 && h1.rob != uops[rd+1].rob)) begin
          failures++; $display("FAIL rd=%0d", rd);
        end
        adv = 2'($urandom_range(0, v1 ? 2 : 1));
        rd += int'(adv);
        @(negedge clk); adv = 0;
      end
      #1; checks++; if (!empty) begin failures++; $display("FAIL not empty"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
