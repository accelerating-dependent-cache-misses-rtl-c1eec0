// tb_livein_vector: shifts values in one and two at a time and checks their
// order and count, saturation at 16 entries, parallel load and clear.
module tb_livein_vector;
  import emc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear, s0, s1, ld; logic [63:0] d0, d1; logic [15:0][63:0] ldd, all; logic [4:0] ldc, cnt;
  logic [3:0] r0, r1; logic [63:0] q0, q1;
  logic [63:0] model [$];
  livein_vector dut (.clk, .rst_n, .clear, .sh0_vld(s0), .sh0_data(d0), .sh1_vld(s1), .sh1_data(d1),
    .ld_vld(ld), .ld_data(ldd), .ld_cnt(ldc), .rd_idx0(r0), .rd_data0(q0), .rd_idx1(r1), .rd_data1(q1),
    .all_data(all), .count(cnt));
  initial begin
    clear = 0; s0 = 0; s1 = 0; ld = 0; d0 = 0; d1 = 0; ldd = 0; ldc = 0; r0 = 0; r1 = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 14; i++) begin
      @(negedge clk);
      s0 = $urandom_range(0, 1); s1 = $urandom_range(0, 1);
      d0 = {$urandom, $urandom}; d1 = {$urandom, $urandom};
      if (s0 && model.size() < 16) model.push_back(d0);
      if (s1 && model.size() < 16) model.push_back(d1);
    end
    @(negedge clk); s0 = 0; s1 = 0;
    checks++; if (cnt != 5'(model.size())) begin failures++; $display("FAIL count %0d vs %0d", cnt, model.size()); end
    for (int i = 0; i < model.size(); i++) begin
      r0 = 4'(i); r1 = 4'(model.size() - 1 - i); #1;
      checks++;
      if (q0 != model[i] || q1 != model[model.size()-1-i] || all[i] != model[i]) begin failures++; $display("FAIL entry %0d", i); end
    end
    // fill to saturation
    repeat (12) begin @(negedge clk); s0 = 1; s1 = 1; d0 = 64'h1; d1 = 64'h2; end
    @(negedge clk); s0 = 0; s1 = 0;
    checks++; if (cnt != 16) begin failures++; $display("FAIL saturation %0d", cnt); end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++; if (cnt != 0) begin failures++; $display("FAIL clear"); end
    for (int i = 0; i < 16; i++) ldd[i] = 64'(i * 3 + 1);
    @(negedge clk); ld = 1; ldc = 5'd7; @(negedge clk); ld = 0;
    r0 = 4'd6; r1 = 4'd15; #1;
    checks++; if (cnt != 7 || q0 != 64'd19 || q1 != 64'd46) begin failures++; $display("FAIL load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
