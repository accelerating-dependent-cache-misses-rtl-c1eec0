// tb_emc_miss_pred: trains PC-hashed counters per core and checks the
// prediction against a reference array (miss predicted when counter > 3).
module tb_emc_miss_pred;
  import emc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] q_core, t_core; logic [7:0] q_pch, t_pch; logic q_miss, t_vld, t_miss;
  int model [4][256];
  emc_miss_pred dut (.clk, .rst_n, .q_core, .q_pch, .q_miss, .t_vld, .t_core, .t_pch, .t_llc_miss(t_miss));
  initial begin
    foreach (model[c, i]) model[c][i] = 0;
    t_vld = 0; t_core = 0; t_pch = 0; t_miss = 0; q_core = 0; q_pch = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // four misses on one PC of core 1 reach the threshold; core 2 unaffected
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); q_core = 1; q_pch = 8'h5a; #1;
      checks++; if (q_miss) begin failures++; $display("FAIL early miss %0d", i); end
      t_vld = 1; t_core = 1; t_pch = 8'h5a; t_miss = 1;
      @(negedge clk); t_vld = 0;
    end
    model[1][8'h5a] = 4;
    q_core = 1; q_pch = 8'h5a; #1; checks++; if (!q_miss) begin failures++; $display("FAIL no miss after training"); end
    q_core = 2; #1; checks++; if (q_miss) begin failures++; $display("FAIL core isolation"); end
    // random training
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      t_vld = $urandom_range(0, 1); t_core = 2'($urandom); t_pch = 8'($urandom_range(0, 15)); t_miss = $urandom_range(0, 2) != 0;
      q_core = 2'($urandom); q_pch = 8'($urandom_range(0, 15));
      #1;
      checks++;
      if (q_miss != (model[q_core][q_pch] > 3)) begin failures++; $display("FAIL pred c%0d p%0d", q_core, q_pch); end
      if (t_vld) begin
        if (t_miss && model[t_core][t_pch] < 7) model[t_core][t_pch]++;
        else if (!t_miss && model[t_core][t_pch] > 0) model[t_core][t_pch]--;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
