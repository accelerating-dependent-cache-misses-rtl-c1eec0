// tb_dep_miss_counter: random increments/decrements against a reference
// saturating counter; checks the count and the "likely" output (count >= 2).
module tb_dep_miss_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic inc, dec, likely; logic [2:0] count;
  int model;
  dep_miss_counter #(.W(3)) dut (.clk, .rst_n, .inc, .dec, .likely, .count);
  initial begin
    inc = 0; dec = 0; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // saturate high, then low, then random
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      checks++;
      if (count != 3'(model) || likely != (model >= 2)) begin
        failures++; $display("FAIL i=%0d count=%0d model=%0d likely=%b", i, count, model, likely);
      end
      if (i < 12)       begin inc = 1; dec = 0; end
      else if (i < 24)  begin inc = 0; dec = 1; end
      else begin inc = $urandom_range(0, 1); dec = $urandom_range(0, 1); end
      if (inc && !dec && model < 7) model++;
      else if (dec && !inc && model > 0) model--;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
