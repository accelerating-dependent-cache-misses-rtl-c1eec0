// tb_emc_prf: random writes on the four write ports, reads on five ports,
// ready bits and clear, against a reference array.
module tb_emc_prf;
  import emc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear; logic [3:0] we; logic [3:0][3:0] wa; logic [3:0][63:0] wd;
  logic [4:0][3:0] ra; logic [4:0][63:0] rd; logic [4:0] rrdy; logic [15:0] ready;
  logic [63:0] m [16]; logic [15:0] mr;
  emc_prf #(.NW(4), .NR(5)) dut (.clk, .rst_n, .clear, .we, .wa, .wd, .ra, .rd, .rrdy, .ready);
  initial begin
    clear = 0; we = 0; wa = 0; wd = 0; ra = 0; mr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      for (int p = 0; p < 5; p++) ra[p] = 4'($urandom);
      #1;
      for (int p = 0; p < 5; p++) begin
        checks++;
        if (rrdy[p] != mr[ra[p]] || (mr[ra[p]] && rd[p] != m[ra[p]])) begin failures++; $display("FAIL r%0d", ra[p]); end
      end
      checks++; if (ready != mr) begin failures++; $display("FAIL ready"); end
      clear = (i % 97) == 50;
      if (clear) mr = 0;
      for (int p = 0; p < 4; p++) begin
        we[p] = $urandom_range(0, 3) == 0; wa[p] = 4'(p * 4 + $urandom_range(0, 3)); wd[p] = {$urandom, $urandom};
        if (we[p]) begin m[wa[p]] = wd[p]; mr[wa[p]] = 1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
