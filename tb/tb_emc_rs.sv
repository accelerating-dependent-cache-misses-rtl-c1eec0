// tb_emc_rs: inserts uops whose sources wait on random tags, broadcasts the
// tags, and checks that each uop issues exactly once, never before all its
// sources were broadcast, at most two per cycle, one cycle after its last
// wakeup when the station is otherwise idle, and that a flush removes only
// the flushed context's uops.
module tb_emc_rs;
  import emc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] ins_vld, iss_vld; rs_ent_t [1:0] ins_ent, iss_ent; logic [3:0] n_free;
  logic [2:0] wb_vld; tag_t [2:0] wb_tag; logic flush; logic [0:0] flush_ctx;
  emc_rs dut (.clk, .rst_n, .ins_vld, .ins_ent, .n_free, .wb_vld, .wb_tag, .iss_vld, .iss_ent, .flush, .flush_ctx);
  task automatic chk(input logic c, input string m); checks++; if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end endtask

  logic [31:0] bcast [2];   // tags broadcast so far, per context (bit per EPR)
  int issued [256];
  int n_ins, n_iss;

  function automatic rs_ent_t mk(int id, int ctx, int t1, int t2);
    rs_ent_t e;
    e = '0; e.ctx = 1'(ctx); e.rob = 8'(id); e.op = OP_ADD;
    e.s1 = '{vld: 1'b1, li: 1'b0, idx: 4'(t1)}; e.s2 = '{vld: 1'b1, li: (t2 < 0), idx: 4'(t2 < 0 ? 0 : t2)};
    e.s1_rdy = 1'b0; e.s2_rdy = (t2 < 0);
    return e;
  endfunction

  // monitor issues
  always @(negedge clk) if (rst_n) begin
    chk(!(iss_vld[1] && !iss_vld[0]), "slot 1 without slot 0");
    for (int k = 0; k < 2; k++) if (iss_vld[k]) begin
      rs_ent_t e; e = iss_ent[k];
      chk(bcast[e.ctx][e.s1.idx] && (e.s2.li || bcast[e.ctx][e.s2.idx]), "issued before wakeup");
      issued[e.rob]++; n_iss++;
    end
  end

  initial begin
    ins_vld = 0; ins_ent = '0; wb_vld = 0; wb_tag = '0; flush = 0; flush_ctx = 0;
    bcast[0] = 0; bcast[1] = 0; n_ins = 0; n_iss = 0;
    foreach (issued[i]) issued[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // latency: one uop, one tag
    @(negedge clk); ins_vld = 2'b01; ins_ent[0] = mk(200, 0, 3, -1);
    @(negedge clk); ins_vld = 0;
    @(negedge clk); wb_vld = 3'b001; wb_tag[0] = '{ctx: 1'b0, epr: 4'd3}; bcast[0][3] = 1;
    @(negedge clk); wb_vld = 0; #1;
    chk(iss_vld[0] && iss_ent[0].rob == 200, "issues the cycle after its wakeup");
    @(negedge clk); bcast[0] = 0;
    // random traffic
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      ins_vld = 0; wb_vld = 0;
      if (n_ins < 120) begin
        for (int k = 0; k < 2; k++)
          if ($urandom_range(0, 1) && n_free > 4'(k)) begin
            ins_vld[k] = 1; ins_ent[k] = mk(n_ins, $urandom_range(0, 1), $urandom_range(0, 15), $urandom_range(0, 3) == 0 ? -1 : $urandom_range(0, 15));
            n_ins++;
          end
        if (ins_vld == 2'b10) begin ins_vld = 2'b01; ins_ent[0] = ins_ent[1]; end
      end
      // tags are broadcast randomly; each tag once per round of 16 cycles
      for (int p = 0; p < 3; p++) if ($urandom_range(0, 2) == 0) begin
        int c, t; c = $urandom_range(0, 1); t = $urandom_range(0, 15);
        wb_vld[p] = 1; wb_tag[p] = '{ctx: 1'(c), epr: 4'(t)}; bcast[c][t] = 1;
      end
    end
    // broadcast everything to drain
    for (int t = 0; t < 16; t++) begin
      @(negedge clk); wb_vld = 3'b011; wb_tag[0] = '{ctx: 1'b0, epr: 4'(t)}; wb_tag[1] = '{ctx: 1'b1, epr: 4'(t)};
      bcast[0][t] = 1; bcast[1][t] = 1; ins_vld = 0;
    end
    @(negedge clk); wb_vld = 0;
    repeat (10) @(negedge clk);
    chk(n_iss == n_ins + 1 && n_free == 8, "all uops issued");
    for (int i = 0; i < n_ins; i++) chk(issued[i] == 1, "issued exactly once");
    // flush: ctx0 and ctx1 uops waiting, flush ctx1
    @(negedge clk); ins_vld = 2'b11; ins_ent[0] = mk(210, 0, 15, -1); ins_ent[1] = mk(211, 1, 15, -1);
    bcast[0][15] = 0; bcast[1][15] = 0;
    @(negedge clk); ins_vld = 0; flush = 1; flush_ctx = 1;
    @(negedge clk); flush = 0;
    wb_vld = 3'b011; wb_tag[0] = '{ctx: 1'b0, epr: 4'd15}; wb_tag[1] = '{ctx: 1'b1, epr: 4'd15}; bcast[0][15] = 1; bcast[1][15] = 1;
    @(negedge clk); wb_vld = 0;
    repeat (3) @(negedge clk);
    chk(issued[210] == 1 && issued[211] == 0 && n_free == 8, "flush removes only its context");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
