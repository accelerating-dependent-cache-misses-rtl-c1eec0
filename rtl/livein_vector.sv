// livein_vector: the live-in source vector.
//
// A shift register of input values for a dependence chain. At the core, the
// chain generator shifts in up to two values per cycle (data of ready core
// registers and immediates); entry k is the k-th value shifted in, so the
// chain names it as live-in Lk. At the EMC the whole vector is loaded at
// once with the chain and then read by index at dispatch. The shift-register
// behaviour and the 16 entries follow the document; the two-per-cycle shift,
// the parallel load and the occupancy count are this design's choices.
// Writes take effect on the clock edge; reads are combinational.
module livein_vector
  import emc_pkg::*;
#(
  parameter int unsigned N = NLIVEIN
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  // shift in up to two values, sh0 before sh1
  input  logic                        sh0_vld,
  input  logic [XLEN-1:0]             sh0_data,
  input  logic                        sh1_vld,
  input  logic [XLEN-1:0]             sh1_data,
  // parallel load
  input  logic                        ld_vld,
  input  logic [N-1:0][XLEN-1:0]      ld_data,
  input  logic [$clog2(N+1)-1:0]      ld_cnt,
  // read
  input  logic [$clog2(N)-1:0]        rd_idx0,
  output logic [XLEN-1:0]             rd_data0,
  input  logic [$clog2(N)-1:0]        rd_idx1,
  output logic [XLEN-1:0]             rd_data1,
  output logic [N-1:0][XLEN-1:0]      all_data,
  output logic [$clog2(N+1)-1:0]      count
);
  localparam int unsigned CW = $clog2(N+1);
  logic [N-1:0][XLEN-1:0] v;

  // Entry 0 is the oldest value: shifting in moves everything one place up
  // from the tail end, expressed here by writing at the current count.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v     <= '0;
      count <= '0;
    end else if (clear) begin
      count <= '0;
    end else if (ld_vld) begin
      v     <= ld_data;
      count <= ld_cnt;
    end else begin
      if (sh0_vld && sh1_vld) begin
        if (32'(count) < N)     v[count]        <= sh0_data;
        if (32'(count) + 1 < N) v[count + 1'b1] <= sh1_data;
        count <= (32'(count) + 2 > N) ? CW'(N) : count + CW'(2);
      end else if (sh0_vld || sh1_vld) begin
        if (32'(count) < N) v[count] <= sh0_vld ? sh0_data : sh1_data;
        count <= (32'(count) + 1 > N) ? CW'(N) : count + CW'(1);
      end
    end
  end

  assign rd_data0 = v[rd_idx0];
  assign rd_data1 = v[rd_idx1];
  assign all_data = v;
endmodule
