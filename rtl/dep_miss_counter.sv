// dep_miss_counter: the per-core predictor that decides whether a dependence
// chain is worth generating.
//
// A 3-bit saturating counter. It counts up when a resolved LLC miss had a
// dependent cache miss and down when it had none. Chain generation is enabled
// ("likely") while either of the two upper bits is set, i.e. the count is 2 or
// more. All of that follows the document. The reset value (0) and the rule
// that an increment and a decrement in the same cycle cancel are this
// design's choices. One update per cycle, output is a function of the state.
module dep_miss_counter #(
  parameter int unsigned W = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic inc,       // an LLC miss had a dependent LLC miss
  input  logic dec,       // an LLC miss had no dependent LLC miss
  output logic likely,    // either of the top two bits set
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else if (inc && !dec && count != {W{1'b1}}) count <= count + 1'b1;
    else if (dec && !inc && count != '0)        count <= count - 1'b1;
  end
  assign likely = count[W-1] | count[W-2];
endmodule
