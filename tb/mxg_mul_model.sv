// mxg_mul_model: behavioural stand-in for the host core's integer
// multiplier(s), as used by the mu-engine testbenches.
//
// NUM_MUL independent signed MUL_W x MUL_W multipliers giving the full
// 2*MUL_W-bit product, registered LAT times, so a product appears on res
// exactly LAT clock edges after its operands. A real core's multiplier would
// also serve ordinary mul instructions; that sharing is not modelled.
module mxg_mul_model #(
  parameter int unsigned NUM_MUL = 2,
  parameter int unsigned MUL_W   = 64,
  parameter int unsigned LAT     = 1
) (
  input  logic                            clk,
  input  logic [NUM_MUL-1:0][MUL_W-1:0]   a,
  input  logic [NUM_MUL-1:0][MUL_W-1:0]   b,
  output logic [NUM_MUL-1:0][2*MUL_W-1:0] res
);
  logic [NUM_MUL-1:0][2*MUL_W-1:0] pipe [LAT];
  logic [NUM_MUL-1:0][2*MUL_W-1:0] prod;

  always_comb begin
    for (int m = 0; m < NUM_MUL; m++)
      prod[m] = (2*MUL_W)'($signed({{MUL_W{a[m][MUL_W-1]}}, a[m]}) * $signed({{MUL_W{b[m][MUL_W-1]}}, b[m]}));
  end

  always_ff @(posedge clk) begin
    pipe[0] <= prod;
    for (int s = 1; s < LAT; s++) pipe[s] <= pipe[s-1];
  end
  assign res = pipe[LAT-1];
endmodule
