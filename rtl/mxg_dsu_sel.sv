// mxg_dsu_sel: Data Selection Unit selection logic for one operand stream.
//
// The scratchpad delivers whole 64-bit mu-vectors, but each computation cycle
// consumes n_take narrow elements (input-cluster size times the number of
// multipliers), which is generally not a divisor of the elements held by a
// mu-vector. This block keeps the unconsumed tail of the previous mu-vector in
// a hold register and, when the tail is shorter than n_take, appends the next
// mu-vector behind it with a barrel shift (hold | vec << rem*bw). The low end
// of that window holds the elements of this cycle, element e at bits
// [e*bw +: bw]; after the cycle the window is shifted right by n_take*bw and
// becomes the new tail. This is the mu-vector concatenation of the document;
// the window formulation is this design's own.
//
// Each reduction starts on a fresh mu-vector: on its last cycle (red_last) the
// tail, which then only holds zero padding, is discarded.
//
// Timing: need_vec and window are combinational from the state and vec_in;
// the state advances on the clock edge when fire is high. The caller pops the
// scratchpad when fire && need_vec.
//
// Lint note: rst_n drives the asynchronous reset of the flip-flops and also
// the `disable iff` of the assertions, which samples it on the clock; a lint
// tool may report that as a net used both synchronously and asynchronously.
// This is intended and has no effect on the circuit.
//
// Only the low 64 bits of the shifted window are kept: the tail can never
// hold more than one mu-vector of elements.
module mxg_dsu_sel #(
  parameter int unsigned VEC_W = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [3:0]         bw,        // element width
  input  logic [5:0]         epv,       // elements per mu-vector
  input  logic [4:0]         n_take,    // elements used this cycle
  input  logic               red_last,  // last cycle of the reduction
  input  logic               fire,      // this cycle is issued
  input  logic [VEC_W-1:0]   vec_in,    // scratchpad head
  output logic               need_vec,
  output logic [2*VEC_W-1:0] window
);
  logic [VEC_W-1:0] hold;
  logic [5:0]       rem;         // elements left in hold
  logic [2*VEC_W-1:0] shifted;

  assign need_vec = (6'(n_take) > rem);
  assign window   = {{VEC_W{1'b0}}, hold}
                  | (need_vec ? ({{VEC_W{1'b0}}, vec_in} << (8'(rem) * 8'(bw))) : '0);
  assign shifted  = window >> (8'(n_take) * 8'(bw));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= '0;
      rem  <= '0;
    end else if (clear) begin
      hold <= '0;
      rem  <= '0;
    end else if (fire) begin
      if (red_last) begin
        hold <= '0;
        rem  <= '0;
      end else begin
        hold <= shifted[VEC_W-1:0];
        rem  <= rem + (need_vec ? epv : 6'd0) - 6'(n_take);
      end
    end
  end

  // One mu-vector per cycle must be enough for the elements of the cycle.
  property p_one_vec_enough;
    @(posedge clk) disable iff (!rst_n) fire |-> (7'(n_take) <= 7'(rem) + 7'(epv));
  endproperty
  assert property (p_one_vec_enough);

endmodule
