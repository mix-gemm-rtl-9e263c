// mxg_issue_arb: one-instruction-per-cycle port for a dual-issue pipeline.
//
// The dual-issue core can issue two mxg instructions in the same cycle, but
// the mu-engine accepts one per cycle. When both issue slots hold an mxg
// instruction, slot 0 (the older) is passed first and the pair is stalled;
// slot 1 follows in the next cycle. The pair also stays stalled while the
// engine itself refuses the instruction (full scratchpad on a put, result not
// ready on a get, engine busy on a set).
//
// Interface: in_valid[k]/in_op[k]/in_rs1[k]/in_rs2[k] describe the mxg
// instruction of issue slot k and are held by the core while pair_stall is
// high. out_* is the single engine port (accepted when out_valid &&
// out_ready). rd[k] is the get result of slot k, valid in the cycle the pair
// completes (pair_stall low); a slot-0 result obtained earlier is held.
// The hold-and-serialise scheme is this design's reading of the document.
module mxg_issue_arb
  import mxg_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       in_valid,
  input  mxg_op_e          in_op  [2],
  input  logic [63:0]      in_rs1 [2],
  input  logic [63:0]      in_rs2 [2],
  output logic             pair_stall,
  output logic [63:0]      rd     [2],
  output logic             out_valid,
  output mxg_op_e          out_op,
  output logic [63:0]      out_rs1,
  output logic [63:0]      out_rs2,
  input  logic             out_ready,
  input  logic [63:0]      out_rd
);
  logic        s0_served;
  logic [63:0] rd0_hold;
  logic        grant1;     // slot 1 is presented to the engine
  logic        acc;
  logic        done0, done1;

  assign grant1    = !(in_valid[0] && !s0_served);
  assign out_valid = grant1 ? in_valid[1] : 1'b1;
  assign out_op    = grant1 ? in_op[1]  : in_op[0];
  assign out_rs1   = grant1 ? in_rs1[1] : in_rs1[0];
  assign out_rs2   = grant1 ? in_rs2[1] : in_rs2[0];
  assign acc       = out_valid && out_ready;

  assign done0 = !in_valid[0] || s0_served || (!grant1 && acc);
  assign done1 = !in_valid[1] || (grant1 && acc);
  assign pair_stall = (in_valid != 2'b00) && !(done0 && done1);

  assign rd[0] = (!grant1 && acc) ? out_rd : rd0_hold;
  assign rd[1] = out_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_served <= 1'b0;
      rd0_hold  <= '0;
    end else begin
      if (!grant1 && acc) rd0_hold <= out_rd;
      s0_served <= pair_stall && (s0_served || (!grant1 && acc));
    end
  end

endmodule
