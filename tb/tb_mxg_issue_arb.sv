// tb_mxg_issue_arb: checks the dual-issue instruction serialiser.
//
// Random single instructions and pairs are offered while a model engine
// accepts at random (or always, in the first phase). Checks: every
// instruction reaches the engine exactly once and in program order (slot 0
// before slot 1); with an always-ready engine a pair takes exactly two cycles
// (one stall cycle) and a single instruction one; the result seen in rd[k]
// when the pair completes is the engine's answer to slot k's instruction.
module tb_mxg_issue_arb;
  import mxg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]  in_valid;
  mxg_op_e     in_op  [2];
  logic [63:0] in_rs1 [2];
  logic [63:0] in_rs2 [2];
  logic        pair_stall;
  logic [63:0] rd [2];
  logic        out_valid, out_ready;
  mxg_op_e     out_op;
  logic [63:0] out_rs1, out_rs2, out_rd;

  mxg_issue_arb dut (.clk, .rst_n, .in_valid, .in_op, .in_rs1, .in_rs2, .pair_stall, .rd,
                     .out_valid, .out_op, .out_rs1, .out_rs2, .out_ready, .out_rd);

  assign out_rd = out_rs1 ^ 64'hA5A5_0000_0000_5A5A;

  int checks = 0, failures = 0;
  logic [63:0] seen[$];
  bit always_ready = 1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) seen.push_back(out_rs1);
  always @(posedge clk) #2 out_ready = always_ready ? 1'b1 : 1'($urandom_range(0, 2) != 0);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    logic [63:0] id;
    int cyc;
    bit two;
    id = 64'd100;
    in_valid = '0;
    out_ready = 1'b1;
    for (int s = 0; s < 2; s++) begin in_op[s] = MXG_GET; in_rs1[s] = '0; in_rs2[s] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      if (n == 300) always_ready = 0;
      two = 1'($urandom_range(0, 1));
      seen.delete();
      in_valid = {two, 1'b1};
      in_op[0] = mxg_op_e'($urandom_range(0, 3)); in_rs1[0] = id;
      in_op[1] = mxg_op_e'($urandom_range(0, 3)); in_rs1[1] = id + 1;
      cyc = 1;
      @(negedge clk);
      while (pair_stall) begin cyc++; @(negedge clk); end
      chk("rd slot 0", rd[0], id ^ 64'hA5A5_0000_0000_5A5A);
      if (two) chk("rd slot 1", rd[1], (id + 1) ^ 64'hA5A5_0000_0000_5A5A);
      @(posedge clk); #1;
      in_valid = '0;
      chk("instructions passed", seen.size(), two ? 2 : 1);
      if (seen.size() > 0) chk("order slot 0", seen[0], id);
      if (two && seen.size() > 1) chk("order slot 1", seen[1], id + 1);
      if (always_ready) chk("cycles", cyc, two ? 2 : 1);
      id += 2;
      if ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
