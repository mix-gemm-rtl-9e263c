// mxg_uengine: Mix-GEMM mu-engine, the mixed-precision GEMM unit that sits in
// the execution stage of a RISC-V core and reuses the core's multipliers.
//
// It computes the C mu-panel (mr x nr) of a GEMM whose operands are packed
// narrow integers (2 to 8 bits, any mix of widths and signedness) with binary
// segmentation: several narrow elements are packed cw bits apart into one
// 64-bit multiplier operand, so that one ordinary multiplication yields the
// inner product of ics element pairs in a slice of the product.
//
// Blocks and pipeline (one issued cycle per clock at best):
//   mxg_issue_arb   serialises the two mxg instructions a dual-issue core can
//                   issue together
//   mxg_sp_a/_b     input scratchpads with the hardware loops (put_a/put_b)
//   mxg_ctrl        configuration (set) and issue sequencing
//   mxg_dsu         selection (stage 1) and conversion to input-clusters
//                   (stage 2), NUM_MUL cluster pairs per cycle
//   processor multiplier(s), outside this module, MUL_LAT cycles
//   mxg_dfu x NUM_MUL  slice extraction, registered (stage F)
//   mxg_acc_sp      sums the NUM_MUL inner products and accumulates (get)
// Issue to accumulator write takes 3 + MUL_LAT clock edges.
//
// Instruction port: two issue slots {valid, op, rs1, rs2}; the core holds them
// while pair_stall is high. put_a/put_b write rs1 and rs2 as two mu-vectors;
// get returns slot rs1[7:0] of the C mu-panel, sign-extended, in rd; set loads
// the configuration {rs2, rs1} (layout in mxg_pkg) and waits until the engine
// has drained. Multiplier port: mul_a/mul_b are valid with mul_valid; the
// product of each pair must be on mul_res exactly MUL_LAT cycles later (only
// its low MUL_W bits are used).
//
// Defaults are the dual-issue design point (two multipliers, mr = nr = ku = 8:
// 512 B per input scratchpad, 256 B accumulators). NUM_MUL = 1 with
// MR = NR = KU = 4 gives the single-issue design point. Latch-based storage
// and clock gating of the document are not modelled; the memories are
// flip-flops.
//
// Lint note: rst_n drives the asynchronous reset of the flip-flops and also
// the `disable iff` of the assertions in the blocks below, which samples it
// on the clock; a lint tool may report that as a net used both synchronously
// and asynchronously.
// This is intended and has no effect on the circuit.
module mxg_uengine
  import mxg_pkg::*;
#(
  parameter int unsigned NUM_MUL = 2,
  parameter int unsigned MR      = 8,
  parameter int unsigned NR      = 8,
  parameter int unsigned KU      = 8,
  parameter int unsigned MUL_W   = 64,
  parameter int unsigned ACC_W   = 32,
  parameter int unsigned ICS_MAX = 7,
  parameter int unsigned MUL_LAT = 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // instruction issue slots
  input  logic [1:0]                      in_valid,
  input  mxg_op_e                         in_op  [2],
  input  logic [63:0]                     in_rs1 [2],
  input  logic [63:0]                     in_rs2 [2],
  output logic                            pair_stall,
  output logic [63:0]                     rd     [2],
  // processor multiplier(s)
  output logic                            mul_valid,
  output logic [NUM_MUL-1:0][MUL_W-1:0]   mul_a,
  output logic [NUM_MUL-1:0][MUL_W-1:0]   mul_b,
  input  logic [NUM_MUL-1:0][2*MUL_W-1:0] mul_res
);
  // ---------------- instruction port ----------------
  logic        i_valid, i_ready;
  mxg_op_e     i_op;
  logic [63:0] i_rs1, i_rs2, i_rd;

  mxg_issue_arb u_arb (
    .clk, .rst_n, .in_valid, .in_op, .in_rs1, .in_rs2, .pair_stall, .rd,
    .out_valid(i_valid), .out_op(i_op), .out_rs1(i_rs1), .out_rs2(i_rs2),
    .out_ready(i_ready), .out_rd(i_rd)
  );

  // ---------------- control ----------------
  mxg_cfg_t   cfg;
  logic [5:0] epv_a, epv_b;
  logic       clear, idle, fire, red_last, need_a, need_b, resv_set;
  logic [4:0] n_take;
  logic [7:0] resv_slot;
  mxg_meta_t  meta;
  logic [MR*NR-1:0] resv;
  logic       set_ready, set_fire;
  logic       pipe_busy, dsu_busy;

  // ---------------- scratchpads ----------------
  logic             a_wr_ready, b_wr_ready, a_valid, b_valid, a_empty, b_empty;
  logic             pop_a, pop_b;
  logic [VEC_W-1:0] a_data, b_data;

  // ---------------- accumulator ----------------
  logic             get_ready;
  logic [ACC_W-1:0] get_data;

  assign set_ready = a_empty && b_empty && idle && !pipe_busy;
  assign set_fire  = i_valid && (i_op == MXG_SET) && set_ready;

  always_comb begin
    case (i_op)
      MXG_SET:   i_ready = set_ready;
      MXG_PUT_A: i_ready = a_wr_ready;
      MXG_PUT_B: i_ready = b_wr_ready;
      default:   i_ready = get_ready;
    endcase
  end
  assign i_rd = 64'(signed'(get_data));

  mxg_ctrl #(.MR(MR), .NR(NR), .NUM_MUL(NUM_MUL)) u_ctrl (
    .clk, .rst_n, .set_fire, .set_data({i_rs2, i_rs1}), .clear, .idle, .cfg,
    .epv_a, .epv_b, .need_a, .need_b, .sp_a_valid(a_valid), .sp_b_valid(b_valid),
    .resv, .fire, .n_take, .red_last, .meta, .resv_set, .resv_slot
  );

  mxg_sp_a #(.MR(MR), .KU(KU), .VEC_W(VEC_W)) u_sp_a (
    .clk, .rst_n, .clear, .cfg_mr(cfg.mr), .cfg_nr(cfg.nr), .cfg_k(cfg.kua),
    .wr_valid(i_valid && (i_op == MXG_PUT_A)), .wr_data0(i_rs1), .wr_data1(i_rs2),
    .wr_ready(a_wr_ready), .rd_valid(a_valid), .rd_data(a_data), .rd_pop(pop_a),
    .empty(a_empty)
  );

  mxg_sp_b #(.NR(NR), .KU(KU), .VEC_W(VEC_W)) u_sp_b (
    .clk, .rst_n, .clear, .cfg_mr(cfg.mr), .cfg_k(cfg.kub),
    .wr_valid(i_valid && (i_op == MXG_PUT_B)), .wr_data0(i_rs1), .wr_data1(i_rs2),
    .wr_ready(b_wr_ready), .rd_valid(b_valid), .rd_data(b_data), .rd_pop(pop_b),
    .empty(b_empty)
  );

  // ---------------- data selection and conversion ----------------
  mxg_meta_t cl_meta;

  mxg_dsu #(.NUM_MUL(NUM_MUL), .MUL_W(MUL_W), .ICS_MAX(ICS_MAX)) u_dsu (
    .clk, .rst_n, .clear, .cfg, .epv_a, .epv_b, .fire, .n_take, .red_last,
    .meta_in(meta), .sp_a_data(a_data), .sp_b_data(b_data), .need_a, .need_b,
    .pop_a, .pop_b, .cl_a(mul_a), .cl_b(mul_b), .cl_meta, .busy(dsu_busy)
  );
  assign mul_valid = cl_meta.valid;

  // ---------------- multiplier latency ----------------
  mxg_meta_t mul_meta [MUL_LAT];
  logic [MUL_LAT-1:0] mul_busy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < MUL_LAT; s++) mul_meta[s] <= '0;
    end else begin
      mul_meta[0] <= cl_meta;
      for (int s = 1; s < MUL_LAT; s++) mul_meta[s] <= mul_meta[s-1];
    end
  end
  always_comb begin
    for (int s = 0; s < MUL_LAT; s++) mul_busy[s] = mul_meta[s].valid;
  end

  // ---------------- filtering ----------------
  logic [NUM_MUL-1:0][ACC_W-1:0] dfu_ip, f_ip;
  mxg_meta_t f_meta;

  for (genvar m = 0; m < NUM_MUL; m++) begin : g_dfu
    mxg_dfu #(.MUL_W(MUL_W), .ACC_W(ACC_W)) u_dfu (
      .prod(mul_res[m]), .slice_lsb(cfg.slice_lsb), .cw(cfg.cw),
      .sgn(cfg.sgn_a || cfg.sgn_b), .ip(dfu_ip[m])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_meta <= '0;
      f_ip   <= '0;
    end else begin
      f_meta <= mul_meta[MUL_LAT-1];
      if (mul_meta[MUL_LAT-1].valid) f_ip <= dfu_ip;
    end
  end

  assign pipe_busy = dsu_busy || (mul_busy != '0) || f_meta.valid;

  // ---------------- accumulation ----------------
  mxg_acc_sp #(.MR(MR), .NR(NR), .NUM_MUL(NUM_MUL), .ACC_W(ACC_W)) u_acc (
    .clk, .rst_n, .in_meta(f_meta), .in_ip(f_ip), .resv_set, .resv_slot, .resv,
    .get_valid(i_valid && (i_op == MXG_GET)), .get_idx(i_rs1[7:0]),
    .get_ready, .get_data
  );

endmodule
