// mxg_dsu: Data Selection Unit, from scratchpad heads to input-clusters.
//
// Two pipeline stages, matching the first two steps of binary segmentation:
//   stage 1 (select): one mxg_dsu_sel per operand forms the element window of
//            the cycle from its hold register and, if needed, the next
//            scratchpad mu-vector; the windows are registered with the number
//            of valid elements and the cycle's bookkeeping.
//   stage 2 (convert): NUM_MUL pairs of DCUs pad, sign-extend and pack the
//            elements into input-clusters. Multiplier m uses elements
//            [m*ics, (m+1)*ics) of the window, so the dual-issue version works
//            on two consecutive sub-mu-vectors per cycle. The clusters are
//            registered and drive the processor multipliers.
// The selection logic is shared by the multipliers and the DCUs are
// replicated, as in the dual-issue organisation of the document.
//
// Interface: fire/n_take/red_last/meta come from the control unit in the issue
// cycle; pop_a/pop_b go to the scratchpads in that same cycle. The clusters
// and cl_meta appear two clock edges after fire. No stall inside: once issued,
// a cycle always completes.
//
// Lint note: rst_n drives the asynchronous reset of the flip-flops and also
// the `disable iff` of the assertions in the blocks below, which samples it
// on the clock; a lint tool may report that as a net used both synchronously
// and asynchronously.
// This is intended and has no effect on the circuit.
//
// Only the width, signedness, ics and cw fields of the configuration are
// used here; the rest of the port is unused.
module mxg_dsu
  import mxg_pkg::*;
#(
  parameter int unsigned NUM_MUL = 2,
  parameter int unsigned MUL_W   = 64,
  parameter int unsigned ICS_MAX = 7
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  mxg_cfg_t                      cfg,
  input  logic [5:0]                    epv_a,
  input  logic [5:0]                    epv_b,
  input  logic                          fire,
  input  logic [4:0]                    n_take,
  input  logic                          red_last,
  input  mxg_meta_t                     meta_in,
  input  logic [VEC_W-1:0]              sp_a_data,
  input  logic [VEC_W-1:0]              sp_b_data,
  output logic                          need_a,
  output logic                          need_b,
  output logic                          pop_a,
  output logic                          pop_b,
  output logic [NUM_MUL-1:0][MUL_W-1:0] cl_a,
  output logic [NUM_MUL-1:0][MUL_W-1:0] cl_b,
  output mxg_meta_t                     cl_meta,
  output logic                          busy
);
  logic [2*VEC_W-1:0] win_a, win_b;
  logic [2*VEC_W-1:0] e_win_a, e_win_b;
  logic [4:0]         e_nvalid;
  mxg_meta_t          e_meta;
  logic [NUM_MUL-1:0][MUL_W-1:0] dcu_a, dcu_b;

  mxg_dsu_sel #(.VEC_W(VEC_W)) u_sel_a (
    .clk, .rst_n, .clear, .bw(cfg.bw_a), .epv(epv_a), .n_take, .red_last, .fire,
    .vec_in(sp_a_data), .need_vec(need_a), .window(win_a)
  );
  mxg_dsu_sel #(.VEC_W(VEC_W)) u_sel_b (
    .clk, .rst_n, .clear, .bw(cfg.bw_b), .epv(epv_b), .n_take, .red_last, .fire,
    .vec_in(sp_b_data), .need_vec(need_b), .window(win_b)
  );

  assign pop_a = fire && need_a;
  assign pop_b = fire && need_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_win_a  <= '0;
      e_win_b  <= '0;
      e_nvalid <= '0;
      e_meta   <= '0;
    end else begin
      e_meta <= meta_in;
      if (fire) begin
        e_win_a  <= win_a;
        e_win_b  <= win_b;
        e_nvalid <= n_take;
      end
    end
  end

  for (genvar m = 0; m < NUM_MUL; m++) begin : g_dcu
    mxg_dcu #(.VEC_W(VEC_W), .MUL_W(MUL_W), .ICS_MAX(ICS_MAX), .REVERSE(1'b0)) u_dcu_a (
      .window(e_win_a), .base(5'(m) * 5'(cfg.ics)), .n_valid(e_nvalid), .ics(cfg.ics),
      .cw(cfg.cw), .bw(cfg.bw_a), .sgn(cfg.sgn_a), .cluster(dcu_a[m])
    );
    mxg_dcu #(.VEC_W(VEC_W), .MUL_W(MUL_W), .ICS_MAX(ICS_MAX), .REVERSE(1'b1)) u_dcu_b (
      .window(e_win_b), .base(5'(m) * 5'(cfg.ics)), .n_valid(e_nvalid), .ics(cfg.ics),
      .cw(cfg.cw), .bw(cfg.bw_b), .sgn(cfg.sgn_b), .cluster(dcu_b[m])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cl_a    <= '0;
      cl_b    <= '0;
      cl_meta <= '0;
    end else begin
      cl_meta <= e_meta;
      if (e_meta.valid) begin
        cl_a <= dcu_a;
        cl_b <= dcu_b;
      end
    end
  end

  assign busy = e_meta.valid || cl_meta.valid;

endmodule
