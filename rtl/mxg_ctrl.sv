// mxg_ctrl: Control Unit of the mu-engine.
//
// Holds the configuration written by mxg.set (one set per GEMM, so changing
// data sizes between layers costs one instruction) and derives from it:
//   epv_a/epv_b  elements per mu-vector of each operand, floor(64/bw)
//   K            elements per reduction, min(kua*epv_a, kub*epv_b); the longer
//                operand's surplus is zero padding
//   n_take       elements consumed per cycle, NUM_MUL*ics, less on the last
//                cycle of a reduction
// It then sequences the computation: reductions run row by row of the C
// mu-panel within a column (row inner, column outer, slot = row + col*mr),
// matching the hardware loops of the two input scratchpads, and the whole
// mr x nr sweep repeats for n_ctx contexts that accumulate into the same
// slots. A cycle is issued (fire) when every operand that needs a new
// mu-vector has one at its scratchpad head and, for the first cycle of a
// reduction of the first context, the target slot has been read out.
//
// Cycles per reduction are ceil(K / (NUM_MUL*ics)), e.g. 11, 10 and 8 for
// a8-w8, a8-w6 and a6-w4 with one multiplier. The sequencing order and the
// slot handshake are this design's reading of the document; the formulas for
// K and n_take follow from its packing rules.
//
// Lint note: rst_n drives the asynchronous reset of the flip-flops and also
// the `disable iff` of the assertions, which samples it on the clock; a lint
// tool may report that as a net used both synchronously and asynchronously.
// This is intended and has no effect on the circuit.
module mxg_ctrl
  import mxg_pkg::*;
#(
  parameter int unsigned MR      = 8,
  parameter int unsigned NR      = 8,
  parameter int unsigned NUM_MUL = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // mxg.set
  input  logic              set_fire,
  input  logic [127:0]      set_data,      // {rs2, rs1}
  output logic              clear,
  output logic              idle,          // no reduction half-issued
  output mxg_cfg_t          cfg,
  output logic [5:0]        epv_a,
  output logic [5:0]        epv_b,
  // operand availability
  input  logic              need_a,
  input  logic              need_b,
  input  logic              sp_a_valid,
  input  logic              sp_b_valid,
  input  logic [MR*NR-1:0]  resv,
  // issue
  output logic              fire,
  output logic [4:0]        n_take,
  output logic              red_last,
  output mxg_meta_t         meta,
  output logic              resv_set,
  output logic [7:0]        resv_slot
);
  logic        configured;
  logic [15:0] kpos;
  logic [7:0]  row, col;
  logic [15:0] ctx;

  logic [15:0] k_len, ka_el, kb_el, remain;
  logic [4:0]  step;
  logic [7:0]  slot;
  logic        slot_free;

  assign epv_a  = elems_per_vec(cfg.bw_a);
  assign epv_b  = elems_per_vec(cfg.bw_b);
  assign ka_el  = 16'(cfg.kua) * 16'(epv_a);
  assign kb_el  = 16'(cfg.kub) * 16'(epv_b);
  assign k_len  = (ka_el < kb_el) ? ka_el : kb_el;
  assign step   = 5'(NUM_MUL) * 5'(cfg.ics);
  assign remain = k_len - kpos;
  assign n_take = (remain < 16'(step)) ? 5'(remain) : step;
  assign red_last = (remain <= 16'(step));
  assign slot   = row + 8'(col * cfg.mr);

  assign slot_free = !((kpos == 16'd0) && (ctx == 16'd0) && resv[$clog2(MR*NR)'(slot)]);
  assign fire = configured && !set_fire && slot_free
             && (!need_a || sp_a_valid) && (!need_b || sp_b_valid);

  assign meta.valid = fire;
  assign meta.slot  = slot;
  assign meta.first = (kpos == 16'd0);
  assign meta.ctx0  = (ctx == 16'd0);
  assign meta.fin   = red_last && (ctx == cfg.n_ctx - 16'd1);

  assign resv_set  = fire && meta.fin;
  assign resv_slot = slot;
  assign clear     = set_fire;
  assign idle      = (kpos == 16'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg        <= '0;
      configured <= 1'b0;
      kpos       <= '0;
      row        <= '0;
      col        <= '0;
      ctx        <= '0;
    end else if (set_fire) begin
      cfg        <= mxg_cfg_t'(set_data);
      configured <= 1'b1;
      kpos       <= '0;
      row        <= '0;
      col        <= '0;
      ctx        <= '0;
    end else if (fire) begin
      if (red_last) begin
        kpos <= '0;
        if (row == cfg.mr - 8'd1) begin
          row <= '0;
          if (col == cfg.nr - 8'd1) begin
            col <= '0;
            ctx <= (ctx == cfg.n_ctx - 16'd1) ? 16'd0 : ctx + 16'd1;
          end else begin
            col <= col + 8'd1;
          end
        end else begin
          row <= row + 8'd1;
        end
      end else begin
        kpos <= kpos + 16'(n_take);
      end
    end
  end

  // The configuration must fit the scratchpads.
  property p_cfg_fits;
    @(posedge clk) disable iff (!rst_n)
      configured |-> (cfg.mr <= 8'(MR) && cfg.nr <= 8'(NR) && cfg.ics != 4'd0);
  endproperty
  assert property (p_cfg_fits);

endmodule
