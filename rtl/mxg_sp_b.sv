// mxg_sp_b: input scratchpad for the B operand, with its hardware loop.
//
// mxg.put_b writes up to two 64-bit mu-vectors per cycle: column 0 of the B
// mu-panel (kub vectors along the reduction dimension), then column 1, up to
// column nr-1. As for A, the dummy second word of a put that completes an odd
// column is dropped.
//
// Read side (hardware loop): the pointer first advances along the reduction
// dimension of one column (kub vectors). At the last of them it jumps back by
// kub-1 positions, so the same column is read again, once for every row of A
// (mr times). After the mr-th reading it moves on by +1 to the next column and
// the kub words of the finished column are freed, so the next context can be
// written while the current one is still computing.
//
// Storage is a circular buffer of DEPTH = NR*KU words, flip-flops in this RTL
// (latches in the document). Read data is combinational; rd_pop consumes the
// word at the clock edge. wr_ready low stalls the put.
//
// Lint note: rst_n drives the asynchronous reset of the flip-flops and also
// the `disable iff` of the assertions, which samples it on the clock; a lint
// tool may report that as a net used both synchronously and asynchronously.
// This is intended and has no effect on the circuit.
module mxg_sp_b #(
  parameter int unsigned NR    = 8,
  parameter int unsigned KU    = 8,
  parameter int unsigned VEC_W = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,      // mxg.set: restart the loop, drop contents
  input  logic [7:0]       cfg_mr,
  input  logic [7:0]       cfg_k,      // kub
  // write port (mxg.put_b)
  input  logic             wr_valid,
  input  logic [VEC_W-1:0] wr_data0,
  input  logic [VEC_W-1:0] wr_data1,
  output logic             wr_ready,
  // read port (DSU)
  output logic             rd_valid,
  output logic [VEC_W-1:0] rd_data,
  input  logic             rd_pop,
  output logic             empty
);
  localparam int unsigned DEPTH = NR * KU;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic [VEC_W-1:0] mem [DEPTH];

  logic [AW-1:0] wr_ptr, base;
  logic [CW-1:0] count;
  logic [7:0]    wk;          // write position inside the current column
  logic [7:0]    k;           // read position inside the column
  logic [7:0]    rep;         // how many times this column has been read

  logic [1:0]  n_wr;
  logic        do_wr, col_done;

  function automatic logic [AW-1:0] wrap_add(input logic [AW-1:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = 17'(a) + 17'(b);
    // both operands are below DEPTH, so one correction is enough
    if (s >= 17'(DEPTH)) s = s - 17'(DEPTH);
    return AW'(s);
  endfunction

  assign n_wr     = ((cfg_k - wk) >= 8'd2) ? 2'd2 : 2'd1;
  assign wr_ready = (32'(count) + 32'(n_wr)) <= DEPTH;
  assign do_wr    = wr_valid && wr_ready;
  assign col_done = rd_pop && (k == cfg_k - 8'd1) && (rep == cfg_mr - 8'd1);
  assign empty    = (count == '0);

  assign rd_valid = (32'(k) < 32'(count));
  assign rd_data  = mem[wrap_add(base, 16'(k))];

  always_ff @(posedge clk) begin
    if (do_wr) begin
      mem[wr_ptr] <= wr_data0;
      if (n_wr == 2'd2) mem[wrap_add(wr_ptr, 16'd1)] <= wr_data1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      base   <= '0;
      count  <= '0;
      wk     <= '0;
      k      <= '0;
      rep    <= '0;
    end else if (clear) begin
      wr_ptr <= '0;
      base   <= '0;
      count  <= '0;
      wk     <= '0;
      k      <= '0;
      rep    <= '0;
    end else begin
      count <= count + (do_wr ? CW'(n_wr) : '0) - (col_done ? CW'(cfg_k) : '0);
      if (do_wr) begin
        wr_ptr <= wrap_add(wr_ptr, 16'(n_wr));
        wk     <= (wk + 8'(n_wr) >= cfg_k) ? 8'd0 : wk + 8'(n_wr);
      end
      if (rd_pop) begin
        if (k == cfg_k - 8'd1) begin
          k <= '0;                               // -(kub-1): back to column start
          if (rep == cfg_mr - 8'd1) begin
            rep  <= '0;
            base <= wrap_add(base, 16'(cfg_k));  // +1: next column, free this one
          end else begin
            rep <= rep + 8'd1;
          end
        end else begin
          k <= k + 8'd1;
        end
      end
    end
  end

  property p_pop_valid;
    @(posedge clk) disable iff (!rst_n) rd_pop |-> rd_valid;
  endproperty
  assert property (p_pop_valid);

endmodule
