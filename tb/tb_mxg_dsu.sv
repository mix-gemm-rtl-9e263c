// tb_mxg_dsu: checks the Data Selection Unit at its default (two multiplier)
// size.
//
// Random legal configurations (widths 2..8, mixed signedness, ics and cw from
// the binary segmentation rules) and random reductions are fed from two
// mu-vector queues standing in for the scratchpads, with random gaps between
// issued cycles. For every issued cycle the testbench computes the expected
// input-clusters of both multipliers from the element lists (A elements at
// (ics-1-l)*cw, reversed B elements at l*cw, elements past the reduction end
// zero) and checks them, and the bookkeeping, exactly two clock edges after
// the issue. As in the engine, the configuration only changes once the
// pipeline is empty.
module tb_mxg_dsu;
  import mxg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mxg_cfg_t   cfg;
  logic [5:0] epv_a, epv_b;
  logic       fire, red_last, need_a, need_b, pop_a, pop_b, busy;
  logic [4:0] n_take;
  mxg_meta_t  meta_in, cl_meta;
  logic [63:0] sp_a_data, sp_b_data;
  logic [1:0][63:0] cl_a, cl_b;

  mxg_dsu dut (.clk, .rst_n, .clear(1'b0), .cfg, .epv_a, .epv_b, .fire, .n_take, .red_last,
               .meta_in, .sp_a_data, .sp_b_data, .need_a, .need_b, .pop_a, .pop_b,
               .cl_a, .cl_b, .cl_meta, .busy);

  int checks = 0, failures = 0;
  longint cycle = 0;
  typedef struct { longint when; logic [7:0] slot; logic [63:0] a0, a1, b0, b1; } exp_t;
  exp_t eq[$];

  always @(posedge clk) cycle++;

  always @(posedge clk) begin
    if (rst_n && cl_meta.valid) begin
      exp_t e;
      checks++;
      if (eq.size() == 0) begin
        failures++; $display("FAIL unexpected cluster");
      end else begin
        e = eq.pop_front();
        if (cycle - e.when != 2 || cl_meta.slot != e.slot ||
            cl_a[0] != e.a0 || cl_a[1] != e.a1 || cl_b[0] != e.b0 || cl_b[1] != e.b1) begin
          failures++;
          $display("FAIL cluster: lat %0d a %h %h (exp %h %h) b %h %h (exp %h %h)", cycle - e.when,
                   cl_a[0], cl_a[1], e.a0, e.a1, cl_b[0], cl_b[1], e.b0, e.b1);
        end
      end
    end
  end

  function automatic int clog2i(int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  function automatic logic [63:0] mkcl(int el[$], int from, int upto, int ics, int cw,
                                       bit rev);
    longint acc = 0;
    for (int l = 0; l < ics; l++)
      if (from + l < upto)
        acc += longint'(el[from + l]) * (longint'(1) << ((rev ? l : ics - 1 - l) * cw));
    return 64'(acc);
  endfunction

  initial begin
    int ea[$], eb[$];
    logic [63:0] qa[$], qb[$];
    int bwa, bwb, ics, cw, k, kua, kub, epa, epb, kel, kpos, nt;
    exp_t e;
    fire = 0; n_take = '0; red_last = 0; meta_in = '0; cfg = '0; sp_a_data = '0; sp_b_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      bwa = $urandom_range(2, 8); bwb = $urandom_range(2, 8);
      for (ics = 7; ics > 1; ics--) if (ics * (1 + bwa + bwb + clog2i(ics + 1)) <= 64) break;
      cw = 1 + bwa + bwb + clog2i(ics + 1);
      cfg = '0;
      cfg.bw_a = 4'(bwa); cfg.bw_b = 4'(bwb); cfg.ics = 4'(ics); cfg.cw = 7'(cw);
      cfg.sgn_a = 1'($urandom_range(0, 1)); cfg.sgn_b = 1'($urandom_range(0, 1));
      epa = 64 / bwa; epb = 64 / bwb;
      epv_a = 6'(epa); epv_b = 6'(epb);
      k = $urandom_range(1, 6 * ((epa < epb) ? epa : epb));
      kua = (k + epa - 1) / epa; kub = (k + epb - 1) / epb;
      kel = (kua * epa < kub * epb) ? kua * epa : kub * epb;
      ea.delete(); eb.delete(); qa.delete(); qb.delete();
      for (int i = 0; i < kua * epa; i++) begin
        int v;
        v = (i < k) ? $urandom_range(0, (1 << bwa) - 1) : 0;
        if (cfg.sgn_a && v >= (1 << (bwa - 1))) v -= (1 << bwa);
        ea.push_back(v);
      end
      for (int i = 0; i < kub * epb; i++) begin
        int v;
        v = (i < k) ? $urandom_range(0, (1 << bwb) - 1) : 0;
        if (cfg.sgn_b && v >= (1 << (bwb - 1))) v -= (1 << bwb);
        eb.push_back(v);
      end
      for (int v = 0; v < kua; v++) begin
        logic [63:0] w; w = '0;
        for (int i = 0; i < epa; i++) w |= 64'(ea[v * epa + i] & ((1 << bwa) - 1)) << (i * bwa);
        qa.push_back(w);
      end
      for (int v = 0; v < kub; v++) begin
        logic [63:0] w; w = '0;
        for (int i = 0; i < epb; i++) w |= 64'(eb[v * epb + i] & ((1 << bwb) - 1)) << (i * bwb);
        qb.push_back(w);
      end
      kpos = 0;
      while (kpos < kel) begin
        nt = (kel - kpos < 2 * ics) ? kel - kpos : 2 * ics;
        n_take = 5'(nt); red_last = (kpos + nt == kel);
        sp_a_data = (qa.size() > 0) ? qa[0] : '1;
        sp_b_data = (qb.size() > 0) ? qb[0] : '1;
        fire = ($urandom_range(0, 3) != 0);
        meta_in = '0; meta_in.valid = fire; meta_in.slot = 8'(r);
        #1;
        if (fire) begin
          e.when = cycle + 1; e.slot = 8'(r);
          e.a0 = mkcl(ea, kpos, kpos + nt, ics, cw, 0);
          e.a1 = mkcl(ea, kpos + ics, kpos + nt, ics, cw, 0);
          e.b0 = mkcl(eb, kpos, kpos + nt, ics, cw, 1);
          e.b1 = mkcl(eb, kpos + ics, kpos + nt, ics, cw, 1);
          eq.push_back(e);
          if (pop_a) void'(qa.pop_front());
          if (pop_b) void'(qb.pop_front());
          kpos += nt;
        end
        @(posedge clk); #1;
      end
      fire = 0; meta_in = '0;
      // the configuration only changes once the pipeline has drained
      repeat (3) @(posedge clk);
      #1;
      checks++;
      if (qa.size() != 0 || qb.size() != 0) begin
        failures++; $display("FAIL r%0d: vectors left over %0d %0d", r, qa.size(), qb.size());
      end
    end
    repeat (4) @(posedge clk);
    checks++;
    if (eq.size() != 0) begin failures++; $display("FAIL %0d clusters missing", eq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
