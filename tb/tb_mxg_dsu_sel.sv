// tb_mxg_dsu_sel: checks the element window of the DSU selection logic.
//
// Random reductions (element width 2..8, K elements, n_take per cycle up to
// one mu-vector's worth) are packed into zero-padded 64-bit mu-vectors and fed
// from a queue that is popped when the block asks for a vector. Every issued
// cycle the low n_take elements of the window must be the next n_take
// elements of the reduction, each reduction must consume exactly
// ceil(K/elements-per-vector) vectors, and cycles where the window spans two
// mu-vectors must occur.
module tb_mxg_dsu_sel;
  import mxg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]   bw;
  logic [5:0]   epv;
  logic [4:0]   n_take;
  logic         red_last, fire, need_vec;
  logic [63:0]  vec_in;
  logic [127:0] window;

  mxg_dsu_sel dut (.clk, .rst_n, .clear(1'b0), .bw, .epv, .n_take, .red_last, .fire,
                   .vec_in, .need_vec, .window);

  int checks = 0, failures = 0, n_span = 0;

  initial begin
    logic [63:0] vq[$];
    int el[$];
    int k, step, nvec, pops, kpos, nt;
    fire = 0; bw = 4'd8; epv = 6'd8; n_take = '0; red_last = 0; vec_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 400; r++) begin
      bw = 4'($urandom_range(2, 8));
      epv = elems_per_vec(bw);
      k = $urandom_range(1, 8 * epv);
      step = $urandom_range(1, (epv < 14) ? epv : 14);
      nvec = (k + epv - 1) / epv;
      el.delete(); vq.delete();
      for (int i = 0; i < k; i++) el.push_back($urandom_range(0, (1 << bw) - 1));
      for (int v = 0; v < nvec; v++) begin
        logic [63:0] w;
        w = '0;
        for (int e = 0; e < epv; e++)
          if (v * epv + e < k) w |= 64'(el[v * epv + e]) << (e * bw);
        vq.push_back(w);
      end
      pops = 0; kpos = 0;
      while (kpos < k) begin
        nt = (k - kpos < step) ? k - kpos : step;
        n_take = 5'(nt);
        red_last = (kpos + nt == k);
        vec_in = (vq.size() > 0) ? vq[0] : 64'hBAD0_BAD0_BAD0_BAD0;
        fire = ($urandom_range(0, 4) != 0);
        #1;
        if (fire) begin
          if (need_vec && dut.rem != 0) n_span++;
          for (int e = 0; e < nt; e++) begin
            checks++;
            if (32'((window >> (e * bw)) & ((1 << bw) - 1)) != el[kpos + e]) begin
              failures++;
              $display("FAIL r%0d bw%0d element %0d", r, bw, kpos + e);
            end
          end
          if (need_vec) begin void'(vq.pop_front()); pops++; end
          kpos += nt;
        end
        @(posedge clk); #1;
      end
      fire = 0;
      checks++;
      if (pops != nvec) begin
        failures++;
        $display("FAIL r%0d: %0d vectors used, expected %0d", r, pops, nvec);
      end
    end
    checks++;
    if (n_span == 0) begin failures++; $display("FAIL no window spanned two vectors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
