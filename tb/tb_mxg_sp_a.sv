// tb_mxg_sp_a: checks the SP A scratchpad and its hardware loop.
//
// A 16-word scratchpad (4 x 4) is configured with mr = 4, nr = 3 and a
// reduction length of 3 mu-vectors (odd, so every third word arrives with a
// dummy partner that must be dropped). A writer process streams three
// contexts as put pairs; a reader process pops at random times and checks the
// read order: the mr*kua vectors of a context, in write order, nr = 3 times over.
// Every word carries (context, row/column, k) so any misordering shows. The
// testbench also checks that the writer was stalled by a full scratchpad and
// that words of the next context were accepted before the current context
// had been read completely (early freeing).
module tb_mxg_sp_a;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        wr_valid, wr_ready, rd_valid, rd_pop, empty;
  logic [63:0] wr_data0, wr_data1, rd_data;

  mxg_sp_a #(.MR(4), .KU(4)) dut (
    .clk, .rst_n, .clear(1'b0), .cfg_mr(8'd4), .cfg_nr(8'd3), .cfg_k(8'd3),
    .wr_valid, .wr_data0, .wr_data1, .wr_ready, .rd_valid, .rd_data, .rd_pop, .empty
  );

  localparam int MRC = 4, NRC = 3, KC = 3, NCTX = 3;
  int checks = 0, failures = 0;
  int n_wr_stall = 0, n_early = 0, n_read = 0;
  logic [63:0] exp_q[$];
  int ctx_written = 0;   // contexts whose first word was accepted
  int ctx_read = 0;      // contexts fully read

  function automatic logic [63:0] id(int c, int o, int k);
    return 64'h1000_0000 + 64'(c * 65536 + o * 256 + k);
  endfunction

  initial begin
    // expected read order
    for (int c = 0; c < NCTX; c++)
      for (int p = 0; p < NRC; p++)
        for (int i = 0; i < MRC; i++)
          for (int k = 0; k < KC; k++)
            exp_q.push_back(id(c, i, k));
  end

  // writer
  initial begin
    wr_valid = 0; wr_data0 = '0; wr_data1 = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < NCTX; c++) begin
      for (int o = 0; o < 4; o++)
        for (int k = 0; k < KC; k += 2) begin
          wr_valid = 1;
          wr_data0 = id(c, o, k);
          wr_data1 = (k + 1 < KC) ? id(c, o, k + 1) : 64'hDEAD_BEEF;
          @(negedge clk);
          while (!wr_ready) begin n_wr_stall++; @(negedge clk); end
          if (c > ctx_read && c == ctx_read + 1 && n_read > 0) n_early++;
          @(posedge clk); #1 wr_valid = 0;
          if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
        end
    end
  end

  // reader
  initial begin
    logic [63:0] e;
    int per_ctx;
    rd_pop = 0;
    @(posedge rst_n);
    per_ctx = exp_q.size() / NCTX;
    while (exp_q.size() > 0) begin
      @(negedge clk);
      rd_pop = 0;
      if (rd_valid && $urandom_range(0, 1) == 1) begin
        e = exp_q.pop_front();
        checks++;
        if (rd_data !== e) begin
          failures++;
          $display("FAIL read %0d: got %h expected %h", n_read, rd_data, e);
        end
        rd_pop = 1;
        n_read++;
        if (n_read % per_ctx == 0) ctx_read++;
      end
    end
    @(negedge clk) rd_pop = 0;
    repeat (2) @(posedge clk);
    checks++;
    if (!empty) begin failures++; $display("FAIL not empty at end"); end
    checks++;
    if (n_wr_stall == 0) begin failures++; $display("FAIL writer never stalled"); end
    checks++;
    if (n_early == 0) begin failures++; $display("FAIL no early freeing seen"); end
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
