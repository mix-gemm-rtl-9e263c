// tb_mxg_dcu: checks input-cluster packing.
//
// First the worked example of binary segmentation with a 16-bit multiplier:
// a = (4,7,3,6) at 3 bits, b = (3,2,0,1) at 2 bits, two elements per cluster,
// cw = 8, must give the clusters 1031/515 and 774/256. Then random windows,
// widths, signedness, cluster sizes and start offsets at 64 bits, compared
// with sum(element * 2^position) computed here with plain integer arithmetic.
module tb_mxg_dcu;
  int checks = 0, failures = 0;

  // 16-bit instance for the worked example
  logic [127:0] w16a, w16b;
  logic [4:0]   base16;
  logic [15:0]  c16a, c16b;
  mxg_dcu #(.MUL_W(16), .REVERSE(1'b0)) u_a16 (
    .window(w16a), .base(base16), .n_valid(5'd4), .ics(4'd2), .cw(7'd8), .bw(4'd3),
    .sgn(1'b0), .cluster(c16a));
  mxg_dcu #(.MUL_W(16), .REVERSE(1'b1)) u_b16 (
    .window(w16b), .base(base16), .n_valid(5'd4), .ics(4'd2), .cw(7'd8), .bw(4'd2),
    .sgn(1'b0), .cluster(c16b));

  // 64-bit instances
  logic [127:0] win;
  logic [4:0]   base, nval;
  logic [3:0]   ics, bw;
  logic [6:0]   cw;
  logic         sgn;
  logic [63:0]  ca, cb;
  mxg_dcu #(.REVERSE(1'b0)) u_a (.window(win), .base, .n_valid(nval), .ics, .cw, .bw, .sgn, .cluster(ca));
  mxg_dcu #(.REVERSE(1'b1)) u_b (.window(win), .base, .n_valid(nval), .ics, .cw, .bw, .sgn, .cluster(cb));

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int el [32];
    longint ea, eb, v;
    int ne;
    // worked example
    w16a = '0; w16b = '0;
    w16a[2:0] = 3'd4; w16a[5:3] = 3'd7; w16a[8:6] = 3'd3; w16a[11:9] = 3'd6;
    w16b[1:0] = 2'd3; w16b[3:2] = 2'd2; w16b[5:4] = 2'd0; w16b[7:6] = 2'd1;
    base16 = 5'd0; #1;
    chk("fig a' cluster", longint'(c16a), 1031);
    chk("fig b'r cluster", longint'(c16b), 515);
    base16 = 5'd2; #1;
    chk("fig a'' cluster", longint'(c16a), 774);
    chk("fig b''r cluster", longint'(c16b), 256);

    for (int t = 0; t < 2000; t++) begin
      bw  = 4'($urandom_range(2, 8));
      ics = 4'($urandom_range(1, 7));
      cw  = 7'($urandom_range(bw + 1, 64 / ics));
      sgn = 1'($urandom_range(0, 1));
      base = 5'($urandom_range(0, 7));
      nval = 5'($urandom_range(0, 16));
      ne = 128 / bw;
      if (ne > 32) ne = 32;
      win = '0;
      for (int e = 0; e < ne; e++) begin
        el[e] = $urandom_range(0, (1 << bw) - 1);
        win |= 128'(el[e]) << (e * bw);
      end
      #1;
      ea = 0; eb = 0;
      for (int l = 0; l < ics; l++) begin
        int idx;
        idx = base + l;
        if (idx < nval && idx < ne) begin
          v = el[idx];
          if (sgn && v >= (1 << (bw - 1))) v -= (1 << bw);
          ea += v * (longint'(1) << ((ics - 1 - l) * cw));
          eb += v * (longint'(1) << (l * cw));
        end
      end
      chk("random A cluster", longint'(ca), ea);
      chk("random B cluster", longint'(cb), eb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
