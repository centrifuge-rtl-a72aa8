// tb_ddn_block: self-checking test of the DiracDeltaNet building-block accelerator.
//
// Loads random weights into the three 1x1 convolution units, streams random input
// maps and compares every output pixel with a reference model of the block written
// here (max pool + conv on the left; conv, max pool, shift, conv on the right;
// concatenation with two-group channel shuffle). Two configurations are run
// (8x8x16 and 4x4x8), the first with output back-pressure. It also counts cycles in
// which the three MAC arrays work at once (the units overlap as a dataflow), and
// checks that the whole map takes at least the R1 convolution's bound of
// w*w*((c/8)^2 + 1) cycles and not more than twice that.
module tb_ddn_block;
  localparam int C_MAX = 16, W_MAX = 8, SH = 7;
  localparam int T = C_MAX / 8;
  localparam int VW = C_MAX * 8;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [$clog2(W_MAX+1)-1:0] cfg_w;
  logic [$clog2(C_MAX+1)-1:0] cfg_c;
  logic w_we;
  logic [1:0] w_unit;
  logic [$clog2(T*T)-1:0] w_addr;
  logic [511:0] w_data;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [VW-1:0] in_data;
  logic [2*VW-1:0] out_data;
  logic [2:0] mac_active;

  ddn_block #(.C_MAX(C_MAX), .W_MAX(W_MAX), .LFIFO_DEPTH(W_MAX), .ACC_SHIFT(SH)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, bp = 0, all3 = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) begin
    cyc++;
    if (&mac_active) all3++;
  end

  typedef logic [VW-1:0] map_t [W_MAX][W_MAX];
  logic signed [7:0] WT [3][C_MAX][C_MAX];
  logic [2*VW-1:0] exp_q [$];

  function automatic logic [VW-1:0] conv(input int u, input logic [VW-1:0] x, input int c);
    conv = '0;
    for (int o = 0; o < c; o++) begin
      int acc;
      acc = 0;
      for (int i = 0; i < c; i++) acc += int'(WT[u][o][i]) * int'($signed(x[i*8 +: 8]));
      acc = acc >>> SH;
      if (acc > 127) acc = 127;
      if (acc < -128) acc = -128;
      conv[o*8 +: 8] = 8'(acc);
    end
  endfunction

  function automatic logic [VW-1:0] vmax(input logic [VW-1:0] a, input logic [VW-1:0] b);
    for (int ch = 0; ch < C_MAX; ch++)
      vmax[ch*8 +: 8] = ($signed(a[ch*8 +: 8]) > $signed(b[ch*8 +: 8])) ? a[ch*8 +: 8] : b[ch*8 +: 8];
  endfunction

  task automatic reference(input map_t img, input int w, input int c);
    map_t l, r1, rp, rs;
    int h;
    h = w / 2;
    for (int y = 0; y < w; y++) for (int x = 0; x < w; x++) r1[y][x] = conv(1, img[y][x], c);
    for (int y = 0; y < h; y++) for (int x = 0; x < h; x++) begin
      l[y][x]  = conv(0, vmax(vmax(img[2*y][2*x], img[2*y][2*x+1]), vmax(img[2*y+1][2*x], img[2*y+1][2*x+1])), c);
      rp[y][x] = vmax(vmax(r1[2*y][2*x], r1[2*y][2*x+1]), vmax(r1[2*y+1][2*x], r1[2*y+1][2*x+1]));
    end
    for (int y = 0; y < h; y++) for (int x = 0; x < h; x++)
      for (int ch = 0; ch < C_MAX; ch++) begin
        int sy, sx;
        sy = y + (ch % 9) / 3 - 1; sx = x + (ch % 9) % 3 - 1;
        rs[y][x][ch*8 +: 8] = (sy >= 0 && sx >= 0 && sy < h && sx < h) ? rp[sy][sx][ch*8 +: 8] : 8'h0;
      end
    for (int y = 0; y < h; y++) for (int x = 0; x < h; x++) begin
      logic [VW-1:0] r2;
      logic [2*VW-1:0] o;
      r2 = conv(2, rs[y][x], c);
      for (int k = 0; k < C_MAX; k++) begin
        o[(2*k)*8 +: 8]   = l[y][x][k*8 +: 8];
        o[(2*k+1)*8 +: 8] = r2[k*8 +: 8];
      end
      exp_q.push_back(o);
    end
  endtask

  always @(negedge clk) out_ready <= bp ? (($urandom % 2) == 0) : 1'b1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    check(exp_q.size() > 0 && out_data == exp_q[0], "output pixel matches reference");
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end

  map_t img;
  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    w_we = 0; w_unit = 0; w_addr = 0; w_data = 0; in_valid = 0; in_data = 0; cfg_w = 0; cfg_c = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int u = 0; u < 3; u++) begin
      for (int o = 0; o < C_MAX; o++) for (int i = 0; i < C_MAX; i++) WT[u][o][i] = 8'($urandom);
      for (int co = 0; co < T; co++) for (int ci = 0; ci < T; ci++) begin
        @(negedge clk);
        w_we = 1; w_unit = 2'(u); w_addr = $clog2(T*T)'(co * T + ci);
        for (int o = 0; o < 8; o++) for (int i = 0; i < 8; i++) w_data[(o*8+i)*8 +: 8] = WT[u][co*8+o][ci*8+i];
      end
    end
    @(negedge clk); w_we = 0;

    for (int run = 0; run < 2; run++) begin
      int w, c, t0;
      w = (run == 0) ? 8 : 4; c = (run == 0) ? 16 : 8;
      bp = (run == 0);
      cfg_w = ($clog2(W_MAX+1))'(w); cfg_c = ($clog2(C_MAX+1))'(c);
      for (int y = 0; y < W_MAX; y++) for (int x = 0; x < W_MAX; x++)
        for (int ch = 0; ch < C_MAX; ch++) img[y][x][ch*8 +: 8] = (ch < c) ? 8'($urandom) : 8'h0;
      reference(img, w, c);
      t0 = cyc;
      for (int y = 0; y < w; y++) for (int x = 0; x < w; x++) begin
        @(negedge clk);
        in_valid = 1; in_data = img[y][x];
        do @(posedge clk); while (!in_ready);
      end
      @(negedge clk); in_valid = 0;
      while (exp_q.size() > 0) @(posedge clk);
      begin
        int bound;
        bound = w * w * ((c / 8) * (c / 8) + 1);
        check(cyc - t0 >= bound && cyc - t0 <= 2 * bound + 4 * w,
              $sformatf("map took %0d cycles, R1 bound %0d", cyc - t0, bound));
      end
    end
    check(all3 > 0, "the three MAC arrays worked at the same time");
    $display("cycles with all three MAC arrays busy: %0d", all3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
