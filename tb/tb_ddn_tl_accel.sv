// tb_ddn_tl_accel: tests the memory-attached DiracDeltaNet accelerator end to end
// through its control registers, at reduced size (16 channels, 8-pixel rows).
//
// A memory model answers 512-bit requests in order after a random latency of
// 20 to 35 cycles and refuses requests at random. For several map sizes the test
// stores random weights and a random input map in that memory in the layout the
// accelerator expects, writes the four argument registers, sets start, polls CTRL
// until done, and compares every output beat in memory with a reference model
// (split, 2x2 max pool, 1x1 convolutions with >>>7 and int8 saturation, shift of
// channel c in direction c mod 9 with zero padding, interleaving shuffle). Bytes
// past the channel count in the input beats are filled with garbage to check that
// they are ignored. It also checks that RETURN holds a cycle count no larger than
// the time from start to done and no smaller than the convolution work alone.
module tb_ddn_tl_accel;
  import centrifuge_pkg::*;
  localparam int DC = 16, DW = 8, VW = DC * 8, T = DC / 8, SH = 7;
  localparam logic [PADDR_W-1:0] WB = 40'h10000, IB = 40'h20000, OB = 40'h40000;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic mmio_req_valid, mmio_req_ready, mmio_req_write, mmio_resp_valid, mmio_resp_ready;
  logic [11:0] mmio_req_addr; logic [XLEN-1:0] mmio_req_wdata, mmio_resp_rdata;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_resp_valid, mem_resp_ready;
  logic [PADDR_W-1:0] mem_req_addr; logic [511:0] mem_req_data, mem_resp_data;
  logic [2:0] mac_active;

  ddn_tl_accel #(.C_MAX(DC), .W_MAX(DW), .LFIFO_DEPTH(8)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) cyc++;

  // ---------------- in-order memory with latency
  logic [511:0] mem [logic [PADDR_W-7:0]];
  typedef struct { logic [511:0] data; int due; } rsp_t;
  rsp_t rq [$];
  int last_due = 0;
  always @(negedge clk) mem_req_ready <= ($urandom % 4) != 0;
  always @(posedge clk) if (rst_n) begin
    if (mem_req_valid && mem_req_ready) begin
      rsp_t r;
      check(mem_req_addr[5:0] == 0, "beat-aligned address");
      if (mem_req_write) begin mem[mem_req_addr[PADDR_W-1:6]] = mem_req_data; r.data = '0; end
      else r.data = mem.exists(mem_req_addr[PADDR_W-1:6]) ? mem[mem_req_addr[PADDR_W-1:6]] : '0;
      r.due = cyc + 20 + ($urandom % 16);
      if (r.due <= last_due) r.due = last_due + 1;
      last_due = r.due;
      rq.push_back(r);
    end
  end
  always @(negedge clk) begin
    mem_resp_valid <= 0;
    if (rq.size() > 0 && rq[0].due <= cyc) begin
      mem_resp_valid <= 1; mem_resp_data <= rq[0].data; void'(rq.pop_front());
    end
  end

  task automatic mmio(input bit wr, input logic [11:0] a, input logic [63:0] wd, output logic [63:0] rd);
    @(negedge clk);
    mmio_req_valid = 1; mmio_req_write = wr; mmio_req_addr = a; mmio_req_wdata = wd;
    do @(posedge clk); while (!mmio_req_ready);
    @(negedge clk); mmio_req_valid = 0; mmio_resp_ready = 1;
    while (!mmio_resp_valid) @(posedge clk);
    rd = mmio_resp_rdata;
    @(posedge clk); @(negedge clk); mmio_resp_ready = 0;
  endtask

  // ---------------- reference model
  logic signed [7:0] WT [3][DC][DC];
  logic [VW-1:0] img [DW][DW], r1 [DW][DW];
  logic [VW-1:0] lft [DW/2][DW/2], rp [DW/2][DW/2], rs [DW/2][DW/2];
  logic [2*VW-1:0] expv [DW*DW/4];
  int rc;

  function automatic logic [VW-1:0] conv(input int u, input logic [VW-1:0] x);
    conv = '0;
    for (int o = 0; o < rc; o++) begin
      int acc;
      acc = 0;
      for (int i = 0; i < rc; i++) acc += int'(WT[u][o][i]) * int'($signed(x[i*8 +: 8]));
      acc = acc >>> SH;
      if (acc > 127) acc = 127;
      if (acc < -128) acc = -128;
      conv[o*8 +: 8] = 8'(acc);
    end
  endfunction
  function automatic logic [VW-1:0] vmax(input logic [VW-1:0] a, input logic [VW-1:0] b);
    for (int ch = 0; ch < DC; ch++)
      vmax[ch*8 +: 8] = ($signed(a[ch*8 +: 8]) > $signed(b[ch*8 +: 8])) ? a[ch*8 +: 8] : b[ch*8 +: 8];
  endfunction
  task automatic reference(input int w);
    int h;
    h = w / 2;
    for (int y = 0; y < w; y++) for (int x = 0; x < w; x++) r1[y][x] = conv(1, img[y][x]);
    for (int y = 0; y < h; y++) for (int x = 0; x < h; x++) begin
      lft[y][x] = conv(0, vmax(vmax(img[2*y][2*x], img[2*y][2*x+1]), vmax(img[2*y+1][2*x], img[2*y+1][2*x+1])));
      rp[y][x]  = vmax(vmax(r1[2*y][2*x], r1[2*y][2*x+1]), vmax(r1[2*y+1][2*x], r1[2*y+1][2*x+1]));
    end
    for (int y = 0; y < h; y++) for (int x = 0; x < h; x++)
      for (int ch = 0; ch < DC; ch++) begin
        int sy, sx;
        sy = y + (ch % 9) / 3 - 1; sx = x + (ch % 9) % 3 - 1;
        rs[y][x][ch*8 +: 8] = (sy >= 0 && sx >= 0 && sy < h && sx < h) ? rp[sy][sx][ch*8 +: 8] : 8'h0;
      end
    for (int y = 0; y < h; y++) for (int x = 0; x < h; x++) begin
      logic [VW-1:0] r2;
      logic [2*VW-1:0] o;
      r2 = conv(2, rs[y][x]);
      for (int k = 0; k < DC; k++) begin
        o[(2*k)*8 +: 8] = lft[y][x][k*8 +: 8];
        o[(2*k+1)*8 +: 8] = r2[k*8 +: 8];
      end
      expv[y*h + x] = o;
    end
  endtask

  int n_mac3 = 0;
  always @(posedge clk) if (&mac_active) n_mac3++;

  task automatic run(input int w, input int c);
    int ct, ib, ob, t0, t1, idx;
    logic [63:0] r;
    rc = c; ct = c / 8; ib = (c + 63) / 64; ob = (2 * c + 63) / 64;
    // weights, unit-major, then output tile, then input tile
    for (int u = 0; u < 3; u++)
      for (int o = 0; o < DC; o++) for (int i = 0; i < DC; i++) WT[u][o][i] = (o < c && i < c) ? 8'($urandom) : 8'h0;
    idx = 0;
    for (int u = 0; u < 3; u++) for (int co = 0; co < ct; co++) for (int ci = 0; ci < ct; ci++) begin
      logic [511:0] t;
      for (int o = 0; o < 8; o++) for (int i = 0; i < 8; i++) t[(o*8+i)*8 +: 8] = WT[u][co*8+o][ci*8+i];
      mem[WB[PADDR_W-1:6] + 34'(idx)] = t;
      idx++;
    end
    // input map, garbage past channel c
    for (int y = 0; y < w; y++) for (int x = 0; x < w; x++) begin
      for (int ch = 0; ch < DC; ch++) img[y][x][ch*8 +: 8] = (ch < c) ? 8'($urandom) : 8'h0;
      for (int b = 0; b < ib; b++) begin
        logic [511:0] t;
        for (int k = 0; k < 64; k++) t[k*8 +: 8] = (b*64 + k < c) ? img[y][x][(b*64+k)*8 +: 8] : 8'($urandom);
        mem[IB[PADDR_W-1:6] + 34'((y*w + x)*ib + b)] = t;
      end
    end
    reference(w);
    mmio(1, 12'h10, 64'(WB), r); mmio(1, 12'h18, 64'(IB), r); mmio(1, 12'h20, 64'(OB), r);
    mmio(1, 12'h28, 64'({8'(c), 8'(w)}), r);
    t0 = cyc;
    mmio(1, 12'h00, 64'd1, r);
    do mmio(0, 12'h00, 0, r); while (!r[1] && cyc - t0 < 200000);
    t1 = cyc;
    check(r[1], $sformatf("%0dx%0d: done", w, c));
    mmio(0, 12'h08, 0, r);
    check(int'(r) <= t1 - t0 && int'(r) >= w * w * (ct * ct + 1),
          $sformatf("%0dx%0d: returned cycle count %0d within [%0d, %0d]", w, c, r, w * w * (ct * ct + 1), t1 - t0));
    $display("run %0dx%0d: %0d cycles from start to done", w, c, r);
    for (int p = 0; p < (w/2) * (w/2); p++) begin
      logic [2*VW-1:0] got;
      got = '0;
      for (int b = 0; b < ob; b++) begin
        logic [511:0] t;
        t = mem.exists(OB[PADDR_W-1:6] + 34'(p*ob + b)) ? mem[OB[PADDR_W-1:6] + 34'(p*ob + b)] : '0;
        for (int k = 0; k < 64; k++) if (b*64 + k < 2*DC) got[(b*64+k)*8 +: 8] = t[k*8 +: 8];
      end
      check(got == expv[p], $sformatf("%0dx%0d: output pixel %0d", w, c, p));
    end
  endtask

  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    mmio_req_valid = 0; mmio_req_write = 0; mmio_req_addr = 0; mmio_req_wdata = 0; mmio_resp_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(8, 16);
    run(4, 8);
    run(8, 8);
    run(4, 16);
    check(n_mac3 > 0, "three MAC arrays worked at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
