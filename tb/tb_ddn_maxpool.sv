// tb_ddn_maxpool: self-checking test of the 2x2/stride-2 max pooling unit.
//
// Streams random signed maps of two widths (8 and 4, the second without gaps and
// with random output back-pressure) and compares each output pixel with the
// channel-wise maximum of its 2x2 window computed here. Also checks that, without
// back-pressure, one input pixel is taken every cycle.
module tb_ddn_maxpool;
  localparam int C_MAX = 16, W_MAX = 8;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [$clog2(W_MAX+1)-1:0] cfg_w;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [C_MAX*8-1:0] in_data, out_data;

  ddn_maxpool #(.C_MAX(C_MAX), .W_MAX(W_MAX)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, bp = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) cyc++;

  logic [C_MAX*8-1:0] img [W_MAX][W_MAX];
  logic [C_MAX*8-1:0] exp_q [$];

  always @(negedge clk) out_ready <= bp ? (($urandom % 2) == 0) : 1'b1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    check(exp_q.size() > 0 && out_data == exp_q[0], "pooled pixel matches reference");
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end

  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    in_valid = 0; in_data = 0; cfg_w = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      int w, t0, taken;
      w = (run == 1) ? 4 : 8;
      bp = (run == 2);
      cfg_w = ($clog2(W_MAX+1))'(w);
      for (int y = 0; y < w; y++) for (int x = 0; x < w; x++)
        for (int c = 0; c < C_MAX; c++) img[y][x][c*8 +: 8] = 8'($urandom);
      for (int y = 0; y < w; y += 2) for (int x = 0; x < w; x += 2) begin
        logic [C_MAX*8-1:0] m;
        for (int c = 0; c < C_MAX; c++) begin
          logic signed [7:0] v;
          v = img[y][x][c*8 +: 8];
          if ($signed(img[y][x+1][c*8 +: 8]) > v)   v = img[y][x+1][c*8 +: 8];
          if ($signed(img[y+1][x][c*8 +: 8]) > v)   v = img[y+1][x][c*8 +: 8];
          if ($signed(img[y+1][x+1][c*8 +: 8]) > v) v = img[y+1][x+1][c*8 +: 8];
          m[c*8 +: 8] = v;
        end
        exp_q.push_back(m);
      end
      @(negedge clk);
      t0 = cyc; taken = 0;
      for (int y = 0; y < w; y++) for (int x = 0; x < w; x++) begin
        in_valid = 1; in_data = img[y][x];
        do @(posedge clk); while (!in_ready);
        taken++;
        @(negedge clk);
      end
      in_valid = 0;
      if (!bp) check(cyc - t0 == taken, $sformatf("one pixel per cycle (%0d cycles for %0d)", cyc - t0, taken));
      while (exp_q.size() > 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
