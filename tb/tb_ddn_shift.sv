// tb_ddn_shift: self-checking test of the channel shift unit.
//
// Streams random maps (width 6, then 4, then 6 again with output back-pressure) and
// compares each output pixel with a reference: channel c takes the input pixel at
// (y + (c%9)/3 - 1, x + (c%9)%3 - 1), or zero outside the map. Checks that the first
// output appears only once input pixel (1,1) has arrived (within one input of it), and
// that back-to-back maps are all processed.
module tb_ddn_shift;
  localparam int C_MAX = 24, W_MAX = 6;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [$clog2(W_MAX+1)-1:0] cfg_w;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [C_MAX*8-1:0] in_data, out_data;

  ddn_shift #(.C_MAX(C_MAX), .W_MAX(W_MAX)) dut (.*);

  int checks = 0, failures = 0, bp = 0, sent = 0, first_out_sent = -1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [C_MAX*8-1:0] img [W_MAX][W_MAX];
  logic [C_MAX*8-1:0] exp_q [$];

  always @(negedge clk) out_ready <= bp ? (($urandom % 2) == 0) : 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) sent++;
    if (out_valid && out_ready) begin
      if (first_out_sent < 0) first_out_sent = sent;
      check(exp_q.size() > 0 && out_data == exp_q[0], "shifted pixel matches reference");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    in_valid = 0; in_data = 0; cfg_w = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      int w;
      w = (run == 1) ? 4 : 6;
      bp = (run == 2);
      cfg_w = ($clog2(W_MAX+1))'(w);
      for (int y = 0; y < w; y++) for (int x = 0; x < w; x++)
        for (int c = 0; c < C_MAX; c++) img[y][x][c*8 +: 8] = 8'($urandom);
      for (int y = 0; y < w; y++) for (int x = 0; x < w; x++) begin
        logic [C_MAX*8-1:0] e;
        for (int c = 0; c < C_MAX; c++) begin
          int sy, sx;
          sy = y + (c % 9) / 3 - 1; sx = x + (c % 9) % 3 - 1;
          e[c*8 +: 8] = (sy >= 0 && sx >= 0 && sy < w && sx < w) ? img[sy][sx][c*8 +: 8] : 8'h0;
        end
        exp_q.push_back(e);
      end
      for (int y = 0; y < w; y++) for (int x = 0; x < w; x++) begin
        @(negedge clk);
        in_valid = 1; in_data = img[y][x];
        do @(posedge clk); while (!in_ready);
        @(negedge clk); in_valid = 0;
      end
      while (exp_q.size() > 0) @(posedge clk);
      if (run == 0) check(first_out_sent >= w + 2 && first_out_sent <= w + 3,
                          $sformatf("first output after %0d inputs, expected %0d or one more", first_out_sent, w + 2));
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
