// tb_ddn_conv1x1: self-checking test of the 8x8-MAC 1x1 convolution unit.
//
// Loads random signed 8-bit weights, streams random pixels with random output
// back-pressure, and compares every output pixel with a reference convolution
// (sum over input channels, arithmetic shift by ACC_SHIFT, saturation to 8 bits)
// computed here. Runs two channel configurations and checks that an unstalled
// pixel takes 1 + cin_tiles*cout_tiles cycles.
module tb_ddn_conv1x1;
  localparam int C_MAX = 32, SH = 7;
  localparam int T = C_MAX / 8;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [$clog2(T+1)-1:0] cfg_cin_tiles, cfg_cout_tiles;
  logic w_we;
  logic [$clog2(T*T)-1:0] w_addr;
  logic [511:0] w_data;
  logic in_valid, in_ready, out_valid, out_ready, mac_active;
  logic [C_MAX*8-1:0] in_data, out_data;

  ddn_conv1x1 #(.C_MAX(C_MAX), .ACC_SHIFT(SH)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) cyc++;

  logic signed [7:0] W [C_MAX][C_MAX];
  logic [C_MAX*8-1:0] exp_q [$];
  int bp = 0;

  function automatic logic [C_MAX*8-1:0] ref_conv(input logic [C_MAX*8-1:0] x, input int cin, input int cout);
    ref_conv = '0;
    for (int o = 0; o < cout; o++) begin
      int acc;
      acc = 0;
      for (int i = 0; i < cin; i++) acc += int'(W[o][i]) * int'($signed(x[i*8 +: 8]));
      acc = acc >>> SH;
      if (acc > 127) acc = 127;
      if (acc < -128) acc = -128;
      ref_conv[o*8 +: 8] = 8'(acc);
    end
  endfunction

  always @(negedge clk) out_ready <= bp ? (($urandom % 3) == 0) : 1'b1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    check(exp_q.size() > 0 && out_data == exp_q[0], "output pixel matches reference");
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end

  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    w_we = 0; w_addr = 0; w_data = 0; in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int o = 0; o < C_MAX; o++) for (int i = 0; i < C_MAX; i++) W[o][i] = 8'($urandom);
    for (int co = 0; co < T; co++) for (int ci = 0; ci < T; ci++) begin
      @(negedge clk);
      w_we = 1; w_addr = $clog2(T*T)'(co * T + ci);
      for (int o = 0; o < 8; o++) for (int i = 0; i < 8; i++) w_data[(o*8+i)*8 +: 8] = W[co*8+o][ci*8+i];
    end
    @(negedge clk); w_we = 0;

    for (int cfg = 0; cfg < 2; cfg++) begin
      int cin, cout;
      cin = (cfg == 0) ? C_MAX : 16; cout = (cfg == 0) ? C_MAX : 24;
      cfg_cin_tiles = ($clog2(T+1))'(cin / 8); cfg_cout_tiles = ($clog2(T+1))'(cout / 8);
      bp = cfg;
      // timing of one pixel with no back-pressure
      if (cfg == 0) begin
        int t0, t1;
        @(negedge clk);
        in_data = {C_MAX{8'($urandom)}};
        exp_q.push_back(ref_conv(in_data, cin, cout));
        in_valid = 1;
        do @(posedge clk); while (!in_ready);
        t0 = cyc;
        @(negedge clk); in_valid = 0;
        while (!out_valid) @(posedge clk);
        t1 = cyc;
        check(t1 - t0 == (cin / 8) * (cout / 8) + 1,
              $sformatf("pixel latency %0d cycles, expected %0d", t1 - t0, (cin / 8) * (cout / 8) + 1));
        @(posedge clk);
      end
      for (int p = 0; p < 20; p++) begin
        @(negedge clk);
        for (int c = 0; c < C_MAX; c++) in_data[c*8 +: 8] = (c < cin) ? 8'($urandom) : 8'h0;
        exp_q.push_back(ref_conv(in_data, cin, cout));
        in_valid = 1;
        do @(posedge clk); while (!in_ready);
        @(negedge clk); in_valid = 0;
      end
      while (exp_q.size() > 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
