// ddn_conv1x1: 1x1 convolution unit built on an 8x8 multiply-accumulate array.
//
// Pixels arrive one per transfer as a vector of up to C_MAX signed 8-bit channels.
// For each pixel the unit walks over (cfg_cout_tiles x cfg_cin_tiles) weight tiles,
// each 8 output channels by 8 input channels; in every cycle the 64 MACs of the
// array multiply one tile of weights with 8 input channels and add into 8 of the
// 32-bit accumulators. After the last tile the accumulators are scaled down by
// ACC_SHIFT (arithmetic shift), saturated to 8 bits and put in the output register;
// the next pixel may start while that register waits. Unused channels are zero.
// Weights are preloaded, one tile per write: w_addr = co_tile*(C_MAX/8) + ci_tile,
// and byte (o*8+i) of w_data is the weight from input channel ci_tile*8+i to output
// channel co_tile*8+o.
// Timing: 1 + cin_tiles*cout_tiles cycles per pixel.
// The 8x8 MAC array and the preloaded on-chip weights follow the document; the
// number formats, the rescaling and the tile order are this design's choices.
module ddn_conv1x1 #(
  parameter int C_MAX     = 128,
  parameter int ACC_W     = 32,
  parameter int ACC_SHIFT = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(C_MAX/8+1)-1:0] cfg_cin_tiles,
  input  logic [$clog2(C_MAX/8+1)-1:0] cfg_cout_tiles,
  // weight preload
  input  logic                     w_we,
  input  logic [$clog2((C_MAX/8)*(C_MAX/8))-1:0] w_addr,
  input  logic [511:0]             w_data,
  // input pixels
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [C_MAX*8-1:0]       in_data,
  // output pixels
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [C_MAX*8-1:0]       out_data,
  output logic                     mac_active    // the MAC array works this cycle
);
  localparam int T   = C_MAX / 8;
  localparam int TW  = $clog2(T + 1);
  localparam int WAW = $clog2(T * T);

  logic [511:0]            wmem [T*T];
  logic [C_MAX*8-1:0]      x_q;
  logic signed [ACC_W-1:0] acc [C_MAX];
  logic [TW-1:0]           ci, co;
  logic                    running;

  always_ff @(posedge clk) if (w_we) wmem[w_addr] <= w_data;

  logic [511:0] wtile;
  logic [WAW-1:0] raddr;
  assign raddr      = WAW'(co * T + ci);
  assign wtile      = wmem[raddr];
  assign in_ready   = !running;
  assign mac_active = running;

  logic last_tile;
  assign last_tile = (ci == cfg_cin_tiles - 1'b1) && (co == cfg_cout_tiles - 1'b1);

  // products of the 8x8 array for this cycle
  logic signed [ACC_W-1:0] psum [8];
  always_comb begin
    for (int o = 0; o < 8; o++) begin
      psum[o] = '0;
      for (int i = 0; i < 8; i++) begin
        logic signed [7:0] w, a;
        w = wtile[(o*8+i)*8 +: 8];
        a = x_q[(32'(ci)*8 + i)*8 +: 8];
        psum[o] = psum[o] + ACC_W'(w * a);
      end
    end
  end

  function automatic logic [7:0] sat8(input logic signed [ACC_W-1:0] v);
    logic signed [ACC_W-1:0] s;
    s = v >>> ACC_SHIFT;
    if (s > 127)       return 8'sd127;
    else if (s < -128) return 8'h80;
    else               return s[7:0];
  endfunction

  logic [C_MAX*8-1:0] result;
  logic signed [ACC_W-1:0] acc_next [C_MAX];
  always_comb begin
    for (int c = 0; c < C_MAX; c++) begin
      acc_next[c] = acc[c];
      if ((c / 8) == int'(co)) acc_next[c] = acc[c] + psum[c % 8];
      result[c*8 +: 8] = sat8(acc_next[c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      x_q       <= '0;
      ci        <= '0;
      co        <= '0;
      for (int c = 0; c < C_MAX; c++) acc[c] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (!running) begin
        if (in_valid) begin
          x_q     <= in_data;
          ci      <= '0;
          co      <= '0;
          running <= 1'b1;
          for (int c = 0; c < C_MAX; c++) acc[c] <= '0;
        end
      end else if (!last_tile || !out_valid || out_ready) begin
        for (int c = 0; c < C_MAX; c++) acc[c] <= acc_next[c];
        if (last_tile) begin
          out_data  <= result;
          out_valid <= 1'b1;
          running   <= 1'b0;
        end else if (ci == cfg_cin_tiles - 1'b1) begin
          ci <= '0;
          co <= co + 1'b1;
        end else begin
          ci <= ci + 1'b1;
        end
      end
    end
  end
endmodule
