// ddn_block: spatial dataflow accelerator for one DiracDeltaNet building block.
//
// Every layer of the block has its own hardware unit and the units are chained
// by FIFOs, so each starts work as soon as data arrives:
//
//   input --Split--+--> max pool --> 1x1 conv (L) ------------> FIFO --+
//                  |                                                   +--> concat & shuffle --> output
//                  +--> 1x1 conv (R1) --> max pool --> shift --> 1x1 conv (R2) --+
//
// Input pixels (raster order, cfg_w x cfg_w, cfg_c channels of signed 8 bits,
// packed in a C_MAX-channel vector) are fanned out to both branches (Split). Each
// branch ends at cfg_w/2 x cfg_w/2 with cfg_c channels. Concat & shuffle joins a
// pixel from each branch and interleaves them into 2*cfg_c channels: output
// channel 2k is channel k of the left branch, channel 2k+1 is channel k of the
// right branch (channel shuffle with two groups).
// Each 1x1 convolution runs on its own 8x8 MAC array (ddn_conv1x1) with
// preloaded weights: w_unit selects the unit (0 = L, 1 = R1, 2 = R2), w_addr the
// 8x8 tile. cfg_c must be a multiple of 8 and cfg_w a multiple of 4.
// Timing: the R1 convolution is the slowest stage, (cfg_c/8)^2 + 1 cycles per
// input pixel. The left FIFO holds LFIFO_DEPTH pixels so the left branch can run
// ahead by the one-row delay of the shift stage without blocking Split.
// The unit list, the three 8x8 MAC units, the preloaded weights and the FIFO
// chaining follow the document; all number formats, sizes, the split as a copy
// and the shuffle pattern are this design's choices.
module ddn_block #(
  parameter int C_MAX       = 128,
  parameter int W_MAX       = 32,
  parameter int LFIFO_DEPTH = 32,
  parameter int ACC_SHIFT   = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(W_MAX+1)-1:0] cfg_w,
  input  logic [$clog2(C_MAX+1)-1:0] cfg_c,
  // weight preload
  input  logic                     w_we,
  input  logic [1:0]               w_unit,
  input  logic [$clog2((C_MAX/8)*(C_MAX/8))-1:0] w_addr,
  input  logic [511:0]             w_data,
  // input feature map
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [C_MAX*8-1:0]       in_data,
  // output feature map
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [2*C_MAX*8-1:0]     out_data,
  // activity of the three MAC arrays
  output logic [2:0]               mac_active
);
  localparam int VW = C_MAX * 8;
  localparam int TW = $clog2(C_MAX/8 + 1);

  logic [TW-1:0] tiles;
  logic [$clog2(W_MAX+1)-1:0] half_w;
  assign tiles  = TW'(cfg_c >> 3);
  assign half_w = cfg_w >> 1;

  // Split: a pixel is taken when both branches can take it
  logic l_in_ready, r_in_ready;
  assign in_ready = l_in_ready && r_in_ready;

  // ---------------- left branch
  logic          lp_valid, lp_ready;  logic [VW-1:0] lp_data;
  logic          lc_valid, lc_ready;  logic [VW-1:0] lc_data;
  logic          lf_valid, lf_ready;  logic [VW-1:0] lf_data;

  ddn_maxpool #(.C_MAX(C_MAX), .W_MAX(W_MAX)) u_l_pool (
    .clk, .rst_n, .cfg_w(cfg_w),
    .in_valid(in_valid && r_in_ready), .in_ready(l_in_ready), .in_data(in_data),
    .out_valid(lp_valid), .out_ready(lp_ready), .out_data(lp_data));

  ddn_conv1x1 #(.C_MAX(C_MAX), .ACC_SHIFT(ACC_SHIFT)) u_l_conv (
    .clk, .rst_n, .cfg_cin_tiles(tiles), .cfg_cout_tiles(tiles),
    .w_we(w_we && w_unit == 2'd0), .w_addr, .w_data,
    .in_valid(lp_valid), .in_ready(lp_ready), .in_data(lp_data),
    .out_valid(lc_valid), .out_ready(lc_ready), .out_data(lc_data),
    .mac_active(mac_active[0]));

  sync_fifo #(.T(logic [VW-1:0]), .DEPTH(LFIFO_DEPTH)) u_l_fifo (
    .clk, .rst_n, .enq_valid(lc_valid), .enq_ready(lc_ready), .enq_data(lc_data),
    .deq_valid(lf_valid), .deq_ready(lf_ready), .deq_data(lf_data), .count());

  // ---------------- right branch
  logic          r1_valid, r1_ready;  logic [VW-1:0] r1_data;
  logic          rp_valid, rp_ready;  logic [VW-1:0] rp_data;
  logic          rs_valid, rs_ready;  logic [VW-1:0] rs_data;
  logic          r2_valid, r2_ready;  logic [VW-1:0] r2_data;

  ddn_conv1x1 #(.C_MAX(C_MAX), .ACC_SHIFT(ACC_SHIFT)) u_r_conv1 (
    .clk, .rst_n, .cfg_cin_tiles(tiles), .cfg_cout_tiles(tiles),
    .w_we(w_we && w_unit == 2'd1), .w_addr, .w_data,
    .in_valid(in_valid && l_in_ready), .in_ready(r_in_ready), .in_data(in_data),
    .out_valid(r1_valid), .out_ready(r1_ready), .out_data(r1_data),
    .mac_active(mac_active[1]));

  ddn_maxpool #(.C_MAX(C_MAX), .W_MAX(W_MAX)) u_r_pool (
    .clk, .rst_n, .cfg_w(cfg_w),
    .in_valid(r1_valid), .in_ready(r1_ready), .in_data(r1_data),
    .out_valid(rp_valid), .out_ready(rp_ready), .out_data(rp_data));

  ddn_shift #(.C_MAX(C_MAX), .W_MAX(W_MAX/2)) u_r_shift (
    .clk, .rst_n, .cfg_w(half_w[$clog2(W_MAX/2+1)-1:0]),
    .in_valid(rp_valid), .in_ready(rp_ready), .in_data(rp_data),
    .out_valid(rs_valid), .out_ready(rs_ready), .out_data(rs_data));

  ddn_conv1x1 #(.C_MAX(C_MAX), .ACC_SHIFT(ACC_SHIFT)) u_r_conv2 (
    .clk, .rst_n, .cfg_cin_tiles(tiles), .cfg_cout_tiles(tiles),
    .w_we(w_we && w_unit == 2'd2), .w_addr, .w_data,
    .in_valid(rs_valid), .in_ready(rs_ready), .in_data(rs_data),
    .out_valid(r2_valid), .out_ready(r2_ready), .out_data(r2_data),
    .mac_active(mac_active[2]));

  // ---------------- concat & shuffle
  assign out_valid = lf_valid && r2_valid;
  assign lf_ready  = out_valid && out_ready;
  assign r2_ready  = out_valid && out_ready;
  always_comb begin
    for (int k = 0; k < C_MAX; k++) begin
      out_data[(2*k)*8   +: 8] = lf_data[k*8 +: 8];
      out_data[(2*k+1)*8 +: 8] = r2_data[k*8 +: 8];
    end
  end
endmodule
