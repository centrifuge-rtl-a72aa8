// ddn_shift: the shift operation that, with 1x1 convolutions, replaces 3x3
// convolutions in DiracDeltaNet.
//
// Every channel is moved by one pixel in one of nine directions: channel c uses
// direction g = c mod 9, with row offset dy = g/3 - 1 and column offset
// dx = g%3 - 1, so out(y, x, c) = in(y+dy, x+dx, c), and zero where that falls
// outside the map. The input map (cfg_w x cfg_w, up to W_MAX) is written into a
// frame buffer in raster order; output pixel (y, x) is produced as soon as input
// pixel (min(y+1,last), min(x+1,last)) has arrived, reading the nine neighbouring
// pixels from the buffer. One frame is held at a time: a new map is accepted once
// the last output of the previous one has been produced.
// Timing: one output per cycle once its inputs are present; latency about one row.
// The direction assignment and the zero padding are this design's choices.
module ddn_shift #(
  parameter int C_MAX = 128,
  parameter int W_MAX = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(W_MAX+1)-1:0] cfg_w,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [C_MAX*8-1:0]       in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [C_MAX*8-1:0]       out_data
);
  localparam int WW = $clog2(W_MAX + 1);
  localparam int NW = $clog2(W_MAX * W_MAX + 1);

  logic [C_MAX*8-1:0] fb [W_MAX*W_MAX];
  logic [NW-1:0]      rcv, oidx;
  logic [WW-1:0]      oy, ox;
  logic [NW-1:0]      npix;

  assign npix     = NW'(cfg_w) * NW'(cfg_w);
  assign in_ready = (rcv != npix);

  always_ff @(posedge clk) if (in_valid && in_ready) fb[rcv] <= in_data;

  // the output pixel may go once its lower-right neighbour (clamped) is present
  logic [WW-1:0] ny, nx;
  logic [NW-1:0] need;
  assign ny   = (oy == cfg_w - 1'b1) ? oy : oy + 1'b1;
  assign nx   = (ox == cfg_w - 1'b1) ? ox : ox + 1'b1;
  assign need = NW'(ny) * NW'(cfg_w) + NW'(nx);

  logic ready_px, fire;
  assign ready_px = (rcv > need) && (oidx != npix);
  assign fire     = ready_px && (!out_valid || out_ready);

  logic [C_MAX*8-1:0] nb [9];
  logic               nb_ok [9];
  always_comb begin
    for (int g = 0; g < 9; g++) begin
      int sy, sx;
      sy = int'(oy) + g / 3 - 1;
      sx = int'(ox) + g % 3 - 1;
      nb_ok[g] = (sy >= 0) && (sx >= 0) && (sy < int'(cfg_w)) && (sx < int'(cfg_w));
      nb[g]    = nb_ok[g] ? fb[NW'(sy * int'(cfg_w) + sx)] : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcv       <= '0;
      oidx      <= '0;
      oy        <= '0;
      ox        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) rcv <= rcv + 1'b1;
      if (fire) begin
        for (int c = 0; c < C_MAX; c++) out_data[c*8 +: 8] <= nb[c % 9][c*8 +: 8];
        out_valid <= 1'b1;
        if (oidx == npix - 1'b1) begin
          // frame done: release the buffer for the next map
          oidx <= '0;
          oy   <= '0;
          ox   <= '0;
          rcv  <= (in_valid && in_ready) ? NW'(1) : '0;
        end else begin
          oidx <= oidx + 1'b1;
          if (ox == cfg_w - 1'b1) begin
            ox <= '0;
            oy <= oy + 1'b1;
          end else begin
            ox <= ox + 1'b1;
          end
        end
      end
    end
  end
endmodule
