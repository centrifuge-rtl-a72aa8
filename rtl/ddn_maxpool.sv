// ddn_maxpool: 2x2 max pooling with stride 2 over a raster-order pixel stream.
//
// Input pixels of a cfg_w x cfg_w map (cfg_w even, up to W_MAX) arrive one per
// transfer, each a vector of C_MAX signed 8-bit channels. On even rows the
// channel-wise maximum of each horizontal pair is kept in a line buffer of
// cfg_w/2 entries; on odd rows the pair maximum is combined with the buffered one
// and a (cfg_w/2 x cfg_w/2) output pixel is produced at every odd column.
// One input pixel per cycle; the output register is one deep and a full register
// stalls the input only at the pixel that would produce the next output.
// Pool size and stride are this design's choice; the document names the unit.
module ddn_maxpool #(
  parameter int C_MAX = 128,
  parameter int W_MAX = 32
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

  logic [C_MAX*8-1:0] line [W_MAX/2];
  logic [C_MAX*8-1:0] hold;
  logic [WW-1:0]      col, row;

  function automatic logic [C_MAX*8-1:0] vmax(input logic [C_MAX*8-1:0] a, input logic [C_MAX*8-1:0] b);
    for (int c = 0; c < C_MAX; c++)
      vmax[c*8 +: 8] = ($signed(a[c*8 +: 8]) > $signed(b[c*8 +: 8])) ? a[c*8 +: 8] : b[c*8 +: 8];
  endfunction

  logic emits, fire;
  logic [C_MAX*8-1:0] pair;
  assign pair     = vmax(hold, in_data);
  assign emits    = row[0] && col[0];
  assign in_ready = !emits || !out_valid || out_ready;
  assign fire     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      hold      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        if (!col[0]) hold <= in_data;
        else if (!row[0]) line[col[WW-1:1]] <= pair;
        else begin
          out_data  <= vmax(line[col[WW-1:1]], pair);
          out_valid <= 1'b1;
        end
        if (col == cfg_w - 1'b1) begin
          col <= '0;
          row <= (row == cfg_w - 1'b1) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end
endmodule
