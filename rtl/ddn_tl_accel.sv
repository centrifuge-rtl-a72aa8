// ddn_tl_accel: the DiracDeltaNet building block as a TileLink-attached
// accelerator that loads its weights and streams its maps from memory.
//
// Software writes four argument registers through the memory-mapped control block
// (tl_acc_ctrl) and starts the accelerator:
//   ARG0  byte address of the weights: 3 units (L, R1, R2) x (c/8)^2 tiles of 64
//         bytes, unit-major, then output tile, then input tile; byte o*8+i of a
//         tile is the weight from input channel i to output channel o of the tile
//   ARG1  byte address of the input map, raster order, one pixel per
//         ceil(c/64) 64-byte beats, channel k in byte k (bytes past c are ignored)
//   ARG2  byte address of the output map, raster order, one pixel per
//         ceil(2c/64) beats, 2c interleaved channels
//   ARG3  bits 7:0 map width w, bits 15:8 channel count c (multiple of 8)
// The loader first reads every weight tile and writes it into the block's on-chip
// weight buffers, then streams the input pixels in and the output pixels out at
// the same time. When the last output write is acknowledged it pulses ap_done with
// ap_return = cycles from start to finish, so software can compute operations per
// cycle. Polling CTRL shows done; RETURN holds the cycle count.
// Memory port: 512-bit beats (the width of the system bus), one request per
// transfer, responses in request order, one per request (a write gets an empty
// acknowledge). At most MAX_OUT requests are outstanding; reads of input beats are
// issued only while the input beat buffer (IBUF beats) has room for their data.
// Output writes go ahead of input reads.
// The preloaded weights and the input loaded from DRAM into the block's FIFOs
// follow the document; the argument layout, memory layout, beat order and the
// cycle-count return value are this design's choices.
module ddn_tl_accel
  import centrifuge_pkg::*;
#(
  parameter int C_MAX       = 128,
  parameter int W_MAX       = 32,
  parameter int LFIFO_DEPTH = 32,
  parameter int MAX_OUT     = 16,
  parameter int IBUF        = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // memory-mapped control (see tl_acc_ctrl)
  input  logic               mmio_req_valid,
  output logic               mmio_req_ready,
  input  logic               mmio_req_write,
  input  logic [11:0]        mmio_req_addr,
  input  logic [XLEN-1:0]    mmio_req_wdata,
  output logic               mmio_resp_valid,
  input  logic               mmio_resp_ready,
  output logic [XLEN-1:0]    mmio_resp_rdata,
  // 512-bit memory master
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_write,
  output logic [PADDR_W-1:0] mem_req_addr,
  output logic [511:0]       mem_req_data,
  input  logic               mem_resp_valid,
  output logic               mem_resp_ready,
  input  logic [511:0]       mem_resp_data,
  output logic [2:0]         mac_active
);
  localparam int T        = C_MAX / 8;
  localparam int IN_BMAX  = (C_MAX * 8 + 511) / 512;
  localparam int OUT_BMAX = (2 * C_MAX * 8 + 511) / 512;
  localparam int WW       = $clog2(W_MAX + 1);
  localparam int CW       = $clog2(C_MAX + 1);
  localparam int NW       = $clog2(3 * T * T + 1);
  localparam int PW       = $clog2(W_MAX * W_MAX * IN_BMAX + 1);
  localparam int QW       = $clog2(W_MAX * W_MAX / 4 * OUT_BMAX + 1);
  localparam int OW       = $clog2(MAX_OUT + 1);
  localparam int IW       = $clog2(IBUF + 1);

  // ---------------- control registers and kernel handshake
  logic            ap_start, ap_done, ap_idle, ap_ready;
  logic [XLEN-1:0] ap_return;
  logic [XLEN-1:0] args [4];

  tl_acc_ctrl #(.NARG(4), .ADDR_W(12)) u_ctrl (
    .clk, .rst_n, .mmio_req_valid, .mmio_req_ready, .mmio_req_write, .mmio_req_addr,
    .mmio_req_wdata, .mmio_resp_valid, .mmio_resp_ready, .mmio_resp_rdata,
    .ap_start, .ap_done, .ap_idle, .ap_ready, .ap_return, .args);

  typedef enum logic [2:0] {S_IDLE, S_WLOAD, S_RUN, S_DONE} state_t;
  state_t state;

  logic [PADDR_W-1:0] wbase, ibase, obase;
  logic [WW-1:0]      cfg_w;
  logic [CW-1:0]      cfg_c;
  logic [$clog2(T+1)-1:0] ct;
  logic [NW-1:0]      n_wt;                // weight tiles: 3 * ct^2
  logic [PW-1:0]      n_in;                // input beats: w^2 * in_beats
  logic [QW-1:0]      n_ob;                // output beats: (w/2)^2 * out_beats
  logic [1:0]         in_beats;
  logic [2:0]         out_beats;
  logic [31:0]        cycles;

  // ---------------- memory request/response bookkeeping
  logic [NW-1:0] w_iss, w_got;             // weight tiles issued / received
  logic [PW-1:0] r_iss;                    // input beats issued
  logic [QW-1:0] o_iss, o_ack;             // output beats written / acknowledged
  logic [OW-1:0] outst;                    // outstanding requests
  logic [IW-1:0] rd_outst;                 // outstanding input reads
  logic          typ_q [MAX_OUT];          // in-order record: 1 = write
  logic [$clog2(MAX_OUT)-1:0] typ_wp, typ_rp;

  // input beat buffer
  logic [511:0]  ibuf_q [IBUF];
  logic [$clog2(IBUF)-1:0] ib_wp, ib_rp;
  logic [IW-1:0] ib_cnt;

  // pixel assembly and output staging
  logic [IN_BMAX*512-1:0]  pix;             // padded to whole beats
  logic [1:0]           pix_beat;
  logic                 pix_valid;
  logic [OUT_BMAX*512-1:0] obuf;            // padded to whole beats
  logic [2:0]           ob_beat;
  logic                 obuf_valid;

  // ---------------- the DiracDeltaNet block
  logic                     w_we;
  logic [1:0]               w_unit;
  logic [$clog2(T*T)-1:0]   w_addr;
  logic                     d_in_ready, d_out_valid, d_out_ready;
  logic [2*C_MAX*8-1:0]     d_out_data;

  ddn_block #(.C_MAX(C_MAX), .W_MAX(W_MAX), .LFIFO_DEPTH(LFIFO_DEPTH)) u_ddn (
    .clk, .rst_n, .cfg_w, .cfg_c, .w_we, .w_unit, .w_addr, .w_data(mem_resp_data),
    .in_valid(pix_valid), .in_ready(d_in_ready), .in_data(pix[C_MAX*8-1:0]),
    .out_valid(d_out_valid), .out_ready(d_out_ready), .out_data(d_out_data), .mac_active);

  assign d_out_ready = !obuf_valid;

  // ---------------- request selection: output writes first, then reads
  logic want_w, want_r, issue, typ_head;
  assign want_w = (state == S_RUN) && obuf_valid;
  assign want_r = ((state == S_WLOAD) && (w_iss < n_wt)) ||
                  ((state == S_RUN) && (r_iss < n_in) &&
                   (IW'(rd_outst) + ib_cnt < IW'(IBUF)));
  assign mem_req_valid = (outst < OW'(MAX_OUT)) && (want_w || want_r);
  assign mem_req_write = want_w;
  always_comb begin
    if (want_w)
      mem_req_addr = obase + PADDR_W'({o_iss, 6'b0});
    else if (state == S_WLOAD)
      mem_req_addr = wbase + PADDR_W'({w_iss, 6'b0});
    else
      mem_req_addr = ibase + PADDR_W'({r_iss, 6'b0});
    mem_req_data = obuf[ob_beat * 512 +: 512];
  end
  assign issue          = mem_req_valid && mem_req_ready;
  assign mem_resp_ready = 1'b1;
  assign typ_head       = typ_q[typ_rp];

  // weight write into the block: tile index -> (unit, out tile, in tile)
  logic [NW-1:0] wt_in_unit, wt_co, wt_ci;
  always_comb begin
    logic [NW-1:0] per_unit;
    per_unit   = NW'(ct) * NW'(ct);
    w_unit     = (w_got >= 2 * per_unit) ? 2'd2 : (w_got >= per_unit) ? 2'd1 : 2'd0;
    wt_in_unit = w_got - NW'(w_unit) * per_unit;
    wt_co      = (ct != 0) ? wt_in_unit / NW'(ct) : '0;
    wt_ci      = wt_in_unit - wt_co * NW'(ct);
    w_addr     = ($clog2(T*T))'(wt_co * NW'(T) + wt_ci);
    w_we       = (state == S_WLOAD) && mem_resp_valid;
  end

  // pixel beat taken from the input buffer, with channels past c cleared
  logic          ib_pop;
  logic [511:0]  ib_beat;
  always_comb begin
    ib_pop  = (ib_cnt != 0) && !pix_valid;
    ib_beat = ibuf_q[ib_rp];
    for (int b = 0; b < 64; b++)
      if (int'(pix_beat) * 64 + b >= int'(cfg_c)) ib_beat[b*8 +: 8] = 8'h0;
  end

  // storage without reset: written before it is read
  always_ff @(posedge clk) begin
    if (issue) typ_q[typ_wp] <= mem_req_write;
    if (mem_resp_valid && !typ_head && state == S_RUN) ibuf_q[ib_wp] <= mem_resp_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ap_ready <= 1'b0; ap_done <= 1'b0; ap_return <= '0;
      wbase <= '0; ibase <= '0; obase <= '0; cfg_w <= '0; cfg_c <= '0; ct <= '0;
      n_wt <= '0; n_in <= '0; n_ob <= '0; in_beats <= '0; out_beats <= '0; cycles <= '0;
      w_iss <= '0; w_got <= '0; r_iss <= '0; o_iss <= '0; o_ack <= '0;
      outst <= '0; rd_outst <= '0; typ_wp <= '0; typ_rp <= '0;
      ib_wp <= '0; ib_rp <= '0; ib_cnt <= '0;
      pix <= '0; pix_beat <= '0; pix_valid <= 1'b0;
      obuf <= '0; ob_beat <= '0; obuf_valid <= 1'b0;
    end else begin
      ap_ready <= 1'b0;
      ap_done  <= 1'b0;
      if (state != S_IDLE) cycles <= cycles + 1;

      // in-order responses
      if (mem_resp_valid) begin
        typ_rp <= typ_rp + 1'b1;
        if (typ_head) o_ack <= o_ack + 1'b1;
        else if (state == S_WLOAD) w_got <= w_got + 1'b1;
      end
      if (issue) typ_wp <= typ_wp + 1'b1;
      outst <= outst + OW'(issue) - OW'(mem_resp_valid);
      rd_outst <= rd_outst + IW'(issue && !mem_req_write && state == S_RUN)
                           - IW'(mem_resp_valid && !typ_head && state == S_RUN);

      // input beat buffer
      if (mem_resp_valid && !typ_head && state == S_RUN) ib_wp <= ib_wp + 1'b1;
      if (ib_pop) ib_rp <= ib_rp + 1'b1;
      ib_cnt <= ib_cnt + IW'(mem_resp_valid && !typ_head && state == S_RUN) - IW'(ib_pop);

      // pixel assembly
      if (pix_valid && d_in_ready) pix_valid <= 1'b0;
      if (ib_pop) begin
        pix[pix_beat * 512 +: 512] <= ib_beat;
        if (pix_beat == in_beats - 1) begin pix_beat <= '0; pix_valid <= 1'b1; end
        else pix_beat <= pix_beat + 1'b1;
      end

      // output staging
      if (d_out_valid && d_out_ready) begin obuf <= (OUT_BMAX*512)'(d_out_data); obuf_valid <= 1'b1; end
      if (issue && mem_req_write) begin
        o_iss <= o_iss + 1'b1;
        if (ob_beat == out_beats - 1) begin ob_beat <= '0; obuf_valid <= 1'b0; end
        else ob_beat <= ob_beat + 1'b1;
      end
      if (issue && !mem_req_write) begin
        if (state == S_WLOAD) w_iss <= w_iss + 1'b1;
        else r_iss <= r_iss + 1'b1;
      end

      unique case (state)
        S_IDLE: if (ap_start && !ap_ready) begin
          ap_ready  <= 1'b1;
          wbase     <= args[0][PADDR_W-1:0];
          ibase     <= args[1][PADDR_W-1:0];
          obase     <= args[2][PADDR_W-1:0];
          cfg_w     <= WW'(args[3][7:0]);
          cfg_c     <= CW'(args[3][15:8]);
          ct        <= ($clog2(T+1))'(args[3][15:11]);
          n_wt      <= NW'(3 * int'(args[3][15:11]) * int'(args[3][15:11]));
          in_beats  <= 2'((int'(args[3][15:8]) + 63) / 64);
          out_beats <= 3'((2 * int'(args[3][15:8]) + 63) / 64);
          n_in      <= PW'(int'(args[3][7:0]) * int'(args[3][7:0]) * ((int'(args[3][15:8]) + 63) / 64));
          n_ob      <= QW'((int'(args[3][7:0]) / 2) * (int'(args[3][7:0]) / 2) * ((2 * int'(args[3][15:8]) + 63) / 64));
          cycles    <= '0;
          w_iss <= '0; w_got <= '0; r_iss <= '0; o_iss <= '0; o_ack <= '0;
          state     <= S_WLOAD;
        end
        S_WLOAD: if (w_got == n_wt && outst == 0) state <= S_RUN;
        S_RUN:   if (o_ack == n_ob && o_iss == n_ob && outst == 0) state <= S_DONE;
        S_DONE: begin
          ap_done   <= 1'b1;
          ap_return <= XLEN'(cycles);
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
  assign ap_idle = (state == S_IDLE);

  // responses never exceed requests, and the input buffer never overflows
  a_no_stray_resp: assert property (@(posedge clk) disable iff (!rst_n) mem_resp_valid |-> outst != 0);
  a_ibuf_room:     assert property (@(posedge clk) disable iff (!rst_n) ib_cnt <= IW'(IBUF));
endmodule
