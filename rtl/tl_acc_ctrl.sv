// tl_acc_ctrl: memory-mapped control block of a TileLink-attached accelerator.
//
// Software starts a physically-addressed accelerator by storing its arguments to
// memory-mapped registers, setting ap_start and polling for completion. This block
// is the slave side of those stores and loads, on a simple request/response MMIO
// port (one 64-bit register per access) that stands for the TileLink-to-AXI4-Lite
// path. Register map (byte offsets):
//   0x00 CTRL   bit0 ap_start (write 1 to start, reads 1 until the kernel takes it)
//               bit1 ap_done  (set by the ap_done pulse, cleared when CTRL is read)
//               bit2 ap_idle, bit3 ap_ready (live status)
//   0x08 RETURN ap_return captured at ap_done
//   0x10 + 8*i  ARG i, i = 0 .. NARG-1 (pointer arguments are physical addresses)
// A request is answered one cycle after it is accepted; writes get an empty
// response. ap_start is held until ap_ready, as in the ap_ctrl_hs protocol.
// The control bit layout follows the usual HLS AXI4-Lite control register; the
// 64-bit register stride and the handshake are this design's choices. The kernel's
// AXI4 master goes to the system bus through a TileLink bridge outside this block.
module tl_acc_ctrl
  import centrifuge_pkg::*;
#(
  parameter int NARG   = 4,
  parameter int ADDR_W = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mmio_req_valid,
  output logic              mmio_req_ready,
  input  logic              mmio_req_write,
  input  logic [ADDR_W-1:0] mmio_req_addr,
  input  logic [XLEN-1:0]   mmio_req_wdata,
  output logic              mmio_resp_valid,
  input  logic              mmio_resp_ready,
  output logic [XLEN-1:0]   mmio_resp_rdata,
  // HLS block-level control
  output logic              ap_start,
  input  logic              ap_done,
  input  logic              ap_idle,
  input  logic              ap_ready,
  input  logic [XLEN-1:0]   ap_return,
  output logic [XLEN-1:0]   args [NARG]
);
  localparam logic [ADDR_W-1:0] A_CTRL = 'h00;
  localparam logic [ADDR_W-1:0] A_RET  = 'h08;
  localparam logic [ADDR_W-1:0] A_ARG0 = 'h10;

  logic            start_q, done_q;
  logic [XLEN-1:0] ret_q;
  logic            accept;
  logic [ADDR_W-1:0] arg_off;

  assign mmio_req_ready = !mmio_resp_valid || mmio_resp_ready;
  assign accept         = mmio_req_valid && mmio_req_ready;
  assign ap_start       = start_q;
  assign arg_off        = mmio_req_addr - A_ARG0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q         <= 1'b0;
      done_q          <= 1'b0;
      ret_q           <= '0;
      mmio_resp_valid <= 1'b0;
      mmio_resp_rdata <= '0;
      for (int i = 0; i < NARG; i++) args[i] <= '0;
    end else begin
      if (mmio_resp_valid && mmio_resp_ready) mmio_resp_valid <= 1'b0;
      if (ap_ready) start_q <= 1'b0;
      if (ap_done) begin
        done_q <= 1'b1;
        ret_q  <= ap_return;
      end
      if (accept) begin
        mmio_resp_valid <= 1'b1;
        mmio_resp_rdata <= '0;
        if (mmio_req_write) begin
          if (mmio_req_addr == A_CTRL && mmio_req_wdata[0]) start_q <= 1'b1;
          for (int i = 0; i < NARG; i++)
            if (mmio_req_addr >= A_ARG0 && arg_off[ADDR_W-1:3] == (ADDR_W-3)'(i) && arg_off[2:0] == 3'd0)
              args[i] <= mmio_req_wdata;
        end else begin
          if (mmio_req_addr == A_CTRL) begin
            mmio_resp_rdata <= XLEN'({ap_ready, ap_idle, done_q, start_q});
            if (!ap_done) done_q <= 1'b0;     // clear on read
          end else if (mmio_req_addr == A_RET) begin
            mmio_resp_rdata <= ret_q;
          end else begin
            for (int i = 0; i < NARG; i++)
              if (mmio_req_addr >= A_ARG0 && arg_off[ADDR_W-1:3] == (ADDR_W-3)'(i) && arg_off[2:0] == 3'd0)
                mmio_resp_rdata <= args[i];
          end
        end
      end
    end
  end
endmodule
