// rocc_acc_ctrl: accelerator controller between a RoCC command queue and an HLS
// accelerator with the ap_ctrl_hs block protocol.
//
// One custom RISC-V instruction is one call of the accelerated C function. Its
// funct7 field selects how arguments arrive:
//   FUNCT_CALL     (0): rs1 and rs2 are arguments 0 and 1.
//   FUNCT_CALL_MEM (1): rs1 is the address of a block of NARG 64-bit arguments,
//                       which the memory bridge loads into its argument registers;
//                       the call starts when the bridge raises arg_rdy.
// The argument values are driven on scalar_args; the argument that carries the
// base address of ap_bus port b (parameter BUS_ARG[b]) also becomes bus_offsets[b].
// The controller then holds ap_start until ap_ready, waits for the ap_done pulse
// and captures ap_return, waits until the memory bridge reports no queued or
// outstanding memory operation (mem_busy low), and, if the instruction has a
// destination register (xd), returns ap_return to rd through the response queue.
// busy is high from the accepted command until the call is complete, so the
// core's fences after the instruction wait for it.
// Sequence per call: 1 cycle to accept, ap_start from the next cycle, response one
// cycle after mem_busy falls following ap_done. Command and response follow the
// RoCC interface of the document's Figure 2; the funct7 encodings, BUS_ARG mapping
// and the memory-argument mode are this design's reading of its Figure 3.
module rocc_acc_ctrl
  import centrifuge_pkg::*;
#(
  parameter int          NARG = 2,
  parameter int          NBUS = 2,
  parameter int unsigned BUS_ARG [NBUS] = '{0, 1}
) (
  input  logic               clk,
  input  logic               rst_n,
  // RoCC
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  rocc_cmd_t          cmd,
  output logic               resp_valid,
  input  logic               resp_ready,
  output rocc_resp_t         resp,
  output logic               busy,
  // HLS block-level control
  output logic               ap_start,
  input  logic               ap_done,
  input  logic               ap_idle,
  input  logic               ap_ready,
  input  logic [XLEN-1:0]    ap_return,
  output logic [XLEN-1:0]    scalar_args [NARG],
  output logic [PADDR_W-1:0] bus_offsets [NBUS],
  // memory bridge
  output logic               arg_fetch_valid,
  input  logic               arg_fetch_ready,
  output logic [PADDR_W-1:0] arg_fetch_addr,
  input  logic [XLEN-1:0]    arg_vals [NARG],
  input  logic               arg_rdy,
  input  logic               mem_busy
);
  localparam logic [6:0] FUNCT_CALL     = 7'd0;
  localparam logic [6:0] FUNCT_CALL_MEM = 7'd1;

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_WAITARG, S_START, S_RUN, S_DRAIN, S_RESP} state_t;
  state_t state;

  logic [4:0]      rd_q;
  logic            xd_q;
  logic [XLEN-1:0] args_q [NARG];
  logic [XLEN-1:0] ret_q;
  logic [PADDR_W-1:0] fetch_addr_q;

  assign cmd_ready       = (state == S_IDLE);
  assign busy            = (state != S_IDLE);
  assign ap_start        = (state == S_START);
  assign arg_fetch_valid = (state == S_FETCH);
  assign arg_fetch_addr  = fetch_addr_q;
  assign resp_valid      = (state == S_RESP);
  assign resp.rd         = rd_q;
  assign resp.data       = ret_q;

  for (genvar a = 0; a < NARG; a++) begin : g_args
    assign scalar_args[a] = args_q[a];
  end
  for (genvar b = 0; b < NBUS; b++) begin : g_offs
    assign bus_offsets[b] = args_q[BUS_ARG[b]][PADDR_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      rd_q         <= '0;
      xd_q         <= 1'b0;
      ret_q        <= '0;
      fetch_addr_q <= '0;
      for (int a = 0; a < NARG; a++) args_q[a] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          rd_q <= cmd.rd;
          xd_q <= cmd.xd;
          if (cmd.funct == FUNCT_CALL_MEM) begin
            fetch_addr_q <= cmd.rs1_data[PADDR_W-1:0];
            state        <= S_FETCH;
          end else begin
            args_q[0] <= cmd.rs1_data;
            if (NARG > 1) args_q[NARG > 1 ? 1 : 0] <= cmd.rs2_data;
            state <= S_START;
          end
        end
        S_FETCH:   if (arg_fetch_ready) state <= S_WAITARG;
        S_WAITARG: if (arg_rdy) begin
          for (int a = 0; a < NARG; a++) args_q[a] <= arg_vals[a];
          state <= S_START;
        end
        S_START: if (ap_ready) begin
          if (ap_done) begin
            ret_q <= ap_return;
            state <= S_DRAIN;
          end else begin
            state <= S_RUN;
          end
        end
        S_RUN: if (ap_done) begin
          ret_q <= ap_return;
          state <= S_DRAIN;
        end
        S_DRAIN: if (!mem_busy) state <= xd_q ? S_RESP : S_IDLE;
        S_RESP:  if (resp_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // the command's funct7 must be one of the two call encodings
  a_funct: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_valid && cmd_ready) |-> (cmd.funct == FUNCT_CALL || cmd.funct == FUNCT_CALL_MEM));
  // a response is held until it is taken
  a_resp_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (resp_valid && !resp_ready) |=> resp_valid);

  logic unused;
  assign unused = ap_idle;
endmodule
