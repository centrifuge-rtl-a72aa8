// vtop_translator: RoCC accelerator that translates a user virtual address into a
// physical address through the core's page-table walker (PTW) port.
//
// Software wrappers of physically-addressed (TileLink) accelerators call it once per
// pointer argument under Linux. The command's rs1 holds the virtual address; the
// translator sends its virtual page number to the PTW, waits for the walker's answer
// and returns {ppn, page offset} to rd. If the walk reports a page fault the
// response is all ones. Sv39 paging with 4 KiB pages is assumed (27-bit VPN,
// 44-bit PPN; the physical address is cut to PADDR_W bits). One translation is in
// flight at a time: command accepted in cycle 0, PTW request from cycle 1, response
// the cycle after the PTW answer. busy is high throughout. The document says only
// that such an accelerator exists and talks to the page-table walker; the rest is
// this design's choice.
module vtop_translator
  import centrifuge_pkg::*;
#(
  parameter int PGIDX_W = 12,
  parameter int VPN_W   = 27,
  parameter int PPN_W   = 44
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  rocc_cmd_t        cmd,
  output logic             resp_valid,
  input  logic             resp_ready,
  output rocc_resp_t       resp,
  output logic             busy,
  // page-table walker
  output logic             ptw_req_valid,
  input  logic             ptw_req_ready,
  output logic [VPN_W-1:0] ptw_req_vpn,
  input  logic             ptw_resp_valid,
  input  logic             ptw_resp_pf,
  input  logic [PPN_W-1:0] ptw_resp_ppn
);
  typedef enum logic [1:0] {T_IDLE, T_REQ, T_WAIT, T_RESP} state_t;
  state_t state;

  logic [VPN_W-1:0]   vpn_q;
  logic [PGIDX_W-1:0] off_q;
  logic [4:0]         rd_q;
  logic [XLEN-1:0]    pa_q;
  logic [PPN_W+PGIDX_W-1:0] pa_full;

  assign pa_full       = {ptw_resp_ppn, off_q};
  assign cmd_ready     = (state == T_IDLE);
  assign busy          = (state != T_IDLE);
  assign ptw_req_valid = (state == T_REQ);
  assign ptw_req_vpn   = vpn_q;
  assign resp_valid    = (state == T_RESP);
  assign resp.rd       = rd_q;
  assign resp.data     = pa_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      vpn_q <= '0;
      off_q <= '0;
      rd_q  <= '0;
      pa_q  <= '0;
    end else begin
      unique case (state)
        T_IDLE: if (cmd_valid) begin
          vpn_q <= cmd.rs1_data[PGIDX_W +: VPN_W];
          off_q <= cmd.rs1_data[PGIDX_W-1:0];
          rd_q  <= cmd.rd;
          state <= T_REQ;
        end
        T_REQ:  if (ptw_req_ready) state <= T_WAIT;
        T_WAIT: if (ptw_resp_valid) begin
          pa_q  <= ptw_resp_pf ? '1 : XLEN'(pa_full[PADDR_W-1:0]);
          state <= T_RESP;
        end
        T_RESP: if (resp_ready) state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = ^{cmd.funct, cmd.rs1, cmd.rs2, cmd.xd, cmd.xs1, cmd.xs2, cmd.opcode,
                    cmd.rs2_data, cmd.rs1_data[XLEN-1:PGIDX_W+VPN_W], pa_full[PPN_W+PGIDX_W-1:PADDR_W]};
endmodule
