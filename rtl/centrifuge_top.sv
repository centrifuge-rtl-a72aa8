// centrifuge_top: the accelerator integration logic of a Centrifuge-style SoC.
//
// Brings together, side by side, the shims that attach HLS-generated kernels to a
// Rocket-based SoC and the DiracDeltaNet dataflow accelerator:
//   * RoCC attachment (u_rocc_ctrl + u_rocc_mem): the accelerator controller takes
//     custom instructions from the core's RoCC command queue and runs the kernel;
//     the memory bridge serves the kernel's ap_bus ports through the core's L1
//     data-cache port in program order.
//   * Address translation (u_vtop): a RoCC accelerator that asks the page-table
//     walker for the physical address of a user pointer, used by the Linux
//     wrappers of TileLink accelerators.
//   * TileLink attachment (u_tl_ctrl): memory-mapped argument and control
//     registers of a physically-addressed kernel.
//   * Network attachment (u_nic_router): Ethertype steering between the NIC and an
//     accelerator's dedicated header/payload send and receive queues.
//   * u_ddn: the DiracDeltaNet building-block accelerator, attached like a
//     TileLink kernel: control registers on its own MMIO port, weights and maps
//     read from and written to memory through a 512-bit master port.
// The core, caches, system bus, NIC, the HLS kernels themselves and the
// TileLink-to-AXI4 bridge are outside this module; their connections are ports.
// All ports are plain signals, structs and arrays; see the submodules for timing.
module centrifuge_top
  import centrifuge_pkg::*;
#(
  parameter int NBUS     = 2,
  parameter int NARG     = 2,
  parameter int NTAGS    = 8,
  parameter int TL_NARG  = 4,
  parameter int DDN_C    = 128,
  parameter int DDN_W    = 32
) (
  input  logic               clk,
  input  logic               rst_n,

  // ---------------- RoCC accelerator: core side
  input  logic               rocc_cmd_valid,
  output logic               rocc_cmd_ready,
  input  rocc_cmd_t          rocc_cmd,
  output logic               rocc_resp_valid,
  input  logic               rocc_resp_ready,
  output rocc_resp_t         rocc_resp,
  output logic               rocc_busy,
  output logic               rocc_mem_req_valid,
  input  logic               rocc_mem_req_ready,
  output mem_req_t           rocc_mem_req,
  input  logic               rocc_mem_resp_valid,
  input  mem_resp_t          rocc_mem_resp,
  // ---------------- RoCC accelerator: HLS kernel side
  output logic               k_ap_start,
  input  logic               k_ap_done,
  input  logic               k_ap_idle,
  input  logic               k_ap_ready,
  input  logic [XLEN-1:0]    k_ap_return,
  output logic [XLEN-1:0]    k_scalar_args [NARG],
  input  logic               k_req_valid [NBUS],
  output logic               k_req_ready [NBUS],
  input  logic               k_req_write [NBUS],
  input  logic [31:0]        k_req_addr  [NBUS],
  input  logic [31:0]        k_req_size  [NBUS],
  input  logic [XLEN-1:0]    k_req_data  [NBUS],
  output logic               k_rsp_valid [NBUS],
  input  logic               k_rsp_ready [NBUS],
  output logic [XLEN-1:0]    k_rsp_data  [NBUS],
  output logic               rocc_stall_conflict,
  output logic               rocc_stall_no_tag,

  // ---------------- address translation accelerator
  input  logic               vt_cmd_valid,
  output logic               vt_cmd_ready,
  input  rocc_cmd_t          vt_cmd,
  output logic               vt_resp_valid,
  input  logic               vt_resp_ready,
  output rocc_resp_t         vt_resp,
  output logic               vt_busy,
  output logic               ptw_req_valid,
  input  logic               ptw_req_ready,
  output logic [26:0]        ptw_req_vpn,
  input  logic               ptw_resp_valid,
  input  logic               ptw_resp_pf,
  input  logic [43:0]        ptw_resp_ppn,

  // ---------------- TileLink accelerator control
  input  logic               mmio_req_valid,
  output logic               mmio_req_ready,
  input  logic               mmio_req_write,
  input  logic [11:0]        mmio_req_addr,
  input  logic [XLEN-1:0]    mmio_req_wdata,
  output logic               mmio_resp_valid,
  input  logic               mmio_resp_ready,
  output logic [XLEN-1:0]    mmio_resp_rdata,
  output logic               tl_ap_start,
  input  logic               tl_ap_done,
  input  logic               tl_ap_idle,
  input  logic               tl_ap_ready,
  input  logic [XLEN-1:0]    tl_ap_return,
  output logic [XLEN-1:0]    tl_args [TL_NARG],

  // ---------------- network-attached accelerator queues
  input  logic               net_rx_valid,
  output logic               net_rx_ready,
  input  net_flit_t          net_rx,
  output logic               nic_rx_valid,
  input  logic               nic_rx_ready,
  output net_flit_t          nic_rx,
  output logic               acc_rx_hdr_valid,
  input  logic               acc_rx_hdr_ready,
  output net_flit_t          acc_rx_hdr,
  output logic               acc_rx_pay_valid,
  input  logic               acc_rx_pay_ready,
  output net_flit_t          acc_rx_pay,
  input  logic               acc_tx_hdr_valid,
  output logic               acc_tx_hdr_ready,
  input  net_flit_t          acc_tx_hdr,
  input  logic               acc_tx_pay_valid,
  output logic               acc_tx_pay_ready,
  input  net_flit_t          acc_tx_pay,
  input  logic               nic_tx_valid,
  output logic               nic_tx_ready,
  input  net_flit_t          nic_tx,
  output logic               net_tx_valid,
  input  logic               net_tx_ready,
  output net_flit_t          net_tx,
  output logic               ev_rx_acc,
  output logic               ev_rx_nic,

  // ---------------- DiracDeltaNet accelerator
  input  logic               ddn_mmio_req_valid,
  output logic               ddn_mmio_req_ready,
  input  logic               ddn_mmio_req_write,
  input  logic [11:0]        ddn_mmio_req_addr,
  input  logic [XLEN-1:0]    ddn_mmio_req_wdata,
  output logic               ddn_mmio_resp_valid,
  input  logic               ddn_mmio_resp_ready,
  output logic [XLEN-1:0]    ddn_mmio_resp_rdata,
  output logic               ddn_mem_req_valid,
  input  logic               ddn_mem_req_ready,
  output logic               ddn_mem_req_write,
  output logic [PADDR_W-1:0] ddn_mem_req_addr,
  output logic [511:0]       ddn_mem_req_data,
  input  logic               ddn_mem_resp_valid,
  output logic               ddn_mem_resp_ready,
  input  logic [511:0]       ddn_mem_resp_data,
  output logic [2:0]         ddn_mac_active
);
  // ---------------- RoCC attachment
  logic [PADDR_W-1:0] bus_offsets [NBUS];
  logic               arg_fetch_valid, arg_fetch_ready, arg_rdy, mem_busy;
  logic [PADDR_W-1:0] arg_fetch_addr;
  logic [XLEN-1:0]    arg_vals [NARG];

  rocc_acc_ctrl #(.NARG(NARG), .NBUS(NBUS)) u_rocc_ctrl (
    .clk, .rst_n,
    .cmd_valid(rocc_cmd_valid), .cmd_ready(rocc_cmd_ready), .cmd(rocc_cmd),
    .resp_valid(rocc_resp_valid), .resp_ready(rocc_resp_ready), .resp(rocc_resp),
    .busy(rocc_busy),
    .ap_start(k_ap_start), .ap_done(k_ap_done), .ap_idle(k_ap_idle), .ap_ready(k_ap_ready),
    .ap_return(k_ap_return), .scalar_args(k_scalar_args), .bus_offsets(bus_offsets),
    .arg_fetch_valid, .arg_fetch_ready, .arg_fetch_addr, .arg_vals, .arg_rdy, .mem_busy);

  rocc_mem_bridge #(.NBUS(NBUS), .NARG(NARG), .NTAGS(NTAGS)) u_rocc_mem (
    .clk, .rst_n, .bus_offset(bus_offsets),
    .ap_req_valid(k_req_valid), .ap_req_ready(k_req_ready), .ap_req_write(k_req_write),
    .ap_req_addr(k_req_addr), .ap_req_size(k_req_size), .ap_req_data(k_req_data),
    .ap_rsp_valid(k_rsp_valid), .ap_rsp_ready(k_rsp_ready), .ap_rsp_data(k_rsp_data),
    .arg_fetch_valid, .arg_fetch_ready, .arg_fetch_addr, .arg_vals, .arg_rdy,
    .mem_req_valid(rocc_mem_req_valid), .mem_req_ready(rocc_mem_req_ready), .mem_req(rocc_mem_req),
    .mem_resp_valid(rocc_mem_resp_valid), .mem_resp(rocc_mem_resp), .mem_busy,
    .stall_conflict(rocc_stall_conflict), .stall_no_tag(rocc_stall_no_tag));

  // ---------------- address translation
  vtop_translator u_vtop (
    .clk, .rst_n,
    .cmd_valid(vt_cmd_valid), .cmd_ready(vt_cmd_ready), .cmd(vt_cmd),
    .resp_valid(vt_resp_valid), .resp_ready(vt_resp_ready), .resp(vt_resp), .busy(vt_busy),
    .ptw_req_valid, .ptw_req_ready, .ptw_req_vpn,
    .ptw_resp_valid, .ptw_resp_pf, .ptw_resp_ppn);

  // ---------------- TileLink attachment
  tl_acc_ctrl #(.NARG(TL_NARG)) u_tl_ctrl (
    .clk, .rst_n,
    .mmio_req_valid, .mmio_req_ready, .mmio_req_write, .mmio_req_addr, .mmio_req_wdata,
    .mmio_resp_valid, .mmio_resp_ready, .mmio_resp_rdata,
    .ap_start(tl_ap_start), .ap_done(tl_ap_done), .ap_idle(tl_ap_idle), .ap_ready(tl_ap_ready),
    .ap_return(tl_ap_return), .args(tl_args));

  // ---------------- network attachment
  nic_accel_router u_nic_router (
    .clk, .rst_n,
    .rx_in_valid(net_rx_valid), .rx_in_ready(net_rx_ready), .rx_in(net_rx),
    .rx_nic_valid(nic_rx_valid), .rx_nic_ready(nic_rx_ready), .rx_nic(nic_rx),
    .acc_rx_hdr_valid, .acc_rx_hdr_ready, .acc_rx_hdr,
    .acc_rx_pay_valid, .acc_rx_pay_ready, .acc_rx_pay,
    .acc_tx_hdr_valid, .acc_tx_hdr_ready, .acc_tx_hdr,
    .acc_tx_pay_valid, .acc_tx_pay_ready, .acc_tx_pay,
    .tx_nic_valid(nic_tx_valid), .tx_nic_ready(nic_tx_ready), .tx_nic(nic_tx),
    .tx_out_valid(net_tx_valid), .tx_out_ready(net_tx_ready), .tx_out(net_tx),
    .ev_rx_acc, .ev_rx_nic);

  // ---------------- DiracDeltaNet accelerator
  ddn_tl_accel #(.C_MAX(DDN_C), .W_MAX(DDN_W)) u_ddn (
    .clk, .rst_n,
    .mmio_req_valid(ddn_mmio_req_valid), .mmio_req_ready(ddn_mmio_req_ready),
    .mmio_req_write(ddn_mmio_req_write), .mmio_req_addr(ddn_mmio_req_addr),
    .mmio_req_wdata(ddn_mmio_req_wdata), .mmio_resp_valid(ddn_mmio_resp_valid),
    .mmio_resp_ready(ddn_mmio_resp_ready), .mmio_resp_rdata(ddn_mmio_resp_rdata),
    .mem_req_valid(ddn_mem_req_valid), .mem_req_ready(ddn_mem_req_ready),
    .mem_req_write(ddn_mem_req_write), .mem_req_addr(ddn_mem_req_addr),
    .mem_req_data(ddn_mem_req_data), .mem_resp_valid(ddn_mem_resp_valid),
    .mem_resp_ready(ddn_mem_resp_ready), .mem_resp_data(ddn_mem_resp_data),
    .mac_active(ddn_mac_active));
endmodule
