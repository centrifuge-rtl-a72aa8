// nic_accel_router: Ethertype-based steering between the NIC and an accelerator's
// dedicated send/receive queue pairs.
//
// Receive side: the first HDR_FLITS flits of each packet arriving from the network
// are collected. If the packet's Ethertype equals ACCEL_ONLY, the header flits go
// to the accelerator's receive-header queue and the remaining flits to its
// receive-payload queue; otherwise the whole packet continues unchanged to the
// NIC's normal receive path. The accelerator reads both queues as streams.
// Transmit side: the accelerator writes a header (ending with last=1) into the
// send-header queue and the payload (ending with last=1) into the send-payload
// queue. Whole packets are merged with the NIC's own transmit stream by a
// round-robin arbiter that switches only between packets; the accelerator's header
// and payload leave as one packet with last only on the final payload flit.
// Flits are 64 bits. The header is 16 bytes (two flits): 2 bytes of padding, the
// destination and source MAC addresses and the Ethertype, so the Ethertype is in
// bytes 6-7 of the second flit, in network byte order. Every stream has
// valid/ready flow control; a full accelerator queue stalls the receive stream.
// The routing rule and the header/payload split follow the document; the ACCEL_ONLY
// value, flit layout, queue depths and arbitration are this design's choices.
module nic_accel_router
  import centrifuge_pkg::*;
#(
  parameter int          HDR_FLITS = 2,
  parameter int          HDR_DEPTH = 4,
  parameter int          PAY_DEPTH = 32,
  parameter logic [15:0] ACCEL_ETHTYPE = ETHTYPE_ACCEL_ONLY
) (
  input  logic      clk,
  input  logic      rst_n,
  // from the network (receive)
  input  logic      rx_in_valid,
  output logic      rx_in_ready,
  input  net_flit_t rx_in,
  // to the NIC's receive path
  output logic      rx_nic_valid,
  input  logic      rx_nic_ready,
  output net_flit_t rx_nic,
  // accelerator receive queues
  output logic      acc_rx_hdr_valid,
  input  logic      acc_rx_hdr_ready,
  output net_flit_t acc_rx_hdr,
  output logic      acc_rx_pay_valid,
  input  logic      acc_rx_pay_ready,
  output net_flit_t acc_rx_pay,
  // accelerator send queues
  input  logic      acc_tx_hdr_valid,
  output logic      acc_tx_hdr_ready,
  input  net_flit_t acc_tx_hdr,
  input  logic      acc_tx_pay_valid,
  output logic      acc_tx_pay_ready,
  input  net_flit_t acc_tx_pay,
  // NIC's own transmit stream
  input  logic      tx_nic_valid,
  output logic      tx_nic_ready,
  input  net_flit_t tx_nic,
  // to the network (transmit)
  output logic      tx_out_valid,
  input  logic      tx_out_ready,
  output net_flit_t tx_out,
  // event strobes: a packet was steered to the accelerator / to the NIC
  output logic      ev_rx_acc,
  output logic      ev_rx_nic
);
  localparam int HC_W = $clog2(HDR_FLITS + 1);

  // ------------------------------------------------------------ receive queues
  logic      rxh_enq_valid, rxh_enq_ready, rxp_enq_valid, rxp_enq_ready;
  net_flit_t rxh_enq, rxp_enq;

  sync_fifo #(.T(net_flit_t), .DEPTH(HDR_DEPTH)) u_rx_hdr_q (
    .clk, .rst_n, .enq_valid(rxh_enq_valid), .enq_ready(rxh_enq_ready), .enq_data(rxh_enq),
    .deq_valid(acc_rx_hdr_valid), .deq_ready(acc_rx_hdr_ready), .deq_data(acc_rx_hdr), .count());
  sync_fifo #(.T(net_flit_t), .DEPTH(PAY_DEPTH)) u_rx_pay_q (
    .clk, .rst_n, .enq_valid(rxp_enq_valid), .enq_ready(rxp_enq_ready), .enq_data(rxp_enq),
    .deq_valid(acc_rx_pay_valid), .deq_ready(acc_rx_pay_ready), .deq_data(acc_rx_pay), .count());

  // ------------------------------------------------------------ receive steering
  typedef enum logic [1:0] {R_COLLECT, R_EMIT, R_BODY} rstate_t;
  rstate_t          rstate;
  net_flit_t        hbuf [HDR_FLITS];
  logic [HC_W-1:0]  hcnt, hemit;
  logic             to_acc, ended;
  logic [15:0]      ethtype;
  net_flit_t        emit_flit;

  assign ethtype   = {rx_in.data[55:48], rx_in.data[63:56]};
  assign emit_flit = hbuf[hemit[HC_W-1:0] < HC_W'(HDR_FLITS) ? hemit : '0];

  always_comb begin
    rx_in_ready   = 1'b0;
    rx_nic_valid  = 1'b0;
    rx_nic        = rx_in;
    rxh_enq_valid = 1'b0;
    rxh_enq       = emit_flit;
    rxp_enq_valid = 1'b0;
    rxp_enq       = rx_in;
    unique case (rstate)
      R_COLLECT: rx_in_ready = 1'b1;
      R_EMIT: begin
        if (to_acc) begin
          rxh_enq_valid = 1'b1;
          rxh_enq.last  = (hemit == hcnt - 1'b1);
        end else begin
          rx_nic_valid = 1'b1;
          rx_nic       = emit_flit;
        end
      end
      R_BODY: begin
        if (to_acc) begin
          rxp_enq_valid = rx_in_valid;
          rx_in_ready   = rxp_enq_ready;
        end else begin
          rx_nic_valid = rx_in_valid;
          rx_in_ready  = rx_nic_ready;
        end
      end
      default: ;
    endcase
  end

  logic emit_fire;
  assign emit_fire = (rstate == R_EMIT) && (to_acc ? rxh_enq_ready : rx_nic_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate <= R_COLLECT;
      hcnt   <= '0;
      hemit  <= '0;
      to_acc <= 1'b0;
      ended  <= 1'b0;
      for (int i = 0; i < HDR_FLITS; i++) hbuf[i] <= '0;
    end else begin
      unique case (rstate)
        R_COLLECT: if (rx_in_valid) begin
          hbuf[hcnt[HC_W-1:0] < HC_W'(HDR_FLITS) ? hcnt : '0] <= rx_in;
          hcnt <= hcnt + 1'b1;
          if (hcnt == HC_W'(HDR_FLITS - 1) || rx_in.last) begin
            // a packet too short to hold a full header never goes to the accelerator
            to_acc <= (hcnt == HC_W'(HDR_FLITS - 1)) && (ethtype == ACCEL_ETHTYPE);
            ended  <= rx_in.last;
            hemit  <= '0;
            rstate <= R_EMIT;
          end
        end
        R_EMIT: if (emit_fire) begin
          hemit <= hemit + 1'b1;
          if (hemit == hcnt - 1'b1) begin
            hcnt   <= '0;
            rstate <= ended ? R_COLLECT : R_BODY;
          end
        end
        R_BODY: if (rx_in_valid && rx_in_ready && rx_in.last) rstate <= R_COLLECT;
        default: rstate <= R_COLLECT;
      endcase
    end
  end

  assign ev_rx_acc = (rstate == R_EMIT) && emit_fire && (hemit == '0) && to_acc;
  assign ev_rx_nic = (rstate == R_EMIT) && emit_fire && (hemit == '0) && !to_acc;

  // ------------------------------------------------------------ send queues
  logic      txh_valid, txh_ready, txp_valid, txp_ready;
  net_flit_t txh, txp;

  sync_fifo #(.T(net_flit_t), .DEPTH(HDR_DEPTH)) u_tx_hdr_q (
    .clk, .rst_n, .enq_valid(acc_tx_hdr_valid), .enq_ready(acc_tx_hdr_ready), .enq_data(acc_tx_hdr),
    .deq_valid(txh_valid), .deq_ready(txh_ready), .deq_data(txh), .count());
  sync_fifo #(.T(net_flit_t), .DEPTH(PAY_DEPTH)) u_tx_pay_q (
    .clk, .rst_n, .enq_valid(acc_tx_pay_valid), .enq_ready(acc_tx_pay_ready), .enq_data(acc_tx_pay),
    .deq_valid(txp_valid), .deq_ready(txp_ready), .deq_data(txp), .count());

  // ------------------------------------------------------------ transmit merge
  typedef enum logic [1:0] {T_IDLE, T_NIC, T_ACC_HDR, T_ACC_PAY} tstate_t;
  tstate_t tstate;
  logic    last_was_acc;

  always_comb begin
    tx_out_valid = 1'b0;
    tx_out       = tx_nic;
    tx_nic_ready = 1'b0;
    txh_ready    = 1'b0;
    txp_ready    = 1'b0;
    unique case (tstate)
      T_NIC: begin
        tx_out_valid = tx_nic_valid;
        tx_nic_ready = tx_out_ready;
      end
      T_ACC_HDR: begin
        tx_out_valid = txh_valid;
        tx_out       = txh;
        tx_out.last  = 1'b0;
        txh_ready    = tx_out_ready;
      end
      T_ACC_PAY: begin
        tx_out_valid = txp_valid;
        tx_out       = txp;
        txp_ready    = tx_out_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate       <= T_IDLE;
      last_was_acc <= 1'b0;
    end else begin
      unique case (tstate)
        T_IDLE: begin
          if (txh_valid && (!tx_nic_valid || !last_was_acc)) begin
            tstate       <= T_ACC_HDR;
            last_was_acc <= 1'b1;
          end else if (tx_nic_valid) begin
            tstate       <= T_NIC;
            last_was_acc <= 1'b0;
          end
        end
        T_NIC:     if (tx_out_valid && tx_out_ready && tx_nic.last) tstate <= T_IDLE;
        T_ACC_HDR: if (txh_valid && tx_out_ready && txh.last) tstate <= T_ACC_PAY;
        T_ACC_PAY: if (txp_valid && tx_out_ready && txp.last) tstate <= T_IDLE;
        default:   tstate <= T_IDLE;
      endcase
    end
  end

  // a packet on the transmit side is never cut: the stream only changes source after last
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (tx_out_valid && !tx_out_ready) |=> tx_out_valid);
endmodule
