// tb_nic_accel_router: self-checking test of the Ethertype router and the
// accelerator send/receive queues.
//
// Random packets (2 to 12 flits, random Ethertype, a share of them ACCEL_ONLY, and
// some shorter than a header) are sent in from the network with random gaps while
// the NIC and accelerator sinks apply random back-pressure. A scoreboard predicts
// where every flit must appear: ACCEL_ONLY packets as two header flits (last on the
// second) in the receive-header queue and the rest in the receive-payload queue,
// all other packets unchanged on the NIC receive path. On the transmit side the
// accelerator queues packets while the NIC sends its own; the merged stream must
// carry each packet whole and unchanged, with no interleaving.
module tb_nic_accel_router;
  import centrifuge_pkg::*;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic rx_in_valid, rx_in_ready, rx_nic_valid, rx_nic_ready;
  logic acc_rx_hdr_valid, acc_rx_hdr_ready, acc_rx_pay_valid, acc_rx_pay_ready;
  logic acc_tx_hdr_valid, acc_tx_hdr_ready, acc_tx_pay_valid, acc_tx_pay_ready;
  logic tx_nic_valid, tx_nic_ready, tx_out_valid, tx_out_ready, ev_rx_acc, ev_rx_nic;
  net_flit_t rx_in, rx_nic, acc_rx_hdr, acc_rx_pay, acc_tx_hdr, acc_tx_pay, tx_nic, tx_out;

  nic_accel_router dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  net_flit_t exp_nic [$], exp_hdr [$], exp_pay [$], exp_tx [$];
  int n_acc_pkts = 0, n_nic_pkts = 0, ev_acc = 0, ev_nic = 0;

  function automatic net_flit_t mk(input logic [63:0] d, input bit last);
    mk.data = d; mk.keep = 8'hFF; mk.last = last;
  endfunction

  // ---------------- receive: sinks check against the scoreboard
  always @(negedge clk) begin
    rx_nic_ready     <= ($urandom % 4) != 0;
    acc_rx_hdr_ready <= ($urandom % 3) != 0;
    acc_rx_pay_ready <= ($urandom % 3) != 0;
    tx_out_ready     <= ($urandom % 4) != 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (ev_rx_acc) ev_acc++;
    if (ev_rx_nic) ev_nic++;
    if (rx_nic_valid && rx_nic_ready) begin
      check(exp_nic.size() > 0 && rx_nic == exp_nic[0], "NIC receive flit");
      if (exp_nic.size() > 0) void'(exp_nic.pop_front());
    end
    if (acc_rx_hdr_valid && acc_rx_hdr_ready) begin
      check(exp_hdr.size() > 0 && acc_rx_hdr == exp_hdr[0], "accelerator header flit");
      if (exp_hdr.size() > 0) void'(exp_hdr.pop_front());
    end
    if (acc_rx_pay_valid && acc_rx_pay_ready) begin
      check(exp_pay.size() > 0 && acc_rx_pay == exp_pay[0], "accelerator payload flit");
      if (exp_pay.size() > 0) void'(exp_pay.pop_front());
    end
  end

  task automatic send_rx(input int len, input bit accel, input int id);
    for (int i = 0; i < len; i++) begin
      logic [63:0] d;
      net_flit_t f;
      d = {16'(id), 16'(i), 32'($urandom)};
      if (i == 1) begin
        logic [15:0] et;
        et = accel ? ETHTYPE_ACCEL_ONLY : 16'h0800;
        d[63:48] = {et[7:0], et[15:8]};
      end
      f = mk(d, i == len - 1);
      if (accel && len >= 2) begin
        if (i < 2) begin net_flit_t h; h = f; h.last = (i == 1); exp_hdr.push_back(h); end
        else exp_pay.push_back(f);
      end else exp_nic.push_back(f);
      @(negedge clk);
      rx_in_valid = 1; rx_in = f;
      do @(posedge clk); while (!rx_in_ready);
      @(negedge clk); rx_in_valid = 0;
      if ($urandom % 3 == 0) @(negedge clk);
    end
    if (accel && len >= 2) n_acc_pkts++; else n_nic_pkts++;
  endtask

  // ---------------- transmit: merged stream checked packet by packet
  int tx_pkts_seen = 0;
  always @(posedge clk) if (rst_n && tx_out_valid && tx_out_ready) begin
    int k;
    k = -1;
    foreach (exp_tx[i]) if (k < 0 && exp_tx[i].data == tx_out.data) k = i;
    check(k >= 0 && exp_tx[k] == tx_out, "transmitted flit expected");
    if (k >= 0) exp_tx.delete(k);
    if (tx_out.last) tx_pkts_seen++;
  end

  // the merged stream keeps packets whole: consecutive flits share the packet id
  logic [15:0] cur_id; bit in_pkt = 0; int interleave = 0;
  always @(posedge clk) if (rst_n && tx_out_valid && tx_out_ready) begin
    if (in_pkt && tx_out.data[63:48] != cur_id) interleave++;
    cur_id = tx_out.data[63:48];
    in_pkt = !tx_out.last;
  end

  task automatic acc_send(input int id, input int plen);
    fork
      for (int i = 0; i < 2; i++) begin
        net_flit_t f;
        f = mk({16'(id), 16'(i), 32'($urandom)}, i == 1);
        exp_tx.push_back(mk(f.data, 0));
        @(negedge clk); acc_tx_hdr_valid = 1; acc_tx_hdr = f;
        do @(posedge clk); while (!acc_tx_hdr_ready);
        @(negedge clk); acc_tx_hdr_valid = 0;
      end
      for (int i = 0; i < plen; i++) begin
        net_flit_t f;
        f = mk({16'(id), 16'(i + 2), 32'($urandom)}, i == plen - 1);
        exp_tx.push_back(f);
        @(negedge clk); acc_tx_pay_valid = 1; acc_tx_pay = f;
        do @(posedge clk); while (!acc_tx_pay_ready);
        @(negedge clk); acc_tx_pay_valid = 0;
      end
    join
  endtask

  task automatic nic_send(input int id, input int len);
    for (int i = 0; i < len; i++) begin
      net_flit_t f;
      f = mk({16'(id), 16'(i), 32'($urandom)}, i == len - 1);
      exp_tx.push_back(f);
      @(negedge clk); tx_nic_valid = 1; tx_nic = f;
      do @(posedge clk); while (!tx_nic_ready);
      @(negedge clk); tx_nic_valid = 0;
    end
  endtask

  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    rx_in_valid = 0; rx_in = '0; acc_tx_hdr_valid = 0; acc_tx_pay_valid = 0;
    acc_tx_hdr = '0; acc_tx_pay = '0; tx_nic_valid = 0; tx_nic = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 40; p++) begin
      int len;
      len = (p % 7 == 6) ? 1 : 2 + $urandom % 11;
      send_rx(len, ($urandom % 2) == 0, p);
    end
    fork
      for (int p = 0; p < 10; p++) acc_send(1000 + p, 1 + $urandom % 8);
      for (int p = 0; p < 10; p++) nic_send(2000 + p, 1 + $urandom % 8);
    join
    repeat (200) @(posedge clk);
    check(exp_nic.size() == 0 && exp_hdr.size() == 0 && exp_pay.size() == 0, "all received flits delivered");
    check(exp_tx.size() == 0, "all transmitted flits sent");
    check(tx_pkts_seen == 20, $sformatf("20 packets transmitted (%0d)", tx_pkts_seen));
    check(interleave == 0, "transmit packets not interleaved");
    check(n_acc_pkts > 0 && ev_acc == n_acc_pkts, "every ACCEL_ONLY packet steered to the accelerator");
    check(n_nic_pkts > 0 && ev_nic == n_nic_pkts, "every other packet steered to the NIC");
    $display("packets: to_accel=%0d to_nic=%0d", n_acc_pkts, n_nic_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
