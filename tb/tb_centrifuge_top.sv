// tb_centrifuge_top: end-to-end test of the accelerator integration logic at its
// default sizes.
//
// Around centrifuge_top it places behavioural stand-ins for what the design
// attaches to: an L1 data cache that answers out of order after random delays, an
// HLS "vadd" kernel with two ap_bus ports (in place: A[i] += B[i], returns the sum),
// a page-table walker, a TileLink kernel, the NIC's network and transmit sides, and
// 512-bit memory for the DiracDeltaNet accelerator. One scenario runs all of
// them:
//   1. translate the pointers of the call through the translation accelerator
//      (one of them unmapped, which must fault);
//   2. call vadd with register arguments, then again with arguments fetched from
//      memory; check memory contents, the returned sum and the response;
//   3. run a TileLink kernel through its MMIO registers;
//   4. receive ACCEL_ONLY and ordinary packets, send accelerator and NIC packets;
//   5. run one DiracDeltaNet map (8x8 input, 64 channels) from memory to memory
//      through its control registers, against a reference.
// Every mechanism must occur at least once: address-conflict stall, no-free-tag
// stall, out-of-order memory response, argument fetch, page fault, packet steered
// to the accelerator and to the NIC, merged transmit from both sources, and the
// three MAC arrays working at once.
module tb_centrifuge_top;
  import centrifuge_pkg::*;
  localparam int NBUS = 2, NARG = 2, TL_NARG = 4, DC = 128, DW = 32;
  localparam int VW = DC * 8;
  localparam int T = DC / 8;
  localparam logic [PADDR_W-1:0] ARG_BLOCK = 40'h90000;  // argument block of the second call

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  // ---------------- DUT signals
  logic rocc_cmd_valid, rocc_cmd_ready, rocc_resp_valid, rocc_resp_ready, rocc_busy;
  rocc_cmd_t rocc_cmd; rocc_resp_t rocc_resp;
  logic rocc_mem_req_valid, rocc_mem_req_ready, rocc_mem_resp_valid;
  mem_req_t rocc_mem_req; mem_resp_t rocc_mem_resp;
  logic k_ap_start, k_ap_done, k_ap_idle, k_ap_ready;
  logic [XLEN-1:0] k_ap_return;
  logic [XLEN-1:0] k_scalar_args [NARG];
  logic k_req_valid [NBUS], k_req_ready [NBUS], k_req_write [NBUS];
  logic [31:0] k_req_addr [NBUS], k_req_size [NBUS];
  logic [XLEN-1:0] k_req_data [NBUS];
  logic k_rsp_valid [NBUS], k_rsp_ready [NBUS];
  logic [XLEN-1:0] k_rsp_data [NBUS];
  logic rocc_stall_conflict, rocc_stall_no_tag;
  logic vt_cmd_valid, vt_cmd_ready, vt_resp_valid, vt_resp_ready, vt_busy;
  rocc_cmd_t vt_cmd; rocc_resp_t vt_resp;
  logic ptw_req_valid, ptw_req_ready, ptw_resp_valid, ptw_resp_pf;
  logic [26:0] ptw_req_vpn; logic [43:0] ptw_resp_ppn;
  logic mmio_req_valid, mmio_req_ready, mmio_req_write, mmio_resp_valid, mmio_resp_ready;
  logic [11:0] mmio_req_addr; logic [XLEN-1:0] mmio_req_wdata, mmio_resp_rdata;
  logic tl_ap_start, tl_ap_done, tl_ap_idle, tl_ap_ready;
  logic [XLEN-1:0] tl_ap_return;
  logic [XLEN-1:0] tl_args [TL_NARG];
  logic net_rx_valid, net_rx_ready, nic_rx_valid, nic_rx_ready;
  logic acc_rx_hdr_valid, acc_rx_hdr_ready, acc_rx_pay_valid, acc_rx_pay_ready;
  logic acc_tx_hdr_valid, acc_tx_hdr_ready, acc_tx_pay_valid, acc_tx_pay_ready;
  logic nic_tx_valid, nic_tx_ready, net_tx_valid, net_tx_ready, ev_rx_acc, ev_rx_nic;
  net_flit_t net_rx, nic_rx, acc_rx_hdr, acc_rx_pay, acc_tx_hdr, acc_tx_pay, nic_tx, net_tx;
  logic ddn_mmio_req_valid, ddn_mmio_req_ready, ddn_mmio_req_write, ddn_mmio_resp_valid, ddn_mmio_resp_ready;
  logic [11:0] ddn_mmio_req_addr; logic [XLEN-1:0] ddn_mmio_req_wdata, ddn_mmio_resp_rdata;
  logic ddn_mem_req_valid, ddn_mem_req_ready, ddn_mem_req_write, ddn_mem_resp_valid, ddn_mem_resp_ready;
  logic [PADDR_W-1:0] ddn_mem_req_addr; logic [511:0] ddn_mem_req_data, ddn_mem_resp_data;
  logic [2:0] ddn_mac_active;

  centrifuge_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_conflict = 0, n_notag = 0, n_ooo = 0, n_argfetch = 0, n_pf = 0;
  int n_rx_acc = 0, n_rx_nic = 0, n_tx_acc = 0, n_tx_nic = 0, n_mac3 = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (rocc_stall_conflict) n_conflict++;
      if (rocc_stall_no_tag)   n_notag++;
      if (ev_rx_acc) n_rx_acc++;
      if (ev_rx_nic) n_rx_nic++;
      if (&ddn_mac_active) n_mac3++;
    end
  end

  // ---------------- behavioural L1 data cache
  logic [XLEN-1:0] mem [logic [PADDR_W-1:0]];
  typedef struct { logic [MEM_TAG_W-1:0] tag; logic has_data; logic [XLEN-1:0] data; int due; } pend_t;
  pend_t pend [$];
  int max_lat = 30;
  always @(posedge clk) if (rst_n && rocc_mem_req_valid && rocc_mem_req_ready) begin
    pend_t p;
    p.tag = rocc_mem_req.tag; p.due = cyc + 1 + ($urandom % max_lat);
    p.has_data = (rocc_mem_req.cmd == M_XRD);
    if (rocc_mem_req.addr == ARG_BLOCK && rocc_mem_req.cmd == M_XRD) n_argfetch++;
    if (rocc_mem_req.cmd == M_XWR) begin mem[rocc_mem_req.addr] = rocc_mem_req.data; p.data = '0; end
    else p.data = mem.exists(rocc_mem_req.addr) ? mem[rocc_mem_req.addr] : '0;
    pend.push_back(p);
  end
  always @(negedge clk) begin
    rocc_mem_req_ready <= ($urandom % 5) != 0;
    rocc_mem_resp_valid <= 0;
    if (pend.size() > 0) begin
      automatic int cand [$];
      foreach (pend[i]) if (pend[i].due <= cyc) cand.push_back(i);
      if (cand.size() > 0) begin
        automatic int k = cand[$urandom % cand.size()];
        if (k != 0) n_ooo++;
        rocc_mem_resp_valid <= 1;
        rocc_mem_resp.tag <= pend[k].tag; rocc_mem_resp.has_data <= pend[k].has_data;
        rocc_mem_resp.data <= pend[k].data;
        pend.delete(k);
      end
    end
  end

  // ---------------- behavioural HLS kernel: vadd in place over N words
  localparam int N = 16;
  logic [XLEN-1:0] a_buf [N], b_buf [N];
  assign k_ap_idle = 1'b1;
  initial begin
    k_ap_done = 0; k_ap_ready = 0; k_ap_return = 0;
    for (int b = 0; b < NBUS; b++) begin
      k_req_valid[b] = 0; k_req_write[b] = 0; k_req_addr[b] = 0; k_req_size[b] = 0;
      k_req_data[b] = 0; k_rsp_ready[b] = 0;
    end
    forever begin
      logic [XLEN-1:0] sum, chk;
      @(posedge clk);
      if (!(rst_n && k_ap_start)) continue;
      @(negedge clk); k_ap_ready = 1; @(negedge clk); k_ap_ready = 0;
      // read A and B bursts on both buses at once
      fork
        begin
          k_req_valid[0] = 1; k_req_write[0] = 0; k_req_addr[0] = 0; k_req_size[0] = N;
          do @(posedge clk); while (!k_req_ready[0]);
          @(negedge clk); k_req_valid[0] = 0;
        end
        begin
          k_req_valid[1] = 1; k_req_write[1] = 0; k_req_addr[1] = 0; k_req_size[1] = N;
          do @(posedge clk); while (!k_req_ready[1]);
          @(negedge clk); k_req_valid[1] = 0;
        end
        for (int i = 0; i < N; i++) begin
          k_rsp_ready[0] = 1;
          do @(posedge clk); while (!k_rsp_valid[0]);
          a_buf[i] = k_rsp_data[0];
          @(negedge clk); k_rsp_ready[0] = 0;
        end
        for (int i = 0; i < N; i++) begin
          k_rsp_ready[1] = 1;
          do @(posedge clk); while (!k_rsp_valid[1]);
          b_buf[i] = k_rsp_data[1];
          @(negedge clk); k_rsp_ready[1] = 0;
        end
      join
      // write burst A[i] = A[i] + B[i]
      sum = 0;
      k_req_valid[0] = 1; k_req_write[0] = 1; k_req_addr[0] = 0; k_req_size[0] = N;
      for (int i = 0; i < N; i++) begin
        k_req_data[0] = a_buf[i] + b_buf[i];
        sum += a_buf[i] + b_buf[i];
        do @(posedge clk); while (!k_req_ready[0]);
        @(negedge clk);
      end
      k_req_valid[0] = 0;
      // read back A[N-1] at once: depends on the last write
      k_req_valid[0] = 1; k_req_write[0] = 0; k_req_addr[0] = N - 1; k_req_size[0] = 1;
      do @(posedge clk); while (!k_req_ready[0]);
      @(negedge clk); k_req_valid[0] = 0; k_rsp_ready[0] = 1;
      do @(posedge clk); while (!k_rsp_valid[0]);
      chk = k_rsp_data[0];
      @(negedge clk); k_rsp_ready[0] = 0;
      k_ap_done = 1; k_ap_return = (chk == a_buf[N-1] + b_buf[N-1]) ? sum : 64'hBAD;
      @(negedge clk); k_ap_done = 0;
    end
  end

  // ---------------- page-table walker
  logic [43:0] ptab [logic [26:0]];
  assign ptw_req_ready = 1'b1;
  always @(posedge clk) begin
    ptw_resp_valid <= 0;
    if (rst_n && ptw_req_valid) begin
      ptw_resp_valid <= 1;
      ptw_resp_pf <= !ptab.exists(ptw_req_vpn);
      ptw_resp_ppn <= ptab.exists(ptw_req_vpn) ? ptab[ptw_req_vpn] : '0;
      if (!ptab.exists(ptw_req_vpn)) n_pf++;
    end
  end

  // ---------------- TileLink kernel
  int tl_cnt = -1;
  assign tl_ap_idle = (tl_cnt < 0);
  always @(posedge clk) begin
    tl_ap_ready <= 0; tl_ap_done <= 0;
    if (rst_n && tl_ap_start && tl_cnt < 0 && !tl_ap_ready) begin tl_ap_ready <= 1; tl_cnt <= 20; end
    else if (tl_cnt == 0) begin
      tl_ap_done <= 1; tl_cnt <= -1;
      tl_ap_return <= tl_args[0] * tl_args[1] + tl_args[2] - tl_args[3];
    end else if (tl_cnt > 0) tl_cnt <= tl_cnt - 1;
  end

  // ---------------- RoCC and MMIO helper tasks
  task automatic rocc_call(input bit vt, input logic [6:0] funct, input logic [63:0] a, input logic [63:0] b,
                           input logic [4:0] rd, output logic [63:0] ret);
    rocc_cmd_t c;
    int n;
    c = '0; c.funct = funct; c.rs1_data = a; c.rs2_data = b; c.xd = 1; c.rd = rd; c.opcode = 7'h0B;
    @(negedge clk);
    if (vt) begin vt_cmd = c; vt_cmd_valid = 1; end else begin rocc_cmd = c; rocc_cmd_valid = 1; end
    do @(posedge clk); while (!(vt ? vt_cmd_ready : rocc_cmd_ready));
    @(negedge clk); vt_cmd_valid = 0; rocc_cmd_valid = 0; vt_resp_ready = 1; rocc_resp_ready = 1;
    n = 0;
    do begin @(posedge clk); n++; end while (!(vt ? vt_resp_valid : rocc_resp_valid) && n < 20000);
    ret = vt ? vt_resp.data : rocc_resp.data;
    check((vt ? vt_resp.rd : rocc_resp.rd) == rd, "response register");
    @(negedge clk); vt_resp_ready = 0; rocc_resp_ready = 0;
  endtask

  task automatic mmio(input bit wr, input logic [11:0] a, input logic [63:0] wd, output logic [63:0] rd);
    @(negedge clk);
    mmio_req_valid = 1; mmio_req_write = wr; mmio_req_addr = a; mmio_req_wdata = wd;
    do @(posedge clk); while (!mmio_req_ready);
    @(negedge clk); mmio_req_valid = 0; mmio_resp_ready = 1;
    while (!mmio_resp_valid) @(posedge clk);
    rd = mmio_resp_rdata;
    @(posedge clk); @(negedge clk); mmio_resp_ready = 0;
  endtask

  // ---------------- network side
  net_flit_t exp_nic [$], exp_hdr [$], exp_pay [$], exp_tx [$];
  always @(negedge clk) begin
    nic_rx_ready <= ($urandom % 3) != 0; acc_rx_hdr_ready <= 1;
    acc_rx_pay_ready <= ($urandom % 2) != 0; net_tx_ready <= ($urandom % 3) != 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (nic_rx_valid && nic_rx_ready) begin
      check(exp_nic.size() > 0 && nic_rx == exp_nic[0], "NIC receive flit"); void'(exp_nic.pop_front());
    end
    if (acc_rx_hdr_valid && acc_rx_hdr_ready) begin
      check(exp_hdr.size() > 0 && acc_rx_hdr == exp_hdr[0], "accelerator header flit"); void'(exp_hdr.pop_front());
    end
    if (acc_rx_pay_valid && acc_rx_pay_ready) begin
      check(exp_pay.size() > 0 && acc_rx_pay == exp_pay[0], "accelerator payload flit"); void'(exp_pay.pop_front());
    end
    if (net_tx_valid && net_tx_ready) begin
      automatic int k = -1;
      foreach (exp_tx[i]) if (k < 0 && exp_tx[i] == net_tx) k = i;
      check(k >= 0, "transmitted flit expected");
      if (k >= 0) exp_tx.delete(k);
      if (net_tx.last) begin if (net_tx.data[63:56] == 8'hAC) n_tx_acc++; else n_tx_nic++; end
    end
  end

  function automatic net_flit_t fl(input logic [63:0] d, input bit last);
    fl.data = d; fl.keep = 8'hFF; fl.last = last;
  endfunction

  task automatic rx_packet(input bit accel, input int len, input int id);
    for (int i = 0; i < len; i++) begin
      net_flit_t f;
      logic [63:0] d;
      d = {8'h00, 8'(id), 16'(i), 32'($urandom)};
      if (i == 1) d[63:48] = accel ? {ETHTYPE_ACCEL_ONLY[7:0], ETHTYPE_ACCEL_ONLY[15:8]} : 16'h0008;
      f = fl(d, i == len - 1);
      if (accel) begin
        if (i < 2) begin net_flit_t h; h = f; h.last = (i == 1); exp_hdr.push_back(h); end
        else exp_pay.push_back(f);
      end else exp_nic.push_back(f);
      @(negedge clk); net_rx_valid = 1; net_rx = f;
      do @(posedge clk); while (!net_rx_ready);
      @(negedge clk); net_rx_valid = 0;
    end
  endtask

  task automatic tx_acc_packet(input int id, input int plen);
    fork
      for (int i = 0; i < 2; i++) begin
        net_flit_t f;
        f = fl({8'hAC, 8'(id), 16'(i), 32'($urandom)}, i == 1);
        exp_tx.push_back(fl(f.data, 0));
        @(negedge clk); acc_tx_hdr_valid = 1; acc_tx_hdr = f;
        do @(posedge clk); while (!acc_tx_hdr_ready);
        @(negedge clk); acc_tx_hdr_valid = 0;
      end
      for (int i = 0; i < plen; i++) begin
        net_flit_t f;
        f = fl({8'hAC, 8'(id), 16'(i + 2), 32'($urandom)}, i == plen - 1);
        exp_tx.push_back(f);
        @(negedge clk); acc_tx_pay_valid = 1; acc_tx_pay = f;
        do @(posedge clk); while (!acc_tx_pay_ready);
        @(negedge clk); acc_tx_pay_valid = 0;
      end
    join
  endtask

  task automatic tx_nic_packet(input int id, input int len);
    for (int i = 0; i < len; i++) begin
      net_flit_t f;
      f = fl({8'h11, 8'(id), 16'(i), 32'($urandom)}, i == len - 1);
      exp_tx.push_back(f);
      @(negedge clk); nic_tx_valid = 1; nic_tx = f;
      do @(posedge clk); while (!nic_tx_ready);
      @(negedge clk); nic_tx_valid = 0;
    end
  endtask

  // ---------------- DiracDeltaNet reference
  localparam int RW = 8, RC = 64, SH = 7;
  localparam logic [PADDR_W-1:0] DWB = 40'h100000, DIB = 40'h200000, DOB = 40'h300000;
  logic signed [7:0] WT [3][RC][RC];
  logic [2*VW-1:0] ddn_exp [$];
  typedef logic [VW-1:0] map_t [RW][RW];

  function automatic logic [VW-1:0] conv(input int u, input logic [VW-1:0] x);
    conv = '0;
    for (int o = 0; o < RC; o++) begin
      int acc;
      acc = 0;
      for (int i = 0; i < RC; i++) acc += int'(WT[u][o][i]) * int'($signed(x[i*8 +: 8]));
      acc = acc >>> SH;
      if (acc > 127) acc = 127;
      if (acc < -128) acc = -128;
      conv[o*8 +: 8] = 8'(acc);
    end
  endfunction
  function automatic logic [VW-1:0] vmax(input logic [VW-1:0] a, input logic [VW-1:0] b);
    for (int ch = 0; ch < DC; ch++)
      vmax[ch*8 +: 8] = ($signed(a[ch*8 +: 8]) > $signed(b[ch*8 +: 8])) ? a[ch*8 +: 8] : b[ch*8 +: 8];
  endfunction
  task automatic ddn_reference(input map_t img);
    map_t l, r1, rp, rs;
    localparam int H = RW / 2;
    for (int y = 0; y < RW; y++) for (int x = 0; x < RW; x++) r1[y][x] = conv(1, img[y][x]);
    for (int y = 0; y < H; y++) for (int x = 0; x < H; x++) begin
      l[y][x]  = conv(0, vmax(vmax(img[2*y][2*x], img[2*y][2*x+1]), vmax(img[2*y+1][2*x], img[2*y+1][2*x+1])));
      rp[y][x] = vmax(vmax(r1[2*y][2*x], r1[2*y][2*x+1]), vmax(r1[2*y+1][2*x], r1[2*y+1][2*x+1]));
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < H; x++)
      for (int ch = 0; ch < DC; ch++) begin
        int sy, sx;
        sy = y + (ch % 9) / 3 - 1; sx = x + (ch % 9) % 3 - 1;
        rs[y][x][ch*8 +: 8] = (sy >= 0 && sx >= 0 && sy < H && sx < H) ? rp[sy][sx][ch*8 +: 8] : 8'h0;
      end
    for (int y = 0; y < H; y++) for (int x = 0; x < H; x++) begin
      logic [VW-1:0] r2;
      logic [2*VW-1:0] o;
      r2 = conv(2, rs[y][x]);
      for (int k = 0; k < DC; k++) begin
        o[(2*k)*8 +: 8] = l[y][x][k*8 +: 8];
        o[(2*k+1)*8 +: 8] = r2[k*8 +: 8];
      end
      ddn_exp.push_back(o);
    end
  endtask
  // 512-bit memory of the DiracDeltaNet accelerator: in order, 20 to 35 cycles
  logic [511:0] dmem [logic [PADDR_W-7:0]];
  typedef struct { logic [511:0] data; int due; } drsp_t;
  drsp_t drq [$];
  int d_last_due = 0;
  always @(negedge clk) ddn_mem_req_ready <= ($urandom % 4) != 0;
  always @(posedge clk) if (rst_n && ddn_mem_req_valid && ddn_mem_req_ready) begin
    drsp_t r;
    if (ddn_mem_req_write) begin dmem[ddn_mem_req_addr[PADDR_W-1:6]] = ddn_mem_req_data; r.data = '0; end
    else r.data = dmem.exists(ddn_mem_req_addr[PADDR_W-1:6]) ? dmem[ddn_mem_req_addr[PADDR_W-1:6]] : '0;
    r.due = cyc + 20 + ($urandom % 16);
    if (r.due <= d_last_due) r.due = d_last_due + 1;
    d_last_due = r.due;
    drq.push_back(r);
  end
  always @(negedge clk) begin
    ddn_mem_resp_valid <= 0;
    if (drq.size() > 0 && drq[0].due <= cyc) begin
      ddn_mem_resp_valid <= 1; ddn_mem_resp_data <= drq[0].data; void'(drq.pop_front());
    end
  end
  task automatic ddn_mmio(input bit wr, input logic [11:0] a, input logic [63:0] wd, output logic [63:0] rd);
    @(negedge clk);
    ddn_mmio_req_valid = 1; ddn_mmio_req_write = wr; ddn_mmio_req_addr = a; ddn_mmio_req_wdata = wd;
    do @(posedge clk); while (!ddn_mmio_req_ready);
    @(negedge clk); ddn_mmio_req_valid = 0; ddn_mmio_resp_ready = 1;
    while (!ddn_mmio_resp_valid) @(posedge clk);
    rd = ddn_mmio_resp_rdata;
    @(posedge clk); @(negedge clk); ddn_mmio_resp_ready = 0;
  endtask

  // ---------------- scenario
  map_t img;
  initial begin
    logic [63:0] r, pa_a, pa_b, exp_sum;
    rst_n = 1;
    #1 rst_n = 0;
    rocc_cmd_valid = 0; rocc_cmd = '0; rocc_resp_ready = 0;
    vt_cmd_valid = 0; vt_cmd = '0; vt_resp_ready = 0;
    mmio_req_valid = 0; mmio_req_write = 0; mmio_req_addr = 0; mmio_req_wdata = 0; mmio_resp_ready = 0;
    net_rx_valid = 0; net_rx = '0; acc_tx_hdr_valid = 0; acc_tx_hdr = '0;
    acc_tx_pay_valid = 0; acc_tx_pay = '0; nic_tx_valid = 0; nic_tx = '0;
    ddn_mmio_req_valid = 0; ddn_mmio_req_write = 0; ddn_mmio_req_addr = 0; ddn_mmio_req_wdata = 0;
    ddn_mmio_resp_ready = 0;
    ptab[27'h00123] = 44'h00000080; ptab[27'h00124] = 44'h00000081;
    for (int i = 0; i < N; i++) begin
      mem[40'h80000 + 8*i] = 64'h1000 + i;     // A
      mem[40'h81000 + 8*i] = 64'h20 * i + 7;   // B
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. translate the two user pointers, and an unmapped one
    rocc_call(1, 0, 64'h0012_3000, 0, 5'd10, pa_a);
    rocc_call(1, 0, 64'h0012_4000, 0, 5'd11, pa_b);
    check(pa_a == 64'h80000 && pa_b == 64'h81000, "pointer translation");
    rocc_call(1, 0, 64'h0099_9000, 0, 5'd12, r);
    check(r == '1, "unmapped page faults");

    // 2. vadd with register arguments, then with arguments from memory
    exp_sum = 0;
    for (int i = 0; i < N; i++) exp_sum += (64'h1000 + i) + (64'h20 * i + 7);
    rocc_call(0, 0, pa_a, pa_b, 5'd5, r);
    check(r == exp_sum, $sformatf("vadd returned %h, expected %h", r, exp_sum));
    for (int i = 0; i < N; i++) check(mem[40'h80000 + 8*i] == (64'h1000 + i) + (64'h20 * i + 7), "A[i] = A[i] + B[i]");
    mem[ARG_BLOCK] = pa_a; mem[ARG_BLOCK + 8] = pa_b;
    exp_sum = 0;
    for (int i = 0; i < N; i++) exp_sum += (64'h1000 + i) + 2 * (64'h20 * i + 7);
    rocc_call(0, 1, 64'(ARG_BLOCK), 0, 5'd6, r);
    check(r == exp_sum, "vadd with arguments fetched from memory");

    // 3. TileLink kernel through MMIO
    mmio(1, 12'h10, 64'd7, r); mmio(1, 12'h18, 64'd9, r); mmio(1, 12'h20, 64'd100, r); mmio(1, 12'h28, 64'd3, r);
    mmio(1, 12'h00, 64'd1, r);
    begin
      int polls = 0;
      do begin mmio(0, 12'h00, 0, r); polls++; end while (!r[1] && polls < 200);
    end
    check(r[1], "TileLink kernel done");
    mmio(0, 12'h08, 0, r);
    check(r == 64'd7 * 64'd9 + 64'd100 - 64'd3, "TileLink kernel return value");

    // 4. network: received packets steered, transmitted packets merged
    for (int p = 0; p < 6; p++) rx_packet(p % 2 == 0, 3 + p, p);
    fork
      for (int p = 0; p < 3; p++) tx_acc_packet(p, 2 + p);
      for (int p = 0; p < 3; p++) tx_nic_packet(p, 3 + p);
    join

    // 5. DiracDeltaNet: 8x8 map with 64 channels, memory to memory
    begin
      int idx;
      idx = 0;
      for (int u = 0; u < 3; u++) begin
        for (int o = 0; o < RC; o++) for (int i = 0; i < RC; i++) WT[u][o][i] = 8'($urandom);
        for (int co = 0; co < RC / 8; co++) for (int ci = 0; ci < RC / 8; ci++) begin
          logic [511:0] t;
          for (int o = 0; o < 8; o++) for (int i = 0; i < 8; i++) t[(o*8+i)*8 +: 8] = WT[u][co*8+o][ci*8+i];
          dmem[DWB[PADDR_W-1:6] + 34'(idx)] = t;
          idx++;
        end
      end
      for (int y = 0; y < RW; y++) for (int x = 0; x < RW; x++) begin
        for (int ch = 0; ch < DC; ch++) img[y][x][ch*8 +: 8] = (ch < RC) ? 8'($urandom) : 8'h0;
        dmem[DIB[PADDR_W-1:6] + 34'(y*RW + x)] = img[y][x][511:0];
      end
      ddn_reference(img);
      ddn_mmio(1, 12'h10, 64'(DWB), r); ddn_mmio(1, 12'h18, 64'(DIB), r); ddn_mmio(1, 12'h20, 64'(DOB), r);
      ddn_mmio(1, 12'h28, 64'({8'(RC), 8'(RW)}), r);
      ddn_mmio(1, 12'h00, 64'd1, r);
      idx = 0;
      do begin ddn_mmio(0, 12'h00, 0, r); idx++; end while (!r[1] && idx < 5000);
      check(r[1], "DiracDeltaNet accelerator done");
      for (int p = 0; p < (RW/2) * (RW/2); p++) begin
        logic [2*VW-1:0] got;
        got = '0;
        for (int b = 0; b < 2; b++)
          if (dmem.exists(DOB[PADDR_W-1:6] + 34'(p*2 + b))) got[b*512 +: 512] = dmem[DOB[PADDR_W-1:6] + 34'(p*2 + b)];
        check(ddn_exp.size() > 0 && got == ddn_exp[0], $sformatf("DiracDeltaNet output pixel %0d", p));
        if (ddn_exp.size() > 0) void'(ddn_exp.pop_front());
      end
    end
    begin
      int n = 0;
      while ((ddn_exp.size() > 0 || exp_tx.size() > 0 || exp_nic.size() > 0 || exp_pay.size() > 0) && n < 50000) begin
        @(posedge clk); n++;
      end
    end
    check(ddn_exp.size() == 0, "all DiracDeltaNet outputs produced");
    check(exp_tx.size() == 0 && exp_nic.size() == 0 && exp_hdr.size() == 0 && exp_pay.size() == 0,
          "all network flits delivered");

    $display("mechanisms: conflict_stall=%0d no_tag_stall=%0d out_of_order_resp=%0d arg_fetch=%0d page_fault=%0d",
             n_conflict, n_notag, n_ooo, n_argfetch, n_pf);
    $display("mechanisms: rx_to_accel=%0d rx_to_nic=%0d tx_from_accel=%0d tx_from_nic=%0d mac_arrays_overlap=%0d",
             n_rx_acc, n_rx_nic, n_tx_acc, n_tx_nic, n_mac3);
    check(n_conflict > 0, "address-conflict stall happened");
    check(n_notag > 0, "no-free-tag stall happened");
    check(n_ooo > 0, "out-of-order memory response happened");
    check(n_argfetch > 0, "argument fetch happened");
    check(n_pf > 0, "page fault happened");
    check(n_rx_acc == 3 && n_rx_nic == 3, "packets steered by Ethertype");
    check(n_tx_acc == 3 && n_tx_nic == 3, "transmit merged from both sources");
    check(n_mac3 > 0, "three MAC arrays overlapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
