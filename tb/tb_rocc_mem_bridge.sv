// tb_rocc_mem_bridge: self-checking test of the RoCC/ap_bus memory bridge.
//
// A behavioural L1 cache accepts requests with random back-pressure, performs each
// one when it is accepted and answers after a random delay, picking among pending
// answers at random so responses come back out of order. The testbench plays the
// HLS kernel on two ap_bus ports and checks: argument fetch into arg_vals/arg_rdy;
// a read burst returning in order; single writes then a read-after-write to the
// same word (must see the new value and must stall on the address conflict); a
// write burst; tag exhaustion; mem_busy dropping when all is done; and the
// one-cycle latency from an ap_bus beat to the L1 request with an ideal memory.
module tb_rocc_mem_bridge;
  import centrifuge_pkg::*;

  localparam int NBUS = 2, NARG = 2, NTAGS = 8;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [PADDR_W-1:0] bus_offset [NBUS];
  logic               ap_req_valid [NBUS], ap_req_ready [NBUS], ap_req_write [NBUS];
  logic [31:0]        ap_req_addr [NBUS], ap_req_size [NBUS];
  logic [XLEN-1:0]    ap_req_data [NBUS];
  logic               ap_rsp_valid [NBUS], ap_rsp_ready [NBUS];
  logic [XLEN-1:0]    ap_rsp_data [NBUS];
  logic               arg_fetch_valid, arg_fetch_ready, arg_rdy;
  logic [PADDR_W-1:0] arg_fetch_addr;
  logic [XLEN-1:0]    arg_vals [NARG];
  logic               mem_req_valid, mem_req_ready, mem_resp_valid, mem_busy;
  mem_req_t           mem_req;
  mem_resp_t          mem_resp;
  logic               stall_conflict, stall_no_tag;

  rocc_mem_bridge #(.NBUS(NBUS), .NARG(NARG), .NTAGS(NTAGS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- behavioural L1
  logic [XLEN-1:0] mem [logic [PADDR_W-1:0]];
  typedef struct { logic [MEM_TAG_W-1:0] tag; logic has_data; logic [XLEN-1:0] data; int due; } pend_t;
  pend_t pend [$];
  int cyc = 0, max_lat = 6, ready_pct = 80;
  int n_conflict = 0, n_notag = 0, n_ooo = 0;
  int last_tag_resp = -1;

  always @(posedge clk) begin
    cyc++;
    if (stall_conflict) n_conflict++;
    if (stall_no_tag)   n_notag++;
  end

  always @(posedge clk) begin
    if (rst_n && mem_req_valid && mem_req_ready) begin
      pend_t p;
      p.tag = mem_req.tag;
      p.due = cyc + 1 + ($urandom % max_lat);
      if (mem_req.cmd == M_XWR) begin
        mem[mem_req.addr] = mem_req.data;
        p.has_data = 0; p.data = '0;
      end else begin
        p.has_data = 1;
        p.data = mem.exists(mem_req.addr) ? mem[mem_req.addr] : '0;
      end
      pend.push_back(p);
    end
  end

  always @(negedge clk) begin
    mem_req_ready  <= ($urandom % 100) < ready_pct;
    mem_resp_valid <= 0;
    if (pend.size() > 0) begin
      automatic int cand [$];
      foreach (pend[i]) if (pend[i].due <= cyc) cand.push_back(i);
      if (cand.size() > 0) begin
        automatic int k;
        k = cand[$urandom % cand.size()];
        if (k != 0) n_ooo++;
        mem_resp_valid <= 1;
        mem_resp.tag      <= pend[k].tag;
        mem_resp.has_data <= pend[k].has_data;
        mem_resp.data     <= pend[k].data;
        pend.delete(k);
      end
    end
  end

  // ---------------- kernel-side helpers
  task automatic ap_issue(input int b, input bit wr, input int addr, input int size, input logic [63:0] data);
    @(negedge clk);
    ap_req_valid[b] = 1; ap_req_write[b] = wr; ap_req_addr[b] = addr;
    ap_req_size[b] = size; ap_req_data[b] = data;
    do @(posedge clk); while (!ap_req_ready[b]);
    @(negedge clk);
    ap_req_valid[b] = 0;
  endtask

  task automatic ap_read_rsp(input int b, output logic [63:0] d);
    @(negedge clk);
    ap_rsp_ready[b] = 1;
    do @(posedge clk); while (!ap_rsp_valid[b]);
    d = ap_rsp_data[b];
    @(negedge clk);
    ap_rsp_ready[b] = 0;
  endtask

  task automatic wait_idle();
    int n = 0;
    do begin @(posedge clk); n++; end while (mem_busy && n < 2000);
    check(!mem_busy, "mem_busy falls after all requests complete");
  endtask

  localparam int N = 12;
  logic [63:0] d;

  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    for (int b = 0; b < NBUS; b++) begin
      ap_req_valid[b] = 0; ap_req_write[b] = 0; ap_req_addr[b] = 0;
      ap_req_size[b] = 0; ap_req_data[b] = 0; ap_rsp_ready[b] = 0;
    end
    arg_fetch_valid = 0; arg_fetch_addr = '0;
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp = '0;
    bus_offset[0] = 40'h2000; bus_offset[1] = 40'h3000;
    mem[40'h1000] = 64'hAAAA_0000_0000_0001;
    mem[40'h1008] = 64'hBBBB_0000_0000_0002;
    for (int i = 0; i < 64; i++) mem[40'h2000 + 8*i] = 64'h100 + i * 3;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // argument fetch
    @(negedge clk);
    arg_fetch_valid = 1; arg_fetch_addr = 40'h1000;
    do @(posedge clk); while (!arg_fetch_ready);
    @(negedge clk); arg_fetch_valid = 0;
    begin
      int n = 0;
      while (!arg_rdy && n < 200) begin @(posedge clk); n++; end
    end
    check(arg_rdy, "arg_rdy after argument fetch");
    check(arg_vals[0] == 64'hAAAA_0000_0000_0001 && arg_vals[1] == 64'hBBBB_0000_0000_0002,
          "argument values loaded from memory");

    // read burst on bus 0, data must come back in order
    fork
      ap_issue(0, 0, 0, N, '0);
      for (int i = 0; i < N; i++) begin
        ap_read_rsp(0, d);
        check(d == 64'h100 + i * 3, $sformatf("bus0 burst word %0d in order", i));
      end
    join

    // single writes to bus 1, each followed at once by a read of the same word
    for (int i = 0; i < 6; i++) begin
      ap_issue(1, 1, i, 1, 64'h5000 + i);
      ap_issue(1, 0, i, 1, '0);
      ap_read_rsp(1, d);
      check(d == 64'h5000 + i, $sformatf("read-after-write word %0d", i));
    end

    // write burst on bus 1, then read it back through bus 0 (cross-bus order)
    bus_offset[0] = 40'h3000;
    fork
      begin
        @(negedge clk);
        ap_req_valid[1] = 1; ap_req_write[1] = 1; ap_req_addr[1] = 8; ap_req_size[1] = 4;
        for (int i = 0; i < 4; i++) begin
          ap_req_data[1] = 64'h7700 + i;
          do @(posedge clk); while (!ap_req_ready[1]);
          @(negedge clk);
        end
        ap_req_valid[1] = 0;
        ap_issue(0, 0, 8, 4, '0);
      end
      for (int i = 0; i < 4; i++) begin
        ap_read_rsp(0, d);
        check(d == 64'h7700 + i, $sformatf("cross-bus read after write burst word %0d", i));
      end
    join
    wait_idle();
    for (int i = 0; i < 4; i++) check(mem[40'h3000 + 8*(8+i)] == 64'h7700 + i, "write burst reached memory");

    // tag exhaustion: long latency, a write burst leaves many stores outstanding
    max_lat = 40; ready_pct = 100;
    @(negedge clk);
    ap_req_valid[1] = 1; ap_req_write[1] = 1; ap_req_addr[1] = 32; ap_req_size[1] = 16;
    for (int i = 0; i < 16; i++) begin
      ap_req_data[1] = 64'h9900 + i;
      do @(posedge clk); while (!ap_req_ready[1]);
      @(negedge clk);
    end
    ap_req_valid[1] = 0;
    bus_offset[0] = 40'h3000;
    fork
      ap_issue(0, 0, 32, 16, '0);
      for (int i = 0; i < 16; i++) begin
        ap_read_rsp(0, d);
        check(d == 64'h9900 + i, $sformatf("long-latency read-back word %0d", i));
      end
    join
    wait_idle();
    bus_offset[0] = 40'h2000;

    // latency with an ideal memory: L1 request one cycle after the ap_bus beat
    max_lat = 1;
    begin
      int t0, t1;
      @(negedge clk);
      ap_req_valid[0] = 1; ap_req_write[0] = 0; ap_req_addr[0] = 2; ap_req_size[0] = 1;
      do @(posedge clk); while (!ap_req_ready[0]);
      t0 = cyc;
      @(negedge clk); ap_req_valid[0] = 0;
      while (!mem_req_valid) @(posedge clk);
      @(posedge clk); // the posedge at which mem_req_valid is sampled
      t1 = cyc;
      check(t1 - t0 == 1, $sformatf("beat-to-request latency %0d cycle(s)", t1 - t0));
      ap_read_rsp(0, d);
      check(d == 64'h100 + 2 * 3, "single read data");
    end
    wait_idle();

    check(n_conflict > 0, "address-conflict stall happened");
    check(n_notag > 0, "no-free-tag stall happened");
    check(n_ooo > 0, "memory answered out of order");
    $display("cycles=%0d", cyc);
    $display("events: conflict_stalls=%0d notag_stalls=%0d out_of_order=%0d", n_conflict, n_notag, n_ooo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
