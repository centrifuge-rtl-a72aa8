// tb_tl_acc_ctrl: self-checking test of the TileLink accelerator control registers.
//
// Software is modelled by MMIO write/read tasks: it writes the arguments, sets
// ap_start, polls CTRL until ap_done and reads RETURN. A behavioural kernel takes
// ap_start (ap_ready), runs a random number of cycles and pulses ap_done with
// ap_return = sum of its arguments. Checks: argument read-back, ap_start held until
// ap_ready, the done bit set by ap_done and cleared by the read, the return value,
// and the one-cycle response latency of the register port.
module tb_tl_acc_ctrl;
  import centrifuge_pkg::*;
  localparam int NARG = 4;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic mmio_req_valid, mmio_req_ready, mmio_req_write, mmio_resp_valid, mmio_resp_ready;
  logic [11:0] mmio_req_addr;
  logic [XLEN-1:0] mmio_req_wdata, mmio_resp_rdata;
  logic ap_start, ap_done, ap_idle, ap_ready;
  logic [XLEN-1:0] ap_return;
  logic [XLEN-1:0] args [NARG];

  tl_acc_ctrl #(.NARG(NARG)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) cyc++;

  // kernel
  int kst = 0, kcnt = 0, klen = 5, starts_seen = 0;
  assign ap_idle = (kst == 0);
  always @(posedge clk) begin
    ap_ready <= 0; ap_done <= 0;
    if (kst == 0 && ap_start && !ap_ready) begin
      kst <= 1; kcnt <= 0; ap_ready <= 1; starts_seen++;
    end else if (kst == 1) begin
      kcnt <= kcnt + 1;
      if (kcnt == klen) begin
        kst <= 0; ap_done <= 1;
        ap_return <= args[0] + args[1] + args[2] + args[3];
      end
    end
  end

  task automatic mmio(input bit wr, input logic [11:0] a, input logic [63:0] wd, output logic [63:0] rd, output int lat);
    int t0;
    @(negedge clk);
    mmio_req_valid = 1; mmio_req_write = wr; mmio_req_addr = a; mmio_req_wdata = wd;
    do @(posedge clk); while (!mmio_req_ready);
    t0 = cyc;
    @(negedge clk); mmio_req_valid = 0; mmio_resp_ready = 1;
    while (!mmio_resp_valid) @(posedge clk);
    rd = mmio_resp_rdata; lat = cyc - t0;
    @(posedge clk);
    @(negedge clk); mmio_resp_ready = 0;
  endtask

  logic [63:0] r, a [NARG];
  int lat;
  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    mmio_req_valid = 0; mmio_req_write = 0; mmio_req_addr = 0; mmio_req_wdata = 0; mmio_resp_ready = 0;
    ap_ready = 0; ap_done = 0; ap_return = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      int polls;
      polls = 0;
      klen = 3 + 7 * t;
      for (int i = 0; i < NARG; i++) begin
        a[i] = {$urandom, $urandom};
        mmio(1, 12'h10 + 12'(8 * i), a[i], r, lat);
      end
      for (int i = 0; i < NARG; i++) begin
        mmio(0, 12'h10 + 12'(8 * i), 0, r, lat);
        check(r == a[i], $sformatf("argument %0d read back", i));
        check(args[i] == a[i], "argument reaches the kernel");
      end
      check(lat == 1, $sformatf("register read latency %0d", lat));
      mmio(1, 12'h00, 64'h1, r, lat);
      do begin
        mmio(0, 12'h00, 0, r, lat);
        polls++;
      end while (!r[1] && polls < 100);
      check(r[1], "done bit seen by polling");
      check(polls > 1, "kernel took time: done not set at once");
      mmio(0, 12'h00, 0, r, lat);
      check(!r[1], "done bit cleared by the read");
      check(r[2], "idle after the call");
      mmio(0, 12'h08, 0, r, lat);
      check(r == a[0] + a[1] + a[2] + a[3], "return value");
    end
    check(starts_seen == 5, "one kernel start per call");
    check(!ap_start, "ap_start dropped after ap_ready");
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
