// tb_rocc_acc_ctrl: self-checking test of the RoCC accelerator controller.
//
// A behavioural ap_ctrl_hs kernel raises ap_ready a few cycles after ap_start and
// pulses ap_done later with ap_return = arg0 + 2*arg1. The testbench issues calls
// with register arguments and with memory arguments (answering the argument fetch
// itself), holds mem_busy high for a while after ap_done, and checks the response
// register and value, the bus offsets and scalar arguments seen by the kernel, busy,
// that no response leaves while mem_busy is high, the one-cycle delay from mem_busy
// falling to the response, and that a call without a destination register returns
// nothing.
module tb_rocc_acc_ctrl;
  import centrifuge_pkg::*;
  localparam int NARG = 2, NBUS = 2;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic               cmd_valid, cmd_ready, resp_valid, resp_ready, busy;
  rocc_cmd_t          cmd;
  rocc_resp_t         resp;
  logic               ap_start, ap_done, ap_idle, ap_ready;
  logic [XLEN-1:0]    ap_return;
  logic [XLEN-1:0]    scalar_args [NARG];
  logic [PADDR_W-1:0] bus_offsets [NBUS];
  logic               arg_fetch_valid, arg_fetch_ready, arg_rdy, mem_busy;
  logic [PADDR_W-1:0] arg_fetch_addr;
  logic [XLEN-1:0]    arg_vals [NARG];

  rocc_acc_ctrl #(.NARG(NARG), .NBUS(NBUS)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // cycle of the last mem_busy fall and of the last response rise, sampled together
  int fall_cyc = -1, rise_cyc = -1;
  logic mb_q = 0, rv_q = 0;
  always @(posedge clk) begin
    cyc++;
    if (mb_q && !mem_busy) fall_cyc = cyc;
    if (!rv_q && resp_valid) rise_cyc = cyc;
    mb_q = mem_busy; rv_q = resp_valid;
  end

  // behavioural kernel
  int run_len = 7, mem_tail = 5, k_cnt = 0, k_state = 0;
  logic [XLEN-1:0] seen0, seen1;
  logic [PADDR_W-1:0] off0, off1;
  assign ap_idle = (k_state == 0);
  always @(posedge clk) begin
    ap_ready <= 0; ap_done <= 0;
    case (k_state)
      0: if (ap_start && !ap_ready) begin k_state <= 1; k_cnt <= 0; end
      1: begin
        k_cnt <= k_cnt + 1;
        if (k_cnt == 1) begin
          ap_ready <= 1;
          seen0 <= scalar_args[0]; seen1 <= scalar_args[1];
          off0 <= bus_offsets[0]; off1 <= bus_offsets[1];
        end
        if (k_cnt == run_len) begin
          ap_done <= 1; ap_return <= scalar_args[0] + 2 * scalar_args[1];
          k_state <= 2; k_cnt <= 0;
        end
      end
      2: begin  // memory still draining after ap_done
        k_cnt <= k_cnt + 1;
        if (k_cnt == mem_tail) k_state <= 0;
      end
      default: k_state <= 0;
    endcase
  end
  assign mem_busy = (k_state != 0);

  // argument fetch answered by the testbench
  logic [XLEN-1:0] blk [logic [PADDR_W-1:0]];
  int fetch_cnt = 0;
  assign arg_fetch_ready = 1'b1;
  always @(posedge clk) begin
    if (arg_fetch_valid) begin
      arg_rdy <= 0; fetch_cnt <= 6;
      arg_vals[0] <= blk[arg_fetch_addr]; arg_vals[1] <= blk[arg_fetch_addr + 8];
    end else if (fetch_cnt > 1) fetch_cnt <= fetch_cnt - 1;
    else if (fetch_cnt == 1) begin arg_rdy <= 1; fetch_cnt <= 0; end
  end

  int early_resp = 0;
  always @(posedge clk) if (resp_valid && mem_busy) early_resp++;

  task automatic call(input logic [6:0] funct, input logic [63:0] a, input logic [63:0] b,
                      input logic xd, input logic [4:0] rd, output logic [63:0] ret, output int resp_cyc);
    int n = 0;
    @(negedge clk);
    cmd = '0; cmd.funct = funct; cmd.rs1_data = a; cmd.rs2_data = b; cmd.xd = xd; cmd.rd = rd;
    cmd.opcode = 7'h0B; cmd_valid = 1;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk); cmd_valid = 0;
    check(busy, "busy after the command is taken");
    resp_ready = 1;
    resp_cyc = -1;
    while (n < 200) begin
      @(posedge clk); n++;
      if (!xd && !busy) break;
      if (xd && resp_valid) begin
        ret = resp.data; resp_cyc = cyc;
        check(resp.rd == rd, "response goes to the command's rd");
        break;
      end
    end
    @(negedge clk); resp_ready = 0;
  endtask

  logic [63:0] r;
  int rc;
  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    cmd_valid = 0; cmd = '0; resp_ready = 0; arg_rdy = 0;
    ap_ready = 0; ap_done = 0; ap_return = 0;
    arg_vals[0] = 0; arg_vals[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int t = 0; t < 4; t++) begin
      logic [63:0] a, b;
      a = {32'h0, $urandom} & 64'hFF_FFFF_FFF8; b = {32'h0, $urandom} & 64'hFF_FFFF_FFF8;
      run_len = 3 + t * 4; mem_tail = 2 + t;
      call(7'd0, a, b, 1, 5'(3 + t), r, rc);
      check(r == a + 2 * b, $sformatf("register call %0d returns ap_return", t));
      check(seen0 == a && seen1 == b, "scalar args are rs1/rs2");
      check(off0 == a[PADDR_W-1:0] && off1 == b[PADDR_W-1:0], "bus offsets from pointer args");
      check(rise_cyc - fall_cyc == 1, $sformatf("response one cycle after mem_busy falls (%0d vs %0d)", rise_cyc, fall_cyc));
    end

    blk[40'h800] = 64'h1234; blk[40'h808] = 64'h10;
    call(7'd1, 64'h800, 0, 1, 5'd9, r, rc);
    check(r == 64'h1234 + 2 * 64'h10, "memory-argument call");
    check(off0 == 40'h1234 && off1 == 40'h10, "bus offsets from fetched args");

    call(7'd0, 64'd5, 64'd6, 0, 5'd1, r, rc);
    check(!busy && !resp_valid, "call without rd returns nothing and ends");

    check(early_resp == 0, "no response while memory is busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
