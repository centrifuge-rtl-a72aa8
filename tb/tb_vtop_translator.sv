// tb_vtop_translator: self-checking test of the address-translation RoCC accelerator.
//
// A behavioural page-table walker holds a small random page table and answers after
// a random delay; unmapped pages report a page fault. The testbench checks the
// returned physical address ({ppn, offset}), the all-ones fault answer, the VPN sent
// to the walker, the destination register and busy.
module tb_vtop_translator;
  import centrifuge_pkg::*;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, resp_valid, resp_ready, busy;
  rocc_cmd_t cmd;
  rocc_resp_t resp;
  logic ptw_req_valid, ptw_req_ready, ptw_resp_valid, ptw_resp_pf;
  logic [26:0] ptw_req_vpn;
  logic [43:0] ptw_resp_ppn;

  vtop_translator dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [43:0] ptab [logic [26:0]];
  logic [26:0] last_vpn;
  int delay = 0;
  logic pending = 0;
  assign ptw_req_ready = 1'b1;
  always @(posedge clk) begin
    ptw_resp_valid <= 0;
    if (ptw_req_valid && !pending) begin
      pending <= 1; last_vpn <= ptw_req_vpn; delay <= 1 + $urandom % 6;
    end else if (pending) begin
      if (delay == 0) begin
        pending <= 0; ptw_resp_valid <= 1;
        ptw_resp_pf  <= !ptab.exists(last_vpn);
        ptw_resp_ppn <= ptab.exists(last_vpn) ? ptab[last_vpn] : 44'h0;
      end else delay <= delay - 1;
    end
  end

  initial begin
    logic [63:0] va, pa;
    rst_n = 1;
    #1 rst_n = 0;
    cmd_valid = 0; cmd = '0; resp_ready = 0; ptw_resp_valid = 0; ptw_resp_pf = 0; ptw_resp_ppn = 0;
    for (int i = 0; i < 16; i++) ptab[27'(i * 37 + 5)] = 44'(($urandom % 1000000) + 1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      int n;
      bit mapped;
      n = 0;
      mapped = (t % 4) != 3;
      va = {25'h0, 27'((t % 16) * 37 + 5 + (mapped ? 0 : 1)), 12'($urandom)};
      @(negedge clk);
      cmd = '0; cmd.rs1_data = va; cmd.rd = 5'(t); cmd.xd = 1; cmd_valid = 1;
      do @(posedge clk); while (!cmd_ready);
      @(negedge clk); cmd_valid = 0; resp_ready = 1;
      check(busy, "busy while translating");
      while (!resp_valid && n < 100) begin @(posedge clk); n++; end
      check(last_vpn == va[38:12], "VPN sent to the walker");
      if (mapped) pa = {24'h0, ptab[va[38:12]][27:0], va[11:0]};
      else        pa = '1;
      check(resp.data == pa, $sformatf("translation %0d: got %h expected %h", t, resp.data, pa));
      check(resp.rd == 5'(t), "destination register");
      @(negedge clk); resp_ready = 0;
    end
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
