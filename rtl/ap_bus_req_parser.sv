// ap_bus_req_parser: turns one ap_bus port's requests into single-word memory requests.
//
// An HLS ap_bus port issues a request with a word address, a burst size and a
// read/write flag. The parser adds the bus offset (the byte base address of the
// pointer argument, set by the accelerator controller) to the scaled word address
// and splits a burst into one request per word:
//   read  burst of N: one ap_bus beat is taken, N read requests are produced on N
//                     cycles (ap_req_ready stays low until the last is sent).
//   write burst of N: N ap_bus beats are taken, each carrying one data word, and
//                     each becomes one write request.
// A burst size of 0 is treated as 1. Output requests leave on a valid/ready port,
// one per cycle at most. Splitting into single words and the beat format are this
// design's choices; the document only names the block ("Req Parser").
module ap_bus_req_parser
  import centrifuge_pkg::*;
#(
  parameter int AP_AW = 32,   // ap_bus word-address width
  parameter int AP_SW = 32,   // ap_bus burst-size width
  parameter int WORD_BYTES_LOG2 = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PADDR_W-1:0]  bus_offset,
  // ap_bus request side
  input  logic                ap_req_valid,
  output logic                ap_req_ready,
  input  logic                ap_req_write,
  input  logic [AP_AW-1:0]    ap_req_addr,
  input  logic [AP_SW-1:0]    ap_req_size,
  input  logic [XLEN-1:0]     ap_req_data,
  // single-word request side
  output logic                out_valid,
  input  logic                out_ready,
  output logic                out_write,
  output logic [PADDR_W-1:0]  out_addr,
  output logic [XLEN-1:0]     out_data,
  output logic                active      // a burst is in progress
);
  logic               busy_q, write_q;
  logic [AP_SW-1:0]   rem_q;      // words still to send after the current one
  logic [AP_AW-1:0]   addr_q;

  logic [AP_AW-1:0]   cur_addr;
  logic [AP_SW-1:0]   first_rem;

  assign first_rem = (ap_req_size == '0) ? '0 : ap_req_size - 1'b1;
  assign cur_addr  = busy_q ? addr_q : ap_req_addr;
  assign out_write = busy_q ? write_q : ap_req_write;
  assign out_addr  = bus_offset + (PADDR_W'(cur_addr) << WORD_BYTES_LOG2);
  assign out_data  = ap_req_data;
  assign active    = busy_q;

  always_comb begin
    if (!busy_q) begin
      out_valid    = ap_req_valid;
      ap_req_ready = out_ready;
    end else if (write_q) begin
      out_valid    = ap_req_valid;
      ap_req_ready = out_ready;
    end else begin
      out_valid    = 1'b1;      // read burst continues without new beats
      ap_req_ready = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      write_q <= 1'b0;
      rem_q   <= '0;
      addr_q  <= '0;
    end else if (out_valid && out_ready) begin
      if (!busy_q) begin
        if (first_rem != '0) begin
          busy_q  <= 1'b1;
          write_q <= ap_req_write;
          rem_q   <= first_rem;
          addr_q  <= ap_req_addr + 1'b1;
        end
      end else begin
        addr_q <= addr_q + 1'b1;
        rem_q  <= rem_q - 1'b1;
        if (rem_q == AP_SW'(1)) busy_q <= 1'b0;
      end
    end
  end
endmodule
