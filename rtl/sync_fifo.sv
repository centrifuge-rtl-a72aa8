// sync_fifo: single-clock first-in first-out queue with valid/ready handshakes.
//
// DEPTH entries of type T are held in a register array addressed by read and
// write pointers; an occupancy counter gives full/empty. A push and a pop may
// happen in the same cycle. The head is visible combinationally on deq_data
// whenever deq_valid is high (first-word fall-through). Used for the decoupled
// queues of the accelerator shims; depths are chosen by the instantiating block.
module sync_fifo #(
  parameter type T     = logic [63:0],
  parameter int  DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enq_valid,
  output logic enq_ready,
  input  T     enq_data,
  output logic deq_valid,
  input  logic deq_ready,
  output T     deq_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic do_enq, do_deq;

  assign enq_ready = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign deq_valid = (count != '0);
  assign deq_data  = mem[rptr];
  assign do_enq    = enq_valid && enq_ready;
  assign do_deq    = deq_valid && deq_ready;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_enq) wptr <= incr(wptr);
      if (do_deq) rptr <= incr(rptr);
      case ({do_enq, do_deq})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_enq) mem[wptr] <= enq_data;
  end
endmodule
