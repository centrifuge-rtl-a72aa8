// rocc_mem_bridge: connects the ap_bus memory ports of an HLS accelerator to the
// RoCC L1 data-cache port, keeping the accelerator's memory order.
//
// ap_bus assumes memory operations complete in program order, on each bus and
// across buses, while the RoCC port may return responses out of order. The bridge
// works like the issue logic of a single-issue out-of-order core:
//   * Request path. One ap_bus_req_parser per bus adds the bus offset and splits
//     bursts into word requests. Each word request is stamped with the value of a
//     timestamp counter that advances in every cycle in which a request enters, and
//     waits in a per-bus request FIFO. An argument-fetch request (NARG loads from an
//     argument block in memory) waits in its own FIFO. The priority arbiter issues
//     the FIFO head whose stamp is closest after the stamp of the previously issued
//     request (smallest delta-t), so requests leave in the order they entered; equal
//     stamps go lowest bus first.
//   * Stall logic. The selected request is held back (and nothing younger passes it)
//     when no tag is free, when it overlaps a 64-bit word held by an outstanding
//     request and either of the two writes (read-after-write, write-after-read,
//     write-after-write), or when a read finds its bus's response queue full.
//   * Tag table. An issued request takes a tag from the free-tag FIFO; the table row
//     of that tag holds valid, write, width, bus and address, plus the response slot
//     reserved for a read. Outstanding rows are compared with the next request.
//   * Return path. A response is looked up by its tag and switched to its bus's
//     response queue, into the slot reserved at issue, so each bus sees its read data
//     in request order; argument loads fill the argument registers, whose valid bits
//     are ANDed into arg_rdy. Store acknowledges only release their tag.
// mem_busy is high while any request is parsed, queued or outstanding.
// Timing: a word request can be issued one cycle after its ap_bus beat is taken;
// at most one memory request is issued per cycle. The figure-level structure
// follows the document; queue depths, tag count, word-granular conflict checks and
// the reorder slots in the response queues are this design's choices.
module rocc_mem_bridge
  import centrifuge_pkg::*;
#(
  parameter int NBUS       = 2,   // ap_bus ports of the accelerator
  parameter int NARG       = 2,   // argument registers that can be fetched
  parameter int NTAGS      = 8,   // outstanding memory requests
  parameter int REQ_DEPTH  = 4,   // request FIFO depth per bus
  parameter int RESP_DEPTH = 4,   // response queue depth per bus
  parameter int AP_AW      = 32,
  parameter int AP_SW      = 32,
  parameter int TS_W       = 16   // timestamp width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PADDR_W-1:0]  bus_offset   [NBUS],
  // ap_bus ports
  input  logic                ap_req_valid [NBUS],
  output logic                ap_req_ready [NBUS],
  input  logic                ap_req_write [NBUS],
  input  logic [AP_AW-1:0]    ap_req_addr  [NBUS],
  input  logic [AP_SW-1:0]    ap_req_size  [NBUS],
  input  logic [XLEN-1:0]     ap_req_data  [NBUS],
  output logic                ap_rsp_valid [NBUS],
  input  logic                ap_rsp_ready [NBUS],
  output logic [XLEN-1:0]     ap_rsp_data  [NBUS],
  // argument fetch
  input  logic                arg_fetch_valid,
  output logic                arg_fetch_ready,
  input  logic [PADDR_W-1:0]  arg_fetch_addr,
  output logic [XLEN-1:0]     arg_vals     [NARG],
  output logic                arg_rdy,
  // RoCC L1 memory port
  output logic                mem_req_valid,
  input  logic                mem_req_ready,
  output mem_req_t            mem_req,
  input  logic                mem_resp_valid,
  input  mem_resp_t           mem_resp,
  output logic                mem_busy,
  // event strobes
  output logic                stall_conflict,
  output logic                stall_no_tag
);
  localparam int NSRC  = NBUS + 1;                 // buses plus the argument fetcher
  localparam int ARG_SRC = NBUS;
  localparam int SRC_W = $clog2(NSRC);
  localparam int TAG_W = $clog2(NTAGS);
  localparam int SLOT_W = (RESP_DEPTH > NARG) ? $clog2(RESP_DEPTH) : $clog2(NARG + 1);
  localparam int RQ_W  = $clog2(RESP_DEPTH);

  typedef struct packed {
    logic               write;
    logic [PADDR_W-1:0] addr;
    logic [XLEN-1:0]    data;
    logic [SLOT_W-1:0]  arg_idx;
    logic [TS_W-1:0]    ts;
  } wreq_t;

  typedef struct packed {
    logic               v;
    logic               write;
    logic [1:0]         width;
    logic [SRC_W-1:0]   bus;
    logic [PADDR_W-1:0] addr;
    logic [SLOT_W-1:0]  slot;
  } tag_entry_t;

  // ---------------------------------------------------------------- timestamps
  logic [TS_W-1:0] ts_now, prev_time;
  logic            any_push;

  // ---------------------------------------------------------------- parsers and request FIFOs
  logic                p_valid [NBUS];
  logic                p_ready [NBUS];
  logic                p_write [NBUS];
  logic [PADDR_W-1:0]  p_addr  [NBUS];
  logic [XLEN-1:0]     p_data  [NBUS];
  logic                p_active[NBUS];

  logic   q_enq_valid [NSRC];
  logic   q_enq_ready [NSRC];
  wreq_t  q_enq_data  [NSRC];
  logic   q_deq_valid [NSRC];
  logic   q_deq_ready [NSRC];
  wreq_t  q_deq_data  [NSRC];
  logic [$clog2(REQ_DEPTH+1)-1:0] q_count [NSRC];

  for (genvar b = 0; b < NBUS; b++) begin : g_bus
    ap_bus_req_parser #(.AP_AW(AP_AW), .AP_SW(AP_SW)) u_parser (
      .clk, .rst_n,
      .bus_offset   (bus_offset[b]),
      .ap_req_valid (ap_req_valid[b]),
      .ap_req_ready (ap_req_ready[b]),
      .ap_req_write (ap_req_write[b]),
      .ap_req_addr  (ap_req_addr[b]),
      .ap_req_size  (ap_req_size[b]),
      .ap_req_data  (ap_req_data[b]),
      .out_valid    (p_valid[b]),
      .out_ready    (p_ready[b]),
      .out_write    (p_write[b]),
      .out_addr     (p_addr[b]),
      .out_data     (p_data[b]),
      .active       (p_active[b])
    );
    assign q_enq_valid[b] = p_valid[b];
    assign p_ready[b]     = q_enq_ready[b];
    assign q_enq_data[b]  = '{write: p_write[b], addr: p_addr[b], data: p_data[b],
                              arg_idx: '0, ts: ts_now};
  end

  for (genvar s = 0; s < NSRC; s++) begin : g_q
    sync_fifo #(.T(wreq_t), .DEPTH(REQ_DEPTH)) u_reqq (
      .clk, .rst_n,
      .enq_valid (q_enq_valid[s]), .enq_ready (q_enq_ready[s]), .enq_data (q_enq_data[s]),
      .deq_valid (q_deq_valid[s]), .deq_ready (q_deq_ready[s]), .deq_data (q_deq_data[s]),
      .count     (q_count[s])
    );
  end

  // ---------------------------------------------------------------- argument fetcher
  logic                 af_busy;
  logic [SLOT_W-1:0]    af_idx;
  logic [PADDR_W-1:0]   af_addr;
  logic [NARG-1:0]      arg_v;

  assign arg_fetch_ready        = !af_busy;
  assign q_enq_valid[ARG_SRC]   = af_busy;
  assign q_enq_data[ARG_SRC]    = '{write: 1'b0, addr: af_addr + (PADDR_W'(af_idx) << 3),
                                    data: '0, arg_idx: af_idx, ts: ts_now};
  assign arg_rdy = &arg_v;

  // ---------------------------------------------------------------- priority arbiter
  logic [SRC_W-1:0] sel;
  logic             sel_valid;
  wreq_t            sel_req;
  logic [TS_W-1:0]  best_dt;

  always_comb begin
    sel       = '0;
    sel_valid = 1'b0;
    best_dt   = '1;
    for (int s = 0; s < NSRC; s++) begin
      logic [TS_W-1:0] dt;
      dt = q_deq_data[s].ts - prev_time;
      if (q_deq_valid[s] && (!sel_valid || dt < best_dt)) begin
        sel       = SRC_W'(s);
        sel_valid = 1'b1;
        best_dt   = dt;
      end
    end
    sel_req = q_deq_data[sel];
  end

  // ---------------------------------------------------------------- tag table and free tags
  tag_entry_t       tag_tab [NTAGS];
  logic [TAG_W-1:0] free_tags [NTAGS];
  logic [TAG_W-1:0] ft_head, ft_tail;
  logic [TAG_W:0]   ft_count;
  logic [TAG_W:0]   outstanding;

  logic conflict;
  always_comb begin
    conflict = 1'b0;
    for (int t = 0; t < NTAGS; t++) begin
      if (tag_tab[t].v && (tag_tab[t].addr[PADDR_W-1:3] == sel_req.addr[PADDR_W-1:3]) &&
          (tag_tab[t].write || sel_req.write))
        conflict = 1'b1;
    end
  end

  // ---------------------------------------------------------------- response queues (per bus)
  logic [XLEN-1:0]       rq_data  [NBUS][RESP_DEPTH];
  logic [RESP_DEPTH-1:0] rq_full  [NBUS];   // slot holds returned data
  logic [RQ_W-1:0]       rq_head  [NBUS];
  logic [RQ_W-1:0]       rq_tail  [NBUS];
  logic [RQ_W:0]         rq_count [NBUS];   // reserved slots

  logic rsp_slot_free;
  always_comb begin
    rsp_slot_free = 1'b1;
    for (int b = 0; b < NBUS; b++)
      if (sel == SRC_W'(b) && rq_count[b] == (RQ_W+1)'(RESP_DEPTH)) rsp_slot_free = 1'b0;
    if (sel_req.write) rsp_slot_free = 1'b1;
  end

  logic tag_avail, issue;
  assign tag_avail      = (ft_count != '0);
  assign stall_no_tag   = sel_valid && !tag_avail;
  assign stall_conflict = sel_valid && tag_avail && conflict;
  assign mem_req_valid  = sel_valid && tag_avail && !conflict && rsp_slot_free;
  assign issue          = mem_req_valid && mem_req_ready;

  always_comb begin
    mem_req      = '0;
    mem_req.addr = sel_req.addr;
    mem_req.tag  = MEM_TAG_W'(free_tags[ft_head]);
    mem_req.cmd  = sel_req.write ? M_XWR : M_XRD;
    mem_req.size = 2'd3;
    mem_req.data = sel_req.data;
    for (int s = 0; s < NSRC; s++) q_deq_ready[s] = issue && (sel == SRC_W'(s));
  end

  always_comb begin
    any_push = 1'b0;
    for (int s = 0; s < NSRC; s++) any_push |= q_enq_valid[s] && q_enq_ready[s];
  end

  logic                 resp_hit;
  tag_entry_t           resp_ent;
  logic [TAG_W-1:0]     resp_tag;
  assign resp_tag = mem_resp.tag[TAG_W-1:0];
  assign resp_ent = tag_tab[resp_tag];
  assign resp_hit = mem_resp_valid && resp_ent.v;

  // per-bus response slot allocation (at issue of a read) and release (to the kernel)
  logic [NBUS-1:0] alloc, drain;
  always_comb begin
    for (int b = 0; b < NBUS; b++) begin
      alloc[b] = issue && !sel_req.write && (sel == SRC_W'(b));
      drain[b] = ap_rsp_valid[b] && ap_rsp_ready[b];
    end
  end

  logic parsers_active;
  always_comb begin
    parsers_active = 1'b0;
    for (int b = 0; b < NBUS; b++) parsers_active |= p_active[b];
    for (int s = 0; s < NSRC; s++) parsers_active |= q_deq_valid[s];
  end
  assign mem_busy = parsers_active || af_busy || (outstanding != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_now    <= '0;
      prev_time <= '0;
      ft_head   <= '0;
      ft_tail   <= '0;
      ft_count  <= (TAG_W+1)'(NTAGS);
      outstanding <= '0;
      af_busy   <= 1'b0;
      af_idx    <= '0;
      af_addr   <= '0;
      arg_v     <= '0;
      for (int t = 0; t < NTAGS; t++) begin
        free_tags[t] <= TAG_W'(t);
        tag_tab[t]   <= '0;
      end
      for (int a = 0; a < NARG; a++) arg_vals[a] <= '0;
      for (int b = 0; b < NBUS; b++) begin
        rq_full[b]  <= '0;
        rq_head[b]  <= '0;
        rq_tail[b]  <= '0;
        rq_count[b] <= '0;
      end
    end else begin
      if (any_push) ts_now <= ts_now + 1'b1;

      // argument fetch sequencing
      if (!af_busy && arg_fetch_valid) begin
        af_busy <= 1'b1;
        af_idx  <= '0;
        af_addr <= arg_fetch_addr;
        arg_v   <= '0;
      end else if (af_busy && q_enq_ready[ARG_SRC]) begin
        if (af_idx == SLOT_W'(NARG - 1)) af_busy <= 1'b0;
        af_idx <= af_idx + 1'b1;
      end

      // issue: take a tag, fill its table row, reserve a response slot
      if (issue) begin
        prev_time <= sel_req.ts;
        ft_head   <= (ft_head == TAG_W'(NTAGS - 1)) ? '0 : ft_head + 1'b1;
        tag_tab[free_tags[ft_head]] <= '{v: 1'b1, write: sel_req.write, width: 2'd3,
                                        bus: sel, addr: sel_req.addr,
                                        slot: (sel == SRC_W'(ARG_SRC)) ? sel_req.arg_idx
                                                                      : SLOT_W'(rq_tail[sel])};
      end

      // response: release the tag, switch data to its destination
      if (resp_hit) begin
        tag_tab[resp_tag].v <= 1'b0;
        free_tags[ft_tail]  <= resp_tag;
        ft_tail             <= (ft_tail == TAG_W'(NTAGS - 1)) ? '0 : ft_tail + 1'b1;
        if (!resp_ent.write) begin
          if (resp_ent.bus == SRC_W'(ARG_SRC)) begin
            arg_vals[resp_ent.slot] <= mem_resp.data;
            arg_v[resp_ent.slot]    <= 1'b1;
          end
        end
      end
      case ({issue, resp_hit})
        2'b10: begin ft_count <= ft_count - 1'b1; outstanding <= outstanding + 1'b1; end
        2'b01: begin ft_count <= ft_count + 1'b1; outstanding <= outstanding - 1'b1; end
        default: ;
      endcase

      for (int b = 0; b < NBUS; b++) begin
        if (alloc[b]) rq_tail[b] <= (rq_tail[b] == RQ_W'(RESP_DEPTH - 1)) ? '0 : rq_tail[b] + 1'b1;
        if (drain[b]) begin
          rq_head[b] <= (rq_head[b] == RQ_W'(RESP_DEPTH - 1)) ? '0 : rq_head[b] + 1'b1;
          rq_full[b][rq_head[b]] <= 1'b0;
        end
        if (resp_hit && !resp_ent.write && resp_ent.bus == SRC_W'(b)) begin
          rq_data[b][RQ_W'(resp_ent.slot)] <= mem_resp.data;
          rq_full[b][RQ_W'(resp_ent.slot)] <= 1'b1;
        end
        case ({alloc[b], drain[b]})
          2'b10:   rq_count[b] <= rq_count[b] + 1'b1;
          2'b01:   rq_count[b] <= rq_count[b] - 1'b1;
          default: ;
        endcase
      end
    end
  end

  for (genvar b = 0; b < NBUS; b++) begin : g_rsp
    assign ap_rsp_valid[b] = rq_full[b][rq_head[b]];
    assign ap_rsp_data[b]  = rq_data[b][rq_head[b]];
  end

  // a response must carry the tag of an outstanding request
  a_resp_tag: assert property (@(posedge clk) disable iff (!rst_n)
                               mem_resp_valid |-> tag_tab[resp_tag].v);
  // requests leave in timestamp order
  a_order: assert property (@(posedge clk) disable iff (!rst_n)
                            issue |-> (TS_W'(sel_req.ts - prev_time) < TS_W'(1 << (TS_W - 1))));
endmodule
