// centrifuge_pkg: types and constants shared by the accelerator integration shims.
//
// Holds the RoCC command/response and L1 memory request/response records, the
// simplified ap_bus request record used between an HLS kernel and the memory
// bridge, and the Ethernet stream flit used by the NIC accelerator-queue router.
// Field widths follow Rocket Chip conventions where the design relies on them
// (64-bit data, 40-bit physical addresses, 5-bit register specifiers); the
// ACCEL_ONLY Ethertype value and the tag width are this design's own choices.
package centrifuge_pkg;

  localparam int XLEN      = 64;   // RoCC register / memory data width
  localparam int PADDR_W   = 40;   // physical address width
  localparam int MEM_TAG_W = 8;    // L1 request tag width

  // Memory command encodings (Rocket M_XRD / M_XWR)
  localparam logic [4:0] M_XRD = 5'b00000;
  localparam logic [4:0] M_XWR = 5'b00001;

  // Ethertype that steers a packet to the accelerator queues
  localparam logic [15:0] ETHTYPE_ACCEL_ONLY = 16'h88B5;

  // RoCC command from the core
  typedef struct packed {
    logic [6:0]      funct;
    logic [4:0]      rs2;
    logic [4:0]      rs1;
    logic            xd;
    logic            xs1;
    logic            xs2;
    logic [4:0]      rd;
    logic [6:0]      opcode;
    logic [XLEN-1:0] rs1_data;
    logic [XLEN-1:0] rs2_data;
  } rocc_cmd_t;

  // RoCC response to the core
  typedef struct packed {
    logic [4:0]      rd;
    logic [XLEN-1:0] data;
  } rocc_resp_t;

  // L1 data-cache request through the RoCC memory port
  typedef struct packed {
    logic [PADDR_W-1:0]   addr;
    logic [MEM_TAG_W-1:0] tag;
    logic [4:0]           cmd;   // M_XRD or M_XWR
    logic [1:0]           size;  // log2 of the access size in bytes
    logic [XLEN-1:0]      data;
  } mem_req_t;

  // L1 data-cache response
  typedef struct packed {
    logic [MEM_TAG_W-1:0] tag;
    logic                 has_data; // 1 for a load, 0 for a store acknowledge
    logic [XLEN-1:0]      data;
  } mem_resp_t;

  // One flit of the NIC packet stream
  typedef struct packed {
    logic [63:0] data;
    logic [7:0]  keep;
    logic        last;
  } net_flit_t;

endpackage
