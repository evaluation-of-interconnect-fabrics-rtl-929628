// mpsoc_pkg: types and constants shared by the hierarchical MPSoC.
//
// The cluster bus is a single-beat AXI4 subset: 32-bit address and data,
// one transfer per address, no IDs and no outstanding transactions (a
// master waits for the response before it issues the next request of the
// same direction). Each AXI port is carried as one request struct (master
// to slave) and one response struct (slave to master), with the five AXI
// channels (AW, W, B, AR, R) inside. The 32-bit data width follows the
// design description; dropping bursts and IDs is this design's choice.
//
// The Wishbone alternative is the pipelined variant: a request is
// accepted when stb is high and stall low, and answered by one ack.
//
// NoC flits carry a 23-bit header and a 64-bit payload, both from the
// description. The split of the header into fields is this design's own:
// last flag, destination and source mesh coordinates, destination CPU in
// the cluster, and the 64-bit word address in that CPU's data memory.
package mpsoc_pkg;

  // ---------------- cluster bus -------------------------------------------
  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned STRB_W   = DATA_W / 8;
  // Each slave (a CPU data memory or the NCI) owns a 16 kB address window.
  localparam int unsigned SLV_WIN_LSB = 14;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
  } axi_ax_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
  } axi_w_t;

  typedef struct packed {
    axi_resp_e resp;
  } axi_b_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    axi_resp_e         resp;
  } axi_r_t;

  typedef struct packed {
    logic    aw_valid;
    axi_ax_t aw;
    logic    w_valid;
    axi_w_t  w;
    logic    b_ready;
    logic    ar_valid;
    axi_ax_t ar;
    logic    r_ready;
  } axi_req_t;

  typedef struct packed {
    logic   aw_ready;
    logic   w_ready;
    logic   b_valid;
    axi_b_t b;
    logic   ar_ready;
    logic   r_valid;
    axi_r_t r;
  } axi_rsp_t;

  localparam axi_req_t AXI_REQ_IDLE = '0;
  localparam axi_rsp_t AXI_RSP_IDLE = '0;

  // Interconnect topology.
  typedef enum logic {
    TOPO_SHARED   = 1'b0,
    TOPO_CROSSBAR = 1'b1
  } topology_e;

  // Bus standard of a cluster.
  typedef enum logic {
    BUS_AXI = 1'b0,
    BUS_WB  = 1'b1
  } bus_std_e;

  // ---------------- Wishbone (pipelined) ----------------------------------
  // A request is taken in a cycle with stb high and stall low; each taken
  // request is answered by exactly one cycle with ack high. cyc frames a
  // bus cycle and keeps the bus (or, in a crossbar, the slave) owned.
  typedef struct packed {
    logic              cyc;
    logic              stb;
    logic              we;
    logic [ADDR_W-1:0] adr;
    logic [DATA_W-1:0] dat;
    logic [STRB_W-1:0] sel;
  } wb_req_t;

  typedef struct packed {
    logic              ack;
    logic              stall;
    logic              err;
    logic [DATA_W-1:0] dat;
  } wb_rsp_t;

  localparam wb_req_t WB_REQ_IDLE = '0;
  localparam wb_rsp_t WB_RSP_IDLE = '0;

  // ---------------- CPU side of the bus master ----------------------------
  typedef struct packed {
    logic              req;
    logic              we;
    logic [ADDR_W-1:0] addr;   // cluster byte address
    logic [DATA_W-1:0] wdata;
    logic [STRB_W-1:0] be;
  } cpu_req_t;

  typedef struct packed {
    logic              gnt;    // request taken this cycle
    logic              rvalid; // load data valid
    logic [DATA_W-1:0] rdata;
  } cpu_rsp_t;

  // ---------------- NoC ---------------------------------------------------
  localparam int unsigned FLIT_HDR_W  = 23;
  localparam int unsigned FLIT_DATA_W = 64;
  localparam int unsigned COORD_W     = 2;   // 4x4 mesh at most
  localparam int unsigned CPU_ID_W    = 3;   // up to 8 CPUs per cluster
  localparam int unsigned FLIT_ADDR_W = 11;  // 64-bit words in a 16 kB memory

  typedef struct packed {
    logic                   last;     // last flit of the packet
    logic [COORD_W-1:0]     dst_x;
    logic [COORD_W-1:0]     dst_y;
    logic [COORD_W-1:0]     src_x;
    logic [COORD_W-1:0]     src_y;
    logic [CPU_ID_W-1:0]    dst_cpu;
    logic [FLIT_ADDR_W-1:0] dst_addr; // 64-bit word address in dst memory
  } flit_hdr_t;

  typedef struct packed {
    flit_hdr_t              hdr;
    logic [FLIT_DATA_W-1:0] data;
  } flit_t;

  // Switch box port numbering.
  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,  // y + 1
    PORT_EAST  = 3'd2,  // x + 1
    PORT_SOUTH = 3'd3,  // y - 1
    PORT_WEST  = 3'd4   // x - 1
  } port_e;

  localparam int unsigned NUM_PORTS = 5;

endpackage
