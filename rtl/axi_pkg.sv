// axi_pkg: channel structs for the AMBA3 AXI ports of the CRA monitor.
//
// The monitor sits on an AXI interconnect as two slaves (trace analyzer and
// detector register files) and one master (shadow stack spill path).  Each
// port is carried as a request struct (master to slave) and a response struct
// (slave to master).  Widths follow a 32-bit AXI3 port with 12-bit IDs, as on
// the general-purpose ports of a Zynq-7000; the widths are this design's
// choice.  WID is kept because AXI3 has it; the slaves here ignore it.
package axi_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned ID_W   = 12;

  typedef logic [ADDR_W-1:0]   addr_t;
  typedef logic [DATA_W-1:0]   data_t;
  typedef logic [DATA_W/8-1:0] strb_t;
  typedef logic [ID_W-1:0]     id_t;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam logic [1:0] BURST_INCR  = 2'b01;

  typedef struct packed {
    id_t        awid;
    addr_t      awaddr;
    logic [3:0] awlen;     // AXI3: up to 16 beats
    logic [2:0] awsize;
    logic [1:0] awburst;
    logic       awvalid;
    id_t        wid;
    data_t      wdata;
    strb_t      wstrb;
    logic       wlast;
    logic       wvalid;
    logic       bready;
    id_t        arid;
    addr_t      araddr;
    logic [3:0] arlen;
    logic [2:0] arsize;
    logic [1:0] arburst;
    logic       arvalid;
    logic       rready;
  } axi_req_t;

  typedef struct packed {
    logic       awready;
    logic       wready;
    id_t        bid;
    logic [1:0] bresp;
    logic       bvalid;
    logic       arready;
    id_t        rid;
    data_t      rdata;
    logic [1:0] rresp;
    logic       rlast;
    logic       rvalid;
  } axi_resp_t;

endpackage
