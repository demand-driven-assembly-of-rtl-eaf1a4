// pr_pkg: types and constants shared by the reconfigurable external-IO system.
//
// The system hangs six identical partial-reconfiguration (PR) regions off the
// processor's memory-mapped bus. Every region looks the same from outside: an
// AXI4-Lite slave window of 64 KiB at a fixed address, eight tristate IO pins
// and one interrupt line. This package holds the AXI4-Lite request/response
// bundles used on every bus segment, the address map and the list of modules
// a region can be loaded with.
//
// Taken from the source design: six regions, region k at 0x41A1_0000 +
// k*0x1_0000 with a 64 KiB window, region k on interrupt input k, 8 pins per
// region. Own choices: the addresses of the decouple-control GPIO and of the
// interrupt controller, and the 32-bit AXI4-Lite bus used throughout.
package pr_pkg;

  localparam int unsigned AXIL_AW = 32;
  localparam int unsigned AXIL_DW = 32;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // Master-to-slave half of an AXI4-Lite link (protection bits omitted).
  typedef struct packed {
    logic [AXIL_AW-1:0] awaddr;
    logic               awvalid;
    logic [AXIL_DW-1:0] wdata;
    logic [AXIL_DW/8-1:0] wstrb;
    logic               wvalid;
    logic               bready;
    logic [AXIL_AW-1:0] araddr;
    logic               arvalid;
    logic               rready;
  } axil_req_t;

  // Slave-to-master half of an AXI4-Lite link.
  typedef struct packed {
    logic               awready;
    logic               wready;
    axi_resp_e          bresp;
    logic               bvalid;
    logic               arready;
    logic [AXIL_DW-1:0] rdata;
    axi_resp_e          rresp;
    logic               rvalid;
  } axil_rsp_t;

  // Reconfigurable modules that can be loaded into a region.
  typedef enum logic [2:0] {
    RM_GPIO      = 3'd0,
    RM_TIMER_PWM = 3'd1,
    RM_UARTLITE  = 3'd2,
    RM_SPI       = 3'd3,
    RM_IIC       = 3'd4
  } rm_kind_e;

  // Region template.
  localparam int unsigned N_RP    = 6;
  localparam int unsigned RP_PINS = 8;

  // Address map. Slave 0: decouple GPIO, slave 1: interrupt controller,
  // slaves 2..7: regions rp0..rp5.
  localparam int unsigned N_SLV = N_RP + 2;
  localparam logic [31:0] RP_BASE            = 32'h41A1_0000;
  localparam logic [31:0] RP_SPAN            = 32'h0001_0000;
  localparam logic [31:0] DECOUPLE_GPIO_BASE = 32'h4120_0000;
  localparam logic [31:0] INTC_BASE          = 32'h4180_0000;
  localparam logic [31:0] SLV_MASK           = 32'hFFFF_0000;

  function automatic logic [N_SLV-1:0][31:0] slave_bases();
    logic [N_SLV-1:0][31:0] b;
    b[0] = DECOUPLE_GPIO_BASE;
    b[1] = INTC_BASE;
    for (int k = 0; k < N_RP; k++) b[k+2] = RP_BASE + RP_SPAN * k;
    return b;
  endfunction

  localparam logic [N_SLV-1:0][31:0] SLV_BASE = slave_bases();

endpackage
