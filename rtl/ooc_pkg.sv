// ooc_pkg: types and constants shared by the accelerator-rich device subsystem.
//
// Three on-chip protocols recur across the design and are defined here as packed structs:
//  * TCDM port (cluster L1): a request is granted in the cycle it is raised (gnt), the read
//    data/acknowledge (rvalid) follows exactly one cycle after the grant. 32-bit words,
//    byte addresses.
//  * System bus (SoC level, between the crossbar, the L2 scratchpad, the mailbox and the
//    cluster DMA): a 64-bit single-beat request with valid/ready, answered by rvalid exactly one
//    cycle after the accepting ready. This is a reduced stand-in for the AXI4 channels.
//  * Register bus (configuration of DMA, HWPE controllers and mailbox by the proxy core):
//    single-cycle write, combinational read.
// The widths of the TCDM and register buses, the address map and all encodings are this
// design's own choices; the 64-bit system bus width follows the 64-bit DMA transfers.
package ooc_pkg;

  localparam int unsigned TCDM_DW = 32;
  localparam int unsigned SBUS_DW = 64;

  typedef struct packed {
    logic        req;
    logic        we;
    logic [3:0]  be;
    logic [31:0] addr;
    logic [31:0] wdata;
  } tcdm_req_t;

  typedef struct packed {
    logic        gnt;
    logic        rvalid;
    logic [31:0] rdata;
  } tcdm_rsp_t;

  typedef struct packed {
    logic        valid;
    logic        we;
    logic [7:0]  be;
    logic [31:0] addr;
    logic [63:0] wdata;
  } sbus_req_t;

  typedef struct packed {
    logic        ready;
    logic        rvalid;
    logic [63:0] rdata;
  } sbus_rsp_t;

  typedef struct packed {
    logic        req;
    logic        we;
    logic [11:0] addr;
    logic [31:0] wdata;
  } reg_req_t;

  // SoC address map (byte addresses)
  localparam logic [31:0] L2_BASE      = 32'h1C00_0000;
  localparam logic [31:0] MBOX_BASE    = 32'h1A10_0000;
  localparam logic [31:0] L1_BASE      = 32'h1000_0000;

  // HWPE controller register map (byte offsets on the register bus)
  localparam logic [11:0] HWPE_TRIGGER = 12'h000;  // write: start a job
  localparam logic [11:0] HWPE_STATUS  = 12'h004;  // read: bit0 busy, bit1 done (sticky)
  localparam logic [11:0] HWPE_SEL     = 12'h008;  // kernel select of a merged datapath
  localparam logic [11:0] HWPE_STREAM0 = 12'h010;  // stream i: base at 0x10+0x10*i,
                                                   // count at +4, stride at +8
  localparam logic [11:0] HWPE_PARAM0  = 12'h060;  // engine parameters 0..7

  localparam int unsigned HWPE_NPARAM  = 8;
  localparam int unsigned HWPE_MAXSTR  = 5;        // stream register slots

  // DMA register map
  localparam logic [11:0] DMA_SRC      = 12'h000;
  localparam logic [11:0] DMA_DST      = 12'h004;
  localparam logic [11:0] DMA_LEN      = 12'h008;  // bytes, multiple of 8
  localparam logic [11:0] DMA_DIR      = 12'h00C;  // 0: L2 -> L1, 1: L1 -> L2
  localparam logic [11:0] DMA_CMD      = 12'h010;  // write: start
  localparam logic [11:0] DMA_STATUS   = 12'h014;  // bit0 busy, bit1 done (sticky)

  typedef enum logic [1:0] {
    KSEL_FIR  = 2'd0,
    KSEL_CONV = 2'd1
  } fir_conv_sel_e;

  typedef enum logic [1:0] {
    ENG_FIR_CONV = 2'd0,
    ENG_CNN      = 2'd1,
    ENG_CANNY    = 2'd2
  } engine_e;

endpackage
