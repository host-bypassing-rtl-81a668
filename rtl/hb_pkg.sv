// hb_pkg: types and constants shared by the host-bypassing NIC driver.
//
// The FPGA emulates the software side of a poll-mode NIC driver: the NIC
// reaches descriptor rings and packet buffers inside the FPGA over PCIe
// peer-to-peer DMA, and the FPGA writes the NIC's tail pointer registers
// directly. This package holds
//   * the AXI4 channel structs of the 256-bit memory-mapped bus behind the
//     PCIe core (the width and the 250 MHz clock follow the Xilinx prototype),
//   * the block-RAM port struct used between BRAM controllers and memories,
//   * the BAR address map of the five memory regions (A..E), as printed in
//     the design's mapping table,
//   * the descriptor layout and NIC register offsets. The layout is the
//     16-byte "legacy" descriptor of the Intel 82599 family and the offsets
//     are that family's queue-0 RDT/TDT registers: these are this design's
//     choice of a concrete commodity 10G NIC, not part of the method.
package hb_pkg;

  // ---------------------------------------------------------------- bus
  localparam int unsigned DATA_W   = 256;          // AXI4 / BRAM data width
  localparam int unsigned STRB_W   = DATA_W / 8;   // 32 byte lanes
  localparam int unsigned ADDR_W   = 64;           // AXI4 address width
  localparam int unsigned ID_W     = 4;            // AXI4 ID width
  localparam int unsigned BRAM_AW  = 16;           // BRAM word-address width
  localparam int unsigned WORD_LSB = 5;            // log2(STRB_W)

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [STRB_W-1:0]  strb_t;
  typedef logic [ADDR_W-1:0]  addr_t;

  // AXI4 address channel (used for AW and AR)
  typedef struct packed {
    logic [ID_W-1:0] id;
    addr_t           addr;
    logic [7:0]      len;    // beats - 1
    logic [2:0]      size;   // log2(bytes per beat)
    logic [1:0]      burst;  // 0 FIXED, 1 INCR
  } axi_ax_t;

  typedef struct packed {
    data_t data;
    strb_t strb;
    logic  last;
  } axi_w_t;

  typedef struct packed {
    logic [ID_W-1:0] id;
    logic [1:0]      resp;
  } axi_b_t;

  typedef struct packed {
    logic [ID_W-1:0] id;
    data_t           data;
    logic [1:0]      resp;
    logic            last;
  } axi_r_t;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_DECERR = 2'b11;
  localparam logic [1:0] BURST_FIXED = 2'b00;
  localparam logic [1:0] BURST_INCR  = 2'b01;

  // Block-RAM port request; read data comes back one cycle after en.
  typedef struct packed {
    logic               en;
    strb_t              we;     // byte write enables, 0 = read
    logic [BRAM_AW-1:0] addr;   // word address
    data_t              wdata;
  } bram_req_t;

  // ---------------------------------------------------------------- map
  // BAR offsets of the five regions (mapping table of the FPGA design).
  localparam int unsigned N_REGIONS = 5;
  typedef enum logic [2:0] {
    REG_RXBUF  = 3'd0,   // A 0x00_0000 - 0x07_FFFF
    REG_TXBUF  = 3'd1,   // B 0x08_0000 - 0x0F_FFFF
    REG_RXRING = 3'd2,   // C 0x10_0000 - 0x10_0FFF
    REG_TXRING = 3'd3,   // D 0x10_1000 - 0x10_1FFF
    REG_CFG    = 3'd4    // E 0x10_2000 - 0x10_2FFF
  } region_e;

  localparam logic [23:0] RXBUF_BASE  = 24'h00_0000;
  localparam logic [23:0] TXBUF_BASE  = 24'h08_0000;
  localparam logic [23:0] RXRING_BASE = 24'h10_0000;
  localparam logic [23:0] TXRING_BASE = 24'h10_1000;
  localparam logic [23:0] CFG_BASE    = 24'h10_2000;
  localparam int unsigned BUF_BYTES   = 32'h8_0000;  // 512 KiB per packet buffer
  localparam int unsigned RING_BYTES  = 32'h1000;    // 4 KiB per ring region
  localparam int unsigned CFG_BYTES   = 32'h1000;

  // ---------------------------------------------------------------- descriptors
  localparam int unsigned DESC_BYTES = 16;
  typedef logic [8*DESC_BYTES-1:0] desc_t;

  // rx, as written by the FPGA: [63:0] buffer address, rest zero.
  // rx, as written back by the NIC: [79:64] length, [96] DD, [97] EOP.
  localparam int unsigned RXD_LEN_LSB = 64;
  localparam int unsigned RXD_DD_BIT  = 96;
  localparam int unsigned RXD_EOP_BIT = 97;

  // tx: [63:0] buffer address, [79:64] length, [95:88] CMD, [99:96] STA.
  localparam int unsigned TXD_LEN_LSB  = 64;
  localparam int unsigned TXD_EOP_BIT  = 88;   // CMD.EOP
  localparam int unsigned TXD_IFCS_BIT = 89;   // CMD.IFCS (insert FCS)
  localparam int unsigned TXD_RS_BIT   = 91;   // CMD.RS   (report status)
  localparam int unsigned TXD_DD_BIT   = 96;   // STA.DD   (written back)

  // NIC register offsets written over the direct-write path (queue 0).
  localparam logic [31:0] NIC_RDT_OFF = 32'h0000_1018;
  localparam logic [31:0] NIC_TDT_OFF = 32'h0000_6018;

  // Tail pointer update carried from a handler to the direct-write path.
  typedef struct packed {
    logic [31:0] reg_off;   // register offset in the NIC BAR
    logic [31:0] value;     // new tail pointer
  } tail_upd_t;

  // Configuration register word (region E, word 0).
  typedef struct packed {
    logic        batch_en;  // enable tail pointer batching (delay modules)
    logic        wb_en;     // enable tx descriptor writeback congestion control
    logic        start;     // start command
    addr_t       fpga_base; // physical address of the FPGA BAR
    addr_t       nic_base;  // physical address of the NIC register BAR
  } cfg_t;

endpackage
