// dpc_pkg: types and constants shared by the Distributed Processor Chip (DPC).
//
// The chip joins two 16-bit CPU-III nodes and an SPI flash controller on a
// 16-bit token-ring bus. The 16-bit word, the eight-member limit of the ring
// and the 32-bit debug shift register follow the published design; the ring
// member numbers, the debug register layout, the JTAG instruction codes and
// the CPU-core connection structs are choices of this implementation.
package dpc_pkg;

  localparam int unsigned WORD_W    = 16;  // CPU word and ring bus width
  localparam int unsigned MAX_NODES = 8;   // members a ring may have
  localparam int unsigned NODE_W    = 3;   // width of a ring member number
  localparam int unsigned RAM_AW    = 12;  // word address width of a CPU RAM
  localparam int unsigned DSR_W     = 32;  // debug shift register length

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [NODE_W-1:0] node_id_t;
  typedef logic [RAM_AW-1:0] ram_addr_t;

  // Ring member numbers of the DPC (member 0 is the SPI controller).
  localparam node_id_t ID_SPI  = 3'd0;
  localparam node_id_t ID_CPU1 = 3'd1;
  localparam node_id_t ID_CPU2 = 3'd2;

  // Debug shift register: {cmd[31:28], addr[27:16], data[15:0]}.
  typedef enum logic [3:0] {
    DBG_NOP   = 4'h0,
    DBG_WRITE = 4'h1,   // RAM[addr] <= data
    DBG_READ  = 4'h2,   // data of the next capture <= RAM[addr]
    DBG_HALT  = 4'h3,   // stop the CPU core
    DBG_RUN   = 4'h4,   // let the CPU core run
    DBG_STEP  = 4'h5    // one step pulse to a halted core
  } dbg_cmd_e;

  typedef struct packed {
    dbg_cmd_e  cmd;
    ram_addr_t addr;
    word_t     data;
  } dsr_t;

  // JTAG instruction register.
  localparam int unsigned IR_W = 4;
  localparam logic [IR_W-1:0] IR_DSR1   = 4'h1;
  localparam logic [IR_W-1:0] IR_DSR2   = 4'h2;
  localparam logic [IR_W-1:0] IR_BYPASS = 4'hF;

  // Serial flash read instruction (standard SPI NOR flash READ).
  localparam logic [7:0] SPI_CMD_READ = 8'h03;

  // Coprocessor interface of one CPU.
  localparam int unsigned COP_CTRL_W = 4;
  typedef logic [1:0] cop_sel_t;   // one of up to four coprocessors / contexts

  // What a CPU-III core drives into its node.
  typedef struct packed {
    logic                  i_en;       // instruction fetch (RAM port A)
    ram_addr_t             i_addr;
    logic                  d_en;       // data access (RAM port B)
    logic                  d_we;
    ram_addr_t             d_addr;
    word_t                 d_wdata;
    logic                  dma_valid;  // start a block send
    node_id_t              dma_dest;
    ram_addr_t             dma_addr;
    word_t                 dma_len;
    ram_addr_t             rx_base;    // where received blocks are written
    logic                  cop_req;    // coprocessor interface
    cop_sel_t              cop_sel;
    logic [COP_CTRL_W-1:0] cop_ctrl;
    word_t                 cop_xaddr;
    word_t                 cop_yaddr;
    word_t                 cop_wdata;
  } core_out_t;

  // What a node returns to its CPU-III core.
  typedef struct packed {
    word_t    i_rdata;
    word_t    d_rdata;
    logic     d_wait;     // port B taken by DMA or debug this cycle
    logic     run;        // booted and not halted by debug
    logic     step;       // single-step pulse from debug
    logic     dma_ready;
    logic     rx_done;    // a received block is complete
    node_id_t rx_src;
    word_t    rx_len;
    logic     cop_gnt;
    word_t    cop_rdata;
  } core_in_t;

endpackage
