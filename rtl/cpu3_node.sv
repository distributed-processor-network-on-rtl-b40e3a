// cpu3_node: everything of one CPU-III around its core.
//
// A node holds the dual-port RAM shared by instructions and data, the ring
// interface with its block-transfer (DMA) and boot unit, and the debug shift
// register. The core itself connects through the core_o / core_i structs:
// instruction fetches use RAM port A alone, data accesses share port B.
// Port B goes first to the debug register, then to the DMA unit, then to the
// core; d_wait tells the core that its data access of this cycle was not
// served and has to be repeated. run is high when the node has booted (or
// the chip does not boot from flash, boot_mode low) and debug has not halted
// it; step is the debug single-step pulse. The coprocessor fields of core_o
// are handled outside the node; cop_gnt and cop_rdata are only passed into
// core_i.
//
// The structure (one dual-port RAM per CPU, DMA on the ring, a DSR per CPU)
// follows the published design; the port-B priority order and the run rule
// are choices of this implementation.
module cpu3_node #(
  parameter int unsigned NODES          = 3,
  parameter int unsigned ID             = 1,
  parameter bit          TOKEN_AT_RESET = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // boot
  input  logic                 boot_mode,
  input  logic                 boot_en,
  input  dpc_pkg::word_t       boot_addr,
  output logic                 boot_done,
  output dpc_pkg::word_t       boot_next,
  // ring
  input  logic                 arb_in,
  output logic                 arb_out,
  input  dpc_pkg::word_t       cbus_in,
  output dpc_pkg::word_t       cbus_out,
  input  logic [NODES-2:0]     hs_in,
  output logic [NODES-2:0]     hs_out,
  // debug register access from the TAP
  input  logic                 dsr_sel,
  input  logic                 dr_capture,
  input  logic                 dr_shift,
  input  logic                 dr_update,
  input  logic                 dr_tdi,
  output logic                 dsr_tdo,
  // core
  input  dpc_pkg::core_out_t   core_o,
  output dpc_pkg::core_in_t    core_i,
  input  logic                 cop_gnt,
  input  dpc_pkg::word_t       cop_rdata
);
  import dpc_pkg::*;

  // ring client
  logic     tx_valid, tx_last, tx_ready, rx_valid, rx_ready;
  node_id_t tx_dest, rx_from;
  word_t    tx_data, rx_data;

  // RAM port B requesters
  logic      dma_req, dma_we, dma_gnt, dbg_req, dbg_we, dbg_gnt;
  ram_addr_t dma_addr, dbg_addr;
  word_t     dma_wdata, dbg_wdata, b_rdata, a_rdata;
  logic      b_en, b_we;
  ram_addr_t b_addr;
  word_t     b_wdata;
  logic      halt, step, dma_ready, rx_done;
  node_id_t  rx_src;
  word_t     rx_len;

  ring_node #(.NODES(NODES), .ID(ID), .TOKEN_AT_RESET(TOKEN_AT_RESET)) u_ring (
    .clk, .rst_n,
    .arb_in, .arb_out, .cbus_in, .cbus_out, .hs_in, .hs_out,
    .tx_valid, .tx_dest, .tx_data, .tx_last, .tx_ready,
    .rx_valid, .rx_data, .rx_src(rx_from), .rx_ready,
    .has_token()
  );

  io_dma u_dma (
    .clk, .rst_n,
    .boot_en, .boot_addr, .boot_done, .boot_next,
    .cmd_valid(core_o.dma_valid), .cmd_ready(dma_ready),
    .cmd_dest(core_o.dma_dest), .cmd_addr(core_o.dma_addr), .cmd_len(core_o.dma_len),
    .rx_base(core_o.rx_base), .rx_done, .rx_src, .rx_len,
    .tx_valid, .tx_dest, .tx_data, .tx_last, .tx_ready,
    .rx_valid, .rx_data, .rx_from, .rx_ready,
    .mem_req(dma_req), .mem_we(dma_we), .mem_addr(dma_addr), .mem_wdata(dma_wdata),
    .mem_gnt(dma_gnt), .mem_rdata(b_rdata)
  );

  dbg_dsr u_dsr (
    .clk, .rst_n,
    .sel(dsr_sel), .capture(dr_capture), .shift(dr_shift), .update(dr_update),
    .tdi(dr_tdi), .tdo(dsr_tdo),
    .mem_req(dbg_req), .mem_we(dbg_we), .mem_addr(dbg_addr), .mem_wdata(dbg_wdata),
    .mem_gnt(dbg_gnt), .mem_rdata(b_rdata),
    .halt, .step
  );

  // port B: debug, then DMA, then core
  assign dbg_gnt = dbg_req;
  assign dma_gnt = dma_req && !dbg_req;
  always_comb begin
    if (dbg_req) begin
      b_we = dbg_we;  b_addr = dbg_addr;  b_wdata = dbg_wdata;
    end else if (dma_req) begin
      b_we = dma_we;  b_addr = dma_addr;  b_wdata = dma_wdata;
    end else begin
      b_we = core_o.d_we;  b_addr = core_o.d_addr;  b_wdata = core_o.d_wdata;
    end
  end
  assign b_en = dbg_req || dma_req || core_o.d_en;

  dp_ram #(.W(WORD_W), .AW(RAM_AW)) u_ram (
    .clk,
    .a_en(core_o.i_en), .a_we(1'b0), .a_addr(core_o.i_addr), .a_wdata('0), .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  always_comb begin
    core_i           = '0;
    core_i.i_rdata   = a_rdata;
    core_i.d_rdata   = b_rdata;
    core_i.d_wait    = core_o.d_en && (dbg_req || dma_req);
    core_i.run       = !halt && (boot_done || !boot_mode);
    core_i.step      = step;
    core_i.dma_ready = dma_ready;
    core_i.rx_done   = rx_done;
    core_i.rx_src    = rx_src;
    core_i.rx_len    = rx_len;
    core_i.cop_gnt   = cop_gnt;
    core_i.cop_rdata = cop_rdata;
  end

endmodule
