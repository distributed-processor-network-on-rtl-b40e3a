// dpc_top: the Distributed Processor Chip (DPC).
//
// Two CPU-III nodes and the SPI flash controller are members of a 16-bit
// token ring: member 1 (CPU 1) passes token and data to member 2 (CPU 2),
// member 2 to member 0 (SPI controller) and member 0 back to member 1, each
// pair joined by point-to-point handshake wires. The token starts at
// member 0. After reset, with boot_en high, CPU 1 (the boot master) requests
// the image at flash word 0; when it has booted it starts running, and CPU 2
// requests the image that follows it in the flash. With boot_en low no
// booting happens and both cores may run at once. A JTAG TAP reaches the
// debug shift register of each CPU, and one coprocessor interface, shared
// through an arbiter, serves both CPUs.
//
// The CPU-III cores are not part of this RTL: each core's connections to its
// node (RAM ports, DMA commands, run/step, coprocessor port) are brought out
// as core_o (into the chip) and core_i (out of the chip).
//
// Interfaces: SPI mode 0 master to the serial flash (SCLK = clk/(2*SPI_CLK_DIV));
// JTAG pins sampled with clk (TCK below clk/4); coprocessor interface as in
// cop_mux. All logic runs on clk with active-low asynchronous reset rst_n.
//
// The set of blocks and their connections follow the published block diagram
// and ring example; member numbering, token start and image placement are
// choices of this implementation.
module dpc_top #(
  parameter int unsigned SPI_CLK_DIV = 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                boot_en,
  // serial flash
  output logic                                spi_sclk,
  output logic                                spi_cs_n,
  output logic                                spi_mosi,
  input  logic                                spi_miso,
  // JTAG
  input  logic                                jtag_tck,
  input  logic                                jtag_tms,
  input  logic                                jtag_tdi,
  input  logic                                jtag_trst_n,
  output logic                                jtag_tdo,
  // coprocessor interface
  output logic                                cop_act,
  output logic                                cop_own,
  output dpc_pkg::cop_sel_t                   cop_sel,
  output logic [dpc_pkg::COP_CTRL_W-1:0]      cop_ctrl,
  output dpc_pkg::word_t                      cop_xaddr,
  output dpc_pkg::word_t                      cop_yaddr,
  output dpc_pkg::word_t                      cop_wdata,
  input  dpc_pkg::word_t                      cop_rdata,
  // CPU-III cores (index 0 = CPU 1, index 1 = CPU 2)
  input  dpc_pkg::core_out_t [1:0]            core_o,
  output dpc_pkg::core_in_t  [1:0]            core_i,
  output logic               [1:0]            boot_done
);
  import dpc_pkg::*;

  localparam int unsigned NODES = 3;

  // ring signals indexed by member number
  logic  [NODES-1:0]            arb_out;
  word_t [NODES-1:0]            cbus_out;
  logic  [NODES-1:0][NODES-2:0] hs_out, hs_in;

  // hs_out[i][k] goes to the k-th other member m and arrives there as
  // hs_in[m][j], j being the position of i among m's other members
  for (genvar i = 0; i < NODES; i++) begin : g_hs
    for (genvar k = 0; k < NODES - 1; k++) begin : g_k
      localparam int M = (k < i) ? k : k + 1;
      localparam int J = (i < M) ? i : i - 1;
      assign hs_in[M][J] = hs_out[i][k];
    end
  end

  // JTAG
  logic [1:0] dsr_sel, dsr_tdo;
  logic       dr_capture, dr_shift, dr_update, dr_tdi;

  jtag_tap u_tap (
    .clk, .rst_n,
    .tck(jtag_tck), .tms(jtag_tms), .tdi(jtag_tdi), .trst_n(jtag_trst_n), .tdo(jtag_tdo),
    .dsr_sel, .dr_capture, .dr_shift, .dr_update, .dr_tdi, .dsr_tdo
  );

  // coprocessor interface
  logic [1:0] cop_gnt;
  word_t      cop_rd;
  logic [1:0]                 c_req;
  cop_sel_t [1:0]             c_sel;
  logic [1:0][COP_CTRL_W-1:0] c_ctrl;
  word_t [1:0]                c_x, c_y, c_w;

  for (genvar c = 0; c < 2; c++) begin : g_cop
    assign c_req[c]  = core_o[c].cop_req;
    assign c_sel[c]  = core_o[c].cop_sel;
    assign c_ctrl[c] = core_o[c].cop_ctrl;
    assign c_x[c]    = core_o[c].cop_xaddr;
    assign c_y[c]    = core_o[c].cop_yaddr;
    assign c_w[c]    = core_o[c].cop_wdata;
  end

  cop_mux u_cop (
    .clk, .rst_n,
    .req(c_req), .sel(c_sel), .ctrl(c_ctrl), .xaddr(c_x), .yaddr(c_y), .wdata(c_w),
    .gnt(cop_gnt), .rdata(cop_rd),
    .cop_act, .cop_own, .cop_sel, .cop_ctrl, .cop_xaddr, .cop_yaddr, .cop_wdata, .cop_rdata
  );

  // CPU nodes: CPU 1 is ring member 1, CPU 2 member 2
  word_t [1:0] boot_next;
  logic  [1:0] boot_go;
  word_t [1:0] boot_addr;

  assign boot_go[0]   = boot_en;
  assign boot_addr[0] = '0;
  assign boot_go[1]   = boot_en && boot_done[0];
  assign boot_addr[1] = boot_next[0];

  for (genvar c = 0; c < 2; c++) begin : g_cpu
    cpu3_node #(.NODES(NODES), .ID(c + 1), .TOKEN_AT_RESET(1'b0)) u_node (
      .clk, .rst_n,
      .boot_mode(boot_en), .boot_en(boot_go[c]), .boot_addr(boot_addr[c]),
      .boot_done(boot_done[c]), .boot_next(boot_next[c]),
      .arb_in(arb_out[c]), .arb_out(arb_out[c + 1]),
      .cbus_in(cbus_out[c]), .cbus_out(cbus_out[c + 1]),
      .hs_in(hs_in[c + 1]), .hs_out(hs_out[c + 1]),
      .dsr_sel(dsr_sel[c]), .dr_capture, .dr_shift, .dr_update, .dr_tdi,
      .dsr_tdo(dsr_tdo[c]),
      .core_o(core_o[c]), .core_i(core_i[c]),
      .cop_gnt(cop_gnt[c]), .cop_rdata(cop_rd)
    );
  end

  // SPI flash controller, ring member 0
  logic     s_tx_valid, s_tx_last, s_tx_ready, s_rx_valid, s_rx_ready;
  node_id_t s_tx_dest, s_rx_from;
  word_t    s_tx_data, s_rx_data;

  ring_node #(.NODES(NODES), .ID(0), .TOKEN_AT_RESET(1'b1)) u_spi_ring (
    .clk, .rst_n,
    .arb_in(arb_out[NODES-1]), .arb_out(arb_out[0]),
    .cbus_in(cbus_out[NODES-1]), .cbus_out(cbus_out[0]),
    .hs_in(hs_in[0]), .hs_out(hs_out[0]),
    .tx_valid(s_tx_valid), .tx_dest(s_tx_dest), .tx_data(s_tx_data),
    .tx_last(s_tx_last), .tx_ready(s_tx_ready),
    .rx_valid(s_rx_valid), .rx_data(s_rx_data), .rx_src(s_rx_from), .rx_ready(s_rx_ready),
    .has_token()
  );

  spi_boot #(.CLK_DIV(SPI_CLK_DIV)) u_spi (
    .clk, .rst_n,
    .spi_sclk, .spi_cs_n, .spi_mosi, .spi_miso,
    .rx_valid(s_rx_valid), .rx_data(s_rx_data), .rx_from(s_rx_from), .rx_ready(s_rx_ready),
    .tx_valid(s_tx_valid), .tx_dest(s_tx_dest), .tx_data(s_tx_data),
    .tx_last(s_tx_last), .tx_ready(s_tx_ready),
    .busy()
  );

endmodule
