// cop_mux: shares the chip's single coprocessor interface between both CPUs.
//
// Each CPU presents its coprocessor port: a request, the number of the
// coprocessor (or coprocessor context) it addresses (up to four), the control
// word that steps the coprocessor pipeline and starts memory transfers, the
// X and Y addresses of the coprocessor's two data memories and a data word.
// A CPU holds cop_req for as long as it needs the interface. The arbiter
// grants the interface to one CPU at a time; when both request at once it
// alternates (round robin). The grant is registered: gnt rises the cycle
// after req and falls the cycle after req falls. While granted, the CPU's
// signals drive the external interface and cop_own tells which CPU it is;
// with no owner cop_ctrl is zero, which is taken as "no operation". Read data
// from the coprocessor (exchange registers) goes to both CPUs.
//
// One external interface shared by both cores, up to four coprocessors, the
// control/data/X-address/Y-address connections follow the published design;
// the request/grant protocol, round-robin order and idle coding are choices
// of this implementation.
module cop_mux (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // CPU side
  input  logic                 [1:0]            req,
  input  dpc_pkg::cop_sel_t    [1:0]            sel,
  input  logic [1:0][dpc_pkg::COP_CTRL_W-1:0]   ctrl,
  input  dpc_pkg::word_t       [1:0]            xaddr,
  input  dpc_pkg::word_t       [1:0]            yaddr,
  input  dpc_pkg::word_t       [1:0]            wdata,
  output logic                 [1:0]            gnt,
  output dpc_pkg::word_t                        rdata,
  // external coprocessor interface
  output logic                                  cop_act,
  output logic                                  cop_own,
  output dpc_pkg::cop_sel_t                     cop_sel,
  output logic [dpc_pkg::COP_CTRL_W-1:0]        cop_ctrl,
  output dpc_pkg::word_t                        cop_xaddr,
  output dpc_pkg::word_t                        cop_yaddr,
  output dpc_pkg::word_t                        cop_wdata,
  input  dpc_pkg::word_t                        cop_rdata
);
  import dpc_pkg::*;

  logic busy, owner, last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= 1'b0;
      last  <= 1'b1;
    end else if (busy) begin
      if (!req[owner]) busy <= 1'b0;
    end else if (|req) begin
      busy  <= 1'b1;
      owner <= (req == 2'b11) ? !last : req[1];
      last  <= (req == 2'b11) ? !last : req[1];
    end
  end

  assign gnt[0]    = busy && !owner;
  assign gnt[1]    = busy &&  owner;
  assign cop_act   = busy;
  assign cop_own   = owner;
  assign cop_sel   = busy ? sel[owner]   : '0;
  assign cop_ctrl  = busy ? ctrl[owner]  : '0;
  assign cop_xaddr = busy ? xaddr[owner] : '0;
  assign cop_yaddr = busy ? yaddr[owner] : '0;
  assign cop_wdata = busy ? wdata[owner] : '0;
  assign rdata     = cop_rdata;

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
