// dbg_dsr: the 32-bit Debug Shift Register (DSR) of one CPU-III node.
//
// The DSR is loaded and read serially through the chip's JTAG TAP. While its
// TAP instruction selects it (sel), the TAP's capture, shift and update
// strobes (one clock cycle each, at a TCK rising edge in Capture-DR,
// Shift-DR and Update-DR) act on it: shift moves tdi in at bit 31 and bit 0
// out on tdo (least significant bit first, as in JTAG). On update the
// register is a command {cmd[31:28], addr[27:16], data[15:0]}:
//   WRITE  RAM[addr] <= data          READ  RAM[addr] is fetched
//   HALT   stop the core              RUN   release the core
//   STEP   one-cycle step pulse to a halted core
// On capture the register is loaded with {halted, busy, 2'b00, addr of the
// last access, word of the last READ}, so a READ is followed by a second scan
// that brings the word out. RAM accesses use a request/grant port; read data
// is taken one cycle after the grant.
//
// The 32-bit length, JTAG access, memory load/read-out and single stepping
// follow the published design; the command layout and codes are choices of
// this implementation.
module dbg_dsr (
  input  logic                clk,
  input  logic                rst_n,
  // from the TAP
  input  logic                sel,
  input  logic                capture,
  input  logic                shift,
  input  logic                update,
  input  logic                tdi,
  output logic                tdo,
  // RAM port
  output logic                mem_req,
  output logic                mem_we,
  output dpc_pkg::ram_addr_t  mem_addr,
  output dpc_pkg::word_t      mem_wdata,
  input  logic                mem_gnt,
  input  dpc_pkg::word_t      mem_rdata,
  // core control
  output logic                halt,
  output logic                step
);
  import dpc_pkg::*;

  dsr_t      sr;
  ram_addr_t addr_q;
  word_t     wdata_q, rdata_q;
  logic      pend, pend_we, rd_wait;

  assign tdo       = sr[0];
  assign mem_req   = pend;
  assign mem_we    = pend_we;
  assign mem_addr  = addr_q;
  assign mem_wdata = wdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr      <= '0;
      addr_q  <= '0;
      wdata_q <= '0;
      rdata_q <= '0;
      pend    <= 1'b0;
      pend_we <= 1'b0;
      rd_wait <= 1'b0;
      halt    <= 1'b0;
      step    <= 1'b0;
    end else begin
      step    <= 1'b0;
      rd_wait <= 1'b0;
      if (rd_wait) rdata_q <= mem_rdata;
      if (pend && mem_gnt) begin
        pend    <= 1'b0;
        rd_wait <= !pend_we;
      end
      if (sel && capture)
        sr <= {halt, pend || rd_wait, 2'b00, addr_q, rdata_q};
      else if (sel && shift)
        sr <= {tdi, sr[DSR_W-1:1]};
      else if (sel && update) begin
        unique case (sr.cmd)
          DBG_WRITE: begin
            addr_q  <= sr.addr;
            wdata_q <= sr.data;
            pend    <= 1'b1;
            pend_we <= 1'b1;
          end
          DBG_READ: begin
            addr_q  <= sr.addr;
            pend    <= 1'b1;
            pend_we <= 1'b0;
          end
          DBG_HALT: halt <= 1'b1;
          DBG_RUN:  halt <= 1'b0;
          DBG_STEP: step <= halt;
          default: ;
        endcase
      end
    end
  end

endmodule
