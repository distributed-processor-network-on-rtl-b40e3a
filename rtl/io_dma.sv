// io_dma: block-transfer (DMA) unit and boot loader of one CPU-III node.
//
// Everything a node exchanges over the token ring is a block: a header word
// holding the count N, then N data words. This is the format in which the
// serial flash controller answers a boot request (its first word is the
// number of words to copy), applied here to every transfer.
//
// Boot: when boot_en is high and the node has not booted, the unit sends the
// one-word block {1, boot_addr} to the flash controller (ring member 0), then
// writes the N words of the answer into RAM from address 0. It raises
// boot_done and reports on boot_next the flash word address just after the
// image (boot_addr + 1 + N), where the next CPU's image is taken to start.
//
// Send: a core command (cmd_valid/cmd_ready, cmd_dest, cmd_addr, cmd_len)
// sends RAM[cmd_addr .. cmd_addr+cmd_len-1] as one block to member cmd_dest.
// Receive: a block arriving outside boot is written from rx_base upwards;
// rx_done pulses for one cycle with rx_src and rx_len when it is complete.
//
// Received blocks always go to the RAM; moving a block straight into a
// coprocessor's data memory is not provided.
//
// Memory: one request port (mem_req/mem_we/mem_addr/mem_wdata) with a grant;
// read data is taken one cycle after the grant. Writes of received words have
// priority over reads for sending. Addresses wrap at the RAM size.
//
// DMA block transfers over the 16-bit bus, boot into RAM from address 0 and
// the leading word count follow the published design; the request block, the
// image placement of the second CPU and the port timing are choices of this
// implementation.
module io_dma (
  input  logic                   clk,
  input  logic                   rst_n,
  // boot
  input  logic                   boot_en,
  input  dpc_pkg::word_t         boot_addr,
  output logic                   boot_done,
  output dpc_pkg::word_t         boot_next,
  // core commands
  input  logic                   cmd_valid,
  output logic                   cmd_ready,
  input  dpc_pkg::node_id_t      cmd_dest,
  input  dpc_pkg::ram_addr_t     cmd_addr,
  input  dpc_pkg::word_t         cmd_len,
  input  dpc_pkg::ram_addr_t     rx_base,
  output logic                   rx_done,
  output dpc_pkg::node_id_t      rx_src,
  output dpc_pkg::word_t         rx_len,
  // ring client
  output logic                   tx_valid,
  output dpc_pkg::node_id_t      tx_dest,
  output dpc_pkg::word_t         tx_data,
  output logic                   tx_last,
  input  logic                   tx_ready,
  input  logic                   rx_valid,
  input  dpc_pkg::word_t         rx_data,
  input  dpc_pkg::node_id_t      rx_from,
  output logic                   rx_ready,
  // RAM port
  output logic                   mem_req,
  output logic                   mem_we,
  output dpc_pkg::ram_addr_t     mem_addr,
  output dpc_pkg::word_t         mem_wdata,
  input  logic                   mem_gnt,
  input  dpc_pkg::word_t         mem_rdata
);
  import dpc_pkg::*;

  // ---------------- transmit ----------------
  typedef enum logic [2:0] {T_IDLE, T_HDR, T_BOOTW, T_RD, T_RDW, T_DATA} tx_state_e;
  tx_state_e tstate;
  node_id_t  t_dest;
  ram_addr_t t_addr;
  word_t     t_left, t_word;
  logic      boot_pend;      // boot request sent, answer not complete
  logic      t_boot;         // the block being sent is the boot request

  logic rd_req, rd_gnt, wr_req, wr_gnt;
  logic r_done;              // the block being received completes this cycle

  assign cmd_ready = (tstate == T_IDLE) && !(boot_en && !boot_done && !boot_pend);

  always_comb begin
    tx_valid = 1'b0;
    tx_data  = t_word;
    tx_last  = 1'b0;
    tx_dest  = t_dest;
    unique case (tstate)
      T_HDR:   begin tx_valid = 1'b1; tx_data = t_left; tx_last = (t_left == '0); end
      T_BOOTW: begin tx_valid = 1'b1; tx_data = boot_addr; tx_last = 1'b1; end
      T_DATA:  begin tx_valid = 1'b1; tx_last = (t_left == 16'd1); end
      default: ;
    endcase
  end

  assign rd_req = (tstate == T_RD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate    <= T_IDLE;
      t_dest    <= '0;
      t_addr    <= '0;
      t_left    <= '0;
      t_word    <= '0;
      boot_pend <= 1'b0;
      t_boot    <= 1'b0;
    end else begin
      unique case (tstate)
        T_IDLE: begin
          if (boot_en && !boot_done && !boot_pend) begin
            boot_pend <= 1'b1;
            t_boot    <= 1'b1;
            t_dest    <= ID_SPI;
            t_left    <= 16'd1;
            tstate    <= T_HDR;
          end else if (cmd_valid) begin
            t_boot <= 1'b0;
            t_dest <= cmd_dest;
            t_addr <= cmd_addr;
            t_left <= cmd_len;
            tstate <= T_HDR;
          end
        end
        T_HDR: if (tx_ready) begin
          if (t_left == '0)   tstate <= T_IDLE;
          else if (t_boot)    tstate <= T_BOOTW;
          else                tstate <= T_RD;
        end
        T_BOOTW: if (tx_ready) tstate <= T_IDLE;
        T_RD: if (rd_gnt) tstate <= T_RDW;
        T_RDW: begin
          t_word <= mem_rdata;
          t_addr <= t_addr + 1'b1;
          tstate <= T_DATA;
        end
        T_DATA: if (tx_ready) begin
          t_left <= t_left - 1'b1;
          tstate <= (t_left == 16'd1) ? T_IDLE : T_RD;
        end
        default: tstate <= T_IDLE;
      endcase
      if (r_done && boot_pend) boot_pend <= 1'b0;
    end
  end

  // ---------------- receive ----------------
  typedef enum logic [0:0] {R_HDR, R_DATA} rx_state_e;
  rx_state_e rstate;
  ram_addr_t r_ptr;
  word_t     r_left, r_count;
  node_id_t  r_src;

  assign wr_req   = (rstate == R_DATA) && rx_valid;
  assign rx_ready = (rstate == R_HDR) ? rx_valid : (wr_req && wr_gnt);
  assign r_done   = (rstate == R_HDR && rx_valid && rx_data == '0)
                 || (rstate == R_DATA && wr_req && wr_gnt && r_left == 16'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate    <= R_HDR;
      r_ptr     <= '0;
      r_left    <= '0;
      r_count   <= '0;
      r_src     <= '0;
      rx_done   <= 1'b0;
      rx_src    <= '0;
      rx_len    <= '0;
      boot_done <= 1'b0;
      boot_next <= '0;
    end else begin
      rx_done <= 1'b0;
      unique case (rstate)
        R_HDR: if (rx_valid) begin
          r_count <= rx_data;
          r_left  <= rx_data;
          r_src   <= rx_from;
          r_ptr   <= boot_pend ? '0 : rx_base;
          if (rx_data != '0) rstate <= R_DATA;
        end
        R_DATA: if (wr_req && wr_gnt) begin
          r_ptr  <= r_ptr + 1'b1;
          r_left <= r_left - 1'b1;
          if (r_left == 16'd1) rstate <= R_HDR;
        end
        default: rstate <= R_HDR;
      endcase
      if (r_done) begin
        rx_done <= 1'b1;
        rx_src  <= (rstate == R_HDR) ? rx_from : r_src;
        rx_len  <= (rstate == R_HDR) ? '0 : r_count;
        if (boot_pend) begin
          boot_done <= 1'b1;
          boot_next <= boot_addr + 16'd1 + ((rstate == R_HDR) ? '0 : r_count);
        end
      end
    end
  end

  // ---------------- RAM port: receive writes first ----------------
  assign mem_req   = wr_req || rd_req;
  assign mem_we    = wr_req;
  assign mem_addr  = wr_req ? r_ptr : t_addr;
  assign mem_wdata = rx_data;
  assign wr_gnt    = wr_req && mem_gnt;
  assign rd_gnt    = rd_req && !wr_req && mem_gnt;

endmodule
