// spi_boot: SPI boot sequencer and serial flash controller (ring member 0).
//
// It answers block requests that arrive over the token ring with data read
// from the external serial flash. A request is a block whose first data word
// is a flash word address A (further words are ignored). The controller
// drops spi_cs_n, sends the READ instruction 0x03 and the 24-bit byte
// address 2*A, and reads 16-bit words, high byte first. The first word read
// is the image length N. It is sent back to the requester as the block
// header, followed by the N words that follow it in the flash, after which
// spi_cs_n rises. A flash image is therefore {N, w0 .. wN-1}, and the answer
// to a request is exactly that image. Each word is read only once the ring
// has taken the previous one; SCLK stays low meanwhile.
//
// SPI mode 0 (SCLK idles low, MOSI changes on falling and MISO is sampled on
// rising edges), MSB first. SCLK is clk / (2*CLK_DIV). Reading one word takes
// 16*2*CLK_DIV + 4 clock cycles (two bytes, each with one cycle to start and
// one to hand over).
//
// Booting from one serial flash, serving the CPUs one after the other and the
// leading word count follow the published design; the request format, the
// flash instruction and the byte order are choices of this implementation.
module spi_boot #(
  parameter int unsigned CLK_DIV = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // serial flash
  output logic                spi_sclk,
  output logic                spi_cs_n,
  output logic                spi_mosi,
  input  logic                spi_miso,
  // ring client
  input  logic                rx_valid,
  input  dpc_pkg::word_t      rx_data,
  input  dpc_pkg::node_id_t   rx_from,
  output logic                rx_ready,
  output logic                tx_valid,
  output dpc_pkg::node_id_t   tx_dest,
  output dpc_pkg::word_t      tx_data,
  output logic                tx_last,
  input  logic                tx_ready,
  output logic                busy
);
  import dpc_pkg::*;

  localparam int unsigned DIV_W = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  // ---------------- byte engine ----------------
  logic             bgo, bbusy, bdone;
  logic [7:0]       bout, sh_out, sh_in;
  logic [3:0]       bits;
  logic [DIV_W-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bbusy    <= 1'b0;
      bdone    <= 1'b0;
      sh_out   <= '0;
      sh_in    <= '0;
      bits     <= '0;
      div      <= '0;
      spi_sclk <= 1'b0;
      spi_mosi <= 1'b0;
    end else begin
      bdone <= 1'b0;
      if (bgo) begin
        bbusy    <= 1'b1;
        sh_out   <= {bout[6:0], 1'b0};
        spi_mosi <= bout[7];
        bits     <= 4'd8;
        div      <= '0;
        spi_sclk <= 1'b0;
      end else if (bbusy) begin
        if (32'(div) == CLK_DIV - 1) begin
          div <= '0;
          if (!spi_sclk) begin
            spi_sclk <= 1'b1;
            sh_in    <= {sh_in[6:0], spi_miso};
          end else begin
            spi_sclk <= 1'b0;
            sh_out   <= {sh_out[6:0], 1'b0};
            spi_mosi <= sh_out[7];
            bits     <= bits - 1'b1;
            if (bits == 4'd1) begin
              bbusy <= 1'b0;
              bdone <= 1'b1;
            end
          end
        end else begin
          div <= div + 1'b1;
        end
      end
    end
  end

  // ---------------- request / read sequencer ----------------
  typedef enum logic [2:0] {S_HDR, S_ADDR, S_DRAIN, S_CMD, S_RD, S_SEND, S_END} state_e;
  state_e    state;
  word_t     n_req, waddr, word, left;
  node_id_t  requester;
  logic [1:0] bidx;
  logic      waiting, first;
  logic [23:0] baddr;

  assign baddr = {7'b0, waddr, 1'b0};

  always_comb begin
    unique case (bidx)
      2'd0: bout = SPI_CMD_READ;
      2'd1: bout = baddr[23:16];
      2'd2: bout = baddr[15:8];
      default: bout = baddr[7:0];
    endcase
    if (state != S_CMD) bout = 8'h00;
  end

  assign bgo      = (state == S_CMD || state == S_RD) && !waiting;
  assign rx_ready = (state == S_HDR || state == S_ADDR || state == S_DRAIN) && rx_valid;
  assign tx_valid = (state == S_SEND);
  assign tx_dest  = requester;
  assign tx_data  = word;
  assign tx_last  = first ? (word == '0) : (left == 16'd1);
  assign busy     = (state != S_HDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HDR;
      n_req     <= '0;
      waddr     <= '0;
      word      <= '0;
      left      <= '0;
      requester <= '0;
      bidx      <= '0;
      waiting   <= 1'b0;
      first     <= 1'b0;
      spi_cs_n  <= 1'b1;
    end else begin
      if (bgo) waiting <= 1'b1;
      unique case (state)
        S_HDR: if (rx_valid && rx_data != '0) begin
          n_req     <= rx_data - 1'b1;
          requester <= rx_from;
          state     <= S_ADDR;
        end
        S_ADDR: if (rx_valid) begin
          waddr <= rx_data;
          state <= (n_req == '0) ? S_CMD : S_DRAIN;
          bidx  <= '0;
          if (n_req == '0) spi_cs_n <= 1'b0;
        end
        S_DRAIN: if (rx_valid) begin
          n_req <= n_req - 1'b1;
          if (n_req == 16'd1) begin
            state    <= S_CMD;
            spi_cs_n <= 1'b0;
          end
        end
        S_CMD: if (bdone) begin
          waiting <= 1'b0;
          bidx    <= bidx + 1'b1;
          if (bidx == 2'd3) begin
            state <= S_RD;
            first <= 1'b1;
          end
        end
        S_RD: if (bdone) begin
          waiting <= 1'b0;
          bidx    <= bidx + 1'b1;
          if (bidx[0]) begin
            word  <= {word[7:0], sh_in};
            state <= S_SEND;
          end else begin
            word  <= {word[7:0], sh_in};
          end
        end
        S_SEND: if (tx_ready) begin
          if (tx_last) begin
            state    <= S_END;
          end else begin
            left  <= first ? word : left - 1'b1;
            first <= 1'b0;
            state <= S_RD;
          end
        end
        S_END: begin
          spi_cs_n <= 1'b1;
          state    <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
    end
  end

endmodule
