// ring_node: one member of the 16-bit token-ring communication bus.
//
// Members are chained in a ring by three kinds of wires. The token travels on
// arb_out -> arb_in of the next member as a one-cycle pulse; a member may only
// send while it holds the token. The 16-bit data bus runs the same way,
// cbus_out -> cbus_in: every member re-registers what it receives and passes
// it on, except the token holder, which drives its own word. Each pair of
// members is also joined by a point-to-point handshake wire in each
// direction: hs_out[k] of a member goes to the k-th other member, counting in
// ascending member number and skipping itself, and arrives there as
// hs_in[j] with the same rule (this numbering is the one of the two-CPU plus
// SPI example of the design). A word moves with a four-phase handshake on
// that pair of wires: the sender drives the word, waits NODES cycles for it
// to travel the ring, raises its wire to the receiver (request); the receiver
// stores the word and raises its wire back (acknowledge); the sender drops
// request, the receiver drops acknowledge.
//
// Client side: a word is offered with tx_valid/tx_dest/tx_data/tx_last and is
// taken when tx_ready pulses. The member keeps the token from the first word
// of a block until the word with tx_last has gone, so blocks never
// interleave, and then passes it on. Received words appear on
// rx_valid/rx_data/rx_src and are held until rx_ready; the acknowledge is
// given as soon as the word is stored, so one word of buffering exists.
// tx_ready comes NODES + 2 cycles after the holder takes a word, and the
// words of a block follow one another every NODES + 6 cycles; an idle token moves one
// member per cycle.
//
// Token passing, the ring of data links, point-to-point handshake wires and
// the limit of eight members follow the published design. The four-phase
// protocol, the settling wait, the registered links and the block rule are
// choices of this implementation.
module ring_node #(
  parameter int unsigned NODES          = 3,
  parameter int unsigned ID             = 1,
  parameter bit          TOKEN_AT_RESET = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // ring
  input  logic                   arb_in,
  output logic                   arb_out,
  input  dpc_pkg::word_t         cbus_in,
  output dpc_pkg::word_t         cbus_out,
  input  logic [NODES-2:0]       hs_in,
  output logic [NODES-2:0]       hs_out,
  // client transmit
  input  logic                   tx_valid,
  input  dpc_pkg::node_id_t      tx_dest,
  input  dpc_pkg::word_t         tx_data,
  input  logic                   tx_last,
  output logic                   tx_ready,
  // client receive
  output logic                   rx_valid,
  output dpc_pkg::word_t         rx_data,
  output dpc_pkg::node_id_t      rx_src,
  input  logic                   rx_ready,
  output logic                   has_token
);
  import dpc_pkg::*;

  localparam int unsigned HSW   = NODES - 1;
  localparam int unsigned CNT_W = $clog2(NODES + 1);

  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_REQ, S_REL} state_e;

  // member number -> handshake wire index, and back
  function automatic int unsigned to_wire(node_id_t m);
    return (int'(m) < int'(ID)) ? int'(m) : int'(m) - 1;
  endfunction
  function automatic node_id_t to_member(int unsigned k);
    return (int'(k) < int'(ID)) ? node_id_t'(k) : node_id_t'(k + 1);
  endfunction

  state_e           state;
  logic             tok, in_block, driving, req, last_q;
  logic [CNT_W-1:0] cnt;
  word_t            out_data;
  logic [HSW-1:0]   req_sel, ack;
  logic             dest_ack;

  assign dest_ack  = |(hs_in & req_sel);
  assign tx_ready  = (state == S_REQ) && dest_ack;
  assign has_token = tok;

  always_comb begin
    for (int unsigned k = 0; k < HSW; k++)
      hs_out[k] = (req && req_sel[k]) || ack[k];
  end

  // sender side and token
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      tok      <= TOKEN_AT_RESET;
      in_block <= 1'b0;
      driving  <= 1'b0;
      req      <= 1'b0;
      last_q   <= 1'b0;
      cnt      <= '0;
      out_data <= '0;
      req_sel  <= '0;
      arb_out  <= 1'b0;
      cbus_out <= '0;
    end else begin
      arb_out  <= 1'b0;
      cbus_out <= driving ? out_data : cbus_in;
      if (arb_in) tok <= 1'b1;
      unique case (state)
        S_IDLE: if (tok) begin
          if (tx_valid) begin
            out_data <= tx_data;
            last_q   <= tx_last;
            req_sel  <= HSW'(1) << to_wire(tx_dest);
            driving  <= 1'b1;
            in_block <= 1'b1;
            cnt      <= CNT_W'(NODES);
            state    <= S_SETTLE;
          end else if (!in_block) begin
            arb_out <= 1'b1;
            tok     <= 1'b0;
          end
        end
        S_SETTLE: begin
          if (cnt == '0) begin
            req   <= 1'b1;
            state <= S_REQ;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_REQ: if (dest_ack) begin
          req   <= 1'b0;
          state <= S_REL;
        end
        S_REL: if (!dest_ack) begin
          driving <= 1'b0;
          state   <= S_IDLE;
          if (last_q) begin
            in_block <= 1'b0;
            arb_out  <= 1'b1;
            tok      <= 1'b0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // receiver side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack      <= '0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
      rx_src   <= '0;
    end else begin
      if (rx_valid && rx_ready) rx_valid <= 1'b0;
      for (int unsigned k = 0; k < HSW; k++)
        if (ack[k] && !hs_in[k]) ack[k] <= 1'b0;
      if (state == S_IDLE && (!rx_valid || rx_ready)) begin
        for (int unsigned k = 0; k < HSW; k++) begin
          if (hs_in[k] && !ack[k]) begin
            ack[k]   <= 1'b1;
            rx_valid <= 1'b1;
            rx_data  <= cbus_in;
            rx_src   <= to_member(k);
          end
        end
      end
    end
  end

  // only one token may circulate
  a_one_token: assert property (@(posedge clk) disable iff (!rst_n) arb_in |-> !tok);
  // a request is held until it is acknowledged
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               (state == S_REQ && !dest_ack) |=> req);
  // a member never addresses itself
  a_no_self: assert property (@(posedge clk) disable iff (!rst_n)
                              (state == S_IDLE && tok && tx_valid) |-> (32'(tx_dest) != ID && 32'(tx_dest) < NODES));

endmodule
