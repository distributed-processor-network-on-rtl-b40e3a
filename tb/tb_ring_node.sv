// tb_ring_node: self-checking test of the token-ring member interface.
// Eight members (the most the bus allows) form a ring wired by the
// point-to-point handshake rule. Each sends random blocks (1..4 words) to
// random other members while receivers take words at random moments. Every
// received word is compared with the per-(source, destination) sequence
// that was sent; blocks must arrive whole, without words of another source
// in between. On an idle ring the time from token arrival to tx_ready and
// the spacing of the words of one block (NODES + 6 cycles) are checked, and
// token passes are counted.
module tb_ring_node;
  import dpc_pkg::*;
  localparam int N = 8;      // the largest ring the bus allows
  localparam int BLOCKS = 25;   // per member

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [N-1:0]        arb_out, has_token;
  word_t [N-1:0]        cbus_out;
  logic  [N-1:0][N-2:0] hs_out, hs_in;
  logic  [N-1:0]        tx_valid, tx_last, tx_ready, rx_valid, rx_ready;
  node_id_t [N-1:0]     tx_dest, rx_src;
  word_t [N-1:0]        tx_data, rx_data;

  for (genvar i = 0; i < N; i++) begin : g_n
    for (genvar k = 0; k < N - 1; k++) begin : g_k
      localparam int M = (k < i) ? k : k + 1;
      localparam int J = (i < M) ? i : i - 1;
      assign hs_in[M][J] = hs_out[i][k];
    end
    ring_node #(.NODES(N), .ID(i), .TOKEN_AT_RESET(i == 0)) u (
      .clk, .rst_n,
      .arb_in(arb_out[(i + N - 1) % N]), .arb_out(arb_out[i]),
      .cbus_in(cbus_out[(i + N - 1) % N]), .cbus_out(cbus_out[i]),
      .hs_in(hs_in[i]), .hs_out(hs_out[i]),
      .tx_valid(tx_valid[i]), .tx_dest(tx_dest[i]), .tx_data(tx_data[i]),
      .tx_last(tx_last[i]), .tx_ready(tx_ready[i]),
      .rx_valid(rx_valid[i]), .rx_data(rx_data[i]), .rx_src(rx_src[i]), .rx_ready(rx_ready[i]),
      .has_token(has_token[i])
    );
  end

  int checks = 0, failures = 0;
  int token_passes = 0;
  // words expected per (src, dst)
  word_t exp_q [N][N][$];
  int    sent_words = 0, recv_words = 0;
  int    rx_left [N];      // words left in the block being received
  int    rx_from [N];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: sent %0d received %0d", sent_words, recv_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) token_passes += $countones(arb_out);
  always @(posedge clk) if (rst_n) begin
    checks++;
    if ($countones(has_token) > 1) begin failures++; $display("FAIL two tokens"); end
  end

  // receivers
  for (genvar i = 0; i < N; i++) begin : g_rx
    always @(posedge clk) begin
      if (rst_n && rx_valid[i] && rx_ready[i]) begin
        word_t w;
        int s;
        s = int'(rx_src[i]);
        if (exp_q[s][i].size() == 0) begin
          checks++; failures++; $display("FAIL unexpected word at %0d from %0d", i, s);
        end else begin
          w = exp_q[s][i].pop_front();
          check(rx_data[i] == w, $sformatf("data at %0d from %0d: %h exp %h", i, s, rx_data[i], w));
          if (rx_left[i] == 0) begin
            rx_left[i] = int'(w[3:0]);   // header carries the block length
            rx_from[i] = s;
          end else begin
            check(rx_from[i] == s, "block interleaved");
            rx_left[i]--;
          end
        end
        recv_words++;
      end
    end
  end

  // senders: block = header word {src,dst,len} then len data words
  task automatic send_block(input int i, input int d, input int len);
    for (int w = 0; w <= len; w++) begin
      word_t v;
      v = (w == 0) ? word_t'({4'(i), 4'(d), 4'(w), 4'(len)})
                   : word_t'({4'(i), 4'(d), 4'(w), 4'($urandom)});
      exp_q[i][d].push_back(v);
      @(negedge clk);
      tx_valid[i] = 1'b1; tx_dest[i] = node_id_t'(d); tx_data[i] = v; tx_last[i] = (w == len);
      do @(posedge clk); while (!tx_ready[i]);
      @(negedge clk);
      tx_valid[i] = 1'b0;
      sent_words++;
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
  endtask

  int done_cnt = 0;
  bit go = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_tx
    initial begin
      wait (go);
      for (int b = 0; b < BLOCKS; b++) begin
        int d;
        d = $urandom_range(0, N - 2);
        if (d >= i) d++;
        send_block(i, d, $urandom_range(1, 4));
        repeat ($urandom_range(0, 30)) @(posedge clk);
      end
      done_cnt++;
    end
  end
  initial begin
    for (int i = 0; i < N; i++) begin rx_left[i] = 0; rx_from[i] = 0; end
    tx_valid = '0; tx_last = '0; tx_dest = '0; tx_data = '0; rx_ready = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency on an idle ring: member 1 -> member 2, rx always ready
    rx_ready = '1;
    begin
      int t0, t1;
      @(posedge clk);
      exp_q[1][2].push_back(16'h1200);
      tx_valid[1] <= 1'b1; tx_dest[1] <= 3'd2; tx_data[1] <= 16'h1200; tx_last[1] <= 1'b1;
      t0 = 0;
      while (!has_token[1]) @(posedge clk);
      t1 = 0;
      do begin @(posedge clk); t1++; end while (!tx_ready[1]);
      tx_valid[1] <= 1'b0;
      rx_left[2] = 0;
      // header word 0x1200 declares length 0
      check(t1 <= N + 6 && t1 >= N + 2, $sformatf("word latency %0d cycles", t1));
      sent_words++;
    end
    repeat (20) @(posedge clk);
    // words of one block on an idle ring follow every N + 6 cycles
    begin
      int cyc, t_prev;
      t_prev = -1;
      fork
        begin : count_cycles
          cyc = 0;
          forever begin @(posedge clk); cyc++; end
        end
        begin
          for (int w = 0; w <= 3; w++) begin
            word_t v;
            v = (w == 0) ? 16'h1203 : word_t'({4'd1, 4'd2, 4'(w), 4'd0});
            exp_q[1][2].push_back(v);
            @(negedge clk);
            tx_valid[1] = 1'b1; tx_dest[1] = 3'd2; tx_data[1] = v; tx_last[1] = (w == 3);
            do @(posedge clk); while (!tx_ready[1]);
            if (t_prev >= 0) check(cyc - t_prev == N + 6, $sformatf("word spacing %0d", cyc - t_prev));
            t_prev = cyc;
            sent_words++;
          end
          @(negedge clk);
          tx_valid[1] = 1'b0;
        end
      join_any
      disable count_cycles;
    end
    repeat (20) @(posedge clk);
    go = 1'b1;
    fork
      forever begin
        @(posedge clk);
        for (int i = 0; i < N; i++) rx_ready[i] <= ($urandom_range(0, 3) != 0);
      end
    join_none
    wait (done_cnt == N);
    rx_ready <= '1;
    repeat (200) @(posedge clk);
    check(recv_words == sent_words, $sformatf("received %0d of %0d words", recv_words, sent_words));
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++)
      check(exp_q[s][d].size() == 0, $sformatf("words lost %0d->%0d", s, d));
    check(token_passes > 0, "token never passed");
    $display("token passes %0d, words %0d", token_passes, recv_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
