// tb_spi_boot: self-checking test of the SPI boot sequencer / flash controller.
// A behavioural serial flash holds two images {N, w0..wN-1}. Requests are
// presented as blocks from ring members 1 and 2 (one with a padding word);
// the answer words are taken with random delays and compared with the
// flash contents, including the header, tx_last and the destination. The
// time to read one word (16 SCLK periods) and the SPI clock rate are checked.
module tb_spi_boot;
  import dpc_pkg::*;
  localparam int DIV = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     sclk, cs_n, mosi, miso;
  logic     rx_valid, rx_ready, tx_valid, tx_last, tx_ready, busy;
  word_t    rx_data, tx_data;
  node_id_t rx_from, tx_dest;

  spi_boot #(.CLK_DIV(DIV)) dut (
    .clk, .rst_n, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .rx_valid, .rx_data, .rx_from, .rx_ready,
    .tx_valid, .tx_dest, .tx_data, .tx_last, .tx_ready, .busy
  );
  spi_flash_model #(.BYTES(1024)) u_flash (.sclk, .cs_n, .mosi, .miso);

  int checks = 0, failures = 0;
  word_t img [512];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put_word(input int wa, input word_t v);
    img[wa] = v;
    u_flash.mem[2 * wa]     = v[15:8];
    u_flash.mem[2 * wa + 1] = v[7:0];
  endtask

  task automatic send_req(input node_id_t from, input word_t addr, input bit pad);
    word_t words [3];
    int n;
    words[0] = pad ? 16'd2 : 16'd1; words[1] = addr; words[2] = 16'hdead;
    n = pad ? 3 : 2;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      rx_valid = 1'b1; rx_data = words[k]; rx_from = from;
      do @(posedge clk); while (!rx_ready);
      @(negedge clk);
      rx_valid = 1'b0;
    end
  endtask

  task automatic get_answer(input node_id_t to, input int addr);
    int n, t_prev, t_now;
    bit first_seen;
    n = int'(img[addr]);
    first_seen = 0;
    t_prev = 0;
    for (int k = 0; k <= n; k++) begin
      int t;
      t = 0;
      do begin @(posedge clk); t++; end while (!tx_valid);
      check(tx_data == img[addr + k], $sformatf("word %0d: %h exp %h", k, tx_data, img[addr + k]));
      check(tx_dest == to, "destination");
      check(tx_last == (k == n), $sformatf("tx_last at word %0d", k));
      // a word after the first takes 16 SCLK periods plus 2 cycles per byte
      // (16*2*DIV + 4 cycles); t also counts the half cycle of the ready pulse
      if (k > 0) check(t == 16 * 2 * DIV + 5, $sformatf("word read time %0d", t));
      repeat ($urandom_range(0, 5)) @(posedge clk);
      @(negedge clk); tx_ready = 1'b1;
      @(negedge clk); tx_ready = 1'b0;
    end
  endtask

  // SCLK period check
  int last_rise = -1, period_checks = 0;
  always @(posedge sclk) begin
    int now;
    now = int'($time);
    if (last_rise >= 0 && now - last_rise < 2 * DIV * 10) begin
      failures++; $display("FAIL sclk period %0d", now - last_rise);
    end
    last_rise = now;
  end

  initial begin
    rx_valid = 0; rx_data = 0; rx_from = 0; tx_ready = 0;
    for (int i = 0; i < 512; i++) img[i] = 16'h0;
    // image 1 at word 0: 5 words, image 2 at word 6: 9 words
    put_word(0, 16'd5);
    for (int i = 1; i <= 5; i++) put_word(i, 16'(16'h1000 + i * 3));
    put_word(6, 16'd9);
    for (int i = 7; i <= 15; i++) put_word(i, 16'($urandom));
    put_word(20, 16'd0);       // empty image
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_req(3'd1, 16'd0, 1'b0);
    get_answer(3'd1, 0);
    repeat (5) @(posedge clk);
    check(cs_n == 1'b1 && !busy, "cs_n released after answer");
    send_req(3'd2, 16'd6, 1'b1);
    get_answer(3'd2, 6);
    send_req(3'd1, 16'd20, 1'b0);
    get_answer(3'd1, 20);
    repeat (5) @(posedge clk);
    check(u_flash.n_reads == 3, $sformatf("flash read commands %0d", u_flash.n_reads));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
