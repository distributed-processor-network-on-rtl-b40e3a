// tb_io_dma: self-checking test of the block-transfer and boot unit.
// A RAM model grants the memory port at random. Checked: the boot request
// block {1, boot_addr} sent to member 0; the boot answer written from
// address 0, boot_done and boot_next; a core send command reading RAM and
// sending {len, words} with tx_last on the final word; a received block
// written from rx_base with rx_done/rx_src/rx_len; a zero-length block.
module tb_io_dma;
  import dpc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      boot_en, boot_done, cmd_valid, cmd_ready, rx_done;
  word_t     boot_addr, boot_next, cmd_len, rx_len;
  node_id_t  cmd_dest, rx_src, tx_dest, rx_from;
  ram_addr_t cmd_addr, rx_base, mem_addr;
  logic      tx_valid, tx_last, tx_ready, rx_valid, rx_ready;
  word_t     tx_data, rx_data, mem_wdata, mem_rdata;
  logic      mem_req, mem_we, mem_gnt;

  io_dma dut (.*);

  word_t ram [1 << RAM_AW];
  always @(posedge clk) if (mem_req && mem_gnt) begin
    if (mem_we) ram[mem_addr] <= mem_wdata;
    else        mem_rdata <= ram[mem_addr];
  end
  always @(negedge clk) mem_gnt = ($urandom_range(0, 2) != 0);

  int checks = 0, failures = 0, rx_done_seen = 0;
  always @(posedge clk) if (rx_done) rx_done_seen++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_tx(input node_id_t d, input word_t v, input bit last);
    do @(posedge clk); while (!tx_valid);
    check(tx_data == v && tx_dest == d && tx_last == last,
          $sformatf("tx %h->%0d last %b, exp %h->%0d last %b", tx_data, tx_dest, tx_last, v, d, last));
    @(negedge clk); tx_ready = 1'b1;
    @(negedge clk); tx_ready = 1'b0;
  endtask

  task automatic give_rx(input node_id_t s, input word_t v);
    @(negedge clk);
    rx_valid = 1'b1; rx_data = v; rx_from = s;
    do @(posedge clk); while (!rx_ready);
    @(negedge clk);
    rx_valid = 1'b0;
  endtask

  initial begin
    word_t prog [6];
    boot_en = 0; boot_addr = 16'h0010; cmd_valid = 0; cmd_dest = 0; cmd_addr = 0; cmd_len = 0;
    rx_base = 12'd200; tx_ready = 0; rx_valid = 0; rx_data = 0; rx_from = 0;
    for (int i = 0; i < (1 << RAM_AW); i++) ram[i] = 16'hffff;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- boot ----
    @(negedge clk); boot_en = 1;
    expect_tx(ID_SPI, 16'd1, 1'b0);
    expect_tx(ID_SPI, 16'h0010, 1'b1);
    check(!boot_done, "boot_done early");
    give_rx(ID_SPI, 16'd6);
    for (int i = 0; i < 6; i++) begin prog[i] = 16'($urandom); give_rx(ID_SPI, prog[i]); end
    repeat (3) @(posedge clk);
    check(boot_done, "boot_done");
    check(boot_next == 16'h0010 + 16'd7, $sformatf("boot_next %h", boot_next));
    for (int i = 0; i < 6; i++) check(ram[i] == prog[i], $sformatf("boot word %0d", i));
    check(ram[6] == 16'hffff, "boot wrote past image");
    // ---- send from RAM ----
    for (int i = 0; i < 3; i++) ram[100 + i] = 16'(16'h0a00 + i);
    @(negedge clk); cmd_valid = 1; cmd_dest = 3'd2; cmd_addr = 12'd100; cmd_len = 16'd3;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk); cmd_valid = 0;
    expect_tx(3'd2, 16'd3, 1'b0);
    expect_tx(3'd2, 16'h0a00, 1'b0);
    expect_tx(3'd2, 16'h0a01, 1'b0);
    expect_tx(3'd2, 16'h0a02, 1'b1);
    // ---- receive a block ----
    give_rx(3'd2, 16'd4);
    for (int i = 0; i < 4; i++) give_rx(3'd2, 16'(16'hb000 + i));
    repeat (3) @(posedge clk);
    for (int i = 0; i < 4; i++) check(ram[200 + i] == 16'(16'hb000 + i), $sformatf("rx word %0d", i));
    check(rx_src == 3'd2 && rx_len == 16'd4, "rx_src / rx_len");
    check(rx_done_seen == 2, $sformatf("rx_done pulses %0d", rx_done_seen));
    // ---- zero-length block ----
    give_rx(3'd2, 16'd0);
    repeat (3) @(posedge clk);
    check(rx_done_seen == 3 && rx_len == 16'd0, "empty block");
    // ---- empty send ----
    @(negedge clk); cmd_valid = 1; cmd_dest = 3'd0; cmd_addr = 12'd0; cmd_len = 16'd0;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk); cmd_valid = 0;
    expect_tx(3'd0, 16'd0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
