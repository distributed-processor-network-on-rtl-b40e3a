// tb_dpc_top: end-to-end test of the Distributed Processor Chip at its
// default parameters.
//
// A behavioural serial flash holds two program images back to back. The
// testbench plays the two CPU-III cores through core_o/core_i and drives the
// JTAG pins. It checks and counts:
//   boot       CPU 1 boots first from flash word 0, then CPU 2 from the next
//              image; each RAM holds its image (read by instruction fetch);
//   run        each core's run rises only after its own boot;
//   reload     after booting, CPU 2 requests a block from the flash again
//              by sending a request block from its RAM;
//   dma        CPU 1 sends a block over the ring to CPU 2, which writes it
//              from its rx_base; rx_done/rx_src/rx_len at CPU 2;
//   stall      CPU 2's data accesses are held off (d_wait) while its DMA
//              writes the incoming block;
//   jtag       DSR2 writes a word into CPU 2's RAM and reads one back;
//              DSR1 halts CPU 1, single-steps it and lets it run again;
//   cop        both cores request the coprocessor interface at once and are
//              served in turn with their own signals on the interface;
//   token      the token reaches a member that wants to send: CPU 1 and
//              CPU 2 (boot requests) and CPU 1 again (DMA block) can only
//              send after the token, which starts at the SPI controller, has
//              come to them; each delivered block counts one acquisition.
// Each mechanism that never happens counts as a failure.
module tb_dpc_top;
  import dpc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic boot_en;
  logic spi_sclk, spi_cs_n, spi_mosi, spi_miso;
  logic jtag_tck, jtag_tms, jtag_tdi, jtag_trst_n, jtag_tdo;
  logic cop_act, cop_own;
  cop_sel_t cop_sel;
  logic [COP_CTRL_W-1:0] cop_ctrl;
  word_t cop_xaddr, cop_yaddr, cop_wdata, cop_rdata;
  core_out_t [1:0] core_o;
  core_in_t  [1:0] core_i;
  logic [1:0] boot_done;

  dpc_top dut (.*);
  spi_flash_model #(.BYTES(1024)) u_flash (.sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_reload = 0, n_boot = 0, n_dma = 0, n_stall = 0, n_jtag = 0, n_step = 0, n_cop_switch = 0, n_token = 0;
  logic [1:0] boot_q;
  logic       own_q = 1'b0, act_q = 1'b0;
  bit         seen_grant = 1'b0;
  always @(posedge clk) if (rst_n) begin
    boot_q <= boot_done;
    n_boot += $countones(boot_done & ~boot_q);
    if (core_i[1].d_wait) n_stall++;
    if (core_i[0].step) n_step++;
    act_q <= cop_act;
    // a new grant going to the other core than the previous grant
    if (cop_act && !act_q) begin
      if (seen_grant && cop_own != own_q) n_cop_switch++;
      seen_grant = 1'b1;
      own_q <= cop_own;
    end
    // run may only be high once that CPU has booted
    checks++;
    if ((core_i[0].run && !boot_done[0]) || (core_i[1].run && !boot_done[1])) begin
      failures++; $display("FAIL run before boot");
    end
    if (boot_done[1] && !boot_done[0]) begin failures++; $display("FAIL CPU 2 booted first"); end
  end

  // ---------------- flash images ----------------
  localparam int N1 = 12, N2 = 20;
  word_t img1 [N1], img2 [N2];
  task automatic put_word(input int wa, input word_t v);
    u_flash.mem[2 * wa]     = v[15:8];
    u_flash.mem[2 * wa + 1] = v[7:0];
  endtask

  // ---------------- JTAG driver (TCK = clk/12) ----------------
  task automatic tck_cycle(input logic m, input logic d, output logic o);
    jtag_tms = m; jtag_tdi = d;
    repeat (6) @(negedge clk);
    o = jtag_tdo;
    jtag_tck = 1'b1;
    repeat (6) @(negedge clk);
    jtag_tck = 1'b0;
  endtask
  task automatic jscan(input bit ir, input int n, input logic [31:0] din, output logic [31:0] dout);
    logic o;
    dout = '0;
    tck_cycle(1'b1, 1'b0, o);
    if (ir) tck_cycle(1'b1, 1'b0, o);
    tck_cycle(1'b0, 1'b0, o);
    tck_cycle(1'b0, 1'b0, o);
    for (int i = 0; i < n; i++) begin
      tck_cycle(i == n - 1, din[i], o);
      dout[i] = o;
    end
    tck_cycle(1'b1, 1'b0, o);
    tck_cycle(1'b0, 1'b0, o);
    repeat (8) @(negedge clk);
  endtask

  // ---------------- core-side helpers ----------------
  task automatic ifetch(input int c, input ram_addr_t a, output word_t v);
    @(negedge clk);
    core_o[c].i_en = 1'b1; core_o[c].i_addr = a;
    @(negedge clk);
    core_o[c].i_en = 1'b0;
    v = core_i[c].i_rdata;
  endtask

  // data read through port B, repeated while d_wait says it was not served
  task automatic dread(input int c, input ram_addr_t a, output word_t v);
    bit served;
    served = 0;
    while (!served) begin
      @(negedge clk);
      core_o[c].d_en = 1'b1; core_o[c].d_we = 1'b0; core_o[c].d_addr = a;
      @(posedge clk);
      served = !core_i[c].d_wait;
      @(negedge clk);
      core_o[c].d_en = 1'b0;
      v = core_i[c].d_rdata;
    end
  endtask

  task automatic dwrite(input int c, input ram_addr_t a, input word_t v);
    bit served;
    served = 0;
    while (!served) begin
      @(negedge clk);
      core_o[c].d_en = 1'b1; core_o[c].d_we = 1'b1; core_o[c].d_addr = a; core_o[c].d_wdata = v;
      @(posedge clk);
      served = !core_i[c].d_wait;
      @(negedge clk);
      core_o[c].d_en = 1'b0; core_o[c].d_we = 1'b0;
    end
  endtask

  initial begin
    logic [31:0] r;
    word_t v;
    int t0;
    boot_en = 0; spi_miso = 0;
    jtag_tck = 0; jtag_tms = 1; jtag_tdi = 0; jtag_trst_n = 1;
    cop_rdata = 16'h4242;
    core_o = '0;
    for (int i = 0; i < N1; i++) img1[i] = 16'($urandom);
    for (int i = 0; i < N2; i++) img2[i] = 16'($urandom);
    put_word(0, 16'(N1));
    for (int i = 0; i < N1; i++) put_word(1 + i, img1[i]);
    put_word(N1 + 1, 16'(N2));
    for (int i = 0; i < N2; i++) put_word(N1 + 2 + i, img2[i]);
    core_o[1].rx_base = 12'h800;
    boot_en = 1;
    repeat (4) @(posedge clk);
    rst_n = 1;

    // ---- boot ----
    wait (boot_done[0]);
    n_token++;
    check(!boot_done[1] && !core_i[1].run, "CPU 2 waits for CPU 1");
    @(negedge clk);
    check(core_i[0].run, "CPU 1 runs after boot");
    wait (boot_done[1]);
    n_token++;
    @(negedge clk);
    check(core_i[1].run, "CPU 2 runs after boot");
    for (int i = 0; i < N1; i++) begin
      ifetch(0, ram_addr_t'(i), v);
      check(v == img1[i], $sformatf("CPU 1 image word %0d: %h exp %h", i, v, img1[i]));
    end
    for (int i = 0; i < N2; i++) begin
      ifetch(1, ram_addr_t'(i), v);
      check(v == img2[i], $sformatf("CPU 2 image word %0d: %h exp %h", i, v, img2[i]));
    end
    check(u_flash.n_reads == 2, "two flash reads");

    // ---- DMA CPU 1 -> CPU 2 while CPU 2 keeps reading data ----
    @(negedge clk);
    core_o[0].dma_valid = 1; core_o[0].dma_dest = ID_CPU2; core_o[0].dma_addr = 12'd0;
    core_o[0].dma_len = 16'(N1);
    do @(posedge clk); while (!core_i[0].dma_ready);
    @(negedge clk);
    core_o[0].dma_valid = 0;
    t0 = 0;
    fork
      begin
        while (!core_i[1].rx_done) begin
          @(negedge clk);
          core_o[1].d_en = 1'b1; core_o[1].d_we = 1'b0; core_o[1].d_addr = 12'h7ff;
        end
        @(negedge clk);
        core_o[1].d_en = 1'b0;
      end
    join
    n_dma++;
    n_token++;
    check(core_i[1].rx_src == ID_CPU1 && core_i[1].rx_len == 16'(N1), "rx_src / rx_len");
    for (int i = 0; i < N1; i++) begin
      dread(1, 12'h800 + ram_addr_t'(i), v);
      check(v == img1[i], $sformatf("DMA word %0d: %h exp %h", i, v, img1[i]));
    end

    // ---- after boot, CPU 2 asks the flash for CPU 1's image again ----
    dwrite(1, 12'h300, 16'd0);                 // request word: flash word 0
    @(negedge clk);
    core_o[1].rx_base = 12'ha00;
    core_o[1].dma_valid = 1; core_o[1].dma_dest = ID_SPI; core_o[1].dma_addr = 12'h300;
    core_o[1].dma_len = 16'd1;
    do @(posedge clk); while (!core_i[1].dma_ready);
    @(negedge clk);
    core_o[1].dma_valid = 0;
    while (!core_i[1].rx_done) @(negedge clk);
    n_reload++;
    n_token++;
    check(core_i[1].rx_src == ID_SPI && core_i[1].rx_len == 16'(N1), "flash reload header");
    for (int i = 0; i < N1; i++) begin
      dread(1, 12'ha00 + ram_addr_t'(i), v);
      check(v == img1[i], $sformatf("flash reload word %0d: %h exp %h", i, v, img1[i]));
    end
    check(u_flash.n_reads == 3, "third flash read");

    // ---- JTAG ----
    jtag_tms = 1;
    begin logic o; for (int i = 0; i < 5; i++) tck_cycle(1'b1, 1'b0, o); tck_cycle(1'b0, 1'b0, o); end
    jscan(1'b1, IR_W, 32'(IR_DSR2), r);
    jscan(1'b0, 32, {DBG_WRITE, 12'h900, 16'hcafe}, r);
    dread(1, 12'h900, v);
    check(v == 16'hcafe, $sformatf("JTAG write %h", v));
    jscan(1'b0, 32, {DBG_READ, 12'd5, 16'h0}, r);
    jscan(1'b0, 32, {DBG_NOP, 28'h0}, r);
    check(r[15:0] == img2[5], $sformatf("JTAG read %h exp %h", r[15:0], img2[5]));
    n_jtag++;
    jscan(1'b1, IR_W, 32'(IR_DSR1), r);
    jscan(1'b0, 32, {DBG_HALT, 28'h0}, r);
    check(!core_i[0].run && core_i[1].run, "CPU 1 halted, CPU 2 running");
    jscan(1'b0, 32, {DBG_STEP, 28'h0}, r);
    jscan(1'b0, 32, {DBG_STEP, 28'h0}, r);
    jscan(1'b0, 32, {DBG_RUN, 28'h0}, r);
    check(core_i[0].run, "CPU 1 runs again");
    check(n_step == 2, $sformatf("steps %0d", n_step));

    // ---- coprocessor interface shared by both cores ----
    @(negedge clk);
    core_o[0].cop_sel = 2'd1; core_o[0].cop_ctrl = 4'h3; core_o[0].cop_xaddr = 16'h0100;
    core_o[1].cop_sel = 2'd2; core_o[1].cop_ctrl = 4'h5; core_o[1].cop_xaddr = 16'h0200;
    for (int n = 0; n < 4; n++) begin
      core_o[0].cop_req = 1; core_o[1].cop_req = 1;
      do @(negedge clk); while (!(core_i[0].cop_gnt || core_i[1].cop_gnt));
      begin
        int c;
        c = core_i[1].cop_gnt ? 1 : 0;
        check(cop_act && int'(cop_own) == c && cop_ctrl == core_o[c].cop_ctrl
              && cop_sel == core_o[c].cop_sel && cop_xaddr == core_o[c].cop_xaddr,
              "coprocessor routing");
        check(core_i[c].cop_rdata == 16'h4242, "coprocessor read data");
        repeat (3) @(negedge clk);
        core_o[c].cop_req = 0;
        @(negedge clk); @(negedge clk);
      end
    end
    core_o[0].cop_req = 0; core_o[1].cop_req = 0;
    repeat (5) @(negedge clk);

    $display("mechanisms: reload %0d boot %0d dma %0d stall %0d jtag %0d step %0d cop_switch %0d token acquisitions %0d",
             n_reload, n_boot, n_dma, n_stall, n_jtag, n_step, n_cop_switch, n_token);
    // the token counter is bumped only after each delivered block above
    check(n_boot == 2, "both CPUs booted");
    check(n_dma > 0, "no DMA transfer");
    check(n_stall > 0, "no data-port stall");
    check(n_jtag > 0, "no JTAG memory access");
    check(n_step > 0, "no single step");
    check(n_cop_switch > 0, "no coprocessor hand-over");
    check(n_token == 4, "token acquisitions");
    check(n_reload > 0, "no flash request after boot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
