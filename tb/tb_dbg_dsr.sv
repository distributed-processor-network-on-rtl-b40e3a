// tb_dbg_dsr: self-checking test of the debug shift register.
// The TAP strobes are driven directly. Scans write commands into the DSR and
// read back its captured value; the RAM port is served by a model that
// grants at random. Checked: WRITE reaches RAM, READ returns the word on the
// next capture, HALT/RUN set the halt output, STEP pulses only while halted,
// shifting is LSB first and unselected DSRs ignore the strobes.
module tb_dbg_dsr;
  import dpc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      sel, capture, shift, update, tdi, tdo;
  logic      mem_req, mem_we, mem_gnt, halt, step;
  ram_addr_t mem_addr;
  word_t     mem_wdata, mem_rdata;

  dbg_dsr dut (.*);

  word_t ram [1 << RAM_AW];
  always @(posedge clk) if (mem_req && mem_gnt) begin
    if (mem_we) ram[mem_addr] <= mem_wdata;
    else        mem_rdata <= ram[mem_addr];
  end
  always @(negedge clk) mem_gnt = ($urandom_range(0, 1) != 0);

  int checks = 0, failures = 0, steps = 0;
  always @(posedge clk) if (step) steps++;

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

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1'b1;
    @(negedge clk); s = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  // capture, shift 32 bits in (LSB first) while collecting tdo, update
  task automatic scan(input logic [31:0] din, output logic [31:0] dout);
    pulse(capture);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      dout[i] = tdo;
      tdi = din[i]; shift = 1'b1;
      @(negedge clk); shift = 1'b0;
    end
    pulse(update);
    repeat (6) @(negedge clk);
  endtask

  initial begin
    logic [31:0] r;
    sel = 1; capture = 0; shift = 0; update = 0; tdi = 0;
    for (int i = 0; i < (1 << RAM_AW); i++) ram[i] = 16'(i ^ 16'h5a5a);
    repeat (3) @(posedge clk);
    rst_n = 1;
    scan({DBG_WRITE, 12'h123, 16'hbeef}, r);
    check(ram[12'h123] == 16'hbeef, "WRITE");
    scan({DBG_READ, 12'h045, 16'h0000}, r);
    scan({DBG_NOP, 12'h000, 16'h0000}, r);
    check(r[15:0] == (16'h045 ^ 16'h5a5a) && r[27:16] == 12'h045, $sformatf("READ %h", r));
    check(r[31] == 1'b0, "not halted");
    scan({DBG_STEP, 28'h0}, r);
    check(steps == 0, "STEP while running");
    scan({DBG_HALT, 28'h0}, r);
    check(halt, "HALT");
    scan({DBG_STEP, 28'h0}, r);
    scan({DBG_STEP, 28'h0}, r);
    check(steps == 2, $sformatf("steps %0d", steps));
    check(r[31] == 1'b1, "halted status captured");
    scan({DBG_RUN, 28'h0}, r);
    check(!halt, "RUN");
    // several writes then read back each
    for (int i = 0; i < 8; i++) scan({DBG_WRITE, 12'(300 + i), 16'(i * 1111)}, r);
    for (int i = 0; i < 8; i++) begin
      scan({DBG_READ, 12'(300 + i), 16'h0}, r);
      scan({DBG_NOP, 28'h0}, r);
      check(r[15:0] == 16'(i * 1111), $sformatf("readback %0d: %h", i, r[15:0]));
    end
    // unselected: a write command must not act
    sel = 0;
    scan({DBG_WRITE, 12'h010, 16'h1234}, r);
    check(ram[12'h010] == 16'(16'h010 ^ 16'h5a5a), "unselected DSR acted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
