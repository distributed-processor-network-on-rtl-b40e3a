// tb_dpc_jtag_load: loading both CPUs of the chip through JTAG, with booting
// from flash disabled, at the chip's default parameters.
//
// With boot_en low no flash access may happen and both cores are released
// at once. The test halts CPU 1, writes a program into each CPU's RAM through
// its debug shift register, reads part of it back through JTAG, checks every
// word through the instruction port, and releases CPU 1 again.
module tb_dpc_jtag_load;
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

  int cs_falls = 0;
  always @(negedge spi_cs_n) cs_falls++;

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
  task automatic ifetch(input int c, input ram_addr_t a, output word_t v);
    @(negedge clk);
    core_o[c].i_en = 1'b1; core_o[c].i_addr = a;
    @(negedge clk);
    core_o[c].i_en = 1'b0;
    v = core_i[c].i_rdata;
  endtask

  localparam int LEN = 16;
  initial begin
    logic [31:0] r;
    word_t v;
    word_t prog [2][LEN];
    boot_en = 0; spi_miso = 0; cop_rdata = '0;
    jtag_tck = 0; jtag_tms = 1; jtag_tdi = 0; jtag_trst_n = 1;
    core_o = '0;
    for (int c = 0; c < 2; c++) for (int i = 0; i < LEN; i++) prog[c][i] = 16'($urandom);
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    check(core_i[0].run && core_i[1].run, "both cores run without booting");
    begin logic o; for (int i = 0; i < 5; i++) tck_cycle(1'b1, 1'b0, o); tck_cycle(1'b0, 1'b0, o); end
    jscan(1'b1, IR_W, 32'(IR_DSR1), r);
    jscan(1'b0, 32, {DBG_HALT, 28'h0}, r);
    check(!core_i[0].run && core_i[1].run, "CPU 1 halted alone");
    for (int c = 0; c < 2; c++) begin
      jscan(1'b1, IR_W, c == 0 ? 32'(IR_DSR1) : 32'(IR_DSR2), r);
      for (int i = 0; i < LEN; i++) jscan(1'b0, 32, {DBG_WRITE, 12'(i), prog[c][i]}, r);
      for (int i = 0; i < LEN; i += 5) begin
        jscan(1'b0, 32, {DBG_READ, 12'(i), 16'h0}, r);
        jscan(1'b0, 32, {DBG_NOP, 28'h0}, r);
        check(r[15:0] == prog[c][i], $sformatf("CPU %0d JTAG read %0d", c + 1, i));
      end
    end
    for (int c = 0; c < 2; c++) for (int i = 0; i < LEN; i++) begin
      ifetch(c, ram_addr_t'(i), v);
      check(v == prog[c][i], $sformatf("CPU %0d word %0d: %h exp %h", c + 1, i, v, prog[c][i]));
    end
    jscan(1'b1, IR_W, 32'(IR_DSR1), r);
    jscan(1'b0, 32, {DBG_RUN, 28'h0}, r);
    check(core_i[0].run, "CPU 1 released");
    check(cs_falls == 0 && boot_done == 2'b00, "no flash access without boot_en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
