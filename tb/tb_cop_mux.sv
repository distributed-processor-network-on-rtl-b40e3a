// tb_cop_mux: self-checking test of the shared coprocessor interface.
// Checked: a lone request is granted the next cycle and its signals reach
// the external interface; the grant is held until the request drops; with
// both CPUs requesting the grants alternate; idle interface drives ctrl 0;
// read data reaches both CPUs. A random phase checks the routing every cycle
// against a reference model of the arbiter.
module tb_cop_mux;
  import dpc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]                 req, gnt;
  cop_sel_t [1:0]             sel;
  logic [1:0][COP_CTRL_W-1:0] ctrl;
  word_t [1:0]                xaddr, yaddr, wdata;
  word_t                      rdata, cop_xaddr, cop_yaddr, cop_wdata, cop_rdata;
  logic                       cop_act, cop_own;
  cop_sel_t                   cop_sel;
  logic [COP_CTRL_W-1:0]      cop_ctrl;

  cop_mux dut (.*);

  int checks = 0, failures = 0;
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

  // reference arbiter
  logic m_busy, m_owner, m_last;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (gnt != {m_busy && m_owner, m_busy && !m_owner}) begin
      failures++; $display("FAIL gnt %b model %b/%b", gnt, m_busy, m_owner);
    end
    if (m_busy) begin
      checks++;
      if (cop_ctrl != ctrl[m_owner] || cop_sel != sel[m_owner] || cop_xaddr != xaddr[m_owner]
          || cop_yaddr != yaddr[m_owner] || cop_wdata != wdata[m_owner] || cop_own != m_owner) begin
        failures++; $display("FAIL routing");
      end
    end else begin
      checks++;
      if (cop_ctrl != '0 || cop_act) begin failures++; $display("FAIL idle interface"); end
    end
    if (m_busy) begin
      if (!req[m_owner]) m_busy <= 0;
    end else if (|req) begin
      m_busy <= 1;
      m_owner <= (req == 2'b11) ? !m_last : req[1];
      m_last  <= (req == 2'b11) ? !m_last : req[1];
    end
  end

  int alternations = 0;
  initial begin
    logic prev;
    req = 0; sel = '0; ctrl = '0; xaddr = '0; yaddr = '0; wdata = '0; cop_rdata = 16'h7777;
    m_busy = 0; m_owner = 0; m_last = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    req = 2'b10; sel[1] = 2'd3; ctrl[1] = 4'h9; xaddr[1] = 16'h1111; yaddr[1] = 16'h2222; wdata[1] = 16'h3333;
    @(negedge clk);
    check(gnt == 2'b10 && cop_ctrl == 4'h9 && cop_sel == 2'd3 && cop_xaddr == 16'h1111, "lone request");
    check(rdata == 16'h7777, "read data");
    req = 2'b11;
    repeat (3) @(negedge clk);
    check(gnt == 2'b10, "grant held");
    req = 2'b01;
    @(negedge clk); @(negedge clk);
    check(gnt == 2'b01, "second CPU gets it");
    req = 2'b00;
    @(negedge clk);
    check(gnt == 2'b00 && cop_ctrl == '0, "released");
    // both at once, repeatedly: owner must alternate
    prev = 1'b0;   // CPU 1 (index 0) had it last
    for (int n = 0; n < 6; n++) begin
      req = 2'b11;
      @(negedge clk);
      if (cop_own != prev) alternations++;
      prev = cop_own;
      req = 2'b00;
      @(negedge clk);
    end
    check(alternations == 6, $sformatf("alternations %0d", alternations));
    // random
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      req = 2'($urandom); sel = 4'($urandom); ctrl = 8'($urandom);
      xaddr = 32'($urandom); yaddr = 32'($urandom); wdata = 32'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
