// tb_jtag_tap: self-checking test of the JTAG TAP controller.
// TCK is driven at clk/12. Two 32-bit shift-register models stand in for the
// debug shift registers. Checked: IR capture pattern 0001 comes out of TDO,
// BYPASS gives a one-bit delay (also the instruction after reset), DSR1 and
// DSR2 are selected by their codes and scanned LSB first with exactly one
// capture and one update strobe per scan, the other DSR stays untouched,
// five TMS-high cycles and TRST_N both return to Test-Logic-Reset.
module tb_jtag_tap;
  import dpc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       tck, tms, tdi, trst_n, tdo;
  logic [1:0] dsr_sel, dsr_tdo;
  logic       dr_capture, dr_shift, dr_update, dr_tdi;

  jtag_tap dut (.*);

  localparam logic [31:0] CAP [2] = '{32'hc0de_0001, 32'h1234_5678};
  logic [31:0] sr [2], held [2];
  int n_cap [2], n_upd [2];
  always @(posedge clk) for (int d = 0; d < 2; d++) if (dsr_sel[d]) begin
    if (dr_capture) begin sr[d] <= CAP[d]; n_cap[d]++; end
    if (dr_shift)   sr[d] <= {dr_tdi, sr[d][31:1]};
    if (dr_update)  begin held[d] <= sr[d]; n_upd[d]++; end
  end
  assign dsr_tdo = {sr[1][0], sr[0][0]};

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tck_cycle(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    repeat (6) @(negedge clk);
    o = tdo;
    tck = 1'b1;
    repeat (6) @(negedge clk);
    tck = 1'b0;
  endtask

  task automatic tms_seq(input int n, input logic [15:0] bits);
    logic o;
    for (int i = 0; i < n; i++) tck_cycle(bits[i], 1'b0, o);
  endtask

  // from Run-Test/Idle: scan n bits through IR (ir=1) or DR (ir=0), back to RTI
  task automatic scan(input bit ir, input int n, input logic [31:0] din, output logic [31:0] dout);
    logic o;
    dout = '0;
    tck_cycle(1'b1, 1'b0, o);                 // Select-DR
    if (ir) tck_cycle(1'b1, 1'b0, o);         // Select-IR
    tck_cycle(1'b0, 1'b0, o);                 // Capture
    tck_cycle(1'b0, 1'b0, o);                 // -> Shift
    for (int i = 0; i < n; i++) begin
      tck_cycle(i == n - 1, din[i], o);       // last bit leaves to Exit1
      dout[i] = o;
    end
    tck_cycle(1'b1, 1'b0, o);                 // Update
    tck_cycle(1'b0, 1'b0, o);                 // Run-Test/Idle
    repeat (4) @(negedge clk);
  endtask

  initial begin
    logic [31:0] r;
    tck = 0; tms = 1; tdi = 0; trst_n = 1;
    n_cap = '{0, 0}; n_upd = '{0, 0}; sr = '{0, 0}; held = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    tms_seq(6, 16'b011111);                   // reset, then to RTI
    // after reset: bypass, one-bit delay
    scan(1'b0, 8, 32'h000000a5, r);
    check(r[7:0] == 8'h4a, $sformatf("bypass after reset %h", r[7:0]));
    // IR capture pattern and DSR1 selection
    scan(1'b1, IR_W, 32'(IR_DSR1), r);
    check(r[IR_W-1:0] == 4'b0001, $sformatf("IR capture %b", r[IR_W-1:0]));
    check(dsr_sel == 2'b01, "DSR1 selected");
    scan(1'b0, 32, 32'hfeed_beef, r);
    check(r == CAP[0], $sformatf("DSR1 out %h", r));
    check(held[0] == 32'hfeed_beef, $sformatf("DSR1 in %h", held[0]));
    check(n_cap[0] == 1 && n_upd[0] == 1, $sformatf("DSR1 strobes %0d %0d", n_cap[0], n_upd[0]));
    check(n_cap[1] == 0 && n_upd[1] == 0, "DSR2 touched");
    // DSR2
    scan(1'b1, IR_W, 32'(IR_DSR2), r);
    check(dsr_sel == 2'b10, "DSR2 selected");
    scan(1'b0, 32, 32'h0bad_f00d, r);
    check(r == CAP[1], $sformatf("DSR2 out %h", r));
    check(held[1] == 32'h0bad_f00d, "DSR2 in");
    check(n_upd[0] == 1 && n_upd[1] == 1, "update counts");
    // five TMS-high cycles reset the TAP to bypass
    tms_seq(6, 16'b011111);
    check(dsr_sel == 2'b00, "TMS reset");
    scan(1'b0, 8, 32'h0000003c, r);
    check(r[7:0] == 8'h78, "bypass after TMS reset");
    // TRST_N
    scan(1'b1, IR_W, 32'(IR_DSR1), r);
    check(dsr_sel == 2'b01, "DSR1 again");
    trst_n = 0;
    repeat (6) @(negedge clk);
    trst_n = 1;
    repeat (6) @(negedge clk);
    check(dsr_sel == 2'b00, "TRST_N reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
