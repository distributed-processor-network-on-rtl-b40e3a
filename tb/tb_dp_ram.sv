// tb_dp_ram: self-checking test of the dual-port RAM.
// Random reads and writes on both ports are compared with a reference array;
// read data is checked exactly one clock after the request (synchronous
// read, old data on a same-port write). A port-B-wins collision is checked.
module tb_dp_ram;
  localparam int AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [15:0]   a_wdata, b_wdata, a_rdata, b_rdata;
  logic [15:0]   ref_mem [1<<AW];
  int checks = 0, failures = 0;
  bit  fill = 1;

  dp_ram #(.W(16), .AW(AW)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(input logic ae, aw, input logic [AW-1:0] aa, input logic [15:0] ad,
                     input logic be, bw, input logic [AW-1:0] ba, input logic [15:0] bd);
    logic [15:0] ea, eb;
    ea = ref_mem[aa]; eb = ref_mem[ba];
    a_en = ae; a_we = aw; a_addr = aa; a_wdata = ad;
    b_en = be; b_we = bw; b_addr = ba; b_wdata = bd;
    @(posedge clk); #1;
    if (aw && ae && !(be && bw && ba == aa)) ref_mem[aa] = ad;
    if (bw && be) ref_mem[ba] = bd;
    a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    if (ae && !fill) begin checks++; if (a_rdata !== ea) begin failures++; $display("A rd %h got %h exp %h", aa, a_rdata, ea); end end
    if (be && !fill) begin checks++; if (b_rdata !== eb) begin failures++; $display("B rd %h got %h exp %h", ba, b_rdata, eb); end end
  endtask

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    @(posedge clk); #1;
    // fill through both ports
    for (int i = 0; i < (1<<AW); i++) begin
      cyc(i[0], i[0], AW'(i), 16'(i * 7 + 3), !i[0], !i[0], AW'(i), 16'(i * 7 + 3));
    end
    for (int i = 0; i < (1<<AW); i++) ref_mem[i] = 16'(i * 7 + 3);
    fill = 0;
    // read everything back on both ports at once
    for (int i = 0; i < (1<<AW); i++) cyc(1, 0, AW'(i), 0, 1, 0, AW'((1<<AW) - 1 - i), 0);
    // collision: B wins
    cyc(1, 1, 5, 16'haaaa, 1, 1, 5, 16'h5555);
    cyc(1, 0, 5, 0, 0, 0, 0, 0);
    // random traffic
    for (int n = 0; n < 2000; n++)
      cyc($urandom_range(0,1), $urandom_range(0,1), AW'($urandom), 16'($urandom),
          $urandom_range(0,1), $urandom_range(0,1), AW'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
