// dp_ram: dual-port RAM of one CPU-III node, shared by instructions and data.
//
// The CPU-III keeps program and data in one memory with two ports: port A
// serves instruction fetch and port B data accesses, so an instruction can be
// fetched while data is read or written. Both ports can read and write.
// Reads are synchronous: rdata shows the word one clock after en. A write
// takes effect at the clock edge; a read of the same port returns the old
// word. When both ports write one address in the same cycle, port B wins.
// The dual-port organisation follows the published design; the size (4096
// words, set by the 12-bit address field of the debug register) and the
// read timing are choices of this implementation.
module dp_ram #(
  parameter int unsigned W     = 16,
  parameter int unsigned AW    = 12,
  parameter int unsigned WORDS = 1 << AW
) (
  input  logic          clk,
  // port A (instruction side)
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  // port B (data side)
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we && !(b_en && b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

endmodule
