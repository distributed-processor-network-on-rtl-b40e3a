// spi_flash_model: behavioural model of a serial (SPI NOR) flash memory.
//
// Simulation only, not synthesizable. It understands the READ instruction
// 0x03 followed by a 24-bit byte address in SPI mode 0: after the address it
// shifts out bytes from mem[] starting there, MSB first, changing MISO on
// SCLK falling edges, for as long as CS_N stays low. Other instructions are
// ignored. Testbenches fill mem[] directly. It also counts completed read
// commands in n_reads.
module spi_flash_model #(
  parameter int unsigned BYTES = 4096
) (
  input  logic sclk,
  input  logic cs_n,
  input  logic mosi,
  output logic miso
);
  logic [7:0]  mem [BYTES];
  logic [31:0] in_sr;
  int unsigned nbits;
  logic        data_phase;
  logic [23:0] addr;
  logic [7:0]  out_sr;
  int unsigned dbit;
  int unsigned n_reads;

  initial begin
    miso       = 1'b0;
    nbits      = 0;
    data_phase = 1'b0;
    n_reads    = 0;
    in_sr      = '0;
    out_sr     = '0;
    addr       = '0;
    dbit       = 0;
    for (int i = 0; i < BYTES; i++) mem[i] = 8'h00;
  end

  always @(negedge cs_n) begin
    nbits      = 0;
    data_phase = 1'b0;
  end

  always @(posedge sclk) begin
    if (!cs_n && !data_phase) begin
      in_sr = {in_sr[30:0], mosi};
      nbits = nbits + 1;
      if (nbits == 32 && in_sr[31:24] == 8'h03) begin
        addr       = in_sr[23:0];
        out_sr     = mem[addr % BYTES];
        addr       = addr + 1;
        dbit       = 0;
        data_phase = 1'b1;
        n_reads    = n_reads + 1;
      end
    end
  end

  always @(negedge sclk) begin
    if (!cs_n && data_phase) begin
      miso   = out_sr[7];
      out_sr = {out_sr[6:0], 1'b0};
      dbit   = dbit + 1;
      if (dbit == 8) begin
        out_sr = mem[addr % BYTES];
        addr   = addr + 1;
        dbit   = 0;
      end
    end
  end

endmodule
