// record_ram: the raw measurement record, a circular buffer of the last DEPTH
// ADC readings of each of CH channels (64K x 16 bits per channel by default).
//
// The interface follows a static RAM: chip select cs, output enable oe and write
// enable we. A write (cs && we) stores wdata at addr at the clock edge. A read
// (cs && oe) captures the word at addr into rdata at the clock edge, so the
// reading is available in the next cycle; rdata holds its value otherwise.
// addr is {channel, point}. The contents start at zero, so every sliding sum
// starts consistent with an all-zero history.
module record_ram #(
  parameter int unsigned DW    = 16,
  parameter int unsigned CH    = 4,
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned AW    = $clog2(CH) + $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          cs,
  input  logic          oe,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [CH*DEPTH];

  initial for (int i = 0; i < CH*DEPTH; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (cs && we) mem[addr] <= wdata;
    if (cs && oe) rdata <= mem[addr];
  end
endmodule
