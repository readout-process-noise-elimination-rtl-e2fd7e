// sync_ram: RAM with a registered input port, as used for the Parameter RAM and
// the Sum Keeping RAM of the digitizer FPGA.
//
// Port A belongs to the sequenced datapath: address, write enable and write data
// are captured at the clock edge; the word at the captured address is on
// a_rdata during the following cycle (read-before-write: a write shows its old
// contents). Port B is a write-only port for the host that loads parameters;
// when both ports write the same word in one clock, port A wins. The contents
// start at zero.
module sync_ram #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata
);
  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] addr_q;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    addr_q <= a_addr;
    if (b_we && !(a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_we) mem[a_addr] <= a_wdata;
  end

  assign a_rdata = mem[addr_q];
endmodule
