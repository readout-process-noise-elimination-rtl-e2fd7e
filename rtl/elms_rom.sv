// elms_rom: ELMS program memory, DEPTH words of WIDTH bits (128 x 36 by default).
//
// Like an FPGA block RAM used as a ROM, the read address is registered inside the
// memory: the word at raddr appears at rdata after the next clock edge. The
// register is cleared by rst, so word 0 is read after reset. A second port (we,
// waddr, wdata) overwrites words so that a new program can be loaded while the
// sequencer runs; the image given by the INIT parameter is the power-up content.
module elms_rom #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 128,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter logic [DEPTH-1:0][WIDTH-1:0] INIT = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  output logic [AW-1:0]    raddr_q,   // the registered address (the PC)
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    addr_q;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = INIT[i];

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;

  always_ff @(posedge clk)
    if (rst) addr_q <= '0;
    else     addr_q <= raddr;

  assign rdata   = mem[addr_q];
  assign raddr_q = addr_q;
endmodule
