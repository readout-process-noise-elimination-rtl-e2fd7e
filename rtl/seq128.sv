// seq128: the Seq128 sequencing block of the digitizer FPGA.
//
// It joins an ELMS (non-pipelined, 128-word x 36-bit program memory, 128-word
// loop stack) loaded with the sliding-sum program of seq128_pkg, and the user
// instruction decoder. do_sums is the RUNat04 request: one clock high starts
// the program at address 4. The decoded strobes leave through ctrl. Timing of
// one user word fetched at cycle t: its SEQA/SEQB/SEQC strobes, ADH and ADL are
// valid in cycle t+1, its SEQDQQ strobes in cycle t+2.
module seq128
  import elms_pkg::*, seq128_pkg::*;
#(
  parameter rom_image_t PROGRAM = seq128_program()
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      do_sums,
  input  logic      cond_jmp,
  output seq_ctrl_t ctrl,
  output logic [6:0] pc,
  input  logic      prog_we,
  input  logic [6:0] prog_addr,
  input  instr_t    prog_data
);
  logic [31:0] user_q;

  elms #(.DEPTH(ROM_DEPTH), .STACK_DEPTH(128), .INIT(PROGRAM)) u_elms (
    .clk, .rst, .run_at04(do_sums), .cond_jmp, .user_q, .pc,
    .prog_we, .prog_addr, .prog_data
  );

  seq_decoder u_dec (.clk, .rst, .user_q, .ctrl);
endmodule
