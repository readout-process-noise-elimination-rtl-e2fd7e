// elms: Enclosed Loop Micro-Sequencer, non-pipelined version.
//
// The sequencer has no ALU. It steps through a 36-bit program held in an
// internal elms_rom and hands every user instruction (control bits 35..32 all
// zero) to the application through a register, user_q, one clock after the word
// leaves the memory. Program control words are executed inside:
//   JMP, JMPIF (when cond_jmp is high), CALL, BRK : next PC = desA
//   FOR, CALL : push {BckA, EndA, cnt} (cnt = 1 for CALL) into the loop registers
//   RTN, BRK  : pop the innermost loop; RTN also jumps to its BckA
//   reaching EndA of an unfinished loop : next PC = BckA (no instruction needed)
// The next-address choice is a chain of multiplexers in this priority order:
// rst (address 0) > run_at04 (address 4) > desA > BckA > PC+1. The result feeds
// the memory's address register directly, so a branch costs no bubble: the
// control word is read, decoded and the target fetched within one clock.
// A control word reaches user_q as all zeros (a no-op for the application).
//
// After reset the PC starts at 0; a program parks itself in a JMP-to-self loop
// that toggles nothing until run_at04 forces the PC to 4 for one clock.
module elms
  import elms_pkg::*;
#(
  parameter int unsigned DEPTH       = 128,
  parameter int unsigned STACK_DEPTH = 128,
  parameter logic [DEPTH-1:0][IW-1:0] INIT = '0,
  localparam int unsigned PC_W = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            run_at04,   // force PC to 4 ("do sums")
  input  logic            cond_jmp,   // condition for JMPIF, from user logic
  output logic [31:0]     user_q,     // registered user instruction bits 31..0
  output logic [PC_W-1:0] pc,         // address of the word at the memory output
  // program load port
  input  logic            prog_we,
  input  logic [PC_W-1:0] prog_addr,
  input  instr_t          prog_data
);
  instr_t          ir;        // word at the memory output
  logic [PC_W-1:0] next_pc;
  logic            is_jmp, is_rtn, is_for, is_jmpif, take_des, loop_back;
  field_t          bck;
  loop_t           push_val;

  elms_rom #(.WIDTH(IW), .DEPTH(DEPTH), .INIT(INIT)) u_rom (
    .clk, .rst, .raddr(next_pc), .rdata(ir), .raddr_q(pc),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  assign is_jmp   = ir[BIT_JMP];
  assign is_rtn   = ir[BIT_RTN];
  assign is_for   = ir[BIT_FOR];
  assign is_jmpif = ir[BIT_JMPIF];
  assign take_des = is_jmp || (is_jmpif && cond_jmp);

  always_comb begin
    push_val.valid = 1'b1;
    push_val.bck   = f_bck(ir);
    push_val.fin   = f_end(ir);
    push_val.cnt   = is_jmp ? field_t'(1) : f_low(ir);   // CALL: cnt = 1
  end

  elms_lrr_stack #(.STACK_DEPTH(STACK_DEPTH), .PC_W(PC_W)) u_lrr (
    .clk, .rst, .pc, .push(is_for), .push_val, .rtn(is_rtn),
    .loop_back, .bck, .top(), .depth()
  );

  always_comb begin
    if (rst)                      next_pc = '0;
    else if (run_at04)            next_pc = PC_W'(4);
    else if (take_des)            next_pc = f_low(ir)[PC_W-1:0];
    else if (loop_back || is_rtn) next_pc = bck[PC_W-1:0];
    else                          next_pc = pc + 1'b1;
  end

  always_ff @(posedge clk)
    if (rst)                   user_q <= '0;
    else if (ir[35:32] == '0)  user_q <= ir[31:0];
    else                       user_q <= '0;

endmodule
