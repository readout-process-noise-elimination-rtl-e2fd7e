// elms_lrr_stack: Loop & Return Registers (LRR), loop stack and Compare block of
// the ELMS.
//
// The LRR hold the innermost active loop as {valid, BckA, EndA, CNT}; older loops
// sit in a STACK_DEPTH-word stack below it. Compare watches the PC:
//   LoopBack = (PC == EndA) && (CNT != 0)   -> PC goes to BckA, CNT decrements
//   LastPass = (PC == EndA) && (CNT == 1)   -> the entry is popped
// A loop pushed with cnt therefore runs its body cnt+1 times: on the pass that
// reaches EndA with CNT == 1 the PC jumps back and the entry is popped, so the
// final pass runs under the outer loop's registers and falls through EndA.
// Two points are this design's own: an entry has a valid bit so that an empty
// LRR never matches, and an entry that reaches EndA with CNT == 0 (a FOR with
// cnt = 0, one pass) is popped as well, without jumping back.
//
// push/pop act at the clock edge. push with pop replaces the LRR contents; push
// with a loop-back stores the decremented entry; a push onto an empty LRR leaves
// the stack alone. RTN asserts pop directly.
// Nesting deeper than STACK_DEPTH+1 levels is not checked (the sequencer's
// programmer keeps within it); an assertion reports it in simulation.
module elms_lrr_stack
  import elms_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 128,
  parameter int unsigned PC_W        = 7
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [PC_W-1:0] pc,        // current PC (address of the word at the ROM output)
  input  logic            push,      // FOR or CALL at the ROM output
  input  loop_t           push_val,  // {1, BckA, EndA, cnt} to push
  input  logic            rtn,       // RTN at the ROM output: pop
  output logic            loop_back, // jump to bck this cycle
  output field_t          bck,       // BckA of the innermost loop
  output loop_t           top,       // LRR contents (for observation)
  output logic [$clog2(STACK_DEPTH+1)-1:0] depth // entries held in the stack below the LRR
);
  localparam int unsigned SP_W  = $clog2(STACK_DEPTH+1);
  localparam int unsigned IDX_W = $clog2(STACK_DEPTH);

  loop_t            lrr;
  loop_t            mem [STACK_DEPTH];
  logic [SP_W-1:0]  sp;
  logic             at_end, last_pass, pop;
  loop_t            lrr_dec;

  assign at_end    = lrr.valid && (lrr.fin[PC_W-1:0] == pc) && (lrr.fin[FIELD_W-1:PC_W] == '0);
  assign loop_back = at_end && (lrr.cnt != '0);
  assign last_pass = at_end && (lrr.cnt <= field_t'(1));
  assign pop       = last_pass || rtn;
  assign bck       = lrr.bck;
  assign top       = lrr;
  assign depth     = sp;

  always_comb begin
    lrr_dec = lrr;
    if (loop_back) lrr_dec.cnt = lrr.cnt - field_t'(1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lrr <= '0;
      sp  <= '0;
    end else if (push) begin
      if (!pop && lrr.valid) begin
        mem[sp[IDX_W-1:0]] <= lrr_dec;
        sp <= sp + 1'b1;
      end
      lrr <= push_val;
    end else if (pop) begin
      if (sp != '0) begin
        lrr <= mem[IDX_W'(sp - 1'b1)];
        sp  <= sp - 1'b1;
      end else begin
        lrr <= '0;
      end
    end else begin
      lrr <= lrr_dec;
    end
  end

  // The programmer must not nest deeper than the stack holds.
  always_ff @(posedge clk)
    if (!rst) assert (!(push && !pop && lrr.valid && sp == SP_W'(STACK_DEPTH)))
      else $error("ELMS loop stack overflow");

endmodule
