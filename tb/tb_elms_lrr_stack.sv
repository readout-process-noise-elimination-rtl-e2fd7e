// tb_elms_lrr_stack: self-checking test of the loop registers and loop stack.
//
// Checks LoopBack and BckA over the passes of one loop (cnt = 2 gives two
// jumps back, then the entry is gone), a one-pass loop (cnt = 0), that RTN
// restores the outer loop, and that 129 nested entries (LRR + 128 stack words)
// come back in reverse order.
module tb_elms_lrr_stack;
  import elms_pkg::*;

  logic clk = 1'b0, rst = 1'b1, push = 1'b0, rtn = 1'b0, loop_back;
  logic [6:0] pc = '0;
  loop_t push_val = '0, top;
  field_t bck;
  logic [7:0] depth;
  int checks = 0, failures = 0;

  elms_lrr_stack dut (.clk, .rst, .pc, .push, .push_val, .rtn, .loop_back, .bck, .top, .depth);

  always #5 clk = ~clk;

  task automatic expect_lb(input logic [6:0] p, input logic lb, input logic [7:0] b);
    pc = p;
    #1;
    checks++;
    if (loop_back !== lb || (lb && bck !== b)) begin
      failures++;
      $display("pc %h: loop_back %b bck %h, expected %b %h", p, loop_back, bck, lb, b);
    end
    @(negedge clk);
  endtask

  task automatic do_push(input logic [7:0] b, input logic [7:0] e, input logic [7:0] c);
    pc = 7'h7F; push = 1'b1; push_val = '{valid: 1'b1, bck: b, fin: e, cnt: c};
    @(negedge clk);
    push = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // empty LRR never loops back
    expect_lb(7'h00, 1'b0, 8'h00);
    // FOR 3..5, cnt = 2: three passes
    do_push(8'h03, 8'h05, 8'd2);
    for (int pass = 0; pass < 3; pass++) begin
      expect_lb(7'h03, 1'b0, 8'h00);
      expect_lb(7'h04, 1'b0, 8'h00);
      expect_lb(7'h05, pass < 2, 8'h03);
    end
    checks++;
    if (top.valid || depth != 0) begin failures++; $display("loop not popped"); end
    // one-pass loop
    do_push(8'h10, 8'h11, 8'd0);
    expect_lb(7'h11, 1'b0, 8'h00);
    checks++;
    if (top.valid) begin failures++; $display("cnt=0 loop not popped"); end
    // nested: RTN returns to the outer loop
    do_push(8'h20, 8'h30, 8'd7);
    do_push(8'h40, 8'h50, 8'd3);
    checks++;
    if (depth != 1 || top.bck != 8'h40) begin failures++; $display("nesting wrong"); end
    rtn = 1'b1; pc = 7'h45; @(negedge clk); rtn = 1'b0;
    checks++;
    if (depth != 0 || top.bck != 8'h20 || top.fin != 8'h30 || top.cnt != 8'd7) begin
      failures++; $display("RTN did not restore the outer loop: %p", top);
    end
    rtn = 1'b1; @(negedge clk); rtn = 1'b0;
    // 129 levels (EndA with bit 7 set never matches the 7-bit PC)
    for (int i = 0; i < 129; i++) do_push(8'(i), {1'b1, 7'(i)}, 8'(i + 2));
    checks++;
    if (depth != 128) begin failures++; $display("depth %0d", depth); end
    for (int i = 128; i >= 0; i--) begin
      checks++;
      if (top.bck != 8'(i) || top.fin != {1'b1, 7'(i)} || top.cnt != 8'(i + 2)) begin
        failures++; $display("level %0d wrong: %p", i, top);
      end
      rtn = 1'b1; @(negedge clk); rtn = 1'b0;
    end
    checks++;
    if (top.valid || depth != 0) begin failures++; $display("stack not empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
