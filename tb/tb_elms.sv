// tb_elms: self-checking test of the ELMS sequencer.
//
// A test program exercises the dead loop, RUNat04, a FOR loop with an
// initialization part, CALL with return at EndA, JMPIF taken and not taken, an
// early RTN, a one-pass FOR (cnt = 0), nested FOR loops and BRK. The PC trace
// of each run is compared with a hand-derived list, the user output register is
// compared with the program word fetched one clock earlier, and the loop stack
// must be empty at the end.
module tb_elms;
  import elms_pkg::*;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0, cond = 1'b0;
  logic [31:0] user_q;
  logic [6:0]  pc;
  int checks = 0, failures = 0;

  function automatic instr_t usr(logic [31:0] v); return {4'b0000, v}; endfunction

  function automatic logic [127:0][35:0] prog();
    logic [127:0][35:0] p = '0;
    p[8'h03] = op_jmp(8'h03);
    p[8'h04] = op_for(8'h06, 8'h07, 8'd2);
    p[8'h05] = usr(32'h0505_0505);
    p[8'h06] = usr(32'h0606_0606);
    p[8'h07] = usr(32'h0707_0707);
    p[8'h08] = op_call(8'h0A, 8'h12, 8'h10);
    p[8'h09] = usr(32'hdead_0009);
    p[8'h0A] = op_jmpif(8'h14);
    p[8'h0B] = op_jmp(8'h03);
    p[8'h10] = usr(32'h1010_1010);
    p[8'h11] = usr(32'h1111_1111);
    p[8'h12] = usr(32'h1212_1212);
    p[8'h14] = op_call(8'h15, 8'h1F, 8'h18);
    p[8'h15] = op_for(8'h16, 8'h16, 8'd0);
    p[8'h16] = usr(32'h1616_1616);
    p[8'h17] = op_jmp(8'h20);
    p[8'h18] = usr(32'h1818_1818);
    p[8'h19] = op_rtn();
    p[8'h20] = op_for(8'h21, 8'h25, 8'd1);
    p[8'h21] = op_for(8'h22, 8'h23, 8'd1);
    p[8'h22] = usr(32'h2222_2222);
    p[8'h23] = usr(32'h2323_2323);
    p[8'h24] = usr(32'h2424_2424);
    p[8'h25] = usr(32'h2525_2525);
    p[8'h26] = op_for(8'h27, 8'h28, 8'd5);
    p[8'h27] = usr(32'h2727_2727);
    p[8'h28] = op_brk(8'h2A);
    p[8'h2A] = op_jmp(8'h03);
    return p;
  endfunction

  localparam logic [127:0][35:0] PROG = prog();

  elms #(.INIT(PROG)) dut (
    .clk, .rst, .run_at04(run), .cond_jmp(cond), .user_q, .pc,
    .prog_we(1'b0), .prog_addr('0), .prog_data('0)
  );

  always #5 clk = ~clk;

  // user_q must follow the word fetched one clock earlier
  logic [6:0] pc_d;
  logic       live = 1'b0;
  always @(negedge clk) begin
    if (live && !rst) begin
      logic [35:0] w;
      w = PROG[pc_d];
      checks++;
      if (user_q !== ((w[35:32] == 4'b0) ? w[31:0] : 32'h0)) begin
        failures++;
        $display("user_q mismatch after pc %h: %h", pc_d, user_q);
      end
    end
  end
  always @(negedge clk) begin pc_d <= pc; live <= !rst; end  // nonblocking: checked above first

  task automatic run_and_check(input logic c, input logic [7:0] exp[$]);
    cond = c;
    @(negedge clk) run = 1'b1;
    @(negedge clk) run = 1'b0;
    foreach (exp[i]) begin
      checks++;
      if (pc !== exp[i][6:0]) begin
        failures++;
        $display("cond=%0d step %0d: pc %h expected %h", c, i, pc, exp[i]);
      end
      @(negedge clk);
    end
    checks++;
    if (dut.u_lrr.depth != 0 || dut.u_lrr.top.valid) begin
      failures++;
      $display("loop stack not empty: depth %0d", dut.u_lrr.depth);
    end
  endtask

  initial begin
    logic [7:0] e1[$], e0[$];
    e1 = '{8'h04, 8'h05, 8'h06, 8'h07, 8'h06, 8'h07, 8'h06, 8'h07, 8'h08,
           8'h10, 8'h11, 8'h12, 8'h0A, 8'h14, 8'h18, 8'h19, 8'h15, 8'h16, 8'h17,
           8'h20, 8'h21, 8'h22, 8'h23, 8'h22, 8'h23, 8'h24, 8'h25,
           8'h21, 8'h22, 8'h23, 8'h22, 8'h23, 8'h24, 8'h25,
           8'h26, 8'h27, 8'h28, 8'h2A, 8'h03, 8'h03, 8'h03};
    e0 = '{8'h04, 8'h05, 8'h06, 8'h07, 8'h06, 8'h07, 8'h06, 8'h07, 8'h08,
           8'h10, 8'h11, 8'h12, 8'h0A, 8'h0B, 8'h03, 8'h03};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // after reset: 00, 01, 02, then the dead loop at 03
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (pc !== 7'((i < 3) ? i : 3)) begin
        failures++;
        $display("after reset cycle %0d: pc %h", i, pc);
      end
      @(negedge clk);
    end
    run_and_check(1'b1, e1);
    run_and_check(1'b0, e0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
