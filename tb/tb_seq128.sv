// tb_seq128: self-checking test of the Seq128 sequencer with its sliding-sum
// program.
//
// Checks that the assembled program words equal the known machine codes of
// the sliding-sum program, that the PC parks at 03 after reset, and that one
// do_sums request produces the expected strobes: 16 sum write-backs and
// threshold checks with {type,ch} visiting all 16 sums in type-major order,
// 4 record writes, one pointer increment and one EndCycle. The program length
// is checked as a cycle count: 3 words (04-06) + FOR + 4 types x (3 words + 4
// channels x 12 words + 1 word) + 2 words (18-19) + 4 x 4 words + EndCycle word
// = 231 fetches, so EndCycle is decoded 232 clocks after do_sums, well inside
// the ~1050 clocks of a 21 us reading period at 50 MHz.
module tb_seq128;
  import elms_pkg::*, seq128_pkg::*;

  logic clk = 1'b0, rst = 1'b1, do_sums = 1'b0;
  seq_ctrl_t ctrl;
  logic [6:0] pc;
  int checks = 0, failures = 0;

  seq128 dut (.clk, .rst, .do_sums, .cond_jmp(1'b0), .ctrl, .pc,
              .prog_we(1'b0), .prog_addr('0), .prog_data('0));

  always #5 clk = ~clk;

  typedef struct { int pc; logic [35:0] code; } word_t;
  word_t table3 [19] = '{
    '{8'h03, 36'h800000003}, '{8'h05, 36'h010000000}, '{8'h06, 36'h001000000},
    '{8'h07, 36'h200081703}, '{8'h08, 36'h030010040}, '{8'h09, 36'h000100000},
    '{8'h0A, 36'h2000B1603}, '{8'h0B, 36'h000020048}, '{8'h0C, 36'h000088000},
    '{8'h0D, 36'h040040068}, '{8'h0E, 36'h055000000}, '{8'h0F, 36'h055600000},
    '{8'h10, 36'h099900000}, '{8'h11, 36'h090B00000}, '{8'h12, 36'h098C00000},
    '{8'h14, 36'h0B0008000}, '{8'h15, 36'h0C0000000}, '{8'h16, 36'h000200000},
    '{8'h17, 36'h002000000}};

  int n_wr, n_chk, n_we, n_inc, n_end, cyc, end_cyc, start;
  logic [1:0] ty, ch;

  // strobes are sampled at the rising edge, where they are acted on
  always @(posedge clk) begin
    cyc++;
    if (do_sums) start = cyc;
    if (ctrl.b[B_SET_TYPE]) ty = ctrl.adl[1:0];
    if (ctrl.b[B_INC_TYPE]) ty++;
    if (ctrl.c[C_SET_CH])   ch = ctrl.adl[1:0];
    if (ctrl.c[C_INC_CH])   ch++;
    if (ctrl.a[A_WR_SUM_X]) begin
      checks++;
      if ({ty, ch} != 4'(n_wr)) begin failures++; $display("write-back %0d at {%0d,%0d}", n_wr, ty, ch); end
      n_wr++;
    end
    if (ctrl.a[A_CHK_SUMS_OT]) n_chk++;
    if (ctrl.c[C_SUMS_MEM_WE]) n_we++;
    if (ctrl.a[A_INC_CIR_BUF_PT]) n_inc++;
    if (ctrl.c[C_END_CYCLE]) begin n_end++; end_cyc = cyc; end
  end

  initial begin
    foreach (table3[i]) begin
      checks++;
      if (dut.u_elms.u_rom.mem[table3[i].pc] !== table3[i].code) begin
        failures++;
        $display("word %h = %h, expected %h", table3[i].pc, dut.u_elms.u_rom.mem[table3[i].pc], table3[i].code);
      end
    end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (pc !== 7'h03) begin failures++; $display("not parked: pc %h", pc); end
    for (int run = 0; run < 3; run++) begin
      n_wr = 0; n_chk = 0; n_we = 0; n_inc = 0; n_end = 0;
      do_sums = 1'b1;
      @(negedge clk);
      do_sums = 1'b0;
      repeat (400) @(negedge clk);
      checks += 6;
      if (n_wr != 16 || n_chk != 16) begin failures++; $display("%0d writes %0d checks", n_wr, n_chk); end
      if (n_we != 4)  begin failures++; $display("%0d record writes", n_we); end
      if (n_inc != 1) begin failures++; $display("%0d pointer steps", n_inc); end
      if (n_end != 1) begin failures++; $display("%0d EndCycle", n_end); end
      if (end_cyc - start != 232) begin failures++; $display("EndCycle after %0d clocks", end_cyc - start); end
      if (pc !== 7'h03) begin failures++; $display("not parked after run: pc %h", pc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
