// tb_seq_decoder: self-checking test of the user instruction decoder.
//
// Random user words are applied; the SEQA/SEQB/SEQC one-hot vectors, ADH and
// ADL must follow in the same cycle and the SEQDQQ vector one clock later.
// Value 0 of a field must set no strobe.
module tb_seq_decoder;
  import seq128_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] user_q = '0;
  seq_ctrl_t ctrl;
  logic [3:0] prev_d = '0;
  int checks = 0, failures = 0;

  seq_decoder dut (.clk, .rst, .user_q, .ctrl);

  always #5 clk = ~clk;

  function automatic logic [15:0] onehot(logic [3:0] v);
    logic [15:0] h = '0;
    if (v != 0) h[v] = 1'b1;
    return h;
  endfunction

  initial begin
    @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      user_q = $urandom;
      if (i % 5 == 0) user_q[31:16] = '0;
      #1;
      checks++;
      if (ctrl.a !== onehot(user_q[31:28]) || ctrl.b !== onehot(user_q[27:24]) ||
          ctrl.c !== onehot(user_q[23:20]) || ctrl.adh !== user_q[15:8] ||
          ctrl.adl !== user_q[7:0] || ctrl.d !== onehot(prev_d)) begin
        failures++;
        $display("word %h decoded to %h", user_q, ctrl);
      end
      @(negedge clk);
      prev_d = user_q[19:16];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
