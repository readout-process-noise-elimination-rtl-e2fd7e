// seq_decoder: decoder of the ELMS user instruction fields of the BLM firmware.
//
// Input is the registered user instruction (bits 31..0) from the sequencer.
// SEQA, SEQB and SEQC are decoded in the same clock into one-hot strobe vectors
// (value k sets bit k; value 0 sets nothing), together with the ADH and ADL
// fields. SEQDQQ first passes through one more register and is decoded a clock
// later: its strobes are register enables that capture the outputs of memories
// whose address was presented by the same instruction one clock earlier.
module seq_decoder
  import seq128_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] user_q,
  output seq_ctrl_t   ctrl
);
  logic [3:0] dqq_q;

  function automatic logic [15:0] hot(logic [3:0] v);
    logic [15:0] h;
    h = 16'(1) << v;
    h[0] = 1'b0;
    return h;
  endfunction

  always_ff @(posedge clk)
    if (rst) dqq_q <= '0;
    else     dqq_q <= user_q[19:16];

  always_comb begin
    ctrl.a   = hot(user_q[31:28]);
    ctrl.b   = hot(user_q[27:24]);
    ctrl.c   = hot(user_q[23:20]);
    ctrl.d   = hot(dqq_q);
    ctrl.adh = user_q[15:8];
    ctrl.adl = user_q[7:0];
  end
endmodule
