// sums_datapath: the shared data processing resources that the Seq128 sequencer
// drives to keep the 16 sliding sums (4 types x 4 channels) and their abort
// requests.
//
// All 16 sums are computed one after another by the same hardware. For sum
// index {type, ch} the sequencer program does
//     SumD = stored sum + current reading - reading `length` samples ago
// using these resources (strobe names are the user instruction names):
//   type, ch counters      SetType/IncType, SetCh/IncCh (set value from ADL)
//   circular pointer ptr   IncCirBufPT, the record position of the newest reading
//   Parameter RAM          address ADL + type (SelSumLengths) or ADL + {type,ch};
//                          captured into QLen by EnQLen, into the threshold
//                          register QThr by LdModeSelX
//   current hit QCH        EnQCH captures the latched ADC reading of channel ch
//   Sum Keeping RAM        address ADH + {type,ch}; LdSumMQ captures the stored
//                          sum into SumMQ, WRsumX writes SumD back
//   record RAM             EnSumsMemA loads its address register with
//                          {ch, ptr - QLen}; SelCurrAddr addresses {ch, ptr}
//                          instead; SumsMemCS/SumsMemOE read, SumsMemCS/SumsMemWE
//                          write QCH; EnQTailSqch captures the reading into QTail
//   SumD accumulator       EnSumD: load (sloadSumD), subtract (SubSumD) or add the
//                          operand chosen by SelSumMQQ / SelQCH / SelTailSqch
//   abort requests         ChkSumsOT: abort_req[{type,ch}] = SumD > QThr
// The Parameter RAM and Sum Keeping RAM have registered inputs, which is why
// their capture strobes come from the delayed SEQDQQ field. The host loads
// parameters (sum lengths at 0x40 + type, thresholds at 0x68 + {type,ch})
// through par_we/par_addr/par_wdata. adc_valid latches the four new readings.
// EndCycle becomes the one-clock pulse cycle_done; vs_len keeps the length of
// the very-slow sums for the integration logic. Every sum written back is
// also kept in sum_out for readout. The address map, widths and the record
// write-back are this design's choices; the strobes and their order are those
// of the sequencer program.
module sums_datapath
  import seq128_pkg::*;
#(
  parameter int unsigned REC_DEPTH = 65536,  // record points per channel
  parameter int unsigned XW        = 16,     // ADC reading width
  parameter int unsigned SW        = 32,     // sum width
  localparam int unsigned PW       = $clog2(REC_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  seq_ctrl_t         ctrl,
  input  logic              adc_valid,
  input  logic [3:0][XW-1:0] adc_data,
  input  logic              par_we,
  input  logic [7:0]        par_addr,
  input  logic [31:0]       par_wdata,
  output logic [15:0]       abort_req,
  output logic [15:0][SW-1:0] sum_out,
  output logic [PW-1:0]     vs_len,      // length of the very-slow sums (type 3)
  output logic              cycle_done
);
  logic [1:0]    type_q, ch_q;
  logic [3:0]    idx;
  logic [PW-1:0] ptr_q;
  logic [3:0][XW-1:0] hit_q;
  logic [XW-1:0] qch_q, qtail_q;
  logic [PW-1:0] qlen_q;
  logic [SW-1:0] qthr_q, summq_q, sumd_q, operand;
  logic [31:0]   par_rdata;
  logic [7:0]    par_a;
  logic [SW-1:0] sum_rdata;
  logic [PW+1:0] rec_addr_q, rec_addr;
  logic [XW-1:0] rec_rdata;

  assign idx = {type_q, ch_q};

  // Parameter RAM
  assign par_a = ctrl.adl + (ctrl.a[A_SEL_SUM_LENGTHS] ? {6'd0, type_q} : {4'd0, idx});
  sync_ram #(.DW(32), .DEPTH(256)) u_par (
    .clk, .a_addr(par_a), .a_we(1'b0), .a_wdata('0), .a_rdata(par_rdata),
    .b_we(par_we), .b_addr(par_addr), .b_wdata(par_wdata)
  );

  // Sum Keeping RAM
  sync_ram #(.DW(SW), .DEPTH(256)) u_sum (
    .clk, .a_addr(ctrl.adh + {4'd0, idx}), .a_we(ctrl.a[A_WR_SUM_X]), .a_wdata(sumd_q),
    .a_rdata(sum_rdata), .b_we(1'b0), .b_addr('0), .b_wdata('0)
  );

  // Raw record
  assign rec_addr = ctrl.b[B_SEL_CURR_ADDR] ? {ch_q, ptr_q} : rec_addr_q;
  record_ram #(.DW(XW), .CH(4), .DEPTH(REC_DEPTH)) u_rec (
    .clk, .cs(ctrl.a[A_SUMS_MEM_CS]), .oe(ctrl.b[B_SUMS_MEM_OE]), .we(ctrl.c[C_SUMS_MEM_WE]),
    .addr(rec_addr), .wdata(qch_q), .rdata(rec_rdata)
  );

  always_comb begin
    operand = '0;
    if (ctrl.c[C_SEL_SUM_MQQ])   operand = summq_q;
    if (ctrl.c[C_SEL_QCH])       operand = SW'(qch_q);
    if (ctrl.c[C_SEL_TAIL_SQCH]) operand = SW'(qtail_q);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      type_q <= '0; ch_q <= '0; ptr_q <= '0; hit_q <= '0;
      qch_q <= '0; qtail_q <= '0; qlen_q <= '0; qthr_q <= '0;
      summq_q <= '0; sumd_q <= '0; rec_addr_q <= '0;
      abort_req <= '0; sum_out <= '0; cycle_done <= 1'b0; vs_len <= '0;
    end else begin
      if (adc_valid) hit_q <= adc_data;
      // counters
      if (ctrl.b[B_SET_TYPE])      type_q <= ctrl.adl[1:0];
      else if (ctrl.b[B_INC_TYPE]) type_q <= type_q + 1'b1;
      if (ctrl.c[C_SET_CH])        ch_q <= ctrl.adl[1:0];
      else if (ctrl.c[C_INC_CH])   ch_q <= ch_q + 1'b1;
      if (ctrl.a[A_INC_CIR_BUF_PT]) ptr_q <= ptr_q + 1'b1;
      // delayed captures
      if (ctrl.d[D_EN_QLEN])       qlen_q  <= par_rdata[PW-1:0];
      if (ctrl.d[D_EN_QLEN] && type_q == 2'd3) vs_len <= par_rdata[PW-1:0];
      if (ctrl.d[D_LD_MODE_SEL_X]) qthr_q  <= SW'(par_rdata);
      if (ctrl.d[D_EN_QCH])        qch_q   <= hit_q[ch_q];
      if (ctrl.d[D_LD_SUM_MQ])     summq_q <= sum_rdata;
      // record
      if (ctrl.a[A_EN_SUMS_MEM_A])   rec_addr_q <= {ch_q, ptr_q - qlen_q};
      if (ctrl.c[C_EN_QTAIL_SQCH])   qtail_q <= rec_rdata;
      // accumulator
      if (ctrl.a[A_EN_SUM_D]) begin
        if (ctrl.b[B_SLOAD_SUM_D])     sumd_q <= operand;
        else if (ctrl.b[B_SUB_SUM_D])  sumd_q <= sumd_q - operand;
        else                           sumd_q <= sumd_q + operand;
      end
      if (ctrl.a[A_WR_SUM_X])    sum_out[idx] <= sumd_q;
      if (ctrl.a[A_CHK_SUMS_OT]) abort_req[idx] <= (sumd_q > qthr_q);
      cycle_done <= ctrl.c[C_END_CYCLE];
    end
  end
endmodule
