// sums03: the processing FPGA of a 4-channel BLM digitizer card.
//
// Every ~21 us the card delivers one 16-bit integrated-charge reading per
// channel (adc_valid, adc_data). From them the FPGA keeps
//   * 16 sliding sums: immediate (length 1), fast, slow and very-slow sums of
//     each channel, lengths and thresholds taken from the Parameter RAM, and one
//     abort request per sum (sum > threshold), combined into sys_abort;
//   * integration sums with pedestal subtraction and squelch (Main Injector);
//   * de-rippled CIC sums DR with the periodic 60 Hz noise waveform removed.
// The sliding sums are computed one after another by one shared datapath that
// the Seq128 micro-sequencer steers: adc_valid latches the readings and, a
// clock later, starts the program at address 4 (RUNat04). The program takes
// about 250 clocks, well inside the ~1000 clocks between readings at 50 MHz;
// cycle_done marks its end and starts the integration update. The de-ripple
// processor runs beside it on its own copy of the readings.
//
// Host side: par_* writes the Parameter RAM (sum length of type t at 0x40 + t,
// threshold of sum {t,ch} at 0x68 + 4t + ch; lengths up to 65535), prog_*
// overwrites sequencer program words. The analog integrators and the ADC are
// outside this module.
module sums03
  import elms_pkg::*, seq128_pkg::*;
#(
  parameter int unsigned REC_DEPTH = 65536,  // raw record points per channel
  parameter int unsigned CIC_K     = 128,
  parameter int unsigned PERIOD_L  = 752,
  parameter int unsigned DEC_INC   = 22336,
  parameter int unsigned N_PED     = 752
) (
  input  logic                 clk,
  input  logic                 rst,
  // ADC readings
  input  logic                 adc_valid,
  input  logic [3:0][15:0]     adc_data,
  // host
  input  logic                 par_we,
  input  logic [7:0]           par_addr,
  input  logic [31:0]          par_wdata,
  input  logic                 prog_we,
  input  logic [6:0]           prog_addr,
  input  instr_t               prog_data,
  input  logic                 cond_jmp,
  input  logic [3:0]           abort_type_mask,
  input  logic [2:0]           abort_min_channels,
  input  logic                 ped_start,
  input  logic                 squelch_en,
  input  logic signed [32:0]   squelch,
  input  logic [39:0]          max_dy,
  // results
  output logic [15:0]          abort_req,
  output logic                 sys_abort,
  output logic [15:0][31:0]    sum_out,
  output logic                 cycle_done,
  output logic [6:0]           pc,
  output logic                 ped_done,
  output logic [3:0][47:0]     integ,
  output logic                 dr_valid,
  output logic [3:0][39:0]     dr,
  output logic [3:0][39:0]     cic,
  output logic [3:0]           wf_ok
);
  seq_ctrl_t ctrl;
  logic      do_sums;
  logic [3:0][15:0] x_q;
  logic [$clog2(REC_DEPTH)-1:0] vs_len;
  logic [3:0][31:0] vs_sum;

  always_ff @(posedge clk)
    if (rst) begin
      do_sums <= 1'b0;
      x_q     <= '0;
    end else begin
      do_sums <= adc_valid;
      if (adc_valid) x_q <= adc_data;
    end

  // Readings must not arrive while the sequencer is still running the previous
  // one (it sleeps at address 3 between readings).
  assert property (@(posedge clk) disable iff (rst) adc_valid |-> pc == 7'd3)
    else $error("sums03: reading arrived while the sum program was running");

  seq128 u_seq (
    .clk, .rst, .do_sums, .cond_jmp, .ctrl, .pc,
    .prog_we, .prog_addr, .prog_data
  );

  sums_datapath #(.REC_DEPTH(REC_DEPTH)) u_dp (
    .clk, .rst, .ctrl, .adc_valid, .adc_data,
    .par_we, .par_addr, .par_wdata,
    .abort_req, .sum_out, .vs_len, .cycle_done
  );

  abort_logic u_abort (
    .clk, .rst, .abort_req, .type_mask(abort_type_mask),
    .min_channels(abort_min_channels), .ch_hits(), .sys_abort
  );

  for (genvar c = 0; c < 4; c++) begin : g_vs
    assign vs_sum[c] = sum_out[12 + c];
  end

  integ_sum #(.N_PED(N_PED), .LW($clog2(REC_DEPTH))) u_integ (
    .clk, .rst, .ped_start, .sample_valid(cycle_done), .x(x_q), .vs_sum, .vs_len,
    .squelch_en, .squelch, .ped_done, .ped_mean(), .above(), .integ
  );

  deripple #(.K(CIC_K), .L(PERIOD_L), .DEC_INC(DEC_INC)) u_dr (
    .clk, .rst, .x_valid(adc_valid), .x(adc_data), .max_dy,
    .dr_valid, .dr, .y(cic), .wf_ok, .pg()
  );
endmodule
