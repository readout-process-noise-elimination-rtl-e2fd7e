// tb_sums03: end-to-end test of the digitizer FPGA at its default sizes
// (64K-point record, CIC length 128, 752-reading period and pedestal).
//
// 2700 readings per channel are fed 1050 clocks apart (21 us at 50 MHz): a
// DC level with a 60 Hz-like ripple, plus beam-loss bursts on channels 1 and 2.
// Sum lengths 1, 128, 1024 and 64 (the Main Injector very-slow sum) are loaded.
// A pedestal measurement runs over the first 752 readings, then integration
// with squelch. Checked against values computed here:
//   * all 16 sliding sums and abort requests after every reading;
//   * the system abort (2 channels with a fast or slow request);
//   * the pedestal means and the integration sums;
//   * the sequencer finishing each reading inside the reading period;
//   * the de-ripple output: forced to the CIC sum for the first three periods,
//     then a waveform in use, and the ripple left in DR far below that in y.
// Mechanism counters (program runs, abort requests, system aborts, squelch
// keeps and adds, waveform page flips, a period rejected by MaxDY) must all be
// non-zero.
module tb_sums03;
  import elms_pkg::*;
  localparam int NREAD = 2700, PERIOD = 1050, NPED = 752;
  localparam int LEN [4] = '{1, 128, 1024, 64};
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst = 1'b1, adc_valid = 1'b0;
  logic [3:0][15:0] adc_data = '0;
  logic par_we = 1'b0;
  logic [7:0] par_addr = '0;
  logic [31:0] par_wdata = '0;
  logic ped_start = 1'b0;
  logic [15:0] abort_req;
  logic sys_abort, cycle_done, ped_done, dr_valid;
  logic [15:0][31:0] sum_out;
  logic [6:0] pc;
  logic [3:0][47:0] integ;
  logic [3:0][39:0] dr, cic;
  logic [3:0] wf_ok;
  int checks = 0, failures = 0;
  int n_runs = 0, n_req = 0, n_abort = 0, n_add = 0, n_keep = 0, n_flip0 = 0, n_flip1 = 0;

  sums03 dut (
    .clk, .rst, .adc_valid, .adc_data, .par_we, .par_addr, .par_wdata,
    .prog_we(1'b0), .prog_addr('0), .prog_data('0), .cond_jmp(1'b0),
    .abort_type_mask(4'b0110), .abort_min_channels(3'd2),
    .ped_start, .squelch_en(1'b1), .squelch(33'sd3000), .max_dy(40'd200000),
    .abort_req, .sys_abort, .sum_out, .cycle_done, .pc, .ped_done, .integ,
    .dr_valid, .dr, .cic, .wf_ok
  );

  always #10 clk = ~clk;   // 50 MHz

  longint xs [4][$];
  longint run [16], thr [16];
  longint pacc [4], pmean [4], pvs [4], itg [4];
  int     cyc = 0, t_start = 0, t_done = 0, worst = 0;
  logic [3:0] pg_d = '0;
  longint ymin, ymax, dmin, dmax;

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (adc_valid) t_start = cyc;
    if (cycle_done) begin
      n_runs++;
      if (cyc - t_start > worst) worst = cyc - t_start;
    end
    if (dut.u_dr.pg[0] != pg_d[0]) n_flip0++;
    if (dut.u_dr.pg[1] != pg_d[1]) n_flip1++;
    pg_d <= dut.u_dr.pg;
  end else pg_d <= '0;

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 4; t++) begin
      par_we = 1'b1; par_addr = 8'h40 + 8'(t); par_wdata = LEN[t];
      @(negedge clk);
    end
    for (int i = 0; i < 16; i++) begin
      thr[i] = longint'(LEN[i / 4]) * 1700 + 400;
      par_we = 1'b1; par_addr = 8'h68 + 8'(i); par_wdata = 32'(thr[i]);
      @(negedge clk);
    end
    par_we = 1'b0;
    for (int i = 0; i < 16; i++) run[i] = 0;
    for (int c = 0; c < 4; c++) begin pacc[c] = 0; itg[c] = 0; end
    ymin = 64'h7fffffffffffffff; ymax = -ymin; dmin = ymin; dmax = -ymin;
    ped_start = 1'b1;
    @(negedge clk);
    ped_start = 1'b0;

    for (int n = 0; n < NREAD; n++) begin
      real ph;
      bit req_ch [4];
      int nch;
      ph = 2.0 * PI * real'(n) / 751.1;
      for (int c = 0; c < 4; c++) begin
        real v;
        v = 1200.0 + 150.0 * $sin(ph + c) + 50.0 * $sin(3.0 * ph) + real'($urandom_range(0, 6));
        if ((c == 1 || c == 2) && (n % 900) >= 850 && (n % 900) < 870) v += 4000.0;
        adc_data[c] = 16'(longint'(v));
        xs[c].push_back(longint'(adc_data[c]));
      end
      adc_valid = 1'b1;
      @(negedge clk);
      adc_valid = 1'b0;
      repeat (PERIOD - 1) @(negedge clk);

      // sliding sums, requests and system abort
      for (int t = 0; t < 4; t++) req_ch[t] = 0;
      for (int t = 0; t < 4; t++)
        for (int c = 0; c < 4; c++) begin
          int i;
          bit r;
          i = 4 * t + c;
          run[i] += xs[c][n];
          if (n - LEN[t] >= 0) run[i] -= xs[c][n - LEN[t]];
          r = run[i] > thr[i];
          if ((t == 1 || t == 2) && r) req_ch[c] = 1;
          if (r) n_req++;
          checks += 2;
          if (sum_out[i] !== 32'(run[i])) begin
            failures++; if (failures < 10) $display("n %0d sum %0d = %0d expected %0d", n, i, sum_out[i], run[i]);
          end
          if (abort_req[i] !== r) begin
            failures++; if (failures < 10) $display("n %0d request %0d = %b", n, i, abort_req[i]);
          end
        end
      nch = int'(req_ch[0]) + int'(req_ch[1]) + int'(req_ch[2]) + int'(req_ch[3]);
      checks++;
      if (sys_abort !== (nch >= 2)) begin failures++; if (failures < 10) $display("n %0d sys_abort %b", n, sys_abort); end
      if (sys_abort) n_abort++;

      // pedestal and integration
      if (n < NPED) begin
        for (int c = 0; c < 4; c++) pacc[c] += xs[c][n];
        if (n == NPED - 1)
          for (int c = 0; c < 4; c++) begin pmean[c] = pacc[c] / NPED; pvs[c] = pacc[c] * LEN[3] / NPED; end
      end else begin
        for (int c = 0; c < 4; c++) begin
          if (run[12 + c] - pvs[c] > 3000) begin itg[c] += xs[c][n] - pmean[c]; n_add++; end
          else n_keep++;
          checks++;
          if ($signed(integ[c]) != itg[c]) begin
            failures++; if (failures < 10) $display("n %0d integ %0d = %0d expected %0d", n, c, $signed(integ[c]), itg[c]);
          end
        end
      end

      // de-ripple: forced during the first three periods, in use after the third
      checks++;
      if ((n < 3 * 751 && wf_ok != 4'b0) || (n > 3 * 751 + 2 && wf_ok[0] != 1'b1)) begin
        failures++; if (failures < 10) $display("n %0d wf_ok %b", n, wf_ok);
      end
      if (n < 3 * 751) begin
        checks++;
        if (dr[0] != cic[0]) begin failures++; $display("n %0d DR differs from y while forced", n); end
      end
      if (n >= 1800 && n < 1800 + 751) begin
        ymin = ($signed(cic[0]) < ymin) ? $signed(cic[0]) : ymin;
        ymax = ($signed(cic[0]) > ymax) ? $signed(cic[0]) : ymax;
      end
      if (n >= 2300 && n < 2300 + 300) begin
        dmin = ($signed(dr[0]) < dmin) ? $signed(dr[0]) : dmin;
        dmax = ($signed(dr[0]) > dmax) ? $signed(dr[0]) : dmax;
      end
    end
    checks += 3;
    for (int c = 0; c < 4; c++)
      if (dut.u_integ.ped_mean[c] != 16'(pmean[c])) begin failures++; $display("pedestal %0d wrong", c); end
    if (worst > PERIOD) begin failures++; $display("program took %0d clocks", worst); end
    if (4 * (dmax - dmin) >= ymax - ymin) begin failures++; $display("ripple not removed"); end
    $display("runs %0d requests %0d aborts %0d squelch add %0d keep %0d flips ch0 %0d ch1 %0d; program %0d clocks; ripple y %0d DR %0d",
             n_runs, n_req, n_abort, n_add, n_keep, n_flip0, n_flip1, worst, ymax - ymin, dmax - dmin);
    checks += 6;
    if (n_runs != NREAD) begin failures++; $display("program runs %0d", n_runs); end
    if (n_req == 0)   begin failures++; $display("no abort request"); end
    if (n_abort == 0) begin failures++; $display("no system abort"); end
    if (n_add == 0 || n_keep == 0) begin failures++; $display("squelch never both ways"); end
    if (n_flip0 == 0) begin failures++; $display("no page flip"); end
    if (n_flip1 >= n_flip0) begin failures++; $display("no period rejected by MaxDY"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NREAD * PERIOD + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
