// tb_long_sums: the longest sliding sums the record supports, on the complete
// digitizer FPGA at its default sizes.
//
// The sum lengths are 1, 4096, 65535 (the longest a 16-bit length and a
// 65536-point record allow) and 30000. 70000 readings per channel are fed,
// one every 250 clocks (the sum program needs 234), so the circular record
// pointer wraps past 65535 and the tail address ptr - length wraps with it.
// Channel 3 is held at full scale for the first 66000 readings, which takes
// its 65535-long sum to 65535 * 65535, the largest value a 32-bit sum must
// hold; the other channels carry random 16-bit readings.
// After every reading all 16 sums and abort requests are compared with sums
// kept here from the raw readings. The number of pointer wraps and of readings
// at the largest sum are counted and must be non-zero.
module tb_long_sums;
  import elms_pkg::*;
  localparam int NREAD = 70000, PERIOD = 250;
  localparam int LEN [4] = '{1, 4096, 65535, 30000};

  logic clk = 1'b0, rst = 1'b1, adc_valid = 1'b0;
  logic [3:0][15:0] adc_data = '0;
  logic par_we = 1'b0;
  logic [7:0] par_addr = '0;
  logic [31:0] par_wdata = '0;
  logic [15:0] abort_req;
  logic sys_abort, cycle_done, ped_done, dr_valid;
  logic [15:0][31:0] sum_out;
  logic [6:0] pc;
  logic [3:0][47:0] integ;
  logic [3:0][39:0] dr, cic;
  logic [3:0] wf_ok;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_full = 0, n_req = 0;

  sums03 dut (
    .clk, .rst, .adc_valid, .adc_data, .par_we, .par_addr, .par_wdata,
    .prog_we(1'b0), .prog_addr('0), .prog_data('0), .cond_jmp(1'b0),
    .abort_type_mask(4'b1111), .abort_min_channels(3'd3),
    .ped_start(1'b0), .squelch_en(1'b0), .squelch(33'sd0), .max_dy(40'd200000),
    .abort_req, .sys_abort, .sum_out, .cycle_done, .pc, .ped_done, .integ,
    .dr_valid, .dr, .cic, .wf_ok
  );

  always #10 clk = ~clk;   // 50 MHz

  longint xs [4][NREAD];
  longint run [16], thr [16];
  logic [15:0] ptr_d = '0;

  // record pointer wraps
  always @(posedge clk) begin
    if (!rst && ptr_d == 16'hFFFF && dut.u_dp.ptr_q == 16'h0000) n_wrap++;
    ptr_d <= dut.u_dp.ptr_q;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 4; t++) begin
      par_we = 1'b1; par_addr = 8'h40 + 8'(t); par_wdata = LEN[t];
      @(negedge clk);
    end
    for (int i = 0; i < 16; i++) begin
      thr[i] = longint'(LEN[i / 4]) * 32768;
      par_we = 1'b1; par_addr = 8'h68 + 8'(i); par_wdata = 32'(thr[i]);
      @(negedge clk);
    end
    par_we = 1'b0;
    for (int i = 0; i < 16; i++) run[i] = 0;

    for (int n = 0; n < NREAD; n++) begin
      for (int c = 0; c < 4; c++) begin
        if (c == 3 && n < 66000) adc_data[c] = 16'hFFFF;
        else adc_data[c] = 16'($urandom);
        xs[c][n] = longint'(adc_data[c]);
      end
      adc_valid = 1'b1;
      @(negedge clk);
      adc_valid = 1'b0;
      repeat (PERIOD - 1) @(negedge clk);

      for (int t = 0; t < 4; t++)
        for (int c = 0; c < 4; c++) begin
          int i;
          bit r;
          i = 4 * t + c;
          run[i] += xs[c][n];
          if (n - LEN[t] >= 0) run[i] -= xs[c][n - LEN[t]];
          r = run[i] > thr[i];
          if (r) n_req++;
          checks += 2;
          if (sum_out[i] !== 32'(run[i])) begin
            failures++;
            if (failures < 10) $display("n %0d sum %0d = %0d expected %0d", n, i, sum_out[i], run[i]);
          end
          if (abort_req[i] !== r) begin
            failures++;
            if (failures < 10) $display("n %0d request %0d = %b", n, i, abort_req[i]);
          end
        end
      if (run[11] == 64'd4294836225) n_full++;
    end

    $display("readings %0d pointer wraps %0d readings at full sum %0d requests %0d",
             NREAD, n_wrap, n_full, n_req);
    checks += 3;
    if (n_wrap == 0) begin failures++; $display("record pointer never wrapped"); end
    if (n_full == 0) begin failures++; $display("largest sum never reached"); end
    if (n_req == 0)  begin failures++; $display("no abort request"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NREAD * PERIOD + 10000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
