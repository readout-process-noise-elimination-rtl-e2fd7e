// tb_sums_datapath: self-checking test of the sliding-sum datapath driven by
// the Seq128 sequencer and its program.
//
// Sum lengths 1, 16, 128 and 200 and 16 thresholds are loaded into the
// Parameter RAM. 420 random readings per channel (with occasional large spikes)
// are fed one reading period (1050 clocks) apart. After each program run all 16
// sums are compared with sums of the last `length` readings kept by this
// testbench (readings before the first count as 0), and every abort request
// with (sum > threshold). The 200-long sums wrap past their start, and the
// record pointer passes several hundred positions. Abort requests must both
// rise and fall during the run.
module tb_sums_datapath;
  import elms_pkg::*, seq128_pkg::*;

  localparam int NREAD = 420;
  localparam int LEN [4] = '{1, 16, 128, 200};

  logic clk = 1'b0, rst = 1'b1, do_sums = 1'b0, adc_valid = 1'b0;
  logic [3:0][15:0] adc_data = '0;
  logic par_we = 1'b0;
  logic [7:0] par_addr = '0;
  logic [31:0] par_wdata = '0;
  seq_ctrl_t ctrl;
  logic [6:0] pc;
  logic [15:0] abort_req;
  logic [15:0][31:0] sum_out;
  logic [15:0] vs_len;
  logic cycle_done;
  int checks = 0, failures = 0, n_on = 0, n_off = 0, n_done = 0;

  seq128 u_seq (.clk, .rst, .do_sums, .cond_jmp(1'b0), .ctrl, .pc,
                .prog_we(1'b0), .prog_addr('0), .prog_data('0));
  sums_datapath dut (.clk, .rst, .ctrl, .adc_valid, .adc_data, .par_we, .par_addr, .par_wdata,
                     .abort_req, .sum_out, .vs_len, .cycle_done);

  always #5 clk = ~clk;
  always @(posedge clk) if (cycle_done) n_done++;

  logic [15:0] hist [4][$];
  logic [31:0] thr [16];

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 4; t++) begin
      par_we = 1'b1; par_addr = 8'h40 + 8'(t); par_wdata = LEN[t];
      @(negedge clk);
    end
    for (int i = 0; i < 16; i++) begin
      thr[i] = 32'(LEN[i / 4]) * 32'(20000 + 3000 * (i % 4));
      par_we = 1'b1; par_addr = 8'h68 + 8'(i); par_wdata = thr[i];
      @(negedge clk);
    end
    par_we = 1'b0;
    for (int n = 0; n < NREAD; n++) begin
      for (int c = 0; c < 4; c++) begin
        logic [15:0] v;
        v = ($urandom_range(0, 19) == 0) ? 16'($urandom_range(50000, 65535)) : 16'($urandom_range(0, 40000));
        adc_data[c] = v;
        hist[c].push_front(v);
      end
      adc_valid = 1'b1;
      @(negedge clk);
      adc_valid = 1'b0;
      do_sums = 1'b1;
      @(negedge clk);
      do_sums = 1'b0;
      repeat (1048) @(negedge clk);
      for (int t = 0; t < 4; t++)
        for (int c = 0; c < 4; c++) begin
          logic [31:0] s;
          s = 0;
          for (int k = 0; k < LEN[t] && k < hist[c].size(); k++) s += 32'(hist[c][k]);
          checks += 2;
          if (sum_out[4*t + c] !== s) begin
            failures++;
            if (failures < 10) $display("reading %0d sum {%0d,%0d} = %0d expected %0d", n, t, c, sum_out[4*t + c], s);
          end
          if (abort_req[4*t + c] !== (s > thr[4*t + c])) begin
            failures++;
            if (failures < 10) $display("reading %0d request {%0d,%0d} = %b", n, t, c, abort_req[4*t + c]);
          end
          if (abort_req[4*t + c]) n_on++; else n_off++;
        end
    end
    checks += 3;
    if (n_done != NREAD) begin failures++; $display("%0d cycle_done pulses", n_done); end
    if (n_on == 0 || n_off == 0) begin failures++; $display("requests never changed"); end
    if (vs_len != 16'd200) begin failures++; $display("vs_len %0d", vs_len); end
    $display("requests on %0d off %0d", n_on, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NREAD * 1050 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
