// tb_integ_sum: self-checking test of the pedestal, squelch and integration
// logic at its default pedestal length (752 readings).
//
// Readings are a pedestal level per channel plus noise; after the pedestal the
// testbench feeds beam-loss bursts. The very-slow sum input is produced here as
// the sliding sum of the last 64 readings. Expected pedestal means, the
// squelch decision and the integration sums are computed independently in
// 64-bit arithmetic. Both squelch outcomes (added and kept) and the squelch-off
// mode must occur.
module tb_integ_sum;
  localparam int NPED = 752, VSL = 64;

  logic clk = 1'b0, rst = 1'b1, ped_start = 1'b0, sample_valid = 1'b0, squelch_en = 1'b1;
  logic [3:0][15:0] x = '0;
  logic [3:0][31:0] vs_sum = '0;
  logic signed [32:0] squelch = 33'sd2000;
  logic ped_done;
  logic [3:0][15:0] ped_mean;
  logic [3:0] above;
  logic [3:0][47:0] integ;
  int checks = 0, failures = 0, n_add = 0, n_keep = 0, n_off = 0;

  integ_sum dut (.clk, .rst, .ped_start, .sample_valid, .x, .vs_sum, .vs_len(16'(VSL)),
                 .squelch_en, .squelch, .ped_done, .ped_mean, .above, .integ);

  always #5 clk = ~clk;

  longint hist [4][$];
  longint pacc [4], pmean [4], pvs [4], itg [4];

  task automatic feed(input bit burst);
    for (int c = 0; c < 4; c++) begin
      longint v, s;
      v = 500 + 200 * c + $urandom_range(0, 40);
      if (burst) v += 300 + 50 * c;
      x[c] = 16'(v);
      hist[c].push_front(v);
      s = 0;
      for (int k = 0; k < VSL && k < hist[c].size(); k++) s += hist[c][k];
      vs_sum[c] = 32'(s);
    end
    sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 4; c++) begin pacc[c] = 0; itg[c] = 0; end
    ped_start = 1'b1;
    @(negedge clk);
    ped_start = 1'b0;
    for (int n = 0; n < NPED; n++) begin
      feed(1'b0);
      for (int c = 0; c < 4; c++) pacc[c] += hist[c][0];
    end
    repeat (3) @(negedge clk);
    checks++;
    if (!ped_done) begin failures++; $display("pedestal not done"); end
    for (int c = 0; c < 4; c++) begin
      pmean[c] = pacc[c] / NPED;
      pvs[c]   = pacc[c] * VSL / NPED;
      checks++;
      if (ped_mean[c] != 16'(pmean[c])) begin failures++; $display("ch %0d pedestal %0d expected %0d", c, ped_mean[c], pmean[c]); end
    end
    for (int n = 0; n < 600; n++) begin
      bit burst;
      burst = (n % 200) >= 100 && (n % 200) < 150;
      squelch_en = (n < 500);
      feed(burst);
      for (int c = 0; c < 4; c++) begin
        bit on;
        on = !squelch_en || (longint'(vs_sum[c]) - pvs[c] > 2000);
        if (on) itg[c] += hist[c][0] - pmean[c];
        if (!squelch_en) n_off++; else if (on) n_add++; else n_keep++;
        checks += 2;
        if (above[c] != on) begin failures++; if (failures < 10) $display("n %0d ch %0d decision %b", n, c, above[c]); end
        if ($signed(integ[c]) != itg[c]) begin
          failures++;
          if (failures < 10) $display("n %0d ch %0d integ %0d expected %0d", n, c, $signed(integ[c]), itg[c]);
        end
      end
    end
    checks++;
    if (n_add == 0 || n_keep == 0 || n_off == 0) begin failures++; $display("squelch outcomes %0d %0d %0d", n_add, n_keep, n_off); end
    $display("added %0d kept %0d squelch-off %0d", n_add, n_keep, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
