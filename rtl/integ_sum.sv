// integ_sum: pedestal measurement, squelch and integration sums (Main Injector
// mode) for CH channels.
//
// ped_start begins a pedestal measurement: the next N_PED readings of each
// channel (taken at the start of a beam cycle, with no beam) are accumulated
// into P, and the integration sums are cleared. One clock after the last of
// them the pedestal per reading, P / N_PED, and the pedestal scaled to the
// very-slow sum, P * vs_len / N_PED, are computed. From then on, at every
// sample_valid:
//     diff = very-slow sum - scaled pedestal
//     if (!squelch_en || diff > squelch)  I += x - P / N_PED   (else I is kept)
// i.e. a reading enters the integration sum only when the smoothed input stands
// above the noise level. sample_valid must come after the very-slow sums of
// the same reading have been updated. Arithmetic is two's complement; the
// division truncates. The use of the reading minus the pedestal as the amount
// added, and the widths, are this design's choices.
module integ_sum #(
  parameter int unsigned CH    = 4,
  parameter int unsigned XW    = 16,
  parameter int unsigned SW    = 32,   // very-slow sum width
  parameter int unsigned IW    = 48,   // integration sum width
  parameter int unsigned N_PED = 752,  // readings in a pedestal measurement
  parameter int unsigned LW    = 16    // width of the very-slow sum length
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  ped_start,
  input  logic                  sample_valid,
  input  logic [CH-1:0][XW-1:0] x,
  input  logic [CH-1:0][SW-1:0] vs_sum,
  input  logic [LW-1:0]         vs_len,
  input  logic                  squelch_en,
  input  logic signed [SW:0]    squelch,
  output logic                  ped_done,
  output logic [CH-1:0][XW-1:0] ped_mean,
  output logic [CH-1:0]         above,     // last decision per channel
  output logic [CH-1:0][IW-1:0] integ      // two's complement per channel
);
  localparam int unsigned NW = $clog2(N_PED + 1);
  localparam int unsigned PW = XW + NW;          // pedestal accumulator width

  logic [NW-1:0]         cnt;
  logic                  busy, calc;
  logic [CH-1:0][PW-1:0] pacc;
  logic [CH-1:0][SW-1:0] ped_vs;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; busy <= 1'b0; calc <= 1'b0; ped_done <= 1'b0;
      pacc <= '0; ped_vs <= '0; ped_mean <= '0; above <= '0; integ <= '0;
    end else begin
      calc <= 1'b0;
      if (ped_start) begin
        busy <= 1'b1; cnt <= '0; pacc <= '0; integ <= '0; ped_done <= 1'b0;
      end else if (busy && sample_valid) begin
        for (int c = 0; c < CH; c++) pacc[c] <= pacc[c] + PW'(x[c]);
        cnt <= cnt + 1'b1;
        if (cnt == NW'(N_PED - 1)) begin
          busy <= 1'b0;
          calc <= 1'b1;
        end
      end else if (calc) begin
        for (int c = 0; c < CH; c++) begin
          ped_mean[c] <= XW'(pacc[c] / PW'(N_PED));
          ped_vs[c]   <= SW'(((PW+LW)'(pacc[c]) * (PW+LW)'(vs_len)) / (PW+LW)'(N_PED));
        end
        ped_done <= 1'b1;
      end else if (ped_done && sample_valid) begin
        for (int c = 0; c < CH; c++) begin
          logic signed [SW:0] diff;
          logic               on;
          diff = $signed({1'b0, vs_sum[c]}) - $signed({1'b0, ped_vs[c]});
          on   = !squelch_en || (diff > squelch);
          above[c] <= on;
          if (on) integ[c] <= integ[c] + IW'($signed({1'b0, x[c]}) - $signed({1'b0, ped_mean[c]}));
        end
      end
    end
  end
endmodule
