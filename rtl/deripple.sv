// deripple: the de-ripple processor for CH input channels.
//
// For every new reading x[n] of each channel it computes the order-2 CIC sum
// (the sliding sum of the sliding sum, length K) with two recursions that need
// no storage for the first-stage sums:
//     u[n] = u[n-1] + x[n] - 2 x[n-K] + x[n-2K]      y[n] = y[n-1] + u[n]
// and the same sum one period earlier, y[n-L], from x[n-L], x[n-L-K] and
// x[n-L-2K]. The readings come from a circular history of HIST_DEPTH points per
// channel (HIST_DEPTH must exceed L + 2K).
//
// A shared 24-bit decimation accumulator grows by DEC_INC per reading; its top 7
// bits address a 128-point waveform page, so one wrap of the accumulator is one
// 1/60 Hz period. On the first reading at each new address, y[n] is written into
// the channel's tentative page and added into the waveform sum. During the
// period |y[n] - y[n-L]| is compared with max_dy; one excess makes the waveform
// invalid. When the accumulator wraps and the period was valid, the page bit PG
// flips (the tentative page becomes the usable one) and the waveform mean WM =
// sum / 128 is kept. The output is
//     DR[n] = y[n] - (WF[PG][addr] - WM)
// where WF - WM is forced to 0 until a first waveform becomes valid. A period
// can only become valid if, when it began, L + 2K readings had been taken, so
// that y[n-L] had real history behind it; the first usable waveform therefore
// appears after the third period.
//
// Timing: x_valid (one clock) latches x. The channels are then handled one after
// another, 9 clocks each; dr_valid pulses when dr, y and wf_ok hold all channels'
// new values. x_valid must not come again before that (readings are about 1000
// clocks apart). The history and waveform memories start at zero. The packed
// outputs dr and y hold one two's-complement value per channel.
module deripple #(
  parameter int unsigned CH         = 4,
  parameter int unsigned XW         = 16,
  parameter int unsigned YW         = 40,     // CIC sum width (signed)
  parameter int unsigned K          = 128,    // CIC sum length
  parameter int unsigned L          = 752,    // readings per 1/60 Hz period
  parameter int unsigned DEC_INC    = 22336,  // decimation accumulator step
  parameter int unsigned HIST_DEPTH = 1024
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       x_valid,
  input  logic [CH-1:0][XW-1:0]      x,
  input  logic [YW-1:0]              max_dy,
  output logic                       dr_valid,
  output logic [CH-1:0][YW-1:0]      dr,
  output logic [CH-1:0][YW-1:0]      y,
  output logic [CH-1:0]              wf_ok,   // a valid waveform is in use
  output logic [CH-1:0]              pg       // usable page of each channel
);
  localparam int unsigned HW  = $clog2(HIST_DEPTH);
  localparam int unsigned CW  = (CH > 1) ? $clog2(CH) : 1;
  localparam int unsigned NW  = $clog2(L + 2*K + 1);

  initial assert (HIST_DEPTH > L + 2*K) else $fatal(1, "HIST_DEPTH too small");

  typedef enum logic [2:0] {S_IDLE, S_READ, S_CALC, S_WF, S_DR} state_t;
  state_t state;

  // A new reading may only arrive when the previous one has been processed.
  assert property (@(posedge clk) disable iff (rst) x_valid |-> state == S_IDLE)
    else $error("deripple: x_valid while busy");

  // memories
  logic [XW-1:0] hist [CH*HIST_DEPTH];
  logic signed [YW-1:0] wf [CH*256];
  initial begin
    for (int i = 0; i < CH*HIST_DEPTH; i++) hist[i] = '0;
    for (int i = 0; i < CH*256; i++) wf[i] = '0;
  end

  logic [CH-1:0][XW-1:0] x_q;
  logic [CW-1:0]   ch;
  logic [2:0]      tap;
  logic [HW-1:0]   wp;                  // history position of x[n]
  logic [XW-1:0]   hist_q;
  logic [4:0][XW-1:0] taps;             // x[n-K], x[n-2K], x[n-L], x[n-L-K], x[n-L-2K]
  logic signed [YW-1:0] wf_q;
  logic [23:0]     acc, acc_next;
  logic            new_point, wrap, started;
  logic [NW-1:0]   nsamp;
  logic            hist_full, primed;
  logic [CH-1:0][YW-1:0] u_r, ul_r, yl_r, wm, wsum;
  logic [CH-1:0]   bad;
  logic signed [YW-1:0] u_n, y_n, ul_n, yl_n, dy;
  logic [6:0]      addr;
  logic [YW-1:0]   ady;             // |y[n] - y[n-L]|

  assign {wrap, acc_next} = {1'b0, acc} + 25'(DEC_INC);
  assign addr      = acc_next[23:17];
  assign new_point = !started || (acc_next[23:17] != acc[23:17]);
  assign hist_full = (nsamp >= NW'(L + 2*K));

  function automatic logic [HW-1:0] back(logic [HW-1:0] p, logic [31:0] d);
    return p - d[HW-1:0];
  endfunction

  logic [HW-1:0] tap_addr;
  always_comb begin
    case (tap)
      3'd0:    tap_addr = back(wp, K);
      3'd1:    tap_addr = back(wp, 2*K);
      3'd2:    tap_addr = back(wp, L);
      3'd3:    tap_addr = back(wp, L + K);
      default: tap_addr = back(wp, L + 2*K);
    endcase
  end

  // CIC recursions for the current channel
  always_comb begin
    u_n  = u_r[ch]  + YW'(x_q[ch]) - (YW'(taps[0]) <<< 1) + YW'(taps[1]);
    y_n  = y[ch]    + u_n;
    ul_n = ul_r[ch] + YW'(taps[2]) - (YW'(taps[3]) <<< 1) + YW'(taps[4]);
    yl_n = yl_r[ch] + ul_n;
    dy   = y[ch] - yl_r[ch];
    ady  = dy < 0 ? YW'(-dy) : YW'(dy);
  end

  logic page_now;   // usable page after this reading's period-end update
  assign page_now = pg[ch];

  always_ff @(posedge clk) begin
    hist_q <= hist[{ch, tap_addr}];
    wf_q   <= wf[{ch, page_now, addr}];
    if (state == S_IDLE && x_valid) begin
      for (int c = 0; c < CH; c++) hist[{CW'(c), wp}] <= x[c];
    end
    if (state == S_WF && new_point)
      wf[{ch, !page_now, addr}] <= y[ch];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; ch <= '0; tap <= '0; wp <= '0; x_q <= '0; taps <= '0;
      acc <= '0; started <= 1'b0; nsamp <= '0; primed <= 1'b0;
      u_r <= '0; ul_r <= '0; yl_r <= '0; y <= '0; wm <= '0; wsum <= '0;
      bad <= '0; pg <= '0; wf_ok <= '0; dr <= '0; dr_valid <= 1'b0;
    end else begin
      dr_valid <= 1'b0;
      case (state)
        S_IDLE: if (x_valid) begin
          x_q   <= x;
          ch    <= '0;
          tap   <= '0;
          state <= S_READ;
        end
        S_READ: begin
          // the read of tap t is issued while tap == t; its data arrives a clock later
          if (tap != 3'd0) taps[tap - 3'd1] <= hist_q;
          if (tap == 3'd5) state <= S_CALC;
          else             tap <= tap + 3'd1;
        end
        S_CALC: begin
          u_r[ch]  <= u_n;
          y[ch]    <= y_n;
          ul_r[ch] <= ul_n;
          yl_r[ch] <= yl_n;
          // period end: the previous period's waveform is judged before this
          // reading, the first of the new period, is stored
          if (wrap) begin
            if (!bad[ch] && primed) begin
              pg[ch]    <= !pg[ch];
              wm[ch]    <= YW'($signed(wsum[ch]) >>> 7);
              wf_ok[ch] <= 1'b1;
            end
            bad[ch]  <= 1'b0;
            wsum[ch] <= '0;
          end
          state <= S_WF;
        end
        S_WF: begin
          // y, yl hold this reading's values now
          if (ady > max_dy) bad[ch] <= 1'b1;
          if (new_point) wsum[ch] <= wsum[ch] + y[ch];
          state <= S_DR;
        end
        S_DR: begin
          dr[ch] <= wf_ok[ch] ? y[ch] - (wf_q - wm[ch]) : y[ch];
          tap <= '0;
          if (ch == CW'(CH - 1)) begin
            state    <= S_IDLE;
            dr_valid <= 1'b1;
            wp       <= wp + 1'b1;
            acc      <= acc_next;
            started  <= 1'b1;
            if (!hist_full) nsamp <= nsamp + 1'b1;
            if (wrap) primed <= hist_full;
          end else begin
            ch    <= ch + 1'b1;
            state <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
