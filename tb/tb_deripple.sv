// tb_deripple: self-checking test of the de-ripple processor at its default
// sizes (K = 128, L = 752, 128-point waveform pages).
//
// Each channel gets a DC level plus a 60 Hz-like ripple (fundamental and third
// harmonic, period 2^24/22336 readings) and, on channel 1, a beam-loss step of
// 20 readings. The testbench computes the CIC sum directly from its definition,
// y[n] = sum of the last K sliding sums of length K, and follows the waveform
// bookkeeping (first reading per decimated address, validation against MaxDY,
// page flip at each accumulator wrap, WM = sum / 128) to predict y, DR and
// wf_ok for every reading. It also checks the purpose: once a waveform is in
// use, the ripple left in DR must be under a quarter of the ripple in y. The
// number of page flips, of periods rejected by MaxDY and of readings with the
// waveform still forced to zero are counted, and each must happen.
module tb_deripple;
  localparam int K = 128, L = 752, INC = 22336, NREAD = 4200;
  localparam real PI = 3.14159265358979;
  localparam logic [39:0] MAXDY = 40'd200000;

  logic clk = 1'b0, rst = 1'b1, x_valid = 1'b0;
  logic [3:0][15:0] x = '0;
  logic dr_valid;
  logic [3:0][39:0] dr, y;
  logic [3:0] wf_ok, pg;
  int checks = 0, failures = 0;

  deripple dut (.clk, .rst, .x_valid, .x, .max_dy(MAXDY), .dr_valid, .dr, .y, .wf_ok, .pg);

  always #5 clk = ~clk;

  // reference state
  longint xs [4][$];        // all readings, oldest first
  longint s_hist [4][$];    // sliding sums
  longint wf [4][2][128];
  longint wsum [4], wm [4];
  bit     bad [4], ok [4], pgm [4];
  longint acc = 0, nsamp = 0;
  bit     started = 0, primed = 0;
  int     n_flip = 0, n_reject = 0, n_forced = 0;
  longint ymin, ymax, dmin, dmax;

  function automatic longint ydir(int c, int n);
    longint r = 0;
    for (int m = n - K + 1; m <= n; m++) if (m >= 0) r += s_hist[c][m];
    return r;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    ymin = 64'h7fffffffffffffff; ymax = -ymin; dmin = ymin; dmax = -ymin;
    for (int c = 0; c < 4; c++) begin
      wsum[c] = 0; wm[c] = 0; bad[c] = 0; ok[c] = 0; pgm[c] = 0;
      for (int p = 0; p < 2; p++) for (int a = 0; a < 128; a++) wf[c][p][a] = 0;
    end
    for (int n = 0; n < NREAD; n++) begin
      longint acc_next, an;
      bit wrap, newp;
      real ph;
      ph = 2.0 * PI * real'(n) * real'(INC) / 16777216.0;
      for (int c = 0; c < 4; c++) begin
        real v;
        longint s;
        v = 1000.0 + 100.0 * c + (150.0 + 20.0 * c) * $sin(ph + c) + 60.0 * $sin(3.0 * ph);
        if (c == 1 && n >= 3300 && n < 3320) v += 3000.0;
        x[c] = 16'(longint'(v));
        xs[c].push_back(longint'(x[c]));
        s = 0;
        for (int j = n - K + 1; j <= n; j++) if (j >= 0) s += xs[c][j];
        s_hist[c].push_back(s);
      end
      x_valid = 1'b1;
      @(negedge clk);
      x_valid = 1'b0;
      // reference
      acc_next = acc + INC;
      wrap = acc_next >= 64'd16777216;
      acc_next = acc_next % 64'd16777216;
      an = acc_next >> 17;
      newp = !started || an != (acc >> 17);
      for (int c = 0; c < 4; c++) begin
        longint yv, ylv, d, drv;
        yv = ydir(c, n);
        ylv = (n >= L) ? ydir(c, n - L) : 0;
        if (wrap) begin
          if (!bad[c] && primed) begin
            pgm[c] = !pgm[c]; wm[c] = wsum[c] >>> 7; ok[c] = 1; n_flip++;
          end else if (primed) n_reject++;
          bad[c] = 0; wsum[c] = 0;
        end
        d = yv - ylv;
        if ((d < 0 ? -d : d) > longint'(MAXDY)) bad[c] = 1;
        if (newp) begin wf[c][!pgm[c]][an] = yv; wsum[c] += yv; end
        drv = ok[c] ? yv - (wf[c][pgm[c]][an] - wm[c]) : yv;
        if (!ok[c]) n_forced++;
        y_exp[c] = yv; dr_exp[c] = drv; ok_exp[c] = ok[c];
      end
      started = 1;
      if (wrap) primed = (nsamp >= L + 2 * K);
      if (nsamp < L + 2 * K) nsamp++;
      acc = acc_next;
      // wait for the result
      fork
        begin wait (dr_valid); end
        begin repeat (60) @(posedge clk); end
      join_any
      disable fork;
      @(negedge clk);
      for (int c = 0; c < 4; c++) begin
        checks++;
        if ($signed(y[c]) != y_exp[c] || $signed(dr[c]) != dr_exp[c] || wf_ok[c] != ok_exp[c]) begin
          failures++;
          if (failures < 10)
            $display("reading %0d ch %0d: y %0d/%0d dr %0d/%0d ok %b/%b", n, c,
                     $signed(y[c]), y_exp[c], $signed(dr[c]), dr_exp[c], wf_ok[c], ok_exp[c]);
        end
      end
      // ripple of channel 0 in y and in DR over one quiet period with a waveform in use
      if (n >= 2700 && n < 2700 + L) begin
        ymin = ($signed(y[0]) < ymin) ? $signed(y[0]) : ymin;
        ymax = ($signed(y[0]) > ymax) ? $signed(y[0]) : ymax;
        dmin = ($signed(dr[0]) < dmin) ? $signed(dr[0]) : dmin;
        dmax = ($signed(dr[0]) > dmax) ? $signed(dr[0]) : dmax;
      end
      repeat (3) @(negedge clk);
    end
    $display("y ripple %0d, DR ripple %0d; page flips %0d, rejected periods %0d, forced readings %0d",
             ymax - ymin, dmax - dmin, n_flip, n_reject, n_forced);
    checks += 4;
    if (4 * (dmax - dmin) >= ymax - ymin) begin failures++; $display("ripple not removed"); end
    if (n_flip == 0)   begin failures++; $display("no page flip"); end
    if (n_reject == 0) begin failures++; $display("no period rejected"); end
    if (n_forced == 0) begin failures++; $display("waveform never forced to zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint y_exp [4], dr_exp [4];
  bit     ok_exp [4];

  initial begin
    repeat (NREAD * 70 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
