// tb_abort_logic: self-checking test of the system abort rule.
//
// Random request patterns, type masks and channel minimums are applied; the
// expected abort is computed here by counting the channels that have at least
// one request of an enabled type.
module tb_abort_logic;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] req = '0;
  logic [3:0] mask = '0, ch_hits;
  logic [2:0] minc = '0;
  logic sys_abort;
  int checks = 0, failures = 0, aborts = 0;

  abort_logic dut (.clk, .rst, .abort_req(req), .type_mask(mask), .min_channels(minc), .ch_hits, .sys_abort);

  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      int n;
      logic [3:0] h;
      req = 16'($urandom) & 16'($urandom);
      mask = 4'($urandom);
      minc = 3'($urandom_range(0, 4));
      h = '0;
      for (int t = 0; t < 4; t++)
        for (int c = 0; c < 4; c++)
          if (mask[t] && req[4*t + c]) h[c] = 1'b1;
      n = h[0] + h[1] + h[2] + h[3];
      @(negedge clk);
      checks++;
      if (sys_abort !== (minc != 0 && n >= minc) || ch_hits !== h) begin
        failures++;
        $display("req %h mask %b min %0d: abort %b hits %b", req, mask, minc, sys_abort, ch_hits);
      end
      if (sys_abort) aborts++;
    end
    checks++;
    if (aborts == 0 || aborts == 500) begin failures++; $display("abort never toggled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
