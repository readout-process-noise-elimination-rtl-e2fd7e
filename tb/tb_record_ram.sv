// tb_record_ram: self-checking test of the raw record memory.
//
// Writes readings at random {channel, point} addresses (including the ends of
// the 64K range), reads them back with cs/oe and checks the one-clock read
// latency, that rdata holds without a read, that a write without cs is ignored
// and that unwritten words read 0.
module tb_record_ram;
  logic clk = 1'b0, cs = 1'b0, oe = 1'b0, we = 1'b0;
  logic [17:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [17:0] addrs [64];
  logic [15:0] vals  [64];
  int checks = 0, failures = 0;

  record_ram dut (.clk, .cs, .oe, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 64; i++) begin
      addrs[i] = (i == 0) ? 18'h0 : (i == 1) ? 18'h3FFFF : 18'({i[5:0], 12'h0} + 18'(i * 7));
      vals[i]  = 16'($urandom);
      cs = 1'b1; we = 1'b1; addr = addrs[i]; wdata = vals[i];
      @(negedge clk);
    end
    we = 1'b0;
    // write without chip select is ignored
    cs = 1'b0; we = 1'b1; addr = addrs[5]; wdata = ~vals[5];
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 64; i++) begin
      cs = 1'b1; oe = 1'b1; addr = addrs[i];
      @(negedge clk);
      cs = 1'b0; oe = 1'b0; addr = '0;
      checks++;
      if (rdata !== vals[i]) begin failures++; $display("addr %h: %h expected %h", addrs[i], rdata, vals[i]); end
      @(negedge clk);
      checks++;
      if (rdata !== vals[i]) begin failures++; $display("rdata did not hold"); end
    end
    cs = 1'b1; oe = 1'b1; addr = 18'h2_0001;
    @(negedge clk);
    checks++;
    if (rdata !== 16'h0) begin failures++; $display("unwritten word reads %h", rdata); end
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
