// tb_elms_rom: self-checking test of the program memory.
//
// Checks the power-up image (word i = i * 0x10001 + 5), the one-clock read
// latency through the registered address, the reset of that address to 0 and
// overwriting words through the load port.
module tb_elms_rom;
  function automatic logic [127:0][35:0] image();
    logic [127:0][35:0] p;
    for (int i = 0; i < 128; i++) p[i] = 36'(i * 32'h10001 + 5);
    return p;
  endfunction

  logic clk = 1'b0, rst = 1'b1, we = 1'b0;
  logic [6:0] raddr = '0, waddr = '0, raddr_q;
  logic [35:0] rdata, wdata = '0;
  int checks = 0, failures = 0;

  elms_rom #(.INIT(image())) dut (.clk, .rst, .raddr, .rdata, .raddr_q, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  task automatic check(input logic [35:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin failures++; $display("%s: %h expected %h", what, rdata, exp); end
  endtask

  initial begin
    raddr = 7'd77;
    @(negedge clk);
    check(36'd5, "reset address");
    rst = 1'b0;
    for (int i = 0; i < 128; i++) begin
      raddr = 7'(i * 37);
      @(negedge clk);
      check(36'(7'(i * 37) * 32'h10001 + 5), "image");
      checks++;
      if (raddr_q !== 7'(i * 37)) begin failures++; $display("raddr_q wrong"); end
    end
    // overwrite every fourth word
    for (int i = 0; i < 128; i += 4) begin
      we = 1'b1; waddr = 7'(i); wdata = 36'h9_0000_0000 | 36'(i);
      @(negedge clk);
    end
    we = 1'b0;
    for (int i = 0; i < 128; i++) begin
      raddr = 7'(i);
      @(negedge clk);
      check((i % 4 == 0) ? (36'h9_0000_0000 | 36'(i)) : 36'(i * 32'h10001 + 5), "reloaded");
    end
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
