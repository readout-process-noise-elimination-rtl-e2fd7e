// tb_sync_ram: self-checking test of the registered-input RAM.
//
// Port B loads a pattern, port A reads it back with one clock of latency,
// overwrites part of it, and a same-word collision must leave port A's data.
module tb_sync_ram;
  logic clk = 1'b0;
  logic [7:0] a_addr = '0, b_addr = '0;
  logic a_we = 1'b0, b_we = 1'b0;
  logic [31:0] a_wdata = '0, b_wdata = '0, a_rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  sync_ram dut (.clk, .a_addr, .a_we, .a_wdata, .a_rdata, .b_we, .b_addr, .b_wdata);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 256; i++) begin
      b_we = 1'b1; b_addr = 8'(i); b_wdata = $urandom; model[i] = b_wdata;
      @(negedge clk);
    end
    b_we = 1'b0;
    for (int i = 0; i < 256; i += 3) begin
      a_we = 1'b1; a_addr = 8'(i); a_wdata = ~model[i]; model[i] = a_wdata;
      @(negedge clk);
    end
    // collision: port A wins
    a_addr = 8'd9; a_wdata = 32'h1234_5678; b_we = 1'b1; b_addr = 8'd9; b_wdata = 32'h0;
    model[9] = 32'h1234_5678;
    @(negedge clk);
    a_we = 1'b0; b_we = 1'b0;
    for (int i = 0; i < 256; i++) begin
      a_addr = 8'(255 - i);
      @(negedge clk);
      checks++;
      if (a_rdata !== model[255 - i]) begin
        failures++; $display("addr %0d: %h expected %h", 255 - i, a_rdata, model[255 - i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
