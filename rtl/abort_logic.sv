// abort_logic: turns the 16 per-sum abort requests into the system abort.
//
// abort_req is indexed {type, ch}: type 0..3 = immediate, fast, slow and
// very-slow sliding sum, ch = input channel. A request counts only if its type
// is enabled in type_mask. The abort is raised when the number of channels with
// at least one counted request reaches min_channels (0 disables the abort).
// The counting rule is this design's choice; the output is registered, one
// clock after abort_req. ch_hits shows which channels were counted.
module abort_logic (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] abort_req,
  input  logic [3:0]  type_mask,
  input  logic [2:0]  min_channels,
  output logic [3:0]  ch_hits,
  output logic        sys_abort
);
  logic [3:0] hits;
  logic [2:0] n;

  always_comb begin
    n = '0;
    for (int c = 0; c < 4; c++) begin
      hits[c] = 1'b0;
      for (int t = 0; t < 4; t++)
        hits[c] = hits[c] | (abort_req[t*4 + c] & type_mask[t]);
      n = n + 3'(hits[c]);
    end
  end

  always_ff @(posedge clk)
    if (rst) begin
      sys_abort <= 1'b0;
      ch_hits <= '0;
    end else begin
      sys_abort <= (min_channels != '0) && (n >= min_channels);
      ch_hits <= hits;
    end
endmodule
