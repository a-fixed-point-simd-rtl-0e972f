// mod_counter -- programmable modulo address counter.
//
// Holds a current address that moves by a signed step on every access and
// wraps inside the window [min, max]: leaving the window past max re-enters
// at min by the overshoot, and vice versa. Start, min, max and a default
// stride are loaded by program instructions (ldiamc / ldeamc style). The
// step of one access is either the default stride or a signed amount given
// by the instruction itself (as in "*mcar(-2)").
//
// Interface: ld_field[0..3] load min, max, stride, start (start also sets
// the current address). step with use_amt=0 adds the stride, use_amt=1 adds
// amt. value is the registered current address. Loads take priority over a
// step in the same cycle. Reset gives the full window [0, 2^W-1], start 0,
// stride 1.
//
// From the document: modulo counters per memory and for the two address
// ports, with start/min/max/stride fields. The wrap rule (overshoot
// re-enters at the other end) is this design's own choice.
module mod_counter #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [3:0]          ld_field,   // min, max, stride, start
  input  logic [W-1:0]        min_v,
  input  logic [W-1:0]        max_v,
  input  logic [W-1:0]        stride_v,
  input  logic [W-1:0]        start_v,
  input  logic                step,
  input  logic                use_amt,
  input  logic signed [W-1:0] amt,
  output logic [W-1:0]        value
);
  logic [W-1:0] mn, mx, stride;
  logic signed [W+1:0] sum, span, nxt;   // two guard bits; nxt is back in range, its top bits unused

  always_comb begin
    span = $signed({2'b00, mx}) - $signed({2'b00, mn}) + (W+2)'(1);
    sum  = $signed({2'b00, value}) + (use_amt ? (W+2)'(amt) : $signed({{2{stride[W-1]}}, stride}));
    nxt  = sum;
    if (sum > $signed({2'b00, mx}))      nxt = sum - span;
    else if (sum < $signed({2'b00, mn})) nxt = sum + span;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mn <= '0; mx <= '1; stride <= W'(1); value <= '0;
    end else begin
      if (ld_field[0]) mn <= min_v;
      if (ld_field[1]) mx <= max_v;
      if (ld_field[2]) stride <= stride_v;
      if (ld_field[3])  value <= start_v;
      else if (step)    value <= nxt[W-1:0];
    end
  end
endmodule
