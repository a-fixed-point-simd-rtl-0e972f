// tb_mod_counter -- self-checking test of mod_counter.
// Loads a window [10, 20] with start 18 and stride 3, steps with the stride,
// with signed per-access amounts (+5, -7) and checks wrap-around in both
// directions against a reference model written here.
module tb_mod_counter;
  logic clk = 0, rst_n = 1;
  logic [3:0] ld_field = '0;
  logic [7:0] min_v, max_v, stride_v, start_v, value;
  logic step = 0, use_amt = 0;
  logic signed [7:0] amt = '0;
  int checks = 0, failures = 0;
  int model;

  mod_counter #(.W(8)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int wrap(int v, int mn, int mx);
    int span = mx - mn + 1;
    if (v > mx) return v - span;
    if (v < mn) return v + span;
    return v;
  endfunction

  task automatic do_step(bit ua, int a);
    @(negedge clk); step = 1; use_amt = ua; amt = 8'(a);
    @(negedge clk); step = 0;
    model = wrap(model + (ua ? a : 3), 10, 20);
    checks++;
    if (value !== 8'(model)) begin failures++; $display("step: got %0d exp %0d", value, model); end
  endtask

  initial begin
    min_v = 10; max_v = 20; stride_v = 3; start_v = 18;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); checks++; if (value !== 0) failures++;
    ld_field = 4'hF; @(negedge clk); ld_field = 0;
    model = 18; checks++; if (value !== 18) failures++;
    repeat (6) do_step(0, 0);
    do_step(1, 5); do_step(1, -7); do_step(1, -7); do_step(1, 1);
    // reload only start
    start_v = 12; ld_field = 4'b1000; @(negedge clk); ld_field = 0; model = 12;
    checks++; if (value !== 12) failures++;
    repeat (5) do_step(1, -2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
