// tb_pe_accum -- self-checking test of pe_accum: load, accumulate, clear,
// the sticky overflow flag and its separate clear, the clamp of the 33-bit register and the three
// saturation modes of the visible value, against a reference model.
module tb_pe_accum;
  import pulse_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [1:0] op = 0;
  logic clr_ovf = 0;
  logic signed [32:0] d = 0, acc;
  logic signed [31:0] q;
  sat_e mode = SAT_NONE;
  logic ovf;
  int checks = 0, failures = 0;
  longint m; bit movf;

  pe_accum dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic longint sat(longint v, sat_e md);
    case (md)
      SAT_S32: return (v > 64'sd2147483647) ? 64'sd2147483647 : (v < -64'sd2147483648) ? -64'sd2147483648 : v;
      SAT_U31: return (v > 64'sd2147483647) ? 64'sd2147483647 : (v < 0) ? 0 : v;
      default: return longint'($signed(v[31:0]));
    endcase
  endfunction

  task automatic doop(int o, longint v);
    // o = 4: clear only the overflow flag
    @(negedge clk); op = (o == 4) ? 2'd0 : 2'(o); clr_ovf = (o == 4); d = 33'(v);
    @(negedge clk); op = 0; clr_ovf = 0;
    case (o)
      1: m = v;
      2: begin m = m + v; if (m > 64'sd4294967295) m = 64'sd4294967295; if (m < -64'sd4294967296) m = -64'sd4294967296; end
      3: m = 0;
      default: ;
    endcase
    if (o == 3 || o == 4) movf = 0; else if (m > 64'sd2147483647 || m < -64'sd2147483648) movf = 1;
    for (int md = 0; md < 3; md++) begin
      mode = sat_e'(md); #1;
      checks++;
      if (longint'(acc) != m || longint'(q) != sat(m, mode) || ovf != movf) begin
        failures++; $display("op %0d mode %0d acc %0d q %0d ovf %0b exp %0d %0d %0b", o, md, acc, q, ovf, m, sat(m, mode), movf);
      end
    end
  endtask

  initial begin
    m = 0; movf = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    doop(1, 1000); doop(2, -3000); doop(2, 64'sd2147483000); doop(2, 64'sd2000);
    doop(2, 64'sd4294967295); doop(2, 64'sd4294967295);       // clamps at 33 bits
    doop(4, 0); doop(2, 64'sd5); doop(3, 0); doop(1, -64'sd2147483648); doop(2, -64'sd10);
    doop(3, 0);
    repeat (200) doop(($urandom % 4) + 1, longint'($signed(33'({$urandom, $urandom}))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
