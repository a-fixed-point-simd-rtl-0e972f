// tb_pe_madd -- self-checking test of pe_madd: random and extreme signed
// operands, a*b + c compared with 64-bit integer arithmetic.
module tb_pe_madd;
  logic signed [15:0] a, b;
  logic signed [31:0] c;
  logic signed [32:0] y;
  int checks = 0, failures = 0;
  longint e;

  pe_madd dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic t(int aa, int bb, int cc);
    a = 16'(aa); b = 16'(bb); c = 32'(cc); #1;
    e = longint'(a) * longint'(b) + longint'(c);
    checks++;
    if (longint'(y) != e) begin failures++; $display("%0d*%0d+%0d = %0d exp %0d", a, b, c, y, e); end
  endtask

  initial begin
    t(-32768, -32768, 2147483647);
    t(-32768, 32767, -2147483648);
    t(32767, 32767, 0);
    t(0, 5, -1);
    t(-3, 7, 100);
    repeat (500) t($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
