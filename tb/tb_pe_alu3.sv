// tb_pe_alu3 -- self-checking test of pe_alu3: every operation on random and
// edge-case operand triples compared with a reference model that sorts the
// three operands independently.
module tb_pe_alu3;
  import pulse_pkg::*;
  opc_e op;
  logic signed [15:0] a, b, c;
  logic signed [2:0][15:0] r;
  int checks = 0, failures = 0;
  opc_e ops [15] = '{OP_LD, OP_ADD, OP_SUB, OP_ABS, OP_AND, OP_OR, OP_XOR, OP_MAX,
                     OP_MIN, OP_MED, OP_CLIP, OP_COR, OP_RANK, OP_ADD3, OP_NOP};

  pe_alu3 dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic t(int aa, int bb, int cc);
    int s [3]; int tmp;
    logic signed [15:0] e0, e1, e2;
    a = 16'(aa); b = 16'(bb); c = 16'(cc);
    s[0] = a; s[1] = b; s[2] = c;
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2 - i; j++)
      if (s[j] < s[j+1]) begin tmp = s[j]; s[j] = s[j+1]; s[j+1] = tmp; end
    foreach (ops[k]) begin
      op = ops[k]; #1;
      e1 = 0; e2 = 0;
      case (op)
        OP_LD: e0 = a;  OP_ADD: e0 = 16'(int'(a) + int'(b)); OP_SUB: e0 = 16'(int'(a) - int'(b));
        OP_ABS: e0 = 16'((a < 0) ? -int'(a) : int'(a));
        OP_AND: e0 = a & b; OP_OR: e0 = a | b; OP_XOR: e0 = a ^ b;
        OP_MAX: e0 = 16'(s[0]); OP_MIN: e0 = 16'(s[2]); OP_MED: e0 = 16'(s[1]);
        OP_CLIP: e0 = (a < b) ? b : (a > c) ? c : a;
        OP_COR:  e0 = (a >= b && a <= c) ? 16'sd0 : a;
        OP_RANK: begin e0 = 16'(s[0]); e1 = 16'(s[1]); e2 = 16'(s[2]); end
        OP_ADD3: e0 = 16'(int'(a) + int'(b) + int'(c));
        default: e0 = 0;
      endcase
      checks++;
      if (r[0] !== e0 || r[1] !== e1 || r[2] !== e2) begin
        failures++; $display("%s a=%0d b=%0d c=%0d -> %0d %0d %0d", op.name(), a, b, c, r[0], r[1], r[2]);
      end
    end
  endtask

  initial begin
    t(5, 5, 5); t(-32768, 32767, 0); t(1, 2, 3); t(3, 2, 1); t(2, 3, 1); t(-5, -10, 10); t(7, -10, 10);
    repeat (300) t($urandom, $urandom, $urandom);
    repeat (300) t(int'($urandom % 21) - 10, -4, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
