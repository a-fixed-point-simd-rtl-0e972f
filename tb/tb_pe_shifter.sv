// tb_pe_shifter -- self-checking test of pe_shifter: every shift amount for
// each of the four operations on random data against a reference model.
module tb_pe_shifter;
  logic [31:0] a, y, e;
  logic [4:0] amt;
  logic [1:0] op;
  int checks = 0, failures = 0;

  pe_shifter dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int r = 0; r < 8; r++) begin
      for (int o = 0; o < 4; o++) begin
        for (int s = 0; s < 32; s++) begin
          a = (r == 0) ? 32'h8000_0001 : $urandom; op = 2'(o); amt = 5'(s); #1;
          e = a;
          for (int i = 0; i < s; i++) begin
            case (o)
              0: e = {e[30:0], 1'b0};
              1: e = {1'b0, e[31:1]};
              2: e = {e[31], e[31:1]};
              default: e = {e[30:0], e[31]};
            endcase
          end
          checks++;
          if (y !== e) begin failures++; $display("op %0d amt %0d a %h y %h exp %h", o, s, a, y, e); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
