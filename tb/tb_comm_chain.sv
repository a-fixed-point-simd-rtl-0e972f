// tb_comm_chain -- self-checking test of comm_chain: streams a sequence in
// through the input port, checks it appears at each stage and at the output
// one cycle per shift later, and checks that a PE load wins over a shift.
module tb_comm_chain;
  logic clk = 0, rst_n = 1, shift = 0;
  logic [15:0] port_in = 0, port_out;
  logic [3:0] ld_en = 0;
  logic [3:0][15:0] ld_data = '0, stage;
  logic [15:0] model [4];
  int checks = 0, failures = 0;

  comm_chain #(.NPE(4), .W(16)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic cmp();
    checks++;
    for (int i = 0; i < 4; i++) if (stage[i] !== model[i]) begin failures++; $display("stage %0d %h exp %h", i, stage[i], model[i]); end
    if (port_out !== model[3]) failures++;
  endtask

  initial begin
    for (int i = 0; i < 4; i++) model[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    cmp();
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      shift = ($urandom % 4) != 0; port_in = 16'($urandom);
      ld_en = ((n % 7) == 3) ? 4'b0100 : 4'b0000; ld_data[2] = 16'hA5A5 + 16'(n);
      @(posedge clk); #1;
      begin
        logic [15:0] nm [4];
        for (int i = 0; i < 4; i++) begin
          nm[i] = model[i];
          if (ld_en[i]) nm[i] = ld_data[i];
          else if (shift) nm[i] = (i == 0) ? port_in : model[i-1];
        end
        model = nm;
      end
      cmp();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
