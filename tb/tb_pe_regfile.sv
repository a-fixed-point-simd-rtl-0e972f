// tb_pe_regfile -- self-checking test of pe_regfile: reset to zero, single
// writes to every word, a three-word write that wraps past word 31, and the
// three read ports, compared with a reference array.
module tb_pe_regfile;
  logic clk = 0, rst_n = 1;
  logic [4:0] raddr1, raddr2, raddr3, waddr;
  logic [15:0] rdata1, rdata2, rdata3;
  logic [1:0] wcount = 0;
  logic [2:0][15:0] wdata;
  logic [15:0] ref_rf [32];
  int checks = 0, failures = 0;

  pe_regfile #(.DEPTH(32), .W(16)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  initial begin #50000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check_all();
    for (int i = 0; i < 32; i++) begin
      raddr1 = 5'(i); raddr2 = 5'(31 - i); raddr3 = 5'(i + 7); #1;
      checks++;
      if (rdata1 !== ref_rf[i] || rdata2 !== ref_rf[31 - i] || rdata3 !== ref_rf[(i + 7) % 32]) begin
        failures++; $display("word %0d: %h %h %h", i, rdata1, rdata2, rdata3);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) ref_rf[i] = 0;
    wdata = '0; waddr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    check_all();
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); wcount = 1; waddr = 5'(i); wdata[0] = 16'($urandom); wdata[1] = 16'hdead; wdata[2] = 16'hbeef;
      ref_rf[i] = wdata[0];
    end
    @(negedge clk); wcount = 3; waddr = 30; wdata = {16'h3333, 16'h2222, 16'h1111};
    ref_rf[30] = 16'h1111; ref_rf[31] = 16'h2222; ref_rf[0] = 16'h3333;
    @(negedge clk); wcount = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
