// tb_prog_mem -- self-checking test of prog_mem: writes all 256 64-bit words
// with random data and reads every one back.
module tb_prog_mem;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] ref_m [256];
  int checks = 0, failures = 0;
  prog_mem #(.DEPTH(256), .WIDTH(64)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = {$urandom, $urandom}; ref_m[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 255; i >= 0; i--) begin
      raddr = 8'(i); #1; checks++;
      if (rdata !== ref_m[i]) begin failures++; $display("word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
