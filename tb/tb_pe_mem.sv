// tb_pe_mem -- self-checking test of pe_mem: fills all 256 words through
// the write-back port and the forward port, reads them back on the three
// read ports, and checks that write-back wins over a forward to the same
// word in the same cycle.
module tb_pe_mem;
  logic clk = 0;
  logic [7:0] raddr1, raddr2, raddr3, wb_addr, fw_addr;
  logic [15:0] rdata1, rdata2, rdata3, wb_data, fw_data;
  logic wb_we = 0, fw_we = 0;
  logic [15:0] ref_m [256];
  int checks = 0, failures = 0;

  pe_mem #(.DEPTH(256), .W(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin #50000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    wb_addr = 0; fw_addr = 0; wb_data = 0; fw_data = 0;
    for (int i = 0; i < 256; i += 2) begin
      @(negedge clk);
      wb_we = 1; wb_addr = 8'(i);     wb_data = 16'($urandom); ref_m[i]   = wb_data;
      fw_we = 1; fw_addr = 8'(i + 1); fw_data = 16'($urandom); ref_m[i+1] = fw_data;
    end
    @(negedge clk); wb_addr = 8'd77; wb_data = 16'h1234; fw_addr = 8'd77; fw_data = 16'h9999;
    ref_m[77] = 16'h1234;
    @(negedge clk); wb_we = 0; fw_we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr1 = 8'(i); raddr2 = 8'(255 - i); raddr3 = 8'(i * 3); #1;
      checks++;
      if (rdata1 !== ref_m[i] || rdata2 !== ref_m[255 - i] || rdata3 !== ref_m[(i * 3) % 256]) begin
        failures++; $display("addr %0d mismatch", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
