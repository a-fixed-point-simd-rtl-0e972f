// tb_addr_ports -- self-checking test of addr_ports: loads the read and
// write counters field by field (as a program would with ldeamc), runs io
// reads and writes, and checks addresses, strobes and modulo wrap of the
// 24-bit counters against a reference model.
module tb_addr_ports;
  logic clk = 0, rst_n = 1;
  logic [3:0] ld_field = 0;
  logic [23:0] ld_rd_val = 0, ld_wr_val = 0, rd_addr, wr_addr;
  logic io_rd = 0, io_wr = 0, rd, wr;
  int checks = 0, failures = 0;
  int mr, mw;

  addr_ports #(.AW(24)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic ld(int f, int vr, int vw);
    @(negedge clk); ld_field = 4'(1 << f); ld_rd_val = 24'(vr); ld_wr_val = 24'(vw);
    @(negedge clk); ld_field = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    ld(0, 0, 1000);          // min
    ld(1, 1048575, 1009);    // max
    ld(2, 1, 4);             // stride
    ld(3, 1048570, 1001);    // start
    mr = 1048570; mw = 1001;
    for (int n = 0; n < 30; n++) begin
      @(negedge clk); io_rd = n[0]; io_wr = n[1]; #1;
      checks++;
      if (rd !== io_rd || wr !== io_wr || rd_addr !== 24'(mr) || wr_addr !== 24'(mw)) begin
        failures++; $display("n %0d rd %0d/%0d wr %0d/%0d", n, rd_addr, mr, wr_addr, mw);
      end
      if (io_rd) begin mr = mr + 1; if (mr > 1048575) mr -= 1048576; end
      if (io_wr) begin mw = mw + 4; if (mw > 1009) mw -= 10; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
