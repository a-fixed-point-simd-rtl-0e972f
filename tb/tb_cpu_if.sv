// tb_cpu_if -- self-checking test of cpu_if: program and constant memory
// write sequences (address auto-increment, 64-bit word assembly), the start
// pulse, the external-program bit, status read-back and the interrupt
// set/clear handshake.
module tb_cpu_if;
  logic clk = 0, rst_n = 1;
  logic [3:0] addr = 0;
  logic we = 0;
  logic [31:0] wdata = 0, rdata;
  logic start, ext_prog, pm_we, cm_we, irq;
  logic [15:0] start_pc, cm_wdata;
  logic [7:0] pm_waddr, cm_waddr;
  logic [63:0] pm_wdata;
  logic running = 0, halted = 0, irq_set = 0;
  logic [15:0] pc = 16'h1234;
  logic [31:0] cycles = 32'd777;
  logic [3:0] ovf = 4'b1010;
  int checks = 0, failures = 0;
  int npm = 0, ncm = 0, nstart = 0;

  cpu_if #(.NPE(4)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) begin
    if (pm_we) begin
      checks++;
      if (pm_waddr !== 8'(10 + npm) || pm_wdata !== {32'hC0DE0000 + 32'(npm), 32'h11110000 + 32'(npm)}) failures++;
      npm++;
    end
    if (cm_we) begin
      checks++;
      if (cm_waddr !== 8'(200 + ncm) || cm_wdata !== 16'(500 + ncm)) failures++;
      ncm++;
    end
    if (start) nstart++;
  end

  task automatic wr(int a, int d);
    @(negedge clk); addr = 4'(a); we = 1; wdata = 32'(d);
    @(negedge clk); we = 0;
  endtask
  task automatic rd(int a, int exp);
    @(negedge clk); addr = 4'(a); #1; checks++;
    if (rdata !== 32'(exp)) begin failures++; $display("reg %0d = %h exp %h", a, rdata, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wr(2, 10);
    for (int i = 0; i < 3; i++) begin wr(3, 32'h11110000 + i); wr(4, 32'hC0DE0000 + i); end
    rd(2, 13);
    wr(5, 200);
    for (int i = 0; i < 5; i++) wr(6, 500 + i);
    rd(5, 205);
    wr(7, 16'h0040); rd(7, 32'h40);
    checks++; if (start_pc !== 16'h40) failures++;
    wr(0, 3); rd(0, 2);
    checks++; if (nstart != 1 || !ext_prog) failures++;
    rd(8, 777); rd(9, 4'b1010);
    running = 1; rd(1, {16'h1234, 13'd0, 3'b001});
    @(negedge clk); irq_set = 1; @(negedge clk); irq_set = 0;
    checks++; if (!irq) failures++;
    rd(1, {16'h1234, 13'd0, 3'b101});
    wr(1, 4); checks++; if (irq) failures++;
    checks++; if (npm != 3 || ncm != 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
