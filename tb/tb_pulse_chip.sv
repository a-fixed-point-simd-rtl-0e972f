// tb_pulse_chip -- self-checking test of one PULSE chip, end to end through
// its own pins. The host loads a program into the internal program memory
// over the CPU interface and starts it. The program sets up both address
// ports, streams 8 words from an external memory model into the north chain
// with io reads and hardware loops, forwards them into memory A and B of
// each PE, computes |A-B| in every PE, sums the four results along the
// south chain, writes the sum to external memory with an io write, raises
// the interrupt and halts. Checks: the written sum against a value computed
// here, its address, the interrupt and halted status, and the cycle count
// (one instruction per cycle).
module tb_pulse_chip;
  import pulse_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [3:0] cpu_addr = 0;
  logic cpu_we = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic irq, halted, xrd, xwr;
  logic [15:0] ext_pc;
  logic [15:0] port1_in = 0, port3_out, port4_out;
  logic signed [31:0] acc_chain_out;
  logic [23:0] xrd_addr, xwr_addr;
  logic [15:0] ext [64];
  logic [15:0] wmem [int];
  logic [63:0] prog [$];
  int checks = 0, failures = 0, total = 0;

  pulse_chip #(.NPE(4)) dut (.clk, .rst_n, .chip_id(4'd0), .cpu_addr, .cpu_we, .cpu_wdata,
    .cpu_rdata, .irq, .ext_pc, .ext_instr(64'd0), .port1_in, .port2_in(16'd0), .port3_out,
    .port4_out, .acc_chain_in(32'sd0), .acc_chain_out, .xrd_addr, .xrd, .xwr_addr, .xwr, .halted);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // synchronous external memory: read data appears on port 1 the next cycle
  always @(posedge clk) begin
    if (xrd) port1_in <= ext[xrd_addr[5:0]];
    if (xwr) wmem[int'(xwr_addr)] = port4_out;
  end

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); cpu_addr = 4'(a); cpu_we = 1; cpu_wdata = d;
    @(negedge clk); cpu_we = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); cpu_addr = 4'(a); #1; d = cpu_rdata;
  endtask
  function automatic void nops(int n); repeat (n) prog.push_back(enc(OP_NOP)); endfunction

  logic [31:0] st;
  initial begin
    foreach (ext[i]) ext[i] = 16'($urandom % 256);
    for (int i = 0; i < 4; i++) total += (ext[i] > ext[4 + i]) ? ext[i] - ext[4 + i] : ext[4 + i] - ext[i];
    prog.push_back(enc_ldeamc(0, 0, 100));
    prog.push_back(enc_ldeamc(1, 63, 200));
    prog.push_back(enc_ldeamc(2, 1, 1));
    prog.push_back(enc_ldeamc(3, 0, 100));
    prog.push_back(enc(OP_NOP, .io_rd(1)));                    // 4
    prog.push_back(enc(OP_PUSH, .imm(4)));                     // 5
    prog.push_back(enc(OP_NOP, .nsr(1), .io_rd(1)));           // 6
    prog.push_back(enc(OP_DBR, .imm(6)));                      // 7
    prog.push_back(enc(OP_NOP, .fwd(3'b100)));                 // 8  north -> memA
    prog.push_back(enc(OP_PUSH, .imm(4)));                     // 9
    prog.push_back(enc(OP_NOP, .nsr(1), .io_rd(1)));           // 10
    prog.push_back(enc(OP_DBR, .imm(10)));                     // 11
    prog.push_back(enc(OP_NOP, .fwd(3'b101)));                 // 12 north -> memB
    prog.push_back(enc(OP_SUB, OPD_RA + 2, OPD_MEMA, OPD_MEMB, .imm(0)));
    nops(3);
    prog.push_back(enc(OP_ABS, OPD_RA + 3, OPD_RA + 2));
    nops(3);
    prog.push_back(enc(OP_LD, OPD_SPORT, OPD_RA + 3));
    nops(3);
    prog.push_back(enc(OP_NOP, .ssr(1)));
    for (int k = 0; k < 3; k++) begin
      prog.push_back(enc(OP_ADD, OPD_RA + 3, OPD_RA + 3, OPD_SPORT, .ssr(k < 2)));
      nops(3);
    end
    prog.push_back(enc(OP_LD, OPD_SPORT, OPD_RA + 3));
    nops(3);
    prog.push_back(enc(OP_NOP, .io_wr(1)));
    prog.push_back(enc(OP_INT));
    prog.push_back(enc(OP_HALT));

    repeat (2) @(negedge clk); rst_n = 1;
    wr(2, 0);
    foreach (prog[i]) begin wr(3, prog[i][31:0]); wr(4, prog[i][63:32]); end
    rd(2, st); checks++; if (st != 32'(prog.size())) failures++;
    wr(7, 0);
    wr(0, 1);
    wait (halted); @(negedge clk);
    checks++;
    if (!wmem.exists(100) || wmem[100] !== 16'(total)) begin failures++; $display("SAD written %0d exp %0d", wmem.exists(100) ? wmem[100] : -1, total); end
    checks++; if (wmem.size() != 1) failures++;
    rd(1, st);
    checks++; if (st[2:0] !== 3'b110 || !irq) begin failures++; $display("status %h", st); end
    // one instruction per cycle: every word once, plus 3 extra passes of two 2-word loops
    rd(8, st);
    checks++; if (st != 32'(prog.size() + 12)) begin failures++; $display("cycles %0d", st); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
