// tb_pulse_ctrl -- self-checking test of the controller. Runs a program from
// a small instruction array and checks the program-counter trace (nested
// hardware loops, call/ret, branch, bpa taken and not taken, a loop left
// early and dropped with pop, halt), the
// one-instruction-per-cycle rate, the PE enable vector under ldcr acm and
// if/else/restore, the counter load strobes, the saturation mode, the
// parallel flags and the interrupt.
module tb_pulse_ctrl;
  import pulse_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  logic [15:0] pc;
  logic [63:0] instr;
  logic [3:0] cond = 4'b0101;
  pe_op_t op;
  logic nsr, ssr, io_rd, io_wr, irq, running, halted;
  logic [3:0] pe_en, ea_ld;
  sat_e sat_mode;
  logic [23:0] ea_rd_val, ea_wr_val;
  logic [31:0] cycles;
  logic [63:0] prog [64];
  int checks = 0, failures = 0;
  int trace [$];
  int n_nsr = 0, n_ssr = 0, n_irq = 0, n_io = 0;

  pulse_ctrl #(.NPE(4), .DEPTH(4)) dut (.clk, .rst_n, .start, .start_pc(16'd0), .pc, .instr,
    .cval(16'h0), .cond, .op, .nsr, .ssr, .io_rd, .io_wr, .pe_en, .sat_mode, .ea_ld,
    .ea_rd_val, .ea_wr_val, .irq, .running, .halted, .cycles);

  assign instr = prog[pc[5:0]];
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (running) begin
    trace.push_back(int'(pc));
    n_nsr += int'(nsr); n_ssr += int'(ssr); n_irq += int'(irq); n_io += int'(io_rd);
    case (pc)
      16'd6:  begin checks++; if (pe_en !== 4'b0001) begin failures++; $display("pe_en@6 %b", pe_en); end end
      16'd9:  begin checks++; if (pe_en !== 4'b0000) begin failures++; $display("pe_en@9 %b", pe_en); end end
      16'd11: begin checks++; if (pe_en !== 4'b0001) begin failures++; $display("pe_en@11 %b", pe_en); end end
      16'd12: begin checks++; if (pe_en !== 4'b1111) begin failures++; $display("pe_en@12 %b", pe_en); end end
      16'd31: begin checks++; if (op.mc_ld !== 4'b0100 || op.mc_start !== 8'd5 || op.mc_max !== 8'd200) failures++; end
      16'd32: begin checks++; if (ea_ld !== 4'b1000 || ea_rd_val !== 24'd1025 || ea_wr_val !== 24'h123456) failures++; end
      default: ;
    endcase
  end

  int exp_trace [] = '{0,1,2,1,2,1,2,3,30,31,32,33,4,5,6,8,9,10,11,12,13,15,16,17,18,17,18,19,16,17,18,17,18,19,20,21,23,24};

  initial begin
    foreach (prog[i]) prog[i] = enc(OP_NOP);
    prog[0]  = enc(OP_PUSH, .imm(3));
    prog[1]  = enc(OP_NOP, .nsr(1), .io_rd(1));
    prog[2]  = enc(OP_DBR, .imm(1));
    prog[3]  = enc(OP_CALL, .imm(30));
    prog[4]  = enc(OP_LDCR, .imm(4'b1110), .aux(0));
    prog[5]  = enc(OP_IF, .s1(OPD_PEID), .s2(OPD_IMM), .aux(CC_LT));
    prog[6]  = enc(OP_BPA, .imm(8));
    prog[7]  = enc(OP_INT);
    prog[8]  = enc(OP_ELSE);
    prog[9]  = enc(OP_BPA, .imm(7));
    prog[10] = enc(OP_RESTORE);
    prog[11] = enc(OP_LDCR, .imm(0), .aux(0));
    prog[12] = enc(OP_LDCR, .imm(1), .aux(1));
    prog[13] = enc(OP_BR, .imm(15));
    prog[14] = enc(OP_HALT);
    prog[15] = enc(OP_PUSH, .imm(2));
    prog[16] = enc(OP_PUSH, .imm(2));
    prog[17] = enc(OP_NOP, .ssr(1));
    prog[18] = enc(OP_DBR, .imm(17));
    prog[19] = enc(OP_DBR, .imm(16));
    prog[20] = enc(OP_PUSH, .imm(9));      // a loop left by a branch ...
    prog[21] = enc(OP_BR, .imm(23));
    prog[22] = enc(OP_HALT);
    prog[23] = enc(OP_POP);                // ... and dropped
    prog[24] = enc(OP_HALT);
    prog[30] = enc(OP_INT);
    prog[31] = enc_ldiamc(2'd2, 8'd5, 8'd0, 8'd200, 8'd1);
    prog[32] = enc_ldeamc(2'd3, 24'd1025, 24'h123456);
    prog[33] = enc(OP_RET);
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (halted); @(negedge clk);
    checks++;
    if (trace.size() != exp_trace.size()) begin failures++; $display("trace %p", trace); end
    else foreach (exp_trace[i]) if (trace[i] != exp_trace[i]) begin failures++; $display("trace[%0d]=%0d exp %0d", i, trace[i], exp_trace[i]); end
    checks++; if (cycles != 32'(exp_trace.size())) begin failures++; $display("cycles %0d", cycles); end
    checks++; if (n_nsr != 3 || n_io != 3 || n_ssr != 4 || n_irq != 1) begin failures++; $display("flags %0d %0d %0d %0d", n_nsr, n_io, n_ssr, n_irq); end
    checks++; if (sat_mode !== SAT_S32 || running) failures++;
    checks++; if (dut.lsp != 0) begin failures++; $display("loop stack depth %0d after pop", dut.lsp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
