// tb_pe -- self-checking test of one processing element.
// Drives a sequence of broadcast operations, one per cycle, and watches the
// values the PE writes to its north chain stage. Checks the 4-stage
// pipeline timing (a result is seen by the 4th following instruction, not
// the 3rd, and reaches the chain 3 cycles after issue), ALU, RANK,
// multiply / multiply-accumulate back to back, MADD with the accumulate
// chain, shifts, direct, indirect and modulo-counter memory access, the
// chain-to-memory forward, counter loads, constants, PE index, the enable
// input and the IF condition output. Expected values are computed here.
module tb_pe;
  import pulse_pkg::*;
  logic clk = 0, rst_n = 1;
  pe_op_t op;
  logic en = 1;
  sat_e sat_mode = SAT_NONE;
  logic [15:0] nstage = 16'h0ABC, sstage = 16'h0123;
  logic signed [31:0] chain_in = 32'sd1000000, acc_out;
  logic acc_ovf, nld_en, sld_en, cond;
  logic [15:0] nld_data, sld_data;
  int checks = 0, failures = 0, cyc = 0;
  logic [15:0] got [$];
  int got_cyc [$];
  logic [15:0] sgot [$];

  pe #(.MDEPTH(256)) dut (.clk, .rst_n, .op, .en, .peid(8'd3), .sat_mode, .nstage, .sstage,
    .chain_in, .acc_out, .acc_ovf, .nld_en, .nld_data, .sld_en, .sld_data, .cond);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (nld_en) begin got.push_back(nld_data); got_cyc.push_back(cyc); end
    if (sld_en) sgot.push_back(sld_data);
  end

  function automatic pe_op_t mk(opc_e o, logic [6:0] d = OPD_ZERO, logic [6:0] a = OPD_ZERO,
      logic [6:0] b = OPD_ZERO, logic [6:0] c = OPD_ZERO, logic [15:0] imm = 0,
      logic [2:0] aux = 0, logic [2:0] fwd = 0);
    pe_op_t r = '0;
    r.valid = 1; r.opc = o; r.dst = d; r.s1 = a; r.s2 = b; r.s3 = c; r.imm = imm;
    r.aux = aux; r.fwd = fwd; r.mstep = 4'sd1; r.cval = 16'h7777;
    return r;
  endfunction

  task automatic issue(pe_op_t o, bit e = 1);
    op = o; en = e; @(negedge clk);
  endtask
  task automatic nops(int n);
    repeat (n) issue(mk(OP_NOP));
  endtask

  logic [15:0] exp_v [$];
  int e_acc;

  initial begin
    op = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // cycle 0
    issue(mk(OP_LD, OPD_RA + 1, OPD_IMM, .imm(100)));
    issue(mk(OP_LD, OPD_RB + 2, OPD_IMM, .imm(7)));
    issue(mk(OP_LD, OPD_NPORT, OPD_RA + 1));                 // too early: old value 0
    nops(1);
    issue(mk(OP_LD, OPD_NPORT, OPD_RA + 1));                 // 4th after: 100
    exp_v.push_back(0); exp_v.push_back(100);
    issue(mk(OP_SUB, OPD_RA + 3, OPD_RA + 1, OPD_RB + 2));    // 93
    issue(mk(OP_MULT, OPD_ZERO, OPD_RA + 1, OPD_RB + 2));    // 700
    issue(mk(OP_MACC, OPD_ZERO, OPD_RA + 1, OPD_RB + 2));    // 1400
    issue(mk(OP_MACC, OPD_ZERO, OPD_RB + 2, OPD_RB + 2));    // 1449
    issue(mk(OP_SUB, OPD_RA + 4, OPD_RB + 2, OPD_RA + 1));    // -93
    nops(3);
    issue(mk(OP_LD, OPD_NPORT, OPD_ACCL));                   exp_v.push_back(1449);
    issue(mk(OP_ABS, OPD_NPORT, OPD_RA + 4));                exp_v.push_back(93);
    issue(mk(OP_RANK, OPD_RB + 10, OPD_RA + 1, OPD_RB + 2, OPD_RA + 4));
    issue(mk(OP_LD, OPD_ADDRA, OPD_IMM, .imm(85)));
    issue(mk(OP_LD, OPD_MEMA, OPD_IMM, .imm(85), .fwd(3'b100)));   // memA[85]=85, memA[0]=nstage
    issue(mk(OP_NOP, .fwd(3'b100)));                                 // memA[1]=nstage
    issue(mk(OP_LD, OPD_MEMA_C, OPD_IMM, .imm(16'h1234)));          // memA[2]
    issue(mk(OP_LD, OPD_NPORT, OPD_RB + 10));                exp_v.push_back(100);
    issue(mk(OP_LD, OPD_NPORT, OPD_RB + 11));                exp_v.push_back(7);
    issue(mk(OP_LD, OPD_NPORT, OPD_RB + 12));                exp_v.push_back(16'(-93));
    issue(mk(OP_ADD, OPD_NPORT, OPD_MEMA_C, OPD_MEMA_C));    exp_v.push_back(16'h1578);
    issue(mk(OP_LD, OPD_NPORT, OPD_MEMA_C));                 exp_v.push_back(16'h0ABC);
    issue(mk(OP_LD, OPD_NPORT, OPD_MEMA_C));                 exp_v.push_back(16'h1234);
    issue(mk(OP_LD, OPD_NPORT, OPD_MEMA_I));                 exp_v.push_back(85);
    issue(mk(OP_LD, OPD_NPORT, OPD_IMM, .imm(999)), 0);      // disabled PE: no write
    issue(mk(OP_SHL, OPD_ZERO, OPD_ZERO, OPD_IMM, .imm(4))); // acc = 1449 << 4
    nops(3);
    issue(mk(OP_LD, OPD_NPORT, OPD_ACCL));                   exp_v.push_back(16'(1449 << 4));
    issue(mk(OP_MADD, OPD_ZERO, OPD_RA + 1, OPD_RB + 2, OPD_CHAIN));
    nops(3);
    e_acc = 700 + 1000000;
    issue(mk(OP_LD, OPD_NPORT, OPD_ACCH));                   exp_v.push_back(16'(e_acc >> 16));
    issue(mk(OP_LD, OPD_NPORT, OPD_ACCL));                   exp_v.push_back(16'(e_acc));
    issue(mk(OP_LD, OPD_NPORT, OPD_PEID));                   exp_v.push_back(3);
    issue(mk(OP_LD, OPD_SPORT, OPD_CONST, .imm(5)));
    issue(mk(OP_LD, OPD_MEMA, OPD_IMM, .imm(10)));           // memA[10] = 10
    begin
      pe_op_t l = mk(OP_NOP);
      l.mc_ld = 4'b0001; l.mc_start = 10; l.mc_min = 0; l.mc_max = 255; l.mc_stride = 1;
      issue(l);
    end
    nops(3);
    issue(mk(OP_LD, OPD_NPORT, OPD_MEMA_C));                 exp_v.push_back(10);
    // condition output (combinational in the issue cycle)
    op = mk(OP_IF, OPD_ZERO, OPD_RA + 1, OPD_IMM, .imm(100), .aux(CC_EQ)); #1;
    checks++; if (cond !== 1'b1) begin failures++; $display("cond eq"); end
    op = mk(OP_IF, OPD_ZERO, OPD_RA + 1, OPD_IMM, .imm(100), .aux(CC_LT)); #1;
    checks++; if (cond !== 1'b0) begin failures++; $display("cond lt"); end
    op = mk(OP_IF, OPD_ZERO, OPD_RA + 4, OPD_IMM, .imm(0), .aux(CC_LT)); #1;
    checks++; if (cond !== 1'b1) begin failures++; $display("cond lt neg"); end
    @(negedge clk);
    // overflow flag: 3 * 2^30 leaves the signed 32-bit range; CLROVF clears
    // the flag and keeps the value
    issue(mk(OP_MULT, OPD_ZERO, OPD_IMM, OPD_IMM, .imm(16'h8000)));
    issue(mk(OP_MACC, OPD_ZERO, OPD_IMM, OPD_IMM, .imm(16'h8000)));
    issue(mk(OP_MACC, OPD_ZERO, OPD_IMM, OPD_IMM, .imm(16'h8000)));
    nops(4);
    checks++; if (acc_ovf !== 1'b1) begin failures++; $display("overflow not flagged"); end
    issue(mk(OP_CLROVF));
    nops(4);
    checks++; if (acc_ovf !== 1'b0 || acc_out !== 32'hC000_0000) begin
      failures++; $display("clear overflow: ovf %b acc %h", acc_ovf, acc_out);
    end
    nops(5);
    // compare
    checks++;
    if (got.size() != exp_v.size()) begin failures++; $display("writes %0d exp %0d", got.size(), exp_v.size()); end
    for (int i = 0; i < exp_v.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] !== exp_v[i]) begin failures++; $display("write %0d: %h exp %h", i, got[i], exp_v[i]); end
    end
    checks++;
    if (got_cyc.size() < 2 || got_cyc[0] != 5 || got_cyc[1] != 7) begin
      failures++; $display("latency: first writes at cycles %p (expect 5, 7)", got_cyc);
    end
    checks++;
    if (sgot.size() != 1 || sgot[0] !== 16'h7777) begin failures++; $display("south write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
