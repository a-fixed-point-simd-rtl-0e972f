// tb_pe_array -- self-checking test of pe_array (4 PEs, two chains, the
// accumulate chain). Streams words in on the north port and forwards them
// into each PE's memory A, reads them back through the south chain and the
// south output port, builds a running sum along the accumulate chain with
// MADD, checks the per-PE enable mask and the per-PE IF conditions.
module tb_pe_array;
  import pulse_pkg::*;
  logic clk = 0, rst_n = 1;
  pe_op_t op;
  logic nsr = 0, ssr = 0;
  logic [3:0] pe_en = 4'hF, cond, ovf;
  logic [15:0] port1_in = 0, port2_in = 0, port3_out, port4_out;
  logic signed [31:0] acc_chain_in = 32'sd1000, acc_chain_out;
  int checks = 0, failures = 0;
  logic [15:0] words [8];

  pe_array #(.NPE(4), .MDEPTH(256)) dut (.clk, .rst_n, .op, .nsr, .ssr, .pe_en,
    .sat_mode(SAT_S32), .peid_base(8'd0), .port1_in, .port2_in, .port3_out, .port4_out,
    .acc_chain_in, .acc_chain_out, .cond, .ovf);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic pe_op_t mk(opc_e o, logic [6:0] d = OPD_ZERO, logic [6:0] a = OPD_ZERO,
      logic [6:0] b = OPD_ZERO, logic [6:0] c = OPD_ZERO, logic [15:0] imm = 0,
      logic [2:0] aux = 0, logic [2:0] fwd = 0);
    pe_op_t r = '0;
    r.valid = 1; r.opc = o; r.dst = d; r.s1 = a; r.s2 = b; r.s3 = c; r.imm = imm;
    r.aux = aux; r.fwd = fwd; r.mstep = 4'sd1;
    return r;
  endfunction
  task automatic issue(pe_op_t o, bit n = 0, bit s = 0, logic [15:0] p1 = 0);
    op = o; nsr = n; ssr = s; port1_in = p1; @(negedge clk);
  endtask
  task automatic nops(int k); repeat (k) issue(mk(OP_NOP)); endtask

  initial begin
    op = '0;
    foreach (words[i]) words[i] = 16'h100 + 16'(i * 17);
    repeat (2) @(negedge clk); rst_n = 1;
    // stream words 0..3 in: after 4 shifts PE i holds word 3-i
    for (int i = 0; i < 4; i++) issue(mk(OP_NOP), 1, 0, words[i]);
    for (int i = 0; i < 4; i++) begin
      checks++; if (dut.nstage[i] !== words[3 - i]) begin failures++; $display("north stage %0d", i); end
    end
    checks++; if (port3_out !== words[0]) failures++;
    issue(mk(OP_NOP, .fwd(3'b100)));                 // memA[0] = stage
    // copy memA[0] to the south stage, then shift it out of port 4
    issue(mk(OP_LD, OPD_SPORT, OPD_MEMA, .imm(0)));
    nops(3);
    for (int i = 0; i < 4; i++) begin
      checks++; if (port4_out !== words[i]) begin failures++; $display("south out %0d: %h", i, port4_out); end
      issue(mk(OP_NOP), 0, 1);
    end
    // accumulate chain: acc_i = peid + acc_{i-1}, four rounds settle the chain
    for (int r = 0; r < 4; r++) begin
      issue(mk(OP_MADD, OPD_ZERO, OPD_PEID, OPD_IMM, OPD_CHAIN, .imm(1)));
      nops(3);
    end
    checks++; if (acc_chain_out !== 32'sd1006) begin failures++; $display("chain %0d", acc_chain_out); end
    checks++; if (dut.acc[1] !== 32'sd1001) failures++;
    // enable mask: only PE0 and PE3 write their south stage
    pe_en = 4'b1001;
    issue(mk(OP_LD, OPD_SPORT, OPD_IMM, .imm(16'h5A5A)));
    pe_en = 4'hF; nops(3);
    checks++;
    if (dut.sstage[0] !== 16'h5A5A || dut.sstage[3] !== 16'h5A5A || dut.sstage[1] === 16'h5A5A || dut.sstage[2] === 16'h5A5A) begin
      failures++; $display("mask: %h %h %h %h", dut.sstage[0], dut.sstage[1], dut.sstage[2], dut.sstage[3]);
    end
    // per-PE conditions
    op = mk(OP_IF, OPD_ZERO, OPD_PEID, OPD_IMM, .imm(2), .aux(CC_LT)); #1;
    checks++; if (cond !== 4'b0011) begin failures++; $display("cond %b", cond); end
    op = mk(OP_IF, OPD_ZERO, OPD_PEID, OPD_IMM, .imm(2), .aux(CC_GE)); #1;
    checks++; if (cond !== 4'b1100) failures++;
    checks++; if (ovf !== 4'b0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
