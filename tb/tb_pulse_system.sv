// tb_pulse_system -- end-to-end test of the four-chip array (16 PEs) at its
// default size, running one motion-estimation basic match on an 8x8 block
// plus the other mechanisms of the machine, from a common external program.
//
// The host broadcasts a cosine-like coefficient table into every chip's
// constant memory and starts all chips in external-program mode. The
// program then:
//  1. loads 128 pixels (an 8x8 block of the current picture and an 8x8
//     candidate of the previous one) from the local-memory model through the
//     north chain, 16 at a time, forwarding each group into memA / memB;
//  2. calls a subroutine in which each PE sums |A-B| over its 4 pixels with
//     modulo-counter addressing;
//  3. adds the 16 partial sums along the south chain across all four chips
//     and writes the block's distortion M to local memory;
//  4. marks, with if/else, the PEs whose running partial sum is below a
//     threshold, branches with bpa, and shifts the 16 marks out to memory;
//     leaves a loop early with bpa and drops it from the loop stack (pop);
//  5. computes a 4-tap dot product with the constant table (MACC), passes
//     it one step along the accumulate chain (MADD) across chip borders;
//  6. drives the accumulators into signed saturation, clears the overflow
//     flag alone and overflows again, interrupts the host and halts.
// Every result is compared with values computed here, and every mechanism
// is counted; one that never happens counts as a failure.
module tb_pulse_system;
  import pulse_pkg::*;
  localparam int NC = 4, NP = 16;
  int thresh;
  logic clk = 0, rst_n = 1;
  logic [NC-1:0] cpu_cs = '1, irq, halted;
  logic [3:0] cpu_addr = 0;
  logic cpu_we = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic [15:0] prog_addr;
  logic [63:0] prog_data;
  logic [15:0] north_in = 0, north_out, south_out;
  logic signed [31:0] acc_chain_out;
  logic [23:0] xrd_addr, xwr_addr;
  logic xrd, xwr;
  logic [63:0] prog [256];
  logic [15:0] ext [256];
  logic [15:0] wmem [int];
  int checks = 0, failures = 0;
  int pc_run = 0;
  // mechanism counters
  int n_nsr = 0, n_ssr = 0, n_fwd = 0, n_iord = 0, n_iowr = 0, n_dbr = 0, n_call = 0,
      n_if_split = 0, n_bpa = 0, n_irq = 0, n_cross = 0, n_pop = 0, n_ovf_clr = 0;
  logic ovf_q = 1'b0;

  pulse_system dut (.clk, .rst_n, .cpu_cs, .cpu_addr, .cpu_we, .cpu_wdata, .cpu_rdata, .irq,
    .halted, .prog_addr, .prog_data, .north_in, .south_in(16'd0), .north_out, .south_out,
    .acc_chain_in(32'sd0), .acc_chain_out, .xrd_addr, .xrd, .xwr_addr, .xwr);

  assign prog_data = prog[prog_addr[7:0]];
  always #5 clk = ~clk;
  initial #1 rst_n = 0;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // local memory model: synchronous read onto the north input, write from the south output
  always @(posedge clk) begin
    if (xrd) north_in <= ext[xrd_addr[7:0]];
    if (xwr) wmem[int'(xwr_addr)] = south_out;
  end

  // mechanism monitor (chip 0 controller; all chips run in lock step)
  always @(posedge clk) if (dut.g_chip[0].u_chip.u_ctrl.running) begin
    automatic opc_e o = dut.g_chip[0].u_chip.u_ctrl.opc;
    pc_run++;
    n_nsr  += int'(dut.g_chip[0].u_chip.nsr);
    n_ssr  += int'(dut.g_chip[0].u_chip.ssr);
    n_iord += int'(xrd);
    n_iowr += int'(xwr);
    n_fwd  += int'(dut.g_chip[0].u_chip.op.fwd[2]);
    if (o == OP_DBR && dut.g_chip[0].u_chip.u_ctrl.lcnt[dut.g_chip[0].u_chip.u_ctrl.lsp - 1] > 1) n_dbr++;
    if (o == OP_CALL) n_call++;
    if (o == OP_BPA && |dut.g_chip[0].u_chip.pe_en) n_bpa++;
    if (o == OP_POP) n_pop++;
    if (o == OP_IF) begin
      automatic logic [NP-1:0] cv = {dut.g_chip[3].u_chip.cond, dut.g_chip[2].u_chip.cond,
                                     dut.g_chip[1].u_chip.cond, dut.g_chip[0].u_chip.cond};
      if (cv != '0 && cv != '1) n_if_split++;
    end
    n_irq += int'(dut.g_chip[0].u_chip.irq_set);
    if (ovf_q && !dut.g_chip[0].u_chip.ovf[0]) n_ovf_clr++;
    ovf_q <= dut.g_chip[0].u_chip.ovf[0];
  end

  // register-file words of every PE, gathered for the checks
  logic [15:0] rb1 [NP], rb2 [NP], rb3 [NP], rb4 [NP], rb5 [NP];
  for (genvar c = 0; c < NC; c++) begin : g_c
    for (genvar i = 0; i < 4; i++) begin : g_i
      assign rb1[c * 4 + i] = dut.g_chip[c].u_chip.u_arr.g_pe[i].u_pe.u_rfb.rf[1];
      assign rb2[c * 4 + i] = dut.g_chip[c].u_chip.u_arr.g_pe[i].u_pe.u_rfb.rf[2];
      assign rb3[c * 4 + i] = dut.g_chip[c].u_chip.u_arr.g_pe[i].u_pe.u_rfb.rf[3];
      assign rb4[c * 4 + i] = dut.g_chip[c].u_chip.u_arr.g_pe[i].u_pe.u_rfb.rf[4];
      assign rb5[c * 4 + i] = dut.g_chip[c].u_chip.u_arr.g_pe[i].u_pe.u_rfb.rf[5];
    end
  end

  int p = 0;
  function automatic void put(logic [63:0] w); prog[p] = w; p++; endfunction
  function automatic void nops(int n); repeat (n) put(enc(OP_NOP)); endfunction

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); cpu_addr = 4'(a); cpu_we = 1; cpu_wdata = d;
    @(negedge clk); cpu_we = 0;
  endtask

  // reference values
  logic [15:0] A [NP][4], B [NP][4], C [4];
  int d [NP], cum [NP], dot [NP], M;
  longint satv;

  initial begin
    int l1, l2, l3, l4, l6, l7, sad, skip;
    foreach (ext[i]) ext[i] = 16'($urandom % 256);
    foreach (C[i]) C[i] = 16'(int'($urandom % 200) - 100);
    // pixel r*16+j of a stream ends in PE 15-j, word r
    M = 0;
    for (int k = 0; k < NP; k++) begin
      d[k] = 0; dot[k] = 0;
      for (int r = 0; r < 4; r++) begin
        A[k][r] = ext[r * 16 + 15 - k];
        B[k][r] = ext[64 + r * 16 + 15 - k];
        d[k] += (A[k][r] > B[k][r]) ? A[k][r] - B[k][r] : B[k][r] - A[k][r];
        dot[k] += int'(A[k][r]) * int'($signed(C[r]));
      end
      M += d[k];
      cum[k] = (k == 0) ? d[k] : cum[k - 1] + d[k];
    end

    thresh = cum[7] + 1;   // PEs 0..7 below, 8..15 above
    foreach (prog[i]) prog[i] = enc(OP_HALT);
    sad = 180;
    // ---- 1. input 128 pixels
    put(enc_ldeamc(0, 0, 0));
    put(enc_ldeamc(1, 255, 1023));
    put(enc_ldeamc(2, 1, 1));
    put(enc_ldeamc(3, 0, 512));
    for (int c = 0; c < 4; c++) put(enc_ldiamc(2'(c), 0, 0, 255, 1));
    put(enc(OP_NOP, .io_rd(1)));
    put(enc(OP_PUSH, .imm(4)));
    l1 = p; put(enc(OP_PUSH, .imm(16)));
    l2 = p; put(enc(OP_NOP, .nsr(1), .io_rd(1)));
    put(enc(OP_DBR, .imm(16'(l2))));
    put(enc(OP_NOP, .fwd(3'b100)));
    put(enc(OP_DBR, .imm(16'(l1))));
    put(enc(OP_PUSH, .imm(4)));
    l3 = p; put(enc(OP_PUSH, .imm(16)));
    l4 = p; put(enc(OP_NOP, .nsr(1), .io_rd(1)));
    put(enc(OP_DBR, .imm(16'(l4))));
    put(enc(OP_NOP, .fwd(3'b101)));
    put(enc(OP_DBR, .imm(16'(l3))));
    // ---- 2. per-PE distortion
    put(enc(OP_CALL, .imm(16'(sad))));
    // ---- 3. sum along the south chain, write M to local memory (address 512)
    put(enc(OP_LD, OPD_SPORT, OPD_RA + 3));
    nops(3);
    put(enc(OP_NOP, .ssr(1)));
    put(enc(OP_PUSH, .imm(15)));
    l6 = p; put(enc(OP_ADD, OPD_RA + 3, OPD_RA + 3, OPD_SPORT, .ssr(1)));
    nops(3);
    put(enc(OP_DBR, .imm(16'(l6))));
    put(enc(OP_LD, OPD_SPORT, OPD_RA + 3));
    nops(3);
    put(enc(OP_NOP, .io_wr(1)));
    // ---- 4. threshold marks with if/else, bpa, shift out 16 marks (513..528)
    put(enc(OP_IF, .s1(OPD_RA + 3), .s2(OPD_IMM), .imm(16'(thresh)), .aux(CC_LT)));
    put(enc(OP_LD, OPD_SPORT, OPD_IMM, .imm(1)));
    skip = p + 2;
    put(enc(OP_BPA, .imm(16'(skip))));
    put(enc(OP_INT));                                   // skipped when bpa is taken
    put(enc(OP_ELSE));
    put(enc(OP_LD, OPD_SPORT, OPD_IMM, .imm(2)));
    put(enc(OP_RESTORE));
    nops(3);
    put(enc(OP_PUSH, .imm(16)));
    l7 = p; put(enc(OP_NOP, .io_wr(1), .ssr(1)));
    put(enc(OP_DBR, .imm(16'(l7))));
    // leave a loop early with bpa, then drop its stack entry
    put(enc(OP_PUSH, .imm(5)));
    put(enc(OP_BPA, .imm(16'(p + 3))));
    put(enc(OP_DBR, .imm(16'(p - 1))));
    put(enc(OP_INT));                                   // never reached
    put(enc(OP_POP));
    // ---- 5. dot product with constants, one step of the accumulate chain
    put(enc_ldiamc(2'd0, 0, 0, 255, 1));
    put(enc(OP_MULT, .s1(OPD_MEMA_C), .s2(OPD_CONST), .imm(0)));
    for (int r = 1; r < 4; r++) put(enc(OP_MACC, .s1(OPD_MEMA_C), .s2(OPD_CONST), .imm(16'(r))));
    nops(3);
    put(enc(OP_LD, OPD_RB + 1, OPD_ACCL));
    put(enc(OP_LD, OPD_RB + 2, OPD_ACCH));
    put(enc(OP_MADD, .s1(OPD_PEID), .s2(OPD_IMM), .s3(OPD_CHAIN), .imm(1)));
    nops(3);
    put(enc(OP_LD, OPD_RB + 4, OPD_ACCL));
    put(enc(OP_LD, OPD_RB + 5, OPD_ACCH));
    // ---- 6. saturation
    put(enc(OP_LDCR, .aux(1), .imm(16'(SAT_S32))));
    put(enc(OP_MULT, .s1(OPD_IMM), .s2(OPD_IMM), .imm(16'h7FFF)));
    put(enc(OP_MACC, .s1(OPD_IMM), .s2(OPD_IMM), .imm(16'h7FFF)));
    put(enc(OP_MACC, .s1(OPD_IMM), .s2(OPD_IMM), .imm(16'h7FFF)));
    nops(3);
    put(enc(OP_LD, OPD_RB + 3, OPD_ACCH));
    nops(3);
    // clear only the flag, then overflow again from the kept value
    put(enc(OP_CLROVF));
    nops(3);
    put(enc(OP_MACC, .s1(OPD_IMM), .s2(OPD_IMM), .imm(16'd1)));
    nops(3);
    put(enc(OP_INT));
    put(enc(OP_HALT));
    // subroutine: RA3 = sum of |memA - memB| over the 4 words
    p = sad;
    put(enc(OP_LD, OPD_RA + 3, OPD_ZERO));
    put(enc(OP_PUSH, .imm(4)));
    l1 = p; put(enc(OP_SUB, OPD_RA + 2, OPD_MEMA_C, OPD_MEMB_C));
    nops(3);
    put(enc(OP_ABS, OPD_RA + 2, OPD_RA + 2));
    nops(3);
    put(enc(OP_ADD, OPD_RA + 3, OPD_RA + 3, OPD_RA + 2));
    put(enc(OP_DBR, .imm(16'(l1))));
    nops(3);
    put(enc(OP_RET));

    repeat (2) @(negedge clk); rst_n = 1;
    // broadcast the coefficient table to all chips, then start in external mode
    wr(5, 0);
    for (int r = 0; r < 4; r++) wr(6, {16'd0, C[r]});
    wr(7, 0);
    wr(0, 3);
    wait (&halted); @(negedge clk);

    // ---- checks
    checks++;
    if (!wmem.exists(512) || wmem[512] !== 16'(M)) begin failures++; $display("M = %0d exp %0d", wmem.exists(512) ? wmem[512] : -1, M); end
    for (int t = 0; t < NP; t++) begin
      checks++;
      if (!wmem.exists(513 + t) || wmem[513 + t] !== ((cum[15 - t] < thresh) ? 16'd1 : 16'd2)) begin
        failures++; $display("mark %0d: %0d cum %0d", 15 - t, wmem.exists(513 + t) ? wmem[513 + t] : -1, cum[15 - t]);
      end
    end
    for (int k = 0; k < NP; k++) begin
      checks++;
      if ({rb2[k], rb1[k]} !== 32'(dot[k])) begin failures++; $display("dot PE%0d %0d exp %0d", k, $signed({rb2[k], rb1[k]}), dot[k]); end
      checks++;
      if (rb3[k] !== 16'h7FFF) begin failures++; $display("saturated high half PE%0d %h", k, rb3[k]); end
    end
    // one accumulate-chain step: acc_k = k + dot_(k-1); PEs 4, 8, 12 take their
    // addend from the last PE of the previous chip
    for (int k = 0; k < NP; k++) begin
      checks++;
      if ({rb5[k], rb4[k]} !== 32'(k + ((k == 0) ? 0 : dot[k - 1]))) begin
        failures++; $display("chain PE%0d %0d", k, $signed({rb5[k], rb4[k]}));
      end else if (k % 4 == 0 && k != 0 && dot[k - 1] != 0) n_cross++;
    end
    // overflow flags, interrupt and lock step through the host interface
    cpu_cs = 4'b0001; @(negedge clk); cpu_addr = 9; #1;
    checks++; if (cpu_rdata !== 32'hF) begin failures++; $display("ovf %h", cpu_rdata); end
    cpu_addr = 8; #1;
    checks++; if (cpu_rdata != 32'(pc_run)) begin failures++; $display("cycles %0d run %0d", cpu_rdata, pc_run); end
    checks++; if (irq !== 4'hF) failures++;
    // loop stack empty again after the early exit
    checks++; if (dut.g_chip[0].u_chip.u_ctrl.lsp != 0) begin failures++; $display("loop stack not empty"); end
    // every mechanism happened
    checks++;
    if (n_nsr != 128 || n_iord != 129 || n_fwd != 8 || n_iowr != 17 || n_ssr != 32 || n_dbr == 0 ||
        n_call != 1 || n_if_split != 1 || n_bpa != 2 || n_pop != 1 || n_irq != 1 || n_cross != 3 || n_ovf_clr != 1) begin
      failures++;
      $display("mechanisms: nsr %0d io_rd %0d fwd %0d io_wr %0d ssr %0d dbr %0d call %0d if %0d bpa %0d pop %0d irq %0d cross %0d ovf_clr %0d",
               n_nsr, n_iord, n_fwd, n_iowr, n_ssr, n_dbr, n_call, n_if_split, n_bpa, n_pop, n_irq, n_cross, n_ovf_clr);
    end
    $display("run: %0d cycles; M = %0d; nsr %0d ssr %0d fwd %0d io_rd %0d io_wr %0d loops %0d if-split %0d bpa %0d",
             pc_run, M, n_nsr, n_ssr, n_fwd, n_iord, n_iowr, n_dbr, n_if_split, n_bpa);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
