// tb_motion_search -- full-search block matching on the four-chip array:
// one 8x8 block against every position of a 16x16 search area (81
// candidates, displacements 0..8 in each direction).
//
// Mapping: PE k (k = 0..8) owns horizontal displacement dx = k and scans
// the nine vertical displacements. The 16x16 area streams row by row
// through the north chain from local memory, where each row is stored
// right to left; after 9..16 shifts PE k holds pixels k+7 .. k of the row,
// and a forward in the same instruction as the shift stores them into
// memA, so memA[8r + j] = S[r][k + 7 - j] (128 words). The block comes from
// the constant memory into memB in the same order. The distortion for
// (dx, dy) is then the sum of |memA - memB| over 64 consecutive words from
// memA[8 dy], read by the modulo counters (mcbr wraps on 0..63; mcar is
// stepped back by 56 after each candidate). Every candidate's distortion
// leaves through the south chain; each PE also keeps its best candidate
// with if/restore and reports it at the end. PEs 9..15 run the same
// program on data outside the area and are not checked.
module tb_motion_search;
  import pulse_pkg::*;
  localparam int NP = 16, OB = 512;
  logic clk = 0, rst_n = 1;
  logic [3:0] cpu_cs = '1, irq, halted;
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
  logic [15:0] mem [1024];
  int S [16][16], blk [8][8];
  int checks = 0, failures = 0, p = 0, run = 0;

  pulse_system dut (.clk, .rst_n, .cpu_cs, .cpu_addr, .cpu_we, .cpu_wdata, .cpu_rdata, .irq,
    .halted, .prog_addr, .prog_data, .north_in, .south_in(16'd0), .north_out, .south_out,
    .acc_chain_in(32'sd0), .acc_chain_out, .xrd_addr, .xrd, .xwr_addr, .xwr);

  assign prog_data = prog[prog_addr[7:0]];
  always #5 clk = ~clk;
  initial #1 rst_n = 0;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) begin
    if (xrd) north_in <= mem[xrd_addr[9:0]];
    if (xwr) mem[xwr_addr[9:0]] <= south_out;
    if (dut.g_chip[0].u_chip.running) run++;
  end

  function automatic void put(logic [63:0] w); prog[p] = w; p++; endfunction
  function automatic void nops(int n); repeat (n) put(enc(OP_NOP)); endfunction
  function automatic void send_out(logic [6:0] src);
    put(enc(OP_LD, OPD_SPORT, src));
    nops(3);
    put(enc(OP_PUSH, .imm(16)));
    put(enc(OP_NOP, .io_wr(1), .ssr(1)));
    put(enc(OP_DBR, .imm(16'(p - 1))));
  endfunction
  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); cpu_addr = 4'(a); cpu_we = 1; cpu_wdata = d;
    @(negedge clk); cpu_we = 0;
  endtask

  initial begin
    int lrow, ldy, lpx, sad [9][9], best [9], bdy [9], bx, by, v;
    // search area with a copy of the block planted at displacement (bx, by)
    bx = int'($urandom % 9); by = int'($urandom % 9);
    foreach (S[r, c]) S[r][c] = int'($urandom % 256);
    foreach (blk[i, j]) begin
      blk[i][j] = S[by + i][bx + j] + int'($urandom % 5) - 2;
      if (blk[i][j] < 0) blk[i][j] = 0;
    end
    foreach (S[r, c]) mem[r * 16 + c] = 16'(S[r][15 - c]);
    foreach (prog[i]) prog[i] = enc(OP_HALT);

    put(enc_ldeamc(1, 1023, 1023));
    put(enc_ldeamc(3, 0, OB));
    for (int c = 0; c < 4; c++) put(enc_ldiamc(2'(c), 0, 0, 255, 1));
    // block into memB of every PE
    for (int t = 0; t < 64; t++) put(enc(OP_LD, OPD_MEMB_C, OPD_CONST, .imm(16'(t))));
    // search area into memA
    put(enc(OP_NOP, .io_rd(1)));
    put(enc(OP_PUSH, .imm(16)));
    lrow = p;
    put(enc(OP_PUSH, .imm(9)));
    put(enc(OP_NOP, .nsr(1), .io_rd(1)));
    put(enc(OP_DBR, .imm(16'(p - 1))));
    put(enc(OP_PUSH, .imm(7)));
    put(enc(OP_NOP, .nsr(1), .io_rd(1), .fwd(3'b100)));
    put(enc(OP_DBR, .imm(16'(p - 1))));
    put(enc(OP_NOP, .fwd(3'b100)));
    put(enc(OP_DBR, .imm(16'(lrow))));
    // search
    put(enc_ldiamc(2'd0, 0, 0, 255, 1));
    put(enc_ldiamc(2'd2, 0, 0, 63, 1));
    put(enc(OP_LD, OPD_RA + 4, OPD_IMM, .imm(16'h7FFF)));
    put(enc(OP_LD, OPD_RA + 5, OPD_ZERO));
    put(enc(OP_LD, OPD_RA + 6, OPD_ZERO));
    put(enc(OP_PUSH, .imm(9)));
    ldy = p;
    put(enc(OP_LD, OPD_RA + 3, OPD_ZERO));
    put(enc(OP_PUSH, .imm(64)));
    lpx = p;
    put(enc(OP_SUB, OPD_RA + 2, OPD_MEMA_C, OPD_MEMB_C));
    nops(3);
    put(enc(OP_ABS, OPD_RA + 2, OPD_RA + 2));
    nops(3);
    put(enc(OP_ADD, OPD_RA + 3, OPD_RA + 3, OPD_RA + 2));
    put(enc(OP_DBR, .imm(16'(lpx))));
    put(enc(OP_PUSH, .imm(7)));
    put(enc(OP_NOP, .s1(OPD_MEMA_C), .mstep(4'(-8))));
    put(enc(OP_DBR, .imm(16'(p - 1))));
    send_out(OPD_RA + 3);
    put(enc(OP_IF, .s1(OPD_RA + 3), .s2(OPD_RA + 4), .aux(CC_LT)));
    put(enc(OP_LD, OPD_RA + 4, OPD_RA + 3));
    put(enc(OP_LD, OPD_RA + 5, OPD_RA + 6));
    put(enc(OP_RESTORE));
    put(enc(OP_ADD, OPD_RA + 6, OPD_RA + 6, OPD_IMM, .imm(1)));
    put(enc(OP_DBR, .imm(16'(ldy))));
    nops(3);
    send_out(OPD_RA + 4);
    send_out(OPD_RA + 5);
    put(enc(OP_HALT));
    if (p > 256) begin failures++; $display("program too long: %0d", p); end

    repeat (2) @(negedge clk); rst_n = 1;
    wr(5, 0);
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) wr(6, 32'(blk[i][7 - j]));
    wr(7, 0);
    wr(0, 3);
    wait (&halted); @(negedge clk);

    for (int dx = 0; dx < 9; dx++) begin
      best[dx] = 32767; bdy[dx] = 0;
      for (int dy = 0; dy < 9; dy++) begin
        sad[dx][dy] = 0;
        for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++)
          sad[dx][dy] += (blk[i][j] > S[dy + i][dx + j]) ? blk[i][j] - S[dy + i][dx + j] : S[dy + i][dx + j] - blk[i][j];
        if (sad[dx][dy] < best[dx]) begin best[dx] = sad[dx][dy]; bdy[dx] = dy; end
        v = int'(mem[OB + dy * 16 + 15 - dx]);
        checks++; if (v != sad[dx][dy]) begin failures++; $display("SAD(%0d,%0d) = %0d exp %0d", dx, dy, v, sad[dx][dy]); end
      end
      v = int'(mem[OB + 144 + 15 - dx]);
      checks++; if (v != best[dx]) begin failures++; $display("best SAD dx=%0d: %0d exp %0d", dx, v, best[dx]); end
      v = int'(mem[OB + 160 + 15 - dx]);
      checks++; if (v != bdy[dx]) begin failures++; $display("best dy dx=%0d: %0d exp %0d", dx, v, bdy[dx]); end
    end
    // the planted match is the best one overall
    checks++;
    if (int'(mem[OB + 144 + 15 - bx]) > 128 || int'(mem[OB + 160 + 15 - bx]) != by) begin
      failures++; $display("planted match at (%0d,%0d) not found", bx, by);
    end
    $display("81 candidates of an 8x8 block in %0d cycles; match at (%0d,%0d)", run, bx, by);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
