// tb_dct8x8 -- two-dimensional 8x8 DCT of two blocks on the four-chip array,
// with the cosine table held in the constant memory.
//
// The 64-entry table C[u][x] = round(4096 * c(u) * cos((2x+1) u pi / 16)),
// c(0) = 1/sqrt(8), c(u>0) = 1/2, is computed here and broadcast into every
// chip's constant memory at address 8u+x. Two 8x8 blocks give 16 rows, one
// per PE.
// Pass 1 (rows): local memory holds the blocks column by column, so 16
//   pixels streamed through the north chain give each PE one pixel of its
//   row; eight loads fill memA[0..7]. Each PE then forms the eight sums
//   y[u] = sum_x C[u][x] p[x] with MULT/MACC, reading memA through the read
//   counter mcar wrapping on 0..7, shifts the accumulator right by 12 (SAR)
//   and sends the result out through the south chain to local memory.
// Pass 2 (columns): the row results are read back with the external read
//   counter stepping by 8 (a transposed read), one PE per (column, block),
//   and transformed the same way.
// The results are compared with the same fixed-point arithmetic computed
// here, and with a floating-point DCT to within rounding error.
module tb_dct8x8;
  import pulse_pkg::*;
  localparam int NP = 16, WB = 128, ZB = 256;
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
  logic [15:0] mem [512];
  logic signed [15:0] C [8][8];
  int blk [16][8];
  int checks = 0, failures = 0, p = 0, run = 0;

  pulse_system dut (.clk, .rst_n, .cpu_cs, .cpu_addr, .cpu_we, .cpu_wdata, .cpu_rdata, .irq,
    .halted, .prog_addr, .prog_data, .north_in, .south_in(16'd0), .north_out, .south_out,
    .acc_chain_in(32'sd0), .acc_chain_out, .xrd_addr, .xrd, .xwr_addr, .xwr);

  assign prog_data = prog[prog_addr[7:0]];
  always #5 clk = ~clk;
  initial #1 rst_n = 0;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // local memory model: one-cycle read onto the north input, write from the south output
  always @(posedge clk) begin
    if (xrd) north_in <= mem[xrd_addr[8:0]];
    if (xwr) mem[xwr_addr[8:0]] <= south_out;
    if (dut.g_chip[0].u_chip.running) run++;
  end

  function automatic void put(logic [63:0] w); prog[p] = w; p++; endfunction
  function automatic void nops(int n); repeat (n) put(enc(OP_NOP)); endfunction
  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); cpu_addr = 4'(a); cpu_we = 1; cpu_wdata = d;
    @(negedge clk); cpu_we = 0;
  endtask

  // subroutine: eight transforms per PE from memA[0..7], results out through
  // the south chain
  function automatic void transform();
    automatic int lw;
    put(enc_ldiamc(2'd0, 0, 0, 7, 1));
    for (int u = 0; u < 8; u++) begin
      put(enc(OP_MULT, .s1(OPD_MEMA_C), .s2(OPD_CONST), .imm(16'(8 * u))));
      for (int x = 1; x < 8; x++) put(enc(OP_MACC, .s1(OPD_MEMA_C), .s2(OPD_CONST), .imm(16'(8 * u + x))));
      put(enc(OP_SAR, .s2(OPD_IMM), .imm(12)));
      nops(3);
      put(enc(OP_LD, OPD_SPORT, OPD_ACCL));
      nops(3);
      put(enc(OP_PUSH, .imm(16)));
      lw = p; put(enc(OP_NOP, .io_wr(1), .ssr(1)));
      put(enc(OP_DBR, .imm(16'(lw))));
    end
    put(enc(OP_RET));
  endfunction

  initial begin
    int lr, sub = 96, y [16][8], z [2][8][8], py, pz;
    real pi = 3.14159265358979;
    real zf;
    for (int u = 0; u < 8; u++) for (int x = 0; x < 8; x++)
      C[u][x] = 16'($rtoi((u == 0 ? 0.353553390593 : 0.5) * $cos((2 * x + 1) * u * pi / 16.0) * 4096.0
                          + ((u == 0 || $cos((2 * x + 1) * u * pi / 16.0) >= 0) ? 0.5 : -0.5)));
    foreach (blk[j, x]) begin blk[j][x] = int'($urandom % 256); mem[x * 16 + j] = 16'(blk[j][x]); end
    foreach (prog[i]) prog[i] = enc(OP_HALT);

    // ---- pass 1: rows
    put(enc_ldeamc(1, 511, 511));
    put(enc_ldeamc(3, 0, WB));
    put(enc_ldiamc(2'd1, 0, 0, 255, 1));
    put(enc(OP_NOP, .io_rd(1)));
    put(enc(OP_PUSH, .imm(8)));
    lr = p; put(enc(OP_PUSH, .imm(16)));
    put(enc(OP_NOP, .nsr(1), .io_rd(1)));
    put(enc(OP_DBR, .imm(16'(lr + 1))));
    put(enc(OP_NOP, .fwd(3'b100)));
    put(enc(OP_DBR, .imm(16'(lr))));
    put(enc(OP_CALL, .imm(16'(sub))));
    // ---- pass 2: columns, reading the row results transposed (stride 8)
    put(enc_ldeamc(2, 8, 1));
    put(enc_ldiamc(2'd1, 0, 0, 255, 1));
    for (int j = 0; j < 8; j++) begin
      put(enc_ldeamc(3, WB + j, ZB));
      put(enc(OP_NOP, .io_rd(1)));
      put(enc(OP_PUSH, .imm(15)));
      put(enc(OP_NOP, .nsr(1), .io_rd(1)));
      put(enc(OP_DBR, .imm(16'(p - 1))));
      put(enc(OP_NOP, .nsr(1)));
      put(enc(OP_NOP, .fwd(3'b100)));
    end
    put(enc(OP_CALL, .imm(16'(sub))));
    put(enc(OP_HALT));
    p = sub;
    transform();
    if (p > 256) begin failures++; $display("program too long: %0d", p); end

    repeat (2) @(negedge clk); rst_n = 1;
    wr(5, 0);
    for (int u = 0; u < 8; u++) for (int x = 0; x < 8; x++) wr(6, {16'd0, C[u][x]});
    wr(7, 0);
    wr(0, 3);
    wait (&halted); @(negedge clk);

    // reference: same fixed-point steps
    foreach (y[j, u]) begin
      automatic int s = 0;
      for (int x = 0; x < 8; x++) s += int'(C[u][x]) * blk[j][x];
      y[j][u] = int'($signed(16'(s >>> 12)));
    end
    foreach (z[b, v, u]) begin
      automatic int s = 0;
      for (int j = 0; j < 8; j++) s += int'(C[v][j]) * y[8 * b + j][u];
      z[b][v][u] = int'($signed(16'(s >>> 12)));
    end
    for (int u = 0; u < 8; u++) for (int j = 0; j < 16; j++) begin
      py = int'($signed(mem[WB + u * 16 + j]));
      checks++; if (py != y[j][u]) begin failures++; $display("row pass y[%0d][%0d] = %0d exp %0d", j, u, py, y[j][u]); end
    end
    for (int b = 0; b < 2; b++) for (int v = 0; v < 8; v++) for (int u = 0; u < 8; u++) begin
      pz = int'($signed(mem[ZB + v * 16 + 2 * u + b]));
      checks++; if (pz != z[b][v][u]) begin failures++; $display("z[%0d][%0d][%0d] = %0d exp %0d", b, v, u, pz, z[b][v][u]); end
      zf = 0.0;
      for (int j = 0; j < 8; j++) for (int x = 0; x < 8; x++)
        zf += (v == 0 ? 0.353553390593 : 0.5) * (u == 0 ? 0.353553390593 : 0.5) * blk[8 * b + j][x]
              * $cos((2 * j + 1) * v * pi / 16.0) * $cos((2 * x + 1) * u * pi / 16.0);
      checks++; if (pz - zf > 4.0 || zf - pz > 4.0) begin failures++; $display("z[%0d][%0d][%0d] = %0d, real DCT %f", b, v, u, pz, zf); end
    end
    $display("two 8x8 DCTs in %0d cycles", run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
