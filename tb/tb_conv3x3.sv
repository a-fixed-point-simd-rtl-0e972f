// tb_conv3x3 -- 3x3 convolution (2-D FIR filter) of one full image band on
// the four-chip array.
//
// The band is 258 columns wide and ROWS rows high; a 3x3 kernel of signed
// coefficients, held in the constant memory, turns it into 256 output
// columns by ROWS-2 output rows (the two border columns and rows are not
// produced). The 16 PEs work on 16 adjacent output columns at a time, so
// the band is processed as 16 groups. Local memory holds the band group by
// group: for group g, row r, the 18 input columns 16g .. 16g+17 follow each
// other, so all reads are sequential.
//
// Per group: each input row streams through the north chain (18 shifts,
// one read per shift). After 16, 17 and 18 shifts PE k holds pixels 15-k,
// 16-k and 17-k of the group's row; a forward stores each into memA, so
// memA[3r + j] = pixel(r, 15-k+j). For output row r the nine window pixels
// are memA[3r .. 3r+8], read with the modulo counter mcar (the last access
// steps it back by 5 to 3r+3) and multiplied with the nine constants by
// MULT/MACC. The sixteen results go into the south chain and are shifted
// out, one local-memory write per shift.
// The results are compared with a convolution computed here; the cycle
// count per output pixel is printed.
module tb_conv3x3;
  import pulse_pkg::*;
  localparam int ROWS = 10, BAND = 258, G = (BAND - 2) / 16, GC = 18, NP = 16, OBASE = 4096;
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
  logic [15:0] mem [8192];
  int img [ROWS][BAND];
  logic signed [15:0] coef [9];
  int checks = 0, failures = 0, p = 0, run = 0;

  pulse_system dut (.clk, .rst_n, .cpu_cs, .cpu_addr, .cpu_we, .cpu_wdata, .cpu_rdata, .irq,
    .halted, .prog_addr, .prog_data, .north_in, .south_in(16'd0), .north_out, .south_out,
    .acc_chain_in(32'sd0), .acc_chain_out, .xrd_addr, .xrd, .xwr_addr, .xwr);

  assign prog_data = prog[prog_addr[7:0]];
  always #5 clk = ~clk;
  initial #1 rst_n = 0;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // local memory model: one-cycle read onto the north input, write from the south output
  always @(posedge clk) begin
    if (xrd) north_in <= mem[xrd_addr[12:0]];
    if (xwr) mem[xwr_addr[12:0]] <= south_out;
    if (dut.g_chip[0].u_chip.running) run++;
  end

  function automatic void put(logic [63:0] w); prog[p] = w; p++; endfunction
  function automatic void nops(int n); repeat (n) put(enc(OP_NOP)); endfunction
  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); cpu_addr = 4'(a); cpu_we = 1; cpu_wdata = d;
    @(negedge clk); cpu_we = 0;
  endtask

  initial begin
    int lg, lr, ls, lc, lw, v;
    foreach (img[r, c]) img[r][c] = int'($urandom % 256);
    foreach (coef[i]) coef[i] = 16'(int'($urandom % 21) - 10);
    for (int g = 0; g < G; g++) for (int r = 0; r < ROWS; r++) for (int c = 0; c < GC; c++)
      mem[(g * ROWS + r) * GC + c] = 16'(img[r][16 * g + c]);
    foreach (prog[i]) prog[i] = enc(OP_HALT);
    // address ports: read from 0 upwards, write from OBASE upwards
    put(enc_ldeamc(0, 0, 0));
    put(enc_ldeamc(1, 8191, 8191));
    put(enc_ldeamc(3, 0, OBASE));
    put(enc(OP_NOP, .io_rd(1)));
    put(enc(OP_PUSH, .imm(16'(G))));
    lg = p;
    for (int c = 0; c < 4; c++) put(enc_ldiamc(2'(c), 0, 0, 255, 1));
    // input: ROWS rows of GC pixels
    put(enc(OP_PUSH, .imm(16'(ROWS))));
    lr = p; put(enc(OP_PUSH, .imm(16)));
    ls = p; put(enc(OP_NOP, .nsr(1), .io_rd(1)));
    put(enc(OP_DBR, .imm(16'(ls))));
    put(enc(OP_NOP, .fwd(3'b100), .nsr(1), .io_rd(1)));
    put(enc(OP_NOP, .fwd(3'b100), .nsr(1), .io_rd(1)));
    put(enc(OP_NOP, .fwd(3'b100)));
    put(enc(OP_DBR, .imm(16'(lr))));
    // filter: one output row per pass
    put(enc(OP_PUSH, .imm(16'(ROWS - 2))));
    lc = p; put(enc(OP_MULT, .s1(OPD_MEMA_C), .s2(OPD_CONST), .imm(0)));
    for (int t = 1; t < 8; t++) put(enc(OP_MACC, .s1(OPD_MEMA_C), .s2(OPD_CONST), .imm(16'(t))));
    put(enc(OP_MACC, .s1(OPD_MEMA_C), .s2(OPD_CONST), .imm(8), .mstep(4'(-5))));
    nops(3);
    put(enc(OP_LD, OPD_SPORT, OPD_ACCL));
    nops(3);
    put(enc(OP_PUSH, .imm(16)));
    lw = p; put(enc(OP_NOP, .io_wr(1), .ssr(1)));
    put(enc(OP_DBR, .imm(16'(lw))));
    put(enc(OP_DBR, .imm(16'(lc))));
    put(enc(OP_DBR, .imm(16'(lg))));
    put(enc(OP_HALT));

    repeat (2) @(negedge clk); rst_n = 1;
    wr(5, 0);
    for (int t = 0; t < 9; t++) wr(6, {16'd0, coef[t]});
    wr(7, 0);
    wr(0, 3);
    wait (&halted); @(negedge clk);

    for (int g = 0; g < G; g++)
      for (int r = 0; r < ROWS - 2; r++)
        for (int t = 0; t < NP; t++) begin
          automatic int y = 0, oc = 16 * g + t;
          for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
            y += int'(coef[3 * i + j]) * img[r + i][oc + j];
          v = int'($signed(mem[OBASE + (g * (ROWS - 2) + r) * NP + t]));
          checks++;
          if (v != y) begin
            failures++;
            if (failures < 10) $display("y(%0d,%0d) = %0d exp %0d", r, oc, v, y);
          end
        end
    $display("%0d x %0d output pixels in %0d cycles, %0.2f cycles per pixel",
             ROWS - 2, BAND - 2, run, real'(run) / real'((ROWS - 2) * (BAND - 2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
