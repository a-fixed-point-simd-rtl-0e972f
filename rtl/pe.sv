// pe -- one PULSE processing element.
//
// Each PE holds two register files (regA, regB, 32x16), two data memories
// (memA, memB, 256x16) with a read and a write modulo counter each, an
// address register per memory for register-indirect access, a 16x16+32
// multiplier-adder, a 33-bit accumulator with saturation, a 32-bit barrel
// shifter and a 3-operand ALU. A source selection stage picks up to three
// operands from any storage; a destination stage writes the result back.
//
// Pipeline (4 stages, one instruction per cycle): the instruction is
// issued and its operands read in cycle t (read stage), it moves through
// two execute stages (t+1, t+2) and writes back at the end of cycle t+3.
// An instruction issued at t+4 is the first to see the result, so a
// dependent instruction needs three instructions (or "nop"s) in between.
// Accumulating operations (MACC, MADDACC) and shifts of the accumulator
// use the accumulator as it is at write-back, so they can issue back to
// back. The parallel forward (chain stage -> memory through mcaw/mcbw) and
// the counter post-steps act in the issue cycle, as one-cycle operations.
//
// A disabled PE (en = 0: masked by the controller's activity mask or by
// an if/else) issues nothing: no write, no counter step, no forward.
// cond reports the condition of an IF instruction on (s1 ? s2) for the
// controller in the issue cycle.
//
// From the document: the PE resources and sizes, the 4-stage read /
// execute / execute / write pipeline, memory addressing (direct, register
// indirect, modulo counters), the accumulate chain into the addend input,
// the chain links to the memories. The operand codes, the per-PE enable
// behaviour and the way RANK writes three registers are this design's own.
module pe
  import pulse_pkg::*;
#(
  parameter int unsigned MDEPTH = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  pe_op_t             op,
  input  logic               en,
  input  logic [7:0]         peid,
  input  sat_e               sat_mode,
  input  logic [15:0]        nstage,     // own north chain stage
  input  logic [15:0]        sstage,     // own south chain stage
  input  logic signed [31:0] chain_in,   // neighbour accumulator
  output logic signed [31:0] acc_out,    // saturated accumulator, to the next PE
  output logic               acc_ovf,
  output logic               nld_en,
  output logic [15:0]        nld_data,
  output logic               sld_en,
  output logic [15:0]        sld_data,
  output logic               cond
);
  localparam int unsigned MA = $clog2(MDEPTH);

  typedef enum logic [3:0] {
    D_NONE, D_RA, D_RB, D_MEMA, D_MEMB, D_NPORT, D_SPORT, D_ADDRA, D_ADDRB
  } dkind_e;

  typedef enum logic [2:0] {
    A_HOLD, A_LOAD, A_ADD, A_CLEAR, A_SHIFT, A_CLROVF
  } aop_e;

  typedef struct packed {
    logic               valid;
    dkind_e             dk;
    logic [7:0]         daddr;
    logic [1:0]         dcount;
    logic [2:0][15:0]   res;
    aop_e               aop;
    logic signed [32:0] ad;
    logic [1:0]         shop;
    logic [4:0]         shamt;
  } wb_t;

  wb_t p1, p2, p3, nw;

  // ---------------- storage
  logic [4:0]  rfa_ra [3];
  logic [4:0]  rfb_ra [3];
  logic [15:0] rfa_rd [3];
  logic [15:0] rfb_rd [3];
  logic [MA-1:0] ma_ra [3];
  logic [MA-1:0] mb_ra [3];
  logic [15:0] ma_rd [3];
  logic [15:0] mb_rd [3];
  logic [7:0]  addra, addrb;
  logic [7:0]  mcar, mcaw, mcbr, mcbw;

  logic [1:0]       rfa_wc, rfb_wc;
  logic [2:0][15:0] rf_wd;

  pe_regfile #(.DEPTH(32), .W(16)) u_rfa (
    .clk, .rst_n,
    .raddr1(rfa_ra[0]), .raddr2(rfa_ra[1]), .raddr3(rfa_ra[2]),
    .rdata1(rfa_rd[0]), .rdata2(rfa_rd[1]), .rdata3(rfa_rd[2]),
    .wcount(rfa_wc), .waddr(p3.daddr[4:0]), .wdata(rf_wd));
  pe_regfile #(.DEPTH(32), .W(16)) u_rfb (
    .clk, .rst_n,
    .raddr1(rfb_ra[0]), .raddr2(rfb_ra[1]), .raddr3(rfb_ra[2]),
    .rdata1(rfb_rd[0]), .rdata2(rfb_rd[1]), .rdata3(rfb_rd[2]),
    .wcount(rfb_wc), .waddr(p3.daddr[4:0]), .wdata(rf_wd));

  logic issue;
  logic fwd_a, fwd_b;
  logic [15:0] fwd_data;

  pe_mem #(.DEPTH(MDEPTH), .W(16)) u_mema (
    .clk,
    .raddr1(ma_ra[0]), .raddr2(ma_ra[1]), .raddr3(ma_ra[2]),
    .rdata1(ma_rd[0]), .rdata2(ma_rd[1]), .rdata3(ma_rd[2]),
    .wb_we(p3.valid && p3.dk == D_MEMA), .wb_addr(MA'(p3.daddr)), .wb_data(p3.res[0]),
    .fw_we(fwd_a), .fw_addr(MA'(mcaw)), .fw_data(fwd_data));
  pe_mem #(.DEPTH(MDEPTH), .W(16)) u_memb (
    .clk,
    .raddr1(mb_ra[0]), .raddr2(mb_ra[1]), .raddr3(mb_ra[2]),
    .rdata1(mb_rd[0]), .rdata2(mb_rd[1]), .rdata3(mb_rd[2]),
    .wb_we(p3.valid && p3.dk == D_MEMB), .wb_addr(MA'(p3.daddr)), .wb_data(p3.res[0]),
    .fw_we(fwd_b), .fw_addr(MA'(mcbw)), .fw_data(fwd_data));

  // ---------------- modulo counters
  logic [6:0] src [3];
  assign src[0] = op.s1;
  assign src[1] = op.s2;
  assign src[2] = op.s3;

  logic is_pe_op;
  assign is_pe_op = (op.opc < OP_BR);
  assign issue    = op.valid && en && is_pe_op;

  logic step_ar, step_aw, step_br, step_bw;
  always_comb begin
    step_ar = 1'b0;
    step_br = 1'b0;
    for (int k = 0; k < 3; k++) begin
      if (src[k] == OPD_MEMA_C) step_ar = 1'b1;
      if (src[k] == OPD_MEMB_C) step_br = 1'b1;
    end
    fwd_a   = op.valid && en && op.fwd[2] && !op.fwd[0];
    fwd_b   = op.valid && en && op.fwd[2] &&  op.fwd[0];
    step_ar = issue && step_ar;
    step_br = issue && step_br;
    step_aw = (issue && op.dst == OPD_MEMA_C) || fwd_a;
    step_bw = (issue && op.dst == OPD_MEMB_C) || fwd_b;
    fwd_data = op.fwd[1] ? sstage : nstage;
  end

  logic signed [7:0] mamt;
  assign mamt = 8'(op.mstep);

  mod_counter #(.W(8)) u_mcar (.clk, .rst_n, .ld_field({4{op.mc_ld[0]}}),
    .min_v(op.mc_min), .max_v(op.mc_max), .stride_v(op.mc_stride), .start_v(op.mc_start),
    .step(step_ar), .use_amt(op.mstep != 0), .amt(mamt), .value(mcar));
  mod_counter #(.W(8)) u_mcaw (.clk, .rst_n, .ld_field({4{op.mc_ld[1]}}),
    .min_v(op.mc_min), .max_v(op.mc_max), .stride_v(op.mc_stride), .start_v(op.mc_start),
    .step(step_aw), .use_amt(op.mstep != 0), .amt(mamt), .value(mcaw));
  mod_counter #(.W(8)) u_mcbr (.clk, .rst_n, .ld_field({4{op.mc_ld[2]}}),
    .min_v(op.mc_min), .max_v(op.mc_max), .stride_v(op.mc_stride), .start_v(op.mc_start),
    .step(step_br), .use_amt(op.mstep != 0), .amt(mamt), .value(mcbr));
  mod_counter #(.W(8)) u_mcbw (.clk, .rst_n, .ld_field({4{op.mc_ld[3]}}),
    .min_v(op.mc_min), .max_v(op.mc_max), .stride_v(op.mc_stride), .start_v(op.mc_start),
    .step(step_bw), .use_amt(op.mstep != 0), .amt(mamt), .value(mcbw));

  // ---------------- accumulator
  logic signed [32:0] acc33;   // internal 33-bit value; the PE uses the saturated view
  logic signed [31:0] accq;
  logic [1:0]         acc_op;
  logic signed [32:0] acc_d;
  logic [31:0]        sh_y;

  pe_shifter u_sh (.a(accq), .amt(p3.shamt), .op(p3.shop), .y(sh_y));

  always_comb begin
    acc_op = 2'd0;
    acc_d  = p3.ad;
    if (p3.valid) begin
      unique case (p3.aop)
        A_LOAD:  acc_op = 2'd1;
        A_ADD:   acc_op = 2'd2;
        A_CLEAR: acc_op = 2'd3;
        A_SHIFT: begin acc_op = 2'd1; acc_d = 33'($signed(sh_y)); end
        default: acc_op = 2'd0;
      endcase
    end
  end

  pe_accum u_acc (.clk, .rst_n, .op(acc_op), .clr_ovf(p3.valid && p3.aop == A_CLROVF),
                  .d(acc_d), .mode(sat_mode),
                  .acc(acc33), .q(accq), .ovf(acc_ovf));
  assign acc_out = accq;

  // ---------------- operand read (read stage)
  logic [15:0]        opv [3];
  logic signed [31:0] s3_32;

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      rfa_ra[k] = src[k][4:0];
      rfb_ra[k] = src[k][4:0];
      unique case (src[k])
        OPD_MEMA_I: ma_ra[k] = MA'(addra);
        OPD_MEMA_C: ma_ra[k] = MA'(mcar);
        default:    ma_ra[k] = MA'(op.imm);
      endcase
      unique case (src[k])
        OPD_MEMB_I: mb_ra[k] = MA'(addrb);
        OPD_MEMB_C: mb_ra[k] = MA'(mcbr);
        default:    mb_ra[k] = MA'(op.imm);
      endcase
      if (src[k] < OPD_RB)        opv[k] = rfa_rd[k];
      else if (src[k] < OPD_MEMA) opv[k] = rfb_rd[k];
      else begin
        unique case (src[k])
          OPD_MEMA, OPD_MEMA_I, OPD_MEMA_C: opv[k] = ma_rd[k];
          OPD_MEMB, OPD_MEMB_I, OPD_MEMB_C: opv[k] = mb_rd[k];
          OPD_IMM:   opv[k] = op.imm;
          OPD_NPORT: opv[k] = nstage;
          OPD_SPORT: opv[k] = sstage;
          OPD_ACCL:  opv[k] = accq[15:0];
          OPD_ACCH:  opv[k] = accq[31:16];
          OPD_ADDRA: opv[k] = {8'd0, addra};
          OPD_ADDRB: opv[k] = {8'd0, addrb};
          OPD_CONST: opv[k] = op.cval;
          OPD_PEID:  opv[k] = {8'd0, peid};
          default:   opv[k] = '0;
        endcase
      end
    end
    unique case (op.s3)
      OPD_CHAIN: s3_32 = chain_in;
      OPD_ACC:   s3_32 = accq;
      default:   s3_32 = 32'($signed(opv[2]));
    endcase
  end

  // ---------------- condition for IF
  always_comb begin
    logic signed [15:0] ca, cb;
    ca = opv[0];
    cb = opv[1];
    unique case (cond_e'(op.aux))
      CC_EQ: cond = (ca == cb);
      CC_NE: cond = (ca != cb);
      CC_LT: cond = (ca <  cb);
      CC_LE: cond = (ca <= cb);
      CC_GT: cond = (ca >  cb);
      CC_GE: cond = (ca >= cb);
      CC_T:  cond = 1'b1;
      default: cond = 1'b0;
    endcase
  end

  // ---------------- execute (computed at issue, delayed through p1..p3)
  logic signed [2:0][15:0] alu_r;
  logic signed [32:0]      madd_y;
  logic signed [31:0]      madd_c;

  pe_alu3 u_alu (.op(op.opc), .a(opv[0]), .b(opv[1]), .c(opv[2]), .r(alu_r));

  assign madd_c = (op.opc == OP_MADD || op.opc == OP_MADDACC) ? s3_32 : 32'sd0;
  pe_madd u_madd (.a(opv[0]), .b(opv[1]), .c(madd_c), .y(madd_y));

  always_comb begin
    nw        = '0;
    nw.valid  = issue;
    nw.res    = alu_r;
    nw.ad     = madd_y;
    nw.shamt  = opv[1][4:0];
    nw.shop   = 2'(op.opc - OP_SHL);
    nw.dcount = (op.opc == OP_RANK) ? 2'd3 : 2'd1;
    nw.aop    = A_HOLD;
    nw.dk     = D_NONE;
    nw.daddr  = op.imm[7:0];
    unique case (op.opc)
      OP_MULT, OP_MADD:    nw.aop = A_LOAD;
      OP_MACC, OP_MADDACC: nw.aop = A_ADD;
      OP_CLRACC:           nw.aop = A_CLEAR;
      OP_CLROVF:           nw.aop = A_CLROVF;
      OP_SHL, OP_SHR, OP_SAR, OP_ROL: nw.aop = A_SHIFT;
      default:             nw.aop = A_HOLD;
    endcase
    if (op.opc >= OP_LD && op.opc <= OP_ADD3) begin
      if (op.dst < OPD_RB)        begin nw.dk = D_RA; nw.daddr = {3'd0, op.dst[4:0]}; end
      else if (op.dst < OPD_MEMA) begin nw.dk = D_RB; nw.daddr = {3'd0, op.dst[4:0]}; end
      else begin
        unique case (op.dst)
          OPD_MEMA:   nw.dk = D_MEMA;
          OPD_MEMB:   nw.dk = D_MEMB;
          OPD_MEMA_I: begin nw.dk = D_MEMA; nw.daddr = addra; end
          OPD_MEMB_I: begin nw.dk = D_MEMB; nw.daddr = addrb; end
          OPD_MEMA_C: begin nw.dk = D_MEMA; nw.daddr = mcaw; end
          OPD_MEMB_C: begin nw.dk = D_MEMB; nw.daddr = mcbw; end
          OPD_NPORT:  nw.dk = D_NPORT;
          OPD_SPORT:  nw.dk = D_SPORT;
          OPD_ADDRA:  nw.dk = D_ADDRA;
          OPD_ADDRB:  nw.dk = D_ADDRB;
          default:    nw.dk = D_NONE;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1 <= '0; p2 <= '0; p3 <= '0;
      addra <= '0; addrb <= '0;
    end else begin
      p1 <= nw;
      p2 <= p1;
      p3 <= p2;
      if (p3.valid && p3.dk == D_ADDRA) addra <= p3.res[0][7:0];
      if (p3.valid && p3.dk == D_ADDRB) addrb <= p3.res[0][7:0];
    end
  end

  // ---------------- write-back (end of cycle t+3)
  always_comb begin
    rf_wd    = p3.res;
    rfa_wc   = (p3.valid && p3.dk == D_RA) ? p3.dcount : 2'd0;
    rfb_wc   = (p3.valid && p3.dk == D_RB) ? p3.dcount : 2'd0;
    nld_en   = p3.valid && p3.dk == D_NPORT;
    sld_en   = p3.valid && p3.dk == D_SPORT;
    nld_data = p3.res[0];
    sld_data = p3.res[0];
  end
endmodule
