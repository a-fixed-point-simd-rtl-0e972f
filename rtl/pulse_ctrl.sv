// pulse_ctrl -- the single-instruction controller of a PULSE chip.
//
// Fetches one 64-bit instruction per cycle at pc (from the internal program
// memory or the external program bus, selected outside) and issues it in the
// same cycle. Control instructions are executed here: branches, call/ret,
// hardware loops (PUSH n ... DBR label runs the body n times; POP drops a
// loop left early by a branch), HALT, LDCR
// (activity mask acm, saturation mode), the modulo-counter loads and the
// interrupt. All other instructions are broadcast to the PEs as a pe_op_t
// together with the parallel flags (nsr, ssr, io read/write).
//
// Conditional execution: acm bit i = 1 switches PE i off (as "ldcr 1110b,
// acm" keeps only PE0). IF evaluates a condition in every PE and narrows the
// set of enabled PEs to those where it holds; ELSE switches to the PEs
// where it failed; RESTORE returns to the set before the IF. BPA branches
// if any PE is still enabled. A PE is enabled when its acm bit is 0 and its
// if-mask bit is 1.
//
// Timing: start (one cycle) loads pc with start_pc and runs until HALT.
// Every instruction takes one cycle in the controller; branches take effect
// on the next cycle with no delay slot. cycles counts the cycles spent
// running, for rate measurement.
//
// Most fields of op (operand codes, immediate, forward and step fields)
// are the instruction's own bits passed straight to the PEs: decoding of
// those fields happens in each PE, so they are wires, not logic, here.
//
// From the document: one controller with program memory, the push/dbr/pop,
// call/ret, ldcr acm, if/else/restore, bpa, ldiamc, ldeamc instructions of
// the listings and the interrupt to the host. Stack depths, the encoding and
// the exact if/else semantics are this design's own.
module pulse_ctrl
  import pulse_pkg::*;
#(
  parameter int unsigned NPE   = 4,
  parameter int unsigned DEPTH = 4     // loop, call and if stack depth
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [PCW-1:0]   start_pc,
  output logic [PCW-1:0]   pc,
  input  logic [IW-1:0]    instr,
  input  logic [15:0]      cval,       // constant memory word at instr imm
  input  logic [NPE-1:0]   cond,
  output pe_op_t           op,
  output logic             nsr,
  output logic             ssr,
  output logic             io_rd,
  output logic             io_wr,
  output logic [NPE-1:0]   pe_en,
  output sat_e             sat_mode,
  output logic [3:0]       ea_ld,      // external counter load strobes
  output logic [XAW-1:0]   ea_rd_val,
  output logic [XAW-1:0]   ea_wr_val,
  output logic             irq,
  output logic             running,
  output logic             halted,
  output logic [31:0]      cycles
);
  localparam int unsigned SW = $clog2(DEPTH);

  opc_e opc;
  assign opc = opc_e'(instr[63:58]);

  logic [15:0]    imm;
  logic [2:0]     aux;
  assign imm = instr[15:0];
  assign aux = instr[18:16];

  logic [NPE-1:0] acm, ifmask;
  logic [15:0]    lcnt   [DEPTH];
  logic [PCW-1:0] cstk   [DEPTH];
  logic [NPE-1:0] ifsave [DEPTH];
  logic [NPE-1:0] ifcond [DEPTH];
  logic [SW:0]    lsp, csp, isp;    // number of entries

  logic is_pe;
  assign is_pe = running && (opc < OP_BR);
  assign pe_en = ~acm & ifmask;

  // broadcast operation
  always_comb begin
    op           = '0;
    op.valid     = running && (is_pe || opc == OP_LDIAMC);
    op.opc       = is_pe ? opc : OP_NOP;
    op.dst       = instr[57:51];
    op.s1        = instr[50:44];
    op.s2        = instr[43:37];
    op.s3        = instr[36:30];
    op.fwd       = is_pe ? instr[29:27] : 3'd0;
    op.mstep     = instr[22:19];
    op.aux       = aux;
    op.imm       = imm;
    op.cval      = cval;
    op.mc_ld     = '0;
    if (running && opc == OP_LDIAMC) op.mc_ld[instr[57:56]] = 1'b1;
    op.mc_start  = instr[55:48];
    op.mc_min    = instr[47:40];
    op.mc_max    = instr[39:32];
    op.mc_stride = instr[31:24];
    nsr          = is_pe && instr[26];
    ssr          = is_pe && instr[25];
    io_rd        = is_pe && instr[24];
    io_wr        = is_pe && instr[23];
    ea_ld        = '0;
    if (running && opc == OP_LDEAMC) ea_ld[instr[17:16]] = 1'b1;
    ea_rd_val    = instr[57:34];
    ea_wr_val    = {instr[33:26], instr[15:0]};
    irq          = running && opc == OP_INT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; running <= 1'b0; halted <= 1'b0; cycles <= '0;
      acm <= '0; ifmask <= '1; sat_mode <= SAT_NONE;
      lsp <= '0; csp <= '0; isp <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        lcnt[i] <= '0; cstk[i] <= '0; ifsave[i] <= '0; ifcond[i] <= '0;
      end
    end else if (start) begin
      pc <= start_pc; running <= 1'b1; halted <= 1'b0; cycles <= '0;
      acm <= '0; ifmask <= '1;
      lsp <= '0; csp <= '0; isp <= '0;
    end else if (running) begin
      cycles <= cycles + 32'd1;
      pc <= pc + PCW'(1);
      unique case (opc)
        OP_BR:   pc <= imm;
        OP_CALL: begin
          cstk[csp[SW-1:0]] <= pc + PCW'(1);
          csp <= csp + 1'b1;
          pc  <= imm;
        end
        OP_RET: begin
          pc  <= cstk[SW'(csp - 1'b1)];
          csp <= csp - 1'b1;
        end
        OP_PUSH: begin
          lcnt[lsp[SW-1:0]] <= imm;
          lsp <= lsp + 1'b1;
        end
        OP_DBR: begin
          if (lcnt[SW'(lsp - 1'b1)] > 16'd1) begin
            lcnt[SW'(lsp - 1'b1)] <= lcnt[SW'(lsp - 1'b1)] - 16'd1;
            pc <= imm;
          end else begin
            lsp <= lsp - 1'b1;
          end
        end
        OP_POP:  lsp <= lsp - 1'b1;
        OP_HALT: begin
          running <= 1'b0; halted <= 1'b1; pc <= pc;
        end
        OP_LDCR: begin
          if (aux == 3'd0) acm <= imm[NPE-1:0];
          else             sat_mode <= sat_e'(imm[1:0]);
        end
        OP_IF: begin
          ifsave[isp[SW-1:0]] <= ifmask;
          ifcond[isp[SW-1:0]] <= cond;
          isp    <= isp + 1'b1;
          ifmask <= ifmask & cond;
        end
        OP_ELSE:    ifmask <= ifsave[SW'(isp - 1'b1)] & ~ifcond[SW'(isp - 1'b1)];
        OP_RESTORE: begin
          ifmask <= ifsave[SW'(isp - 1'b1)];
          isp    <= isp - 1'b1;
        end
        OP_BPA:  if (|pe_en) pc <= imm;
        default: ;
      endcase
    end
  end

  // stack discipline of a well-formed program
  a_loop_stack: assert property (@(posedge clk) disable iff (!rst_n)
    running && opc == OP_PUSH |-> lsp < (SW+1)'(DEPTH));
  a_dbr_stack: assert property (@(posedge clk) disable iff (!rst_n)
    running && (opc == OP_DBR || opc == OP_POP) |-> lsp != '0);
  a_ret_stack: assert property (@(posedge clk) disable iff (!rst_n)
    running && opc == OP_RET |-> csp != '0);
endmodule
