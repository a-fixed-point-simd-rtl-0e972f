// pulse_chip -- one PULSE V1 chip: a 16-bit fixed-point SIMD array processor.
//
// A controller issues one 64-bit instruction per cycle to NPE processing
// elements that execute it in lock step on their own data (SIMD). Data
// enters and leaves through four 16-bit ports at the ends of two
// shift-register chains (north: port 1 in, port 3 out; south: port 2 in,
// port 4 out), which also carry data between neighbouring PEs and between
// cascaded chips. A 32-bit accumulate chain links the accumulators of
// neighbouring PEs and chips. Two 24-bit address ports, driven by modulo
// counters, address external memory for the io operation; the external
// memory's read data comes back on port 1 and write data is taken from
// port 4. The program comes from the 256-word internal program memory or,
// in external mode, from the 64-bit external program bus (ext_pc /
// ext_instr, read combinationally), which lets several chips run one
// common instruction stream. A host loads programs and constants and starts
// the chip through the CPU interface; the chip interrupts the host with irq.
//
// chip_id numbers the chip in a cascade; PE i of chip c reports the index
// c*NPE+i as operand PEID, so one program can give each PE its own part of
// a table (as the DCT does with its cosine table).
//
// From the document: the chip organisation of Figures 2-17 and 2-18 and the
// feature list (4 PEs, 4 data ports, 2 address ports, program and constant
// memories, CPU interface, cascading). Port directions and the way io
// uses ports 1 and 4 are this design's own choices.
module pulse_chip
  import pulse_pkg::*;
#(
  parameter int unsigned NPE = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [3:0]         chip_id,
  // host interface
  input  logic [3:0]         cpu_addr,
  input  logic               cpu_we,
  input  logic [31:0]        cpu_wdata,
  output logic [31:0]        cpu_rdata,
  output logic               irq,
  // external program bus
  output logic [PCW-1:0]     ext_pc,
  input  logic [IW-1:0]      ext_instr,
  // data ports
  input  logic [15:0]        port1_in,
  input  logic [15:0]        port2_in,
  output logic [15:0]        port3_out,
  output logic [15:0]        port4_out,
  // accumulate chain
  input  logic signed [31:0] acc_chain_in,
  output logic signed [31:0] acc_chain_out,
  // address ports
  output logic [XAW-1:0]     xrd_addr,
  output logic               xrd,
  output logic [XAW-1:0]     xwr_addr,
  output logic               xwr,
  output logic               halted
);
  logic           start, ext_prog, running, irq_set;
  logic [15:0]    start_pc, cval;
  logic           pm_we, cm_we;
  logic [7:0]     pm_waddr, cm_waddr;
  logic [63:0]    pm_wdata, pm_rdata, instr;
  logic [15:0]    cm_wdata;
  logic [PCW-1:0] pc;
  logic [31:0]    cycles;
  logic [NPE-1:0] cond, pe_en, ovf;
  pe_op_t         op;
  logic           nsr, ssr, io_rd, io_wr;
  sat_e           sat_mode;
  logic [3:0]     ea_ld;
  logic [XAW-1:0] ea_rd_val, ea_wr_val;

  cpu_if #(.NPE(NPE)) u_cpu (
    .clk, .rst_n, .addr(cpu_addr), .we(cpu_we), .wdata(cpu_wdata), .rdata(cpu_rdata),
    .start, .ext_prog, .start_pc, .pm_we, .pm_waddr, .pm_wdata,
    .cm_we, .cm_waddr, .cm_wdata, .running, .halted, .pc, .cycles, .ovf,
    .irq_set, .irq);

  prog_mem #(.DEPTH(256), .WIDTH(IW)) u_pm (
    .clk, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata), .raddr(pc[7:0]), .rdata(pm_rdata));

  assign ext_pc = pc;
  assign instr  = ext_prog ? ext_instr : pm_rdata;

  const_mem #(.DEPTH(256)) u_cm (
    .clk, .we(cm_we), .waddr(cm_waddr), .wdata(cm_wdata), .raddr(instr[7:0]), .rdata(cval));

  pulse_ctrl #(.NPE(NPE)) u_ctrl (
    .clk, .rst_n, .start, .start_pc, .pc, .instr, .cval, .cond, .op,
    .nsr, .ssr, .io_rd, .io_wr, .pe_en, .sat_mode, .ea_ld, .ea_rd_val, .ea_wr_val,
    .irq(irq_set), .running, .halted, .cycles);

  addr_ports #(.AW(XAW)) u_ap (
    .clk, .rst_n, .ld_field(ea_ld), .ld_rd_val(ea_rd_val), .ld_wr_val(ea_wr_val),
    .io_rd, .io_wr, .rd_addr(xrd_addr), .rd(xrd), .wr_addr(xwr_addr), .wr(xwr));

  pe_array #(.NPE(NPE), .MDEPTH(256)) u_arr (
    .clk, .rst_n, .op, .nsr, .ssr, .pe_en, .sat_mode,
    .peid_base(8'(chip_id) * 8'(NPE)),
    .port1_in, .port2_in, .port3_out, .port4_out,
    .acc_chain_in, .acc_chain_out, .cond, .ovf);
endmodule
