// pulse_system -- the compute part of the C40/4PULSE image processing
// system: NCHIPS PULSE chips cascaded into one linear array of NCHIPS*4 PEs.
//
// The chips are chained port to port without glue logic: the north chain
// of chip k (port 3) feeds chip k+1 (port 1), the south chain likewise
// (port 4 -> port 2), and the accumulate chain runs through all of them.
// All chips execute one common instruction stream from the external program
// memory: chip 0 drives the program address, every chip takes the same
// instruction word, so the whole array works as one wide SIMD machine. The
// host (a C40 DSP behind glue logic in the original system) reaches each
// chip's CPU interface through a chip-select vector: a write with several
// bits set goes to all selected chips, a read returns the lowest selected
// chip. Local memory sits on chip 0's data and address ports (read data in
// on port 1, chip 0's address ports) and takes results from the last
// chip's port 4. The host processor, glue logic, memories and oscillator
// are outside this module; their connections are its ports. The address
// ports of chips 1.. run in lock step with chip 0's and are left unused.
//
// From the document: four chips in a chain under one common instruction
// (Section 6.2, Figure 6-4), the host, local memory and a shared external
// program memory. The chip-select host bus and which chip's ports face the
// local memory are this design's own choices.
module pulse_system
  import pulse_pkg::*;
#(
  parameter int unsigned NCHIPS = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NCHIPS-1:0]  cpu_cs,
  input  logic [3:0]         cpu_addr,
  input  logic               cpu_we,
  input  logic [31:0]        cpu_wdata,
  output logic [31:0]        cpu_rdata,
  output logic [NCHIPS-1:0]  irq,
  output logic [NCHIPS-1:0]  halted,
  output logic [PCW-1:0]     prog_addr,
  input  logic [IW-1:0]      prog_data,
  input  logic [15:0]        north_in,
  input  logic [15:0]        south_in,
  output logic [15:0]        north_out,
  output logic [15:0]        south_out,
  input  logic signed [31:0] acc_chain_in,
  output logic signed [31:0] acc_chain_out,
  output logic [XAW-1:0]     xrd_addr,
  output logic               xrd,
  output logic [XAW-1:0]     xwr_addr,
  output logic               xwr
);
  logic [15:0]        n_link [NCHIPS+1];
  logic [15:0]        s_link [NCHIPS+1];
  logic signed [31:0] a_link [NCHIPS+1];
  logic [31:0]        rd     [NCHIPS];
  logic [PCW-1:0]     pcs    [NCHIPS];
  logic [XAW-1:0]     ra     [NCHIPS];
  logic [XAW-1:0]     wa     [NCHIPS];
  logic [NCHIPS-1:0]  rds, wrs;

  assign n_link[0] = north_in;
  assign s_link[0] = south_in;
  assign a_link[0] = acc_chain_in;

  for (genvar k = 0; k < NCHIPS; k++) begin : g_chip
    pulse_chip #(.NPE(4)) u_chip (
      .clk, .rst_n, .chip_id(4'(k)),
      .cpu_addr, .cpu_we(cpu_we && cpu_cs[k]), .cpu_wdata, .cpu_rdata(rd[k]), .irq(irq[k]),
      .ext_pc(pcs[k]), .ext_instr(prog_data),
      .port1_in(n_link[k]), .port2_in(s_link[k]),
      .port3_out(n_link[k+1]), .port4_out(s_link[k+1]),
      .acc_chain_in(a_link[k]), .acc_chain_out(a_link[k+1]),
      .xrd_addr(ra[k]), .xrd(rds[k]), .xwr_addr(wa[k]), .xwr(wrs[k]),
      .halted(halted[k]));
  end

  always_comb begin
    cpu_rdata = '0;
    for (int k = NCHIPS - 1; k >= 0; k--)
      if (cpu_cs[k]) cpu_rdata = rd[k];
  end

  assign prog_addr     = pcs[0];
  assign north_out     = n_link[NCHIPS];
  assign south_out     = s_link[NCHIPS];
  assign acc_chain_out = a_link[NCHIPS];
  assign xrd_addr      = ra[0];
  assign xrd           = rds[0];
  assign xwr_addr      = wa[0];
  assign xwr           = wrs[0];
endmodule
