// pe_array -- the PE array of one chip: NPE processing elements, the north
// and south 16-bit shift-register chains and the 32-bit accumulate chain.
//
// All PEs receive the same broadcast operation; pe_en masks individual PEs.
// PE i owns stage i of each communication chain: it reads it as NPORT /
// SPORT and may overwrite it at write-back; nsr / ssr in the instruction
// shift the whole chain by one stage (north: port 1 -> PE0 ... PE3 ->
// port 3; south: port 2 -> ... -> port 4). The accumulate chain carries each
// PE's saturated accumulator to the addend input of the next PE; PE0 takes
// it from acc_chain_in and the last PE drives acc_chain_out, so chips can be
// cascaded. cond collects the per-PE IF conditions for the controller.
//
// From the document: Figure 2-17 (4 PEs, north/south channels with a
// register per PE, ports 1..4 of 16 bits, 32-bit accumulate chain). Where
// the chains shift (only when an instruction says nsr/ssr) follows the
// listings; the rest of the timing is this design's own.
module pe_array
  import pulse_pkg::*;
#(
  parameter int unsigned NPE    = 4,
  parameter int unsigned MDEPTH = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  pe_op_t             op,
  input  logic               nsr,
  input  logic               ssr,
  input  logic [NPE-1:0]     pe_en,
  input  sat_e               sat_mode,
  input  logic [7:0]         peid_base,
  input  logic [15:0]        port1_in,    // north chain in
  input  logic [15:0]        port2_in,    // south chain in
  output logic [15:0]        port3_out,   // north chain out
  output logic [15:0]        port4_out,   // south chain out
  input  logic signed [31:0] acc_chain_in,
  output logic signed [31:0] acc_chain_out,
  output logic [NPE-1:0]     cond,
  output logic [NPE-1:0]     ovf
);
  logic [NPE-1:0][15:0] nstage, sstage, nld_data, sld_data;
  logic [NPE-1:0]       nld_en, sld_en;
  logic signed [31:0]   acc [NPE];

  comm_chain #(.NPE(NPE), .W(16)) u_north (
    .clk, .rst_n, .shift(nsr), .port_in(port1_in), .port_out(port3_out),
    .ld_en(nld_en), .ld_data(nld_data), .stage(nstage));
  comm_chain #(.NPE(NPE), .W(16)) u_south (
    .clk, .rst_n, .shift(ssr), .port_in(port2_in), .port_out(port4_out),
    .ld_en(sld_en), .ld_data(sld_data), .stage(sstage));

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    logic signed [31:0] cin;
    if (i == 0) begin : g_first
      assign cin = acc_chain_in;
    end else begin : g_next
      assign cin = acc[i-1];
    end
    pe #(.MDEPTH(MDEPTH)) u_pe (
      .clk, .rst_n, .op, .en(pe_en[i]), .peid(peid_base + 8'(i)), .sat_mode,
      .nstage(nstage[i]), .sstage(sstage[i]), .chain_in(cin),
      .acc_out(acc[i]), .acc_ovf(ovf[i]),
      .nld_en(nld_en[i]), .nld_data(nld_data[i]),
      .sld_en(sld_en[i]), .sld_data(sld_data[i]), .cond(cond[i]));
  end

  assign acc_chain_out = acc[NPE-1];
endmodule
