// addr_ports -- the two 24-bit external address ports of a chip.
//
// Port 0 (counter mccr) addresses external reads, port 1 (counter mccw)
// external writes. Both are programmable modulo counters loaded field by
// field by the LDEAMC instruction, which carries one value for each
// counter (as in "ldeamc 0, 1025, mc_start, mc_start"). An instruction with
// the io read flag presents mccr with rd = 1 and steps it by its stride;
// the io write flag does the same with mccw and wr = 1. Addresses are the
// counter values, valid in the cycle of the strobe; the external memory
// answers on the data ports.
//
// rd and wr are the io flags themselves: the strobe and its address leave
// in the same cycle.
//
// From the document: two 24-bit flexible address ports, programmable
// modulo counters for address generation, the ldeamc and "io *mccr%"
// forms. Which counter drives which port and the strobe timing are this
// design's own.
module addr_ports #(
  parameter int unsigned AW = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [3:0]    ld_field,   // min, max, stride, start (one-hot)
  input  logic [AW-1:0] ld_rd_val,
  input  logic [AW-1:0] ld_wr_val,
  input  logic          io_rd,
  input  logic          io_wr,
  output logic [AW-1:0] rd_addr,
  output logic          rd,
  output logic [AW-1:0] wr_addr,
  output logic          wr
);
  mod_counter #(.W(AW)) u_mccr (
    .clk, .rst_n, .ld_field,
    .min_v(ld_rd_val), .max_v(ld_rd_val), .stride_v(ld_rd_val), .start_v(ld_rd_val),
    .step(io_rd), .use_amt(1'b0), .amt('0), .value(rd_addr));
  mod_counter #(.W(AW)) u_mccw (
    .clk, .rst_n, .ld_field,
    .min_v(ld_wr_val), .max_v(ld_wr_val), .stride_v(ld_wr_val), .start_v(ld_wr_val),
    .step(io_wr), .use_amt(1'b0), .amt('0), .value(wr_addr));
  assign rd = io_rd;
  assign wr = io_wr;
endmodule
