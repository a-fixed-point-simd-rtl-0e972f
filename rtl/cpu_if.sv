// cpu_if -- host (CPU) interface of a PULSE chip for configuration and status.
//
// A simple synchronous register bus: addr/we/wdata are sampled on the clock
// edge, rdata is combinational. Registers (32 bits):
//   0 CTRL     w: bit0 = start the controller (one-cycle pulse), bit1 = use
//              the external program bus; r: bit1
//   1 STATUS   r: bit0 running, bit1 halted, bit2 interrupt pending,
//              [31:16] pc; w: bit2 = 1 clears the pending interrupt
//   2 PM_ADDR  program memory write address (rw)
//   3 PM_LO    low 32 bits of the next program word (w)
//   4 PM_HI    high 32 bits; writing it stores {PM_HI, PM_LO} at PM_ADDR and
//              increments PM_ADDR
//   5 CM_ADDR  constant memory write address (rw)
//   6 CM_DATA  writing stores wdata[15:0] at CM_ADDR and increments CM_ADDR
//   7 START_PC first instruction address for start (rw)
//   8 CYCLES   cycles spent running (r)
//   9 OVF      per-PE accumulator overflow flags (r)
// irq is the pending interrupt, set by the controller's INT instruction.
//
// The memory write data outputs are the bus data passed straight through
// (the high program half and the constant word), which is intended.
//
// From the document: a standard CPU interface for configuration and status,
// an interrupt from the chip to the host. The register map is this design's
// own.
module cpu_if #(
  parameter int unsigned NPE = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [3:0]     addr,
  input  logic           we,
  input  logic [31:0]    wdata,
  output logic [31:0]    rdata,
  // to the chip
  output logic           start,
  output logic           ext_prog,
  output logic [15:0]    start_pc,
  output logic           pm_we,
  output logic [7:0]     pm_waddr,
  output logic [63:0]    pm_wdata,
  output logic           cm_we,
  output logic [7:0]     cm_waddr,
  output logic [15:0]    cm_wdata,
  // from the chip
  input  logic           running,
  input  logic           halted,
  input  logic [15:0]    pc,
  input  logic [31:0]    cycles,
  input  logic [NPE-1:0] ovf,
  input  logic           irq_set,
  output logic           irq
);
  logic [31:0] pm_lo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start <= 1'b0; ext_prog <= 1'b0; start_pc <= '0;
      pm_waddr <= '0; pm_lo <= '0; cm_waddr <= '0; irq <= 1'b0;
    end else begin
      start <= we && addr == 4'd0 && wdata[0];
      if (we && addr == 4'd0) ext_prog <= wdata[1];
      if (we && addr == 4'd2) pm_waddr <= wdata[7:0];
      if (we && addr == 4'd3) pm_lo <= wdata;
      if (we && addr == 4'd4) pm_waddr <= pm_waddr + 8'd1;
      if (we && addr == 4'd5) cm_waddr <= wdata[7:0];
      if (we && addr == 4'd6) cm_waddr <= cm_waddr + 8'd1;
      if (we && addr == 4'd7) start_pc <= wdata[15:0];
      if (irq_set) irq <= 1'b1;
      else if (we && addr == 4'd1 && wdata[2]) irq <= 1'b0;
    end
  end

  assign pm_we    = we && addr == 4'd4;
  assign pm_wdata = {wdata, pm_lo};
  assign cm_we    = we && addr == 4'd6;
  assign cm_wdata = wdata[15:0];

  always_comb begin
    unique case (addr)
      4'd0:    rdata = {30'd0, ext_prog, 1'b0};
      4'd1:    rdata = {pc, 13'd0, irq, halted, running};
      4'd2:    rdata = {24'd0, pm_waddr};
      4'd5:    rdata = {24'd0, cm_waddr};
      4'd7:    rdata = {16'd0, start_pc};
      4'd8:    rdata = cycles;
      4'd9:    rdata = 32'(ovf);
      default: rdata = '0;
    endcase
  end
endmodule
