// eu_regfile: multi-ported register file of the execution unit.
//
// NREG registers of W bits with NRD combinational read ports and NWR write
// ports, so every slot of a long instruction word reads both its operands and
// writes its result in the same cycle. When several write ports name the same
// register in one cycle, the highest-numbered port wins. All registers reset
// to zero.
//
// Interface: raddr_i/rdata_o read ports (combinational), we_i/waddr_i/wdata_i
// write ports (written at the rising clock edge).
//
// A multi-ported register file between the functional units is the structure
// of the VLIW processor the source design builds on; port counts and sizes
// here are this design's choices.
module eu_regfile #(
  parameter int unsigned W    = 64,
  parameter int unsigned NREG = 16,
  parameter int unsigned NRD  = 4,
  parameter int unsigned NWR  = 2
) (
  input  logic                    clk_i,
  input  logic                    rst_ni,
  input  logic [$clog2(NREG)-1:0] raddr_i [NRD],
  output logic [W-1:0]            rdata_o [NRD],
  input  logic                    we_i    [NWR],
  input  logic [$clog2(NREG)-1:0] waddr_i [NWR],
  input  logic [W-1:0]            wdata_i [NWR]
);
  logic [W-1:0] regs_q [NREG];

  always_comb begin
    for (int unsigned r = 0; r < NRD; r++) rdata_o[r] = regs_q[raddr_i[r]];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int unsigned i = 0; i < NREG; i++) regs_q[i] <= '0;
    end else begin
      for (int unsigned p = 0; p < NWR; p++)
        if (we_i[p]) regs_q[waddr_i[p]] <= wdata_i[p];
    end
  end
endmodule
