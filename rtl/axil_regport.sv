// axil_regport: AXI4-Lite slave front end for a block of registers.
//
// Turns AXI4-Lite transactions into single-cycle register strobes. A write
// is taken when address and data are both valid and no write response is
// outstanding; it produces one wr_en_o pulse with address, data and byte
// strobes, and a response on B. A read is taken when no read data is
// outstanding; it produces one rd_en_o pulse with the address, samples
// rd_data_i in that same cycle and returns it on R. Responses are always OKAY.
//
// Interface: axi_i/axi_o are the AXI4-Lite request and response bundles
// (scu_pkg); wr_*/rd_* is the register side. rd_data_i must be a
// combinational function of rd_addr_o.
// Timing: wr_en_o and rd_en_o pulse in the cycle the handshake completes;
// the B or R response is valid from the next cycle until accepted.
//
// The management interfaces of the source design are AXI4-Lite slaves;
// this front end and its one-transaction-at-a-time behaviour are this
// design's choices.
module axil_regport
  import scu_pkg::*;
(
  input  logic               clk_i,
  input  logic               rst_ni,
  input  axil_req_t          axi_i,
  output axil_rsp_t          axi_o,
  output logic               wr_en_o,
  output logic [AXIL_AW-1:0] wr_addr_o,
  output logic [AXIL_DW-1:0] wr_data_o,
  output logic [3:0]         wr_strb_o,
  output logic               rd_en_o,
  output logic [AXIL_AW-1:0] rd_addr_o,
  input  logic [AXIL_DW-1:0] rd_data_i
);
  logic               bvalid_q, rvalid_q;
  logic [AXIL_DW-1:0] rdata_q;
  logic               wr_go, rd_go;

  assign wr_go = axi_i.awvalid && axi_i.wvalid && !bvalid_q;
  assign rd_go = axi_i.arvalid && !rvalid_q;

  assign wr_en_o   = wr_go;
  assign wr_addr_o = axi_i.awaddr;
  assign wr_data_o = axi_i.wdata;
  assign wr_strb_o = axi_i.wstrb;
  assign rd_en_o   = rd_go;
  assign rd_addr_o = axi_i.araddr;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      if (wr_go)                            bvalid_q <= 1'b1;
      else if (bvalid_q && axi_i.bready)    bvalid_q <= 1'b0;
      if (rd_go) begin
        rvalid_q <= 1'b1;
        rdata_q  <= rd_data_i;
      end else if (rvalid_q && axi_i.rready) rvalid_q <= 1'b0;
    end
  end

  always_comb begin
    axi_o         = '0;
    axi_o.awready = wr_go;
    axi_o.wready  = wr_go;
    axi_o.bvalid  = bvalid_q;
    axi_o.bresp   = 2'b00;
    axi_o.arready = rd_go;
    axi_o.rvalid  = rvalid_q;
    axi_o.rdata   = rdata_q;
    axi_o.rresp   = 2'b00;
  end

  // AXI rule: once asserted, a valid response stays until accepted.
  logic bvalid_d, rvalid_d, bready_d, rready_d;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      bvalid_d <= 1'b0; rvalid_d <= 1'b0; bready_d <= 1'b0; rready_d <= 1'b0;
    end else begin
      bvalid_d <= bvalid_q; rvalid_d <= rvalid_q;
      bready_d <= axi_i.bready; rready_d <= axi_i.rready;
      assert (!(bvalid_d && !bready_d && !bvalid_q)) else $error("axil_regport: B dropped");
      assert (!(rvalid_d && !rready_d && !rvalid_q)) else $error("axil_regport: R dropped");
    end
  end
endmodule
