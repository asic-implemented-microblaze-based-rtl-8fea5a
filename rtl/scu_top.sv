// scu_top: stream coprocessor for a data stream management system.
//
// A host hands the coprocessor kernels (programs for a VLIW execution unit)
// and streams of tuples; the coprocessor runs the kernels over the streams
// and returns result streams. This top joins the two halves:
//   * stream processing unit: the execution unit, its instruction memory,
//     two input pipes and three output pipes between it and the stream
//     register file;
//   * stream management unit: the dispatch unit facing the host, the
//     command and response FIFOs, and the three MicroBlaze interfaces:
//     CRFIFO_IF (host commands and responses), IMEM_IF (loading kernels) and
//     KRM_IF (descriptor files and the launch/read-back state machine), plus
//     the kernel run monitor that starts and times the execution unit.
// The MicroBlaze itself, its bus fabric and standard peripherals, the PCIe
// endpoint, the stream register file and the stripe pipes are not part of
// this RTL: their connections are the ports of this module.
//
// Ports:
//   axi_du_*, axi_crf_*, axi_imem_*, axi_krm_*  AXI4-Lite slaves of the
//                dispatch unit and the three MicroBlaze interfaces;
//                cmd_irq_o, krm_irq_o their interrupts.
//   disp_*       host processor interface of the dispatch unit (word
//                addressed reads and writes of host memory)
//   rsp_*        tuples read from the host, towards the read stripe pipe
//   wsp_*        result tuples from the write stripe pipe, to the host
//   srf_ipf_*    write side of the input pipes (tuples from the stream
//                register file); srf_opf_* read side of the output pipes
//   kdr_o, amem_o, sdr_in_o, sdr_out_o, orf_o  kernel configuration as held
//                by the kernel run monitor, for the stream register file side
//   eu_busy_o, eu_perf_o  execution unit activity and event counters
// Host words reach the command FIFO through dispatch unit read client 0 and
// the read stripe pipe through client 1; responses leave through write
// client 0 and result tuples through write client 1. All FIFOs are
// first-word-fall-through: *_data shows the head, pop/push only while
// !empty/!full. One clock, asynchronous active-low reset.
//
// The partition and the block list follow the source architecture; FIFO and
// memory depths are this design's choices.
module scu_top
  import scu_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned PIPE_DEPTH = 16,
  parameter int unsigned CRF_DEPTH  = 16,
  parameter int unsigned NKERN      = 16
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  // MicroBlaze side
  input  axil_req_t        axi_du_i,
  output axil_rsp_t        axi_du_o,
  input  axil_req_t        axi_crf_i,
  output axil_rsp_t        axi_crf_o,
  input  axil_req_t        axi_imem_i,
  output axil_rsp_t        axi_imem_o,
  input  axil_req_t        axi_krm_i,
  output axil_rsp_t        axi_krm_o,
  output logic             cmd_irq_o,
  output logic             krm_irq_o,
  // host processor interface
  input  logic [63:0]      disp_rd_data_i,
  input  logic             disp_rd_valid_i,
  input  logic             disp_rd_wait_i,
  input  logic             disp_wr_wait_i,
  output logic             disp_rd_req_o,
  output logic [24:0]      disp_rd_addr_o,
  output logic [7:0]       disp_rd_mask_o,
  output logic             disp_wr_req_o,
  output logic [24:0]      disp_wr_addr_o,
  output logic [7:0]       disp_wr_mask_o,
  output logic [63:0]      disp_wr_data_o,
  // stripe pipes
  output logic             rsp_push_o,
  output logic [63:0]      rsp_data_o,
  input  logic             rsp_full_i,
  output logic             wsp_pop_o,
  input  logic [63:0]      wsp_data_i,
  input  logic             wsp_empty_i,
  // stream register file side
  input  logic [N_IPF-1:0] srf_ipf_push_i,
  input  word_t            srf_ipf_data_i [N_IPF],
  output logic [N_IPF-1:0] srf_ipf_full_o,
  input  logic [N_OPF-1:0] srf_opf_pop_i,
  output word_t            srf_opf_data_o [N_OPF],
  output logic [N_OPF-1:0] srf_opf_empty_o,
  output logic [63:0]      kdr_o,
  output logic [63:0]      amem_o,
  output logic [63:0]      sdr_in_o  [N_IPF],
  output logic [63:0]      sdr_out_o [N_OPF],
  output logic [63:0]      orf_o     [N_ORF],
  // status
  output logic             eu_busy_o,
  output eu_perf_t         eu_perf_o
);
  localparam int unsigned AW = $clog2(IMEM_DEPTH);

  // ------------------------------------------------ dispatch unit
  logic [1:0]  rdx_push, rdx_full, wrx_pop, wrx_empty;
  logic [63:0] rdx_data;
  logic [63:0] wrx_data [2];

  dispatch_unit #(.NRDX(2), .NWRX(2)) u_du (
    .clk_i, .rst_ni, .axi_i(axi_du_i), .axi_o(axi_du_o),
    .disp_rd_data_i, .disp_rd_valid_i, .disp_rd_wait_i, .disp_wr_wait_i,
    .disp_rd_req_o, .disp_rd_addr_o, .disp_rd_mask_o,
    .disp_wr_req_o, .disp_wr_addr_o, .disp_wr_mask_o, .disp_wr_data_o,
    .rdx_push_o(rdx_push), .rdx_data_o(rdx_data), .rdx_full_i(rdx_full),
    .wrx_pop_o(wrx_pop), .wrx_data_i(wrx_data), .wrx_empty_i(wrx_empty)
  );

  assign rsp_push_o  = rdx_push[1];
  assign rsp_data_o  = rdx_data;
  assign rdx_full[1] = rsp_full_i;
  assign wsp_pop_o   = wrx_pop[1];
  assign wrx_data[1] = wsp_data_i;
  assign wrx_empty[1] = wsp_empty_i;

  // ------------------------------------------------ command/response FIFOs
  logic        cmd_empty, cmd_pop, resp_full, resp_push;
  logic [63:0] cmd_head, resp_data;

  stream_fifo #(.W(64), .DEPTH(CRF_DEPTH)) u_cmd_fifo (
    .clk_i, .rst_ni,
    .push_i(rdx_push[0]), .din_i(rdx_data), .full_o(rdx_full[0]),
    .pop_i(cmd_pop), .dout_o(cmd_head), .empty_o(cmd_empty), .count_o()
  );

  stream_fifo #(.W(64), .DEPTH(CRF_DEPTH)) u_resp_fifo (
    .clk_i, .rst_ni,
    .push_i(resp_push), .din_i(resp_data), .full_o(resp_full),
    .pop_i(wrx_pop[0]), .dout_o(wrx_data[0]), .empty_o(wrx_empty[0]),
    .count_o()
  );

  crfifo_if u_crfifo_if (
    .clk_i, .rst_ni,
    .axi_i(axi_crf_i), .axi_o(axi_crf_o), .cmd_irq_o(cmd_irq_o),
    .fifo_cmd_valid_i(!cmd_empty), .fifo_can_accept_i(!resp_full), .fifo_cmd_i(cmd_head),
    .fifo_cmd_accepted_o(cmd_pop), .fifo_write_en_o(resp_push), .fifo_write_data_o(resp_data)
  );

  // ------------------------------------------------- instruction memory
  logic          im_txvalid, im_rd_en, im_txack, im_reqfull, im_respfull;
  logic [7:0]    im_txid, im_txcmd, im_rid;
  logic [63:0]   im_txdata, im_rdata;
  logic          fetch_en;
  logic [AW-1:0] fetch_addr;
  logic [63:0]   fetch_data;

  imem_if u_imem_if (
    .clk_i, .rst_ni,
    .axi_i(axi_imem_i), .axi_o(axi_imem_o),
    .imem_reqbuf_full_i(im_reqfull), .imem_respbuf_full_i(im_respfull),
    .imem_resp_txack_i(im_txack), .imem_resp_txid_i(im_rid), .imem_resp_txdata_i(im_rdata),
    .imem_req_txvalid_o(im_txvalid), .imem_req_txid_o(im_txid), .imem_req_txcmd_o(im_txcmd),
    .imem_req_txdata_o(im_txdata), .imem_rd_en_o(im_rd_en)
  );

  imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk_i, .rst_ni,
    .req_txvalid_i(im_txvalid), .req_txid_i(im_txid), .req_txcmd_i(im_txcmd),
    .req_txdata_i(im_txdata), .rd_en_i(im_rd_en),
    .resp_txack_o(im_txack), .resp_txid_o(im_rid), .resp_txdata_o(im_rdata),
    .reqbuf_full_o(im_reqfull), .respbuf_full_o(im_respfull),
    .fetch_en_i(fetch_en), .fetch_addr_i(fetch_addr), .fetch_data_o(fetch_data)
  );

  // ------------------------------------------------- kernel run monitor
  logic          krm_txvalid, krm_txack, krm_int;
  logic [7:0]    krm_txid, krm_txcmd, krm_rid, krm_state;
  logic [63:0]   krm_txdata, krm_rdata;
  logic          eu_run, eu_done;
  logic [AW-1:0] eu_start_pc;
  logic [N_OPF-1:0] opf_push;

  krm_if #(.NKERN(NKERN)) u_krm_if (
    .clk_i, .rst_ni,
    .axi_i(axi_krm_i), .axi_o(axi_krm_o), .irq_o(krm_irq_o),
    .krm_req_txvalid_o(krm_txvalid), .krm_req_txid_o(krm_txid), .krm_req_txcmd_o(krm_txcmd),
    .krm_req_txdata_o(krm_txdata), .krm_resp_txack_i(krm_txack), .krm_resp_txid_i(krm_rid),
    .krm_resp_txdata_i(krm_rdata), .krm_int_i(krm_int), .krm_state_i(krm_state)
  );

  krm #(.AW(AW)) u_krm (
    .clk_i, .rst_ni,
    .req_txvalid_i(krm_txvalid), .req_txid_i(krm_txid), .req_txcmd_i(krm_txcmd),
    .req_txdata_i(krm_txdata), .resp_txack_o(krm_txack), .resp_txid_o(krm_rid),
    .resp_txdata_o(krm_rdata), .int_o(krm_int), .state_o(krm_state),
    .eu_run_o(eu_run), .eu_start_pc_o(eu_start_pc), .eu_done_i(eu_done), .opf_push_i(opf_push),
    .kdr_o(kdr_o), .amem_o(amem_o), .sdr_in_o(sdr_in_o), .sdr_out_o(sdr_out_o), .orf_o(orf_o)
  );

  // ------------------------------------------------- pipes and execution unit
  word_t            ipf_head [N_IPF];
  logic [N_IPF-1:0] ipf_empty, ipf_pop;
  word_t            opf_data [N_OPF];
  logic [N_OPF-1:0] opf_full;

  for (genvar p = 0; p < N_IPF; p++) begin : g_ipf
    stream_fifo #(.W(XLEN), .DEPTH(PIPE_DEPTH)) u_ipf (
      .clk_i, .rst_ni,
      .push_i(srf_ipf_push_i[p]), .din_i(srf_ipf_data_i[p]), .full_o(srf_ipf_full_o[p]),
      .pop_i(ipf_pop[p]), .dout_o(ipf_head[p]), .empty_o(ipf_empty[p]), .count_o()
    );
  end

  for (genvar p = 0; p < N_OPF; p++) begin : g_opf
    stream_fifo #(.W(XLEN), .DEPTH(PIPE_DEPTH)) u_opf (
      .clk_i, .rst_ni,
      .push_i(opf_push[p]), .din_i(opf_data[p]), .full_o(opf_full[p]),
      .pop_i(srf_opf_pop_i[p]), .dout_o(srf_opf_data_o[p]), .empty_o(srf_opf_empty_o[p]),
      .count_o()
    );
  end

  execution_unit #(.AW(AW)) u_eu (
    .clk_i, .rst_ni,
    .run_i(eu_run), .start_pc_i(eu_start_pc), .busy_o(eu_busy_o), .done_o(eu_done),
    .perf_o(eu_perf_o),
    .fetch_en_o(fetch_en), .fetch_addr_o(fetch_addr), .fetch_data_i(fetch_data),
    .ipf_data_i(ipf_head), .ipf_empty_i(ipf_empty), .ipf_pop_o(ipf_pop),
    .opf_data_o(opf_data), .opf_push_o(opf_push), .opf_full_i(opf_full)
  );
endmodule
