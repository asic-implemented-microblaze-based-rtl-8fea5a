// tb_imem_if: self-checking testbench of the instruction memory interface.
//
// Connects the interface to an instruction memory and plays the MicroBlaze
// with a bus-functional AXI4-Lite master. Every request (SETADDR, WRITE,
// READ) is issued through IMEM-REQ-CNTRL and its response collected through
// IMEM-RESP-STAT and RD_EN; the test checks response IDs and data against a
// model of the memory, then reads the program back through the fetch port.
// It also issues requests without collecting responses until the response
// buffer is full, and checks that RESP_FULL and REQ_FULL show it, that a
// further request stays pending (TXVALID reads 1) and goes out once a
// response has been collected, and that no response is lost.
module tb_imem_if;
  import scu_pkg::*;
  localparam int DEPTH = 64, RESP_DEPTH = 4;
  logic        clk = 1'b0, rst_n = 1'b1;
  axil_req_t   req = '0;
  axil_rsp_t   rsp;
  logic        txvalid, rd_en, ack, reqfull, respfull;
  logic [7:0]  txid, txcmd, rid;
  logic [63:0] txdata, rdata;
  logic        fetch_en = 1'b0;
  logic [5:0]  fetch_addr = '0;
  logic [63:0] fetch_data;
  logic [63:0] model [DEPTH];
  int checks = 0, failures = 0;
  logic [7:0]  next_id = 8'd1;

  imem_if dut (
    .clk_i(clk), .rst_ni(rst_n), .axi_i(req), .axi_o(rsp),
    .imem_reqbuf_full_i(reqfull), .imem_respbuf_full_i(respfull),
    .imem_resp_txack_i(ack), .imem_resp_txid_i(rid), .imem_resp_txdata_i(rdata),
    .imem_req_txvalid_o(txvalid), .imem_req_txid_o(txid), .imem_req_txcmd_o(txcmd),
    .imem_req_txdata_o(txdata), .imem_rd_en_o(rd_en)
  );

  imem #(.DEPTH(DEPTH), .RESP_DEPTH(RESP_DEPTH)) u_mem (
    .clk_i(clk), .rst_ni(rst_n),
    .req_txvalid_i(txvalid), .req_txid_i(txid), .req_txcmd_i(txcmd), .req_txdata_i(txdata),
    .rd_en_i(rd_en), .resp_txack_o(ack), .resp_txid_o(rid), .resp_txdata_o(rdata),
    .reqbuf_full_o(reqfull), .respbuf_full_o(respfull),
    .fetch_en_i(fetch_en), .fetch_addr_i(fetch_addr), .fetch_data_o(fetch_data)
  );

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic axw(input logic [11:0] a, input logic [31:0] d, input logic [3:0] s = 4'hF);
    @(negedge clk);
    req.awaddr = a; req.awvalid = 1'b1; req.wdata = d; req.wstrb = s; req.wvalid = 1'b1;
    req.bready = 1'b1;
    #1 while (!rsp.awready) begin @(negedge clk); #1; end
    @(negedge clk);
    req.awvalid = 1'b0; req.wvalid = 1'b0;
    while (!rsp.bvalid) @(negedge clk);
    @(posedge clk);
  endtask

  task automatic axr(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    req.araddr = a; req.arvalid = 1'b1; req.rready = 1'b1;
    #1 while (!rsp.arready) begin @(negedge clk); #1; end
    @(negedge clk);
    req.arvalid = 1'b0;
    while (!rsp.rvalid) @(negedge clk);
    d = rsp.rdata;
    @(posedge clk);
  endtask

  // issue one request; returns its ID
  task automatic issue(input logic [7:0] cmd, input logic [63:0] d, output logic [7:0] id);
    axw(12'h004, d[31:0]);
    axw(12'h008, d[63:32]);
    id = next_id;
    axw(12'h000, {8'd0, cmd, next_id, 8'h01});
    next_id++;
  endtask

  // wait for TXACK, take the response, check ID (and data)
  task automatic collect(input logic [7:0] id, input logic chk, input logic [63:0] exp);
    logic [31:0] st, lo, hi;
    int n = 0;
    do begin axr(12'h00C, st); n++; end while (!st[2] && n < 50);
    check(st[2], "TXACK seen");
    axw(12'h000, 32'h0000_0002, 4'b0001);  // RD_EN only: keep a pending request's ID and command
    axr(12'h00C, st);
    axr(12'h010, lo);
    axr(12'h014, hi);
    check(st[15:8] == id, $sformatf("RESP_RD_TXID %0d, expected %0d", st[15:8], id));
    if (chk) check({hi, lo} == exp, $sformatf("response data %h, expected %h", {hi, lo}, exp));
  endtask

  initial begin
    logic [7:0]  id, ids [RESP_DEPTH + 1];
    logic [31:0] w;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    axr(12'h00C, w);
    check(w == 0, "status after reset");
    // load the whole memory
    issue(IMEM_CMD_SETADDR, 64'd0, id); collect(id, 1'b0, '0);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = {$urandom, $urandom};
      issue(IMEM_CMD_WRITE, model[i], id); collect(id, 1'b0, '0);
    end
    // read back a stretch from address 17
    issue(IMEM_CMD_SETADDR, 64'd17, id); collect(id, 1'b0, '0);
    for (int i = 17; i < 29; i++) begin
      issue(IMEM_CMD_READ, '0, id); collect(id, 1'b1, model[i]);
    end
    // fill the response buffer without collecting
    issue(IMEM_CMD_SETADDR, 64'd40, id); collect(id, 1'b0, '0);
    for (int i = 0; i < RESP_DEPTH + 1; i++) issue(IMEM_CMD_READ, '0, ids[i]);
    repeat (4) @(posedge clk);
    axr(12'h00C, w);
    check(w[0] && w[1] && w[2], "REQ_FULL, RESP_FULL and TXACK with a full response buffer");
    axr(12'h000, w);
    check(w[0], "request beyond the full buffer stays pending");
    for (int i = 0; i < RESP_DEPTH + 1; i++) collect(ids[i], 1'b1, model[40 + i]);
    axr(12'h000, w);
    check(!w[0] && !w[1], "nothing pending at the end");
    axr(12'h00C, w);
    check(w[2:0] == 3'b000, "buffers empty at the end");
    // fetch port sees the loaded program
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); fetch_en = 1'b1; fetch_addr = 6'(i);
      @(negedge clk); fetch_en = 1'b0;
      check(fetch_data == model[i], $sformatf("fetch %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
