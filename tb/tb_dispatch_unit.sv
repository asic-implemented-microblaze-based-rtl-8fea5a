// tb_dispatch_unit: self-checking testbench of the dispatch unit.
//
// A model of host memory (1024 words) answers read requests after a random
// latency and raises DISP_RD_WAIT / DISP_WR_WAIT at random. The two read
// clients are four-entry FIFOs drained at random rates; the two write
// clients are queues of random words. A bus-functional AXI4-Lite master
// starts read transfers to both clients and write transfers from both
// clients, sometimes at the same time. The test checks that each client
// receives exactly the host words of its transfers in order, that host
// memory holds the written words merged under the byte mask and nothing
// else changed, that no read client overflows, that a START while busy is
// ignored, and the done counters.
module tb_dispatch_unit;
  import scu_pkg::*;
  localparam int MW = 1024;
  logic        clk = 1'b0, rst_n = 1'b1;
  axil_req_t   req = '0;
  axil_rsp_t   rsp;
  logic [63:0] rd_data = '0;
  logic        rd_valid = 1'b0, rd_wait = 1'b0, wr_wait = 1'b0;
  logic        rd_req, wr_req;
  logic [24:0] rd_addr, wr_addr;
  logic [7:0]  rd_mask, wr_mask;
  logic [63:0] wr_data;
  logic [1:0]  rdx_push, rdx_full, wrx_pop, wrx_empty;
  logic [63:0] rdx_data, wrx_data [2];
  logic [1:0]  cl_pop = '0, cl_empty;
  logic [63:0] cl_head [2];
  logic [63:0] mem [MW], ref_mem [MW];
  logic [63:0] exp_rd [2][$];
  logic [63:0] src_q [2][$];
  int checks = 0, failures = 0, n_wait = 0, n_full = 0;
  int latency_q [$];

  dispatch_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .axi_i(req), .axi_o(rsp),
    .disp_rd_data_i(rd_data), .disp_rd_valid_i(rd_valid), .disp_rd_wait_i(rd_wait),
    .disp_wr_wait_i(wr_wait), .disp_rd_req_o(rd_req), .disp_rd_addr_o(rd_addr),
    .disp_rd_mask_o(rd_mask), .disp_wr_req_o(wr_req), .disp_wr_addr_o(wr_addr),
    .disp_wr_mask_o(wr_mask), .disp_wr_data_o(wr_data),
    .rdx_push_o(rdx_push), .rdx_data_o(rdx_data), .rdx_full_i(rdx_full),
    .wrx_pop_o(wrx_pop), .wrx_data_i(wrx_data), .wrx_empty_i(wrx_empty)
  );

  for (genvar c = 0; c < 2; c++) begin : g_cl
    stream_fifo #(.W(64), .DEPTH(4)) u_cl (
      .clk_i(clk), .rst_ni(rst_n), .push_i(rdx_push[c]), .din_i(rdx_data), .full_o(rdx_full[c]),
      .pop_i(cl_pop[c]), .dout_o(cl_head[c]), .empty_o(cl_empty[c]), .count_o()
    );
  end

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // write clients: heads of the source queues
  always_comb
    for (int c = 0; c < 2; c++) begin
      wrx_empty[c] = (src_q[c].size() == 0);
      wrx_data[c]  = wrx_empty[c] ? '0 : src_q[c][0];
    end

  // host memory model, driven just after each rising edge
  logic [63:0] pend_data;
  int          pend_lat = -1;
  always @(posedge clk) begin
    automatic logic take_rd = rd_req && !rd_wait;
    automatic logic take_wr = wr_req && !wr_wait;
    automatic logic [24:0] ra = rd_addr, wa = wr_addr;
    automatic logic [63:0] wd = wr_data;
    automatic logic [7:0]  wm = wr_mask;
    automatic logic [1:0]  pops = wrx_pop;
    if (rd_req && rd_wait) n_wait++;
    if (take_wr) begin
      for (int b = 0; b < 8; b++) if (wm[b]) mem[wa][8*b +: 8] = wd[8*b +: 8];
    end
    #1;
    for (int c = 0; c < 2; c++) if (pops[c]) void'(src_q[c].pop_front());
    rd_valid = 1'b0;
    if (pend_lat == 0) begin rd_valid = 1'b1; rd_data = pend_data; pend_lat = -1; end
    else if (pend_lat > 0) pend_lat--;
    if (take_rd) begin
      check(rd_mask == 8'hFF, "read mask");
      pend_data = mem[ra];
      pend_lat  = $urandom % 4;
      if (pend_lat == 0) begin rd_valid = 1'b1; rd_data = pend_data; pend_lat = -1; end
      else pend_lat--;
    end
    rd_wait = ($urandom % 4 == 0);
    wr_wait = ($urandom % 4 == 0);
  end

  // read client drains
  always @(negedge clk) begin
    for (int c = 0; c < 2; c++) begin
      cl_pop[c] = 1'b0;
      if (rdx_full[c]) n_full++;
      if (!cl_empty[c] && $urandom % 3 == 0) begin
        cl_pop[c] = 1'b1;
        checks++;
        if (exp_rd[c].size() == 0) begin
          failures++; $display("FAIL unexpected word on client %0d", c);
        end else if (cl_head[c] !== exp_rd[c][0]) begin
          failures++; $display("FAIL client %0d got %h, expected %h", c, cl_head[c], exp_rd[c][0]);
          void'(exp_rd[c].pop_front());
        end else void'(exp_rd[c].pop_front());
      end
    end
  end

  task automatic axw(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    req.awaddr = a; req.awvalid = 1'b1; req.wdata = d; req.wstrb = 4'hF; req.wvalid = 1'b1;
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

  task automatic start_read(input int addr, input int len, input int client);
    for (int i = 0; i < len; i++) exp_rd[client].push_back(mem[addr + i]);
    axw(12'h000, 32'(addr));
    axw(12'h008, 32'hFF);
    axw(12'h004, 32'h8000_0000 | (32'(client) << 16) | 32'(len));
  endtask

  task automatic start_write(input int addr, input int len, input int client, input logic [7:0] m);
    for (int i = 0; i < len; i++) begin
      automatic logic [63:0] w = {$urandom, $urandom};
      src_q[client].push_back(w);
      for (int b = 0; b < 8; b++) if (m[b]) ref_mem[addr + i][8*b +: 8] = w[8*b +: 8];
    end
    axw(12'h010, 32'(addr));
    axw(12'h018, 32'(m));
    axw(12'h014, 32'h8000_0000 | (32'(client) << 16) | 32'(len));
  endtask

  task automatic wait_done();
    logic [31:0] r, w;
    int n = 0;
    do begin axr(12'h004, r); axr(12'h014, w); n++; end while ((r[31] || w[31]) && n < 2000);
    check(!r[31] && !w[31], "engines finish");
    while (exp_rd[0].size() + exp_rd[1].size() > 0) @(posedge clk);
  endtask

  initial begin
    logic [31:0] v;
    int nr = 0, nw = 0;
    for (int i = 0; i < MW; i++) begin mem[i] = {$urandom, $urandom}; ref_mem[i] = mem[i]; end
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    check(!rd_req && !wr_req && rdx_push == 0 && wrx_pop == 0, "quiet after reset");
    // commands to client 0, tuples to client 1
    start_read(10, 12, 0); nr += 12;
    wait_done();
    start_read(300, 40, 1); nr += 40;
    // START while busy is ignored
    axw(12'h004, 32'h8000_0005);
    wait_done();
    // responses from client 0 and result tuples from client 1, masked
    start_write(600, 9, 0, 8'hFF); nw += 9;
    wait_done();
    start_write(700, 30, 1, 8'h0F); nw += 30;
    start_read(500, 25, 0); nr += 25;
    wait_done();
    start_write(650, 20, 0, 8'hA5); nw += 20;
    start_read(0, 33, 1); nr += 33;
    wait_done();
    for (int i = 0; i < MW; i++)
      if (mem[i] !== ref_mem[i]) check(1'b0, $sformatf("host word %0d: %h, expected %h", i, mem[i], ref_mem[i]));
    check(1'b1, "host memory compared");
    axr(12'h020, v); check(v == 32'(nr), $sformatf("RD_DONE %0d, expected %0d", v, nr));
    axr(12'h024, v); check(v == 32'(nw), $sformatf("WR_DONE %0d, expected %0d", v, nw));
    check(n_wait > 0 && n_full > 0, "host wait and full client both occurred");
    check(src_q[0].size() == 0 && src_q[1].size() == 0, "write clients drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
