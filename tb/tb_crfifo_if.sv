// tb_crfifo_if: self-checking testbench of the command/response FIFO
// interface.
//
// The interface sits between a command FIFO and a response FIFO (depth 4
// here) and a bus-functional AXI4-Lite master that plays the MicroBlaze: it
// waits for CMD Interrupt, takes a command with RD_FIFO, reads its two
// words, and answers with a response derived from it (the command's bits
// inverted, rotated by 8) through the response registers and FIFO_WR_EN.
// The host side pushes random commands and drains responses slowly at first,
// so the response FIFO fills up. The test checks that every command reaches
// the MicroBlaze once and in order, that every response arrives in order
// with the right value, that FIFO_CAN_ACPT reads 0 while the response FIFO
// is full and a response then stays pending, that an RD_FIFO issued with an
// empty command FIFO waits for the next command, and that the interrupt
// follows INT_EN and a waiting command.
module tb_crfifo_if;
  import scu_pkg::*;
  localparam int N = 40;
  logic        clk = 1'b0, rst_n = 1'b1;
  axil_req_t   req = '0;
  axil_rsp_t   rsp;
  logic        irq;
  logic        cmd_push = 1'b0, cmd_full, cmd_empty, cmd_pop;
  logic [63:0] cmd_din = '0, cmd_head;
  logic        resp_push, resp_full, resp_empty, resp_pop = 1'b0;
  logic [63:0] resp_din, resp_head;
  logic [63:0] cmds [N];
  int checks = 0, failures = 0, n_resp = 0, n_pending_full = 0;
  logic        slow_drain = 1'b1;

  stream_fifo #(.W(64), .DEPTH(4)) u_cmd (
    .clk_i(clk), .rst_ni(rst_n), .push_i(cmd_push), .din_i(cmd_din), .full_o(cmd_full),
    .pop_i(cmd_pop), .dout_o(cmd_head), .empty_o(cmd_empty), .count_o()
  );
  stream_fifo #(.W(64), .DEPTH(4)) u_resp (
    .clk_i(clk), .rst_ni(rst_n), .push_i(resp_push), .din_i(resp_din), .full_o(resp_full),
    .pop_i(resp_pop), .dout_o(resp_head), .empty_o(resp_empty), .count_o()
  );

  crfifo_if dut (
    .clk_i(clk), .rst_ni(rst_n), .axi_i(req), .axi_o(rsp), .cmd_irq_o(irq),
    .fifo_cmd_valid_i(!cmd_empty), .fifo_can_accept_i(!resp_full), .fifo_cmd_i(cmd_head),
    .fifo_cmd_accepted_o(cmd_pop), .fifo_write_en_o(resp_push), .fifo_write_data_o(resp_din)
  );

  always #5 clk = ~clk;

  function automatic logic [63:0] answer(input logic [63:0] c);
    return {~c[55:0], ~c[63:56]};
  endfunction

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

  // host: push the commands with random gaps
  initial begin
    for (int i = 0; i < N; i++) cmds[i] = {$urandom, $urandom};
    @(posedge rst_n);
    repeat (300) @(posedge clk);  // MicroBlaze waits on an empty FIFO first
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      while (cmd_full) @(negedge clk);
      cmd_push = 1'b1; cmd_din = cmds[i];
      @(negedge clk);
      cmd_push = 1'b0;
      repeat ($urandom % 20) @(negedge clk);
    end
  end

  // host: drain and check the responses, slowly for the first part
  initial begin
    @(posedge rst_n);
    while (n_resp < N) begin
      @(negedge clk);
      resp_pop = 1'b0;
      if (!resp_empty && (!slow_drain || $urandom % 200 == 0)) begin
        check(resp_head == answer(cmds[n_resp]), $sformatf("response %0d", n_resp));
        resp_pop = 1'b1;
        n_resp++;
      end
      if (n_resp == 12) slow_drain = 1'b0;
    end
    @(negedge clk) resp_pop = 1'b0;
  end

  initial begin
    logic [31:0] lo, hi, st;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    check(!irq, "no interrupt after reset");
    // RD_FIFO on an empty command FIFO waits
    axw(12'h010, 32'h1);
    repeat (20) @(posedge clk);
    axr(12'h010, st);
    check(st[0] && st[24], "RD_FIFO pending, FIFO_CAN_ACPT set");
    while (cmd_empty) @(posedge clk);
    repeat (3) @(posedge clk);
    axr(12'h010, st);
    check(!st[0], "RD_FIFO served by the first command");
    axr(12'h000, lo); axr(12'h004, hi);
    check({hi, lo} == cmds[0], "first command");
    axw(12'h008, answer(cmds[0]) >> 0);
    axw(12'h00C, answer(cmds[0]) >> 32);
    axw(12'h010, 32'h2);
    // remaining commands, interrupt driven (INT_EN kept set)
    for (int i = 1; i < N; i++) begin
      axw(12'h010, 32'h4);
      while (!irq) @(posedge clk);
      axw(12'h010, 32'h5);  // RD_FIFO with INT_EN
      do axr(12'h010, st); while (st[0]);
      axr(12'h000, lo); axr(12'h004, hi);
      check({hi, lo} == cmds[i], $sformatf("command %0d", i));
      // previous response still pending?
      do begin
        axr(12'h010, st);
        if (st[1] && !st[24]) n_pending_full++;
      end while (st[1]);
      axw(12'h008, answer(cmds[i]) >> 0);
      axw(12'h00C, answer(cmds[i]) >> 32);
      axw(12'h010, 32'h6);
    end
    // interrupt masked
    axw(12'h010, 32'h0);
    while (n_resp < N) @(posedge clk);
    check(!irq, "no interrupt with INT_EN clear");
    check(n_pending_full > 0, $sformatf("response waited on a full response FIFO %0d times", n_pending_full));
    check(cmd_empty && resp_empty, "both FIFOs drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
