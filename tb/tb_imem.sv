// tb_imem: self-checking testbench of the instruction memory.
//
// Loads random words through SETADDR/WRITE transactions, reads them back
// with READ transactions and through the fetch port, and checks every
// response's transaction ID and data. Requests are also sent without taking
// the responses until the response buffer is full, to check that the full
// flags rise, that a request is refused then, and that the buffered responses
// come back in order.
module tb_imem;
  import scu_pkg::*;
  localparam int DEPTH = 256, RESP_DEPTH = 4;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        txvalid = 1'b0, rd_en = 1'b0;
  logic [7:0]  txid = '0, txcmd = '0;
  logic [63:0] txdata = '0;
  logic        ack, reqfull, respfull;
  logic [7:0]  rid;
  logic [63:0] rdata;
  logic        fetch_en = 1'b0;
  logic [7:0]  fetch_addr = '0;
  logic [63:0] fetch_data;
  logic [63:0] model [DEPTH];
  int checks = 0, failures = 0, n_refused = 0;
  logic [7:0] next_id = 8'd0;

  imem #(.DEPTH(DEPTH), .RESP_DEPTH(RESP_DEPTH)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .req_txvalid_i(txvalid), .req_txid_i(txid), .req_txcmd_i(txcmd), .req_txdata_i(txdata),
    .rd_en_i(rd_en), .resp_txack_o(ack), .resp_txid_o(rid), .resp_txdata_o(rdata),
    .reqbuf_full_o(reqfull), .respbuf_full_o(respfull),
    .fetch_en_i(fetch_en), .fetch_addr_i(fetch_addr), .fetch_data_o(fetch_data)
  );

  always #5 clk = ~clk;

  task automatic send(input logic [7:0] cmd, input logic [63:0] data);
    @(negedge clk);
    txvalid = 1'b1; txid = next_id; txcmd = cmd; txdata = data;
    @(negedge clk);
    txvalid = 1'b0;
  endtask

  task automatic take(input logic [7:0] exp_id, input logic check_data, input logic [63:0] exp);
    checks++;
    if (!ack) begin failures++; $display("FAIL no response for id %0d", exp_id); return; end
    checks++;
    if (rid !== exp_id || (check_data && rdata !== exp)) begin
      failures++;
      $display("FAIL response id %0d data %h, expected id %0d data %h", rid, rdata, exp_id, exp);
    end
    rd_en = 1'b1;
    @(negedge clk);
    rd_en = 1'b0;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    // load
    send(IMEM_CMD_SETADDR, 64'd0); take(next_id, 1'b0, '0); next_id++;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = {32'($urandom), 32'($urandom)};
      send(IMEM_CMD_WRITE, model[i]); take(next_id, 1'b0, '0); next_id++;
    end
    // read back a window
    send(IMEM_CMD_SETADDR, 64'd40); take(next_id, 1'b0, '0); next_id++;
    for (int i = 40; i < 72; i++) begin
      send(IMEM_CMD_READ, '0); take(next_id, 1'b1, model[i]); next_id++;
    end
    // fill the response buffer
    send(IMEM_CMD_SETADDR, 64'd100); take(next_id, 1'b0, '0); next_id++;
    for (int i = 0; i < RESP_DEPTH; i++) begin
      txid = next_id; send(IMEM_CMD_READ, '0); next_id++;
    end
    checks++;
    if (!reqfull || !respfull) begin failures++; $display("FAIL full flags not raised"); end
    // a refused request must not be answered or advance the address
    send(IMEM_CMD_READ, '0); n_refused++;
    for (int i = 0; i < RESP_DEPTH; i++) take(8'(next_id - RESP_DEPTH + i), 1'b1, model[100 + i]);
    checks++;
    if (ack || reqfull) begin failures++; $display("FAIL buffer not drained"); end
    send(IMEM_CMD_READ, '0); take(next_id, 1'b1, model[104]); next_id++;
    // fetch port
    for (int i = 0; i < 200; i++) begin
      logic [7:0] a;
      a = 8'($urandom);
      @(negedge clk); fetch_en = 1'b1; fetch_addr = a;
      @(negedge clk); fetch_en = 1'b0; fetch_addr = 8'($urandom);
      checks++;
      if (fetch_data !== model[a]) begin failures++; $display("FAIL fetch %0d: %h vs %h", a, fetch_data, model[a]); end
      @(negedge clk);
      checks++;
      if (fetch_data !== model[a]) begin failures++; $display("FAIL fetch data not held"); end
    end
    $display("refused=%0d", n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
