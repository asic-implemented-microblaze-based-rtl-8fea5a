// imem: instruction memory of the execution unit.
//
// Holds the kernels as 64-bit long instruction words. The management side
// reaches it through a request/response transaction link: each request
// carries a transaction ID, a command and 64 bits of data, and every request
// is acknowledged by a response carrying the same ID and, for reads, the
// word read. Responses wait in a small response buffer until the requester
// takes them with rd_en_i. The execution unit has its own read port.
//
// Commands (scu_pkg): SETADDR sets the internal address from txdata, WRITE
// stores txdata at the address and increments it, READ returns the word at
// the address and increments it. Unknown commands are acknowledged with zero
// data.
//
// Interface: req_txvalid_i/txid/txcmd/txdata present a request for one cycle;
// it is taken only while reqbuf_full_o is low. resp_txack_o is high while a
// response is waiting, with resp_txid_o/resp_txdata_o showing it; rd_en_i
// removes it. respbuf_full_o is high when the response buffer is full (and
// requests are then refused, so reqbuf_full_o follows it).
// fetch_en_i/fetch_addr_i read a word for the execution unit; fetch_data_o
// shows it from the next cycle on and holds it until the next fetch.
// Timing: a request's response is visible the cycle after the request.
//
// The signal names and widths of the transaction link follow the source
// architecture (8-bit IDs and commands, 64-bit data, full flags, read
// enable). The command set, the depth and the response buffering are this
// design's choices.
module imem
  import scu_pkg::*;
#(
  parameter int unsigned DEPTH      = 256,
  parameter int unsigned RESP_DEPTH = 4
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  // transaction link
  input  logic                     req_txvalid_i,
  input  logic [7:0]               req_txid_i,
  input  logic [7:0]               req_txcmd_i,
  input  logic [63:0]              req_txdata_i,
  input  logic                     rd_en_i,
  output logic                     resp_txack_o,
  output logic [7:0]               resp_txid_o,
  output logic [63:0]              resp_txdata_o,
  output logic                     reqbuf_full_o,
  output logic                     respbuf_full_o,
  // execution unit fetch port
  input  logic                     fetch_en_i,
  input  logic [$clog2(DEPTH)-1:0] fetch_addr_i,
  output logic [63:0]              fetch_data_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [63:0]   mem [DEPTH];
  logic [AW-1:0] addr_q;
  logic          take;
  logic [71:0]   resp_in, resp_out;
  logic          resp_empty;
  logic [63:0]   resp_data;

  assign take = req_txvalid_i && !respbuf_full_o;

  always_comb begin
    resp_data = '0;
    if (req_txcmd_i == IMEM_CMD_READ) resp_data = mem[addr_q];
  end
  assign resp_in = {req_txid_i, resp_data};

  always_ff @(posedge clk_i) begin
    if (take && req_txcmd_i == IMEM_CMD_WRITE) mem[addr_q] <= req_txdata_i;
    if (fetch_en_i) fetch_data_o <= mem[fetch_addr_i];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      addr_q <= '0;
    end else if (take) begin
      unique case (req_txcmd_i)
        IMEM_CMD_SETADDR:               addr_q <= req_txdata_i[AW-1:0];
        IMEM_CMD_WRITE, IMEM_CMD_READ:  addr_q <= addr_q + AW'(1);
        default: ;
      endcase
    end
  end

  stream_fifo #(.W(72), .DEPTH(RESP_DEPTH)) u_resp (
    .clk_i   (clk_i),
    .rst_ni  (rst_ni),
    .push_i  (take),
    .din_i   (resp_in),
    .full_o  (respbuf_full_o),
    .pop_i   (rd_en_i && !resp_empty),
    .dout_o  (resp_out),
    .empty_o (resp_empty),
    .count_o ()
  );

  assign reqbuf_full_o = respbuf_full_o;
  assign resp_txack_o  = !resp_empty;
  assign resp_txid_o   = resp_out[71:64];
  assign resp_txdata_o = resp_out[63:0];
endmodule
