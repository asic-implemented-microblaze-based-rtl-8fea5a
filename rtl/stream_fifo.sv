// stream_fifo: synchronous first-word-fall-through FIFO.
//
// Used for the execution unit's input pipes (IPF0, IPF1), its output pipes
// (OPF0..OPF2) and the command and response FIFOs between the host side and
// the MicroBlaze side. Entries live in a DEPTH-deep array addressed by a read
// and a write pointer with one extra wrap bit each, so full and empty are told
// apart without a separate counter.
//
// Interface: push_i with din_i writes when !full_o; pop_i removes the head
// when !empty_o. dout_o always shows the head entry (first word fall
// through), so a consumer can test empty_o, use dout_o and pop in the same
// cycle. count_o is the fill level. Pushing into a full FIFO or popping an
// empty one is a protocol error (caught by assertions) and is ignored.
// Timing: a pushed word is visible on dout_o the cycle after the push.
//
// The FIFOs are named in the source architecture; their depth, width and
// fall-through behaviour are this design's choices.
module stream_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  logic                   push_i,
  input  logic [W-1:0]           din_i,
  output logic                   full_o,
  input  logic                   pop_i,
  output logic [W-1:0]           dout_o,
  output logic                   empty_o,
  output logic [$clog2(DEPTH):0] count_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp_q, rp_q;
  logic         do_push, do_pop;

  assign count_o = wp_q - rp_q;
  assign empty_o = (wp_q == rp_q);
  assign full_o  = (count_o == (AW+1)'(DEPTH));
  assign dout_o  = mem[rp_q[AW-1:0]];

  assign do_push = push_i && !full_o;
  assign do_pop  = pop_i && !empty_o;

  always_ff @(posedge clk_i) begin
    if (do_push) mem[wp_q[AW-1:0]] <= din_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (do_push) wp_q <= wp_q + (AW+1)'(1);
      if (do_pop)  rp_q <= rp_q + (AW+1)'(1);
    end
  end

  always_ff @(posedge clk_i) begin
    assert (!(push_i && full_o)) else $error("stream_fifo: push while full");
    assert (!(pop_i && empty_o)) else $error("stream_fifo: pop while empty");
  end
endmodule
