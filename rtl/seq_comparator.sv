// seq_comparator: comparator that looks at the most significant bits first.
//
// In a plain comparator every bit pair drives an XOR gate, so every change of
// every operand bit toggles logic even when the MSBs alone already decide the
// result. Here the MSB pair is compared first. When the MSBs differ, that
// difference is ORed into all lower operand bits of both operands, which
// forces them to ones: the lower XOR gates then see constant inputs and stop
// toggling, and the MSB difference alone produces "not equal". Only when the
// MSBs agree do the lower bits take part.
//
// The same blocking serves the magnitude result: when the MSBs differ they
// decide which operand is smaller (for signed operands the one with the sign
// bit set, for unsigned the one with the MSB clear); otherwise the blocked
// lower bits are compared.
//
// Interface (purely combinational): a_i, b_i operands, signed_i selects two's
// complement ordering for lt_o; neq_o / eq_o equality, lt_o = a_i < b_i.
//
// The equality structure (MSB XOR, OR into the lower bits of both operands,
// XOR of the lower bits, final OR giving NEQ) and the 32-bit default width
// follow the source design. The less-than output and the signed option are
// this design's additions, built on the same MSB-first blocking.
module seq_comparator #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic         signed_i,
  output logic         neq_o,
  output logic         eq_o,
  output logic         lt_o
);
  logic         msb_diff;
  logic [W-2:0] a_lo, b_lo;
  logic         lo_diff;
  logic         lo_lt;

  assign msb_diff = a_i[W-1] ^ b_i[W-1];

  // Lower bits are forced to ones once the MSBs have decided.
  assign a_lo = a_i[W-2:0] | {(W-1){msb_diff}};
  assign b_lo = b_i[W-2:0] | {(W-1){msb_diff}};

  assign lo_diff = |(a_lo ^ b_lo);
  assign lo_lt   = (a_lo < b_lo);

  assign neq_o = msb_diff | lo_diff;
  assign eq_o  = ~neq_o;

  always_comb begin
    if (msb_diff) lt_o = signed_i ? a_i[W-1] : b_i[W-1];
    else          lt_o = lo_lt;
  end
endmodule
