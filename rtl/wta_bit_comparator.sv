// wta_bit_comparator: one bit comparator of the two-dimensional
// bit-propagating winner-take-all.
//
// While both STATE inputs are '1' the two bits are compared: if they differ,
// the STATE of the input holding '0' falls to '0', and the larger bit goes
// out as BIT_OUT. Once one STATE is '0' no comparison is made and the bit of
// the remaining winner is passed on. STATE_OUT feeds the next less
// significant comparator of the same stage; BIT_OUT feeds the comparator of
// the same bit in the next tournament stage. Purely combinational.
module wta_bit_comparator (
  input  logic state_in0,
  input  logic state_in1,
  input  logic bit_in0,
  input  logic bit_in1,
  output logic state_out0,
  output logic state_out1,
  output logic bit_out
);

  always_comb begin
    state_out0 = state_in0;
    state_out1 = state_in1;
    if (state_in0 && state_in1) begin
      if (bit_in0 != bit_in1) begin
        state_out0 = bit_in0;
        state_out1 = bit_in1;
      end
      bit_out = bit_in0 | bit_in1;
    end else if (state_in0) begin
      bit_out = bit_in0;
    end else begin
      bit_out = bit_in1;
    end
  end

endmodule
