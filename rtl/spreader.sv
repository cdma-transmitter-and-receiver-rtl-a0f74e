// spreader: NRZ coding and multiplication of the data bit by the PN code.
//
// In polar form (0 -> +1, 1 -> -1) spreading is the product of the data level
// and the chip level; on 0/1 bits that product is an XOR, so the NRZ coder and
// the multiplier reduce to one gate. The data bit is taken on `sos` (start of
// a code period) and held in buf_data for the rest of the bit. chip_signal is
// combinational and already uses the new bit in the `sos` cycle itself, so
// every chip of a bit, its first included, carries the same data bit.
module spreader (
  input  logic clk,
  input  logic rst,
  input  logic sos,
  input  logic user_data,
  input  logic pn_seq,
  output logic buf_data,
  output logic chip_signal
);

  always_ff @(posedge clk) begin
    if (rst)      buf_data <= 1'b0;
    else if (sos) buf_data <= user_data;
  end

  assign chip_signal = (sos ? user_data : buf_data) ^ pn_seq;

endmodule
