// ca_decoder: the column-address decoder of the redundancy controller. It turns the
// column address CA (which of the MUX words of a physical row is accessed) into a one-hot
// vector, one bit per redundant slave latch.
//
// The one-hot vector is combined with the Match signal into the redundant write clocks
// RED_WCLK and, on reads, registered into RED_QSEL. An enable input forces all outputs
// low (used for deselected cycles); that input is this design's choice.
//
// Interface: en, ca in; onehot out (MUX bits). Timing: combinational.
module ca_decoder #(
  parameter int unsigned MUX  = 8,
  parameter int unsigned CA_W = $clog2(MUX)
) (
  input  logic            en,
  input  logic [CA_W-1:0] ca,
  output logic [MUX-1:0]  onehot
);
  always_comb begin
    onehot = '0;
    for (int unsigned i = 0; i < MUX; i++)
      if (en && (ca == CA_W'(i))) onehot[i] = 1'b1;
  end
endmodule
