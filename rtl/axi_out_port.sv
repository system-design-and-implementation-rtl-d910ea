// axi_out_port: interface output port set of a shared channel.
//
// The shared bus carries one beat at a time together with the index of the
// destination it is for. This block turns that index into the VALID of the
// one addressed destination and returns that destination's READY as the bus
// READY. It is purely combinational: the only register layer of a channel sits
// in its input ports. A beat whose index names no destination is taken and
// dropped (bus_ready high, no VALID raised) so that the bus cannot hang on it;
// that guard is this design's choice.
module axi_out_port #(
  parameter int unsigned N_DST = 11,
  parameter int unsigned DW    = (N_DST > 1) ? $clog2(N_DST) : 1
) (
  input  logic             bus_valid,
  input  logic [DW-1:0]    bus_dst,
  output logic             bus_ready,
  output logic [N_DST-1:0] dst_valid,
  input  logic [N_DST-1:0] dst_ready
);
  always_comb begin
    dst_valid = '0;
    bus_ready = 1'b1;
    if (int'(bus_dst) < N_DST) begin
      dst_valid[bus_dst] = bus_valid;
      bus_ready          = dst_ready[bus_dst];
    end
  end
endmodule
