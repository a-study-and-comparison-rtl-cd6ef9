// yavadunam_squarer: N-bit squarer using the Yavadunam sutra.
//
// The input p is compared with the base 2^(N-1), which reduces to testing
// its MSB. At or above the base (mode 1) the mode-1 datapath squares p and
// its 2N-bit result appears on q while r is 0; below the base (mode 2) the
// mode-2 datapath squares p and its (2N-2)-bit result appears on r while q
// is 0. Both datapaths compute in parallel and two output multiplexers pick
// the live one, as in the design's top-level schematic (blocks G1 and G2 and
// the q/r muxes). At N = 4 this gives 4 + 8 + 6 = 18 I/O pins. Driving the
// unselected output to 0 matches the design's simulation waveforms.
// Combinational: q and r follow p after the datapath delay.
module yavadunam_squarer #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   p,
  output logic [2*N-1:0] q,
  output logic [2*N-3:0] r
);

  logic [2*N-1:0] sq_mode1;
  logic [2*N-3:0] sq_mode2;
  logic           mode1;    // p >= 2^(N-1)

  yava_mode1 #(.N(N)) u_g1 (.p(p), .q(sq_mode1));
  yava_mode2 #(.N(N)) u_g2 (.p(p), .r(sq_mode2));

  always_comb begin
    mode1 = p[N-1];
    q     = mode1 ? sq_mode1 : '0;
    r     = mode1 ? '0 : sq_mode2;
  end

endmodule
